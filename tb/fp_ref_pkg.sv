// fp_ref_pkg: reference arithmetic for the testbenches, independent of the
// RTL. Binary32 operations are computed in double precision and rounded
// once to binary32 (round to nearest even) by bit manipulation of the
// double. Because double has more than 2*24+2 significand bits, this double
// rounding gives the correctly rounded binary32 sum, difference and product.
// Results below the smallest normal number are flushed to signed zero and
// denormal operands are read as zero, as the RTL does.
// It also holds a sample-by-sample model of one PI axis (pi_axis) built on
// these operations.
package fp_ref_pkg;

  function automatic logic [31:0] r2f(real r);
    logic [63:0] b;
    logic        s;
    int          e;
    logic [52:0] m;
    logic [24:0] q;
    logic        g, st;
    b = $realtobits(r);
    s = b[63];
    if (b[62:52] == 11'h7FF) return (b[51:0] != 0) ? 32'h7FC0_0000 : {s, 8'hFF, 23'h0};
    if (b[62:52] == 11'h000) return {s, 31'h0};
    e  = int'(b[62:52]) - 1023 + 127;
    m  = {1'b1, b[51:0]};
    q  = {1'b0, m[52:29]};
    g  = m[28];
    st = |m[27:0];
    if (g && (st || q[0])) q = q + 1;
    if (q[24]) begin
      q = q >> 1;
      e = e + 1;
    end
    if (e >= 255) return {s, 8'hFF, 23'h0};
    if (e <= 0)   return {s, 31'h0};
    return {s, e[7:0], q[22:0]};
  endfunction

  function automatic real f2r(logic [31:0] f);
    logic [63:0] b;
    if (f[30:23] == 8'h00) return $bitstoreal({f[31], 63'h0});
    b = {f[31], 11'(int'(f[30:23]) - 127 + 1023), f[22:0], 29'h0};
    if (f[30:23] == 8'hFF) b[62:52] = 11'h7FF;
    return $bitstoreal(b);
  endfunction

  function automatic logic f_is_nan(logic [31:0] f);
    return (f[30:23] == 8'hFF) && (f[22:0] != 0);
  endfunction

  function automatic logic [31:0] f_add(logic [31:0] a, logic [31:0] b);
    if (f_is_nan(a) || f_is_nan(b)) return 32'h7FC0_0000;
    return r2f(f2r(a) + f2r(b));
  endfunction

  function automatic logic [31:0] f_sub(logic [31:0] a, logic [31:0] b);
    if (f_is_nan(a) || f_is_nan(b)) return 32'h7FC0_0000;
    return r2f(f2r(a) - f2r(b));
  endfunction

  function automatic logic [31:0] f_mul(logic [31:0] a, logic [31:0] b);
    if (f_is_nan(a) || f_is_nan(b)) return 32'h7FC0_0000;
    return r2f(f2r(a) * f2r(b));
  endfunction

  // State of one PI axis between samples.
  typedef struct {
    logic [31:0] y_prev;   // integrator state y(n-1)
    logic [31:0] bc;       // anti-windup term (1/ki) * e(n-1)
  } pi_state_t;

  typedef struct {
    logic [31:0] kp, ki_ts, inv_kb, umax, umin;
  } pi_gains_t;

  // One sample of the PI axis; returns the saturated output.
  function automatic logic [31:0] pi_step(input pi_gains_t g, inout pi_state_t st,
                                          input logic [31:0] u,
                                          output logic above, output logic below);
    logic [31:0] ai, ap, mi, mp, y, p, s, v, ex;
    ai = f_sub(u, st.bc);
    ap = f_sub(u, 32'h0);
    mi = f_mul(ai, g.ki_ts);
    mp = f_mul(ap, g.kp);
    y  = f_add(st.y_prev, mi);
    p  = f_add(mp, 32'h0);
    s  = f_add(y, p);
    above = f2r(s) > f2r(g.umax);
    below = f2r(s) < f2r(g.umin);
    v  = above ? g.umax : (below ? g.umin : s);
    ex = f_sub(s, v);
    st.bc     = f_mul(ex, g.inv_kb);
    st.y_prev = y;
    return v;
  endfunction

endpackage
