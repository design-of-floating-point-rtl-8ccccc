// fp_addsub: pipelined binary32 adder / subtractor, r = a + b (sub = 0) or
// r = a - b (sub = 1).
//
// The operation is computed in one combinational block and then carried
// through LATENCY registers, so r and out_valid appear exactly LATENCY
// cycles after the operands and in_valid were presented; a new operation may
// start every cycle. Inside: the operand of larger magnitude is kept as is,
// the other is shifted right by the exponent difference with the shifted-out
// bits folded into a sticky bit, the significands are added or subtracted,
// the result is normalised and rounded to nearest even (fp_pkg). Denormal
// inputs count as zero, denormal results flush to zero, NaN inputs and
// inf - inf give a quiet NaN, an exact zero difference is +0.
// The 7-cycle default latency is the adder latency given in the design
// description; the internal structure is this design's own.
module fp_addsub
  import fp_pkg::*;
#(
  parameter int unsigned LATENCY = LAT_ADD
) (
  input  logic     clk,
  input  logic     rst,
  input  logic     in_valid,
  input  logic     sub,
  input  float32_t a,
  input  float32_t b,
  output logic     out_valid,
  output float32_t r
);

  float32_t r_comb;

  always_comb begin
    logic        sa, sb, sx, sy, eff_sub;
    logic [7:0]  ea, eb, ex, ey;
    logic [26:0] mx, my, mn;
    logic [53:0] wide;
    logic [27:0] sum;
    int          d, e, lz;

    sa = a[31];
    sb = b[31] ^ sub;
    ea = a[30:23];
    eb = b[30:23];
    r_comb = FP_ZERO;
    sx = 1'b0; sy = 1'b0; ex = '0; ey = '0; mx = '0; my = '0; eff_sub = 1'b0;
    sum  = '0;
    mn   = '0;
    wide = '0;
    lz   = 0;
    e    = 0;
    d    = 0;

    if (fp_is_nan(a) || fp_is_nan(b)) begin
      r_comb = FP_QNAN;
    end else if (fp_is_inf(a) && fp_is_inf(b)) begin
      r_comb = (sa == sb) ? {sa, 8'hFF, 23'h0} : FP_QNAN;
    end else if (fp_is_inf(a)) begin
      r_comb = {sa, 8'hFF, 23'h0};
    end else if (fp_is_inf(b)) begin
      r_comb = {sb, 8'hFF, 23'h0};
    end else if (fp_is_zero(a) && fp_is_zero(b)) begin
      r_comb = {sa & sb, 31'h0};
    end else if (fp_is_zero(b)) begin
      r_comb = a;
    end else if (fp_is_zero(a)) begin
      r_comb = {sb, b[30:0]};
    end else begin
      // x: operand of larger magnitude
      if (a[30:0] >= b[30:0]) begin
        sx = sa; ex = ea; mx = {1'b1, a[22:0], 3'b000};
        sy = sb; ey = eb; my = {1'b1, b[22:0], 3'b000};
      end else begin
        sx = sb; ex = eb; mx = {1'b1, b[22:0], 3'b000};
        sy = sa; ey = ea; my = {1'b1, a[22:0], 3'b000};
      end
      eff_sub = sx ^ sy;
      d = int'(ex) - int'(ey);
      if (d > 27) d = 27;
      wide = {my, 27'h0} >> d;
      mn   = {wide[53:28], wide[27] | (|wide[26:0])};
      e    = int'(ex);
      if (!eff_sub) begin
        sum = {1'b0, mx} + {1'b0, mn};
        if (sum[27]) begin
          r_comb = fp_round_pack(sx, e + 1, {sum[27:2], sum[1] | sum[0]});
        end else begin
          r_comb = fp_round_pack(sx, e, sum[26:0]);
        end
      end else begin
        sum = {1'b0, mx} - {1'b0, mn};
        if (sum == '0) begin
          r_comb = FP_ZERO;
        end else begin
          for (int i = 0; i <= 26; i++) begin
            if (sum[i]) lz = 26 - i;
          end
          r_comb = fp_round_pack(sx, e - lz, sum[26:0] << lz);
        end
      end
    end
  end

  pipe_delay #(.WIDTH(33), .DEPTH(LATENCY)) u_pipe (
    .clk(clk), .rst(rst),
    .d({in_valid, r_comb}),
    .q({out_valid, r})
  );

endmodule
