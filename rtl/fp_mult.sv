// fp_mult: pipelined binary32 multiplier, r = a * b.
//
// The product is computed in one combinational block (24 x 24-bit
// significand product, exponent sum, normalisation by at most one place,
// round to nearest even) and carried through LATENCY registers, so r and
// out_valid appear LATENCY cycles after the operands; one product may start
// every cycle. Denormal inputs count as zero and denormal results flush to
// zero; NaN inputs and inf * 0 give a quiet NaN.
// The controller uses it for the proportional gain kp, the integral gain
// Ki*Ts and the anti-windup gain 1/ki. The latency (5) and the internal
// structure are this design's choice.
module fp_mult
  import fp_pkg::*;
#(
  parameter int unsigned LATENCY = LAT_MUL
) (
  input  logic     clk,
  input  logic     rst,
  input  logic     in_valid,
  input  float32_t a,
  input  float32_t b,
  output logic     out_valid,
  output float32_t r
);

  float32_t r_comb;

  always_comb begin
    logic        s;
    logic [47:0] p;
    int          e;
    s = a[31] ^ b[31];
    p = '0;
    e = 0;
    if (fp_is_nan(a) || fp_is_nan(b)) begin
      r_comb = FP_QNAN;
    end else if ((fp_is_inf(a) && fp_is_zero(b)) || (fp_is_zero(a) && fp_is_inf(b))) begin
      r_comb = FP_QNAN;
    end else if (fp_is_inf(a) || fp_is_inf(b)) begin
      r_comb = {s, 8'hFF, 23'h0};
    end else if (fp_is_zero(a) || fp_is_zero(b)) begin
      r_comb = {s, 31'h0};
    end else begin
      p = {1'b1, a[22:0]} * {1'b1, b[22:0]};
      e = int'(a[30:23]) + int'(b[30:23]) - 127;
      if (p[47]) begin
        r_comb = fp_round_pack(s, e + 1, {p[47:22], |p[21:0]});
      end else begin
        r_comb = fp_round_pack(s, e, {p[46:21], |p[20:0]});
      end
    end
  end

  pipe_delay #(.WIDTH(33), .DEPTH(LATENCY)) u_pipe (
    .clk(clk), .rst(rst),
    .d({in_valid, r_comb}),
    .q({out_valid, r})
  );

endmodule
