// fp_compare: pipelined binary32 comparator giving a > b (agb), a < b (alb),
// a == b (aeb) and unordered (either operand NaN; the other three are then
// 0).
//
// Each operand is mapped to a key that orders like the real number: for a
// positive number the magnitude bits, for a negative one their negation, and
// zeros and denormals to 0 so that +0 == -0. The keys are compared as
// signed integers and the flags are carried through LATENCY registers
// together with out_valid. The comparator with greater / less outputs feeds
// the saturation stage of the controller; its latency (1 cycle) and
// structure are this design's choice.
module fp_compare
  import fp_pkg::*;
#(
  parameter int unsigned LATENCY = LAT_CMP
) (
  input  logic     clk,
  input  logic     rst,
  input  logic     in_valid,
  input  float32_t a,
  input  float32_t b,
  output logic     out_valid,
  output logic     agb,
  output logic     alb,
  output logic     aeb,
  output logic     unordered
);

  function automatic logic signed [32:0] order_key(float32_t f);
    if (fp_is_zero(f)) return '0;
    return f[31] ? -$signed({2'b00, f[30:0]}) : $signed({2'b00, f[30:0]});
  endfunction

  logic [3:0] flags;

  always_comb begin
    logic signed [32:0] ka, kb;
    ka = order_key(a);
    kb = order_key(b);
    if (fp_is_nan(a) || fp_is_nan(b)) flags = 4'b0001;
    else flags = {ka > kb, ka < kb, ka == kb, 1'b0};
  end

  pipe_delay #(.WIDTH(5), .DEPTH(LATENCY)) u_pipe (
    .clk(clk), .rst(rst),
    .d({in_valid, flags}),
    .q({out_valid, agb, alb, aeb, unordered})
  );

endmodule
