// fp_int2float: pipelined conversion of a signed two's-complement number to
// binary32, the "Int to Float Conversion" at the input of each PI axis.
//
// The input is a WIDTH-bit signed integer whose value is scaled by
// 2^-FRAC_BITS (FRAC_BITS = 0, the default, is a plain integer; a positive
// value reads the input as fixed point, as fixed-to-float cores allow). The
// magnitude is normalised with a leading-one search, rounded to nearest even
// to 24 significant bits and packed; zero gives +0. The result and
// out_valid appear LATENCY cycles after the input.
// The conversion itself is the design description's; the 32-bit width, the
// fixed-point option, the 6-cycle latency and the internal structure are
// this design's choices.
module fp_int2float
  import fp_pkg::*;
#(
  parameter int unsigned WIDTH     = 32,
  parameter int unsigned FRAC_BITS = 0,
  parameter int unsigned LATENCY   = LAT_CONV
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    in_valid,
  input  logic signed [WIDTH-1:0] x,
  output logic                    out_valid,
  output float32_t                r
);

  // Working width: at least 27 bits so that the rounding window fits.
  localparam int unsigned W = (WIDTH > 27) ? WIDTH : 27;

  float32_t r_comb;

  always_comb begin
    logic         s;
    logic [W-1:0] mag, norm;
    int           msb;
    s   = x[WIDTH-1];
    mag = '0;
    mag[WIDTH-1:0] = s ? WIDTH'(-x) : WIDTH'(x);
    msb  = -1;
    norm = '0;
    for (int i = 0; i < int'(W); i++) begin
      if (mag[i]) msb = i;
    end
    if (msb < 0) begin
      r_comb = FP_ZERO;
    end else begin
      norm   = mag << (int'(W) - 1 - msb);
      r_comb = fp_round_pack(s, 127 + msb - int'(FRAC_BITS),
                             {norm[W-1:W-26], |norm[W-27:0]});
    end
  end

  pipe_delay #(.WIDTH(33), .DEPTH(LATENCY)) u_pipe (
    .clk(clk), .rst(rst),
    .d({in_valid, r_comb}),
    .q({out_valid, r})
  );

endmodule
