// fp_saturate: the "Comparison" and "Saturation" stages at the output of a PI
// axis. It limits the unsaturated controller output s to [UMIN, UMAX].
//
// Two comparators check s > UMAX and s < UMIN in parallel; their outputs are
// the three flags of the comparison stage (above, below, in range). One
// cycle later a multiplexer registers the output: UMAX when above, UMIN when
// below, s otherwise. s itself is delayed alongside the comparators so that
// it meets their flags, and is brought out as s_out for the anti-windup
// path. Total latency LAT_SAT = LAT_CMP + 1 cycles, one sample per cycle.
// The compare-then-saturate structure is the design description's; the
// limit values are parameters, and their default of +/-350 V is this
// design's reading of the voltage rating (the voltages reported for the
// controller never exceed 350 V in magnitude).
module fp_saturate
  import fp_pkg::*;
#(
  parameter float32_t UMAX = 32'h43AF_0000,  // +350.0
  parameter float32_t UMIN = 32'hC3AF_0000   // -350.0
) (
  input  logic     clk,
  input  logic     rst,
  input  logic     in_valid,
  input  float32_t s,
  output logic     out_valid,
  output float32_t y,
  output float32_t s_out,
  output logic     above,
  output logic     below,
  output logic     in_range
);

  logic     cmp_valid, gt_max, lt_min;
  logic     unused_hi_lt, unused_hi_eq, unused_hi_un;
  logic     unused_lo_gt, unused_lo_eq, unused_lo_un, unused_lo_valid;
  float32_t s_cmp;

  fp_compare #(.LATENCY(LAT_CMP)) u_cmp_hi (
    .clk(clk), .rst(rst), .in_valid(in_valid), .a(s), .b(UMAX),
    .out_valid(cmp_valid), .agb(gt_max), .alb(unused_hi_lt),
    .aeb(unused_hi_eq), .unordered(unused_hi_un)
  );

  fp_compare #(.LATENCY(LAT_CMP)) u_cmp_lo (
    .clk(clk), .rst(rst), .in_valid(in_valid), .a(s), .b(UMIN),
    .out_valid(unused_lo_valid), .agb(unused_lo_gt), .alb(lt_min),
    .aeb(unused_lo_eq), .unordered(unused_lo_un)
  );

  pipe_delay #(.WIDTH(32), .DEPTH(LAT_CMP)) u_s_dly (
    .clk(clk), .rst(rst), .d(s), .q(s_cmp)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      y         <= FP_ZERO;
      s_out     <= FP_ZERO;
      above     <= 1'b0;
      below     <= 1'b0;
      in_range  <= 1'b0;
    end else begin
      out_valid <= cmp_valid;
      s_out     <= s_cmp;
      above     <= gt_max;
      below     <= lt_min;
      in_range  <= !gt_max && !lt_min;
      y         <= gt_max ? UMAX : (lt_min ? UMIN : s_cmp);
    end
  end

endmodule
