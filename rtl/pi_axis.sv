// pi_axis: one axis (d or q) of the floating-point discrete PI current
// controller with back-calculation anti-windup and balanced pipeline paths.
//
// For each sample u(n) (the current error, binary32) it computes
//   y(n) = y(n-1) + KI_TS * (u(n) - INV_KB * e(n-1))     integral path
//   p(n) = KP * (u(n) - 0) + 0                           proportional path
//   s(n) = y(n) + p(n),  v(n) = clamp(s(n), UMIN, UMAX)
//   e(n) = s(n) - v(n)                                   anti-windup excess
// Every operation is a pipelined floating-point unit. y(n) and p(n) must
// reach the final adder in the same cycle; two ways of arranging that are
// built, chosen by BALANCE_BY_HOLD:
//   0 (default): both paths pass the same kinds of unit in the same order
//     (subtract, multiply, add), so the proportional path has a subtract of
//     0 and an add of 0 that do nothing arithmetically but give it the
//     integral path's latency;
//   1: the proportional path is just the multiplier; its product is caught
//     in a hold register and waits there until y(n) arrives, which saves
//     two adders. Outputs and timing are the same in both modes.
// The anti-windup excess
// is formed after the saturation and scaled by INV_KB (1/ki); the result is
// held in a register and used by the next sample.
//
// Timing (fp_pkg latencies): v_valid follows u_valid after
// 3*LAT_ADD + LAT_MUL + LAT_SAT = 28 cycles; the anti-windup term is stored
// LAT_ADD + LAT_MUL = 12 cycles after that and ready returns one cycle later
// (41 cycles after u_valid). A new sample may be presented only while
// ready = 1 (asserted).
//
// From the design description: the structure (subtract, gain, integrator
// with z^-1, sum, comparison, saturation, back-calculation through 1/ki),
// the balancing zeros, balancing by sample-and-hold as the alternative,
// and the q-axis gains kp = 133.9 and ki = Ki*Ts = 0.97
// used as defaults. This design's choices: binary32 format, the sign
// convention e = s - v, and the saturation limits (see fp_saturate).
module pi_axis
  import fp_pkg::*;
#(
  parameter float32_t KP     = 32'h4305_E666,  // 133.9
  parameter float32_t KI_TS  = 32'h3F78_51EC,  // 0.97
  parameter float32_t INV_KB = 32'h3F83_F571,  // 1/0.97
  parameter float32_t UMAX   = 32'h43AF_0000,  // +350.0
  parameter float32_t UMIN   = 32'hC3AF_0000,  // -350.0
  parameter bit       BALANCE_BY_HOLD = 1'b0
) (
  input  logic     clk,
  input  logic     rst,
  input  logic     u_valid,
  input  float32_t u,
  output logic     v_valid,
  output float32_t v,
  output logic     above,
  output logic     below,
  output logic     in_range,
  output float32_t integ_state,
  output float32_t aw_term,
  output logic     ready
);

  // Anti-windup term INV_KB * e(n-1), held between samples.
  float32_t bc_q;

  // Integral path: u - bc, times KI_TS, integrate.
  float32_t ai, mi, yi;
  logic     ai_v, mi_v, yi_v, integ_busy;
  fp_addsub u_sub_i (.clk(clk), .rst(rst), .in_valid(u_valid), .sub(1'b1),
                     .a(u), .b(bc_q), .out_valid(ai_v), .r(ai));
  fp_mult u_mul_i (.clk(clk), .rst(rst), .in_valid(ai_v), .a(ai), .b(KI_TS),
                   .out_valid(mi_v), .r(mi));
  fp_integrator u_integ (.clk(clk), .rst(rst), .in_valid(mi_v), .x(mi),
                         .out_valid(yi_v), .y(yi), .state(integ_state),
                         .busy(integ_busy));

  // Proportional path p(n), presented to the final adder together with y(n).
  float32_t pp;
  logic     pp_v;

  if (!BALANCE_BY_HOLD) begin : g_balance_units
    float32_t ap, mp;
    logic     ap_v, mp_v;
    fp_addsub u_sub_p (.clk(clk), .rst(rst), .in_valid(u_valid), .sub(1'b1),
                       .a(u), .b(FP_ZERO), .out_valid(ap_v), .r(ap));
    fp_mult u_mul_p (.clk(clk), .rst(rst), .in_valid(ap_v), .a(ap), .b(KP),
                     .out_valid(mp_v), .r(mp));
    fp_addsub u_add_p (.clk(clk), .rst(rst), .in_valid(mp_v), .sub(1'b0),
                       .a(mp), .b(FP_ZERO), .out_valid(pp_v), .r(pp));

    a_stages_in_step : assert property (@(posedge clk) disable iff (rst)
                                        (ai_v == ap_v) && (mi_v == mp_v))
      else $error("pi_axis: subtract / multiply stages out of step");
  end else begin : g_balance_hold
    float32_t mp, p_hold;
    logic     mp_v, p_held;
    fp_mult u_mul_p (.clk(clk), .rst(rst), .in_valid(u_valid), .a(u), .b(KP),
                     .out_valid(mp_v), .r(mp));
    always_ff @(posedge clk) begin
      if (rst) begin
        p_hold <= FP_ZERO;
        p_held <= 1'b0;
      end else begin
        if (mp_v) begin
          p_hold <= mp;
          p_held <= 1'b1;
        end else if (yi_v) begin
          p_held <= 1'b0;
        end
      end
    end
    assign pp   = p_hold;
    assign pp_v = yi_v && p_held;

    a_p_waiting : assert property (@(posedge clk) disable iff (rst) yi_v |-> p_held)
      else $error("pi_axis: proportional term not held when y(n) arrived");
  end

  // Stage 4: s(n) = y(n) + p(n).
  float32_t s;
  logic     s_v;
  fp_addsub u_add_s (.clk(clk), .rst(rst), .in_valid(yi_v), .sub(1'b0),
                     .a(yi), .b(pp), .out_valid(s_v), .r(s));

  // Stage 5: comparison and saturation.
  float32_t s_sat;
  fp_saturate #(.UMAX(UMAX), .UMIN(UMIN)) u_sat (
    .clk(clk), .rst(rst), .in_valid(s_v), .s(s),
    .out_valid(v_valid), .y(v), .s_out(s_sat),
    .above(above), .below(below), .in_range(in_range)
  );

  // Anti-windup: e(n) = s(n) - v(n), then INV_KB * e(n).
  float32_t ex, bc;
  logic     ex_v, bc_v;
  fp_addsub u_sub_aw (.clk(clk), .rst(rst), .in_valid(v_valid), .sub(1'b1),
                      .a(s_sat), .b(v), .out_valid(ex_v), .r(ex));
  fp_mult u_mul_aw (.clk(clk), .rst(rst), .in_valid(ex_v), .a(ex), .b(INV_KB),
                    .out_valid(bc_v), .r(bc));

  logic busy;
  always_ff @(posedge clk) begin
    if (rst) begin
      bc_q <= FP_ZERO;
      busy <= 1'b0;
    end else begin
      if (bc_v) bc_q <= bc;
      if (u_valid) busy <= 1'b1;
      else if (bc_v) busy <= 1'b0;
    end
  end

  assign ready   = !busy;
  assign aw_term = bc_q;

  a_sample_when_ready : assert property (@(posedge clk) disable iff (rst) u_valid |-> ready)
    else $error("pi_axis: sample presented while the previous one is in progress");
  a_paths_balanced : assert property (@(posedge clk) disable iff (rst) yi_v == pp_v)
    else $error("pi_axis: integral and proportional paths out of step");
  a_integ_idle : assert property (@(posedge clk) disable iff (rst) mi_v |-> !integ_busy)
    else $error("pi_axis: integrator still busy");

endmodule
