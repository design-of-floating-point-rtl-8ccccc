// current_pi_controller: floating-point d/q current PI controller of an
// interior permanent-magnet synchronous motor drive (top level).
//
// Once per sampling period the controller takes the commanded (from the
// speed loop) and measured d- and q-axis currents as signed integers, forms
// the two current errors, converts them to binary32 and runs each through a
// PI axis with anti-windup (pi_axis). The saturated outputs are the voltage
// commands vd_proposed and vq_proposed for the space-vector PWM stage, held
// constant between updates.
//
//   sample_sync --err d--> fp_int2float --> pi_axis (d gains) --> vd_proposed
//               --err q--> fp_int2float --> pi_axis (q gains) --> vq_proposed
//
// Timing: tick at the end of every SAMPLE_CYCLES-cycle period; start one
// cycle later; the voltages are updated (v_update) LAT_CONV + 28 + 1 = 35
// cycles after start (0.7 us at 50 MHz); both axes are idle again 13 cycles
// after that. The first update follows the first full period after reset.
//
// From the design description: the two-axis structure, the q-axis gains
// (kp = 133.9, ki = 0.97), the 100 us sampling period at a 20 ns clock, the
// integer-to-float conversion at the input. This design's choices: the
// d-axis gains (kp = 94.21, ki = 0.944, obtained by applying the document's
// q-axis procedure to the d-axis inductance 0.036 H), the +/-350 V limits,
// 32-bit integer current inputs whose units are set by FRAC_BITS.
// BALANCE_BY_HOLD selects how each axis aligns its two paths (pi_axis).
module current_pi_controller
  import fp_pkg::*;
#(
  parameter int unsigned WIDTH         = 32,
  parameter int unsigned FRAC_BITS     = 0,
  parameter int unsigned SAMPLE_CYCLES = 5000,
  parameter float32_t    KP_Q     = 32'h4305_E666,  // 133.9
  parameter float32_t    KI_TS_Q  = 32'h3F78_51EC,  // 0.97
  parameter float32_t    INV_KB_Q = 32'h3F83_F571,  // 1/0.97
  parameter float32_t    KP_D     = 32'h42BC_6B85,  // 94.21
  parameter float32_t    KI_TS_D  = 32'h3F71_A9FC,  // 0.944
  parameter float32_t    INV_KB_D = 32'h3F87_97DD,  // 1/0.944
  parameter float32_t    V_MAX    = 32'h43AF_0000,  // +350.0
  parameter float32_t    V_MIN    = 32'hC3AF_0000,  // -350.0
  parameter bit          BALANCE_BY_HOLD = 1'b0     // see pi_axis
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic signed [WIDTH-1:0] id_proposed,
  input  logic signed [WIDTH-1:0] iq_proposed,
  input  logic signed [WIDTH-1:0] id_measured,
  input  logic signed [WIDTH-1:0] iq_measured,
  output float32_t                vd_proposed,
  output float32_t                vq_proposed,
  output logic                    v_update,
  output logic                    sample_tick,
  output logic [1:0]              sat_high,   // [0] d axis, [1] q axis
  output logic [1:0]              sat_low,
  output logic                    overrun
);

  localparam int unsigned D = 0;
  localparam int unsigned Q = 1;

  logic signed [WIDTH-1:0] ref_in  [2];
  logic signed [WIDTH-1:0] meas_in [2];
  logic signed [WIDTH:0]   err     [2];
  float32_t                err_f   [2];
  float32_t                v_axis  [2];
  float32_t                v_hold  [2];
  logic [1:0]              err_f_v, v_axis_v, axis_ready, above, below;
  logic                    start;

  assign ref_in[D]  = id_proposed;
  assign ref_in[Q]  = iq_proposed;
  assign meas_in[D] = id_measured;
  assign meas_in[Q] = iq_measured;

  sample_sync #(.N_CH(2), .WIDTH(WIDTH), .SAMPLE_CYCLES(SAMPLE_CYCLES)) u_sync (
    .clk(clk), .rst(rst),
    .ref_in(ref_in), .meas_in(meas_in),
    .ready_in(&axis_ready),
    .tick(sample_tick), .start(start), .err_hold(err),
    .res_valid(v_axis_v), .res(v_axis),
    .v_out(v_hold), .v_update(v_update),
    .busy(), .overrun(overrun)
  );

  for (genvar c = 0; c < 2; c++) begin : g_conv
    fp_int2float #(.WIDTH(WIDTH + 1), .FRAC_BITS(FRAC_BITS)) u_conv (
      .clk(clk), .rst(rst), .in_valid(start), .x(err[c]),
      .out_valid(err_f_v[c]), .r(err_f[c])
    );
  end

  float32_t unused_state [2];
  float32_t unused_aw    [2];

  pi_axis #(.KP(KP_D), .KI_TS(KI_TS_D), .INV_KB(INV_KB_D), .UMAX(V_MAX), .UMIN(V_MIN),
            .BALANCE_BY_HOLD(BALANCE_BY_HOLD)) u_pi_d (
    .clk(clk), .rst(rst), .u_valid(err_f_v[D]), .u(err_f[D]),
    .v_valid(v_axis_v[D]), .v(v_axis[D]),
    .above(above[D]), .below(below[D]), .in_range(),
    .integ_state(unused_state[D]), .aw_term(unused_aw[D]), .ready(axis_ready[D])
  );

  pi_axis #(.KP(KP_Q), .KI_TS(KI_TS_Q), .INV_KB(INV_KB_Q), .UMAX(V_MAX), .UMIN(V_MIN),
            .BALANCE_BY_HOLD(BALANCE_BY_HOLD)) u_pi_q (
    .clk(clk), .rst(rst), .u_valid(err_f_v[Q]), .u(err_f[Q]),
    .v_valid(v_axis_v[Q]), .v(v_axis[Q]),
    .above(above[Q]), .below(below[Q]), .in_range(),
    .integ_state(unused_state[Q]), .aw_term(unused_aw[Q]), .ready(axis_ready[Q])
  );

  // Saturation flags of the most recent update, held with the voltages.
  always_ff @(posedge clk) begin
    if (rst) begin
      sat_high <= '0;
      sat_low  <= '0;
    end else begin
      for (int c = 0; c < 2; c++) begin
        if (v_axis_v[c]) begin
          sat_high[c] <= above[c];
          sat_low[c]  <= below[c];
        end
      end
    end
  end

  assign vd_proposed = v_hold[D];
  assign vq_proposed = v_hold[Q];

  a_start_idle : assert property (@(posedge clk) disable iff (rst) start |-> (&axis_ready))
    else $error("current_pi_controller: start while an axis is busy");

endmodule
