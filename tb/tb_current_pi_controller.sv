// tb_current_pi_controller: end-to-end test of the two-axis current
// controller at a shortened sampling period (100 cycles) with currents given
// in 1/256 A (FRAC_BITS = 8), so that fractional amperes can be applied.
//
// Every voltage update is checked bit for bit against a reference built
// from fp_ref_pkg (integer error -> binary32 -> PI axis model), and must
// arrive 36 cycles after its sampling tick; between updates the outputs
// must hold. Workloads, in order:
//   1. no update during the first sampling period after reset;
//   2. constant current errors (1 A on q, -0.15 A on d);
//   3. a varying error sequence with growing errors of opposite sign on
//      the two axes, which drives both axes into their limits;
//   4. closed loop on both axes with a first-order plant per axis
//      (i(n+1) = k2*i(n) + k1*v(n-1), motor data Rs = 3.59 Ohm,
//      Lq = 0.051 H, Ld = 0.036 H, Ts = 100 us): a 2 A q-axis step, whose
//      response must follow 0.263 / (z^2 - z + 0.263) and settle to 2 %
//      within 8 samples; then 10 A and -10 A steps that saturate the
//      controller, must not overshoot by more than 2 % and must be within
//      2 % after 600 samples (900 for the 20 A swing); after leaving
//      saturation the back-calculated integrator is far from its final
//      value, and the rest of the way is covered slowly, through the
//      integral action alone.
// A second instance with a 40-cycle period, shorter than one computation,
// must report overrun. A third, balancing its paths with hold registers
// (BALANCE_BY_HOLD = 1), gets the same inputs and must match the first in
// every cycle. Each mechanism (update, hold, upper and lower
// saturation, anti-windup action, overrun) is counted and must occur.
module tb_current_pi_controller;
  import fp_pkg::*;
  import fp_ref_pkg::*;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  localparam int N    = 100;
  localparam int FRAC = 8;
  localparam int LAT_UPDATE = 36;   // tick to v_update

  logic signed [31:0] id_ref, iq_ref, id_meas, iq_meas;
  float32_t           vd, vq;
  logic               v_update, tick, overrun;
  logic [1:0]         sat_high, sat_low;

  current_pi_controller #(.SAMPLE_CYCLES(N), .FRAC_BITS(FRAC)) u_dut (
    .clk(clk), .rst(rst),
    .id_proposed(id_ref), .iq_proposed(iq_ref), .id_measured(id_meas), .iq_measured(iq_meas),
    .vd_proposed(vd), .vq_proposed(vq), .v_update(v_update), .sample_tick(tick),
    .sat_high(sat_high), .sat_low(sat_low), .overrun(overrun));

  // Instance whose sampling period is too short for one computation.
  float32_t   o_vd, o_vq;
  logic       o_upd, o_tick, o_overrun;
  logic [1:0] o_sh, o_sl;
  current_pi_controller #(.SAMPLE_CYCLES(40), .FRAC_BITS(FRAC)) u_short (
    .clk(clk), .rst(rst),
    .id_proposed(32'sd0), .iq_proposed(32'sd256), .id_measured(32'sd0), .iq_measured(32'sd0),
    .vd_proposed(o_vd), .vq_proposed(o_vq), .v_update(o_upd), .sample_tick(o_tick),
    .sat_high(o_sh), .sat_low(o_sl), .overrun(o_overrun));

  // Same inputs, paths balanced by hold registers: must match u_dut exactly.
  float32_t   h_vd, h_vq;
  logic       h_upd, h_tick, h_overrun;
  logic [1:0] h_sh, h_sl;
  current_pi_controller #(.SAMPLE_CYCLES(N), .FRAC_BITS(FRAC), .BALANCE_BY_HOLD(1'b1)) u_hold (
    .clk(clk), .rst(rst),
    .id_proposed(id_ref), .iq_proposed(iq_ref), .id_measured(id_meas), .iq_measured(iq_meas),
    .vd_proposed(h_vd), .vq_proposed(h_vq), .v_update(h_upd), .sample_tick(h_tick),
    .sat_high(h_sh), .sat_low(h_sl), .overrun(h_overrun));

  int checks = 0, failures = 0, cycle = 0;
  int n_hold_mode = 0;

  always @(posedge clk) begin
    if (!rst) begin
      if (h_vd !== vd || h_vq !== vq || h_upd !== v_update || h_sh !== sat_high ||
          h_sl !== sat_low || h_overrun !== overrun) begin
        failures++;
        if (failures < 20) $display("FAIL @%0d: hold-balanced instance differs", cycle);
      end
      if (h_upd) begin
        checks++;
        n_hold_mode++;
      end
    end
  end
  int n_update = 0, n_hold = 0, n_sat_high = 0, n_sat_low = 0, n_aw = 0;

  pi_gains_t gd, gq;
  pi_state_t sd, sq;
  typedef struct { float32_t vd, vq; logic [1:0] sh, sl; int due; } exp_t;
  exp_t      q[$];
  float32_t  last_vd = 0, last_vq = 0;

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d: %s", cycle, what);
    end
  endtask

  always @(posedge clk) cycle <= cycle + 1;

  // Reference model, evaluated at each sampling tick.
  always @(posedge clk) begin
    if (!rst && tick) begin
      exp_t e;
      logic ad, bd, aq, bq;
      e.vd  = pi_step(gd, sd, r2f(real'(33'(id_ref) - 33'(id_meas)) / real'(1 << FRAC)), ad, bd);
      e.vq  = pi_step(gq, sq, r2f(real'(33'(iq_ref) - 33'(iq_meas)) / real'(1 << FRAC)), aq, bq);
      e.sh  = {aq, ad};
      e.sl  = {bq, bd};
      e.due = cycle + LAT_UPDATE;
      q.push_back(e);
    end
  end

  // Output checks.
  always @(posedge clk) begin
    if (!rst) begin
      if (v_update) begin
        exp_t e;
        n_update++;
        if (q.size() == 0) check(0, "update without a sample");
        else begin
          e = q.pop_front();
          check(cycle == e.due, $sformatf("update at %0d, due %0d", cycle, e.due));
          check(vd === e.vd && vq === e.vq,
                $sformatf("vd=%f vq=%f expected %f %f", f2r(vd), f2r(vq), f2r(e.vd), f2r(e.vq)));
          check(sat_high === e.sh && sat_low === e.sl, "saturation flags");
        end
        n_sat_high += int'(|sat_high);
        n_sat_low  += int'(|sat_low);
        if (u_dut.u_pi_q.aw_term[30:0] != 0 || u_dut.u_pi_d.aw_term[30:0] != 0) n_aw++;
        last_vd = vd;
        last_vq = vq;
      end else begin
        check(vd === last_vd && vq === last_vq, "outputs changed between updates");
        n_hold++;
      end
    end
  end

  // Plant model for the closed-loop phase.
  real k1q, k2q, k1d, k2d;
  real iq_p, id_p, vq_applied, vd_applied;

  function automatic int to_fix(real a);
    return int'(a * real'(1 << FRAC));  // rounds to nearest
  endfunction

  task automatic wait_update();
    @(posedge clk iff v_update);
    @(negedge clk);
  endtask

  // Advance the plants by one sampling period; the command just computed is
  // applied one period later (the computation delay of the loop model).
  task automatic plant_step();
    iq_p = k2q * iq_p + k1q * vq_applied;
    id_p = k2d * id_p + k1d * vd_applied;
    vq_applied = f2r(vq);
    vd_applied = f2r(vd);
    iq_meas = to_fix(iq_p);
    id_meas = to_fix(id_p);
  endtask

  task automatic restart();
    @(negedge clk) rst = 1'b1;
    sd = '{y_prev: 0, bc: 0};
    sq = '{y_prev: 0, bc: 0};
    q.delete();
    last_vd = 0; last_vq = 0;
    iq_p = 0; id_p = 0; vq_applied = 0; vd_applied = 0;
    id_ref = 0; iq_ref = 0; id_meas = 0; iq_meas = 0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
  endtask

  task automatic closed_loop_step(real step_a, int samples, int settle_by, output real peak);
    int k;
    peak = 0;
    iq_ref = to_fix(step_a);
    for (k = 0; k < samples; k++) begin
      wait_update();
      plant_step();
      if (iq_p / step_a > peak) peak = iq_p / step_a;
      check(iq_p / step_a < 1.02, $sformatf("step %f: overshoot, i_q = %f", step_a, iq_p));
      if (k + 1 >= settle_by)
        check((iq_p - step_a) < 0.02 * (step_a < 0 ? -step_a : step_a) &&
              (step_a - iq_p) < 0.02 * (step_a < 0 ? -step_a : step_a),
              $sformatf("step %f: i_q(%0d) = %f not settled", step_a, k + 1, iq_p));
    end
  endtask

  initial begin
    real y[0:40];
    real peak;
    int  sat_before;
    gq = '{kp: 32'h4305_E666, ki_ts: 32'h3F78_51EC, inv_kb: 32'h3F83_F571,
           umax: 32'h43AF_0000, umin: 32'hC3AF_0000};
    gd = '{kp: 32'h42BC_6B85, ki_ts: 32'h3F71_A9FC, inv_kb: 32'h3F87_97DD,
           umax: 32'h43AF_0000, umin: 32'hC3AF_0000};
    k2q = $exp(-3.59 * 100e-6 / 0.051);  k1q = (1.0 - k2q) / 3.59;
    k2d = $exp(-3.59 * 100e-6 / 0.036);  k1d = (1.0 - k2d) / 3.59;
    restart();

    // 1. One sampling period of silence after reset.
    repeat (N - 1) @(negedge clk);
    check(n_update == 0 && vd === 32'h0 && vq === 32'h0, "output before the first sample");

    // 2. Constant errors.
    iq_ref = to_fix(1.0);
    id_ref = to_fix(-0.15);
    repeat (10) wait_update();

    // 3. Varying errors of growing size.
    restart();
    for (int k = 0; k < 10; k++) begin
      iq_ref = to_fix(2.0 - 1.9 * real'(k) + ((k % 3 == 1) ? 1.2 : 0.0));
      id_ref = to_fix(-1.5 + 2.0 * real'(k) - ((k % 3 == 1) ? 1.4 : 0.0));
      wait_update();
    end

    // 4a. Closed-loop 2 A step on q: compare with 0.263/(z^2 - z + 0.263).
    restart();
    y[0] = 0; y[1] = 0;
    for (int k = 2; k <= 40; k++) y[k] = y[k-1] - 0.263 * y[k-2] + 0.263;
    iq_ref = to_fix(2.0);
    sat_before = n_sat_high;
    for (int k = 1; k <= 30; k++) begin
      wait_update();
      plant_step();
      check((iq_p - 2.0 * y[k]) < 0.03 && (2.0 * y[k] - iq_p) < 0.03,
            $sformatf("sample %0d: i_q = %f, second-order model %f", k, iq_p, 2.0 * y[k]));
      if (k >= 9)
        check(iq_p > 1.96 && iq_p < 2.04, $sformatf("not settled at sample %0d: %f", k, iq_p));
      if (k <= 10) $display("step 2 A: sample %0d  i_q %f  model %f  vq %f", k, iq_p, 2.0 * y[k], f2r(vq));
    end
    check(n_sat_high == sat_before, "2 A step should not saturate");

    // 4b. Large steps through the limits.
    closed_loop_step(10.0, 600, 600, peak);
    $display("step 10 A: peak %f of final value", peak);
    closed_loop_step(-10.0, 900, 900, peak);
    $display("step -10 A: peak %f of final value", peak);

    check(o_overrun, "overrun not flagged with a 40-cycle period");
    check(!overrun, "overrun at 100-cycle period");
    $display("updates %0d hold %0d sat_high %0d sat_low %0d anti-windup %0d overrun %b",
             n_update, n_hold, n_sat_high, n_sat_low, n_aw, o_overrun);
    check(n_update > 0 && n_hold > 0 && n_sat_high > 0 && n_sat_low > 0 && n_aw > 0 &&
          n_hold_mode > 0,
          "a mechanism never occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (250000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
