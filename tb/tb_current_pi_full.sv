// tb_current_pi_full: the current controller with every parameter at its
// default: 50 MHz clock, 100 us sampling period (5000 cycles), 32-bit
// integer currents in amperes, q-axis gains 133.9 / 0.97, d-axis gains
// 94.21 / 0.944, +/-350 V limits.
// It applies 10 samples of constant errors (1 A on q, -1 A on d) and then,
// after a reset, 10 samples of growing errors of opposite sign on the two
// axes that end in saturation. Checked: no output during the first
// sampling period; an update 36 cycles after each tick and exactly one per
// period; each vd / vq bit-exact against the reference model; outputs held
// between updates; both limits reached.
module tb_current_pi_full;
  import fp_pkg::*;
  import fp_ref_pkg::*;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #10 clk = ~clk;   // 20 ns period

  localparam int N = 5000;

  logic signed [31:0] id_ref, iq_ref, id_meas, iq_meas;
  float32_t           vd, vq;
  logic               v_update, tick, overrun;
  logic [1:0]         sat_high, sat_low;

  current_pi_controller u_dut (
    .clk(clk), .rst(rst),
    .id_proposed(id_ref), .iq_proposed(iq_ref), .id_measured(id_meas), .iq_measured(iq_meas),
    .vd_proposed(vd), .vq_proposed(vq), .v_update(v_update), .sample_tick(tick),
    .sat_high(sat_high), .sat_low(sat_low), .overrun(overrun));

  int checks = 0, failures = 0, cycle = 0, last_tick = 0;
  int n_update = 0, n_sat_high = 0, n_sat_low = 0;
  pi_gains_t gd, gq;
  pi_state_t sd, sq;
  float32_t  evd, evq, last_vd, last_vq;
  int        due = -1;

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d: %s", cycle, what);
    end
  endtask

  always @(posedge clk) cycle <= cycle + 1;

  always @(posedge clk) begin
    if (!rst) begin
      if (tick) begin
        logic a, b;
        check(cycle - last_tick == N, $sformatf("sampling period %0d cycles", cycle - last_tick));
        last_tick = cycle;
        evd = pi_step(gd, sd, r2f(real'(id_ref - id_meas)), a, b);
        evq = pi_step(gq, sq, r2f(real'(iq_ref - iq_meas)), a, b);
        due = cycle + 36;
      end
      if (v_update) begin
        n_update++;
        check(cycle == due, $sformatf("update at %0d, due %0d", cycle, due));
        check(vd === evd && vq === evq, $sformatf("vd=%f vq=%f expected %f %f",
                                                  f2r(vd), f2r(vq), f2r(evd), f2r(evq)));
        n_sat_high += int'(|sat_high);
        n_sat_low  += int'(|sat_low);
        $display("t=%0d us  vd=%f  vq=%f", cycle / 50, f2r(vd), f2r(vq));
        last_vd = vd;
        last_vq = vq;
      end else begin
        check(vd === last_vd && vq === last_vq, "outputs changed between updates");
      end
    end
  end

  task automatic restart();
    @(negedge clk) rst = 1'b1;
    sd = '{y_prev: 0, bc: 0};
    sq = '{y_prev: 0, bc: 0};
    last_vd = 0; last_vq = 0;
    id_ref = 0; iq_ref = 0; id_meas = 0; iq_meas = 0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    last_tick = cycle - 1;
  endtask

  initial begin
    gq = '{kp: 32'h4305_E666, ki_ts: 32'h3F78_51EC, inv_kb: 32'h3F83_F571,
           umax: 32'h43AF_0000, umin: 32'hC3AF_0000};
    gd = '{kp: 32'h42BC_6B85, ki_ts: 32'h3F71_A9FC, inv_kb: 32'h3F87_97DD,
           umax: 32'h43AF_0000, umin: 32'hC3AF_0000};
    restart();
    iq_ref = 1;
    id_ref = -1;
    repeat (N - 1) @(negedge clk);
    check(n_update == 0 && vd === 32'h0 && vq === 32'h0, "output before the first sample");
    repeat (10) begin
      @(posedge clk iff v_update);
    end
    restart();
    for (int k = 0; k < 10; k++) begin
      iq_ref = 2 - 2 * k + ((k % 3 == 1) ? 1 : 0);
      id_ref = -1 + 2 * k - ((k % 3 == 1) ? 2 : 0);
      @(posedge clk iff v_update);
      @(negedge clk);
    end
    check(n_update == 20, $sformatf("%0d updates, expected 20", n_update));
    check(n_sat_high > 0 && n_sat_low > 0, "limits never reached");
    check(!overrun, "overrun");
    $display("updates %0d sat_high %0d sat_low %0d", n_update, n_sat_high, n_sat_low);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (120000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
