// tb_pi_axis: self-checking test of one PI axis with anti-windup at its
// default (q-axis) gains and +/-350 limits. A sequence of current errors is
// applied, one sample each time the axis is ready: first small errors
// (linear region), then a long run of large positive and then large
// negative errors that drive the output into both limits and exercise the
// back-calculation, then small errors again to check recovery. Every
// output, saturation flag, integrator state and anti-windup term is compared
// bit for bit with the reference model in fp_ref_pkg. The output must
// appear 3*LAT_ADD + LAT_MUL + LAT_SAT = 28 cycles after the sample and the
// axis must be ready again LAT_ADD + LAT_MUL + 1 = 13 cycles later.
// A second instance balances its paths with a hold register instead of
// zero-operand units (BALANCE_BY_HOLD = 1); its outputs, flags and timing
// must equal the first instance's in every cycle.
module tb_pi_axis;
  import fp_pkg::*;
  import fp_ref_pkg::*;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  localparam int LAT_V  = 3 * LAT_ADD + LAT_MUL + LAT_SAT;
  localparam int LAT_RD = LAT_V + LAT_ADD + LAT_MUL + 1;

  logic      u_valid, v_valid, above, below, in_range, ready;
  float32_t  u, v, integ_state, aw_term;
  int        checks = 0, failures = 0;
  int        n_above = 0, n_below = 0, n_in = 0, n_aw = 0;
  pi_gains_t g;
  pi_state_t st;

  pi_axis dut (.clk(clk), .rst(rst), .u_valid(u_valid), .u(u), .v_valid(v_valid), .v(v),
               .above(above), .below(below), .in_range(in_range),
               .integ_state(integ_state), .aw_term(aw_term), .ready(ready));

  logic     h_v_valid, h_above, h_below, h_in_range, h_ready;
  float32_t h_v, h_state, h_aw;
  int       n_hold_cmp = 0;
  pi_axis #(.BALANCE_BY_HOLD(1'b1)) dut_hold (
    .clk(clk), .rst(rst), .u_valid(u_valid), .u(u), .v_valid(h_v_valid), .v(h_v),
    .above(h_above), .below(h_below), .in_range(h_in_range),
    .integ_state(h_state), .aw_term(h_aw), .ready(h_ready));

  always @(posedge clk) begin
    if (!rst) begin
      if (h_v_valid != v_valid || h_ready != ready ||
          (v_valid && (h_v !== v || {h_above, h_below, h_in_range} !== {above, below, in_range}))) begin
        failures++;
        $display("FAIL: hold-balanced instance differs: v %h / %h", h_v, v);
      end
      if (v_valid) begin
        checks++;
        n_hold_cmp++;
      end
    end
  end

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  task automatic sample(real err);
    float32_t ev;
    logic     ea, eb;
    int       lat;
    @(negedge clk);
    u = r2f(err);
    u_valid = 1'b1;
    ev = pi_step(g, st, u, ea, eb);
    @(negedge clk);
    u_valid = 1'b0;
    lat = 1;
    while (!v_valid && lat < 100) begin
      @(negedge clk);
      lat++;
    end
    check(v_valid && lat == LAT_V, $sformatf("output latency %0d, expected %0d", lat, LAT_V));
    check(v === ev, $sformatf("u=%f v=%h (%f) expected %h (%f)", err, v, f2r(v), ev, f2r(ev)));
    check(above == ea && below == eb && in_range == (!ea && !eb), "saturation flags");
    n_above += int'(above);
    n_below += int'(below);
    n_in    += int'(in_range);
    while (!ready && lat < 200) begin
      @(negedge clk);
      lat++;
    end
    check(lat == LAT_RD, $sformatf("ready after %0d cycles, expected %0d", lat, LAT_RD));
    check(integ_state === st.y_prev, "integrator state");
    check(aw_term === st.bc, $sformatf("anti-windup term %h expected %h", aw_term, st.bc));
    if (aw_term[30:0] != 0) n_aw++;
    repeat ($urandom_range(0, 5)) @(negedge clk);
  endtask

  initial begin
    g = '{kp: 32'h4305_E666, ki_ts: 32'h3F78_51EC, inv_kb: 32'h3F83_F571,
          umax: 32'h43AF_0000, umin: 32'hC3AF_0000};
    st = '{y_prev: 32'h0, bc: 32'h0};
    u_valid = 0; u = 0;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    repeat (2) @(posedge clk);
    for (int n = 0; n < 20; n++) sample((real'($urandom_range(0, 400)) - 200.0) / 100.0);
    for (int n = 0; n < 30; n++) sample(3.0 + real'($urandom_range(0, 100)) / 10.0);
    for (int n = 0; n < 30; n++) sample(-3.0 - real'($urandom_range(0, 100)) / 10.0);
    for (int n = 0; n < 40; n++) sample((real'($urandom_range(0, 200)) - 100.0) / 100.0);
    if (n_above == 0 || n_below == 0 || n_in == 0 || n_aw == 0 || n_hold_cmp == 0) begin
      failures++;
      $display("FAIL: mechanism missing: above %0d below %0d in range %0d anti-windup %0d",
               n_above, n_below, n_in, n_aw);
    end
    $display("above %0d below %0d in range %0d anti-windup active %0d", n_above, n_below, n_in, n_aw);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
