// tb_sample_sync: self-checking test of the sampling synchroniser with a
// short period (SAMPLE_CYCLES = 20) and two channels. A small model of the
// datapath in the testbench answers each start with one result per channel
// after a programmable delay (the channels at different times). Checked:
// ticks every SAMPLE_CYCLES cycles with the first one a full period after
// reset; start exactly one cycle after each accepted tick; the held errors
// equal reference minus measurement at the tick and stay constant; outputs
// stay +0 until the first result, then follow each result and hold it;
// v_update once per sample when both channels have delivered; a tick that
// arrives while the datapath is busy is skipped and sets overrun.
module tb_sample_sync;
  import fp_pkg::*;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  localparam int N = 20;

  logic signed [15:0] ref_in [2], meas_in [2];
  logic signed [16:0] err_hold [2];
  logic               ready_in, tick, start, v_update, busy, overrun;
  logic [1:0]         res_valid;
  float32_t           res [2], v_out [2];
  int checks = 0, failures = 0, cycle = 0;
  int last_tick = -1, n_ticks = 0, n_updates = 0, n_starts = 0;
  int delay0 = 5, delay1 = 8;
  logic signed [16:0] exp_err [2];
  float32_t           exp_v [2];

  sample_sync #(.N_CH(2), .WIDTH(16), .SAMPLE_CYCLES(N)) dut (
    .clk(clk), .rst(rst), .ref_in(ref_in), .meas_in(meas_in), .ready_in(ready_in),
    .tick(tick), .start(start), .err_hold(err_hold), .res_valid(res_valid), .res(res),
    .v_out(v_out), .v_update(v_update), .busy(busy), .overrun(overrun));

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d: %s", cycle, what);
    end
  endtask

  always @(posedge clk) cycle <= cycle + 1;

  // Datapath model: results arrive delay0 / delay1 cycles after start.
  int since_start = -1;
  logic tick_q;
  always @(posedge clk) begin
    if (rst) begin
      since_start <= -1;
      tick_q <= 0;
    end else begin
      tick_q <= tick && !busy && ready_in;
      if (start) since_start <= 0;
      else if (since_start >= 0) since_start <= since_start + 1;
    end
  end
  always_comb begin
    res_valid[0] = (since_start == delay0);
    res_valid[1] = (since_start == delay1);
    res[0] = 32'h4000_0000 + 32'(cycle);
    res[1] = 32'hC000_0000 + 32'(cycle);
  end

  always @(posedge clk) begin
    if (!rst) begin
      check(start == tick_q, "start is not one cycle after an accepted tick");
      if (start) n_starts++;
      if (n_starts > 0)
        for (int c = 0; c < 2; c++)
          check(err_hold[c] == exp_err[c], $sformatf("err_hold[%0d]=%0d expected %0d",
                                                      c, err_hold[c], exp_err[c]));
      if (tick) begin
        check(cycle - last_tick == N, $sformatf("tick spacing %0d", cycle - last_tick));
        last_tick = cycle;
        n_ticks++;
        if (!busy && ready_in)
          for (int c = 0; c < 2; c++) exp_err[c] = 17'(ref_in[c]) - 17'(meas_in[c]);
      end
      for (int c = 0; c < 2; c++)
        check(v_out[c] === exp_v[c], $sformatf("v_out[%0d]=%h expected %h", c, v_out[c], exp_v[c]));
      for (int c = 0; c < 2; c++) if (res_valid[c]) exp_v[c] = res[c];
      if (v_update) n_updates++;
    end
  end

  initial begin
    ready_in = 1;
    exp_v[0] = 0; exp_v[1] = 0;
    exp_err[0] = 0; exp_err[1] = 0;
    for (int c = 0; c < 2; c++) begin ref_in[c] = 0; meas_in[c] = 0; end
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    last_tick = cycle - 1;
    repeat (60) begin
      @(negedge clk);
      for (int c = 0; c < 2; c++) begin
        ref_in[c]  = 16'($urandom);
        meas_in[c] = 16'($urandom);
      end
      repeat ($urandom_range(1, 12)) @(negedge clk);
    end
    check(n_starts > 0 && (n_updates == n_starts || n_updates == n_starts - 1), "one update per start");
    check(!overrun, "overrun without cause");
    // The datapath stays busy across a tick: the sample is skipped.
    @(posedge tick);
    @(negedge clk) ready_in = 1'b0;
    @(posedge tick);
    @(negedge clk);
    check(overrun, "overrun not flagged");
    ready_in = 1'b1;
    repeat (3 * N) @(negedge clk);
    check(n_ticks > n_starts, "skipped tick not seen");
    $display("ticks %0d starts %0d updates %0d overrun %b", n_ticks, n_starts, n_updates, overrun);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
