// tb_fp_integrator: self-checking test of the backward-Euler integrator
// y(n) = y(n-1) + x(n). Random increments of mixed sign and size are fed
// one at a time, with random idle gaps of at least LAT_ADD cycles between
// them; every output is compared with a reference accumulator that rounds
// each sum to binary32, must appear exactly LAT_ADD cycles after its input,
// and the state output must then hold the new sum. A reset in the middle
// must clear the state.
module tb_fp_integrator;
  import fp_pkg::*;
  import fp_ref_pkg::*;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  logic     in_valid, out_valid, busy;
  float32_t x, y, state;
  float32_t acc;
  int       checks = 0, failures = 0;

  fp_integrator dut (.clk(clk), .rst(rst), .in_valid(in_valid), .x(x),
                     .out_valid(out_valid), .y(y), .state(state), .busy(busy));

  task automatic step(float32_t inc);
    int lat;
    @(negedge clk);
    x = inc;
    in_valid = 1'b1;
    acc = f_add(acc, inc);
    @(negedge clk);
    in_valid = 1'b0;
    lat = 1;
    while (!out_valid && lat < 50) begin
      @(negedge clk);
      lat++;
    end
    checks++;
    if (!out_valid || y !== acc || lat != int'(LAT_ADD)) begin
      failures++;
      $display("FAIL: y=%h expected %h latency %0d", y, acc, lat);
    end
    @(negedge clk);
    checks++;
    if (state !== acc || busy) begin
      failures++;
      $display("FAIL: state=%h expected %h busy=%b", state, acc, busy);
    end
    repeat ($urandom_range(0, 3)) @(negedge clk);
  endtask

  initial begin
    in_valid = 0; x = 0; acc = 0;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    for (int n = 0; n < 2000; n++)
      step({1'($urandom_range(0, 2) == 0), 8'($urandom_range(110, 135)), 23'($urandom)});
    // reset clears the state
    @(negedge clk) rst = 1'b1;
    @(negedge clk) rst = 1'b0;
    acc = 0;
    checks++;
    if (state !== 32'h0) begin
      failures++;
      $display("FAIL: state not cleared by reset");
    end
    for (int n = 0; n < 200; n++)
      step({1'($urandom), 8'($urandom_range(120, 130)), 23'($urandom)});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
