// tb_fp_saturate: self-checking test of the comparison-and-saturation
// stage at its default limits (+/-350). Values inside, above, below and
// exactly at the limits, infinities and NaN are streamed through one per
// cycle; output value, above / below / in-range flags and the delayed
// unsaturated value are checked against the real ordering, with the
// latency LAT_SAT. Each of the three cases must occur.
module tb_fp_saturate;
  import fp_pkg::*;
  import fp_ref_pkg::*;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  localparam float32_t UMAX = 32'h43AF_0000;
  localparam float32_t UMIN = 32'hC3AF_0000;

  logic     in_valid, out_valid, above, below, in_range;
  float32_t s, y, s_out;
  int       checks = 0, failures = 0, cycle = 0;
  int       n_above = 0, n_below = 0, n_in = 0;

  typedef struct { float32_t y, s; logic [2:0] f; int due; } item_t;
  item_t q[$];

  fp_saturate dut (.clk(clk), .rst(rst), .in_valid(in_valid), .s(s),
                   .out_valid(out_valid), .y(y), .s_out(s_out),
                   .above(above), .below(below), .in_range(in_range));

  always @(posedge clk) cycle <= cycle + 1;

  always @(posedge clk) begin
    if (!rst && out_valid) begin
      item_t it;
      checks++;
      if (q.size() == 0) begin
        failures++;
        $display("FAIL: unexpected output");
      end else begin
        it = q.pop_front();
        if (y !== it.y || s_out !== it.s || {above, below, in_range} !== it.f || cycle != it.due) begin
          failures++;
          if (failures < 10)
            $display("FAIL: s=%h y=%h exp %h flags %b exp %b", it.s, y, it.y,
                     {above, below, in_range}, it.f);
        end
        n_above += int'(above);
        n_below += int'(below);
        n_in    += int'(in_range);
      end
    end
  end

  initial begin
    in_valid = 0; s = 0;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    for (int n = 0; n < 5000; n++) begin
      real rs;
      logic ab, be;
      @(negedge clk);
      in_valid = ($urandom_range(0, 3) != 0);
      case ($urandom_range(0, 9))
        0: s = UMAX;
        1: s = UMIN;
        2: s = {1'($urandom), 8'hFF, 23'h0};
        3: s = {1'($urandom), UMAX[30:1], 1'b1};
        default: s = r2f((real'($urandom_range(0, 200000)) - 100000.0) / 200.0);
      endcase
      rs = f2r(s);
      ab = rs > 350.0;
      be = rs < -350.0;
      if (in_valid)
        q.push_back('{ab ? UMAX : (be ? UMIN : s), s, {ab, be, !ab && !be},
                      cycle + int'(LAT_SAT)});
    end
    @(negedge clk) in_valid = 0;
    repeat (LAT_SAT + 2) @(posedge clk);
    if (q.size() != 0) begin
      failures++;
      $display("FAIL: %0d outputs missing", q.size());
    end
    if (n_above == 0 || n_below == 0 || n_in == 0) begin
      failures++;
      $display("FAIL: a case never occurred: above %0d below %0d in range %0d",
               n_above, n_below, n_in);
    end
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
