// tb_fp_addsub: self-checking test of the binary32 adder / subtractor.
// Streams random operand pairs (one per cycle, with gaps) through the unit:
// mixed exponents, near-equal operands that cancel, large exponent gaps,
// zeros, infinities and NaN. Each result is compared bit for bit with the
// correctly rounded reference from fp_ref_pkg, and each must appear exactly
// LAT_ADD cycles after its operands.
module tb_fp_addsub;
  import fp_pkg::*;
  import fp_ref_pkg::*;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  logic     in_valid, sub, out_valid;
  float32_t a, b, r;
  int       checks = 0, failures = 0;
  int       cycle = 0;

  typedef struct { float32_t exp_r; int due; float32_t a, b; logic sub; } item_t;
  item_t q[$];

  fp_addsub dut (.clk(clk), .rst(rst), .in_valid(in_valid), .sub(sub), .a(a), .b(b),
                 .out_valid(out_valid), .r(r));

  function automatic float32_t rand_fp();
    int k = $urandom_range(0, 99);
    if (k < 3) return 32'h0;
    if (k < 4) return 32'h8000_0000;
    if (k < 5) return {1'(k), 8'hFF, 23'h0};
    if (k < 6) return 32'h7FC0_0001;
    return {1'($urandom), 8'($urandom_range(100, 154)), 23'($urandom)};
  endfunction

  always @(posedge clk) cycle <= cycle + 1;

  always @(posedge clk) begin
    if (!rst && out_valid) begin
      item_t it;
      checks++;
      if (q.size() == 0) begin
        failures++;
        $display("FAIL: unexpected result %h", r);
      end else begin
        it = q.pop_front();
        if (r !== it.exp_r || cycle != it.due) begin
          failures++;
          if (failures < 10)
            $display("FAIL: %h %s %h = %h, expected %h (cycle %0d, due %0d)",
                     it.a, it.sub ? "-" : "+", it.b, r, it.exp_r, cycle, it.due);
        end
      end
    end
  end

  initial begin
    in_valid = 0; sub = 0; a = 0; b = 0;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    for (int n = 0; n < 20000; n++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 3) != 0);
      sub = 1'($urandom);
      a = rand_fp();
      case ($urandom_range(0, 3))
        0: b = {1'($urandom), a[30:23], 23'($urandom)};                       // same exponent
        1: b = {1'($urandom), 8'(int'(a[30:23]) - $urandom_range(0, 3)), 23'($urandom)};
        2: b = {a[31] ^ 1'($urandom), a[30:0] ^ 31'($urandom_range(0, 7))};  // near-cancel
        default: b = rand_fp();
      endcase
      if (in_valid) q.push_back('{sub ? f_sub(a, b) : f_add(a, b), cycle + int'(LAT_ADD), a, b, sub});
    end
    @(negedge clk) in_valid = 0;
    repeat (LAT_ADD + 2) @(posedge clk);
    if (q.size() != 0) begin
      failures++;
      $display("FAIL: %0d results missing", q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
