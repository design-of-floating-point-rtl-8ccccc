// tb_fp_mult: self-checking test of the binary32 multiplier. Random operand
// pairs (normal numbers over a wide exponent range, zeros, infinities, NaN,
// and products near overflow and underflow) are streamed through the unit;
// each product is compared bit for bit with the correctly rounded reference
// and must appear exactly LAT_MUL cycles after its operands.
module tb_fp_mult;
  import fp_pkg::*;
  import fp_ref_pkg::*;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  logic     in_valid, out_valid;
  float32_t a, b, r;
  int       checks = 0, failures = 0;
  int       cycle = 0;

  typedef struct { float32_t exp_r; int due; float32_t a, b; } item_t;
  item_t q[$];

  fp_mult dut (.clk(clk), .rst(rst), .in_valid(in_valid), .a(a), .b(b),
               .out_valid(out_valid), .r(r));

  function automatic float32_t rand_fp(int lo, int hi);
    int k = $urandom_range(0, 99);
    if (k < 3) return {1'($urandom), 31'h0};
    if (k < 5) return {1'($urandom), 8'hFF, 23'h0};
    if (k < 6) return 32'h7FC0_0000;
    return {1'($urandom), 8'($urandom_range(lo, hi)), 23'($urandom)};
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
            $display("FAIL: %h * %h = %h, expected %h (cycle %0d, due %0d)",
                     it.a, it.b, r, it.exp_r, cycle, it.due);
        end
      end
    end
  end

  initial begin
    in_valid = 0; a = 0; b = 0;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    for (int n = 0; n < 20000; n++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 3) != 0);
      if (n % 10 == 0) begin
        a = rand_fp(1, 60);       // underflow region
        b = rand_fp(1, 70);
      end else if (n % 10 == 1) begin
        a = rand_fp(190, 254);    // overflow region
        b = rand_fp(60, 130);
      end else begin
        a = rand_fp(80, 170);
        b = rand_fp(80, 170);
      end
      if (in_valid) q.push_back('{f_mul(a, b), cycle + int'(LAT_MUL), a, b});
    end
    @(negedge clk) in_valid = 0;
    repeat (LAT_MUL + 2) @(posedge clk);
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
