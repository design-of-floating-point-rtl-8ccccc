// tb_fp_compare: self-checking test of the binary32 comparator. Random
// pairs (equal, differing only in sign, differing in the last bit, +0 and
// -0, denormals, infinities, NaN) are compared against the ordering of the
// real values; the flags must appear exactly LAT_CMP cycles after the
// operands.
module tb_fp_compare;
  import fp_pkg::*;
  import fp_ref_pkg::*;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  logic     in_valid, out_valid, agb, alb, aeb, un;
  float32_t a, b;
  int       checks = 0, failures = 0;
  int       cycle = 0;

  typedef struct { logic [3:0] f; int due; float32_t a, b; } item_t;
  item_t q[$];

  fp_compare dut (.clk(clk), .rst(rst), .in_valid(in_valid), .a(a), .b(b),
                  .out_valid(out_valid), .agb(agb), .alb(alb), .aeb(aeb), .unordered(un));

  function automatic float32_t rand_fp();
    int k = $urandom_range(0, 99);
    if (k < 5) return {1'($urandom), 31'h0};
    if (k < 8) return {1'($urandom), 8'h00, 23'($urandom)};
    if (k < 11) return {1'($urandom), 8'hFF, 23'h0};
    if (k < 13) return 32'h7FC0_0000;
    return {1'($urandom), 8'($urandom_range(120, 135)), 23'($urandom)};
  endfunction

  always @(posedge clk) cycle <= cycle + 1;

  always @(posedge clk) begin
    if (!rst && out_valid) begin
      item_t it;
      checks++;
      if (q.size() == 0) begin
        failures++;
        $display("FAIL: unexpected result");
      end else begin
        it = q.pop_front();
        if ({agb, alb, aeb, un} !== it.f || cycle != it.due) begin
          failures++;
          if (failures < 10)
            $display("FAIL: %h ? %h flags %b expected %b", it.a, it.b, {agb, alb, aeb, un}, it.f);
        end
      end
    end
  end

  initial begin
    in_valid = 0; a = 0; b = 0;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    for (int n = 0; n < 20000; n++) begin
      real ra, rb;
      logic [3:0] f;
      @(negedge clk);
      in_valid = ($urandom_range(0, 3) != 0);
      a = rand_fp();
      case ($urandom_range(0, 3))
        0: b = a;
        1: b = {~a[31], a[30:0]};
        2: b = {a[31:1], ~a[0]};
        default: b = rand_fp();
      endcase
      ra = f2r(a);
      rb = f2r(b);
      if (f_is_nan(a) || f_is_nan(b)) f = 4'b0001;
      else f = {ra > rb, ra < rb, ra == rb, 1'b0};
      if (in_valid) q.push_back('{f, cycle + int'(LAT_CMP), a, b});
    end
    @(negedge clk) in_valid = 0;
    repeat (LAT_CMP + 2) @(posedge clk);
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
