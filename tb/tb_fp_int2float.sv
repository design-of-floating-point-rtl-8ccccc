// tb_fp_int2float: self-checking test of the integer / fixed-point to
// binary32 converter. Two instances are tested side by side: the default
// (32-bit plain integer) and a 33-bit input with 8 fraction bits. Inputs
// are random values of every magnitude (so that rounding of values above
// 2^24 is exercised), zero, -1 and the most negative number. Each result is
// compared with the exact value rounded to binary32 and must appear
// exactly LAT_CONV cycles after its input.
module tb_fp_int2float;
  import fp_pkg::*;
  import fp_ref_pkg::*;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  logic               in_valid, ov0, ov1;
  logic signed [31:0] x0;
  logic signed [32:0] x1;
  float32_t           r0, r1;
  int                 checks = 0, failures = 0;
  int                 cycle = 0;

  typedef struct { float32_t e0, e1; int due; logic signed [32:0] x1; } item_t;
  item_t q[$];

  fp_int2float dut0 (.clk(clk), .rst(rst), .in_valid(in_valid), .x(x0),
                     .out_valid(ov0), .r(r0));
  fp_int2float #(.WIDTH(33), .FRAC_BITS(8)) dut1 (
    .clk(clk), .rst(rst), .in_valid(in_valid), .x(x1), .out_valid(ov1), .r(r1));

  always @(posedge clk) cycle <= cycle + 1;

  always @(posedge clk) begin
    if (!rst && (ov0 || ov1)) begin
      item_t it;
      checks++;
      if (q.size() == 0 || ov0 != ov1) begin
        failures++;
        $display("FAIL: unexpected result");
      end else begin
        it = q.pop_front();
        if (r0 !== it.e0 || r1 !== it.e1 || cycle != it.due) begin
          failures++;
          if (failures < 10)
            $display("FAIL: x1=%0d got %h %h expected %h %h (cycle %0d due %0d)",
                     it.x1, r0, r1, it.e0, it.e1, cycle, it.due);
        end
      end
    end
  end

  initial begin
    in_valid = 0; x0 = 0; x1 = 0;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    for (int n = 0; n < 20000; n++) begin
      int sh;
      @(negedge clk);
      in_valid = ($urandom_range(0, 3) != 0);
      sh = $urandom_range(0, 32);
      x1 = $signed({1'($urandom), 32'($urandom)}) >>> sh;
      case (n)
        0: x1 = 0;
        1: x1 = -1;
        2: x1 = {1'b1, 32'h0};
        3: x1 = {1'b0, {32{1'b1}}};
        default: ;
      endcase
      x0 = x1[31:0];
      if (n == 5) x0 = 32'sh8000_0000;
      if (in_valid)
        q.push_back('{r2f(real'(x0)), r2f(real'(x1) / 256.0), cycle + int'(LAT_CONV), x1});
    end
    @(negedge clk) in_valid = 0;
    repeat (LAT_CONV + 2) @(posedge clk);
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
