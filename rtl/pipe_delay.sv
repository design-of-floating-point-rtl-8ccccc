// pipe_delay: a chain of DEPTH registers that delays a WIDTH-bit word by
// exactly DEPTH clock cycles (DEPTH = 0 is a plain wire).
//
// The controller uses it twice over: as the output pipeline of every
// arithmetic unit (so each unit has the fixed latency the rest of the
// datapath is balanced against) and to carry a value alongside a unit whose
// result it must meet. The registers are cleared by the synchronous,
// active-high reset so that valid bits carried through it start at zero.
module pipe_delay #(
  parameter int unsigned WIDTH = 1,
  parameter int unsigned DEPTH = 1
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  if (DEPTH == 0) begin : g_wire
    assign q = d;
  end else begin : g_regs
    logic [WIDTH-1:0] stage [DEPTH];
    always_ff @(posedge clk) begin
      if (rst) begin
        for (int i = 0; i < int'(DEPTH); i++) stage[i] <= '0;
      end else begin
        stage[0] <= d;
        for (int i = 1; i < int'(DEPTH); i++) stage[i] <= stage[i-1];
      end
    end
    assign q = stage[DEPTH-1];
  end

endmodule
