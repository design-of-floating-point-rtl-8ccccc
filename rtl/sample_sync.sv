// sample_sync: sampling-period synchroniser with sample-and-hold on both
// sides of the floating-point datapath.
//
// The pipelined units take a different number of cycles each and would, if
// left free-running, recompute many times per sampling period. This block
// makes the datapath run exactly once per period: a counter divides the
// clock by SAMPLE_CYCLES; at the end of each period (tick) the N_CH current
// references and measurements are captured, their differences (the current
// errors) are held on err_hold for the whole period, and start pulses once.
// As the result of each channel arrives (res_valid) it is latched into the
// output hold register v_out, which keeps its value until the next result;
// when every channel has delivered, v_update pulses. The first sample is
// taken one full period after reset, so the outputs stay at +0 for one
// sampling period. If a tick arrives while the datapath has not finished
// (ready_in low), the sample is skipped and the sticky flag overrun is set.
//
// From the design description: one computation per sampling period, the
// sample-and-hold idea, the error between commanded and measured current,
// a 20 ns clock and a 100 us sampling period (SAMPLE_CYCLES = 5000), and
// the one-period delay after reset. This design's choices: the integer error
// computed at capture time, the handshake and the overrun flag.
module sample_sync
  import fp_pkg::*;
#(
  parameter int unsigned N_CH          = 2,
  parameter int unsigned WIDTH         = 32,
  parameter int unsigned SAMPLE_CYCLES = 5000
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic signed [WIDTH-1:0] ref_in   [N_CH],
  input  logic signed [WIDTH-1:0] meas_in  [N_CH],
  input  logic                    ready_in,
  output logic                    tick,
  output logic                    start,
  output logic signed [WIDTH:0]   err_hold [N_CH],
  input  logic [N_CH-1:0]         res_valid,
  input  float32_t                res      [N_CH],
  output float32_t                v_out    [N_CH],
  output logic                    v_update,
  output logic                    busy,
  output logic                    overrun
);

  localparam int unsigned CW = (SAMPLE_CYCLES > 1) ? $clog2(SAMPLE_CYCLES) : 1;

  logic [CW-1:0]   cnt;
  logic [N_CH-1:0] got;

  assign tick = (cnt == CW'(SAMPLE_CYCLES - 1));

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt      <= '0;
      start    <= 1'b0;
      busy     <= 1'b0;
      overrun  <= 1'b0;
      got      <= '0;
      v_update <= 1'b0;
      for (int c = 0; c < int'(N_CH); c++) begin
        err_hold[c] <= '0;
        v_out[c]    <= FP_ZERO;
      end
    end else begin
      start    <= 1'b0;
      v_update <= 1'b0;
      cnt      <= tick ? '0 : cnt + 1'b1;

      if (tick) begin
        if (!busy && ready_in) begin
          for (int c = 0; c < int'(N_CH); c++) begin
            err_hold[c] <= (WIDTH+1)'(ref_in[c]) - (WIDTH+1)'(meas_in[c]);
          end
          start <= 1'b1;
          busy  <= 1'b1;
        end else begin
          overrun <= 1'b1;
        end
      end

      for (int c = 0; c < int'(N_CH); c++) begin
        if (res_valid[c]) v_out[c] <= res[c];
      end
      if (busy) begin
        if ((got | res_valid) == '1) begin
          got      <= '0;
          busy     <= 1'b0;
          v_update <= 1'b1;
        end else begin
          got <= got | res_valid;
        end
      end
    end
  end

  a_no_stray_result : assert property (@(posedge clk) disable iff (rst) res_valid != '0 |-> busy)
    else $error("sample_sync: result outside a sampling period's computation");

endmodule
