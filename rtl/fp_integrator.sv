// fp_integrator: backward-Euler discrete integrator in binary32,
// y(n) = y(n-1) + x(n).
//
// x(n) is the already-weighted increment (in the PI axis it is
// Ki*Ts * (u(n) - anti-windup term)), so the block is the z/(z-1) of the
// integrator: one floating-point adder plus the state register y(n-1) (the
// z^-1 element). On in_valid the adder starts with the current state; when
// its result comes out, LATENCY cycles later, the state register takes it and
// out_valid pulses with y = y(n). A new sample must not be presented while a
// sum is in flight (busy = 1); an assertion checks this. Reset clears the
// state to +0.
module fp_integrator
  import fp_pkg::*;
#(
  parameter int unsigned LATENCY = LAT_ADD
) (
  input  logic     clk,
  input  logic     rst,
  input  logic     in_valid,
  input  float32_t x,
  output logic     out_valid,
  output float32_t y,
  output float32_t state,
  output logic     busy
);

  float32_t y_prev;
  float32_t sum;
  logic     sum_valid;
  logic [$clog2(LATENCY + 1)-1:0] inflight;

  fp_addsub #(.LATENCY(LATENCY)) u_add (
    .clk(clk), .rst(rst),
    .in_valid(in_valid), .sub(1'b0),
    .a(y_prev), .b(x),
    .out_valid(sum_valid), .r(sum)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      y_prev   <= FP_ZERO;
      inflight <= '0;
    end else begin
      if (sum_valid) y_prev <= sum;
      inflight <= inflight + $bits(inflight)'(in_valid) - $bits(inflight)'(sum_valid);
    end
  end

  assign y         = sum;
  assign out_valid = sum_valid;
  assign state     = y_prev;
  assign busy      = (inflight != '0);

  a_one_in_flight : assert property (@(posedge clk) disable iff (rst) in_valid |-> !busy)
    else $error("fp_integrator: new sample while the previous sum is in flight");

endmodule
