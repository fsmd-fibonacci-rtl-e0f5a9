// result_register: output register of the Fibonacci FSMD.
//
// A W-bit register that copies d on every rising clock edge while complete is
// low and holds its value while complete is high, so the final Fibonacci
// value stays visible after the controller has returned to Idle and the
// datapath has been re-seeded. rstb (active low) clears it asynchronously.
//
// Timing: q takes the value d had before the edge, so q lags d by one cycle
// while complete is low. The last value captured is the one d held in the
// final cycle with complete low.
//
// Behaviour follows the original design's output latch; W has no default of
// its own there, it is always the datapath's result width, and 22 (the width
// at the top level's N = 6) is used as this module's default.
module result_register #(
  parameter int unsigned W = 22
) (
  input  logic         clk,
  input  logic         rstb,
  input  logic         complete,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  always_ff @(posedge clk or negedge rstb) begin
    if (!rstb)          q <= '0;
    else if (!complete) q <= d;
  end

endmodule
