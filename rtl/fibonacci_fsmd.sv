// fibonacci_fsmd: Fibonacci number generator built as a finite-state machine
// with data path (FSMD).
//
// Pull startb low for one clock with num_cycles = n presented; the
// controller (fibonacci_fsm) then runs the data path (fibonacci_datapath) for
// n clock cycles, and the output register (result_register) follows the
// data path's current term while complete is low. When complete returns high
// result_latched holds fib(n) (modulo 2**RESULT_W) until the next run.
// n = 0 runs 2**N cycles.
//
// Interface: clk, rstb (asynchronous, active low), startb (active low),
// num_cycles[N-1:0], result_latched[RESULT_W-1:0], complete.
// Timing: complete falls one clock after startb is sampled low and rises
// n clocks later; result_latched changes on each of those n edges, reading
// fib(1), fib(2), ..., fib(n), and is final on the edge where complete rises.
// A new run can start on the clock after complete rises (one Finish cycle,
// then Idle).
//
// The partition into three blocks, the port set, N = 6 and the result width
// rule follow the original design.
module fibonacci_fsmd
  import fib_pkg::*;
#(
  parameter  int unsigned N        = 6,
  localparam int unsigned RESULT_W = result_width(N)
) (
  input  logic                clk,
  input  logic                rstb,
  input  logic                startb,
  input  logic [N-1:0]        num_cycles,
  output logic [RESULT_W-1:0] result_latched,
  output logic                complete
);

  logic                calc;
  logic [RESULT_W-1:0] result;

  fibonacci_fsm #(.N(N)) u_fsm (
    .clk        (clk),
    .rstb       (rstb),
    .startb     (startb),
    .num_cycles (num_cycles),
    .calc       (calc),
    .complete   (complete)
  );

  fibonacci_datapath #(.N(N)) u_datapath (
    .clk  (clk),
    .calc (calc),
    .fib  (result)
  );

  result_register #(.W(RESULT_W)) u_result_register (
    .clk      (clk),
    .rstb     (rstb),
    .complete (complete),
    .d        (result),
    .q        (result_latched)
  );

endmodule
