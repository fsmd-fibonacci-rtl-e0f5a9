// fibonacci_datapath: data path of the Fibonacci FSMD.
//
// Two registers hold the last two terms of the sequence, f_iminus1 = fib(i-1)
// and f_iminus2 = fib(i-2), and one adder forms their sum. When calc is low
// the registers are seeded with fib(1) = 1 and fib(0) = 0; when calc is high
// each rising clock edge steps the recurrence:
//   f_iminus1 <= f_iminus1 + f_iminus2,  f_iminus2 <= f_iminus1.
// fib is f_iminus1, so after k clock edges with calc high (following at least
// one edge with calc low) fib = fib(k+1), modulo 2**RESULT_W.
//
// Interface: clk, calc, fib[RESULT_W-1:0]. RESULT_W is derived from N, the
// width of the FSM's cycle counter, as the bit length of fib(2**(N-1)) (10
// bits at N = 5, 22 at N = 6). Sums wider than that wrap silently.
//
// Structure and sizing rule follow the original design. As there, the
// registers have no reset: they are seeded by the first clock edge with calc
// low, which the controller provides from reset (it starts in Idle).
module fibonacci_datapath
  import fib_pkg::*;
#(
  parameter  int unsigned N        = 5,
  localparam int unsigned RESULT_W = result_width(N)
) (
  input  logic                clk,
  input  logic                calc,
  output logic [RESULT_W-1:0] fib
);

  logic [RESULT_W-1:0] f_iminus1, f_iminus2;
  logic [RESULT_W-1:0] f_iminus1_next, f_iminus2_next;

  always_comb begin
    if (!calc) begin
      f_iminus2_next = '0;
      f_iminus1_next = RESULT_W'(1);
    end else begin
      f_iminus2_next = f_iminus1;
      f_iminus1_next = f_iminus1 + f_iminus2;
    end
  end

  always_ff @(posedge clk) begin
    f_iminus2 <= f_iminus2_next;
    f_iminus1 <= f_iminus1_next;
  end

  assign fib = f_iminus1;

endmodule
