// fibonacci_fsm: control path of the Fibonacci FSMD.
//
// A three-state machine (Idle, Run, Finish) and an N-bit down counter.
// While Idle, the counter follows num_cycles. A low level on startb, sampled
// on a rising clock edge in Idle, moves the machine to Run with the counter
// holding num_cycles. In Run, calc is high and the counter decrements each
// cycle; the cycle in which it reads 1 is the last Run cycle, after which the
// machine spends one cycle in Finish and returns to Idle. calc is therefore
// high for exactly num_cycles clock cycles (num_cycles = 0 wraps the counter
// and gives 2**N cycles). complete is the inverse of calc: high in Idle and
// Finish, low in Run. Both outputs are decoded from the state register only.
//
// Interface: clk (rising edge), rstb (asynchronous, active low; resets to
// Idle with a cleared counter), startb (active low), num_cycles[N-1:0].
// Timing: calc rises one clock after startb is seen low and falls num_cycles
// clocks later.
//
// The states, their outputs, the transitions and the cnt = 1 exit test follow
// the original design. The counter load is synchronous here: while startb is
// low the counter is held at num_cycles (in any state, as in the original's
// load-on-startb), in Idle it is loaded every cycle, and it only counts down
// in Run. A startb held low into Run therefore stretches Run until it is
// released.
module fibonacci_fsm
  import fib_pkg::*;
#(
  parameter int unsigned N = 5
) (
  input  logic         clk,
  input  logic         rstb,
  input  logic         startb,
  input  logic [N-1:0] num_cycles,
  output logic         calc,
  output logic         complete
);

  fib_state_t   state, state_next;
  logic [N-1:0] cnt;

  // Down counter
  always_ff @(posedge clk or negedge rstb) begin
    if (!rstb)
      cnt <= '0;
    else if (!startb || state == ST_IDLE)
      cnt <= num_cycles;
    else if (state == ST_RUN)
      cnt <= cnt - 1'b1;
  end

  // Next-state logic
  always_comb begin
    unique case (state)
      ST_IDLE:   state_next = startb ? ST_IDLE : ST_RUN;
      ST_RUN:    state_next = (cnt == N'(1)) ? ST_FINISH : ST_RUN;
      default:   state_next = ST_IDLE;
    endcase
  end

  // State register
  always_ff @(posedge clk or negedge rstb) begin
    if (!rstb) state <= ST_IDLE;
    else       state <= state_next;
  end

  // Moore outputs
  assign calc     = (state == ST_RUN);
  assign complete = !calc;

endmodule
