// fibonacci_fsm_tb: self-checking testbench for fibonacci_fsm (N = 5).
//
// Inputs change on the falling clock edge and outputs are sampled just
// before the next falling edge. For each run the testbench checks that calc
// rises on the first rising edge that sees startb low, that calc stays high
// for exactly num_cycles clocks (2**N for num_cycles = 0, plus the extra
// clocks while startb is held low past the first), that complete is always
// the inverse of calc, that a start request during the Finish cycle is
// ignored, and that an asynchronous reset returns the machine to Idle at
// once.
module fibonacci_fsm_tb;
  localparam int unsigned N = 5;

  logic         clk;
  logic         rstb;
  logic         startb;
  logic [N-1:0] num_cycles;
  logic         calc, complete;

  int checks = 0, failures = 0;

  fibonacci_fsm #(.N(N)) dut (.*);

  initial begin
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // complete must be the inverse of calc at every sample point
  always @(negedge clk) if (rstb) check(complete == !calc, "complete != !calc");

  // One run: startb held low for `hold` clocks with num_cycles = n.
  task automatic run(input int unsigned n, input int unsigned hold);
    int unsigned expected, count;
    @(negedge clk);
    check(calc == 1'b0 && complete == 1'b1, "idle before start");
    num_cycles = N'(n);
    startb = 1'b0;
    repeat (hold) @(negedge clk);
    startb = 1'b1;
    expected = ((n == 0) ? (1 << N) : n) + hold - 1;
    count = hold;          // calc was high after each of the held edges
    check(calc == 1'b1, "calc one clock after start");
    num_cycles = N'($urandom);  // must not matter once running
    while (calc && count < expected + 4) begin
      @(negedge clk);
      if (calc) count++;
    end
    check(count == expected, $sformatf("calc cycles n=%0d hold=%0d got %0d", n, hold, count));
    // now in Finish: a start request here must be ignored
    check(complete == 1'b1, "complete high in Finish");
    startb = 1'b0;
    @(negedge clk);
    startb = 1'b1;
    check(calc == 1'b0, "start ignored during Finish");
    @(negedge clk);
    check(calc == 1'b0, "back in Idle");
  endtask

  initial begin
    rstb = 1'b0;
    startb = 1'b1;
    num_cycles = '0;
    repeat (2) @(negedge clk);
    rstb = 1'b1;
    @(negedge clk);
    check(calc == 1'b0 && complete == 1'b1, "idle after reset");
    // Idle holds while startb is high
    repeat (5) @(negedge clk);
    check(calc == 1'b0, "idle holds");

    run(12, 1);
    run(1, 1);
    run(2, 1);
    run(31, 1);
    run(0, 1);      // counter wraps: 2**N cycles
    run(6, 3);      // startb held low for three clocks
    for (int i = 0; i < 20; i++) run($urandom_range(0, 31), $urandom_range(1, 3));

    // asynchronous reset in the middle of a run
    @(negedge clk);
    num_cycles = 5'd20;
    startb = 1'b0;
    @(negedge clk);
    startb = 1'b1;
    repeat (4) @(negedge clk);
    check(calc == 1'b1, "running before reset");
    #2 rstb = 1'b0;
    #1 check(calc == 1'b0 && complete == 1'b1, "async reset to Idle");
    @(negedge clk);
    rstb = 1'b1;
    repeat (3) @(negedge clk);
    check(calc == 1'b0, "stays Idle after reset");
    run(3, 1);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
