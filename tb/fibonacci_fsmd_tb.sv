// fibonacci_fsmd_tb: end-to-end testbench for fibonacci_fsmd at its default
// size (N = 6, 22-bit result).
//
// Each run pulls startb low with num_cycles = n and then follows the
// outputs clock by clock: complete must fall one clock after the start,
// result_latched must read fib(1), fib(2), ..., fib(n) on the following
// edges, complete must rise after exactly n clocks (2**N for n = 0) and the
// final value must then hold through Finish and Idle. Expected values come
// from a 64-bit reference reduced modulo 2**22; the sequence of the reference
// waveform (n = 12 ending in 144) and the short example (n = 6 giving 8) are
// also checked against constants.
//
// Every mechanism of the design is exercised and counted: a normal run, an
// idle period with startb high, a run whose result overflows the 22-bit
// width, a run with num_cycles = 0 (64 steps), startb held low past the
// first clock (stretched run), a start request during Finish (ignored),
// back-to-back runs, and an asynchronous reset in the middle of a run.
module fibonacci_fsmd_tb;
  localparam int unsigned N = 6;
  localparam int unsigned W = 22;

  logic         clk;
  logic         rstb;
  logic         startb;
  logic [N-1:0] num_cycles;
  logic [W-1:0] result_latched;
  logic         complete;

  int checks = 0, failures = 0;
  int n_runs = 0, n_idle_hold = 0, n_overflow = 0, n_zero = 0;
  int n_stretch = 0, n_finish_ignored = 0, n_back_to_back = 0, n_reset = 0;

  fibonacci_fsmd dut (.*);

  initial begin
    clk = 1'b0;
    forever #10 clk = ~clk;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic longint unsigned fib_exact(int unsigned k);
    longint unsigned a = 0, b = 1, t;
    for (int unsigned i = 0; i < k; i++) begin
      t = a + b;
      a = b;
      b = t;
    end
    return a;
  endfunction

  function automatic logic [W-1:0] ref_fib(int unsigned k);
    return W'(fib_exact(k));
  endfunction

  // One run; returns the final result. `hold` is how many clocks startb
  // stays low. `probe_finish` issues a start request during Finish.
  task automatic run(input int unsigned n, input int unsigned hold,
                     input bit probe_finish, output logic [W-1:0] final_value);
    int unsigned steps, k;
    steps = ((n == 0) ? (1 << N) : n) + hold - 1;
    check(complete == 1'b1, "complete high before start");
    num_cycles = N'(n);
    startb = 1'b0;
    @(negedge clk);
    check(complete == 1'b0, "complete falls one clock after start");
    repeat (hold - 1) @(negedge clk);
    startb = 1'b1;
    num_cycles = N'($urandom);   // ignored once running
    // result_latched trails the datapath; with a stretched run the first
    // terms repeat while the counter is held, so only check the tail.
    k = hold - 1;
    while (!complete && k < steps + 4) begin
      @(negedge clk);
      k++;
      if (hold == 1)
        check(result_latched == ref_fib(k),
              $sformatf("n=%0d step %0d got %0d exp %0d", n, k, result_latched, ref_fib(k)));
    end
    check(k == steps, $sformatf("n=%0d: %0d clocks with complete low, expected %0d", n, k, steps));
    final_value = result_latched;
    check(final_value == ref_fib(steps), $sformatf("n=%0d final %0d exp %0d", n, final_value, ref_fib(steps)));
    if (n == 0) n_zero++;
    if (hold > 1) n_stretch++;
    if (fib_exact(steps) >= (64'd1 << W)) n_overflow++;
    n_runs++;
    // Finish cycle
    if (probe_finish) begin
      startb = 1'b0;
      @(negedge clk);
      startb = 1'b1;
      check(complete == 1'b1, "start during Finish ignored");
      n_finish_ignored++;
    end else begin
      @(negedge clk);
    end
    // Idle: the value must hold
    check(complete == 1'b1 && result_latched == final_value, "result held after run");
  endtask

  logic [W-1:0] r;

  initial begin
    rstb = 1'b0;
    startb = 1'b1;
    num_cycles = '0;
    check($bits(result_latched) == W, "result width 22 at N=6");
    repeat (2) @(negedge clk);
    check(result_latched == '0 && complete == 1'b1, "reset state");
    rstb = 1'b1;
    repeat (3) @(negedge clk);
    check(complete == 1'b1 && result_latched == '0, "idle holds while startb high");
    n_idle_hold++;

    // The reference waveform: num_cycles = 12 ends in 144.
    run(12, 1, 0, r);
    check(r == 22'd144, "fib(12) = 144");
    // The introductory example: i = 6 gives 8.
    repeat (2) @(negedge clk);
    run(6, 1, 0, r);
    check(r == 22'd8, "fib(6) = 8");
    run(1, 1, 0, r);  n_back_to_back++;
    check(r == 22'd1, "fib(1) = 1");
    run(2, 1, 1, r);
    check(r == 22'd1, "fib(2) = 1");
    @(negedge clk);
    run(33, 1, 0, r);
    check(r == 22'd3524578, "fib(33) = 3524578, largest that fits");
    run(34, 1, 0, r); n_back_to_back++;
    check(r == W'(64'd5702887), "fib(34) wraps modulo 2**22");
    run(0, 1, 0, r);
    check(r == W'(fib_exact(64)), "num_cycles = 0 runs 64 steps");
    run(63, 1, 1, r);
    @(negedge clk);
    run(10, 3, 0, r);
    check(r == 22'd144, "startb held three clocks stretches by two");
    for (int i = 0; i < 30; i++) begin
      if ($urandom_range(0, 1) != 0) begin
        @(negedge clk);
        n_idle_hold++;
      end else n_back_to_back++;
      run($urandom_range(0, 63), $urandom_range(1, 2), 1'($urandom), r);
    end

    // asynchronous reset in the middle of a run
    num_cycles = 6'd30;
    startb = 1'b0;
    @(negedge clk);
    startb = 1'b1;
    repeat (10) @(negedge clk);
    check(complete == 1'b0 && result_latched == ref_fib(10), "mid-run before reset");
    #3 rstb = 1'b0;
    #1 check(complete == 1'b1 && result_latched == '0, "asynchronous reset clears");
    n_reset++;
    @(negedge clk);
    rstb = 1'b1;
    @(negedge clk);
    run(12, 1, 0, r);
    check(r == 22'd144, "run after reset");

    check(n_runs > 0,           "mechanism: complete run");
    check(n_idle_hold > 0,      "mechanism: idle hold");
    check(n_overflow > 0,       "mechanism: result overflow");
    check(n_zero > 0,           "mechanism: num_cycles = 0");
    check(n_stretch > 0,        "mechanism: startb held low");
    check(n_finish_ignored > 0, "mechanism: start during Finish");
    check(n_back_to_back > 0,   "mechanism: back-to-back runs");
    check(n_reset > 0,          "mechanism: reset mid-run");
    $display("mechanisms: runs=%0d idle_hold=%0d overflow=%0d zero=%0d stretch=%0d finish_ignored=%0d back_to_back=%0d reset=%0d",
             n_runs, n_idle_hold, n_overflow, n_zero, n_stretch, n_finish_ignored, n_back_to_back, n_reset);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
