// fibonacci_datapath_tb: self-checking testbench for fibonacci_datapath
// (N = 5, so a 10-bit result).
//
// Checks the result width, the seeding with calc low, the first terms
// 1, 1, 2, 3, 5, 8 against constants, and long runs against a 64-bit
// reference sequence reduced modulo 2**10, including runs past fib(16) = 987
// where the result wraps, and re-seeding in the middle of a sequence.
module fibonacci_datapath_tb;
  localparam int unsigned N = 5;
  localparam int unsigned W = 10;

  logic         clk;
  logic         calc;
  logic [W-1:0] fib;

  int checks = 0, failures = 0;

  fibonacci_datapath #(.N(N)) dut (.*);

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

  // fib(k) modulo 2**W from a 64-bit reference
  function automatic logic [W-1:0] ref_fib(int unsigned k);
    longint unsigned a = 0, b = 1, t;
    for (int unsigned i = 0; i < k; i++) begin
      t = (a + b) % (64'd1 << W);
      a = b;
      b = t;
    end
    return W'(a);
  endfunction

  task automatic seed(input int unsigned cycles);
    calc = 1'b0;
    repeat (cycles) @(negedge clk);
    check(fib == W'(1), "seeded to fib(1)");
  endtask

  task automatic steps(input int unsigned k);
    calc = 1'b1;
    for (int unsigned i = 1; i <= k; i++) begin
      @(negedge clk);
      check(fib == ref_fib(i + 1), $sformatf("fib(%0d) got %0d exp %0d", i + 1, fib, ref_fib(i + 1)));
    end
  endtask

  localparam int unsigned FIRST [6] = '{1, 1, 2, 3, 5, 8};

  initial begin
    check($bits(fib) == 10, "result width 10 at N=5");
    seed(2);
    calc = 1'b1;
    for (int i = 1; i < 6; i++) begin
      @(negedge clk);
      check(fib == W'(FIRST[i]), $sformatf("first terms i=%0d got %0d", i, fib));
    end
    seed(1);
    steps(15);               // fib(16) = 987, the last value that fits
    check(fib == 10'd987, "fib(16) = 987");
    seed(1);
    steps(40);               // wraps modulo 1024
    seed(1);
    steps(7);
    seed(1);                 // re-seed mid-sequence
    steps(3);
    for (int r = 0; r < 10; r++) begin
      seed($urandom_range(1, 3));
      steps($urandom_range(1, 60));
    end
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
