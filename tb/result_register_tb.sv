// result_register_tb: self-checking testbench for result_register (W = 22).
//
// Drives random data and a random complete level each clock and compares q
// with a reference that loads on complete low and holds on complete high.
// Also checks the asynchronous clear, which must act without a clock edge.
module result_register_tb;
  localparam int unsigned W = 22;

  logic         clk;
  logic         rstb;
  logic         complete;
  logic [W-1:0] d, q;
  logic [W-1:0] expected;
  int loads = 0, holds = 0;

  int checks = 0, failures = 0;

  result_register #(.W(W)) dut (.*);

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

  initial begin
    rstb = 1'b0;
    complete = 1'b1;
    d = '1;
    #1 check(q == '0, "cleared in reset");
    @(negedge clk);
    check(q == '0, "still cleared with clock");
    rstb = 1'b1;
    expected = '0;
    for (int i = 0; i < 400; i++) begin
      complete = 1'($urandom);
      d = W'($urandom);
      @(posedge clk);
      if (!complete) begin expected = d; loads++; end
      else holds++;
      @(negedge clk);
      check(q == expected, $sformatf("q=%0h exp=%0h", q, expected));
    end
    check(loads > 0 && holds > 0, "both load and hold exercised");
    // asynchronous clear between edges
    complete = 1'b0;
    d = 22'h2AAAAA;
    @(negedge clk);
    check(q == 22'h2AAAAA, "loaded before clear");
    #2 rstb = 1'b0;
    #1 check(q == '0, "asynchronous clear");
    @(negedge clk);
    rstb = 1'b1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
