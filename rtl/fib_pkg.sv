// fib_pkg: types and constants shared by the Fibonacci FSMD.
//
// - fib_state_t is the three-state control encoding (Idle, Run, Finish).
// - result_width(n) sizes the result bus for an n-bit cycle counter. It is
//   ceil(log2(fib(2**(n-1)))), the number of bits the Fibonacci number of
//   index 2**(n-1) needs. The sizing rule is the original design's; here it is
//   evaluated exactly with wide integer arithmetic at elaboration time rather
//   than with a floating-point closed form. Results for indices above
//   2**(n-1) wrap modulo 2**width. Valid for 3 <= n <= 11.
package fib_pkg;

  typedef enum logic [1:0] {
    ST_IDLE   = 2'd0,
    ST_RUN    = 2'd1,
    ST_FINISH = 2'd2
  } fib_state_t;

  localparam int unsigned FIB_CALC_BITS = 1024;

  // Exact fib(k) for k <= 2**10, computed at elaboration.
  function automatic logic [FIB_CALC_BITS-1:0] fib_value(int unsigned k);
    logic [FIB_CALC_BITS-1:0] a, b, t;
    a = '0;
    b = 1;
    for (int unsigned i = 0; i < k; i++) begin
      t = a + b;
      a = b;
      b = t;
    end
    return a;
  endfunction

  // ceil(log2(x)): bit length of x-1.
  function automatic int unsigned ceil_log2(logic [FIB_CALC_BITS-1:0] x);
    logic [FIB_CALC_BITS-1:0] y;
    int unsigned bits;
    y = x - 1;
    bits = 0;
    for (int unsigned i = 0; i < FIB_CALC_BITS; i++)
      if (y[i]) bits = i + 1;
    return bits;
  endfunction

  function automatic int unsigned result_width(int unsigned n);
    return ceil_log2(fib_value(1 << (n - 1)));
  endfunction

endpackage
