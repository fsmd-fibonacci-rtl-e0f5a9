# Fibonacci generator as an FSMD

This design computes the Fibonacci number fib(n) in hardware, one addition
per clock cycle, as a textbook FSMD: a finite-state machine (the control
path) steers a small data path of two registers and an adder. The user
presents `n` on `num_cycles`, pulses the active-low `startb`, waits for
`complete` to return high and reads `result_latched`.

```
fib(0) = 0, fib(1) = 1, fib(i) = fib(i-1) + fib(i-2)
n:      1  2  3  4  5  6  ...  12
fib(n): 1  1  2  3  5  8  ... 144
```

## Blocks

```
                 +--------------------+ result  +-----------------+
                 | fibonacci_datapath |-------->| result_register |---> result_latched
                 |  f(i-1), f(i-2), + |         +-----------------+
                 +--------------------+                ^ (load while complete = 0)
                          ^ calc                       |
 num_cycles ---> +--------------------+                |
 startb     ---> |   fibonacci_fsm    |----------------+-----------------> complete
                 | Idle / Run / Finish|
                 +--------------------+
```

| Module | Role |
|---|---|
| `fibonacci_fsmd` | Top level: wires the three blocks together. Parameter `N` (default 6). |
| `fibonacci_fsm` | Control path: three states and an `N`-bit down counter; drives `calc` and `complete`. |
| `fibonacci_datapath` | Two registers and an adder stepping the recurrence while `calc` is high. |
| `result_register` | Output register: follows the data path while `complete` is low, then holds. |
| `fib_pkg` | State type and the `result_width()` function that sizes the result bus. |

## How a run works, clock by clock

The control path has three states:

- **Idle**: `calc = 0`, `complete = 1`. The counter copies `num_cycles` every
  clock. A rising edge that sees `startb = 0` moves to Run.
- **Run**: `calc = 1`, `complete = 0`. The counter decrements each clock. The
  clock in which the counter reads 1 is the last one in Run.
- **Finish**: `calc = 0`, `complete = 1` for one clock, then back to Idle
  unconditionally. A start request here is ignored.

So `calc` is high for exactly `n` clocks. `n = 0` wraps the counter and
gives 2^N clocks.

While `calc` is low the data path is seeded with f(i-1) = 1 and
f(i-2) = 0. Each clock with `calc` high performs
`f(i-1) <= f(i-1) + f(i-2); f(i-2) <= f(i-1)`, so after k steps
f(i-1) = fib(k+1).

The output register samples f(i-1) on every edge where `complete` is low.
Because it samples the value from *before* the edge, it runs one term behind
the data path. That offset is what makes the final value come out as fib(n)
and not fib(n+1). For `n = 12` the edges go like this:

| Edge after the start edge | State after edge | `complete` | `result_latched` |
|---|---|---|---|
| 0 (sees `startb` low) | Run | 0 | previous value |
| 1 | Run | 0 | 1 = fib(1) |
| 2 | Run | 0 | 1 = fib(2) |
| 3 | Run | 0 | 2 = fib(3) |
| ... | Run | 0 | ... |
| 12 | Finish | 1 | 144 = fib(12) |
| 13 | Idle | 1 | 144, held |

The data path has already reached fib(13) = 233 when the machine leaves Run.
Next it is re-seeded to 1, but the output register no longer samples it.
A new start is accepted on the clock after Finish, in Idle.

If `startb` stays low past the start edge, the counter stays loaded with
`num_cycles` while the data path keeps stepping. A start held low for h clocks
therefore gives n + h - 1 steps and fib(n + h - 1). Use a one-clock pulse for
fib(n).

`rstb` is an asynchronous, active-low reset. It puts the machine in Idle and
clears the counter and `result_latched`. The data path registers have no reset.
They are seeded on the first clock after reset, because Idle holds `calc` low.

## Result width and overflow

The result bus is `RESULT_W = ceil(log2(fib(2^(N-1))))` bits wide:

| N | counter range | sized for | RESULT_W |
|---|---|---|---|
| 5 | 0..31 | fib(16) = 987 | 10 |
| 6 (default) | 0..63 | fib(32) = 2 178 309 | 22 |

`fib_pkg::result_width()` evaluates this rule exactly, with 1024-bit integer
arithmetic at elaboration time. It supports 3 ≤ N ≤ 11.

The width is sized for n = 2^(N-1), but the counter can ask for up to 2^N
steps. Results wrap modulo 2^RESULT_W with no overflow flag. At N = 6,
results are exact for n ≤ 33 (fib(33) = 3 524 578 < 2^22). For n = 34..63
and n = 0 they are reduced modulo 2^22. For example, n = 63 needs 43 bits.
To get exact results over the whole range, widen the bus, for example with
`result_width(N + 1)`.

## Where this RTL makes its own choices

- **Counter load.** The original description of this machine has two
  versions of the counter load. One loads `num_cycles` asynchronously
  whenever `startb` is low. The other loads it in Idle. Here the load is
  synchronous: the counter loads whenever `startb` is low or the machine is
  Idle, and it counts only in Run. Runs started with a one-clock pulse time
  the same either way.
- **State names.** The last state is called Finish in the RTL. The signal
  list calls it Complete.
- **Output register.** It is a module of its own. It could equally be a
  process in the top level.
- **Encoding.** The state is a 2-bit enum (Idle = 0, Run = 1, Finish = 2).
  Outputs are decoded from the state register alone (Moore outputs).

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=<n> failures=<n>` and has a cycle-count watchdog.

- `fibonacci_fsm_tb` (N = 5): counts the `calc` clocks for n = 0, 1, 2, 12, 31
  and random n. It also covers held start pulses, a start during Finish, an
  asynchronous reset mid-run, and `complete == !calc` on every clock.
- `fibonacci_datapath_tb` (N = 5): checks the 10-bit width and the first
  terms 1, 1, 2, 3, 5, 8. It also checks long runs against a 64-bit
  reference reduced modulo 2^10, including wrap past fib(16) = 987, and
  re-seeding mid-sequence.
- `result_register_tb`: drives random data and enables, and checks the
  asynchronous clear.
- `fibonacci_fsmd_tb`: runs the top level at its default size (N = 6) with
  no parameter overrides. It checks every intermediate `result_latched`
  value and the exact number of clocks `complete` stays low. The runs
  include n = 12 (ends in 144), n = 6 (ends in 8), n = 33 (the largest exact
  result), n = 34 and 63 (wrapped results), and n = 0 (64 steps). It also
  runs a stretched start, starts during Finish, back-to-back runs, idle
  gaps, and a reset mid-run. It counts each of these cases and fails if any
  never happened.

To simulate with Verilator 5, for example the top level:

```
verilator --binary --timing --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/fib_pkg.sv tb/fibonacci_fsmd_tb.sv --top-module fibonacci_fsmd_tb
./obj_dir/Vfibonacci_fsmd_tb
```

Replace the testbench name to run another one. `fib_pkg.sv` must be read
first.
