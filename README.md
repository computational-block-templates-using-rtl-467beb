# Clause-driven computational blocks

A function written in a functional language as a list of guarded clauses
(tail-recursive, as in Erlang) can be turned into hardware almost mechanically.
The arguments of the function live in a data register. Each clause is a
*condition* on those arguments and an *action* that either rewrites them (the
tail call) or ends the calculation (the return). Because the arguments never
change within one call, every condition can be evaluated from the register at
the same time. One generic state machine then picks the first true clause,
carries out its action, and repeats until a returning clause fires.

This repository holds that template in SystemVerilog, together with the four
functions used to exercise it: greatest common divisor, binomial coefficient,
Fibonacci and Collatz step count. The approach is the one described in
*Computational Block Templates Using Functional Programming Models*, where such
blocks are coprocessors that take over Erlang processes. In that setting a
block is interchangeable with the software process it replaces, as long as it
accepts and returns the same messages. The published flow generated Verilog
from a TCL description. Here a generic controller module plus one small
datapath module per function takes the place of that generator.

## Example: GCD

```erlang
gcd(A, B) when A < B -> gcd(B, A);   % clause 0: swap
gcd(A, 0)            -> A;           % clause 1: return A
gcd(A, B)            -> gcd(A-B, B). % clause 2: subtract
```

`gcd_block` keeps `OPR_A` and `OPR_B` (32 bits each) in registers. Its three
conditions are `OPR_A < OPR_B`, `OPR_B == 0` and `1`, its actions a swap, "end"
and `OPR_A <= OPR_A - OPR_B`. A call is loaded from `din = {A, B}` and the
result is `OPR_A`. For `gcd(15,25)` the clause trace is:

| call       | clause that fires | next call  |
|------------|-------------------|------------|
| gcd(15,25) | 0 (swap)          | gcd(25,15) |
| gcd(25,15) | 2 (subtract)      | gcd(10,15) |
| gcd(10,15) | 0                 | gcd(15,10) |
| gcd(15,10) | 2                 | gcd(5,10)  |
| gcd(5,10)  | 0                 | gcd(10,5)  |
| gcd(10,5)  | 2                 | gcd(5,5)   |
| gcd(5,5)   | 2                 | gcd(0,5)   |
| gcd(0,5)   | 0                 | gcd(5,0)   |
| gcd(5,0)   | 1 (return 5)      | —          |

That is 9 clause firings. When conditions are tested one at a time, the same
trace takes 18 condition tests, because each firing of clause *k* follows *k*
failed tests.

## The controller: `cb_control`

Every block instantiates `cb_control`. The block computes the condition vector
`cond[NCOND-1:0]` from its register (index 0 has the highest priority) and
updates the register when `fire[i]` is 1. The controller owns everything else.

| State          | What happens                                                                 |
|----------------|------------------------------------------------------------------------------|
| `CB_WAIT_DATA` | `busy=0`. When `start=1`, `load=1`: the block copies `din` into its register. |
| `CB_CALC`      | One clause decision per cycle (see below). An end clause goes to `CB_RESULT`; a sub-module clause goes to `CB_SUB_REQ`. |
| `CB_SUB_REQ`   | `sub_start=1` until the sub-module's `busy` is 0.                              |
| `CB_SUB_WAIT`  | `sub_busy_in=0`. When `sub_start_out=1`, `sub_done=1`: the block takes the result, then evaluation restarts at clause 0. |
| `CB_RESULT`    | `start_out=1` and `dout` held until `busy_in=0`.                               |

`PARALLEL` selects how `CB_CALC` evaluates the clauses.

* **`PARALLEL=1`**: a priority encoder over `cond` fires the lowest-index
  true clause every cycle. One cycle per tail call.
* **`PARALLEL=0`**: a `present_cond` counter (`$clog2(NCOND)` bits) tests one
  condition per cycle. If it is true, that clause fires and the counter
  returns to 0. If it is false, the counter moves on, wrapping after the last
  clause. A call that fires clause *k* therefore costs *k*+1 cycles.

Both methods fire exactly the same sequence of clauses, so results are
identical and only the cycle count differs. In the published FPGA results,
parallel evaluation was both faster and smaller, because the sequential
version needs the extra counter and multiplexing. Each clause's action is its
own piece of logic; the template also allows one shared ALU-like action unit,
which is not built here.

Two parameters, bit masks over the clause indices, describe the clauses to the
controller. `END_MASK` marks returning clauses. Their action may still write
the register in the same cycle, as `binom_block` does to return 0. `SUB_MASK`
marks clauses whose action is a call to a sub-module. A clause may not be in
both (an elaboration-time assertion).

### Handshake

The input side has `start`/`busy` and the output side `start_out`/`busy_in`.
The same pair links a block to its sub-module. The rule is the same on every
link:

* a word moves at a rising clock edge where the sender's `start` is 1 and the
  receiver's `busy` is 0;
* the sender holds `start` and its data until then.

`busy` is 1 whenever the block is not in `CB_WAIT_DATA`, so a block takes one
call at a time. A finished result stays on `dout` with `start_out=1` for as
long as the receiver keeps `busy_in=1`. Because input and output follow the
same rule, blocks can be cascaded: wire `start_out`/`dout` of one block to
`start`/`din` of the next, and the next block's `busy` back to `busy_in`.
Reset (`rst`) is synchronous and active high; it clears the controller, and
the data registers are written on every load. Assertions in `cb_control`
check the following rules:

* `fire` is one-hot or zero;
* `fire` is active only in `CB_CALC`;
* a result that is not yet taken stays offered.

The pin names and the WAIT_DATA/CALC structure follow the published template.
The exact handshake timing, the result-holding state and the sub-module states
are choices made here, because the original describes them only in words.

### Latency

The latency is counted from the clock edge that accepts `start` to the first
cycle with `start_out=1`:

```
latency = (CALC cycles) + 1
CALC cycles = clause firings                        (PARALLEL=1)
            = condition tests                       (PARALLEL=0)
            + per sub-module call: 1 request cycle + sub-module CALC cycles + 1
```

After the result is taken, the block is ready again one cycle later.

## Calling a sub-module from an action

Some actions are too big for one cycle. The template lets such an action be
handed to another computational block, connected to the first block through
the same handshake. `binom_block` shows this:

```erlang
binom(N, K, I, R) when K > N -> 0;
binom(N, K, I, R) when I > K -> R;
binom(N, K, I, R)            -> binom(N, K, I+1, (R * (N-K+I)) div I).
% called as binom(N, K, 1, 1)
```

Clause 2 is in `SUB_MASK`. The 64-bit product `R*(N-K+I)` is formed
combinationally and offered, with `I`, to a `div_block` instance. When the
divider returns, `R` takes the low 32 bits of the quotient and `I` increments.
After step *I*, `R = C(N-K+I, I)`, so every division is exact. The divider can
wait safely because the operands come straight from the data register, which
does not change while the call is outstanding.

`div_block` is itself a template block: a restoring divider with one quotient
bit per firing.

```erlang
div(0, Q, R, D) -> {Q, R};
div(I, Q, R, D) when {R,msb(Q)} >= D -> div(I-1, Q<<1|1, {R,msb(Q)}-D, D);
div(I, Q, R, D)                      -> div(I-1, Q<<1,   {R,msb(Q)},   D).
```

It divides a 64-bit numerator by a 32-bit denominator in 65 CALC cycles
(parallel). One binomial step therefore costs 1 + 1 + 65 + 1 = 68 cycles, and
`binom(N,K)` takes `68·K + 2` cycles. Division by zero yields an all-ones
quotient. The choice of a divider and the binomial clause list are this
design's: the original names the binomial only as a test function.

## The four functions

| Module          | `din`            | `dout`        | Clauses (priority order)                                  | Latency, parallel | Latency, sequential |
|-----------------|------------------|---------------|-----------------------------------------------------------|-------------------|---------------------|
| `gcd_block`     | `{A[31:0], B[31:0]}` | `A`       | A<B → swap; B==0 → end; else A-=B                           | firings + 1       | tests + 1           |
| `binom_block`   | `{N[31:0], K[31:0]}` | C(N,K) mod 2³² | K>N → 0; I>K → end; else divider call              | 68K + 2           | depends on quotient bits |
| `fib_block`     | `N[31:0]`        | fib(N) mod 2³² | N==0 → end; else (N,A,B) ← (N-1,B,A+B)                   | N + 2             | 2N + 2              |
| `collatz_block` | `N[31:0]`        | step count    | N≤1 → end; even → N/2; odd → 3N+1 (each step S+1)          | S + 2             | 2·even + 3·odd + 2  |

Widths are parameters: `W` (default 32) everywhere, plus `NW` (default 64)
for the working value of `collatz_block` and `NUM_W`/`DEN_W` (64/32) for
`div_block`. The GCD clauses, operand split and 32-bit widths come from the
original example. The other three clause lists, their widths and their edge
cases are choices made here:

* `fib(0)=0`;
* Collatz treats 0 like 1 and keeps `N` 64 bits wide, since 3N+1 outgrows 32 bits;
* `binom` is exact when C(N,K) < 2³².

`coproc_top` places the four blocks side by side, each with its own handshake
ports (`gcd_*`, `binom_*`, `fib_*`, `collatz_*`), and one `PARALLEL`
parameter for all of them. The original system reached the blocks from a
soft processor running Erlang. That processor and its bus adapter are not
part of this RTL; the top-level ports are where such an adapter would attach.

## Timing against the published coprocessor figures

`tb_table2` times one call per function and evaluation style. The table
converts the cycles to time at 50 MHz, the clock used for the published
hardware timings. The arguments of the published runs are not known; those
used here were picked as plausible ones.

| Call         | Parallel                 | Sequential               | Published (µs), parallel / serial |
|--------------|--------------------------|--------------------------|-----------------------------------|
| gcd(15,25)   | 10 cycles, 0.20 µs       | 19 cycles, 0.38 µs       | 0.22 / 0.44                       |
| binom(12,6)  | 410 cycles, 8.20 µs      | 1166 cycles, 23.32 µs    | 8.56 / 22.08                      |
| fib(41)      | 43 cycles, 0.86 µs       | 84 cycles, 1.68 µs       | 0.86 / 1.68                       |
| collatz(27)  | 113 cycles, 2.26 µs      | 265 cycles, 5.30 µs      | 2.24 and 5.7 (see below)          |

For Collatz the published table pairs 2.24 µs with the serial version and
5.7 µs with the parallel one. That ordering contradicts every other row and
the stated finding that parallel evaluation is faster. Here the two figures
are read as parallel = 2.24 and serial = 5.7.

## Adding a function

1. Write the function as ordered clauses over a fixed set of registers.
   Make the last clause unconditional, or accept that the parallel version
   waits when no condition holds.
2. Create a module with the standard ports (`clk rst start busy din start_out busy_in dout`).
   Assign `cond[i]` from the registers.
3. Instantiate `cb_control` with `NCOND`, `PARALLEL`, `END_MASK` and `SUB_MASK`.
4. In one `always_ff`:
   * on `load`, copy `din` into the registers;
   * on `fire[i]`, apply clause *i*'s action;
   * on `sub_done`, take the sub-module's result.
5. Drive `dout` from the result register. It is valid while `start_out` is 1.

## Simulating

Each testbench is self-checking and ends with
`TB_RESULT checks=<n> failures=<n>`. With Verilator 5:

```sh
verilator --binary --timing --assert -Irtl rtl/cb_pkg.sv rtl/cb_control.sv \
  rtl/div_block.sv rtl/binom_block.sv rtl/gcd_block.sv rtl/fib_block.sv \
  rtl/collatz_block.sv rtl/coproc_top.sv tb/tb_coproc_top.sv \
  --top-module tb_coproc_top -o sim && ./obj_dir/sim
```

Swap the last file and `--top-module` to run another testbench:

| Testbench           | What it checks |
|---------------------|----------------|
| `tb_cb_control`     | Both controller variants on random conditions and handshakes, against a cycle model, with coverage of every transition. |
| `tb_gcd_block`, `tb_binom_block`, `tb_fib_block`, `tb_collatz_block`, `tb_div_block` | Parallel and sequential instances against software references: results, exact latencies, results held during receiver stalls. |
| `tb_coproc_top`     | All blocks at the default parameters, running concurrently, with input back-pressure and output stalls. Counts that every clause, every stall kind and the sub-module call occurred. |
| `tb_coproc_top_seq` | The same with `PARALLEL=0`. |
| `tb_table2`         | The timing table above. |
| `tb_cascade`        | `fib_block` feeding `collatz_block` directly through the handshake, computing collatz(fib(N)), with the link between them blocked and released. |

Every testbench runs in well under a second.

## Departures and limits

* **No generator.** The original produced one Verilog module per function
  from a TCL description. Here the reusable part is `cb_control`, and a
  function's datapath is written by hand, following the steps above.
* **Integer width is fixed** per parameter. Erlang integers grow without
  bound. Results wrap modulo 2^W; for `binom`, intermediate quotients are
  also truncated.
* **One sub-module per block.** A block has a single sub-module port, and
  `sub_done` does not say which clause made the call. That is enough for
  `binom_block`. A block with several calling clauses would need the
  controller to remember the clause that called.
* **Not built:**
  * a single ALU-like unit shared by all actions;
  * two functions merged into one module. The original tried this and found
    no gain.
