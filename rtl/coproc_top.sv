// coproc_top: the template's four test functions as coprocessor blocks.
//
// Four computational blocks built from the same template stand side by side:
// gcd_block (greatest common divisor), binom_block (binomial coefficient,
// which calls a div_block sub-module), fib_block (Fibonacci) and
// collatz_block (Collatz step count). Each keeps its own handshake ports,
// prefixed with its name, so that a processor bus adapter or another block
// can drive it; blocks can also be cascaded by wiring one block's
// start_out/dout to the next one's start/din and the next one's busy back to
// busy_in. One PARALLEL parameter selects, for all blocks, parallel
// (priority-encoder) or sequential (one condition per cycle) evaluation of
// the clauses. All ports are synchronous to clk; rst is synchronous, active
// high. Timing per block is given in each block's header.
module coproc_top #(
  parameter bit          PARALLEL = 1'b1,
  parameter int unsigned W        = 32
) (
  input  logic           clk,
  input  logic           rst,
  // greatest common divisor: din = {A, B}
  input  logic           gcd_start,
  output logic           gcd_busy,
  input  logic [2*W-1:0] gcd_din,
  output logic           gcd_start_out,
  input  logic           gcd_busy_in,
  output logic [W-1:0]   gcd_dout,
  // binomial coefficient: din = {N, K}
  input  logic           binom_start,
  output logic           binom_busy,
  input  logic [2*W-1:0] binom_din,
  output logic           binom_start_out,
  input  logic           binom_busy_in,
  output logic [W-1:0]   binom_dout,
  // Fibonacci: din = N
  input  logic           fib_start,
  output logic           fib_busy,
  input  logic [W-1:0]   fib_din,
  output logic           fib_start_out,
  input  logic           fib_busy_in,
  output logic [W-1:0]   fib_dout,
  // Collatz step count: din = N
  input  logic           collatz_start,
  output logic           collatz_busy,
  input  logic [W-1:0]   collatz_din,
  output logic           collatz_start_out,
  input  logic           collatz_busy_in,
  output logic [W-1:0]   collatz_dout
);

  gcd_block #(.PARALLEL(PARALLEL), .W(W)) u_gcd (
    .clk, .rst,
    .start(gcd_start), .busy(gcd_busy), .din(gcd_din),
    .start_out(gcd_start_out), .busy_in(gcd_busy_in), .dout(gcd_dout)
  );

  binom_block #(.PARALLEL(PARALLEL), .W(W)) u_binom (
    .clk, .rst,
    .start(binom_start), .busy(binom_busy), .din(binom_din),
    .start_out(binom_start_out), .busy_in(binom_busy_in), .dout(binom_dout)
  );

  fib_block #(.PARALLEL(PARALLEL), .W(W)) u_fib (
    .clk, .rst,
    .start(fib_start), .busy(fib_busy), .din(fib_din),
    .start_out(fib_start_out), .busy_in(fib_busy_in), .dout(fib_dout)
  );

  collatz_block #(.PARALLEL(PARALLEL), .W(W)) u_collatz (
    .clk, .rst,
    .start(collatz_start), .busy(collatz_busy), .din(collatz_din),
    .start_out(collatz_start_out), .busy_in(collatz_busy_in), .dout(collatz_dout)
  );

endmodule
