// fib_block: N-th Fibonacci number as a template computational block.
//
// The function is the two-clause tail recursion
//   fib(0, A, B) -> A;
//   fib(N, A, B) -> fib(N - 1, B, A + B).
// called as fib(N, 0, 1). A start loads N from din and sets A=0, B=1; the
// result is A, modulo 2^W. cb_control picks the clause, in parallel or one
// condition per cycle (PARALLEL=0). The clause list and widths are this
// design's choice: the template only names Fibonacci as one of its test
// functions.
//
// Interface: start/busy/din in, start_out/busy_in/dout out; synchronous
// active-high reset.
// Timing: N+1 CALC cycles with PARALLEL=1, 2N+1 with PARALLEL=0.
module fib_block #(
  parameter bit          PARALLEL = 1'b1,
  parameter int unsigned W        = 32
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         start,
  output logic         busy,
  input  logic [W-1:0] din,
  output logic         start_out,
  input  logic         busy_in,
  output logic [W-1:0] dout
);

  localparam int unsigned NCOND = 2;

  logic [W-1:0]     n, a, b;
  logic [NCOND-1:0] cond, fire;
  logic             load;

  assign cond[0] = (n == '0);
  assign cond[1] = 1'b1;

  cb_control #(
    .NCOND   (NCOND),
    .PARALLEL(PARALLEL),
    .END_MASK(2'b01),
    .SUB_MASK(2'b00)
  ) u_ctl (
    .clk, .rst, .start, .busy, .start_out, .busy_in,
    .cond, .load, .fire,
    .sub_start(), .sub_busy(1'b0), .sub_start_out(1'b0), .sub_busy_in(), .sub_done()
  );

  always_ff @(posedge clk) begin
    if (load) begin
      n <= din;
      a <= '0;
      b <= W'(1);
    end else if (fire[1]) begin
      n <= n - 1'b1;
      a <= b;
      b <= a + b;
    end
  end

  assign dout = a;

endmodule
