// collatz_block: Collatz step count as a template computational block.
//
// The function is the three-clause tail recursion
//   collatz(N, S) when N =< 1        -> S;
//   collatz(N, S) when N rem 2 == 0  -> collatz(N div 2, S + 1);
//   collatz(N, S)                    -> collatz(3*N + 1, S + 1).
// called as collatz(N, 0). The result S is the number of steps that take N
// to 1. N is kept NW bits wide (default 64) because 3N+1 grows past the W-bit
// input; S and the result are W bits. cb_control picks the clause, in
// parallel or one condition per cycle (PARALLEL=0). The clause list and widths
// are this design's choice: the template only names Collatz as one of its
// test functions. N=0 is treated like N=1 so that the recursion ends.
//
// Interface: start/busy/din in, start_out/busy_in/dout out; synchronous
// active-high reset.
// Timing: S+1 CALC cycles with PARALLEL=1; with PARALLEL=0 each even step
// takes 2 cycles, each odd step 3, and the end 1.
module collatz_block #(
  parameter bit          PARALLEL = 1'b1,
  parameter int unsigned W        = 32,
  parameter int unsigned NW       = 64
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

  localparam int unsigned NCOND = 3;

  logic [NW-1:0]    n;
  logic [W-1:0]     s;
  logic [NCOND-1:0] cond, fire;
  logic             load;

  assign cond[0] = (n <= NW'(1));
  assign cond[1] = ~n[0];
  assign cond[2] = 1'b1;

  cb_control #(
    .NCOND   (NCOND),
    .PARALLEL(PARALLEL),
    .END_MASK(3'b001),
    .SUB_MASK(3'b000)
  ) u_ctl (
    .clk, .rst, .start, .busy, .start_out, .busy_in,
    .cond, .load, .fire,
    .sub_start(), .sub_busy(1'b0), .sub_start_out(1'b0), .sub_busy_in(), .sub_done()
  );

  always_ff @(posedge clk) begin
    if (load) begin
      n <= NW'(din);
      s <= '0;
    end else if (fire[1]) begin
      n <= n >> 1;
      s <= s + 1'b1;
    end else if (fire[2]) begin
      n <= (n << 1) + n + NW'(1);
      s <= s + 1'b1;
    end
  end

  assign dout = s;

endmodule
