// binom_block: binomial coefficient C(N, K) as a template computational block
// that calls a sub-module from one of its actions.
//
// The function is the three-clause tail recursion
//   binom(N, K, I, R) when K > N -> 0;
//   binom(N, K, I, R) when I > K -> R;
//   binom(N, K, I, R)            -> binom(N, K, I + 1, (R * (N - K + I)) div I).
// called as binom(N, K, 1, 1). After step I, R = C(N-K+I, I), so every
// division is exact. The product R*(N-K+I) is formed combinationally at 2W
// bits; the division, too slow for one cycle, is the action of clause 2 and
// is carried out by a div_block instance through the sub-module handshake of
// cb_control. When the divider answers, R takes the quotient and I steps on.
// Using a sub-module for a complex action follows the template; the clause
// list, the divider and the widths are this design's choice, since the
// template only names the binomial as a test function.
//
// Interface: din = {N[W], K[W]}; dout = C(N, K) modulo 2^W (exact when it
// fits, which holds for every intermediate value too when C(N,K) fits and
// K =< N); start/busy in, start_out/busy_in out; synchronous active-high
// reset. Both this block and its divider use PARALLEL.
// Timing (PARALLEL=1): per step I, 1 CALC cycle, 1 request cycle, the
// divider's 2W+1 CALC cycles and 1 cycle to take its result, then 1 CALC
// cycle to end: start_out rises K*(2W+4)+2 cycles after the accepting edge
// (138 cycles for K=2, W=32). K > N ends after the first CALC cycle.
module binom_block #(
  parameter bit          PARALLEL = 1'b1,
  parameter int unsigned W        = 32
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           start,
  output logic           busy,
  input  logic [2*W-1:0] din,
  output logic           start_out,
  input  logic           busy_in,
  output logic [W-1:0]   dout
);

  localparam int unsigned NCOND = 3;

  logic [W-1:0]     n, k, r;
  logic [W:0]       i;          // one bit wider so that I > K is reachable for any K
  logic [NCOND-1:0] cond, fire;
  logic             load;

  logic             sub_start, sub_busy, sub_start_out, sub_busy_in, sub_done;
  logic [W-1:0]     factor;     // N - K + I
  logic [2*W-1:0]   product;
  logic [3*W-1:0]   sub_dout;

  assign cond[0] = (k > n);
  assign cond[1] = (i > {1'b0, k});
  assign cond[2] = 1'b1;

  cb_control #(
    .NCOND   (NCOND),
    .PARALLEL(PARALLEL),
    .END_MASK(3'b011),
    .SUB_MASK(3'b100)
  ) u_ctl (
    .clk, .rst, .start, .busy, .start_out, .busy_in,
    .cond, .load, .fire,
    .sub_start, .sub_busy, .sub_start_out, .sub_busy_in, .sub_done
  );

  // Operands of the sub-module call: stable while the call is pending,
  // because the data register only changes on load, fire or sub_done.
  assign factor  = n - k + i[W-1:0];
  assign product = (2*W)'(r) * (2*W)'(factor);

  div_block #(
    .PARALLEL(PARALLEL),
    .NUM_W   (2*W),
    .DEN_W   (W)
  ) u_div (
    .clk,
    .rst,
    .start    (sub_start),
    .busy     (sub_busy),
    .din      ({product, i[W-1:0]}),
    .start_out(sub_start_out),
    .busy_in  (sub_busy_in),
    .dout     (sub_dout)
  );

  always_ff @(posedge clk) begin
    if (load) begin
      n <= din[2*W-1:W];
      k <= din[W-1:0];
      i <= (W+1)'(1);
      r <= W'(1);
    end else if (fire[0]) begin
      r <= '0;
    end else if (sub_done) begin
      r <= sub_dout[W +: W];      // low W bits of the 2W-bit quotient
      i <= i + 1'b1;
    end
  end

  assign dout = r;

endmodule
