// div_block: unsigned restoring divider as a template computational block.
//
// It serves as the sub-module of binom_block: an action too complex for one
// cycle (a wide division) handed to another block built from the same
// template. The function is the three-clause tail recursion, one quotient
// bit per step, MSB first:
//   div(0, Q, R, D) -> {Q, R};
//   div(I, Q, R, D) when {R, msb(Q)} >= D -> div(I-1, Q<<1 | 1, {R, msb(Q)} - D, D);
//   div(I, Q, R, D) -> div(I-1, Q<<1, {R, msb(Q)}, D).
// Q starts as the numerator and ends as the quotient; R starts at 0 and ends
// as the remainder; I counts the NUM_W steps. Division by zero gives an
// all-ones quotient. The choice of a divider and its algorithm are this
// design's; the template only states that a block can be called from an
// action.
//
// Interface: din = {numerator[NUM_W], denominator[DEN_W]},
// dout = {quotient[NUM_W], remainder[DEN_W]}; start/busy in, start_out/busy_in
// out; synchronous active-high reset.
// Timing: NUM_W+1 CALC cycles with PARALLEL=1; with PARALLEL=0, 2 per
// quotient bit 1, 3 per quotient bit 0, plus 1.
module div_block #(
  parameter bit          PARALLEL = 1'b1,
  parameter int unsigned NUM_W    = 64,
  parameter int unsigned DEN_W    = 32
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   start,
  output logic                   busy,
  input  logic [NUM_W+DEN_W-1:0] din,
  output logic                   start_out,
  input  logic                   busy_in,
  output logic [NUM_W+DEN_W-1:0] dout
);

  localparam int unsigned NCOND = 3;
  localparam int unsigned IW    = $clog2(NUM_W + 1);

  logic [NUM_W-1:0] q;
  logic [DEN_W-1:0] r, d;
  logic [IW-1:0]    i;
  logic [DEN_W:0]   trial;      // remainder shifted left with the next numerator bit
  logic [DEN_W:0]   diff;
  logic [NCOND-1:0] cond, fire;
  logic             load;

  assign trial = {r, q[NUM_W-1]};
  assign diff  = trial - {1'b0, d};

  assign cond[0] = (i == '0);
  assign cond[1] = (trial >= {1'b0, d});
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
      q <= din[NUM_W+DEN_W-1:DEN_W];
      d <= din[DEN_W-1:0];
      r <= '0;
      i <= IW'(NUM_W);
    end else if (fire[1]) begin
      q <= {q[NUM_W-2:0], 1'b1};
      r <= diff[DEN_W-1:0];
      i <= i - 1'b1;
    end else if (fire[2]) begin
      q <= {q[NUM_W-2:0], 1'b0};
      r <= trial[DEN_W-1:0];
      i <= i - 1'b1;
    end
  end

  assign dout = {q, r};

endmodule
