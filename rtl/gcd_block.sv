// gcd_block: greatest common divisor as a template computational block.
//
// The function is the three-clause tail recursion
//   gcd(A, B) when A < B -> gcd(B, A);
//   gcd(A, 0)            -> A;
//   gcd(A, B)            -> gcd(A - B, B).
// The data register holds OPR_A and OPR_B (W bits each). A start loads
// OPR_A from din[2W-1:W] and OPR_B from din[W-1:0]; the result is OPR_A.
// Clause 0 swaps the operands, clause 1 ends the calculation, clause 2
// subtracts. cb_control picks the clause, in parallel (priority encoder) or
// one condition per cycle (PARALLEL=0). The clauses, the operand split and
// the 32-bit widths follow the template's GCD example; the handshake timing
// is this design's (see cb_control).
//
// Interface: start/busy/din in, start_out/busy_in/dout out; synchronous
// active-high reset.
// Timing: gcd(15,25) takes 9 CALC cycles with PARALLEL=1 and 18 with
// PARALLEL=0; start_out rises one cycle after the last CALC cycle.
module gcd_block #(
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

  logic [W-1:0]     opr_a, opr_b;
  logic [NCOND-1:0] cond, fire;
  logic             load;

  assign cond[0] = (opr_a < opr_b);
  assign cond[1] = (opr_b == '0);
  assign cond[2] = 1'b1;

  cb_control #(
    .NCOND   (NCOND),
    .PARALLEL(PARALLEL),
    .END_MASK(3'b010),
    .SUB_MASK(3'b000)
  ) u_ctl (
    .clk, .rst, .start, .busy, .start_out, .busy_in,
    .cond, .load, .fire,
    .sub_start(), .sub_busy(1'b0), .sub_start_out(1'b0), .sub_busy_in(), .sub_done()
  );

  always_ff @(posedge clk) begin
    if (load) begin
      opr_a <= din[2*W-1:W];
      opr_b <= din[W-1:0];
    end else if (fire[0]) begin
      opr_a <= opr_b;
      opr_b <= opr_a;
    end else if (fire[2]) begin
      opr_a <= opr_a - opr_b;
    end
  end

  assign dout = opr_a;

endmodule
