// cb_control: control state machine of the computational-block template.
//
// A block built from the template holds the arguments of a tail-recursive
// function in a data register and describes the function as an ordered list
// of NCOND clauses. The block computes cond[i] (clause i's condition) from its
// data register and executes clause i's action when fire[i] is 1. This module
// decides which clause fires, and when.
//
// Two ways of evaluating the conditions, chosen by PARALLEL:
//   PARALLEL=1  all conditions are looked at in the same cycle and a priority
//               encoder (lowest index wins) fires one clause per CALC cycle.
//   PARALLEL=0  a present_cond counter tests one condition per cycle. A true
//               condition fires its clause and restarts from clause 0; a false
//               one moves on to the next clause (wrapping to 0 after the last).
// Both follow the template's description; the sequential counter is sized
// from NCOND.
//
// Clauses in END_MASK end the calculation when they fire (their action may
// still update the data register); the result is then offered on the output
// handshake. Clauses in SUB_MASK call a sub-module: after firing, sub_start is
// held until the sub-module is not busy, then sub_busy_in is dropped until the
// sub-module raises sub_start_out; in that cycle sub_done tells the block to
// take the result, and evaluation restarts at clause 0.
//
// Handshake (both sides, and towards the sub-module): a word moves in a cycle
// where the sender's start is 1 and the receiver's busy is 0. busy is 1 in
// every state except CB_WAIT_DATA; load is 1 in the cycle din is taken.
// start_out is 1 in CB_RESULT. Reset is synchronous and active high.
//
// Timing: accept cycle, then one CALC cycle per clause firing (parallel) or
// per condition test (sequential), plus two cycles and the sub-module's own
// latency per sub-module call, then at least one RESULT cycle.
module cb_control
  import cb_pkg::*;
#(
  parameter int unsigned          NCOND    = 3,
  parameter bit                   PARALLEL = 1'b1,
  parameter logic [NCOND-1:0]     END_MASK = NCOND'(2),
  parameter logic [NCOND-1:0]     SUB_MASK = '0
) (
  input  logic             clk,
  input  logic             rst,
  // input handshake
  input  logic             start,
  output logic             busy,
  // output handshake
  output logic             start_out,
  input  logic             busy_in,
  // to and from the block's datapath
  input  logic [NCOND-1:0] cond,
  output logic             load,
  output logic [NCOND-1:0] fire,
  // sub-module handshake
  output logic             sub_start,
  input  logic             sub_busy,
  input  logic             sub_start_out,
  output logic             sub_busy_in,
  output logic             sub_done
);

  localparam int unsigned CW = (NCOND > 1) ? $clog2(NCOND) : 1;

  cb_state_e         state_q, state_d;
  logic [CW-1:0]     present_cond_q, present_cond_d;
  logic [NCOND-1:0]  sel;        // one-hot clause selected this cycle, or 0
  logic              sel_end, sel_sub;

  // Clause selection.
  always_comb begin
    sel = '0;
    if (PARALLEL) begin
      // priority encoder: the lowest-index true condition wins
      for (int i = NCOND - 1; i >= 0; i--) begin
        if (cond[i]) sel = NCOND'(1) << i;
      end
    end else begin
      if (cond[present_cond_q]) sel = NCOND'(1) << present_cond_q;
    end
  end

  assign sel_end = |(sel & END_MASK);
  assign sel_sub = |(sel & SUB_MASK);

  always_comb begin
    state_d        = state_q;
    present_cond_d = present_cond_q;
    load           = 1'b0;
    fire           = '0;
    sub_done       = 1'b0;
    unique case (state_q)
      CB_WAIT_DATA: begin
        if (start) begin
          load           = 1'b1;
          state_d        = CB_CALC;
          present_cond_d = '0;
        end
      end
      CB_CALC: begin
        fire = sel;
        if (|sel) begin
          present_cond_d = '0;
          if (sel_end)      state_d = CB_RESULT;
          else if (sel_sub) state_d = CB_SUB_REQ;
        end else if (!PARALLEL) begin
          present_cond_d = (32'(present_cond_q) == NCOND - 1) ? '0 : present_cond_q + 1'b1;
        end
      end
      CB_SUB_REQ: begin
        if (!sub_busy) state_d = CB_SUB_WAIT;
      end
      CB_SUB_WAIT: begin
        if (sub_start_out) begin
          sub_done = 1'b1;
          state_d  = CB_CALC;
        end
      end
      CB_RESULT: begin
        if (!busy_in) state_d = CB_WAIT_DATA;
      end
      default: state_d = CB_WAIT_DATA;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state_q        <= CB_WAIT_DATA;
      present_cond_q <= '0;
    end else begin
      state_q        <= state_d;
      present_cond_q <= present_cond_d;
    end
  end

  assign busy        = (state_q != CB_WAIT_DATA);
  assign start_out   = (state_q == CB_RESULT);
  assign sub_start   = (state_q == CB_SUB_REQ);
  assign sub_busy_in = (state_q != CB_SUB_WAIT);

  // A clause cannot both end the calculation and call a sub-module.
  initial assert ((END_MASK & SUB_MASK) == '0)
    else $error("cb_control: a clause is in both END_MASK and SUB_MASK");

  // fire is one-hot or zero, and only in CALC.
  assert property (@(posedge clk) disable iff (rst) $onehot0(fire));
  assert property (@(posedge clk) disable iff (rst) (fire != '0) |-> (state_q == CB_CALC));
  // The result stays offered until it is taken.
  assert property (@(posedge clk) disable iff (rst) (start_out && busy_in) |=> start_out);

endmodule
