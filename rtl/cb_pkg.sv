// cb_pkg: types shared by the computational-block template.
//
// Every computational block is a tail-recursive function turned into hardware:
// a data register holds the function's arguments, a list of clauses (a
// condition plus an action) is evaluated, and the first true clause either
// rewrites the arguments (a new "call") or ends the calculation. The control
// state machine that sequences this is the same for every function and lives
// in cb_control; this package holds its state encoding.
//
// States:
//   CB_WAIT_DATA - idle, busy=0; a start loads the arguments from din
//   CB_CALC      - one clause action (parallel) or one condition test
//                  (sequential) per cycle
//   CB_SUB_REQ   - offering operands to a sub-module (its start=1)
//   CB_SUB_WAIT  - waiting for the sub-module's result (its busy_in=0)
//   CB_RESULT    - holding the result, start_out=1, until busy_in=0
// The WAIT_DATA/CALC pair follows the template; the sub-module and result
// states are this design's way of carrying out the handshakes.
package cb_pkg;

  typedef enum logic [2:0] {
    CB_WAIT_DATA = 3'd0,
    CB_CALC      = 3'd1,
    CB_SUB_REQ   = 3'd2,
    CB_SUB_WAIT  = 3'd3,
    CB_RESULT    = 3'd4
  } cb_state_e;

endpackage
