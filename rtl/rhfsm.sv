// rhfsm: control unit of the sorter, a recursive hierarchical FSM.
//
// It is the combinational circuit rhfsm_cc wrapped around the two stacks of
// rhfsm_stacks. The top of M_stack names the active module (z0, z1 or z2),
// the top of FSM_stack its state; CC turns those and x1..x5 into the
// operation lines y1..y9 and the stack action for the next edge. Calling a
// module pushes it with its Begin state a0 on a fresh level of both stacks;
// its End state pops that level, so a recursive call costs no extra
// bookkeeping states. y is a Moore output of the current state and is valid
// in the same cycle; x is sampled at the same edge that acts on y.
// done rises when z0 reaches End (a3); error is the stack overflow flag,
// after which the FSM stands still and y is held at zero.
// The structure (two stacks on one pointer around a combinational circuit,
// Begin state pushed on a call) follows the design; the one-clock return,
// done, and freezing on overflow are this implementation's choices.
module rhfsm
  import sort_pkg::*;
#(
  parameter int unsigned DEPTH = 15
) (
  input  logic    clk,
  input  logic    rst,
  input  x_t      x,
  output y_t      y,
  output logic    done,
  output logic    error,
  output module_e active_mod,
  output state_t  active_state,
  output logic [$clog2(DEPTH)-1:0] sp
);

  module_e   par_mod;
  state_t    par_state;
  y_t        cc_y;
  stack_op_e op;
  state_t    next_state;
  state_t    resume_state;
  module_e   call_mod;

  rhfsm_stacks #(.DEPTH(DEPTH)) u_stacks (
    .clk, .rst, .op, .next_state, .call_mod, .resume_state,
    .top_mod(active_mod), .top_state(active_state),
    .par_mod, .par_state, .sp, .overflow(error)
  );

  rhfsm_cc u_cc (
    .cur_mod(active_mod), .cur_state(active_state),
    .par_mod, .par_state, .x,
    .y(cc_y), .op, .next_state, .call_mod, .resume_state
  );

  assign y    = error ? '0 : cc_y;
  assign done = (op == OP_HALT) && !error;

endmodule
