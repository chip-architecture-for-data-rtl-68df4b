// rhfsm_cc: combinational circuit (CC) of the recursive hierarchical FSM.
//
// Given the active module and its state (the top of M_stack and FSM_stack)
// and the conditions x1..x5 from the execution unit, it produces the
// operation lines y1..y9 for this clock and tells the stacks what to do at
// the next edge:
//   OP_STEP  go to next_state inside the same module,
//   OP_CALL  invoke call_mod (the caller's state is left as it is),
//   OP_RET   End state: pop, and move the caller (par_mod/par_state, the
//            entry below the top) on to resume_state,
//   OP_HALT  End of z0, the whole algorithm is finished.
//
// The three flow charts it encodes:
//   z0: a0 Begin -> a1 (call z1) -> x5 ? a2 : a1;  a2 (call z2) -> a3 End.
//   z1: a0 Begin: x3 ? a1 : (x2 ? (x4 ? a3 : a2) : a6)
//       a1 y8 -> a7;  a6 y9 -> a7
//       a3 y1,y2 call z1 -> a5 y6 -> a7;  a2 y1,y4 call z1 -> a4 y7 -> a7
//       a7 End, y5.
//   z2: a0 Begin: x1 ? a1 : a4
//       a1 y1,y2 call z2 -> a2 y3 -> a3 y1,y4 call z2 -> a4 End, y5.
// The charts and their y/x labels follow the design; what each x and y
// means (see sort_pkg) and the choice that the caller's post-call
// transition is taken in the same cycle as the callee's End are this
// implementation's own. Every state lasts exactly one clock.
module rhfsm_cc
  import sort_pkg::*;
(
  input  module_e   cur_mod,
  input  state_t    cur_state,
  input  module_e   par_mod,
  input  state_t    par_state,
  input  x_t        x,
  output y_t        y,
  output stack_op_e op,
  output state_t    next_state,
  output module_e   call_mod,
  output state_t    resume_state
);

  // Transition that a call state takes once its callee has returned.
  function automatic state_t after_call(module_e m, state_t a, x_t xc);
    state_t r;
    r = a;
    unique case (m)
      Z0: r = (a == A1) ? (xc[X_ALL_IN] ? A2 : A1) : A3;
      Z1: r = (a == A3) ? A5 : A4;
      Z2: r = (a == A1) ? A2 : A4;
      default: r = a;
    endcase
    return r;
  endfunction

  always_comb begin
    y            = '0;
    op           = OP_STEP;
    next_state   = cur_state;
    call_mod     = Z0;
    resume_state = after_call(par_mod, par_state, x);
    unique case (cur_mod)
      Z0: begin
        unique case (cur_state)
          A0: next_state = A1;
          A1: begin op = OP_CALL; call_mod = Z1; end
          A2: begin op = OP_CALL; call_mod = Z2; end
          default: op = OP_HALT;  // a3: End
        endcase
      end
      Z1: begin
        unique case (cur_state)
          A0: begin
            if (x[X_EMPTY])          next_state = A1;
            else if (!x[X_NOT_EQUAL]) next_state = A6;
            else if (x[X_LESS])      next_state = A3;
            else                     next_state = A2;
          end
          A1: begin y[Y_PLACE] = 1'b1; next_state = A7; end
          A2: begin
            y[Y_PUSH] = 1'b1; y[Y_GO_RIGHT] = 1'b1;
            op = OP_CALL; call_mod = Z1;
          end
          A3: begin
            y[Y_PUSH] = 1'b1; y[Y_GO_LEFT] = 1'b1;
            op = OP_CALL; call_mod = Z1;
          end
          A4: begin y[Y_LINK_RIGHT] = 1'b1; next_state = A7; end
          A5: begin y[Y_LINK_LEFT] = 1'b1; next_state = A7; end
          A6: begin y[Y_DUP] = 1'b1; next_state = A7; end
          default: begin y[Y_POP] = 1'b1; op = OP_RET; end  // a7: End
        endcase
      end
      Z2: begin
        unique case (cur_state)
          A0: next_state = x[X_NOT_NULL] ? A1 : A4;
          A1: begin
            y[Y_PUSH] = 1'b1; y[Y_GO_LEFT] = 1'b1;
            op = OP_CALL; call_mod = Z2;
          end
          A2: begin y[Y_RECORD] = 1'b1; next_state = A3; end
          A3: begin
            y[Y_PUSH] = 1'b1; y[Y_GO_RIGHT] = 1'b1;
            op = OP_CALL; call_mod = Z2;
          end
          default: begin y[Y_POP] = 1'b1; op = OP_RET; end  // a4: End
        endcase
      end
      default: op = OP_HALT;
    endcase
  end

endmodule
