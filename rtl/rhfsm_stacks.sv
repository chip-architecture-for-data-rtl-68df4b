// rhfsm_stacks: FSM_stack and M_stack of the recursive hierarchical FSM.
//
// Two stacks share one stack pointer sp. Entry sp of M_stack holds the
// module that is active now, entry sp of FSM_stack its current state; the
// entries below belong to the callers, each still in the state from which
// it made its call. At each clock edge, as ordered by op:
//   OP_STEP  FSM_stack[sp] <= next_state (state change overwrites the top)
//   OP_CALL  sp <= sp+1, M_stack[sp+1] <= call_mod, FSM_stack[sp+1] <= a0
//   OP_RET   sp <= sp-1, FSM_stack[sp-1] <= resume_state
//   OP_HALT  nothing
// The call behaviour and the shared pointer follow the design's description;
// the return rule (caller advanced in the same edge) is this
// implementation's choice. A call with the stacks full sets the sticky
// overflow flag and freezes the stacks, since the recursion can no longer
// be followed. Reset is synchronous, active high, and leaves z0 in a0 at
// entry 0.
module rhfsm_stacks
  import sort_pkg::*;
#(
  parameter int unsigned DEPTH = 15
) (
  input  logic      clk,
  input  logic      rst,
  input  stack_op_e op,
  input  state_t    next_state,
  input  module_e   call_mod,
  input  state_t    resume_state,
  output module_e   top_mod,
  output state_t    top_state,
  output module_e   par_mod,
  output state_t    par_state,
  output logic [$clog2(DEPTH)-1:0] sp,
  output logic      overflow
);

  localparam int unsigned SP_W = $clog2(DEPTH);
  localparam logic [SP_W-1:0] SP_MAX = SP_W'(DEPTH - 1);

  module_e m_stack   [DEPTH];
  state_t  fsm_stack [DEPTH];

  logic [SP_W-1:0] sp_below;
  assign sp_below  = (sp == '0) ? '0 : sp - 1'b1;

  assign top_mod   = m_stack[sp];
  assign top_state = fsm_stack[sp];
  assign par_mod   = m_stack[sp_below];
  assign par_state = fsm_stack[sp_below];

  always_ff @(posedge clk) begin
    if (rst) begin
      sp           <= '0;
      overflow     <= 1'b0;
      m_stack[0]   <= Z0;
      fsm_stack[0] <= A0;
    end else if (!overflow) begin
      unique case (op)
        OP_STEP: fsm_stack[sp] <= next_state;
        OP_CALL: begin
          if (sp == SP_MAX) begin
            overflow <= 1'b1;
          end else begin
            sp                 <= sp + 1'b1;
            m_stack[sp + 1'b1]   <= call_mod;
            fsm_stack[sp + 1'b1] <= A0;
          end
        end
        OP_RET: begin
          if (sp != '0) begin
            sp                  <= sp_below;
            fsm_stack[sp_below] <= resume_state;
          end
        end
        default: ;  // OP_HALT
      endcase
    end
  end

  // z0 never returns: a return always has a caller below it.
  a_ret_has_caller: assert property (@(posedge clk) disable iff (rst || overflow)
    op == OP_RET |-> sp != '0);

endmodule
