// tb_rhfsm_cc: exhaustive check of the control unit's combinational
// circuit. For every module, state and value of x1..x5 (and every caller
// state for the return path) it compares y, the stack action, the next
// state, the called module and the caller's resume state with a table
// written out here from the z0, z1 and z2 flow charts.
module tb_rhfsm_cc;
  import sort_pkg::*;

  module_e   cur_mod, par_mod;
  state_t    cur_state, par_state;
  x_t        x;
  y_t        y;
  stack_op_e op;
  state_t    next_state, resume_state;
  module_e   call_mod;

  int checks = 0;
  int failures = 0;

  rhfsm_cc dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected behaviour, one row per chart box
  task automatic expect_row(output y_t ey, output stack_op_e eop, output state_t ens,
                            output module_e ecall);
    ey = '0; eop = OP_STEP; ens = cur_state; ecall = Z0;
    if (cur_mod == Z0) begin
      case (cur_state)
        3'd0: ens = 3'd1;
        3'd1: begin eop = OP_CALL; ecall = Z1; end
        3'd2: begin eop = OP_CALL; ecall = Z2; end
        default: eop = OP_HALT;
      endcase
    end else if (cur_mod == Z1) begin
      case (cur_state)
        3'd0: ens = x[3] ? 3'd1 : (!x[2] ? 3'd6 : (x[4] ? 3'd3 : 3'd2));
        3'd1: begin ey = 9'b010000000; ens = 3'd7; end            // y8
        3'd2: begin ey = 9'b000001001; eop = OP_CALL; ecall = Z1; end  // y1,y4
        3'd3: begin ey = 9'b000000011; eop = OP_CALL; ecall = Z1; end  // y1,y2
        3'd4: begin ey = 9'b001000000; ens = 3'd7; end            // y7
        3'd5: begin ey = 9'b000100000; ens = 3'd7; end            // y6
        3'd6: begin ey = 9'b100000000; ens = 3'd7; end            // y9
        default: begin ey = 9'b000010000; eop = OP_RET; end       // y5
      endcase
    end else begin
      case (cur_state)
        3'd0: ens = x[1] ? 3'd1 : 3'd4;
        3'd1: begin ey = 9'b000000011; eop = OP_CALL; ecall = Z2; end
        3'd2: begin ey = 9'b000000100; ens = 3'd3; end            // y3
        3'd3: begin ey = 9'b000001001; eop = OP_CALL; ecall = Z2; end
        default: begin ey = 9'b000010000; eop = OP_RET; end
      endcase
    end
  endtask

  function automatic state_t expect_resume(module_e m, state_t a, x_t xv);
    if (m == Z0) return (a == 3'd1) ? (xv[5] ? 3'd2 : 3'd1) : 3'd3;
    if (m == Z1) return (a == 3'd3) ? 3'd5 : 3'd4;
    return (a == 3'd1) ? 3'd2 : 3'd4;
  endfunction

  initial begin
    y_t ey; stack_op_e eop; state_t ens; module_e ecall;
    module_e mods [3];
    int nstates [3];
    mods = '{Z0, Z1, Z2};
    nstates = '{4, 8, 5};
    for (int mi = 0; mi < 3; mi++)
      for (int s = 0; s < nstates[mi]; s++)
        for (int xv = 0; xv < 32; xv++) begin
          cur_mod = mods[mi]; cur_state = 3'(s); x = 5'(xv);
          par_mod = Z0; par_state = 3'd1;
          #1;
          expect_row(ey, eop, ens, ecall);
          checks++;
          if (y !== ey || op !== eop || (eop == OP_STEP && next_state !== ens) ||
              (eop == OP_CALL && call_mod !== ecall)) begin
            failures++;
            $display("FAIL z%0d a%0d x=%b: y=%b op=%0d ns=%0d call=%0d", mi, s, x, y, op,
                     next_state, call_mod);
          end
        end
    // resume states for every call state of every caller
    for (int xv = 0; xv < 32; xv++) begin
      cur_mod = Z2; cur_state = 3'd4; x = 5'(xv);
      for (int k = 0; k < 6; k++) begin
        case (k)
          0: begin par_mod = Z0; par_state = 3'd1; end
          1: begin par_mod = Z0; par_state = 3'd2; end
          2: begin par_mod = Z1; par_state = 3'd2; end
          3: begin par_mod = Z1; par_state = 3'd3; end
          4: begin par_mod = Z2; par_state = 3'd1; end
          default: begin par_mod = Z2; par_state = 3'd3; end
        endcase
        #1;
        checks++;
        if (resume_state !== expect_resume(par_mod, par_state, x)) begin
          failures++;
          $display("FAIL resume z%0d a%0d x=%b: %0d", par_mod, par_state, x, resume_state);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
