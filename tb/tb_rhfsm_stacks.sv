// tb_rhfsm_stacks: random sequences of step, call, return and halt on the
// shared-pointer FSM_stack/M_stack pair, compared clock by clock with a
// model kept here in SystemVerilog queues. Deep call runs reach the top of
// the 15-entry stacks, where the overflow flag must rise and the stacks
// must freeze.
module tb_rhfsm_stacks;
  import sort_pkg::*;

  localparam int DEPTH = 15;

  logic      clk = 1'b0;
  logic      rst = 1'b1;
  stack_op_e op;
  state_t    next_state, resume_state;
  module_e   call_mod;
  module_e   top_mod, par_mod;
  state_t    top_state, par_state;
  logic [3:0] sp;
  logic      overflow;

  int checks = 0;
  int failures = 0;
  int overflows_seen = 0;

  rhfsm_stacks #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  module_e mq [$];
  state_t  sq [$];
  bit      m_over;

  task automatic compare();
    int n = mq.size();
    checks++;
    if (top_mod !== mq[n-1] || top_state !== sq[n-1] || 32'(sp) != n - 1 ||
        overflow !== m_over ||
        (n > 1 && (par_mod !== mq[n-2] || par_state !== sq[n-2]))) begin
      failures++;
      $display("FAIL sp=%0d/%0d top=%0d/%0d state=%0d/%0d ovf=%0b", sp, n - 1, top_mod,
               mq[n-1], top_state, sq[n-1], overflow);
    end
  endtask

  initial begin
    op = OP_HALT; next_state = '0; resume_state = '0; call_mod = Z0;
    for (int round = 0; round < 40; round++) begin
      int bias;
      bias = (round % 4 == 3) ? 85 : 30;  // some rounds dive deep
      rst = 1'b1;
      @(posedge clk); #1 rst = 1'b0;
      mq = '{Z0}; sq = '{A0}; m_over = 0;
      compare();
      for (int i = 0; i < 200; i++) begin
        int r, n;
        r = $urandom_range(99);
        n = mq.size();
        next_state   = 3'($urandom);
        resume_state = 3'($urandom);
        call_mod     = module_e'($urandom_range(2));
        if (r < bias) op = OP_CALL;
        else if (r < bias + 25 && n > 1) op = OP_RET;
        else if (r < 97) op = OP_STEP;
        else op = OP_HALT;
        @(posedge clk);
        if (!m_over) begin
          case (op)
            OP_STEP: sq[n-1] = next_state;
            OP_CALL: if (n == DEPTH) m_over = 1;
                     else begin mq.push_back(call_mod); sq.push_back(A0); end
            OP_RET:  begin void'(mq.pop_back()); void'(sq.pop_back()); sq[n-2] = resume_state; end
            default: ;
          endcase
        end
        #1 compare();
      end
      if (m_over) overflows_seen++;
    end
    checks++;
    if (overflows_seen == 0) begin failures++; $display("FAIL: no overflow reached"); end
    $display("rounds with overflow: %0d", overflows_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
