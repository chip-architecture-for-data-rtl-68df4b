// tb_local_stack: random pushes and pops on the address stack, checked
// against a queue model: top, empty, the ignored pop of an empty stack and
// the overflow flag when a 15-deep stack is pushed a 16th time.
module tb_local_stack;
  localparam int DEPTH = 15;
  localparam int WIDTH = 4;

  logic clk = 1'b0;
  logic rst = 1'b1;
  logic push, pop;
  logic [WIDTH-1:0] din, top;
  logic empty, overflow;

  int checks = 0;
  int failures = 0;
  int n_over = 0, n_empty_pop = 0;

  local_stack #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [WIDTH-1:0] q [$];
  bit m_over;

  initial begin
    push = 0; pop = 0; din = 0;
    for (int round = 0; round < 20; round++) begin
      int bias;
      bias = (round % 2 != 0) ? 70 : 45;
      rst = 1; @(posedge clk); #1 rst = 0;
      q = {}; m_over = 0;
      for (int i = 0; i < 300; i++) begin
        int r;
        r = $urandom_range(99);
        push = (r < bias);
        pop  = !push && (r < 95);
        din  = WIDTH'($urandom);
        if (pop && q.size() == 0) n_empty_pop++;
        @(posedge clk);
        if (push) begin
          if (q.size() == DEPTH) m_over = 1; else q.push_back(din);
        end else if (pop && q.size() > 0) void'(q.pop_back());
        #1;
        checks++;
        if (empty !== (q.size() == 0) || overflow !== m_over ||
            (q.size() > 0 && top !== q[q.size()-1])) begin
          failures++;
          $display("FAIL size=%0d empty=%0b top=%0d ovf=%0b", q.size(), empty, top, overflow);
        end
      end
      if (m_over) n_over++;
    end
    checks++;
    if (n_over == 0 || n_empty_pop == 0) begin
      failures++;
      $display("FAIL: overflow %0d, empty pops %0d", n_over, n_empty_pop);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
