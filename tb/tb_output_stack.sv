// tb_output_stack: random records of 1..3 copies of a value into a
// 12-entry output stack, compared with an array model after every clock,
// including a record that runs past the last entry and sets overflow.
module tb_output_stack;
  localparam int N = 12;
  localparam int W = 6;
  localparam int CW = 4;

  logic clk = 1'b0;
  logic rst = 1'b1;
  logic record;
  logic [W-1:0] value;
  logic [CW-1:0] copies;
  logic [W-1:0] entries [N];
  logic [CW-1:0] fill;
  logic overflow;

  int checks = 0;
  int failures = 0;
  int n_over = 0;

  output_stack #(.N(N), .DATA_W(W), .CNT_W(CW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] m [N];
    int mfill;
    bit mover;
    record = 0; value = 0; copies = 0;
    for (int round = 0; round < 50; round++) begin
      rst = 1; @(posedge clk); #1 rst = 0;
      for (int j = 0; j < N; j++) m[j] = '0;
      mfill = 0; mover = 0;
      for (int i = 0; i < 12; i++) begin
        record = ($urandom_range(3) != 0);
        value  = W'($urandom);
        copies = CW'($urandom_range(1, 3));
        @(posedge clk);
        if (record) begin
          for (int c = 0; c < int'(copies); c++)
            if (mfill + c < N) m[mfill + c] = value;
          if (mfill + int'(copies) > N) begin mover = 1; mfill = N; end
          else mfill += int'(copies);
        end
        #1;
        checks++;
        if (int'(fill) != mfill || overflow !== mover) begin
          failures++;
          $display("FAIL fill=%0d/%0d ovf=%0b", fill, mfill, overflow);
        end
        for (int j = 0; j < N; j++) begin
          checks++;
          if (entries[j] !== m[j]) begin
            failures++;
            $display("FAIL entry %0d = %0d, expected %0d", j, entries[j], m[j]);
          end
        end
      end
      if (mover) n_over++;
    end
    checks++;
    if (n_over == 0) begin failures++; $display("FAIL: no overflow reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
