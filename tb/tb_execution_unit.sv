// tb_execution_unit: the datapath driven by hand-written y sequences, the
// ones the control unit would issue, for the four items 5, 3, 8, 5.
// Before each operation the condition lines x1..x5 are compared with the
// values the tree should give at that point; at the end the output stack
// must read 3, 5, 5, 8. The sequence covers placing the root, a left and
// a right leaf with their links, a duplicate, the in-order walk with its
// pushes and pops, and the pop of an empty local stack that returns the
// Register to the root.
module tb_execution_unit;
  import sort_pkg::*;

  localparam int N = 4;
  localparam int W = 6;

  logic clk = 1'b0;
  logic rst = 1'b1;
  logic [W-1:0] data_in [N];
  y_t y;
  x_t x;
  logic [W-1:0] out_data [N];
  logic error;

  int checks = 0;
  int failures = 0;

  execution_unit #(.N(N), .DATA_W(W), .DEPTH(15)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // check x (bits given as x5..x1, '?' bits are not compared), then apply y for one clock
  task automatic step(string ex, int ys []);
    checks++;
    for (int b = 1; b <= 5; b++) begin
      byte c = ex[5 - b];
      if (c != "?" && x[b] !== (c == "1")) begin
        failures++;
        $display("FAIL before y%p: x%0d = %0b (x = %b, expected %s)", ys, b, x[b], x, ex);
        break;
      end
    end
    y = '0;
    foreach (ys[i]) y[ys[i]] = 1'b1;
    @(posedge clk); #1 y = '0;
  endtask

  initial begin
    y = '0;
    data_in = '{6'd5, 6'd3, 6'd8, 6'd5};
    rst = 1; @(posedge clk); #1 rst = 0;
    //   x: 5 4 3 2 1
    // item 0 (5): root is empty
    step("0?1?1", '{8});        // z1 a1: place node 0
    step("0?0??", '{5});        // z1 a7: pop empty -> root
    // item 1 (3): smaller than 5, left is empty
    step("01011", '{1, 2});     // z1 a3: push, go left
    step("0?1?0", '{8});        // at null: place node 1
    step("0????", '{5});        // pop back to node 0
    step("0????", '{6});        // link node 1 as left child
    step("0????", '{5});        // pop empty -> root
    // item 2 (8): greater than 5, right is empty
    step("00011", '{1, 4});
    step("0?1?0", '{8});
    step("0????", '{5});
    step("0????", '{7});
    step("0????", '{5});
    // item 3 (5): equal to root
    step("00001", '{9});        // z1 a6: duplicate
    step("1????", '{5});
    // in-order walk from the root
    step("1???1", '{1, 2});     // node 0: go left
    step("1???1", '{1, 2});     // node 1: go left
    step("1???0", '{5});        // null
    step("1???1", '{3});        // record 3
    step("1???1", '{1, 4});     // node 1: go right
    step("1???0", '{5});        // null
    step("1???1", '{5});        // end of node 1
    step("1???1", '{3});        // record 5 twice
    step("1???1", '{1, 4});     // node 0: go right
    step("1???1", '{1, 2});     // node 2: go left
    step("1???0", '{5});
    step("1???1", '{3});        // record 8
    step("1???1", '{1, 4});
    step("1???0", '{5});
    step("1???1", '{5});        // end of node 2
    step("1???1", '{5});        // end of node 0, stack empty
    step("1???1", '{});
    begin
      logic [W-1:0] exp [N];
      exp = '{6'd3, 6'd5, 6'd5, 6'd8};
      for (int i = 0; i < N; i++) begin
        checks++;
        if (out_data[i] !== exp[i]) begin
          failures++;
          $display("FAIL out%0d = %0d, expected %0d", i, out_data[i], exp[i]);
        end
      end
    end
    checks++;
    if (error) begin failures++; $display("FAIL error flagged"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
