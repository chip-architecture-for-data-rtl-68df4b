// tb_rhfsm: the control unit on its own, with x1..x5 driven from here.
//
// 1. Shortest run: x3 = 1 (every z1 finds an empty place), x5 = 1 and
//    x1 = 0. The module/state trace, y on every cycle and the stack pointer
//    are compared with the sequence read off the flow charts:
//    z0a0, z0a1, z1a0, z1a1(y8), z1a7(y5), z0a2, z2a0, z2a4(y5), z0a3(done).
// 2. Recursion: z1 descends left through three levels (x3 = 0, x2 = 1,
//    x4 = 1) before finding an empty place; the pointer must reach 3 and
//    the returns must pass through a5 (y6) on each level.
// 3. Overflow: z1 never finds an empty place, so it recurses until the
//    15-deep stacks are full; error must rise and y must fall to zero.
module tb_rhfsm;
  import sort_pkg::*;

  logic    clk = 1'b0;
  logic    rst = 1'b1;
  x_t      x;
  y_t      y;
  logic    done, error;
  module_e active_mod;
  state_t  active_state;
  logic [3:0] sp;

  int checks = 0;
  int failures = 0;

  rhfsm #(.DEPTH(15)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_now(module_e m, int a, y_t ey, int esp, logic edone);
    checks++;
    if (active_mod !== m || 32'(active_state) != a || y !== ey || 32'(sp) != esp ||
        done !== edone) begin
      failures++;
      $display("FAIL: got z%0d a%0d y=%b sp=%0d done=%0b, expected z%0d a%0d y=%b sp=%0d done=%0b",
               active_mod, active_state, y, sp, done, m, a, ey, esp, edone);
    end
    @(posedge clk); #1;
  endtask

  localparam y_t NONE = '0;
  localparam y_t Y8   = 9'b010000000;
  localparam y_t Y5   = 9'b000010000;
  localparam y_t Y12  = 9'b000000011;
  localparam y_t Y6   = 9'b000100000;

  initial begin
    // 1. shortest run
    x = 5'b10100;  // x5 = 1, x3 = 1, x1 = 0
    rst = 1; @(posedge clk); #1 rst = 0;
    expect_now(Z0, 0, NONE, 0, 0);
    expect_now(Z0, 1, NONE, 0, 0);
    expect_now(Z1, 0, NONE, 1, 0);
    expect_now(Z1, 1, Y8,   1, 0);
    expect_now(Z1, 7, Y5,   1, 0);
    expect_now(Z0, 2, NONE, 0, 0);
    expect_now(Z2, 0, NONE, 1, 0);
    expect_now(Z2, 4, Y5,   1, 0);
    expect_now(Z0, 3, NONE, 0, 1);
    expect_now(Z0, 3, NONE, 0, 1);

    // 2. three levels of left recursion inside z1
    x = 5'b11010;  // x5 = 1, x4 = 1, x3 = 0, x2 = 1
    rst = 1; @(posedge clk); #1 rst = 0;
    expect_now(Z0, 0, NONE, 0, 0);
    expect_now(Z0, 1, NONE, 0, 0);
    for (int lvl = 1; lvl <= 3; lvl++) begin
      expect_now(Z1, 0, NONE, lvl, 0);
      expect_now(Z1, 3, Y12,  lvl, 0);
    end
    x = 5'b10100;  // now an empty place
    expect_now(Z1, 0, NONE, 4, 0);
    expect_now(Z1, 1, Y8,   4, 0);
    expect_now(Z1, 7, Y5,   4, 0);
    for (int lvl = 3; lvl >= 1; lvl--) begin
      expect_now(Z1, 5, Y6, lvl, 0);
      expect_now(Z1, 7, Y5, lvl, 0);
    end
    expect_now(Z0, 2, NONE, 0, 0);

    // 3. unbounded recursion must overflow the stacks
    x = 5'b01010;
    rst = 1; @(posedge clk); #1 rst = 0;
    repeat (60) @(posedge clk);
    #1;
    checks++;
    if (!error || y !== '0 || sp != 14) begin
      failures++;
      $display("FAIL: overflow not flagged (error=%0b sp=%0d)", error, sp);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
