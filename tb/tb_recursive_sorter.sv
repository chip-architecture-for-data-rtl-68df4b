// tb_recursive_sorter: end-to-end test of the sorter at reduced size and
// of its stack overflow flag.
//
// Instance a sorts 6 words (the smaller of the two evaluated sizes) with
// default stacks; every run is checked against a sorted copy and against
// the clock count implied by the binary search tree the data builds. The
// mean over the random runs is compared with the 103 clocks (10300 ns at
// 100 ns) reported for 6 items, within 30 %.
// Instance b sorts 12 words with stacks only 8 deep, so an ascending data
// set (a degenerate tree, recursion 13 levels deep) must raise error, and
// a balanced set must still sort cleanly.
// The test also counts how often each mechanism of the design fired and
// fails if one never did: module call and return, recursive z1 and z2
// calls, left and right linking, duplicate counting, a multi-copy record
// on the output stack, the top-level return that restores the root, and
// the overflow flag.
module tb_recursive_sorter;
  import sort_pkg::*;

  localparam int NA = 6;
  localparam int NB = 12;
  localparam int W  = 6;
  localparam int RANDOM_RUNS = 100;

  logic clk = 1'b0;
  logic rst = 1'b1;
  logic [W-1:0] data_a [NA];
  logic [W-1:0] out_a  [NA];
  logic [W-1:0] data_b [NB];
  logic [W-1:0] out_b  [NB];
  logic done_a, error_a, done_b, error_b;

  int checks = 0;
  int failures = 0;

  recursive_sorter #(.N(NA)) dut_a (
    .clk, .rst, .data_in(data_a), .out_data(out_a), .done(done_a), .error(error_a));
  recursive_sorter #(.N(NB), .STACK_DEPTH(8)) dut_b (
    .clk, .rst, .data_in(data_b), .out_data(out_b), .done(done_b), .error(error_b));

  always #50 clk = ~clk;

  // mechanism counters, on instance a
  int n_call, n_ret, n_rec_z1, n_rec_z2, n_link_l, n_link_r, n_dup, n_multi, n_root;
  int n_overflow;
  always @(posedge clk) if (!rst) begin
    if (dut_a.u_control.op == OP_CALL) n_call++;
    if (dut_a.u_control.op == OP_RET)  n_ret++;
    if (dut_a.u_control.op == OP_CALL && dut_a.u_control.active_mod == Z1 &&
        dut_a.u_control.call_mod == Z1) n_rec_z1++;
    if (dut_a.u_control.op == OP_CALL && dut_a.u_control.active_mod == Z2 &&
        dut_a.u_control.call_mod == Z2) n_rec_z2++;
    if (dut_a.y[Y_LINK_LEFT]  && dut_a.u_exec.pending) n_link_l++;
    if (dut_a.y[Y_LINK_RIGHT] && dut_a.u_exec.pending) n_link_r++;
    if (dut_a.y[Y_DUP]) n_dup++;
    if (dut_a.y[Y_RECORD] && dut_a.u_exec.node_count > 1) n_multi++;
    if (dut_a.y[Y_POP] && dut_a.u_exec.ls_empty) n_root++;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int expected_clocks(logic [W-1:0] d [NA]);
    logic [W-1:0] val [NA];
    int lft [NA], rgt [NA];
    int nodes = 0, compared = 0;
    for (int k = 0; k < NA; k++) begin
      int cur = 0;
      bit placed = 0;
      if (nodes == 0) begin
        val[0] = d[k]; lft[0] = -1; rgt[0] = -1; nodes = 1; placed = 1;
      end
      while (!placed) begin
        if (d[k] == val[cur]) begin
          placed = 1;
        end else begin
          int nxt;
          compared++;
          nxt = (d[k] < val[cur]) ? lft[cur] : rgt[cur];
          if (nxt < 0) begin
            val[nodes] = d[k]; lft[nodes] = -1; rgt[nodes] = -1;
            if (d[k] < val[cur]) lft[cur] = nodes; else rgt[cur] = nodes;
            nodes++;
            placed = 1;
          end else begin
            cur = nxt;
          end
        end
      end
    end
    return 4 + 4 * NA + 4 * compared + 7 * nodes;
  endfunction

  task automatic run_a(input logic [W-1:0] d [NA], output int clocks);
    logic [W-1:0] s [NA];
    int exp_clocks;
    s = d;
    s.sort();
    exp_clocks = expected_clocks(d);
    data_a = d;
    rst = 1'b1;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    clocks = 0;
    while (!done_a && !error_a) begin
      @(posedge clk);
      #1 clocks++;
    end
    checks++;
    if (error_a) begin failures++; $display("FAIL a: error flagged"); end
    for (int i = 0; i < NA; i++) begin
      checks++;
      if (out_a[i] !== s[i]) begin
        failures++;
        $display("FAIL a: out%0d = %0d, expected %0d", i, out_a[i], s[i]);
      end
    end
    checks++;
    if (clocks != exp_clocks) begin
      failures++;
      $display("FAIL a: %0d clocks, expected %0d", clocks, exp_clocks);
    end
  endtask

  task automatic run_b(input logic [W-1:0] d [NB], input bit expect_error);
    logic [W-1:0] s [NB];
    int clocks = 0;
    s = d;
    s.sort();
    data_b = d;
    rst = 1'b1;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    while (!done_b && !error_b && clocks < 2000) begin
      @(posedge clk);
      #1 clocks++;
    end
    checks++;
    if (error_b !== expect_error) begin
      failures++;
      $display("FAIL b: error = %0b, expected %0b", error_b, expect_error);
    end
    if (error_b) n_overflow++;
    if (!expect_error) begin
      for (int i = 0; i < NB; i++) begin
        checks++;
        if (out_b[i] !== s[i]) begin
          failures++;
          $display("FAIL b: out%0d = %0d, expected %0d", i, out_b[i], s[i]);
        end
      end
    end
  endtask

  task automatic expect_seen(string what, int n);
    checks++;
    $display("%-32s %0d", what, n);
    if (n == 0) begin
      failures++;
      $display("FAIL: %s never happened", what);
    end
  endtask

  initial begin
    logic [W-1:0] d [NA];
    logic [W-1:0] e [NB];
    int clocks;
    longint total;
    real mean;
    total = 0;
    for (int i = 0; i < NA; i++) data_a[i] = '0;
    for (int i = 0; i < NB; i++) data_b[i] = '0;

    d = '{6'd37, 6'd40, 6'd34, 6'd5, 6'd40, 6'd18};
    run_a(d, clocks);
    $display("fixed 6-item set: %0d clocks", clocks);
    for (int r = 0; r < RANDOM_RUNS; r++) begin
      for (int i = 0; i < NA; i++) d[i] = W'($urandom);
      run_a(d, clocks);
      total += longint'(clocks);
    end
    mean = real'(total) / RANDOM_RUNS;
    $display("random 6-item sets: mean %0.1f clocks, evaluation reports 103", mean);
    checks++;
    if (mean < 103.0 * 0.7 || mean > 103.0 * 1.3) begin
      failures++;
      $display("FAIL: mean clock count far from the reported one");
    end

    for (int i = 0; i < NB; i++) e[i] = W'(i);
    run_b(e, 1'b1);
    e = '{6'd32, 6'd16, 6'd48, 6'd8, 6'd24, 6'd40, 6'd56, 6'd4, 6'd12, 6'd20, 6'd28, 6'd36};
    run_b(e, 1'b0);

    expect_seen("module calls", n_call);
    expect_seen("module returns", n_ret);
    expect_seen("recursive z1 calls", n_rec_z1);
    expect_seen("recursive z2 calls", n_rec_z2);
    expect_seen("left links (y6)", n_link_l);
    expect_seen("right links (y7)", n_link_r);
    expect_seen("duplicates counted (y9)", n_dup);
    expect_seen("multi-copy records (y3)", n_multi);
    expect_seen("returns to the root", n_root);
    expect_seen("stack overflows", n_overflow);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
