// tb_recursive_sorter_full: the sorter at its default size (12 words of
// 6 bits, stacks 15 deep), run end to end on many data sets.
//
// Each run loads a data set under reset, waits for done and compares
// out_data with a sorted copy made here, and the number of clocks with a
// count worked out from the binary search tree that the data set builds:
// 4 + 4*N + 4*(nodes compared while inserting) + 7*(distinct values).
// Data sets: ascending, descending (deepest recursion), all equal, a
// fixed mixed set, and random ones. The mean clock count of the random
// runs is printed next to the 230 clocks (23040 ns at 100 ns) reported
// for 12 items in the design's evaluation and must lie within 30 % of it.
module tb_recursive_sorter_full;
  import sort_pkg::*;

  localparam int N = 12;
  localparam int W = 6;
  localparam int RANDOM_RUNS = 200;

  logic clk = 1'b0;
  logic rst = 1'b1;
  logic [W-1:0] data_in  [N];
  logic [W-1:0] out_data [N];
  logic done, error;

  int checks = 0;
  int failures = 0;

  recursive_sorter dut (.*);

  always #50 clk = ~clk;  // 100 ns clock as in the evaluation

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int expected_clocks(logic [W-1:0] d [N]);
    logic [W-1:0] val [N];
    int lft [N], rgt [N];
    int nodes = 0, compared = 0;
    for (int k = 0; k < N; k++) begin
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
    return 4 + 4 * N + 4 * compared + 7 * nodes;
  endfunction

  task automatic run(input logic [W-1:0] d [N], output int clocks);
    logic [W-1:0] s [N];
    int exp_clocks;
    s = d;
    s.sort();
    exp_clocks = expected_clocks(d);
    data_in = d;
    rst = 1'b1;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    clocks = 0;
    while (!done && !error) begin
      @(posedge clk);
      #1 clocks++;
    end
    checks++;
    if (error) begin
      failures++;
      $display("FAIL: stack overflow flagged");
    end
    for (int i = 0; i < N; i++) begin
      checks++;
      if (out_data[i] !== s[i]) begin
        failures++;
        $display("FAIL: out%0d = %0d, expected %0d", i, out_data[i], s[i]);
      end
    end
    checks++;
    if (clocks != exp_clocks) begin
      failures++;
      $display("FAIL: %0d clocks, expected %0d", clocks, exp_clocks);
    end
  endtask

  initial begin
    logic [W-1:0] d [N];
    int clocks;
    longint total;
    real mean;
    total = 0;
    for (int i = 0; i < N; i++) data_in[i] = '0;

    // fixed mixed set (with one repeated value)
    d = '{6'd37, 6'd40, 6'd34, 6'd5, 6'd63, 6'd18, 6'd40, 6'd0, 6'd51, 6'd22, 6'd29, 6'd11};
    run(d, clocks);
    $display("mixed set: %0d clocks", clocks);
    for (int i = 0; i < N; i++) d[i] = W'(i * 3);
    run(d, clocks);
    $display("ascending set: %0d clocks", clocks);
    for (int i = 0; i < N; i++) d[i] = W'(60 - i * 5);
    run(d, clocks);
    $display("descending set: %0d clocks", clocks);
    for (int i = 0; i < N; i++) d[i] = W'(42);
    run(d, clocks);
    $display("all-equal set: %0d clocks", clocks);

    for (int r = 0; r < RANDOM_RUNS; r++) begin
      for (int i = 0; i < N; i++) d[i] = W'($urandom);
      run(d, clocks);
      total += longint'(clocks);
    end
    mean = real'(total) / RANDOM_RUNS;
    $display("random sets: mean %0.1f clocks (%0.0f ns at 100 ns), evaluation reports 230",
             mean, mean * 100.0);
    checks++;
    if (mean < 230.0 * 0.7 || mean > 230.0 * 1.3) begin
      failures++;
      $display("FAIL: mean clock count far from the reported one");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
