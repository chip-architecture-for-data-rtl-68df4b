// tb_tree_ram: loads a 12-word data set into the node RAM, then applies
// random place, link and duplicate-count writes and checks both read
// ports against an array model after every clock, including the null
// address 11..1, which must read as an unplaced node with null links.
module tb_tree_ram;
  localparam int N = 12;
  localparam int W = 6;
  localparam int A = 4;
  localparam logic [A-1:0] NULL = '1;

  logic clk = 1'b0;
  logic load;
  logic [W-1:0] data_in [N];
  logic place, link_left, link_right, dup;
  logic [A-1:0] wa, wchild, ra, rb, ra_left, ra_right, ra_count;
  logic [W-1:0] ra_data, rb_data;
  logic ra_placed;

  int checks = 0;
  int failures = 0;

  tree_ram #(.N(N), .DATA_W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [W-1:0] md [N];
  logic [A-1:0] ml [N], mr [N], mc [N];
  bit           mp [N];

  task automatic check_reads();
    for (int a = 0; a < 16; a++) begin
      ra = A'(a); rb = A'(15 - a);
      #1;
      checks++;
      if (a < N) begin
        if (ra_placed !== mp[a] || ra_data !== md[a] ||
            (mp[a] && (ra_left !== ml[a] || ra_right !== mr[a] || ra_count !== mc[a]))) begin
          failures++;
          $display("FAIL node %0d: placed %0b data %0d left %0d right %0d count %0d", a,
                   ra_placed, ra_data, ra_left, ra_right, ra_count);
        end
      end else if (ra_placed !== 1'b0 || ra_left !== NULL || ra_right !== NULL) begin
        failures++;
        $display("FAIL out-of-range address %0d", a);
      end
      checks++;
      if ((15 - a) < N && rb_data !== md[15 - a]) begin
        failures++;
        $display("FAIL port b address %0d", 15 - a);
      end
    end
  endtask

  initial begin
    place = 0; link_left = 0; link_right = 0; dup = 0; wa = 0; wchild = 0; ra = 0; rb = 0;
    for (int round = 0; round < 5; round++) begin
      for (int i = 0; i < N; i++) begin data_in[i] = W'($urandom); md[i] = data_in[i]; mp[i] = 0; end
      load = 1; @(posedge clk); #1 load = 0;
      check_reads();
      for (int i = 0; i < 200; i++) begin
        int r, a;
        r = $urandom_range(3);
        a = $urandom_range(N - 1);
        wa = A'(a); wchild = A'($urandom);
        place = (r == 0) || !mp[a];
        link_left = !place && r == 1;
        link_right = !place && r == 2;
        dup = !place && r == 3;
        @(posedge clk);
        if (place) begin mp[a] = 1; ml[a] = NULL; mr[a] = NULL; mc[a] = 1; end
        if (link_left) ml[a] = wchild;
        if (link_right) mr[a] = wchild;
        if (dup) mc[a] = mc[a] + 1;
        #1 place = 0; link_left = 0; link_right = 0; dup = 0;
        check_reads();
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
