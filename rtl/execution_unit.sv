// execution_unit: datapath of the recursive tree sorter.
//
// It holds the node RAM (tree_ram), the address Register that points at
// the node the control unit is working on, the local stack that saves the
// Register across recursive calls, the output stack that collects the
// sorted data, and an item counter k naming the item being inserted.
// Items are inserted in order 0..N-1 and item k, when placed, becomes
// tree node k; node 0 is the root.
//
// Operation lines (from the control unit, acted on at the clock edge):
//   y1 push Register          y2 Register <= left link
//   y4 Register <= right link y5 Register <= pop (root if stack empty)
//   y3 record node data (count copies) on the output stack
//   y8 place item k as a new leaf, remember it as "pending", k <= k+1
//   y6/y7 link the pending node as left/right child of the Register's
//         node and clear pending (later, shallower y6/y7 change nothing)
//   y9 item k equals the node's data: bump its count, k <= k+1
// Condition lines (combinational, from the present register contents):
//   x1 Register != 11..1 (null)     x2 item k's data != node data
//   x3 Register points at no placed node  x4 item k's data < node data
//   x5 k == N, every item is in the tree
// x1, y1..y5 and the blocks (RAM, Register, local stack, output stack)
// follow the design; x2..x5, y6..y9 are given their meaning here so that
// the z1 chart inserts one item. Popping an empty local stack restores the
// root, which is how each top-level call of z1 or z2 starts at the root.
// error is the overflow of the local or the output stack. While rst is
// high, data_in is written into the RAM.
module execution_unit
  import sort_pkg::*;
#(
  parameter int unsigned N      = 12,
  parameter int unsigned DATA_W = 6,
  parameter int unsigned DEPTH  = 15
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [DATA_W-1:0] data_in  [N],
  input  y_t                y,
  output x_t                x,
  output logic [DATA_W-1:0] out_data [N],
  output logic              error
);

  localparam int unsigned ADDR_W = $clog2(N + 1);
  localparam logic [ADDR_W-1:0] NULL = '1;
  localparam logic [ADDR_W-1:0] ROOT = '0;

  logic [ADDR_W-1:0] reg_addr;   // the address Register
  logic [ADDR_W-1:0] item_k;     // item being inserted
  logic [ADDR_W-1:0] new_node;   // last placed node, waiting to be linked
  logic              pending;

  logic [DATA_W-1:0] node_data, item_data;
  logic [ADDR_W-1:0] node_left, node_right, node_count;
  logic              node_placed;

  logic [ADDR_W-1:0] ls_top;
  logic              ls_empty, ls_overflow, os_overflow;

  tree_ram #(.N(N), .DATA_W(DATA_W), .ADDR_W(ADDR_W)) u_ram (
    .clk,
    .load      (rst),
    .data_in,
    .place     (y[Y_PLACE]),
    .link_left (y[Y_LINK_LEFT]  && pending),
    .link_right(y[Y_LINK_RIGHT] && pending),
    .dup       (y[Y_DUP]),
    .wa        (y[Y_PLACE] ? item_k : reg_addr),
    .wchild    (new_node),
    .ra        (reg_addr),
    .ra_data   (node_data),
    .ra_left   (node_left),
    .ra_right  (node_right),
    .ra_count  (node_count),
    .ra_placed (node_placed),
    .rb        (item_k),
    .rb_data   (item_data)
  );

  local_stack #(.DEPTH(DEPTH), .WIDTH(ADDR_W)) u_local (
    .clk, .rst,
    .push    (y[Y_PUSH]),
    .pop     (y[Y_POP]),
    .din     (reg_addr),
    .top     (ls_top),
    .empty   (ls_empty),
    .overflow(ls_overflow)
  );

  output_stack #(.N(N), .DATA_W(DATA_W), .CNT_W(ADDR_W)) u_out (
    .clk, .rst,
    .record  (y[Y_RECORD]),
    .value   (node_data),
    .copies  (node_count),
    .entries (out_data),
    .fill    (),
    .overflow(os_overflow)
  );

  always_comb begin
    x              = '0;
    x[X_NOT_NULL]  = (reg_addr != NULL);
    x[X_NOT_EQUAL] = (item_data != node_data);
    x[X_EMPTY]     = !node_placed;
    x[X_LESS]      = (item_data < node_data);
    x[X_ALL_IN]    = (32'(item_k) == N);
  end

  assign error = ls_overflow || os_overflow;

  always_ff @(posedge clk) begin
    if (rst) begin
      reg_addr <= ROOT;
      item_k   <= '0;
      new_node <= ROOT;
      pending  <= 1'b0;
    end else begin
      if (y[Y_GO_LEFT])       reg_addr <= node_left;
      else if (y[Y_GO_RIGHT]) reg_addr <= node_right;
      else if (y[Y_POP])      reg_addr <= ls_empty ? ROOT : ls_top;

      if (y[Y_PLACE]) begin
        new_node <= item_k;
        pending  <= 1'b1;
        item_k   <= item_k + 1'b1;
      end else if (y[Y_DUP]) begin
        pending  <= 1'b0;
        item_k   <= item_k + 1'b1;
      end else if (y[Y_LINK_LEFT] || y[Y_LINK_RIGHT]) begin
        pending  <= 1'b0;
      end
    end
  end

  // Rules the control unit keeps: one Register move per clock, a push only
  // together with a descent, a leaf only at an empty place.
  a_one_move: assert property (@(posedge clk) disable iff (rst)
    $onehot0({y[Y_GO_LEFT], y[Y_GO_RIGHT], y[Y_POP]}));
  a_push_descends: assert property (@(posedge clk) disable iff (rst)
    y[Y_PUSH] |-> (y[Y_GO_LEFT] || y[Y_GO_RIGHT]));
  a_place_empty: assert property (@(posedge clk) disable iff (rst)
    y[Y_PLACE] |-> x[X_EMPTY]);

endmodule
