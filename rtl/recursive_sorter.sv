// recursive_sorter: sorts N data words by building a binary search tree
// and walking it in order, with the recursion carried out in hardware.
//
// The control unit (rhfsm) is a recursive hierarchical FSM: it keeps the
// active module and its state on two stacks that share one pointer, so a
// recursive call is a push and a return a pop, each within a single clock.
// It runs three modules: z0 inserts the items one by one with z1 and then
// traverses the tree with z2; z1 descends the tree recursively and places
// the item as a new leaf; z2 visits left subtree, node, right subtree.
// The execution unit holds the data, the tree, the address Register and
// the local and output stacks, obeys the control unit's y1..y9 and answers
// with x1..x5. Both units share clk and rst.
//
// Interface: hold rst high for at least one clock with data_in valid; the
// data is loaded then. After rst falls the sort runs by itself; done rises
// (and stays) when z0 has reached End, and out_data[0..N-1] then holds the
// data in ascending order (out_data[0] smallest, duplicates kept). error
// flags an overflow of any stack; the result is then not valid. The
// number of clocks depends on the shape of the tree: for distinct items
// it is 4 + 4*N + 4*(sum over items of the number of nodes compared on
// insertion) + 7*N (duplicates shorten it).
module recursive_sorter
  import sort_pkg::*;
#(
  parameter int unsigned N           = 12,
  parameter int unsigned DATA_W      = 6,
  parameter int unsigned STACK_DEPTH = 15
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [DATA_W-1:0] data_in  [N],
  output logic [DATA_W-1:0] out_data [N],
  output logic              done,
  output logic              error
);

  y_t      y;
  x_t      x;
  logic    cu_error, eu_error;

  rhfsm #(.DEPTH(STACK_DEPTH)) u_control (
    .clk, .rst, .x, .y,
    .done,
    .error(cu_error),
    .active_mod(), .active_state(), .sp()
  );

  execution_unit #(.N(N), .DATA_W(DATA_W), .DEPTH(STACK_DEPTH)) u_exec (
    .clk, .rst, .data_in, .y, .x, .out_data,
    .error(eu_error)
  );

  assign error = cu_error || eu_error;

endmodule
