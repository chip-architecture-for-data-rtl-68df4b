// sort_pkg: types and encodings shared by the recursive tree sorter.
//
// The sorter is split the way a recursive program is: a control unit
// (a recursive hierarchical FSM) that steps through three modules z0, z1, z2,
// and an execution unit that owns the data. The control unit drives the
// execution unit with the operation lines y1..y9 and reads back the condition
// lines x1..x5. This package gives those lines a name and fixes the encoding
// of modules and states as they are stored on the control unit's stacks.
//
// Module and state numbering follows the flow charts of the design (z0..z2,
// a0..a7). Bit vectors are indexed 1-based so that y[3] is y3 and x[5] is x5.
package sort_pkg;

  // Modules of the recursive algorithm.
  //   Z0: main loop, inserts every item, then traverses the tree
  //   Z1: recursive insertion of one item into the binary search tree
  //   Z2: recursive in-order traversal that records the sorted data
  typedef enum logic [1:0] {
    Z0 = 2'd0,
    Z1 = 2'd1,
    Z2 = 2'd2
  } module_e;

  // State codes a0..a7 (z0 uses a0..a3, z1 a0..a7, z2 a0..a4).
  typedef logic [2:0] state_t;
  localparam state_t A0 = 3'd0;
  localparam state_t A1 = 3'd1;
  localparam state_t A2 = 3'd2;
  localparam state_t A3 = 3'd3;
  localparam state_t A4 = 3'd4;
  localparam state_t A5 = 3'd5;
  localparam state_t A6 = 3'd6;
  localparam state_t A7 = 3'd7;

  // Operation lines from the control unit to the execution unit.
  typedef logic [9:1] y_t;
  localparam int Y_PUSH      = 1;  // y1: push Register onto the local stack
  localparam int Y_GO_LEFT   = 2;  // y2: Register <= left link of node
  localparam int Y_RECORD    = 3;  // y3: record node data on the output stack
  localparam int Y_GO_RIGHT  = 4;  // y4: Register <= right link of node
  localparam int Y_POP       = 5;  // y5: Register <= pop of the local stack
  localparam int Y_LINK_LEFT = 6;  // y6: hook a freshly placed node as left child
  localparam int Y_LINK_RIGHT= 7;  // y7: hook a freshly placed node as right child
  localparam int Y_PLACE     = 8;  // y8: place the current item as a new leaf
  localparam int Y_DUP       = 9;  // y9: count the current item as a duplicate

  // Condition lines from the execution unit to the control unit.
  typedef logic [5:1] x_t;
  localparam int X_NOT_NULL  = 1;  // x1: Register is not the null address 11..1
  localparam int X_NOT_EQUAL = 2;  // x2: item differs from the node's data
  localparam int X_EMPTY     = 3;  // x3: Register points at no placed node
  localparam int X_LESS      = 4;  // x4: item is smaller than the node's data
  localparam int X_ALL_IN    = 5;  // x5: every item has been inserted

  // What the control unit does with its stacks at the next clock edge.
  typedef enum logic [1:0] {
    OP_STEP = 2'd0,  // overwrite the top state with the next state
    OP_CALL = 2'd1,  // push a new module, starting in a0
    OP_RET  = 2'd2,  // pop, and advance the caller past its call state
    OP_HALT = 2'd3   // z0 reached End: hold
  } stack_op_e;

endpackage
