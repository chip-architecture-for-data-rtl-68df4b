// local_stack: LIFO of node addresses used by the recursion.
//
// Before the control unit calls z1 or z2 recursively it pushes the address
// Register (y1); the End state of the called module pops it back (y5), so
// every level of the recursion finds its own node again. push and pop in
// the same cycle are not used by the sorter; if both come, push wins.
// top is the word on top of the stack and is valid while empty is low.
// Popping an empty stack leaves it empty; pushing a full one is dropped
// and sets the sticky overflow flag. Synchronous active-high reset.
// The stack itself and its y1/y5 controls follow the design; depth, the
// empty/overflow behaviour and reset are this implementation's choices.
module local_stack #(
  parameter int unsigned DEPTH  = 15,
  parameter int unsigned WIDTH  = 4
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             push,
  input  logic             pop,
  input  logic [WIDTH-1:0] din,
  output logic [WIDTH-1:0] top,
  output logic             empty,
  output logic             overflow
);

  localparam int unsigned CNT_W = $clog2(DEPTH + 1);
  localparam int unsigned IDX_W = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [CNT_W-1:0] count;
  logic [CNT_W-1:0] below;  // count - 1, index of the top entry
  assign below = count - 1'b1;

  assign empty = (count == '0);
  assign top   = empty ? '0 : mem[below[IDX_W-1:0]];

  always_ff @(posedge clk) begin
    if (rst) begin
      count    <= '0;
      overflow <= 1'b0;
    end else if (push) begin
      if (32'(count) == DEPTH) begin
        overflow <= 1'b1;
      end else begin
        mem[count[IDX_W-1:0]] <= din;
        count      <= count + 1'b1;
      end
    end else if (pop && !empty) begin
      count <= count - 1'b1;
    end
  end

endmodule
