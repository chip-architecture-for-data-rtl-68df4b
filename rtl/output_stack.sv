// output_stack: collects the sorted data.
//
// The in-order traversal records every tree node once, smallest first
// (y3). A node stands for `copies` equal items, so a record writes its
// value into the next `copies` free entries in one clock: entry j is
// written when fill <= j < fill + copies. Entry 0 therefore ends up with the
// smallest item and entry N-1 with the largest. Entries not yet written
// read zero. Records that would run past entry N-1 are cut at the end and
// set the sticky overflow flag. Synchronous active-high reset.
// The output stack and its y3 control follow the design; the multi-entry
// write for duplicates is this implementation's own.
module output_stack #(
  parameter int unsigned N      = 12,
  parameter int unsigned DATA_W = 6,
  parameter int unsigned CNT_W  = $clog2(N + 1)
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              record,
  input  logic [DATA_W-1:0] value,
  input  logic [CNT_W-1:0]  copies,
  output logic [DATA_W-1:0] entries [N],
  output logic [CNT_W-1:0]  fill,
  output logic              overflow
);

  logic [CNT_W:0] fill_next;
  assign fill_next = {1'b0, fill} + {1'b0, copies};

  always_ff @(posedge clk) begin
    if (rst) begin
      fill     <= '0;
      overflow <= 1'b0;
      for (int j = 0; j < N; j++) entries[j] <= '0;
    end else if (record) begin
      for (int j = 0; j < N; j++) begin
        if (j >= int'(fill) && j < int'(fill_next)) entries[j] <= value;
      end
      if (32'(fill_next) > N) begin
        overflow <= 1'b1;
        fill     <= CNT_W'(N);
      end else begin
        fill <= fill_next[CNT_W-1:0];
      end
    end
  end

endmodule
