// tree_ram: node memory of the binary search tree.
//
// Word i holds data item i and, once the item has been placed in the tree,
// the addresses of its left and right children and a count of how many
// items carry the same value. The all-ones address is the null link ("no
// child"), so ADDR_W is wide enough that no real word uses it.
//
// The data words are written from data_in while load is high (the sorter
// does this during reset); load also clears every placed flag, which
// empties the tree. Afterwards the data fields are read only. The tree
// fields have one write operation per clock, chosen by the one-hot
// controls:
//   place      node wa becomes a leaf: placed, both links null, count 1
//   link_left  left link of wa  <= wchild
//   link_right right link of wa <= wchild
//   dup        count of wa      <= count + 1
// Two asynchronous read ports: port a (node under the address Register)
// and port b (data of the item being inserted). A null or out-of-range
// read returns placed = 0 and null links.
// That the RAM holds the data and the tree links follows the design; the
// word layout, the per-node duplicate count and the register-array form
// are this implementation's choices.
module tree_ram #(
  parameter int unsigned N      = 12,
  parameter int unsigned DATA_W = 6,
  parameter int unsigned ADDR_W = $clog2(N + 1)
) (
  input  logic              clk,
  input  logic              load,
  input  logic [DATA_W-1:0] data_in [N],
  // write side
  input  logic              place,
  input  logic              link_left,
  input  logic              link_right,
  input  logic              dup,
  input  logic [ADDR_W-1:0] wa,
  input  logic [ADDR_W-1:0] wchild,
  // read port a
  input  logic [ADDR_W-1:0] ra,
  output logic [DATA_W-1:0] ra_data,
  output logic [ADDR_W-1:0] ra_left,
  output logic [ADDR_W-1:0] ra_right,
  output logic [ADDR_W-1:0] ra_count,
  output logic              ra_placed,
  // read port b
  input  logic [ADDR_W-1:0] rb,
  output logic [DATA_W-1:0] rb_data
);

  localparam logic [ADDR_W-1:0] NULL = '1;
  // index width of the N-word arrays (never wider than ADDR_W)
  localparam int unsigned IDX_W = (N > 1) ? $clog2(N) : 1;

  logic [DATA_W-1:0] data_q   [N];
  logic [ADDR_W-1:0] left_q   [N];
  logic [ADDR_W-1:0] right_q  [N];
  logic [ADDR_W-1:0] count_q  [N];
  logic [N-1:0]      placed_q;

  logic ra_ok, rb_ok, wa_ok;
  logic [IDX_W-1:0] ri, rj, wi;
  assign ri = ra[IDX_W-1:0];
  assign rj = rb[IDX_W-1:0];
  assign wi = wa[IDX_W-1:0];
  assign ra_ok = 32'(ra) < N;
  assign rb_ok = 32'(rb) < N;
  assign wa_ok = 32'(wa) < N;

  always_comb begin
    ra_data   = '0;
    ra_left   = NULL;
    ra_right  = NULL;
    ra_count  = '0;
    ra_placed = 1'b0;
    if (ra_ok) begin
      ra_data   = data_q[ri];
      ra_left   = left_q[ri];
      ra_right  = right_q[ri];
      ra_count  = count_q[ri];
      ra_placed = placed_q[ri];
    end
    rb_data = rb_ok ? data_q[rj] : '0;
  end

  always_ff @(posedge clk) begin
    if (load) begin
      for (int i = 0; i < N; i++) data_q[i] <= data_in[i];
      placed_q <= '0;
    end else if (wa_ok) begin
      if (place) begin
        placed_q[wi] <= 1'b1;
        left_q[wi]   <= NULL;
        right_q[wi]  <= NULL;
        count_q[wi]  <= ADDR_W'(1);
      end
      if (link_left)  left_q[wi]  <= wchild;
      if (link_right) right_q[wi] <= wchild;
      if (dup)        count_q[wi] <= count_q[wi] + 1'b1;
    end
  end

endmodule
