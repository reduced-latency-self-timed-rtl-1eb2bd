// tree_fifo: binary tree FIFO.
//
// A tree of LEVELS levels is a toggle-distribute cell feeding two trees of
// LEVELS-1 levels, whose outputs a toggle-merge cell collects in the same
// alternating order. A tree of 0 levels is a leaf: a linear FIFO of LEAF_DEPTH
// stages (0 = a plain connection). Every word passes through LEVELS
// distribute cells, one leaf and LEVELS merge cells, so the path grows with
// log2 of the capacity.
//
// Capacity = 2^(LEVELS+1) - 2 + 2^LEVELS * LEAF_DEPTH:
//   LEVELS=2, LEAF_DEPTH=0 -> 6 (three distribute, three merge cells)
//   LEVELS=3, LEAF_DEPTH=0 -> 14 (the default)
//   LEVELS=2, LEAF_DEPTH=1 -> 10 (single-stage leaves shared by both trees)
//
// The tree is laid out heap-style: node n of level l feeds nodes 2n and 2n+1
// of level l+1; channel (l, n) has flat index 2^l - 1 + n. Distribute
// channels run from the root down to the leaves, merge channels from the
// leaves back up to the root, so the structure is exactly the recursive one.
//
// Timing in this clocked model: 3*LEVELS + LEAF_DEPTH clocks through an empty
// tree (a distribute cell costs two clocks: latch, then toggle).
//
// Origin: The binary tree of distribute cells, leaves and merge cells, its
// 6/14-word sizes and leaves of extra linear stages follow the original tree
// FIFO; the heap-indexed generate layout is this design's way of writing it.
module tree_fifo #(
  parameter int unsigned WIDTH      = fifo_pkg::FIFO_WIDTH,
  parameter int unsigned LEVELS     = 3,
  parameter int unsigned LEAF_DEPTH = 0
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             rin,
  output logic             ain,
  input  logic [WIDTH-1:0] din,
  output logic             rout,
  input  logic             aout,
  output logic [WIDTH-1:0] dout
);
  localparam int unsigned NCH = (1 << (LEVELS + 1)) - 1;   // channels per side

  // Distribute side: channel into node (l, n); level LEVELS feeds the leaves.
  logic             dr [NCH];
  logic             da [NCH];
  logic [WIDTH-1:0] dd [NCH];
  // Merge side: channel out of node (l, n); level LEVELS comes from the leaves.
  logic             mr [NCH];
  logic             ma [NCH];
  logic [WIDTH-1:0] md [NCH];

  assign dr[0] = rin;
  assign dd[0] = din;
  assign ain   = da[0];
  assign rout  = mr[0];
  assign ma[0] = aout;
  assign dout  = md[0];

  for (genvar l = 0; l < LEVELS; l++) begin : g_level
    for (genvar n = 0; n < (1 << l); n++) begin : g_node
      localparam int unsigned ME = (1 << l) - 1 + n;
      localparam int unsigned C0 = (1 << (l + 1)) - 1 + 2 * n;
      localparam int unsigned C1 = C0 + 1;

      tree_dist_cell #(.WIDTH(WIDTH)) u_dist (
        .clk, .rst_n, .rin(dr[ME]), .ain(da[ME]), .din(dd[ME]),
        .rout0(dr[C0]), .aout0(da[C0]), .rout1(dr[C1]), .aout1(da[C1]),
        .dout(dd[C0])
      );
      assign dd[C1] = dd[C0];

      tree_merge_cell #(.WIDTH(WIDTH)) u_merge (
        .clk, .rst_n,
        .rin0(mr[C0]), .ain0(ma[C0]), .din0(md[C0]),
        .rin1(mr[C1]), .ain1(ma[C1]), .din1(md[C1]),
        .rout(mr[ME]), .aout(ma[ME]), .dout(md[ME])
      );
    end
  end

  for (genvar k = 0; k < (1 << LEVELS); k++) begin : g_leaf
    localparam int unsigned LF = (1 << LEVELS) - 1 + k;
    linear_fifo #(.WIDTH(WIDTH), .DEPTH(LEAF_DEPTH)) u_leaf (
      .clk, .rst_n, .rin(dr[LF]), .ain(da[LF]), .din(dd[LF]),
      .rout(mr[LF]), .aout(ma[LF]), .dout(md[LF])
    );
  end
endmodule
