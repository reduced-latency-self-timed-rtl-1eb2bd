// tree_fifo16: 16-word tree FIFO.
//
// The 14-word, three-level tree (tree_fifo) with one plain micropipeline stage
// in front and one behind, to match the 16-word capacity of the other FIFOs.
// A word passes through 8 cells (2 plain, 3 distribute, 3 merge) instead of
// 16. Timing in this clocked model: 11 clocks through an empty FIFO.
//
// Origin: Padding the 14-word tree with one stage at each end to reach 16
// words is this design's choice of how to make the tree the same size as the
// other FIFOs.
module tree_fifo16 #(
  parameter int unsigned WIDTH = fifo_pkg::FIFO_WIDTH
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
  logic             r1, a1, r2, a2;
  logic [WIDTH-1:0] d1, d2;
  logic             full_in_unused, full_out_unused;

  mp_stage #(.WIDTH(WIDTH)) u_in (
    .clk, .rst_n, .req_in(rin), .ack_in(ain), .din,
    .req_out(r1), .ack_out(a1), .dout(d1), .full(full_in_unused)
  );

  tree_fifo #(.WIDTH(WIDTH), .LEVELS(3), .LEAF_DEPTH(0)) u_tree (
    .clk, .rst_n, .rin(r1), .ain(a1), .din(d1), .rout(r2), .aout(a2), .dout(d2)
  );

  mp_stage #(.WIDTH(WIDTH)) u_out (
    .clk, .rst_n, .req_in(r2), .ack_in(a2), .din(d2),
    .req_out(rout), .ack_out(aout), .dout, .full(full_out_unused)
  );
endmodule
