// fifo_suite: the family of 16-word self-timed FIFOs, side by side.
//
// Six independent FIFOs with the same capacity and the same two-phase
// bundled-data interface, differing only in how a word travels from input to
// output:
//   lin   the 16-stage linear micropipeline (baseline)
//   par   the parallel FIFO: four 4-stage arms
//   tree  the 16-word tree FIFO
//   sq    the square FIFO: 4 columns of 2 stages
//   arb1  the arbited FIFO with type-1 top cells
//   arb2  the arbited FIFO with type-2 top cells
//
// Each FIFO has its own input channel (<x>_rin toggles per word, <x>_ain
// toggles back when the word is taken, <x>_din held meanwhile) and output
// channel (<x>_rout, <x>_aout, <x>_dout). They share only the clock and the
// master clear. The clock is the time step of the control elements: each
// C-element, toggle, select and latch-pass flip-flop changes at most once per
// clock, so latencies in clocks count control-element delays. Empty-FIFO
// latencies in this model: lin 16, par 6, tree 11, sq 7, arb1 3, arb2 4.
//
// Origin: The six FIFOs are the ones the original work compares at 16 words;
// putting them side by side in one top with separate channels is this design's
// choice.
module fifo_suite #(
  parameter int unsigned WIDTH = fifo_pkg::FIFO_WIDTH
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             lin_rin,
  output logic             lin_ain,
  input  logic [WIDTH-1:0] lin_din,
  output logic             lin_rout,
  input  logic             lin_aout,
  output logic [WIDTH-1:0] lin_dout,
  input  logic             par_rin,
  output logic             par_ain,
  input  logic [WIDTH-1:0] par_din,
  output logic             par_rout,
  input  logic             par_aout,
  output logic [WIDTH-1:0] par_dout,
  input  logic             tree_rin,
  output logic             tree_ain,
  input  logic [WIDTH-1:0] tree_din,
  output logic             tree_rout,
  input  logic             tree_aout,
  output logic [WIDTH-1:0] tree_dout,
  input  logic             sq_rin,
  output logic             sq_ain,
  input  logic [WIDTH-1:0] sq_din,
  output logic             sq_rout,
  input  logic             sq_aout,
  output logic [WIDTH-1:0] sq_dout,
  input  logic             arb1_rin,
  output logic             arb1_ain,
  input  logic [WIDTH-1:0] arb1_din,
  output logic             arb1_rout,
  input  logic             arb1_aout,
  output logic [WIDTH-1:0] arb1_dout,
  input  logic             arb2_rin,
  output logic             arb2_ain,
  input  logic [WIDTH-1:0] arb2_din,
  output logic             arb2_rout,
  input  logic             arb2_aout,
  output logic [WIDTH-1:0] arb2_dout
);

  linear_fifo #(.WIDTH(WIDTH), .DEPTH(16)) u_lin (
    .clk, .rst_n, .rin(lin_rin), .ain(lin_ain), .din(lin_din),
    .rout(lin_rout), .aout(lin_aout), .dout(lin_dout)
  );

  parallel_fifo #(.WIDTH(WIDTH), .WAYS(4), .ARM_DEPTH(4)) u_par (
    .clk, .rst_n, .rin(par_rin), .ain(par_ain), .din(par_din),
    .rout(par_rout), .aout(par_aout), .dout(par_dout)
  );

  tree_fifo16 #(.WIDTH(WIDTH)) u_tree (
    .clk, .rst_n, .rin(tree_rin), .ain(tree_ain), .din(tree_din),
    .rout(tree_rout), .aout(tree_aout), .dout(tree_dout)
  );

  square_fifo #(.WIDTH(WIDTH), .COLS(4), .COL_DEPTH(2)) u_sq (
    .clk, .rst_n, .rin(sq_rin), .ain(sq_ain), .din(sq_din),
    .rout(sq_rout), .aout(sq_aout), .dout(sq_dout)
  );

  arbited_fifo #(.WIDTH(WIDTH), .HALF(8), .TYPE(1)) u_arb1 (
    .clk, .rst_n, .rin(arb1_rin), .ain(arb1_ain), .din(arb1_din),
    .rout(arb1_rout), .aout(arb1_aout), .dout(arb1_dout)
  );

  arbited_fifo #(.WIDTH(WIDTH), .HALF(8), .TYPE(2)) u_arb2 (
    .clk, .rst_n, .rin(arb2_rin), .ain(arb2_ain), .din(arb2_din),
    .rout(arb2_rout), .aout(arb2_aout), .dout(arb2_dout)
  );
endmodule
