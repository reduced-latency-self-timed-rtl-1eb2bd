// tree_dist_cell: toggle-distribute FIFO stage of the tree FIFO.
//
// Unlike the parallel FIFO's distributor this cell stores a word. A C-element
// (request in, inverted pass state) captures the input word into the latch;
// the capture transition then goes through a two-way toggle, so successive
// words are offered alternately on output 0 and output 1. The two output
// acknowledges are XOR-merged into the latch's pass input. Both outputs share
// the latched data bus.
//
// Timing: capture one clock after rin; the output request one clock later
// (toggle); the pass state follows the acknowledges by one clock.
//
// Origin: A storing cell whose latch request is sent alternately to two
// outputs through a two-way toggle follows the original tree distribute cell;
// the clocked toggle and registered latch are this design's modelling choices.
module tree_dist_cell #(
  parameter int unsigned WIDTH = fifo_pkg::FIFO_WIDTH
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             rin,
  output logic             ain,
  input  logic [WIDTH-1:0] din,
  output logic             rout0,
  input  logic             aout0,
  output logic             rout1,
  input  logic             aout1,
  output logic [WIDTH-1:0] dout
);
  logic c, p, fire;
  logic idx_unused;

  c_element #(.INV_B(1'b1)) u_c (.clk, .rst_n, .a(rin), .b(p), .q(c), .fire(fire));
  toggle_n #(.N(2)) u_toggle (.clk, .rst_n, .tin(c), .tout({rout1, rout0}), .idx(idx_unused));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      p    <= 1'b0;
      dout <= '0;
    end else begin
      p <= aout0 ^ aout1;
      if (fire) dout <= din;
    end
  end

  assign ain = c;
endmodule
