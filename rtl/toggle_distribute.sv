// toggle_distribute: N-way request distributor at the input of the parallel FIFO.
//
// The input request goes through an N-way toggle, so successive words are
// offered to arm 0, arm 1, ... arm N-1 in turn. The data bus is shared by all
// arms; only the arm whose request toggles captures it. The acknowledges of
// the arms are merged by an XOR into the input acknowledge. The circuit holds
// no data, only the toggle state.
//
// Timing: rout[k] toggles one clock after rin; ain follows the arm's ack
// combinationally.
//
// Origin: Distributing requests through an N-way toggle and XORing the arm
// acknowledges back follows the original parallel FIFO; the clocked toggle is
// this design's modelling choice.
module toggle_distribute #(
  parameter int unsigned N = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         rin,
  output logic         ain,
  output logic [N-1:0] rout,
  input  logic [N-1:0] aout
);
  logic [(N > 1 ? $clog2(N) : 1)-1:0] idx_unused;

  toggle_n #(.N(N)) u_toggle (.clk, .rst_n, .tin(rin), .tout(rout), .idx(idx_unused));

  assign ain = ^aout;
endmodule
