// toggle_merge: N-way ordered merge at the output of the parallel FIFO.
//
// Each arm's request passes through its own C-element. The other input of
// C-element k is toggle output k-1, and of C-element 0 the inverted last toggle
// output, so C-element 0 is "half-cocked" after clear and only arm 0's first
// request gets through. The C-element outputs are XOR-merged into rout. The
// output acknowledge drives an N-way toggle: its transition on output k
// acknowledges arm k and enables C-element k+1, so words leave in the order
// they were distributed. The toggle's level-coded position selects the data
// mux (the XOR-network trick that turns transitions into a mux select).
//
// Timing: rout toggles one clock after the expected arm's request (if it is
// enabled); the toggle steps one clock after aout.
//
// Origin: One C-element per arm enabled by the previous toggle output, the
// first one half-cocked, the XOR of the gate outputs and the toggle-steered
// mux follow the original merge; the clocked elements are this design's
// modelling choice.
module toggle_merge #(
  parameter int unsigned WIDTH = fifo_pkg::FIFO_WIDTH,
  parameter int unsigned N     = 4
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic [N-1:0]              rin,
  output logic [N-1:0]              ain,
  input  logic [N-1:0][WIDTH-1:0]   din,
  output logic                      rout,
  input  logic                      aout,
  output logic [WIDTH-1:0]          dout
);
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;

  logic [N-1:0]  tgl;
  logic [IW-1:0] sel;
  logic [N-1:0]  cq;
  logic [N-1:0]  fire_unused;

  toggle_n #(.N(N)) u_toggle (.clk, .rst_n, .tin(aout), .tout(tgl), .idx(sel));

  for (genvar k = 0; k < N; k++) begin : g_gate
    if (k == 0) begin : g_first
      c_element #(.INV_B(1'b1)) u_c (.clk, .rst_n, .a(rin[0]), .b(tgl[N-1]), .q(cq[0]), .fire(fire_unused[0]));
    end else begin : g_rest
      c_element #(.INV_B(1'b0)) u_c (.clk, .rst_n, .a(rin[k]), .b(tgl[k-1]), .q(cq[k]), .fire(fire_unused[k]));
    end
  end

  assign rout = ^cq;
  assign ain  = tgl;
  assign dout = din[sel];
endmodule
