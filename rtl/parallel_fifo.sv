// parallel_fifo: WAYS linear FIFOs side by side between a toggle-distribute
// and a toggle-merge.
//
// Words are handed to the arms in a fixed rotation and collected in the same
// rotation, so order is kept while each word passes through only ARM_DEPTH
// stages instead of WAYS*ARM_DEPTH. Capacity is WAYS*ARM_DEPTH words (16 with
// the defaults). Distribute and merge circuits store no data.
//
// Timing in this clocked model: an empty FIFO delivers a word ARM_DEPTH + 2
// clocks after its request (toggle, arm stages, merge C-element).
//
// Origin: Four linear arms of four stages between a toggle distributor and a
// toggle merger follow the original parallel FIFO; the WAYS and ARM_DEPTH
// parameters are this design's generalisation.
module parallel_fifo #(
  parameter int unsigned WIDTH     = fifo_pkg::FIFO_WIDTH,
  parameter int unsigned WAYS      = 4,
  parameter int unsigned ARM_DEPTH = 4
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
  logic [WAYS-1:0]             arm_rin, arm_ain, arm_rout, arm_aout;
  logic [WAYS-1:0][WIDTH-1:0]  arm_dout;

  toggle_distribute #(.N(WAYS)) u_dist (
    .clk, .rst_n, .rin, .ain, .rout(arm_rin), .aout(arm_ain)
  );

  for (genvar k = 0; k < WAYS; k++) begin : g_arm
    linear_fifo #(.WIDTH(WIDTH), .DEPTH(ARM_DEPTH)) u_arm (
      .clk, .rst_n,
      .rin(arm_rin[k]), .ain(arm_ain[k]), .din(din),
      .rout(arm_rout[k]), .aout(arm_aout[k]), .dout(arm_dout[k])
    );
  end

  toggle_merge #(.WIDTH(WIDTH), .N(WAYS)) u_merge (
    .clk, .rst_n, .rin(arm_rout), .ain(arm_aout), .din(arm_dout),
    .rout, .aout, .dout
  );
endmodule
