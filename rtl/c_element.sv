// c_element: Muller C-element, the control gate of every FIFO stage.
//
// The output copies the inputs when they agree and holds its value when they
// differ. With INV_B set the second input is inverted ("half-cocked" when the
// inputs start at 0), which is how a micropipeline stage combines its incoming
// request with the pass state of its own latch. INIT is the value after the
// master clear.
//
// Timing: the gate is a flip-flop; when the (effective) inputs agree and differ
// from q, q takes their value at the next clock edge. `fire` is high in the
// cycle before q changes, so a data latch can capture in step with it. The
// clocked form is this library's way of simulating and synthesizing a
// self-timed gate: one clock stands for one gate delay.
//
// Origin: The Muller C-element and its half-cocked (inverted-input) form
// follow the original micropipeline circuits; making it a clocked register,
// one element delay per clock, is this design's modelling choice.
module c_element #(
  parameter bit INV_B = 1'b0,
  parameter bit INIT  = 1'b0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic a,
  input  logic b,
  output logic q,
  output logic fire
);
  logic b_eff;

  assign b_eff = b ^ INV_B;
  assign fire  = (a == b_eff) && (a != q);

  always_ff @(posedge clk) begin
    if (!rst_n)    q <= INIT;
    else if (fire) q <= a;
  end
endmodule
