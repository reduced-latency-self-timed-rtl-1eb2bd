// toggle_n: N-way transition toggle.
//
// Every transition on tin produces one transition on an output, taking
// tout[0], tout[1], ... tout[N-1] in turn and then starting again at tout[0].
// A chain of alternately gated latches with one inversion in the loop does
// this; the same sequence is an N-bit Johnson (twisted-ring) counter that
// steps on both edges of its input: tout[0] <= ~tout[N-1], tout[k] <= tout[k-1].
// Each step flips exactly one bit, so the XOR of all outputs counts the input
// transitions seen, and a new input transition is simply tin != ^tout. The
// construction works for odd and even N alike.
//
// idx is the level-coded index of the output that fires next (the role of the
// XOR network that drives a mux select in the merge circuits).
//
// Timing: the outputs step one clock after the input transition. Clear sets
// all outputs to 0, as after the master clear.
//
// Origin: An N-way transition toggle built as a Johnson counter stepping on
// both input edges follows the original; for odd N this version wraps its
// state directly instead of using an extra hidden position, which is this
// design's choice.
module toggle_n #(
  parameter int unsigned N = 4
) (
  input  logic                               clk,
  input  logic                               rst_n,
  input  logic                               tin,
  output logic [N-1:0]                       tout,
  output logic [(N > 1 ? $clog2(N) : 1)-1:0] idx
);
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;

  logic step;
  assign step = (tin != ^tout);

  always_ff @(posedge clk) begin
    if (!rst_n)    tout <= '0;
    else if (step) tout <= {tout[N-2:0], ~tout[N-1]};
  end

  // Bit k flips next when it differs from its left neighbour (bit 0: when it
  // equals the last bit).
  always_comb begin
    idx = '0;
    for (int unsigned k = 0; k < N; k++) begin
      if (k == 0) begin
        if (tout[0] == tout[N-1]) idx = IW'(k);
      end else if (tout[k] != tout[k-1]) begin
        idx = IW'(k);
      end
    end
  end
endmodule
