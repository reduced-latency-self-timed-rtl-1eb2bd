// q_select: select element whose SEL input need not be bundled with the request.
//
// Used by the arbited FIFO to look at full/empty status that may be changing
// while it is looked at. Following the gate-array version of the element, the
// level `sel` is sampled into a first latch when the request transition
// arrives, copied into a second latch a clock later so that a sampling
// conflict has time to settle, and the delayed request is then steered by the
// settled value: a transition on tout if sel was 1, on fout if it was 0.
// In synchronous logic the sampled status is already settled; the two stages
// are kept so the element's delay matches its structure.
//
// Interface: rin is a transition input, sel a level; tout/fout transitions.
// Timing: the output transition appears two clocks after rin. Only one request
// may be in flight (the two-phase protocol of the users guarantees it).
//
// Origin: A Q-select made of two latches, the first sampling the select level
// on the request and the second copying it, follows the simpler of the
// original Q-select circuits; the arbiter-based variant is not built, and
// sampling a synchronous level cannot go metastable here.
module q_select (
  input  logic clk,
  input  logic rst_n,
  input  logic rin,
  input  logic sel,
  output logic tout,
  output logic fout
);
  logic r1, s1;   // first latch: request seen, sampled sel

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      r1   <= 1'b0;
      s1   <= 1'b0;
      tout <= 1'b0;
      fout <= 1'b0;
    end else begin
      if (rin != r1) begin
        r1 <= rin;
        s1 <= sel;
      end
      if (r1 != (tout ^ fout)) begin
        if (s1) tout <= ~tout;
        else    fout <= ~fout;
      end
    end
  end
endmodule
