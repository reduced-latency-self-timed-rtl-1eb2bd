// arb_bot_cell: output-side (bottom-row) cell of the arbited FIFO.
//
// A FIFO stage with two inputs: the next bottom cell to the right (words
// flowing towards the exit) and the skip path from the top cell above. A Call
// on the input side accepts whichever requests and returns the acknowledge to
// it; a mux-latch, steered by which input is being served, captures the word.
// No arbitration is needed: a top cell skips down only when this cell and all
// bottom cells to its right are empty, so the two inputs are never requesting
// at once (an assertion checks this).
//
// full = C xor P of the latch; bot_full_out = full | bot_full_in is the chain
// the top cell above and the bottom cells to the left look at.
// Timing: capture one clock after a request when the latch is empty; the pass
// state follows aout by one clock.
//
// Origin: A bottom cell that accepts from the right or from the skip path
// above and never sees both at once follows the original arbited FIFO; the
// exclusivity assertion is this design's addition.
module arb_bot_cell #(
  parameter int unsigned WIDTH = fifo_pkg::FIFO_WIDTH
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             rr_in,
  output logic             ar_in,
  input  logic [WIDTH-1:0] dr,
  input  logic             rt_in,
  output logic             at_in,
  input  logic [WIDTH-1:0] dt,
  output logic             rout,
  input  logic             aout,
  output logic [WIDTH-1:0] dout,
  input  logic             bot_full_in,
  output logic             bot_full_out
);
  logic c, p, pend_r, pend_t, empty;

  assign pend_r       = (rr_in != ar_in);
  assign pend_t       = (rt_in != at_in);
  assign empty        = (c == p);
  assign rout         = c;
  assign bot_full_out = (c ^ p) | bot_full_in;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      {c, p, ar_in, at_in} <= '0;
      dout                 <= '0;
    end else begin
      p <= aout;
      if (empty && pend_r) begin
        c     <= ~c;
        ar_in <= rr_in;
        dout  <= dr;
      end else if (empty && pend_t) begin
        c     <= ~c;
        at_in <= rt_in;
        dout  <= dt;
      end
    end
  end

  a_exclusive: assert property (@(posedge clk) disable iff (!rst_n) !(pend_r && pend_t));
endmodule
