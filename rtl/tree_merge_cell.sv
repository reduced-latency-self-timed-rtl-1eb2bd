// tree_merge_cell: toggle-merge FIFO stage of the tree FIFO.
//
// The cell takes words alternately from input 0 (first after clear: its gate
// is half-cocked) and input 1 into a mux-latch. The level select of the mux
// follows which input is due next; it flips each time a word is latched, the
// transition-to-level trick done with an XOR in gates. The acknowledge of the
// capture is routed back only to the input that was latched (the Call, or the
// equivalent toggle-merge pair). The output is an ordinary two-phase channel.
//
// Timing: capture one clock after the expected input's request when the latch
// is empty; the pass state follows aout by one clock.
//
// Origin: A cell that takes words alternately from its two inputs into a mux-
// latch, starting with input 0, follows the original tree merge cell; the
// clocked control is this design's modelling choice.
module tree_merge_cell #(
  parameter int unsigned WIDTH = fifo_pkg::FIFO_WIDTH
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             rin0,
  output logic             ain0,
  input  logic [WIDTH-1:0] din0,
  input  logic             rin1,
  output logic             ain1,
  input  logic [WIDTH-1:0] din1,
  output logic             rout,
  input  logic             aout,
  output logic [WIDTH-1:0] dout
);
  logic c, p, sel, empty, take;

  assign empty = (c == p);
  assign take  = empty && (sel ? (rin1 != ain1) : (rin0 != ain0));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      c    <= 1'b0;
      p    <= 1'b0;
      sel  <= 1'b0;
      ain0 <= 1'b0;
      ain1 <= 1'b0;
      dout <= '0;
    end else begin
      p <= aout;
      if (take) begin
        c    <= ~c;
        sel  <= ~sel;
        dout <= sel ? din1 : din0;
        if (sel) ain1 <= rin1;
        else     ain0 <= rin0;
      end
    end
  end

  assign rout = c;
endmodule
