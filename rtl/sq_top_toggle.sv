// sq_top_toggle: next-to-last top-row cell of the square FIFO.
//
// Latches a word from the left and sends the words alternately right (to the
// corner cell, first after clear) and down into its column, using a two-way
// toggle. The acknowledge to the left tells the left neighbour where its next
// word must go: ALR when this word goes right, ALD when it goes down.
//
// Interface: left channel rl/dl in, alr/ald out; right channel rr out, ar in
// (the corner cell has a single acknowledge); down channel rd out, ad in.
// Timing as sq_top_select: capture and requests one clock after rl.
//
// Origin: A toggle cell next to the corner that alternates right and down and
// signals the kind of each word in its left acknowledge follows the original
// square FIFO; which way it goes first is this design's reading of the drop
// order.
module sq_top_toggle #(
  parameter int unsigned WIDTH = fifo_pkg::FIFO_WIDTH
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             rl,
  output logic             alr,
  output logic             ald,
  input  logic [WIDTH-1:0] dl,
  output logic             rr,
  input  logic             ar,
  output logic             rd,
  input  logic             ad,
  output logic [WIDTH-1:0] dout
);
  logic p, c, tgl, take;

  assign c    = alr ^ ald;
  assign take = (c == p) && (rl != c);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      {alr, ald, rr, rd} <= '0;
      p                  <= 1'b0;
      tgl                <= 1'b0;
      dout               <= '0;
    end else begin
      p <= ar ^ ad;
      if (take) begin
        dout <= dl;
        tgl  <= ~tgl;
        if (tgl) begin
          ald <= ~ald;
          rd  <= ~rd;
        end else begin
          alr <= ~alr;
          rr  <= ~rr;
        end
      end
    end
  end
endmodule
