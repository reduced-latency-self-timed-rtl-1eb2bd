// sq_top_select: top-row select cell of the square FIFO.
//
// The cell latches a word offered from the left and sends it either to the
// right or down into its column, according to SEL (0 = right after clear).
// The acknowledge it gives to the left comes in two kinds: ALR ("send your
// next word right") when this word goes right, ALD ("send your next word
// down") when it goes down. The acknowledge from the right also comes in two
// kinds: ARD sets SEL so the next word is dropped here; the acknowledge from
// below (AD) clears SEL again. Together the cells pass a "drop position" one
// cell to the left per word without sending any level signal between them.
//
// Interface: left channel rl/dl in, alr/ald out; right channel rr out,
// arr/ard in; down channel rd out, ad in; dout is the latched word for both.
// Timing: capture, acknowledge and outgoing request all change on the clock
// edge one clock after rl; the pass state follows the acknowledges by one
// clock. Every wire is a two-phase transition signal, 0 after clear.
//
// Origin: The select cell with ALR/ALD acknowledges to the left, ARR/ARD from
// the right setting SEL and AD from below clearing it follows the original
// square FIFO; the original text says the choice follows the last
// acknowledgment from the left, which is read here as from the right, as the
// rest of its description requires.
module sq_top_select #(
  parameter int unsigned WIDTH = fifo_pkg::FIFO_WIDTH
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             rl,
  output logic             alr,
  output logic             ald,
  input  logic [WIDTH-1:0] dl,
  output logic             rr,
  input  logic             arr,
  input  logic             ard,
  output logic             rd,
  input  logic             ad,
  output logic [WIDTH-1:0] dout
);
  logic arr_q, ard_q, ad_q, sel;
  logic c, p, take;

  assign c    = alr ^ ald;              // capture count parity
  assign p    = arr_q ^ ard_q ^ ad_q;   // pass count parity
  assign take = (c == p) && (rl != c);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      {alr, ald, rr, rd}    <= '0;
      {arr_q, ard_q, ad_q}  <= '0;
      sel                   <= 1'b0;
      dout                  <= '0;
    end else begin
      arr_q <= arr;
      ard_q <= ard;
      ad_q  <= ad;
      if (ard != ard_q)   sel <= 1'b1;
      else if (ad != ad_q) sel <= 1'b0;
      if (take) begin
        dout <= dl;
        if (sel) begin
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
