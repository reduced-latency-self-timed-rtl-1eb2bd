// arb_top_cell: input-side (top-row) cell of the arbited FIFO.
//
// The cell decides whether a word moves on to the right in the top row or
// skips down into the bottom-row cell beneath it. The skip is safe only if
// nothing older is still ahead: no top cell to the right holds a word
// (top_full_in) and neither the cell beneath nor any bottom cell to its right
// holds one (bot_full_in). Those status chains change while the cell looks at
// them, so the decision is taken by a q_select.
//
// TYPE 2: the word is first captured in this cell's latch (C-element with the
// inverted pass state, acknowledged to the left at once); the capture then
// asks the q_select, which sends the request right (blocked) or down (free).
// Both outputs carry the latched word.
// TYPE 1: the incoming request asks the q_select before any latching; if free,
// the request and the incoming data go straight down and the left neighbour is
// acknowledged only when the bottom cell has taken the word; if blocked, the
// word is latched here and moves right. This saves a stage of latency at the
// cost of a slower input acknowledge. For TYPE 1 this cell's own latch is part
// of the blocking condition, so a word never overtakes one still held here
// (this design's choice).
//
// full = C xor P of the latch; top_full_out = full | top_full_in is the chain
// passed to the left. Timing: TYPE 2 captures one clock after rl and requests
// two clocks later; TYPE 1 requests down or enters the latch two clocks after rl.
//
// Origin: The two top-cell types (latch then decide, or decide then latch) and
// the skip down when nothing older is ahead follow the original arbited FIFO;
// adding the cell's own full state to the TYPE 1 blocking condition is this
// design's choice.
module arb_top_cell #(
  parameter int unsigned WIDTH = fifo_pkg::FIFO_WIDTH,
  parameter int unsigned TYPE  = 2
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             rl,
  output logic             al,
  input  logic [WIDTH-1:0] dl,
  output logic             rr,
  input  logic             ar,
  output logic             rd,
  input  logic             ad,
  output logic [WIDTH-1:0] dout,
  output logic [WIDTH-1:0] dskip,
  input  logic             top_full_in,
  input  logic             bot_full_in,
  output logic             top_full_out,
  output logic             full
);
  logic c, p, fire, blocked;

  assign top_full_out = full | top_full_in;
  assign full         = c ^ p;

  always_ff @(posedge clk) begin
    if (!rst_n)    dout <= '0;
    else if (fire) dout <= dl;
  end

  if (TYPE == 1) begin : g_type1
    logic q_t;   // blocked: request enters this cell's latch

    assign blocked = top_full_in | bot_full_in | full;

    q_select u_qsel (.clk, .rst_n, .rin(rl), .sel(blocked), .tout(q_t), .fout(rd));
    c_element #(.INV_B(1'b1)) u_c (.clk, .rst_n, .a(q_t), .b(p), .q(c), .fire(fire));

    always_ff @(posedge clk) begin
      if (!rst_n) p <= 1'b0;
      else        p <= ar;
    end

    assign rr    = c;
    assign al    = c ^ ad;
    assign dskip = dl;
  end else begin : g_type2
    assign blocked = top_full_in | bot_full_in;

    c_element #(.INV_B(1'b1)) u_c (.clk, .rst_n, .a(rl), .b(p), .q(c), .fire(fire));
    q_select u_qsel (.clk, .rst_n, .rin(c), .sel(blocked), .tout(rr), .fout(rd));

    always_ff @(posedge clk) begin
      if (!rst_n) p <= 1'b0;
      else        p <= ar ^ ad;
    end

    assign al    = c;
    assign dskip = dout;
  end
endmodule
