// arbited_fifo: folded FIFO whose words skip the empty cells.
//
// Two rows of HALF cells: the top row carries words from the input to the
// right, the bottom row carries them from the right end back to the output at
// the left. Each top cell (arb_top_cell) may send its word down to the bottom
// cell beneath it (arb_bot_cell) when everything ahead of the word is empty;
// in an empty FIFO the first word goes straight down into the output cell.
// The last cell of each row (the U-turn) is a plain micropipeline stage that
// only joins the full/empty chains. The chains are combinational ORs of the
// cells' C-xor-P full flags: the top chain runs right to left over the top
// row, the bottom chain right to left over the bottom row.
//
// Capacity 2*HALF words (16 with the defaults). The latency of a word depends
// on how full the FIFO is: in this clocked model an empty FIFO delivers a word
// 4 clocks after its request with TYPE 2 cells and 3 with TYPE 1; a word that
// finds the bottom row full travels all 2*HALF cells. TYPE selects the top
// cell variant (see arb_top_cell).
//
// Origin: The folded U of top and bottom cells, plain end cells and the OR
// chains of full flags follow the original arbited FIFO; HALF = 8 gives its 16
// words, and TYPE = 2 as the default is this design's choice.
module arbited_fifo #(
  parameter int unsigned WIDTH = fifo_pkg::FIFO_WIDTH,
  parameter int unsigned HALF  = 8,
  parameter int unsigned TYPE  = 2
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
  // Top row: channel into top cell i from the left (index i).
  logic             t_r [HALF];
  logic             t_a [HALF];
  logic [WIDTH-1:0] t_d [HALF];
  // Skip / U-turn channel from top cell i down to bottom cell i.
  logic             s_r [HALF];
  logic             s_a [HALF];
  logic [WIDTH-1:0] s_d [HALF];
  // Bottom row: channel out of bottom cell i to the left (index i).
  logic             b_r [HALF];
  logic             b_a [HALF];
  logic [WIDTH-1:0] b_d [HALF];
  // Status chains: tf[i] = some top cell right of i full, bf[i] = bottom cell i
  // or one right of it full.
  logic             tf  [HALF];
  logic             bf  [HALF];
  logic             t_full_unused [HALF];

  assign t_r[0] = rin;
  assign t_d[0] = din;
  assign ain    = t_a[0];
  assign rout   = b_r[0];
  assign b_a[0] = aout;
  assign dout   = b_d[0];

  for (genvar i = 0; i < HALF; i++) begin : g_col
    if (i == HALF - 1) begin : g_end
      logic tfull, bfull;
      mp_stage #(.WIDTH(WIDTH)) u_top (
        .clk, .rst_n, .req_in(t_r[i]), .ack_in(t_a[i]), .din(t_d[i]),
        .req_out(s_r[i]), .ack_out(s_a[i]), .dout(s_d[i]), .full(tfull)
      );
      mp_stage #(.WIDTH(WIDTH)) u_bot (
        .clk, .rst_n, .req_in(s_r[i]), .ack_in(s_a[i]), .din(s_d[i]),
        .req_out(b_r[i]), .ack_out(b_a[i]), .dout(b_d[i]), .full(bfull)
      );
      assign tf[i]            = tfull;   // seen by cell i-1: "right of it"
      assign bf[i]            = bfull;
      assign t_full_unused[i] = tfull;
    end else begin : g_mid
      arb_top_cell #(.WIDTH(WIDTH), .TYPE(TYPE)) u_top (
        .clk, .rst_n, .rl(t_r[i]), .al(t_a[i]), .dl(t_d[i]),
        .rr(t_r[i+1]), .ar(t_a[i+1]), .rd(s_r[i]), .ad(s_a[i]),
        .dout(t_d[i+1]), .dskip(s_d[i]),
        .top_full_in(tf[i+1]), .bot_full_in(bf[i]),
        .top_full_out(tf[i]), .full(t_full_unused[i])
      );
      arb_bot_cell #(.WIDTH(WIDTH)) u_bot (
        .clk, .rst_n,
        .rr_in(b_r[i+1]), .ar_in(b_a[i+1]), .dr(b_d[i+1]),
        .rt_in(s_r[i]), .at_in(s_a[i]), .dt(s_d[i]),
        .rout(b_r[i]), .aout(b_a[i]), .dout(b_d[i]),
        .bot_full_in(bf[i+1]), .bot_full_out(bf[i])
      );
    end
  end
endmodule
