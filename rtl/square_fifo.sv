// square_fifo: square-array FIFO with an L-shaped data path.
//
// The top row is a FIFO that distributes words into COLS vertical linear FIFOs
// of COL_DEPTH stages; the bottom row is a FIFO that collects them again. The
// first word after clear travels along the whole top row and drops into the
// rightmost column, the next into the column to its left, and so on; then the
// cycle repeats. The bottom row takes words from the columns in the same
// order and delivers them at its right end. No level signal passes between
// cells: the "drop position" travels as the kind of each acknowledge in the
// top row (ALR/ALD) and the kind of each request in the bottom row
// (ROUTH/ROUTV).
//
// Top row, left to right: select cells, one toggle cell, a plain corner stage.
// Bottom row, left to right: a plain corner stage, one toggle-merge cell,
// select-merge cells; the last cell's two request kinds are XOR-merged into
// rout. COLS must be at least 2. Capacity = 2*COLS + COLS*COL_DEPTH (16 with
// the defaults). Every word passes through COLS + COL_DEPTH + 1 cells, which
// in this clocked model is also the latency of an empty FIFO in clocks.
//
// Origin: The top row, vertical columns and bottom row, the rightmost-column-
// first drop order and the L-shaped path follow the original square FIFO;
// COL_DEPTH = 2, making 4 + 8 + 4 = 16 words, is this design's assumption.
module square_fifo #(
  parameter int unsigned WIDTH     = fifo_pkg::FIFO_WIDTH,
  parameter int unsigned COLS      = 4,
  parameter int unsigned COL_DEPTH = 2
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
  // Top row: channel into top cell i from the left.
  logic             h_r   [COLS];
  logic             h_alr [COLS];
  logic             h_ald [COLS];
  logic [WIDTH-1:0] h_d   [COLS];
  // Top cell i -> column i, and column i -> bottom cell i.
  logic             v_r [COLS], v_a [COLS];
  logic [WIDTH-1:0] v_d [COLS];
  logic             w_r [COLS], w_a [COLS];
  logic [WIDTH-1:0] w_d [COLS];
  // Bottom row: channel into bottom cell i from the left (index COLS = output).
  logic             b_rh [COLS+1];
  logic             b_rv [COLS+1];
  logic             b_a  [COLS+1];
  logic [WIDTH-1:0] b_d  [COLS+1];

  assign h_r[0] = rin;
  assign h_d[0] = din;
  assign ain    = h_alr[0] ^ h_ald[0];

  // ---------------- top row ----------------
  for (genvar i = 0; i < COLS; i++) begin : g_top
    if (i == COLS - 1) begin : g_corner
      logic full_unused;
      mp_stage #(.WIDTH(WIDTH)) u_cell (
        .clk, .rst_n, .req_in(h_r[i]), .ack_in(h_alr[i]), .din(h_d[i]),
        .req_out(v_r[i]), .ack_out(v_a[i]), .dout(v_d[i]), .full(full_unused)
      );
      assign h_ald[i] = 1'b0;
    end else if (i == COLS - 2) begin : g_toggle
      sq_top_toggle #(.WIDTH(WIDTH)) u_cell (
        .clk, .rst_n, .rl(h_r[i]), .alr(h_alr[i]), .ald(h_ald[i]), .dl(h_d[i]),
        .rr(h_r[i+1]), .ar(h_alr[i+1] ^ h_ald[i+1]),
        .rd(v_r[i]), .ad(v_a[i]), .dout(v_d[i])
      );
      assign h_d[i+1] = v_d[i];
    end else begin : g_select
      sq_top_select #(.WIDTH(WIDTH)) u_cell (
        .clk, .rst_n, .rl(h_r[i]), .alr(h_alr[i]), .ald(h_ald[i]), .dl(h_d[i]),
        .rr(h_r[i+1]), .arr(h_alr[i+1]), .ard(h_ald[i+1]),
        .rd(v_r[i]), .ad(v_a[i]), .dout(v_d[i])
      );
      assign h_d[i+1] = v_d[i];
    end
  end

  // ---------------- columns ----------------
  for (genvar i = 0; i < COLS; i++) begin : g_col
    linear_fifo #(.WIDTH(WIDTH), .DEPTH(COL_DEPTH)) u_col (
      .clk, .rst_n, .rin(v_r[i]), .ain(v_a[i]), .din(v_d[i]),
      .rout(w_r[i]), .aout(w_a[i]), .dout(w_d[i])
    );
  end

  // ---------------- bottom row ----------------
  for (genvar i = 0; i < COLS; i++) begin : g_bot
    if (i == 0) begin : g_corner
      logic full_unused;
      mp_stage #(.WIDTH(WIDTH)) u_cell (
        .clk, .rst_n, .req_in(w_r[i]), .ack_in(w_a[i]), .din(w_d[i]),
        .req_out(b_rh[1]), .ack_out(b_a[1]), .dout(b_d[1]), .full(full_unused)
      );
      assign b_rv[1] = 1'b0;
      // Nothing enters the bottom row from the left of the corner.
      assign b_rh[0] = 1'b0;
      assign b_rv[0] = 1'b0;
      assign b_d[0]  = '0;
    end else if (i == 1) begin : g_toggle
      sq_bot_toggle #(.WIDTH(WIDTH)) u_cell (
        .clk, .rst_n, .rv(w_r[i]), .av(w_a[i]), .dv(w_d[i]),
        .rh(b_rh[i] ^ b_rv[i]), .ah(b_a[i]), .dh(b_d[i]),
        .routh(b_rh[i+1]), .routv(b_rv[i+1]), .aout(b_a[i+1]), .dout(b_d[i+1])
      );
    end else begin : g_select
      sq_bot_select #(.WIDTH(WIDTH)) u_cell (
        .clk, .rst_n, .rv(w_r[i]), .av(w_a[i]), .dv(w_d[i]),
        .rinh(b_rh[i]), .rinv(b_rv[i]), .ah(b_a[i]), .dh(b_d[i]),
        .routh(b_rh[i+1]), .routv(b_rv[i+1]), .aout(b_a[i+1]), .dout(b_d[i+1])
      );
    end
  end

  assign rout       = b_rh[COLS] ^ b_rv[COLS];
  assign b_a[COLS]  = aout;
  assign dout       = b_d[COLS];
endmodule
