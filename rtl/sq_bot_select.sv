// sq_bot_select: bottom-row select-merge cell of the square FIFO.
//
// After clear the cell expects its first word from its column (the vertical
// gate is half-cocked). A word from the column is always followed by words
// from the left. A word from the left arrives with one of two request kinds:
// RINH keeps the cell taking from the left; RINV means the word after it comes
// from the column. The cell forwards that information to the right: a word
// from the column or an RINH word leaves with ROUTH, an RINV word with ROUTV.
// The mux-latch select and the routing of the acknowledges follow the same
// state (src_h).
//
// Interface: vertical channel rv/dv in, av out; left channel rinh/rinv/dh in,
// ah out; right channel routh/routv/dout out, aout in.
// Timing: capture and request one clock after the expected input's request
// when the latch is empty; the pass state follows aout by one clock.
//
// Origin: The select-merge cell that starts on its column, stays on the left
// input for RINH and returns to its column after RINV follows the original
// square FIFO; the assertion is this design's addition.
module sq_bot_select #(
  parameter int unsigned WIDTH = fifo_pkg::FIFO_WIDTH
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             rv,
  output logic             av,
  input  logic [WIDTH-1:0] dv,
  input  logic             rinh,
  input  logic             rinv,
  output logic             ah,
  input  logic [WIDTH-1:0] dh,
  output logic             routh,
  output logic             routv,
  input  logic             aout,
  output logic [WIDTH-1:0] dout
);
  logic p, c, src_h, take;
  logic rinh_q, rinv_q;   // request levels already taken from the left
  logic h_pend, v_kind;

  assign c      = routh ^ routv;
  assign h_pend = (rinh != rinh_q) || (rinv != rinv_q);
  assign v_kind = (rinv != rinv_q);
  assign take   = (c == p) && (src_h ? h_pend : (rv != av));
  assign ah     = rinh_q ^ rinv_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      {av, routh, routv, rinh_q, rinv_q} <= '0;
      p                                  <= 1'b0;
      src_h                              <= 1'b0;
      dout                               <= '0;
    end else begin
      p <= aout;
      if (take) begin
        if (src_h) begin
          dout   <= dh;
          rinh_q <= rinh;
          rinv_q <= rinv;
          if (v_kind) begin
            routv <= ~routv;
            src_h <= 1'b0;
          end else begin
            routh <= ~routh;
          end
        end else begin
          dout  <= dv;
          av    <= rv;
          routh <= ~routh;
          src_h <= 1'b1;
        end
      end
    end
  end

  // The left neighbour never has both request kinds outstanding at once.
  a_one_kind: assert property (@(posedge clk) disable iff (!rst_n)
    !((rinh != rinh_q) && (rinv != rinv_q)));
endmodule
