// sq_bot_toggle: second bottom-row cell of the square FIFO.
//
// A toggle-merge FIFO stage: it takes words alternately from its column
// (vertical input, first after clear) and from the bottom-left corner cell
// (horizontal input) into a mux-latch, and passes them to the right. The two
// toggle outputs are not XOR-merged but leave as two request kinds: ROUTH
// ("after this word take your next one from the left") after a word from the
// column, ROUTV ("take your next one from your column") after a word from
// the left.
//
// Timing: capture and request one clock after the expected input's request
// when the latch is empty; the pass state follows aout by one clock.
//
// Origin: The bottom-row toggle-merge cell alternating column and left inputs
// and sending ROUTH/ROUTV requests follows the original square FIFO; the
// clocked control is this design's modelling choice.
module sq_bot_toggle #(
  parameter int unsigned WIDTH = fifo_pkg::FIFO_WIDTH
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             rv,
  output logic             av,
  input  logic [WIDTH-1:0] dv,
  input  logic             rh,
  output logic             ah,
  input  logic [WIDTH-1:0] dh,
  output logic             routh,
  output logic             routv,
  input  logic             aout,
  output logic [WIDTH-1:0] dout
);
  logic p, c, src_h, take;

  assign c    = routh ^ routv;
  assign take = (c == p) && (src_h ? (rh != ah) : (rv != av));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      {av, ah, routh, routv} <= '0;
      p                      <= 1'b0;
      src_h                  <= 1'b0;
      dout                   <= '0;
    end else begin
      p <= aout;
      if (take) begin
        src_h <= ~src_h;
        if (src_h) begin
          dout  <= dh;
          ah    <= rh;
          routv <= ~routv;
        end else begin
          dout  <= dv;
          av    <= rv;
          routh <= ~routh;
        end
      end
    end
  end
endmodule
