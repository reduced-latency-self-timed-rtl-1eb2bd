// mp_stage: one micropipeline FIFO stage (C-element plus capture/pass latch).
//
// The C-element combines the incoming request with the inverted pass state P
// of the stage's latch. When a new request arrives and the previous word has
// been passed on (C == P), the C-element fires: the latch captures din and the
// new C level is both the request to the next stage and the acknowledge to the
// previous one. The next stage's acknowledge is copied into P, which reopens
// the latch and re-enables the C-element. The stage holds a word while C != P;
// that XOR is brought out as `full` for the full/empty chains of the arbited
// FIFO, whose end cells are plain stages with this detector added.
//
// Interface: two-phase channels in (req_in/ack_in/din) and out
// (req_out/ack_out/dout). Timing: capture one clock after the request arrives;
// P follows ack_out one clock later. The latch is a register written when the
// C-element fires, read by the next stage only while this stage is full, so
// its transparency while empty is not reproduced (a choice of this model).
//
// Origin: The C-element-plus-pass-state stage follows the original
// micropipeline; the register in place of a transparent latch, and the one-
// clock pass delay, are this design's choices.
module mp_stage #(
  parameter int unsigned WIDTH = fifo_pkg::FIFO_WIDTH
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             req_in,
  output logic             ack_in,
  input  logic [WIDTH-1:0] din,
  output logic             req_out,
  input  logic             ack_out,
  output logic [WIDTH-1:0] dout,
  output logic             full
);
  logic c, p, fire;

  c_element #(.INV_B(1'b1), .INIT(1'b0)) u_c (
    .clk, .rst_n, .a(req_in), .b(p), .q(c), .fire(fire)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) p <= 1'b0;
    else        p <= ack_out;
  end

  always_ff @(posedge clk) begin
    if (!rst_n)    dout <= '0;
    else if (fire) dout <= din;
  end

  assign req_out = c;
  assign ack_in  = c;
  assign full    = c ^ p;

  // Two-phase rule for the sender: no new request while one is outstanding.
  a_req_stable: assert property (@(posedge clk) disable iff (!rst_n)
    $past(req_in != ack_in) && $past(rst_n) |-> req_in == $past(req_in));
endmodule
