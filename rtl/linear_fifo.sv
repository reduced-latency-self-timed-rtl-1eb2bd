// linear_fifo: the standard flow-through micropipeline FIFO.
//
// DEPTH mp_stage cells are chained: each stage's request/ack/data feed the
// next. Throughput depends only on one stage's cycle, but every word walks
// through every stage, so the latency of an empty FIFO grows with DEPTH (one
// clock per stage in this model). DEPTH = 16 is the baseline of the family;
// the same module makes the arms of the parallel FIFO, the columns of the
// square FIFO and the leaves of the tree FIFO. DEPTH = 0 is a plain wire
// channel (a choice of this library, used for empty leaves and columns).
//
// Interface: two-phase channels rin/ain/din in, rout/aout/dout out.
//
// Origin: The plain chain of micropipeline stages is the original reference
// FIFO; allowing DEPTH = 0 as a wire is this design's addition for empty
// leaves and columns.
module linear_fifo #(
  parameter int unsigned WIDTH = fifo_pkg::FIFO_WIDTH,
  parameter int unsigned DEPTH = fifo_pkg::FIFO_DEPTH
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
  if (DEPTH == 0) begin : g_wire
    assign rout = rin;
    assign ain  = aout;
    assign dout = din;
  end else begin : g_chain
    logic             r [DEPTH+1];
    logic             a [DEPTH+1];
    logic [WIDTH-1:0] d [DEPTH+1];
    logic [DEPTH-1:0] full_unused;

    assign r[0] = rin;
    assign d[0] = din;
    assign ain  = a[0];
    assign rout = r[DEPTH];
    assign dout = d[DEPTH];
    assign a[DEPTH] = aout;

    for (genvar i = 0; i < DEPTH; i++) begin : g_stage
      mp_stage #(.WIDTH(WIDTH)) u_stage (
        .clk, .rst_n,
        .req_in(r[i]), .ack_in(a[i]), .din(d[i]),
        .req_out(r[i+1]), .ack_out(a[i+1]), .dout(d[i+1]),
        .full(full_unused[i])
      );
    end
  end
endmodule
