// tb_chan_env: two-phase source and checking sink for one FIFO under test.
//
// The source sends words word(0), word(1), ... on rin/din, toggling rin only
// when the previous word has been acknowledged and, each clock, with
// probability src_pct percent while src_go is high. The sink acknowledges a
// pending word with probability sink_pct percent while sink_go is high and
// checks it against the expected next word; a mismatch counts an error.
// Counters: sent (acknowledged by the FIFO), recv (words taken out), errors.
// lat is the number of clock edges between the most recent rin toggle and the
// next rout toggle, the empty-FIFO latency when a single word is sent.
// full_stalls counts clocks in which the source had a word ready but the FIFO
// had not yet acknowledged the previous one for more than 4 clocks.
//
// Origin: The two-phase channel protocol follows the original circuits; the
// hashed data words, random timing and latency measurement are this
// testbench's own.
module tb_chan_env #(
  parameter int unsigned WIDTH = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  output logic             rin,
  input  logic             ain,
  output logic [WIDTH-1:0] din,
  input  logic             rout,
  output logic             aout,
  input  logic [WIDTH-1:0] dout,
  input  logic             src_go,
  input  int unsigned      src_pct,
  input  logic             sink_go,
  input  int unsigned      sink_pct,
  input  int unsigned      src_limit,
  output int unsigned      sent,
  output int unsigned      recv,
  output int unsigned      errors,
  output int unsigned      lat,
  output int unsigned      full_stalls
);
  int unsigned issued, cyc, t_issue, wait_cnt;
  logic        ain_q, rout_q;

  function automatic logic [WIDTH-1:0] word(input int unsigned n);
    int unsigned v;
    v = n * 32'd2654435761 + 32'd12345;
    return WIDTH'(v ^ (v >> 16) ^ n);
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rin <= 1'b0; din <= '0; aout <= 1'b0;
      issued <= 0; sent <= 0; recv <= 0; errors <= 0; lat <= 0;
      cyc <= 0; t_issue <= 0; ain_q <= 1'b0; rout_q <= 1'b0;
      wait_cnt <= 0; full_stalls <= 0;
    end else begin
      cyc    <= cyc + 1;
      ain_q  <= ain;
      rout_q <= rout;
      if (ain != ain_q) sent <= sent + 1;
      // source
      if (rin != ain) begin
        wait_cnt <= wait_cnt + 1;
        if (wait_cnt > 4) full_stalls <= full_stalls + 1;
      end else begin
        wait_cnt <= 0;
        if (src_go && issued < src_limit && ($urandom % 100) < src_pct) begin
          din     <= word(issued);
          rin     <= ~rin;
          issued  <= issued + 1;
          t_issue <= cyc;
        end
      end
      // sink
      if (rout != rout_q) lat <= cyc - t_issue - 1;
      if (rout != aout && sink_go && ($urandom % 100) < sink_pct) begin
        if (dout !== word(recv)) begin
          errors <= errors + 1;
          $display("  data error: word %0d got %h expected %h", recv, dout, word(recv));
        end
        aout <= ~aout;
        recv <= recv + 1;
      end
    end
  end
endmodule
