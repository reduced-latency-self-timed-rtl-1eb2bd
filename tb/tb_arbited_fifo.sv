// tb_arbited_fifo: self-checking testbench.
//
// Arbited FIFOs of 2 x 8 cells with type-1 and type-2 top cells, and a
// four-deep section (2 x 2 cells) with type-2 top cells. Besides the
// common phases, every top cell must have sent a word down its skip path and
// some word must have travelled the whole U once the bottom row was full.
//
// Phases, run on every FIFO instance at once:
//   1. latency   one word into the empty FIFO; the clock edges until it
//                appears at the output must equal the structural count.
//   2. capacity  the sink stops; the number of words the FIFO acknowledges
//                must equal its capacity, and the source must stall.
//   3. drain     the sink restarts; every word must come out, in order.
//   4. stream    random source and sink timing for 400 more words.
//   5. burst     source and sink at full speed; the cycles per word are
//                printed.
//   6. occupancy in the 2 x 8 FIFOs: with k = 0..7 words held and the
//                output stopped, the next word must go down at top cell k.
// Data words are a hash of their sequence number; the sink checks each one.
//
// Origin: The checks test the behaviour the original circuits are described to
// have (order, capacity, and the mechanism named above); the stimulus, the
// latency figures in clocks and the phases are this testbench's own.
module tb_arbited_fifo;
  localparam int unsigned W = 8;
  localparam int unsigned NDUT = 3;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int unsigned cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  int unsigned checks = 0, failures = 0;
  logic        src_go = 1'b0, sink_go = 1'b0;
  int unsigned src_pct = 100, sink_pct = 100, lim = 0;

  logic             rin  [NDUT], ain  [NDUT], rout [NDUT], aout [NDUT];
  logic [W-1:0]     din  [NDUT], dout [NDUT];
  int unsigned      sent [NDUT], recv [NDUT], errs [NDUT], lat [NDUT], stalls [NDUT];
  int unsigned      exp_lat [NDUT], exp_cap [NDUT], lat0 [NDUT];
  string            label [NDUT];

  // Skip monitor for dut0: requests on the path from top cell i down to
  // bottom cell i. i < HALF-1 is a skip, i = HALF-1 the U-turn at the end.
  int unsigned skips0 [8];
  for (genvar c = 0; c < 8; c++) begin : g_skip0
    logic sr_q = 1'b0;
    always @(posedge clk) begin
      if (!rst_n) begin
        sr_q <= 1'b0; skips0[c] <= 0;
      end else if (dut0.s_r[c] != sr_q) begin
        sr_q <= dut0.s_r[c];
        skips0[c] <= skips0[c] + 1;
      end
    end
  end

  // Skip monitor for dut1: requests on the path from top cell i down to
  // bottom cell i. i < HALF-1 is a skip, i = HALF-1 the U-turn at the end.
  int unsigned skips1 [8];
  for (genvar c = 0; c < 8; c++) begin : g_skip1
    logic sr_q = 1'b0;
    always @(posedge clk) begin
      if (!rst_n) begin
        sr_q <= 1'b0; skips1[c] <= 0;
      end else if (dut1.s_r[c] != sr_q) begin
        sr_q <= dut1.s_r[c];
        skips1[c] <= skips1[c] + 1;
      end
    end
  end

  for (genvar i = 0; i < NDUT; i++) begin : g_env
    tb_chan_env #(.WIDTH(W)) u_env (
      .clk, .rst_n, .rin(rin[i]), .ain(ain[i]), .din(din[i]),
      .rout(rout[i]), .aout(aout[i]), .dout(dout[i]),
      .src_go, .src_pct, .sink_go, .sink_pct, .src_limit(lim),
      .sent(sent[i]), .recv(recv[i]), .errors(errs[i]), .lat(lat[i]),
      .full_stalls(stalls[i])
    );
  end

  arbited_fifo #(.WIDTH(W), .TYPE(1)) dut0 (
    .clk, .rst_n, .rin(rin[0]), .ain(ain[0]), .din(din[0]),
    .rout(rout[0]), .aout(aout[0]), .dout(dout[0])
  );
  initial begin label[0] = "arbited_t1"; exp_lat[0] = 3; exp_cap[0] = 16; end

  arbited_fifo #(.WIDTH(W), .TYPE(2)) dut1 (
    .clk, .rst_n, .rin(rin[1]), .ain(ain[1]), .din(din[1]),
    .rout(rout[1]), .aout(aout[1]), .dout(dout[1])
  );
  initial begin label[1] = "arbited_t2"; exp_lat[1] = 4; exp_cap[1] = 16; end

  // The smallest folded section: one arbited top cell and the two end cells.
  arbited_fifo #(.WIDTH(W), .HALF(2), .TYPE(2)) dut2 (
    .clk, .rst_n, .rin(rin[2]), .ain(ain[2]), .din(din[2]),
    .rout(rout[2]), .aout(aout[2]), .dout(dout[2])
  );
  initial begin label[2] = "arbited_4deep"; exp_lat[2] = 4; exp_cap[2] = 4; end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic bit all_recv(input int unsigned n);
    for (int i = 0; i < NDUT; i++) if (recv[i] < n) return 1'b0;
    return 1'b1;
  endfunction

  function automatic bit all_drained();
    for (int i = 0; i < NDUT; i++) if (recv[i] != sent[i]) return 1'b0;
    return 1'b1;
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    int unsigned t0, base, burst [NDUT];
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);

    // 1. latency through the empty FIFO
    lim = 1; sink_go = 1'b1; src_go = 1'b1;
    while (!all_recv(1)) @(posedge clk);
    repeat (2) @(posedge clk);
    for (int i = 0; i < NDUT; i++) begin
      $display("%s: empty latency %0d clocks (expected %0d)", label[i], lat[i], exp_lat[i]);
      lat0[i] = lat[i];
      check(lat[i] == exp_lat[i], $sformatf("%s latency %0d != %0d", label[i], lat[i], exp_lat[i]));
    end

    // 2. capacity with the sink stopped
    sink_go = 1'b0; lim = 200;
    repeat (400) @(posedge clk);
    for (int i = 0; i < NDUT; i++) begin
      $display("%s: holds %0d words (expected %0d)", label[i], sent[i] - recv[i], exp_cap[i]);
      check(sent[i] - recv[i] == exp_cap[i], $sformatf("%s capacity %0d != %0d", label[i], sent[i] - recv[i], exp_cap[i]));
      check(stalls[i] > 0, $sformatf("%s source never stalled on a full FIFO", label[i]));
    end
    begin
      int unsigned npos;
      npos = 0;
      for (int c = 0; c < 8 - 1; c++) begin
        $display("arbited dut0: %0d words skipped down at top cell %0d", skips0[c], c);
        if (skips0[c] > 0) npos++;
      end
      $display("arbited dut0: %0d words made the U-turn", skips0[8-1]);
      check(skips0[0] > 0, "arbited dut0: no word skipped from the first cell");
      check(npos == 8 - 1, "arbited dut0: some top cell never skipped a word down");
      check(skips0[8-1] > 0, "arbited dut0: no word travelled the whole U");
    end
    begin
      int unsigned npos;
      npos = 0;
      for (int c = 0; c < 8 - 1; c++) begin
        $display("arbited dut1: %0d words skipped down at top cell %0d", skips1[c], c);
        if (skips1[c] > 0) npos++;
      end
      $display("arbited dut1: %0d words made the U-turn", skips1[8-1]);
      check(skips1[0] > 0, "arbited dut1: no word skipped from the first cell");
      check(npos == 8 - 1, "arbited dut1: some top cell never skipped a word down");
      check(skips1[8-1] > 0, "arbited dut1: no word travelled the whole U");
    end

    // 3. drain
    src_go = 1'b0; sink_go = 1'b1;
    repeat (400) @(posedge clk);
    for (int i = 0; i < NDUT; i++)
      check(recv[i] == sent[i], $sformatf("%s drain: %0d of %0d words out", label[i], recv[i], sent[i]));

    // 4. random stream
    base = 0;
    for (int i = 0; i < NDUT; i++) if (sent[i] > base) base = sent[i];
    lim = base + 400; src_go = 1'b1; src_pct = 50; sink_pct = 50;
    while (!all_recv(lim)) @(posedge clk);
    src_pct = 100; sink_pct = 100;

    // 5. full-speed burst
    t0 = cyc;
    lim = lim + 200;
    for (int i = 0; i < NDUT; i++) burst[i] = 0;
    while (!all_recv(lim)) begin
      @(posedge clk);
      for (int i = 0; i < NDUT; i++) if (recv[i] == lim && burst[i] == 0) burst[i] = cyc - t0;
    end
    for (int i = 0; i < NDUT; i++) begin
      if (burst[i] == 0) burst[i] = cyc - t0;
      $display("%s: burst of 200 words done within %0d clocks", label[i], burst[i]);
    end

    // 6. occupancy: with k words held in the stopped FIFO (they sit in
    //    bottom cells 0..k-1), the next word must go down at top cell k,
    //    k = HALF-1 being the U-turn. The clocks from its request until it
    //    leaves the top row are printed: the latency grows with the fill.
    for (int k = 0; k < 8; k++) begin
      int unsigned sn0 [8], sn1 [8];
      int d0, d1, t_0, t_1;
      sink_go = 1'b0; src_go = 1'b1;
      lim = lim + k;
      repeat (150) @(posedge clk);
      for (int c = 0; c < 8; c++) begin sn0[c] = skips0[c]; sn1[c] = skips1[c]; end
      d0 = -1; d1 = -1; t_0 = 0; t_1 = 0;
      lim = lim + 1; t0 = cyc;
      repeat (150) begin
        @(posedge clk);
        for (int c = 0; c < 8; c++) begin
          if (d0 < 0 && skips0[c] != sn0[c]) begin d0 = c; t_0 = cyc - t0; end
          if (d1 < 0 && skips1[c] != sn1[c]) begin d1 = c; t_1 = cyc - t0; end
        end
      end
      $display("arbited_t1: %0d words held, next word down at top cell %0d after %0d clocks", k, d0, t_0);
      $display("arbited_t2: %0d words held, next word down at top cell %0d after %0d clocks", k, d1, t_1);
      check(d0 == k, $sformatf("arbited_t1: with %0d words held the next word went down at cell %0d", k, d0));
      check(d1 == k, $sformatf("arbited_t2: with %0d words held the next word went down at cell %0d", k, d1));
      check(sent[0] - recv[0] == k + 1 && sent[1] - recv[1] == k + 1,
            $sformatf("occupancy %0d: FIFOs hold %0d and %0d words", k + 1, sent[0] - recv[0], sent[1] - recv[1]));
      sink_go = 1'b1;
      while (!all_recv(lim)) @(posedge clk);
    end

    repeat (20) @(posedge clk);
    for (int i = 0; i < NDUT; i++) begin
      check(errs[i] == 0, $sformatf("%s: %0d data errors", label[i], errs[i]));
      check(recv[i] == lim && sent[i] == lim, $sformatf("%s: sent %0d recv %0d of %0d", label[i], sent[i], recv[i], lim));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
