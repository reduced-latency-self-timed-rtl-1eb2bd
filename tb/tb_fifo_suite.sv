// tb_fifo_suite: self-checking testbench.
//
// End-to-end test of the whole FIFO family at its default parameters (16
// words of 8 bits each). All six FIFOs run the common phases at once. The
// mechanisms each organisation relies on are counted and must all occur:
// full-FIFO stalls of the source (all six), rotation over all four arms
// (parallel), use of all eight leaf paths (tree), drops into every column in
// the rotating order (square), skips from every top cell and the full U-turn
// (both arbited variants).
//
// Phases, run on every FIFO instance at once:
//   1. latency   one word into the empty FIFO; the clock edges until it
//                appears at the output must equal the structural count.
//   2. capacity  the sink stops; the number of words the FIFO acknowledges
//                must equal its capacity, and the source must stall.
//   3. drain     the sink restarts; every word must come out, in order.
//   4. stream    random source and sink timing for 1000 more words.
//   5. burst     source and sink at full speed; the cycles per word are
//                printed.
// Data words are a hash of their sequence number; the sink checks each one.
//
// Origin: The checks test the behaviour the original circuits are described to
// have (order, capacity, and the mechanism named above); the stimulus, the
// latency figures in clocks and the phases are this testbench's own.
module tb_fifo_suite;
  localparam int unsigned W = 8;
  localparam int unsigned NDUT = 6;
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
  fifo_suite dut (
    .clk, .rst_n,
    .lin_rin(rin[0]), .lin_ain(ain[0]), .lin_din(din[0]), .lin_rout(rout[0]), .lin_aout(aout[0]), .lin_dout(dout[0]),
    .par_rin(rin[1]), .par_ain(ain[1]), .par_din(din[1]), .par_rout(rout[1]), .par_aout(aout[1]), .par_dout(dout[1]),
    .tree_rin(rin[2]), .tree_ain(ain[2]), .tree_din(din[2]), .tree_rout(rout[2]), .tree_aout(aout[2]), .tree_dout(dout[2]),
    .sq_rin(rin[3]), .sq_ain(ain[3]), .sq_din(din[3]), .sq_rout(rout[3]), .sq_aout(aout[3]), .sq_dout(dout[3]),
    .arb1_rin(rin[4]), .arb1_ain(ain[4]), .arb1_din(din[4]), .arb1_rout(rout[4]), .arb1_aout(aout[4]), .arb1_dout(dout[4]),
    .arb2_rin(rin[5]), .arb2_ain(ain[5]), .arb2_din(din[5]), .arb2_rout(rout[5]), .arb2_aout(aout[5]), .arb2_dout(dout[5])
  );

  // Parallel FIFO: every arm must carry words; tree FIFO: every leaf path.
  int unsigned arm_words [4], leaf_words [8];
  logic [3:0] arm_q = '0;
  logic [7:0] leaf_q = '0;
  always @(posedge clk) begin
    if (!rst_n) begin
      arm_q <= '0; leaf_q <= '0;
      for (int k = 0; k < 4; k++) arm_words[k] <= 0;
      for (int k = 0; k < 8; k++) leaf_words[k] <= 0;
    end else begin
      arm_q <= dut.u_par.arm_rin;
      for (int k = 0; k < 4; k++) if (dut.u_par.arm_rin[k] != arm_q[k]) arm_words[k] <= arm_words[k] + 1;
      for (int k = 0; k < 8; k++) begin
        leaf_q[k] <= dut.u_tree.u_tree.dr[7 + k];
        if (dut.u_tree.u_tree.dr[7 + k] != leaf_q[k]) leaf_words[k] <= leaf_words[k] + 1;
      end
    end
  end

  // Drop monitor for dut3: the k-th word entering column c must be word
  // k*COLS + (COLS-1-c): the first word drops at the far right, the next one
  // column further left, and so on.
  int unsigned drops3 [4];
  for (genvar c = 0; c < 4; c++) begin : g_drop3
    logic vr_q = 1'b0;
    always @(posedge clk) begin
      if (!rst_n) begin
        vr_q <= 1'b0; drops3[c] <= 0;
      end else if (dut.u_sq.v_r[c] != vr_q) begin
        vr_q <= dut.u_sq.v_r[c];
        check(dut.u_sq.v_d[c] == g_env[3].u_env.word(drops3[c] * 4 + 3 - c),
              $sformatf("square dut3: word %0d of column %0d is not the expected one", drops3[c], c));
        drops3[c] <= drops3[c] + 1;
      end
    end
  end

  // Skip monitor for dut4: requests on the path from top cell i down to
  // bottom cell i. i < HALF-1 is a skip, i = HALF-1 the U-turn at the end.
  int unsigned skips4 [8];
  for (genvar c = 0; c < 8; c++) begin : g_skip4
    logic sr_q = 1'b0;
    always @(posedge clk) begin
      if (!rst_n) begin
        sr_q <= 1'b0; skips4[c] <= 0;
      end else if (dut.u_arb1.s_r[c] != sr_q) begin
        sr_q <= dut.u_arb1.s_r[c];
        skips4[c] <= skips4[c] + 1;
      end
    end
  end

  // Skip monitor for dut5: requests on the path from top cell i down to
  // bottom cell i. i < HALF-1 is a skip, i = HALF-1 the U-turn at the end.
  int unsigned skips5 [8];
  for (genvar c = 0; c < 8; c++) begin : g_skip5
    logic sr_q = 1'b0;
    always @(posedge clk) begin
      if (!rst_n) begin
        sr_q <= 1'b0; skips5[c] <= 0;
      end else if (dut.u_arb2.s_r[c] != sr_q) begin
        sr_q <= dut.u_arb2.s_r[c];
        skips5[c] <= skips5[c] + 1;
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

  initial begin label[0] = "linear16"; exp_lat[0] = 16; exp_cap[0] = 16; end

  initial begin label[1] = "parallel"; exp_lat[1] = 6; exp_cap[1] = 16; end

  initial begin label[2] = "tree16"; exp_lat[2] = 11; exp_cap[2] = 16; end

  initial begin label[3] = "square"; exp_lat[3] = 7; exp_cap[3] = 16; end

  initial begin label[4] = "arbited_t1"; exp_lat[4] = 3; exp_cap[4] = 16; end

  initial begin label[5] = "arbited_t2"; exp_lat[5] = 4; exp_cap[5] = 16; end

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
    for (int k = 0; k < 4; k++) begin
      $display("parallel: arm %0d carried %0d words", k, arm_words[k]);
      // words 0 .. sent (the last one still waiting) go to arm (word mod 4)
      check(arm_words[k] == (sent[1] + 1 + 3 - k) / 4,
            $sformatf("parallel: arm %0d carried %0d words, expected %0d", k, arm_words[k], (sent[1] + 1 + 3 - k) / 4));
    end
    for (int k = 0; k < 8; k++) begin
      $display("tree: leaf path %0d carried %0d words", k, leaf_words[k]);
      check(leaf_words[k] > 0, $sformatf("tree: leaf path %0d never used", k));
    end
    // Empty-FIFO latency order of the organisations in this model.
    check(lat0[4] < lat0[5] && lat0[5] < lat0[1] && lat0[1] < lat0[3] && lat0[3] < lat0[2] && lat0[2] < lat0[0],
          "empty-FIFO latencies not in the order arb1 < arb2 < parallel < square < tree < linear");
    for (int c = 0; c < 4; c++) begin
      $display("square dut3: column %0d received %0d words", c, drops3[c]);
      check(drops3[c] > 0, $sformatf("square dut3: no word ever dropped into column %0d", c));
    end
    begin
      int unsigned npos;
      npos = 0;
      for (int c = 0; c < 8 - 1; c++) begin
        $display("arbited dut4: %0d words skipped down at top cell %0d", skips4[c], c);
        if (skips4[c] > 0) npos++;
      end
      $display("arbited dut4: %0d words made the U-turn", skips4[8-1]);
      check(skips4[0] > 0, "arbited dut4: no word skipped from the first cell");
      check(npos == 8 - 1, "arbited dut4: some top cell never skipped a word down");
      check(skips4[8-1] > 0, "arbited dut4: no word travelled the whole U");
    end
    begin
      int unsigned npos;
      npos = 0;
      for (int c = 0; c < 8 - 1; c++) begin
        $display("arbited dut5: %0d words skipped down at top cell %0d", skips5[c], c);
        if (skips5[c] > 0) npos++;
      end
      $display("arbited dut5: %0d words made the U-turn", skips5[8-1]);
      check(skips5[0] > 0, "arbited dut5: no word skipped from the first cell");
      check(npos == 8 - 1, "arbited dut5: some top cell never skipped a word down");
      check(skips5[8-1] > 0, "arbited dut5: no word travelled the whole U");
    end

    // 3. drain
    src_go = 1'b0; sink_go = 1'b1;
    repeat (400) @(posedge clk);
    for (int i = 0; i < NDUT; i++)
      check(recv[i] == sent[i], $sformatf("%s drain: %0d of %0d words out", label[i], recv[i], sent[i]));

    // 4. random stream
    base = 0;
    for (int i = 0; i < NDUT; i++) if (sent[i] > base) base = sent[i];
    lim = base + 1000; src_go = 1'b1; src_pct = 50; sink_pct = 50;
    while (!all_recv(lim)) @(posedge clk);
    src_pct = 100; sink_pct = 100;

    // 5. full-speed burst
    t0 = cyc;
    lim = lim + 300;
    for (int i = 0; i < NDUT; i++) burst[i] = 0;
    while (!all_recv(lim)) begin
      @(posedge clk);
      for (int i = 0; i < NDUT; i++) if (recv[i] == lim && burst[i] == 0) burst[i] = cyc - t0;
    end
    for (int i = 0; i < NDUT; i++) begin
      if (burst[i] == 0) burst[i] = cyc - t0;
      $display("%s: burst of 300 words done within %0d clocks", label[i], burst[i]);
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
