// tb_sq_cells: self-checking testbench.
//
// Small square FIFOs that exercise the top and bottom cell types in every
// neighbour combination: 2 columns (toggle and corner cells only), 3 columns
// (one select cell per row) with and without column stages.
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
// Data words are a hash of their sequence number; the sink checks each one.
//
// Origin: The checks test the behaviour the original circuits are described to
// have (order, capacity, and the mechanism named above); the stimulus, the
// latency figures in clocks and the phases are this testbench's own.
module tb_sq_cells;
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

  // Drop monitor for dut0: the k-th word entering column c must be word
  // k*COLS + (COLS-1-c): the first word drops at the far right, the next one
  // column further left, and so on.
  int unsigned drops0 [2];
  for (genvar c = 0; c < 2; c++) begin : g_drop0
    logic vr_q = 1'b0;
    always @(posedge clk) begin
      if (!rst_n) begin
        vr_q <= 1'b0; drops0[c] <= 0;
      end else if (dut0.v_r[c] != vr_q) begin
        vr_q <= dut0.v_r[c];
        check(dut0.v_d[c] == g_env[0].u_env.word(drops0[c] * 2 + 1 - c),
              $sformatf("square dut0: word %0d of column %0d is not the expected one", drops0[c], c));
        drops0[c] <= drops0[c] + 1;
      end
    end
  end

  // Drop monitor for dut1: the k-th word entering column c must be word
  // k*COLS + (COLS-1-c): the first word drops at the far right, the next one
  // column further left, and so on.
  int unsigned drops1 [3];
  for (genvar c = 0; c < 3; c++) begin : g_drop1
    logic vr_q = 1'b0;
    always @(posedge clk) begin
      if (!rst_n) begin
        vr_q <= 1'b0; drops1[c] <= 0;
      end else if (dut1.v_r[c] != vr_q) begin
        vr_q <= dut1.v_r[c];
        check(dut1.v_d[c] == g_env[1].u_env.word(drops1[c] * 3 + 2 - c),
              $sformatf("square dut1: word %0d of column %0d is not the expected one", drops1[c], c));
        drops1[c] <= drops1[c] + 1;
      end
    end
  end

  // Drop monitor for dut2: the k-th word entering column c must be word
  // k*COLS + (COLS-1-c): the first word drops at the far right, the next one
  // column further left, and so on.
  int unsigned drops2 [3];
  for (genvar c = 0; c < 3; c++) begin : g_drop2
    logic vr_q = 1'b0;
    always @(posedge clk) begin
      if (!rst_n) begin
        vr_q <= 1'b0; drops2[c] <= 0;
      end else if (dut2.v_r[c] != vr_q) begin
        vr_q <= dut2.v_r[c];
        check(dut2.v_d[c] == g_env[2].u_env.word(drops2[c] * 3 + 2 - c),
              $sformatf("square dut2: word %0d of column %0d is not the expected one", drops2[c], c));
        drops2[c] <= drops2[c] + 1;
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

  square_fifo #(.WIDTH(W), .COLS(2), .COL_DEPTH(1)) dut0 (
    .clk, .rst_n, .rin(rin[0]), .ain(ain[0]), .din(din[0]),
    .rout(rout[0]), .aout(aout[0]), .dout(dout[0])
  );
  initial begin label[0] = "square2x1"; exp_lat[0] = 4; exp_cap[0] = 6; end

  square_fifo #(.WIDTH(W), .COLS(3), .COL_DEPTH(0)) dut1 (
    .clk, .rst_n, .rin(rin[1]), .ain(ain[1]), .din(din[1]),
    .rout(rout[1]), .aout(aout[1]), .dout(dout[1])
  );
  initial begin label[1] = "square3x0"; exp_lat[1] = 4; exp_cap[1] = 6; end

  square_fifo #(.WIDTH(W), .COLS(3), .COL_DEPTH(1)) dut2 (
    .clk, .rst_n, .rin(rin[2]), .ain(ain[2]), .din(din[2]),
    .rout(rout[2]), .aout(aout[2]), .dout(dout[2])
  );
  initial begin label[2] = "square3x1"; exp_lat[2] = 5; exp_cap[2] = 9; end

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
    for (int c = 0; c < 2; c++) begin
      $display("square dut0: column %0d received %0d words", c, drops0[c]);
      check(drops0[c] > 0, $sformatf("square dut0: no word ever dropped into column %0d", c));
    end
    for (int c = 0; c < 3; c++) begin
      $display("square dut1: column %0d received %0d words", c, drops1[c]);
      check(drops1[c] > 0, $sformatf("square dut1: no word ever dropped into column %0d", c));
    end
    for (int c = 0; c < 3; c++) begin
      $display("square dut2: column %0d received %0d words", c, drops2[c]);
      check(drops2[c] > 0, $sformatf("square dut2: no word ever dropped into column %0d", c));
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

    repeat (20) @(posedge clk);
    for (int i = 0; i < NDUT; i++) begin
      check(errs[i] == 0, $sformatf("%s: %0d data errors", label[i], errs[i]));
      check(recv[i] == lim && sent[i] == lim, $sformatf("%s: sent %0d recv %0d of %0d", label[i], sent[i], recv[i], lim));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
