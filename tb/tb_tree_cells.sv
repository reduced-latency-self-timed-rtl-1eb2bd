// tb_tree_cells: self-checking testbench.
//
// One distribute cell feeding one merge cell (a one-level tree), directly
// and with 2-stage leaves: words must alternate between the two paths and
// come back in order.
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
module tb_tree_cells;
  localparam int unsigned W = 8;
  localparam int unsigned NDUT = 2;
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

  for (genvar i = 0; i < NDUT; i++) begin : g_env
    tb_chan_env #(.WIDTH(W)) u_env (
      .clk, .rst_n, .rin(rin[i]), .ain(ain[i]), .din(din[i]),
      .rout(rout[i]), .aout(aout[i]), .dout(dout[i]),
      .src_go, .src_pct, .sink_go, .sink_pct, .src_limit(lim),
      .sent(sent[i]), .recv(recv[i]), .errors(errs[i]), .lat(lat[i]),
      .full_stalls(stalls[i])
    );
  end

  tree_fifo #(.WIDTH(W), .LEVELS(1)) dut0 (
    .clk, .rst_n, .rin(rin[0]), .ain(ain[0]), .din(din[0]),
    .rout(rout[0]), .aout(aout[0]), .dout(dout[0])
  );
  initial begin label[0] = "tree2"; exp_lat[0] = 3; exp_cap[0] = 2; end

  tree_fifo #(.WIDTH(W), .LEVELS(1), .LEAF_DEPTH(2)) dut1 (
    .clk, .rst_n, .rin(rin[1]), .ain(ain[1]), .din(din[1]),
    .rout(rout[1]), .aout(aout[1]), .dout(dout[1])
  );
  initial begin label[1] = "tree2_leaf2"; exp_lat[1] = 5; exp_cap[1] = 6; end

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
