// tb_toggle_merge: self-checking testbench for the toggle-merge circuit.
//
// Four arms (default N) and, separately, three arms are modelled as sources:
// arm k offers words k, k+N, k+2N, ... in order with random timing. The merge
// must deliver words 0, 1, 2, ... in order whatever the arrival order, which
// the sink checks. First, arms 1..N-1 offer their first word while arm 0 holds
// back: nothing may come out until arm 0's word arrives (the half-cocked first
// gate).
//
// Origin: The checks test the behaviour the original circuits are described to
// have (order, capacity, and the mechanism named above); the stimulus, the
// latency figures in clocks and the phases are this testbench's own.
module tb_toggle_merge;
  localparam int unsigned W = 8;
  localparam int unsigned NW = 400;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int unsigned checks = 0, failures = 0;
  logic hold0 = 1'b1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic logic [W-1:0] word(input int unsigned n);
    return W'(n * 37 + 11);
  endfunction

  // ---- 4-way ----
  logic [3:0]        r4 = '0, a4;
  logic [3:0][W-1:0] d4;
  logic              ro4, ao4 = 1'b0;
  logic [W-1:0]      do4;
  int unsigned       sent4 [4], got4 = 0;
  toggle_merge #(.WIDTH(W)) dut4 (.clk, .rst_n, .rin(r4), .ain(a4), .din(d4), .rout(ro4), .aout(ao4), .dout(do4));

  // ---- 3-way ----
  logic [2:0]        r3 = '0, a3;
  logic [2:0][W-1:0] d3;
  logic              ro3, ao3 = 1'b0;
  logic [W-1:0]      do3;
  int unsigned       sent3 [3], got3 = 0;
  toggle_merge #(.WIDTH(W), .N(3)) dut3 (.clk, .rst_n, .rin(r3), .ain(a3), .din(d3), .rout(ro3), .aout(ao3), .dout(do3));

  always @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 0; k < 4; k++) begin sent4[k] <= 0; d4[k] <= '0; end
      for (int k = 0; k < 3; k++) begin sent3[k] <= 0; d3[k] <= '0; end
    end else begin
      for (int k = 0; k < 4; k++)
        if (r4[k] == a4[k] && (k != 0 || !hold0) && 4 * sent4[k] + k < NW && $urandom % 3 == 0) begin
          d4[k] <= word(4 * sent4[k] + k); r4[k] <= ~r4[k]; sent4[k] <= sent4[k] + 1;
        end
      for (int k = 0; k < 3; k++)
        if (r3[k] == a3[k] && (k != 0 || !hold0) && 3 * sent3[k] + k < NW && $urandom % 3 == 0) begin
          d3[k] <= word(3 * sent3[k] + k); r3[k] <= ~r3[k]; sent3[k] <= sent3[k] + 1;
        end
      if (ro4 != ao4 && $urandom % 2 == 0) begin
        check(do4 == word(got4), $sformatf("4-way: word %0d is %h, expected %h", got4, do4, word(got4)));
        ao4 <= ~ao4; got4 <= got4 + 1;
      end
      if (ro3 != ao3 && $urandom % 2 == 0) begin
        check(do3 == word(got3), $sformatf("3-way: word %0d is %h, expected %h", got3, do3, word(got3)));
        ao3 <= ~ao3; got3 <= got3 + 1;
      end
    end
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    repeat (60) @(posedge clk);
    check(ro4 == 1'b0 && ro3 == 1'b0, "a word came out before arm 0 had offered one");
    check(sent4[1] == 1 && sent4[3] == 1 && sent3[2] == 1, "later arms did not offer their first words");
    hold0 = 1'b0;
    while (got4 < NW || got3 < NW) @(posedge clk);
    repeat (20) @(posedge clk);
    check(got4 == NW && got3 == NW, "wrong number of words delivered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
