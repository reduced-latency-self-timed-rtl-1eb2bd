// tb_c_element: self-checking testbench for the C-element.
//
// Two gates, one plain and one with its second input inverted (the form used
// in every FIFO stage), get random input sequences. A reference model kept
// here predicts each output: the output takes the value of the (effective)
// inputs one clock after they agree and holds it while they differ.
// Also checked: both outputs are 0 after clear, and each gate both rises and
// falls at least once.
//
// Origin: The checks test the behaviour the original circuits are described to
// have (order, capacity, and the mechanism named above); the stimulus, the
// latency figures in clocks and the phases are this testbench's own.
module tb_c_element;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int unsigned checks = 0, failures = 0;
  logic a, b;
  logic q0, q1, f0, f1;
  logic m0, m1;
  int unsigned rises0 = 0, falls0 = 0, rises1 = 0, falls1 = 0;

  c_element #(.INV_B(1'b0)) dut0 (.clk, .rst_n, .a, .b, .q(q0), .fire(f0));
  c_element #(.INV_B(1'b1)) dut1 (.clk, .rst_n, .a, .b, .q(q1), .fire(f1));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = 1'b0; b = 1'b0; m0 = 1'b0; m1 = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(q0 == 1'b0 && q1 == 1'b0, "outputs not 0 after clear");
    for (int n = 0; n < 1000; n++) begin
      a = 1'($urandom);
      b = 1'($urandom);
      // predicted value after the next edge
      if (a == b)  m0 = a;
      if (a == !b) m1 = a;
      @(posedge clk);
      @(negedge clk);
      check(q0 == m0, $sformatf("plain gate: a=%b b=%b q=%b expected %b", a, b, q0, m0));
      check(q1 == m1, $sformatf("inverted-input gate: a=%b b=%b q=%b expected %b", a, b, q1, m1));
    end
    check(rises0 > 0 && falls0 > 0 && rises1 > 0 && falls1 > 0, "a gate never switched both ways");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic q0_q = 1'b0, q1_q = 1'b0;
  always @(posedge clk) begin
    q0_q <= q0; q1_q <= q1;
    if (q0 && !q0_q) rises0++;
    if (!q0 && q0_q) falls0++;
    if (q1 && !q1_q) rises1++;
    if (!q1 && q1_q) falls1++;
  end
endmodule
