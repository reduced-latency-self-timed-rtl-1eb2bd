// tb_toggle_n: self-checking testbench for the N-way toggle.
//
// A 4-way (default), a 3-way and a 2-way toggle see the same random input
// transitions. After each transition exactly one output of each toggle must
// have changed, output number (count mod N), one clock later; idx must name
// the output that changes next. The 4-way toggle's state must also walk the
// Johnson sequence 0000, 1000, 1100, 1110, 1111, 0111, 0011, 0001 (bit 0 first).
//
// Origin: The checks test the behaviour the original circuits are described to
// have (order, capacity, and the mechanism named above); the stimulus, the
// latency figures in clocks and the phases are this testbench's own.
module tb_toggle_n;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int unsigned checks = 0, failures = 0;
  logic       tin = 1'b0;
  logic [3:0] t4;
  logic [2:0] t3;
  logic [1:0] t2;
  logic [1:0] i4, i3;
  logic       i2;

  toggle_n         dut4 (.clk, .rst_n, .tin, .tout(t4), .idx(i4));
  toggle_n #(.N(3)) dut3 (.clk, .rst_n, .tin, .tout(t3), .idx(i3));
  toggle_n #(.N(2)) dut2 (.clk, .rst_n, .tin, .tout(t2), .idx(i2));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Johnson states of a 4-bit counter, written as {bit3..bit0}.
  localparam logic [3:0] JS [8] = '{4'b0000, 4'b0001, 4'b0011, 4'b0111,
                                    4'b1111, 4'b1110, 4'b1100, 4'b1000};

  initial begin
    logic [3:0] p4; logic [2:0] p3; logic [1:0] p2;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(t4 == 0 && t3 == 0 && t2 == 0, "outputs not 0 after clear");
    for (int n = 0; n < 500; n++) begin
      check(i4 == 2'(n % 4) && i3 == 2'(n % 3) && i2 == 1'(n % 2),
            $sformatf("idx wrong before transition %0d: %0d %0d %0d", n, i4, i3, i2));
      p4 = t4; p3 = t3; p2 = t2;
      tin = ~tin;
      #1 check(t4 == p4, "4-way toggle answered without a clock edge");
      @(negedge clk);
      check((t4 ^ p4) == 4'(1 << (n % 4)), $sformatf("4-way: transition %0d changed %b", n, t4 ^ p4));
      check((t3 ^ p3) == 3'(1 << (n % 3)), $sformatf("3-way: transition %0d changed %b", n, t3 ^ p3));
      check((t2 ^ p2) == 2'(1 << (n % 2)), $sformatf("2-way: transition %0d changed %b", n, t2 ^ p2));
      check(t4 == JS[(n + 1) % 8], $sformatf("4-way state %b is not the Johnson sequence", t4));
      repeat ($urandom % 3) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
