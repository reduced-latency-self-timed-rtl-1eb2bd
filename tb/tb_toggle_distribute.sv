// tb_toggle_distribute: self-checking testbench for the toggle-distribute circuit.
//
// A 4-way (default) and a 3-way distributor get the same input requests. Each
// arm is modelled as a stage that acknowledges its request after a random
// delay. For word j the request must appear on arm j mod N one clock after the
// input transition and on no other arm, and the input acknowledge must not
// toggle before that arm has acknowledged.
//
// Origin: The checks test the behaviour the original circuits are described to
// have (order, capacity, and the mechanism named above); the stimulus, the
// latency figures in clocks and the phases are this testbench's own.
module tb_toggle_distribute;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int unsigned checks = 0, failures = 0;
  logic       rin = 1'b0;
  logic       ain4, ain3;
  logic [3:0] r4, a4 = '0;
  logic [2:0] r3, a3 = '0;

  toggle_distribute          dut4 (.clk, .rst_n, .rin, .ain(ain4), .rout(r4), .aout(a4));
  toggle_distribute #(.N(3)) dut3 (.clk, .rst_n, .rin, .ain(ain3), .rout(r3), .aout(a3));

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

  initial begin
    logic [3:0] p4; logic [2:0] p3; int unsigned d;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int j = 0; j < 300; j++) begin
      p4 = r4; p3 = r3;
      rin = ~rin;
      @(negedge clk);
      check((r4 ^ p4) == 4'(1 << (j % 4)), $sformatf("4-way: word %0d requested arms %b", j, r4 ^ p4));
      check((r3 ^ p3) == 3'(1 << (j % 3)), $sformatf("3-way: word %0d requested arms %b", j, r3 ^ p3));
      d = $urandom % 4;
      repeat (d) begin
        check(ain4 != rin && ain3 != rin, "input acknowledged before the arm took the word");
        @(negedge clk);
      end
      a4 = r4; a3 = r3;
      #1 check(ain4 == rin && ain3 == rin, "input not acknowledged after the arm took the word");
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
