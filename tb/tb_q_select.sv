// tb_q_select: self-checking testbench for the Q-select.
//
// The level input sel changes at random every clock, with no relation to the
// requests. For each request transition the testbench notes the value of sel
// at the first clock edge after it (the sampling edge). Two clock edges after
// the request exactly one output must have toggled: tout if the sampled sel
// was 1, fout if it was 0. Later changes of sel must not matter.
//
// Origin: The checks test the behaviour the original circuits are described to
// have (order, capacity, and the mechanism named above); the stimulus, the
// latency figures in clocks and the phases are this testbench's own.
module tb_q_select;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int unsigned checks = 0, failures = 0;
  logic rin = 1'b0, sel = 1'b0, tout, fout;
  int unsigned n_t = 0, n_f = 0;

  q_select dut (.clk, .rst_n, .rin, .sel, .tout, .fout);

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
    logic pt, pf, sampled;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int j = 0; j < 500; j++) begin
      pt = tout; pf = fout;
      rin = ~rin;
      sel = 1'($urandom);
      sampled = sel;
      @(negedge clk);                 // sampling edge passed
      sel = 1'($urandom);
      check(tout == pt && fout == pf, "output before the second clock edge");
      @(negedge clk);
      sel = 1'($urandom);
      check((tout != pt) == sampled && (fout != pf) == !sampled,
            $sformatf("request %0d: sampled sel=%b but tout %b->%b fout %b->%b", j, sampled, pt, tout, pf, fout));
      if (sampled) n_t++; else n_f++;
      repeat ($urandom % 3) begin
        @(negedge clk);
        sel = 1'($urandom);
      end
    end
    check(n_t > 0 && n_f > 0, "both outputs were not exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
