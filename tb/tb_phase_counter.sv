// tb_phase_counter: clear gives phase 1; steps count up through the twelve
// division phases; the count holds without a step.
module tb_phase_counter;
  logic clk = 1'b0, rst_n = 1'b0, clear = 1'b0, step = 1'b0;
  logic [3:0] phase;
  int checks = 0, failures = 0;
  phase_counter dut (.clk, .rst_n, .clear, .step, .phase);
  always #5 clk = ~clk;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin
    #100000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    #12 rst_n = 1'b1;
    for (int rep = 0; rep < 3; rep++) begin
      clear = 1'b1; @(posedge clk); #1; clear = 1'b0;
      check(phase == 4'd1, "clear gives phase 1");
      for (int p = 2; p <= 12; p++) begin
        repeat (3) begin @(posedge clk); #1; end
        check(phase == 4'(p - 1), "holds without step");
        step = 1'b1; @(posedge clk); #1; step = 1'b0;
        check(phase == 4'(p), $sformatf("phase %0d expected %0d", phase, p));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
