// tb_word_counter: steps the counter once per 16-clock word time and checks
// it runs 1, 2, .. 60, 0, 1 .. (61 locations), and holds between steps.
module tb_word_counter;
  import dcc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, step = 1'b0;
  idx_t wc;
  int checks = 0, failures = 0;
  word_counter dut (.clk, .rst_n, .step, .wc);
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
    int exp = 1;
    #12 rst_n = 1'b1;
    check(wc == 6'd1, "reset value 1");
    for (int w = 0; w < 130; w++) begin
      for (int b = 0; b < 16; b++) begin
        step = (b == 15);
        @(posedge clk); #1;
        if (b == 7) check(wc == 6'(exp), $sformatf("mid-word wc=%0d expected %0d", wc, exp));
      end
      exp = (exp + 1) % 61;
      check(wc == 6'(exp), $sformatf("wc=%0d expected %0d", wc, exp));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
