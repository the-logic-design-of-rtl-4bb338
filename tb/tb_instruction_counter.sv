// tb_instruction_counter: zero, count up through 63 and wrap to 0, load a
// jump target, and the priority zero > load > increment.
module tb_instruction_counter;
  import dcc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, zero = 1'b0, incr = 1'b0, load = 1'b0;
  idx_t d = '0, ic;
  int checks = 0, failures = 0;
  instruction_counter dut (.clk, .rst_n, .zero, .incr, .load, .d, .ic);
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
    zero = 1'b1; @(posedge clk); #1; zero = 1'b0;
    check(ic == 6'd0, "zero counter");
    for (int k = 1; k <= 70; k++) begin
      incr = 1'b1; @(posedge clk); #1;
      check(ic == 6'(k % 64), $sformatf("count %0d expected %0d", ic, k % 64));
    end
    incr = 1'b0;
    for (int k = 0; k < 20; k++) begin
      d = 6'($urandom); load = 1'b1; incr = 1'($urandom);
      @(posedge clk); #1; load = 1'b0; incr = 1'b0;
      check(ic == d, "jump load beats increment");
    end
    incr = 1'b1; zero = 1'b1; load = 1'b1; @(posedge clk); #1;
    check(ic == 6'd0, "zero beats load and increment");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
