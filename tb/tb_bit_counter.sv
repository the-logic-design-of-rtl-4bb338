// tb_bit_counter: checks that the bit counter comes out of reset at 15
// (bit time T0) and then counts one per clock, wrapping 15 -> 0.
module tb_bit_counter;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [3:0] b;
  int checks = 0, failures = 0;
  bit_counter dut (.clk, .rst_n, .b);
  always #5 clk = ~clk;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin
    #1000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    logic [3:0] exp;
    #12; check(b == 4'd15, "reset value 15");
    rst_n = 1'b1;
    exp = 4'd15;
    repeat (40) begin
      @(posedge clk); #1;
      exp = exp + 4'd1;
      check(b == exp, $sformatf("count %0d expected %0d", b, exp));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
