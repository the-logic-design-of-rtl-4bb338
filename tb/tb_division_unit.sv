// tb_division_unit: the quotient digit is 1 when the signs of the partial
// remainder and divisor agree and 0 when they differ, and is held between
// decisions.
module tb_division_unit;
  logic clk = 1'b0, rst_n = 1'b0, decide = 1'b0, a_sign = 1'b0, h_sign = 1'b0, qd;
  int checks = 0, failures = 0;
  division_unit dut (.clk, .rst_n, .decide, .a_sign, .h_sign, .qd);
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
    for (int k = 0; k < 40; k++) begin
      logic e;
      a_sign = 1'($urandom); h_sign = 1'($urandom);
      e = (a_sign == h_sign);
      decide = 1'b1; @(posedge clk); #1; decide = 1'b0;
      check(qd == e, $sformatf("signs %b %b digit %b", a_sign, h_sign, qd));
      a_sign = ~a_sign; @(posedge clk); #1;
      check(qd == e, "digit held");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
