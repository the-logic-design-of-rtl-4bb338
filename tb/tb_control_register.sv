// tb_control_register: parallel loads and six-bit serial shifts of N
// against a reference value kept in the testbench; load beats shift.
module tb_control_register;
  import dcc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, load = 1'b0, shift = 1'b0, sin = 1'b0, lsb;
  idx_t d, n, ref_n;
  int checks = 0, failures = 0;
  control_register dut (.clk, .rst_n, .load, .d, .shift, .sin, .n, .lsb);
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
    idx_t newv;
    #12 rst_n = 1'b1;
    check(n == '0, "reset clears N");
    for (int k = 0; k < 40; k++) begin
      d = 6'($urandom); load = 1'b1; shift = 1'($urandom);
      @(posedge clk); #1; load = 1'b0; shift = 1'b0;
      check(n == d, $sformatf("load %0d got %0d", d, n));
      ref_n = d; newv = 6'($urandom);
      // Shift a new value in, LSB first, watching the old one come out.
      for (int b = 0; b < 6; b++) begin
        check(lsb == ref_n[b], "serial output bit");
        shift = 1'b1; sin = newv[b];
        @(posedge clk); #1;
      end
      shift = 1'b0;
      check(n == newv, $sformatf("shifted-in value %0d got %0d", newv, n));
      @(posedge clk); #1;
      check(n == newv, "holds without shift");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
