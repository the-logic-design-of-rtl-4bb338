// tb_i_registers: writes and recirculates six-bit values in I1 and I2
// serially and checks that only the selected register changes.
module tb_i_registers;
  import dcc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, shift = 1'b0, sin = 1'b0, lsb, sel = 1'b0;
  idx_t i [2];
  idx_t ref_i [2];
  int checks = 0, failures = 0;
  i_registers dut (.clk, .rst_n, .sel, .shift, .sin, .lsb, .i);
  always #5 clk = ~clk;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask
  initial begin
    #100000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    #12 rst_n = 1'b1;
    ref_i = '{default: '0};
    for (int k = 0; k < 60; k++) begin
      idx_t v;
      bit write;
      sel = 1'($urandom); v = idx_t'($urandom); write = 1'($urandom);
      #1;
      for (int b = 0; b < 6; b++) begin
        check(lsb == ref_i[sel][b], "serial output of selected register");
        shift = 1'b1; sin = write ? v[b] : lsb;
        @(posedge clk); #1;
      end
      shift = 1'b0;
      if (write) ref_i[sel] = v;
      for (int r = 0; r < 2; r++)
        check(i[r] == ref_i[r], $sformatf("I%0d=%0d expected %0d", r + 1, i[r], ref_i[r]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
