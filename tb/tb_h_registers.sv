// tb_h_registers: writes a word serially into each H-register (12 shifts
// taking the enter bit), recirculates words, and checks that only the
// selected register changes and that lsb and sign show the selected one.
module tb_h_registers;
  import dcc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, shift = 1'b0, sin = 1'b0, lsb, sign;
  logic [1:0] sel = '0;
  word_t h [4];
  word_t ref_h [4];
  int checks = 0, failures = 0;
  h_registers dut (.clk, .rst_n, .sel, .shift, .sin, .lsb, .sign, .h);
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
    ref_h = '{default: '0};
    for (int k = 0; k < 60; k++) begin
      word_t v;
      bit write;
      sel = 2'($urandom); v = word_t'($urandom); write = 1'($urandom);
      #1;
      check(sign == ref_h[sel][11], "sign of selected register");
      for (int b = 0; b < 12; b++) begin
        check(lsb == ref_h[sel][b], "serial output of selected register");
        shift = 1'b1; sin = write ? v[b] : lsb;
        @(posedge clk); #1;
      end
      shift = 1'b0;
      if (write) ref_h[sel] = v;
      for (int r = 0; r < 4; r++)
        check(h[r] == ref_h[r], $sformatf("H%0d=%h expected %h", r + 1, h[r], ref_h[r]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
