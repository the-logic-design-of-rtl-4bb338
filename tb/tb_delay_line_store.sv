// tb_delay_line_store: fills the 976-bit line with a random pattern, checks
// that every bit comes back exactly 976 clocks later and keeps circulating,
// then rewrites one 16-bit word and checks that only that word changed.
module tb_delay_line_store;
  localparam int WORDS = 61, WB = 16, BITS = WORDS * WB;
  logic clk = 1'b0, rst_n = 1'b0, we = 1'b0, din = 1'b0, dout;
  logic pattern [BITS];
  int checks = 0, failures = 0;
  delay_line_store dut (.clk, .rst_n, .we, .din, .dout);
  always #5 clk = ~clk;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask
  initial begin
    #200000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int errs;
    for (int k = 0; k < BITS; k++) pattern[k] = 1'($urandom);
    #12 rst_n = 1'b1;
    // Write pass: position k gets pattern[k].
    for (int k = 0; k < BITS; k++) begin
      we = 1'b1; din = pattern[k];
      @(posedge clk); #1;
    end
    we = 1'b0;
    // Two read passes: the bits recirculate unchanged.
    for (int pass = 0; pass < 2; pass++)
      for (int k = 0; k < BITS; k++) begin
        check(dout == pattern[k], $sformatf("pass %0d bit %0d", pass, k));
        @(posedge clk); #1;
      end
    // Rewrite word 17 only, then check the whole line.
    for (int k = 0; k < BITS; k++) begin
      if (k / WB == 17) begin
        we = 1'b1; din = ~pattern[k]; pattern[k] = ~pattern[k];
      end else we = 1'b0;
      @(posedge clk); #1;
    end
    we = 1'b0;
    errs = 0;
    for (int k = 0; k < BITS; k++) begin
      if (dout != pattern[k]) errs++;
      @(posedge clk); #1;
    end
    check(errs == 0, $sformatf("%0d bits wrong after rewriting word 17", errs));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
