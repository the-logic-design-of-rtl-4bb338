// tb_adder_subtractor: first every row of the full adder/subtractor truth
// table (Z, output carry, output borrow), then random 12-bit serial additions
// and subtractions, LSB first over 12 clocks, against integer arithmetic.
module tb_adder_subtractor;
  logic clk = 1'b0, rst_n = 1'b0, x = 1'b0, y = 1'b0, sub = 1'b0, clr = 1'b0, step = 1'b0, z;
  int checks = 0, failures = 0;
  adder_subtractor dut (.clk, .rst_n, .x, .y, .sub, .clr, .step, .z);
  always #5 clk = ~clk;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask
  // Truth table rows: {X, Y, W} -> {Z, Co, Bo}
  localparam logic [2:0] TT [8] = '{3'b000, 3'b101, 3'b101, 3'b011,
                                    3'b100, 3'b010, 3'b010, 3'b111};
  initial begin
    #100000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    #12 rst_n = 1'b1;
    for (int r = 0; r < 8; r++)
      for (int s = 0; s < 2; s++) begin
        logic wi;
        wi = 1'(r);
        // Put W in the wanted state: clear, then one step of 1 + 1 (carry 1).
        clr = 1'b1; step = 1'b0; @(posedge clk); #1; clr = 1'b0;
        if (wi) begin x = 1'b1; y = 1'b1; sub = 1'b0; step = 1'b1; @(posedge clk); #1; end
        x = 1'(r >> 2); y = 1'(r >> 1); sub = 1'(s); step = 1'b1; #1;
        check(z == TT[r][2], $sformatf("Z for XYW=%03b", 3'(r)));
        @(posedge clk); #1;
        // Read back W by adding 0 + 0: Z then equals W.
        x = 1'b0; y = 1'b0; sub = 1'b0; #1;
        check(z == (s ? TT[r][0] : TT[r][1]), $sformatf("%s for XYW=%03b",
              s ? "borrow" : "carry", 3'(r)));
      end
    step = 1'b0;
    for (int k = 0; k < 400; k++) begin
      logic [11:0] a, b, exp, got;
      a = 12'($urandom); b = 12'($urandom); sub = 1'($urandom);
      clr = 1'b1; @(posedge clk); #1; clr = 1'b0;
      exp = sub ? a - b : a + b;
      for (int i = 0; i < 12; i++) begin
        x = a[i]; y = b[i]; step = 1'b1; #1;
        got[i] = z;
        @(posedge clk); #1;
      end
      step = 1'b0;
      check(got == exp, $sformatf("%h %s %h = %h, got %h", a, sub ? "-" : "+", b, exp, got));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
