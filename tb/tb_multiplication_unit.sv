// tb_multiplication_unit: checks the decision for all eight combinations of
// the multiplier digits L1 L0 and KEEP against the multiplication algorithm
// table (none / add / subtract, with or without a shift first), that KEEP
// takes L1 on each decision and that start clears it.
module tb_multiplication_unit;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, decide = 1'b0, l1 = 1'b0, l0 = 1'b0;
  logic pre_shift, add_en, sub, shift_mem, keep;
  int checks = 0, failures = 0;
  multiplication_unit dut (.clk, .rst_n, .start, .decide, .l1, .l0, .pre_shift,
                           .add_en, .sub, .shift_mem, .keep);
  always #5 clk = ~clk;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  // Algorithm table, rows L1 L0 K: {add, sub, shift first}
  function automatic logic [2:0] table_row(logic [2:0] lk);
    case (lk)
      3'b000: return 3'b000;  // neither
      3'b010: return 3'b100;  // add
      3'b100: return 3'b011;  // shift, subtract, shift
      3'b110: return 3'b010;  // subtract
      3'b001: return 3'b100;  // add
      3'b011: return 3'b101;  // shift, add, shift
      3'b101: return 3'b010;  // subtract
      default: return 3'b000; // 111 neither
    endcase
  endfunction
  task automatic set_keep(logic k);
    start = 1'b1; @(posedge clk); #1; start = 1'b0;
    if (k) begin l1 = 1'b1; l0 = 1'b1; decide = 1'b1; @(posedge clk); #1; decide = 1'b0; end
  endtask
  initial begin
    #100000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    #12 rst_n = 1'b1;
    for (int r = 0; r < 8; r++) begin
      logic [2:0] lk, e;
      lk = 3'(r);
      set_keep(lk[0]);
      check(keep == lk[0], "KEEP preset");
      l1 = lk[2]; l0 = lk[1]; #1;
      e = table_row(lk);
      check(pre_shift == e[0], $sformatf("shift-first for %03b", lk));
      decide = 1'b1; @(posedge clk); #1; decide = 1'b0;
      check(add_en == (e[2] | e[1]), $sformatf("add/sub enable for %03b", lk));
      check(sub == e[1], $sformatf("subtract for %03b", lk));
      check(shift_mem == e[0], $sformatf("shift memory for %03b", lk));
      check(keep == lk[2], $sformatf("KEEP takes L1 for %03b", lk));
    end
    start = 1'b1; @(posedge clk); #1; start = 1'b0;
    check(keep == 1'b0 && add_en == 1'b0, "start clears the unit");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
