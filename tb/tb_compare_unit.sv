// tb_compare_unit: exhaustive check of the N / word-counter comparison.
module tb_compare_unit;
  import dcc_pkg::*;
  idx_t n, wc;
  logic match;
  int checks = 0, failures = 0;
  compare_unit dut (.n, .wc, .match);
  initial begin
    #100000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int i = 0; i < 64; i++)
      for (int j = 0; j < 64; j++) begin
        n = 6'(i); wc = 6'(j); #1;
        checks++;
        if (match != (i == j)) begin
          failures++; $display("FAIL: n=%0d wc=%0d match=%b", i, j, match);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
