// tb_timing_unit: for every counter value checks that exactly the right
// bit-time signal is on (count n-1 gives T_n, count 15 gives T0) and that the
// trains (T1-T12) and (T1-T6) cover bit times 1..12 and 1..6.
module tb_timing_unit;
  logic [3:0]  b;
  logic [15:0] t;
  logic        t1_12, t1_6;
  int checks = 0, failures = 0;
  timing_unit dut (.b, .t, .t1_12, .t1_6);
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin
    #10000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int c = 0; c < 16; c++) begin
      int n;
      b = 4'(c); #1;
      n = (c + 1) % 16;
      check(t == 16'(1 << n), $sformatf("count %0d: t=%h expected T%0d", c, t, n));
      check(t1_12 == (n >= 1 && n <= 12), $sformatf("T1-T12 at T%0d", n));
      check(t1_6 == (n >= 1 && n <= 6), $sformatf("T1-T6 at T%0d", n));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
