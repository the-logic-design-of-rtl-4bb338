// tb_location_encoder: each single location line L0..L60 gives its number;
// no line gives any = 0.
module tb_location_encoder;
  import dcc_pkg::*;
  logic [60:0] l;
  idx_t n;
  logic any;
  int checks = 0, failures = 0;
  location_encoder dut (.l, .n, .any);
  initial begin
    #100000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    l = '0; #1;
    checks++; if (any || n != 0) begin failures++; $display("FAIL: no line"); end
    for (int k = 0; k < 61; k++) begin
      l = 61'd1 << k; #1;
      checks++;
      if (n != 6'(k) || !any) begin failures++; $display("FAIL: L%0d gave %0d", k, n); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
