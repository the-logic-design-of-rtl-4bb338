// tb_instruction_decoder: every counter value energises exactly its line.
module tb_instruction_decoder;
  import dcc_pkg::*;
  idx_t ic;
  logic [63:0] d;
  int checks = 0, failures = 0;
  instruction_decoder dut (.ic, .d);
  initial begin
    #100000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int k = 0; k < 64; k++) begin
      ic = 6'(k); #1;
      checks++;
      if (d != (64'd1 << k)) begin failures++; $display("FAIL: ic=%0d d=%h", k, d); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
