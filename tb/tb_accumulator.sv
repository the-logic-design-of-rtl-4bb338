// tb_accumulator: drives random A and Q operations and keyboard presses and
// compares A and Q with a reference model written from the operation list
// (serial right shift with input, left shift, left shift keeping the sign,
// clear, digitizer load; Q right and left shifts; keyboard clear and set).
module tb_accumulator;
  import dcc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  a_op_e a_op = A_HOLD;
  q_op_e q_op = Q_HOLD;
  logic  a_in = 1'b0, q_in = 1'b0, kb_clear = 1'b0;
  logic [9:0] d_reg = '0;
  word_t kb_set = '0, a, q, ra, rq;
  int checks = 0, failures = 0;
  accumulator dut (.clk, .rst_n, .a_op, .a_in, .q_op, .q_in, .d_reg, .kb_clear, .kb_set, .a, .q);
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
    check(a == '0 && q == '0, "reset clears A and Q");
    ra = '0; rq = '0;
    for (int k = 0; k < 2000; k++) begin
      a_op = a_op_e'($urandom_range(0, 5));
      q_op = q_op_e'($urandom_range(0, 2));
      a_in = 1'($urandom); q_in = 1'($urandom); d_reg = 10'($urandom);
      kb_clear = ($urandom_range(0, 30) == 0);
      kb_set   = ($urandom_range(0, 30) == 0) ? 12'(1 << $urandom_range(0, 11)) : '0;
      case (a_op)
        A_SHR:      ra = (ra >> 1) | (word_t'(a_in) << 11);
        A_SHL:      ra = ra << 1;
        A_SHL_KEEP: ra = (ra & 12'h800) | ((ra << 1) & 12'h7fe);
        A_CLEAR:    ra = '0;
        A_LOAD_D:   ra = word_t'(d_reg);
        default:    ;
      endcase
      if (kb_clear) ra = '0;
      ra = ra | kb_set;
      case (q_op)
        Q_SHR:   rq = (rq >> 1) | (word_t'(q_in) << 11);
        Q_SHL:   rq = (rq << 1) | word_t'(q_in);
        default: ;
      endcase
      @(posedge clk); #1;
      check(a == ra, $sformatf("step %0d op %s: A=%h expected %h", k, a_op.name(), a, ra));
      check(q == rq, $sformatf("step %0d: Q=%h expected %h", k, q, rq));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
