// tb_enter_bus: random control words and serial bits; every destination
// must carry the bit of the source its select names (operands X and Y never
// see the adder output).
module tb_enter_bus;
  import dcc_pkg::*;
  dp_ctrl_t ctrl;
  dp_bits_t bits;
  logic z, a_in, q_in, h_in, i_in, n_in, s_in, x, y;
  int checks = 0, failures = 0;
  enter_bus dut (.ctrl, .bits, .z, .a_in, .q_in, .h_in, .i_in, .n_in, .s_in, .x, .y);
  function automatic logic expect_bit(src_e s, dp_bits_t v, logic zv);
    case (s)
      SRC_ZERO: return 1'b0;
      SRC_ONE:  return 1'b1;
      SRC_A0:   return v.a0;
      SRC_A11:  return v.a11;
      SRC_Q0:   return v.q0;
      SRC_H:    return v.h;
      SRC_S:    return v.s;
      SRC_N:    return v.n;
      SRC_I:    return v.i;
      SRC_Z:    return zv;
      SRC_QD:   return v.qd;
      default:  return 1'b0;
    endcase
  endfunction
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask
  initial begin
    #100000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int k = 0; k < 3000; k++) begin
      ctrl = '0;
      ctrl.a_src = src_e'($urandom_range(0, 10));
      ctrl.q_src = src_e'($urandom_range(0, 10));
      ctrl.h_src = src_e'($urandom_range(0, 10));
      ctrl.i_src = src_e'($urandom_range(0, 10));
      ctrl.n_src = src_e'($urandom_range(0, 10));
      ctrl.s_src = src_e'($urandom_range(0, 10));
      ctrl.x_src = src_e'($urandom_range(0, 8));
      ctrl.y_src = src_e'($urandom_range(0, 8));
      bits = dp_bits_t'($urandom); z = 1'($urandom);
      #1;
      check(a_in == expect_bit(ctrl.a_src, bits, z), "A input");
      check(q_in == expect_bit(ctrl.q_src, bits, z), "Q input");
      check(h_in == expect_bit(ctrl.h_src, bits, z), "H input");
      check(i_in == expect_bit(ctrl.i_src, bits, z), "I input");
      check(n_in == expect_bit(ctrl.n_src, bits, z), "N input");
      check(s_in == expect_bit(ctrl.s_src, bits, z), "store input");
      check(x == expect_bit(ctrl.x_src, bits, 1'b0), "operand X");
      check(y == expect_bit(ctrl.y_src, bits, 1'b0), "operand Y");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
