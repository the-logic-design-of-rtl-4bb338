// tb_program_board: wires random programs and checks, for every step line,
// that exactly the order, register, modifier and location bus bars of that
// step are energised, and nothing for an unwired step.
module tb_program_board;
  import dcc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, plug_we = 1'b0;
  idx_t plug_step = '0;
  step_t plug_data = '0;
  logic [63:0] d = '0;
  logic [31:0] order_lines;
  logic [7:0]  reg_lines;
  logic [60:0] loc_lines;
  step_t prog [64];
  int checks = 0, failures = 0;
  program_board dut (.clk, .rst_n, .plug_we, .plug_step, .plug_data, .d,
                     .order_lines, .reg_lines, .loc_lines);
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
    for (int s = 0; s < 64; s++) begin
      step_t st;
      st = '0;
      if (s % 7 != 3) begin
        st.order     = order_e'($urandom_range(1, 31));
        st.regsel    = reg_e'($urandom_range(0, 6));
        st.loc_valid = 1'($urandom);
        st.loc       = idx_t'($urandom_range(0, 60));
        st.modifier  = mod_e'($urandom_range(0, 2));
      end
      prog[s] = st;
      plug_we = 1'b1; plug_step = idx_t'(s); plug_data = st;
      @(posedge clk); #1;
    end
    plug_we = 1'b0;
    for (int s = 0; s < 64; s++) begin
      logic [31:0] eo;
      logic [7:0]  er;
      logic [60:0] el;
      d = 64'd1 << s; #1;
      eo = (prog[s].order == ORD_NONE) ? '0 : 32'd1 << (int'(prog[s].order) - 1);
      er = (prog[s].regsel == REG_NONE) ? '0 : 8'd1 << (int'(prog[s].regsel) - 1);
      if (prog[s].modifier == MOD_M1) er[6] = 1'b1;
      if (prog[s].modifier == MOD_M2) er[7] = 1'b1;
      el = prog[s].loc_valid ? 61'd1 << prog[s].loc : '0;
      check(order_lines == eo, $sformatf("step %0d order lines %h expected %h", s, order_lines, eo));
      check(reg_lines == er, $sformatf("step %0d register lines %h expected %h", s, reg_lines, er));
      check(loc_lines == el, $sformatf("step %0d location lines", s));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
