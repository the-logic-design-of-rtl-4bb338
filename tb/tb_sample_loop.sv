// tb_sample_loop: the modification-and-looping example at full size.
//
// Steps 1..5 are the keyboard input subroutine: N->I sets I2 = 10, and each
// pass HALTs for a keyboard word, stores it with A->S modified by M2 at
// L40 - I2 (so L30 .. L39), then I-N->I (N = 1) and TEST MOD loop back.
// Steps 11..24 are the sample loop: N->I sets I1 = 10; step 12 is S->A
// modified by M1 with hub L at L40, so it reads L30 first and L39 last;
// steps 13..14 add the word into H1; steps 15..22 are left empty; step 23
// (I - N -> I, N = 1) and step 24 (TEST MOD back to step 12) close the loop,
// which runs ten times before step 25 halts. The testbench checks the sum,
// the ten effective locations in order, and the execution time of the loop.
module tb_sample_loop;
  import dcc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic btn_start = 0, btn_stop = 0, btn_zero = 0, kb_clear = 0, plug_we = 0;
  word_t kb_set = '0;
  idx_t plug_step = '0;
  step_t plug_data = '0;
  logic [9:0] d_reg = '0;
  word_t a, q;
  word_t h [4];
  idx_t i [2];
  idx_t n, ic, wc;
  logic [1:0] out_ff;
  logic running, test_ff;
  order_e order;
  logic [3:0] phase;
  logic [15:0] t;

  control_computer dut (.clk, .rst_n, .btn_start, .btn_stop, .btn_zero, .kb_clear,
    .kb_set, .plug_we, .plug_step, .plug_data, .d_reg, .a, .out_ff, .running,
    .q, .h, .i, .n, .ic, .wc, .test_ff, .order, .phase, .t);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask
  initial begin
    #50_000_000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // Effective locations read by step 12, in order.
  int locs [$];
  always @(posedge clk)
    if (rst_n && ic == 6'd12 && dut.u_seq.state == 3'd4 && t[0]) locs.push_back(int'(n));

  task automatic plug(int s, order_e o, reg_e r = REG_NONE, int loc = -1, mod_e m = MOD_NONE);
    plug_data = '{order: o, regsel: r, loc_valid: (loc >= 0), loc: idx_t'(loc < 0 ? 0 : loc),
                  modifier: m};
    plug_step = idx_t'(s); plug_we = 1'b1;
    @(posedge clk); #1; plug_we = 1'b0;
  endtask
  task automatic press(ref logic btn);
    btn = 1'b1; @(posedge clk); #1; btn = 1'b0; @(posedge clk); #1;
  endtask
  task automatic start_and_wait(output int cycles);
    press(btn_start);
    cycles = 0;
    while (!running && cycles < 40) begin @(posedge clk); #1; cycles++; end
    while (running && cycles < 400000) begin @(posedge clk); #1; cycles++; end
    check(!running, "reaches a HALT");
  endtask

  initial begin
    int vals [10];
    int total, cyc;
    #22 rst_n = 1'b1;
    repeat (3) @(posedge clk); #1;
    for (int s = 0; s < 64; s++) plug(s, ORD_NONE);
    plug(1,  ORD_N_TO_I, REG_I2, 10);
    plug(2,  ORD_HALT);
    plug(3,  ORD_A_TO_S, REG_NONE, 40, MOD_M2);
    plug(4,  ORD_I_SUB_N, REG_I2, 1);
    plug(5,  ORD_TEST_MOD, REG_NONE, 2);
    plug(6,  ORD_A_TO_H_CL, REG_H3);
    plug(7,  ORD_A_TO_H, REG_H1);
    plug(11, ORD_N_TO_I, REG_I1, 10);
    plug(12, ORD_S_TO_A, REG_NONE, 40, MOD_M1);
    plug(13, ORD_ADD_H, REG_H1);
    plug(14, ORD_A_TO_H, REG_H1);
    plug(23, ORD_I_SUB_N, REG_I1, 1);
    plug(24, ORD_TEST_MOD, REG_NONE, 12);
    plug(25, ORD_HALT);
    press(btn_stop);
    press(btn_zero);
    start_and_wait(cyc);
    check(ic == 6'd2 && i[1] == 6'd10, "input subroutine: I2 preset to 10");
    total = 0;
    for (int k = 0; k < 10; k++) begin
      vals[k] = $urandom_range(0, 300) - 150;
      total += vals[k];
      kb_clear = 1'b1; @(posedge clk); #1; kb_clear = 1'b0;
      kb_set = word_t'(vals[k]); @(posedge clk); #1; kb_set = '0;
      start_and_wait(cyc);
    end
    check(ic == 6'd2 || ic == 6'd25, "subroutine loops, then runs on");
    check(ic == 6'd25, $sformatf("sample loop finished at step %0d", ic));
    check(sx(h[0]) == total, $sformatf("sum of L30..L39 = %0d, got %0d", total, sx(h[0])));
    check(locs.size() == 10, $sformatf("loop ran %0d times", locs.size()));
    for (int k = 0; k < locs.size(); k++)
      check(locs[k] == 30 + k, $sformatf("pass %0d read L%0d", k, locs[k]));
    check(test_ff && i[0] == 6'd0, "loop left with I1 = 0 and TEST set");
    // Each pass: the S->A waits at most one store revolution (61 words); the
    // other 13 steps take two words each, the modified S->A at least three.
    check(cyc < 10 * (61 + 3 + 13 * 2 + 2) * 16 + 200, $sformatf("loop time %0d bit times", cyc));
    $display("sample loop: %0d bit times = %0d us at 200 kc/s", cyc, cyc * 5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  function automatic int sx(word_t v); return int'(signed'(v)); endfunction
endmodule
