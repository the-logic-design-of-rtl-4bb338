// tb_control_computer: end-to-end test of the whole computer at its default
// size (61-word store, 64 program steps).
//
// Two programs are wired on the program board and run as an operator would:
// ZERO COUNTER, START, and at every HALT the testbench checks the machine
// state, types the next number on the keyboard if one is wanted, and presses
// START again.
//  Program 1 (steps 1..47, run 12 times with random operands X, Y):
//   keyboard entry, transfers A<->H, A+H, A-H, A->S, A->S & CL, S->A, A-S,
//   S->H, A x H, A / H, right and left shift, INPUT from the digitizer,
//   H->S, OUTPUT 2, JUMP(A<0) taken or not, U.JUMP, JUMP(A=0) taken and not.
//  Program 2: the input subroutine (N->I, HALT, A->S modified, I-N->I,
//   TEST MOD looping) storing five keyboard words, then a modified loop
//   A+S that sums them, I+N->I, OUTPUT 1, and a jump to step 60 (the highest jump target) so that the
//   instruction counter wraps from 63 to step 0.
// Expected values are worked out here from the integer meaning of the
// 12-bit fractions. Multiply and divide are also timed (7 and 12 word times
// of 16 bit times), and the testbench counts each mechanism: store waits,
// modification stages, jumps taken / not taken, TEST flip-flop set, loops,
// counter wrap, keyboard and digitizer input, output flip-flops.
module tb_control_computer;
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

  // ---- mechanism counters --------------------------------------------
  int n_wait_words = 0, n_modify = 0, n_jump_taken = 0, n_jump_not = 0;
  int n_test_one = 0, n_wrap = 0, n_mul = 0, n_div = 0, n_halt = 0;
  int n_kb = 0, n_input = 0, n_output = 0, n_store_write = 0;
  int mul_cycles = 0, div_cycles = 0;
  idx_t prev_ic = '0;
  always @(posedge clk) if (rst_n) begin
    if (t[15] && dut.u_seq.state == 3'd3) n_wait_words++;          // WAIT
    if (t[15] && dut.u_seq.state == 3'd2) n_modify++;              // MODIFY
    if (dut.u_seq.ic_load) n_jump_taken++;
    if (t[15] && dut.u_seq.state == 3'd4 &&
        (order inside {ORD_JUMP_NEG, ORD_JUMP_ZERO, ORD_TEST_MOD}) && !dut.u_seq.jump_taken)
      n_jump_not++;
    if (t[15] && dut.u_seq.state == 3'd4 && order == ORD_I_SUB_N && dut.u_seq.zero_acc)
      n_test_one++;
    if (prev_ic == 6'd63 && ic == 6'd0) n_wrap++;
    prev_ic <= ic;
    if (dut.u_seq.state == 3'd4 && order == ORD_MUL_H) mul_cycles++;
    if (dut.u_seq.state == 3'd4 && order == ORD_DIV_H) div_cycles++;
    if (dut.ctrl.s_write) n_store_write++;
  end

  initial begin
    #50_000_000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // ---- operator actions ----------------------------------------------
  task automatic plug(int s, order_e o, reg_e r = REG_NONE, int loc = -1, mod_e m = MOD_NONE);
    plug_data = '{order: o, regsel: r, loc_valid: (loc >= 0), loc: idx_t'(loc < 0 ? 0 : loc),
                  modifier: m};
    plug_step = idx_t'(s); plug_we = 1'b1;
    @(posedge clk); #1; plug_we = 1'b0;
  endtask
  task automatic unplug_all();
    for (int s = 0; s < 64; s++) plug(s, ORD_NONE);
  endtask
  task automatic press(ref logic btn);
    btn = 1'b1; @(posedge clk); #1; btn = 1'b0; @(posedge clk); #1;
  endtask
  task automatic key_in(word_t v);
    kb_clear = 1'b1; @(posedge clk); #1; kb_clear = 1'b0;
    kb_set = v; @(posedge clk); #1; kb_set = '0;
    n_kb++;
  endtask
  // Press START and wait for the next HALT.
  task automatic start_and_wait();
    int guard;
    press(btn_start);
    guard = 0;
    while (!running && guard < 40) begin @(posedge clk); #1; guard++; end
    check(running, "machine starts");
    guard = 0;
    while (running && guard < 200000) begin @(posedge clk); #1; guard++; end
    check(!running, "machine reaches a HALT");
    n_halt++;
  endtask

  function automatic word_t w(int v); return word_t'(v); endfunction
  function automatic int sx(word_t v); return int'(signed'(v)); endfunction

  // ---- program 1 -----------------------------------------------------
  task automatic wire_program1();
    unplug_all();
    plug(1,  ORD_HALT);
    plug(2,  ORD_A_TO_H, REG_H1);
    plug(3,  ORD_HALT);
    plug(4,  ORD_A_TO_H_CL, REG_H2);
    plug(5,  ORD_HALT);
    plug(6,  ORD_H_TO_A, REG_H1);
    plug(7,  ORD_ADD_H, REG_H2);
    plug(8,  ORD_A_TO_S, REG_NONE, 5);
    plug(9,  ORD_HALT);
    plug(10, ORD_H_TO_A, REG_H1);
    plug(11, ORD_SUB_H, REG_H2);
    plug(12, ORD_A_TO_S_CL, REG_NONE, 40);
    plug(13, ORD_HALT);
    plug(14, ORD_S_TO_A, REG_NONE, 5);
    plug(15, ORD_HALT);
    plug(16, ORD_SUB_S, REG_NONE, 40);
    plug(17, ORD_HALT);
    plug(18, ORD_S_TO_H, REG_H4, 40);
    plug(19, ORD_H_TO_A, REG_H4);
    plug(20, ORD_HALT);
    plug(21, ORD_H_TO_A, REG_H1);
    plug(22, ORD_MUL_H, REG_H2);
    plug(23, ORD_HALT);
    plug(24, ORD_H_TO_A, REG_H1);
    plug(25, ORD_DIV_H, REG_H2);
    plug(26, ORD_HALT);
    plug(27, ORD_SHR_A);
    plug(28, ORD_HALT);
    plug(29, ORD_SHL_A);
    plug(30, ORD_HALT);
    plug(31, ORD_INPUT);
    plug(32, ORD_HALT);
    plug(33, ORD_H_TO_S, REG_H2, 60);
    plug(34, ORD_S_TO_A, REG_NONE, 60);
    plug(35, ORD_ADD_S, REG_NONE, 5);
    plug(36, ORD_OUTPUT, REG_I2);
    plug(37, ORD_HALT);
    plug(38, ORD_JUMP_NEG, REG_NONE, 41);
    plug(39, ORD_HALT);
    plug(40, ORD_JUMP, REG_NONE, 42);
    plug(41, ORD_HALT);
    plug(42, ORD_A_TO_H_CL, REG_H3);
    plug(43, ORD_JUMP_ZERO, REG_NONE, 45);
    plug(44, ORD_HALT);
    plug(45, ORD_H_TO_A, REG_H1);
    plug(46, ORD_JUMP_ZERO, REG_NONE, 44);
    plug(47, ORD_HALT);
  endtask

  task automatic run_program1(int x, int y, logic [9:0] dval);
    int sum, dif, prod, quo, exp_q, mc, dc, jnot;
    real qr;
    d_reg = dval;
    press(btn_stop);
    press(btn_zero);
    check(ic == 6'd0, "ZERO COUNTER");
    start_and_wait();                    // halts at 1
    check(ic == 6'd1, "first HALT at step 1");
    key_in(w(x));
    start_and_wait();                    // 3
    check(ic == 6'd3, "HALT at step 3");
    key_in(w(y));
    start_and_wait();                    // 5
    check(ic == 6'd5 && a == '0 && h[0] == w(x) && h[1] == w(y),
          $sformatf("A->H, A->H & CL: A=%h H1=%h H2=%h", a, h[0], h[1]));
    start_and_wait();                    // 9
    sum = sx(w(x + y));
    check(ic == 6'd9 && sx(a) == sum, $sformatf("A+H: %0d + %0d = %0d, got %0d", x, y, sum, sx(a)));
    start_and_wait();                    // 13
    dif = sx(w(x - y));
    check(ic == 6'd13 && a == '0, "A->S & CL clears A");
    start_and_wait();                    // 15
    check(ic == 6'd15 && sx(a) == sum, $sformatf("S->A from L5: got %0d expected %0d", sx(a), sum));
    start_and_wait();                    // 17
    check(ic == 6'd17 && sx(a) == sx(w(sum - dif)), $sformatf("A-S: got %0d expected %0d", sx(a), sum - dif));
    start_and_wait();                    // 20
    check(ic == 6'd20 && sx(a) == dif && sx(h[3]) == dif, $sformatf("S->H, H->A: A=%0d expected %0d", sx(a), dif));
    mc = mul_cycles;
    start_and_wait();                    // 23
    prod = (x * y) >>> 11;
    check(ic == 6'd23 && sx(a) == prod, $sformatf("AxH: %0d * %0d -> %0d, got %0d", x, y, prod, sx(a)));
    check(mul_cycles - mc == 7 * 16, $sformatf("multiply took %0d bit times", mul_cycles - mc));
    n_mul++;
    dc = div_cycles;
    start_and_wait();                    // 26
    qr = real'(x) * 2048.0 / real'(y);
    quo = sx(a);
    check(ic == 6'd26 && (real'(quo) - qr) <= 2.0 && (qr - real'(quo)) <= 2.0,
          $sformatf("A/H: %0d / %0d -> %f, got %0d", x, y, qr, quo));
    check(div_cycles - dc == 12 * 16, $sformatf("divide took %0d bit times", div_cycles - dc));
    n_div++;
    start_and_wait();                    // 28
    exp_q = quo >>> 1;
    check(ic == 6'd28 && sx(a) == exp_q, $sformatf("right shift: got %0d expected %0d", sx(a), exp_q));
    start_and_wait();                    // 30
    exp_q = sx(w((exp_q & 'h800) | ((exp_q << 1) & 'h7fe)));
    check(ic == 6'd30 && sx(a) == exp_q, $sformatf("left shift: got %0d expected %0d", sx(a), exp_q));
    start_and_wait();                    // 32
    check(ic == 6'd32 && a == word_t'(dval), "INPUT from digitizer");
    n_input++;
    start_and_wait();                    // 37
    check(ic == 6'd37 && sx(a) == sx(w(y + sum)), $sformatf("H->S, S->A, A+S: got %0d expected %0d", sx(a), sx(w(y + sum))));
    check(out_ff == 2'b10, "OUTPUT 2 sets flip-flop 2 only");
    n_output++;
    jnot = n_jump_not;
    start_and_wait();                    // 39 or 41
    if (sx(a) < 0) check(ic == 6'd41, $sformatf("JUMP(A<0) taken, at %0d", ic));
    else           check(ic == 6'd39, $sformatf("JUMP(A<0) not taken, at %0d", ic));
    if (ic == 6'd39) begin
      start_and_wait();                  // 40 jumps to 42 ... 47
    end else begin
      start_and_wait();
    end
    // With X = 0 the second JUMP(A=0) is taken too and stops at step 44.
    check(ic == ((x == 0) ? 6'd44 : 6'd47), $sformatf("JUMP(A=0) taken then not taken: at step %0d", ic));
    check(sx(a) == x, "A restored from H1");
  endtask

  // ---- program 2: input subroutine and a modified summing loop ------
  task automatic wire_program2();
    unplug_all();
    plug(1,  ORD_N_TO_I, REG_I1, 5);
    plug(2,  ORD_HALT);
    plug(3,  ORD_A_TO_S, REG_NONE, 20, MOD_M1);
    plug(4,  ORD_I_SUB_N, REG_I1, 1);
    plug(5,  ORD_TEST_MOD, REG_NONE, 2);
    plug(6,  ORD_N_TO_I, REG_I2, 5);
    plug(7,  ORD_A_TO_H_CL, REG_H1);
    plug(8,  ORD_ADD_S, REG_NONE, 20, MOD_M2);
    plug(9,  ORD_I_SUB_N, REG_I2, 1);
    plug(10, ORD_TEST_MOD, REG_NONE, 8);
    plug(11, ORD_HALT);
    plug(12, ORD_I_ADD_N, REG_I1, 7);
    plug(13, ORD_OUTPUT, REG_I1);
    plug(14, ORD_HALT);
    plug(15, ORD_JUMP, REG_NONE, 60);
    plug(0,  ORD_HALT);
  endtask

  task automatic run_program2();
    int vals [5];
    int total;
    press(btn_stop);
    press(btn_zero);
    total = 0;
    for (int k = 0; k < 5; k++) begin
      vals[k] = $urandom_range(0, 400) - 200;
    end
    start_and_wait();                  // halts at 2, I1 = 5
    check(ic == 6'd2 && i[0] == 6'd5, $sformatf("N->I: I1=%0d", i[0]));
    for (int k = 0; k < 5; k++) begin
      key_in(w(vals[k]));
      total += vals[k];
      start_and_wait();                // loops back to 2, finally halts at 11
    end
    check(ic == 6'd11, $sformatf("input loop left after five words, at step %0d", ic));
    check(test_ff == 1'b1 && i[0] == '0 && i[1] == '0, "I-N reached zero, TEST set");
    check(sx(a) == total, $sformatf("modified summing loop: got %0d expected %0d", sx(a), total));
    // The words were stored at L15..L19 (L20 less I1 = 5..1).
    for (int k = 0; k < 5; k++)
      check(sx(store_word(15 + k)) == vals[k], $sformatf("store L%0d", 15 + k));
    start_and_wait();                  // 14
    check(ic == 6'd14 && i[0] == 6'd7, $sformatf("I+N->I: I1=%0d", i[0]));
    check(out_ff == 2'b01, "OUTPUT 1 sets flip-flop 1");
    start_and_wait();                  // jump to 60; 60..63 are empty; wraps to 0: HALT
    check(ic == 6'd0, $sformatf("counter wrapped to step 0, at %0d", ic));
  endtask

  // Read a data word of the store from the line array (test access only).
  function automatic word_t store_word(int loc);
    word_t v;
    for (int b = 0; b < 12; b++) v[b] = dut.u_store.line[loc * 16 + 1 + b];
    return v;
  endfunction

  // ---- main ----------------------------------------------------------
  initial begin
    #22 rst_n = 1'b1;
    repeat (3) @(posedge clk); #1;
    wire_program1();
    for (int r = 0; r < 12; r++) begin
      int x, y, ay;
      ay = $urandom_range(256, 1000);
      y  = (r % 2) ? -ay : ay;
      x  = $urandom_range(0, 2 * ay - 2) - (ay - 1);
      if (r == 0) x = 0;   // a zero dividend and a zero product once
      run_program1(x, y, 10'($urandom));
    end
    wire_program2();
    run_program2();
    // Mechanisms that must have happened.
    check(n_wait_words > 0,  "store wait for the wanted word happened");
    check(n_modify >= 10,    "modification stages happened");
    check(n_jump_taken > 0,  "jumps taken");
    check(n_jump_not > 0,    "jumps not taken");
    check(n_test_one > 0,    "TEST flip-flop set by I-N = 0");
    check(n_wrap == 1,       "instruction counter wrap 63 -> 0");
    check(n_mul > 0 && n_div > 0, "multiply and divide");
    check(n_kb > 0 && n_input > 0 && n_output > 0, "keyboard, digitizer and output");
    check(n_store_write > 0, "store writes");
    $display("mechanisms: waits=%0d modify=%0d jumps=%0d/%0d test1=%0d wrap=%0d mul=%0d div=%0d halts=%0d",
             n_wait_words, n_modify, n_jump_taken, n_jump_not, n_test_one, n_wrap, n_mul, n_div, n_halt);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
