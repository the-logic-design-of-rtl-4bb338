// tb_control_sequencer: drives the sequencer with a free-running bit counter
// and timing unit and with order / register bus bars set by hand, and checks
// the word-level sequence and the per-bit control words:
//  START increases the counter and runs; N is loaded in T0 of the setup
//  word; an add takes one execute word with the adder in T1..T12 only; an
//  S-order waits until the compare unit matches and writes the store only in
//  the following word; a modified order spends one word on N - I in T1..T6;
//  jumps are taken or not by A's sign and by the TEST flip-flop, which
//  I - N sets when every result bit is zero; a multiply lasts seven words and
//  a divide twelve; OUTPUT sets its flip-flop; HALT and STOP stop the machine.
module tb_control_sequencer;
  import dcc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [3:0] b;
  logic [15:0] t;
  logic t1_12, t1_6;
  logic [31:0] order_lines = '0;
  logic [7:0]  reg_lines = '0;
  logic btn_start = 0, btn_stop = 0, btn_zero = 0, match = 0, z = 0, qd = 0;
  word_t a = '0;
  logic [3:0] phase;
  logic mul_pre_shift = 0, mul_add_en = 0, mul_sub = 0, mul_shift_mem = 0;
  dp_ctrl_t ctrl;
  logic n_load, ic_zero, ic_incr, ic_load, phase_clear, phase_step;
  logic mul_start, mul_decide, div_decide, running, test_ff;
  logic [1:0] out_ff;
  order_e order;

  bit_counter u_b (.clk, .rst_n, .b);
  timing_unit u_t (.b, .t, .t1_12, .t1_6);
  phase_counter u_p (.clk, .rst_n, .clear(phase_clear), .step(phase_step), .phase);
  control_sequencer dut (.clk, .rst_n, .t, .t1_12, .t1_6, .order_lines, .reg_lines,
    .btn_start, .btn_stop, .btn_zero, .match, .a, .z, .phase, .mul_pre_shift,
    .mul_add_en, .mul_sub, .mul_shift_mem, .qd, .ctrl, .n_load, .ic_zero, .ic_incr,
    .ic_load, .phase_clear, .phase_step, .mul_start, .mul_decide, .div_decide,
    .running, .test_ff, .out_ff, .order);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask
  initial begin
    #10_000_000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // Per-step record, gathered every clock.
  int words, nload_t0, nload_other, add_in_data, add_outside, swrite_words, swrite_bits;
  int mod_bits, mod_outside, incr, load, decides, ddecides, bits_seen;
  bit recording = 0;
  always @(posedge clk) if (recording) begin
    bits_seen++;
    if (t[15]) words++;
    if (n_load) begin if (t[0]) nload_t0++; else nload_other++; end
    if (ctrl.add_step) begin
      if (dut.state == 3'd4 && t1_12) add_in_data++;
      else if (dut.state == 3'd2 && t1_6) mod_bits++;
      else add_outside++;
    end
    if (ctrl.n_shift && ctrl.n_src == SRC_Z && !(dut.state == 3'd2 && t1_6)) mod_outside++;
    if (ctrl.s_write) swrite_bits++;
    if (ctrl.s_write && t[1]) swrite_words++;
    if (ic_incr) incr++;
    if (ic_load) load++;
    if (mul_decide) decides++;
    if (div_decide) ddecides++;
  end

  function automatic logic [31:0] ol(order_e o); return 32'd1 << (int'(o) - 1); endfunction

  // Run one step from the word boundary after the previous one, until the
  // counter is increased or loaded (or the machine stops).
  task automatic run_step(order_e o, logic [7:0] regs, int match_after = 0);
    int guard = 0;
    order_lines = ol(o); reg_lines = regs;
    words = 0; nload_t0 = 0; nload_other = 0; add_in_data = 0; add_outside = 0;
    swrite_words = 0; swrite_bits = 0; mod_bits = 0; mod_outside = 0;
    incr = 0; load = 0; decides = 0; ddecides = 0; bits_seen = 0;
    recording = 1;
    while (guard < 2000) begin
      @(negedge clk);
      match = (words >= match_after);
      if ((ic_incr || ic_load || !running) && t[15]) begin
        @(posedge clk); #1; break;
      end
      guard++;
    end
    recording = 0;
  endtask

  task automatic press(ref logic btn);
    @(negedge clk); btn = 1'b1; @(negedge clk); btn = 1'b0;
  endtask

  initial begin
    #22 rst_n = 1'b1;
    repeat (5) @(posedge clk);
    check(!running, "stopped after reset");
    @(negedge clk); btn_zero = 1'b1; #1;
    check(ic_zero, "ZERO COUNTER acts while stopped");
    @(negedge clk); btn_zero = 1'b0;
    // START: the counter is increased at the next word boundary.
    press(btn_start);
    while (!(t[15])) @(negedge clk);
    check(ic_incr, "START increases the instruction counter");
    @(posedge clk); #1;
    check(running, "running after START");

    // A + H3: setup word and one execute word.
    run_step(ORD_ADD_H, 8'b0000_0100);
    check(words == 2, $sformatf("A+H took %0d words", words));
    check(nload_t0 == 1 && nload_other == 0, "N loaded once, in T0");
    check(add_in_data == 12 && add_outside == 0, "adder stepped in T1..T12 only");
    check(incr == 1 && load == 0, "counter increased once");

    // A -> S with the wanted word arriving after 4 words of waiting.
    run_step(ORD_A_TO_S, 8'b0, 4);
    check(swrite_words == 1 && swrite_bits == 12, "store written in one word, 12 bits");
    check(words >= 5, $sformatf("S-order waited for the word (%0d words)", words));

    // Modified S-order (M2): one extra word computing N - I.
    run_step(ORD_S_TO_A, 8'b1000_0000, 0);
    check(mod_bits == 6 && mod_outside == 0, $sformatf("N - I over T1..T6 (%0d bits)", mod_bits));
    check(words == 3, $sformatf("modified S-order took %0d words", words));

    // Jumps.
    a = 12'h800;
    run_step(ORD_JUMP_NEG, 8'b0);
    check(load == 1 && incr == 0, "JUMP(A<0) taken for a negative A");
    a = 12'h100;
    run_step(ORD_JUMP_NEG, 8'b0);
    check(load == 0 && incr == 1, "JUMP(A<0) not taken for a positive A");
    run_step(ORD_JUMP_ZERO, 8'b0);
    check(load == 0 && incr == 1, "JUMP(A=0) not taken");
    a = '0;
    run_step(ORD_JUMP_ZERO, 8'b0);
    check(load == 1, "JUMP(A=0) taken");

    // I - N with a zero result sets TEST; TEST MOD then falls through.
    z = 1'b0;
    run_step(ORD_I_SUB_N, 8'b0001_0000);
    check(test_ff == 1'b1, "TEST set by a zero I - N");
    run_step(ORD_TEST_MOD, 8'b0);
    check(load == 0 && incr == 1, "TEST MOD falls through when TEST is ONE");
    z = 1'b1;
    run_step(ORD_I_SUB_N, 8'b0001_0000);
    check(test_ff == 1'b0, "TEST cleared by a non-zero I - N");
    z = 1'b0;
    run_step(ORD_TEST_MOD, 8'b0);
    check(load == 1, "TEST MOD jumps when TEST is ZERO");

    // Multiply: seven execute words, six decisions; divide: twelve, eleven.
    run_step(ORD_MUL_H, 8'b0000_0001);
    check(words == 8 && decides == 6, $sformatf("multiply: %0d words, %0d decisions", words, decides));
    run_step(ORD_DIV_H, 8'b0000_0001);
    check(words == 13 && ddecides == 11, $sformatf("divide: %0d words, %0d decisions", words, ddecides));

    // OUTPUT 2.
    run_step(ORD_OUTPUT, 8'b0010_0000);
    check(out_ff == 2'b10, "OUTPUT sets flip-flop 2");

    // HALT stops without increasing the counter.
    run_step(ORD_HALT, 8'b0);
    check(!running && incr == 0 && load == 0, "HALT stops the machine");

    // START again, then STOP AND INITIALIZE in mid-step.
    press(btn_start);
    repeat (40) @(negedge clk);
    check(running, "restarted");
    press(btn_stop);
    check(!running && out_ff == 2'b00, "STOP AND INITIALIZE stops and clears");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
