// control_computer: the complete bit-serial digital control computer.
//
// A small on-line computer for control experiments. Its program is wired on
// a plugboard of 64 steps; its data live in a 61-word recirculating delay
// line and in six immediate-access registers (four 12-bit H-registers, two
// 6-bit I-registers); arithmetic is done one bit at a time by a single
// serial adder/subtractor on 12-bit two's complement fractions, with
// multiplication by two-bit Booth recoding (7 word times) and non-restoring
// division (12 word times). Store locations can be modified by an index
// register, which with the I-register orders and TEST MODIFIER gives program
// loops. Input is by keyboard into A or from a shaft digitizer's 10-bit
// D-register; output is the A-register lamps and two OUTPUT flip-flops.
//
// Timing: one clock is one bit time (200 kc/s in the original), sixteen bit
// times T0..T15 are one word time; data bits are in T1..T12, least
// significant first. The instruction counter drives the decoder, whose line
// energises one step of the program board; the board's bus bars give the
// order, register, modifier and, through the location encoder, the number
// loaded into N. The control sequencer then drives the datapath bit by bit
// (see control_sequencer for the word-level states).
//
// Interface: the buttons (btn_*) and keyboard (kb_*) are one-clock pulses;
// the program is wired through the plug_* port (one step per clock, while
// stopped); d_reg is the digitizer value; a is the lamp display. Everything
// else is brought out for observation. STORE_WORDS (61) is the delay-line
// length in words.
module control_computer
  import dcc_pkg::*;
#(
  parameter int STORE_WORDS = 61
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // console
  input  logic                      btn_start,
  input  logic                      btn_stop,
  input  logic                      btn_zero,
  input  logic                      kb_clear,
  input  word_t                     kb_set,
  // program board wiring
  input  logic                      plug_we,
  input  idx_t                      plug_step,
  input  step_t                     plug_data,
  // shaft position digitizer D-register
  input  logic [DIGITIZER_BITS-1:0] d_reg,
  // outputs
  output word_t                     a,        // lamps
  output logic [1:0]                out_ff,   // OUTPUT flip-flops 1 and 2
  output logic                      running,
  // observation
  output word_t                     q,
  output word_t                     h [4],
  output idx_t                      i [2],
  output idx_t                      n,
  output idx_t                      ic,
  output idx_t                      wc,
  output logic                      test_ff,
  output order_e                    order,
  output logic [3:0]                phase,
  output logic [15:0]               t
);
  logic [3:0]             b;
  logic                   t1_12, t1_6;
  logic [STEPS-1:0]       d;
  logic [ORDER_LINES-1:0] order_lines;
  logic [REG_LINES-1:0]   reg_lines;
  logic [LOCATIONS-1:0]   loc_lines;
  idx_t                   loc_n;
  logic                   match;
  dp_ctrl_t               ctrl;
  dp_bits_t               bits;
  logic                   n_load, ic_zero, ic_incr, ic_load;
  logic                   phase_clear, phase_step;
  logic                   mul_start, mul_decide, div_decide;
  logic                   mul_pre_shift, mul_add_en, mul_sub, mul_shift_mem;
  logic                   qd;
  logic                   a_in, q_in, h_in, i_in, n_in, s_in, x, y, z;
  logic                   h_lsb, h_sign, i_lsb, n_lsb, s_out;

  // Timing.
  bit_counter u_bit_counter (.clk, .rst_n, .b);
  timing_unit u_timing (.b, .t, .t1_12, .t1_6);

  // Program step selection.
  instruction_counter u_ic (.clk, .rst_n, .zero(ic_zero), .incr(ic_incr),
                            .load(ic_load), .d(n), .ic);
  instruction_decoder u_dec (.ic, .d);
  program_board u_board (.clk, .rst_n, .plug_we, .plug_step, .plug_data, .d,
                         .order_lines, .reg_lines, .loc_lines);
  location_encoder u_loc (.l(loc_lines), .n(loc_n), .any());

  // Store and its addressing.
  control_register u_n (.clk, .rst_n, .load(n_load), .d(loc_n),
                        .shift(ctrl.n_shift), .sin(n_in), .n, .lsb(n_lsb));
  word_counter #(.WORDS(STORE_WORDS)) u_wc (.clk, .rst_n, .step(t[15]), .wc);
  compare_unit u_cmp (.n, .wc, .match);
  delay_line_store #(.WORDS(STORE_WORDS), .WORD_TIME_BITS(WORD_TIME_BITS)) u_store (
    .clk, .rst_n, .we(ctrl.s_write), .din(s_in), .dout(s_out));

  // Registers.
  accumulator u_acc (.clk, .rst_n, .a_op(ctrl.a_op), .a_in, .q_op(ctrl.q_op),
                     .q_in, .d_reg, .kb_clear, .kb_set, .a, .q);
  h_registers u_h (.clk, .rst_n, .sel(ctrl.h_sel), .shift(ctrl.h_shift),
                   .sin(h_in), .lsb(h_lsb), .sign(h_sign), .h);
  i_registers u_i (.clk, .rst_n, .sel(ctrl.i_sel), .shift(ctrl.i_shift),
                   .sin(i_in), .lsb(i_lsb), .i);

  // Arithmetic.
  assign bits = '{a0: a[0], a11: a[WORD_BITS-1], q0: q[0], h: h_lsb, s: s_out,
                  n: n_lsb, i: i_lsb, qd: qd};
  enter_bus u_enter (.ctrl, .bits, .z, .a_in, .q_in, .h_in, .i_in, .n_in,
                     .s_in, .x, .y);
  adder_subtractor u_add (.clk, .rst_n, .x, .y, .sub(ctrl.add_sub),
                          .clr(ctrl.add_clr), .step(ctrl.add_step), .z);
  phase_counter u_phase (.clk, .rst_n, .clear(phase_clear), .step(phase_step), .phase);
  multiplication_unit u_mul (.clk, .rst_n, .start(mul_start), .decide(mul_decide),
                             .l1(q[1]), .l0(q[0]), .pre_shift(mul_pre_shift),
                             .add_en(mul_add_en), .sub(mul_sub),
                             .shift_mem(mul_shift_mem), .keep());
  division_unit u_div (.clk, .rst_n, .decide(div_decide), .a_sign(a[WORD_BITS-1]),
                       .h_sign, .qd);

  // Control.
  control_sequencer u_seq (
    .clk, .rst_n, .t, .t1_12, .t1_6, .order_lines, .reg_lines,
    .btn_start, .btn_stop, .btn_zero, .match, .a, .z, .phase,
    .mul_pre_shift, .mul_add_en, .mul_sub, .mul_shift_mem, .qd,
    .ctrl, .n_load, .ic_zero, .ic_incr, .ic_load, .phase_clear, .phase_step,
    .mul_start, .mul_decide, .div_decide, .running, .test_ff, .out_ff, .order);
endmodule
