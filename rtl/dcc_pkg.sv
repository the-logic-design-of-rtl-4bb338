// dcc_pkg: types and constants shared by the blocks of the serial digital
// control computer.
//
// The machine is bit serial. One clock period is one bit time; sixteen bit
// times T0..T15 make one word time. A data word is 12 bits, two's complement
// fraction, least significant bit first, carried in bit times T1..T12; T13,
// T14, T15 and T0 are spacer bits. The six-bit quantities (N, I) travel in
// T1..T6. Order numbers follow the machine's instruction list (1..32); the
// numbering, word length, store size and step count are the original
// machine's. The encodings of the bit-source selects and of the accumulator
// operations are this design's own.
package dcc_pkg;

  localparam int WORD_BITS      = 12;  // data word length
  localparam int WORD_TIME_BITS = 16;  // bit times per word time
  localparam int IDX_BITS       = 6;   // N, I, word counter, instruction counter
  localparam int STEPS          = 64;  // program steps D0..D63
  localparam int ORDER_LINES    = 32;  // order bus bars on the program board
  localparam int LOCATIONS      = 61;  // L0..L60
  localparam int REG_LINES      = 8;   // H1 H2 H3 H4 I1 I2 M1 M2
  localparam int DIGITIZER_BITS = 10;  // D-REGISTER of the shaft digitizer

  typedef logic [WORD_BITS-1:0] word_t;
  typedef logic [IDX_BITS-1:0]  idx_t;

  // Order numbers as printed on the program board and in the instruction list.
  typedef enum logic [5:0] {
    ORD_NONE      = 6'd0,   // hub O not plugged: treated as a spare order
    ORD_H_TO_A    = 6'd1,
    ORD_A_TO_H    = 6'd2,
    ORD_A_TO_H_CL = 6'd3,
    ORD_ADD_H     = 6'd4,
    ORD_SUB_H     = 6'd5,
    ORD_MUL_H     = 6'd6,
    ORD_DIV_H     = 6'd7,
    ORD_S_TO_H    = 6'd9,
    ORD_H_TO_S    = 6'd10,
    ORD_S_TO_A    = 6'd11,
    ORD_A_TO_S    = 6'd12,
    ORD_A_TO_S_CL = 6'd13,
    ORD_ADD_S     = 6'd14,
    ORD_SUB_S     = 6'd15,
    ORD_SHR_A     = 6'd17,
    ORD_SHL_A     = 6'd18,
    ORD_JUMP_NEG  = 6'd19,
    ORD_JUMP_ZERO = 6'd20,
    ORD_N_TO_I    = 6'd21,
    ORD_I_ADD_N   = 6'd22,
    ORD_I_SUB_N   = 6'd23,
    ORD_TEST_MOD  = 6'd25,
    ORD_INPUT     = 6'd27,
    ORD_OUTPUT    = 6'd28,
    ORD_JUMP      = 6'd29,
    ORD_HALT      = 6'd31
  } order_e;

  // Register bus bars (hub R) and modifier bus bars (hub M).
  typedef enum logic [2:0] {
    REG_NONE = 3'd0, REG_H1 = 3'd1, REG_H2 = 3'd2, REG_H3 = 3'd3,
    REG_H4   = 3'd4, REG_I1 = 3'd5, REG_I2 = 3'd6
  } reg_e;

  typedef enum logic [1:0] { MOD_NONE = 2'd0, MOD_M1 = 2'd1, MOD_M2 = 2'd2 } mod_e;

  // One program step as plugged on the board.
  typedef struct packed {
    order_e order;
    reg_e   regsel;  
    logic   loc_valid;   // hub L plugged
    idx_t   loc;         // L0..L60
    mod_e   modifier;
  } step_t;

  // Source of a serial bit entering a register or the adder/subtractor.
  typedef enum logic [3:0] {
    SRC_ZERO  = 4'd0,
    SRC_ONE   = 4'd1,
    SRC_A0    = 4'd2,   // least significant stage of A
    SRC_A11   = 4'd3,   // sign stage of A
    SRC_Q0    = 4'd4,   // least significant stage of Q
    SRC_H     = 4'd5,   // least significant stage of the selected H-register
    SRC_S     = 4'd6,   // delay line output
    SRC_N     = 4'd7,   // least significant stage of N
    SRC_I     = 4'd8,   // least significant stage of the selected I-register
    SRC_Z     = 4'd9,   // adder/subtractor sum or difference
    SRC_QD    = 4'd10   // quotient digit from the division unit
  } src_e;

  typedef enum logic [2:0] {
    A_HOLD      = 3'd0,
    A_SHR       = 3'd1,  // A <- {in, A[11:1]}
    A_SHL       = 3'd2,  // A <- {A[10:0], 0}
    A_SHL_KEEP  = 3'd3,  // A <- {A[11], A[9:0], 0}: left shift repeating the sign
    A_CLEAR     = 3'd4,
    A_LOAD_D    = 3'd5   // A <- {00, D}
  } a_op_e;

  typedef enum logic [1:0] {
    Q_HOLD = 2'd0,
    Q_SHR  = 2'd1,       // Q <- {in, Q[11:1]}
    Q_SHL  = 2'd2        // Q <- {Q[10:0], in}
  } q_op_e;

  // Per-bit-time control of the serial datapath, produced by the sequencer.
  typedef struct packed {
    a_op_e a_op;   src_e a_src;
    q_op_e q_op;   src_e q_src;
    logic  h_shift; src_e h_src; logic [1:0] h_sel;
    logic  i_shift; src_e i_src; logic       i_sel;
    logic  n_shift; src_e n_src;
    logic  s_write; src_e s_src;
    src_e  x_src;   src_e y_src;
    logic  add_sub;  // 1: subtract Y from X
    logic  add_clr;  // clear the carry/borrow flip-flop
    logic  add_step; // clock the carry/borrow flip-flop
  } dp_ctrl_t;

  // Serial register bits offered to the enter bus (the adder output, which
  // depends on the operands chosen from these, is kept apart).
  typedef struct packed {
    logic a0, a11, q0, h, s, n, i, qd;
  } dp_bits_t;

endpackage
