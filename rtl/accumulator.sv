// accumulator: the A-REGISTER and Q-REGISTER.
//
// Two 12-bit registers that shift right or left by one place per clock. A is
// the main working register: augend, minuend, multiplier, dividend, the
// result of every arithmetic order, the input/output register and the
// register watched by the lamps. Q extends A for multiplication and division.
// a_op and q_op select, per bit time, what each register does; a_in and q_in
// are the serial bits entering on the shift (chosen by the enter bus).
// Serial transfers and additions shift A right through T1..T12, taking the
// result bit at the top; A_SHR with a_in = A[11] is the arithmetic right
// shift and, with Q_SHR taking A[0], the double-length shift of
// multiplication. A_SHL_KEEP is the left shift of order 18, which keeps the
// sign bit. A_LOAD_D puts the 10-bit digitizer value into the 10 low stages
// and clears the two upper ones.
// The keyboard buttons act at once, whatever the sequencer does: CLEAR
// ACCUMULATOR empties A, and each of the 12 INPUT buttons sets its stage of A
// to ONE (kb_set wins over kb_clear).
module accumulator
  import dcc_pkg::*;
(
  input  logic                      clk,
  input  logic                      rst_n,
  input  a_op_e                     a_op,
  input  logic                      a_in,
  input  q_op_e                     q_op,
  input  logic                      q_in,
  input  logic [DIGITIZER_BITS-1:0] d_reg,
  input  logic                      kb_clear,
  input  word_t                     kb_set,
  output word_t                     a,
  output word_t                     q
);
  word_t a_next;

  always_comb begin
    unique case (a_op)
      A_SHR:      a_next = {a_in, a[WORD_BITS-1:1]};
      A_SHL:      a_next = {a[WORD_BITS-2:0], 1'b0};
      A_SHL_KEEP: a_next = {a[WORD_BITS-1], a[WORD_BITS-3:0], 1'b0};
      A_CLEAR:    a_next = '0;
      A_LOAD_D:   a_next = {2'b00, d_reg};
      default:    a_next = a;
    endcase
    if (kb_clear)      a_next = '0;
    if (|kb_set)       a_next = a_next | kb_set;
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      a <= '0;
      q <= '0;
    end else begin
      a <= a_next;
      unique case (q_op)
        Q_SHR:   q <= {q_in, q[WORD_BITS-1:1]};
        Q_SHL:   q <= {q[WORD_BITS-2:0], q_in};
        default: q <= q;
      endcase
    end
endmodule
