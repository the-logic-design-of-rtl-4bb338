// multiplication_unit: multiple-digit (two bits at a time) Booth recoding.
//
// Multiplication takes seven word-long phases. In phase 1 the multiplier
// moves from A into Q and A is cleared. In each of phases 2..7 this unit
// examines three multiplier digits: the two least significant stages of Q
// (L1, L0) and the KEEP flip-flop K, and chooses
//   L1 L0 K : 000, 111 -> neither add nor subtract
//             010, 001 -> add
//             110, 101 -> subtract
//             100      -> shift right, subtract, shift right
//             011      -> shift right, add, shift right
// i.e. it adds d times the multiplicand with d = -2 L1 + L0 + K, doing the
// doubling by a shift made before the addition. The decision is taken by
// decide (bit time T0 of the phase) and held for the phase: add_en / sub
// say what the serial adder does in T1..T12, and shift_mem (the SHIFT MEMORY
// flip-flop) records that one of the phase's right shifts has already been
// made, so the sequencer makes only one more. pre_shift is the same choice
// combinationally, for the shift made at T0 itself. On decide K takes L1,
// the digit shared with the next pair. start (T0 of phase 1) clears K.
module multiplication_unit (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  logic decide,
  input  logic l1,
  input  logic l0,
  output logic pre_shift,
  output logic add_en,
  output logic sub,
  output logic shift_mem,
  output logic keep
);
  logic d_add, d_sub;

  always_comb begin
    d_add     = 1'b0;
    d_sub     = 1'b0;
    pre_shift = 1'b0;
    unique case ({l1, l0, keep})
      3'b010, 3'b001: d_add = 1'b1;
      3'b110, 3'b101: d_sub = 1'b1;
      3'b100:         begin d_sub = 1'b1; pre_shift = 1'b1; end
      3'b011:         begin d_add = 1'b1; pre_shift = 1'b1; end
      default:        ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      keep <= 1'b0; add_en <= 1'b0; sub <= 1'b0; shift_mem <= 1'b0;
    end else if (start) begin
      keep <= 1'b0; add_en <= 1'b0; sub <= 1'b0; shift_mem <= 1'b0;
    end else if (decide) begin
      keep      <= l1;
      add_en    <= d_add | d_sub;
      sub       <= d_sub;
      shift_mem <= pre_shift;
    end
endmodule
