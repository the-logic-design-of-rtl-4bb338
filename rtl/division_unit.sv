// division_unit: quotient-digit logic of non-restoring division.
//
// Division takes twelve word-long phases. Before each of phases 1..11
// (decide, in bit time T0) the unit compares the sign of the partial
// remainder in A with the sign of the divisor in the selected H-register.
// If they agree the divisor is subtracted and the quotient digit is 1; if
// not it is added and the digit is 0. The digit is held in qd for the phase:
// it sets the adder to subtract and, at the end of the phase, is shifted into
// Q as A is shifted left. Phase 12 (done by the sequencer) moves Q into A.
module division_unit (
  input  logic clk,
  input  logic rst_n,
  input  logic decide,
  input  logic a_sign,
  input  logic h_sign,
  output logic qd
);
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)      qd <= 1'b0;
    else if (decide) qd <= (a_sign == h_sign);
endmodule
