// i_registers: the two 6-bit INDEX REGISTERS I1 and I2.
//
// They hold the modifiers used to change store location numbers, and the
// loop counts of the I-register orders. The register picked by sel (0 for
// I1, 1 for I2) shifts right one place per clock while shift is set (through
// T1..T6), offering its least significant bit on lsb and taking sin at the
// top: its own lsb to recirculate, N to be loaded, or the adder output for
// I + N and I - N. The other register holds.
module i_registers
  import dcc_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic sel,
  input  logic shift,
  input  logic sin,
  output logic lsb,
  output idx_t i [2]
);
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)     i <= '{default: '0};
    else if (shift) i[sel] <= {sin, i[sel][IDX_BITS-1:1]};

  assign lsb = i[sel][0];
endmodule
