// h_registers: the four 12-bit HOLD REGISTERS H1..H4.
//
// An immediate-access working store. The register picked by sel (0..3 for
// H1..H4) shifts right one place per clock while shift is set (through
// T1..T12), offering its least significant bit on lsb and taking sin at the
// top: sin is either its own lsb, so the word recirculates and is kept, or
// the ENTER bus, so a new word is written. The other three hold. sign is the
// sign stage of the selected register, which the division unit compares with
// the sign of A before each phase. All four words are also output, for
// observation.
module h_registers
  import dcc_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic [1:0] sel,
  input  logic       shift,
  input  logic       sin,
  output logic       lsb,
  output logic       sign,
  output word_t      h [4]
);
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)     h <= '{default: '0};
    else if (shift) h[sel] <= {sin, h[sel][WORD_BITS-1:1]};

  assign lsb  = h[sel][0];
  assign sign = h[sel][WORD_BITS-1];
endmodule
