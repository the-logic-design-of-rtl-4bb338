// instruction_decoder: the INSTRUCTION NUMBER DECODER.
//
// Turns the six-bit instruction counter into 64 lines D0..D63, exactly one
// of them energised: the line of the program step being executed. The lines
// drive the step hub groups of the program board. Combinational.
module instruction_decoder
  import dcc_pkg::*;
(
  input  idx_t             ic,
  output logic [STEPS-1:0] d
);
  always_comb begin
    d = '0;
    d[ic] = 1'b1;
  end
endmodule
