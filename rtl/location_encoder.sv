// location_encoder: the LOCATION ENCODER.
//
// The program board energises one of the 61 location bus bars L0..L60
// (or none, if hub L is not plugged). The encoder gives its number in binary
// for the control register. It is an OR encoder: bit k of the result is the
// OR of the lines whose number has bit k set, so a single energised line is
// encoded exactly. any reports whether a line is energised. Combinational.
module location_encoder
  import dcc_pkg::*;
(
  input  logic [LOCATIONS-1:0] l,
  output idx_t                 n,
  output logic                 any
);
  always_comb begin
    n = '0;
    for (int j = 0; j < LOCATIONS; j++)
      if (l[j]) n = n | idx_t'(j);
    any = |l;
  end
endmodule
