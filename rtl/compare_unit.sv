// compare_unit: the COMPARE UNIT.
//
// Compares the location number in the control register N with the word
// counter. Since the word counter names the word that appears next, equality
// at the end of a word time (T15) means the next word time carries the wanted
// store location; the sequencer then gates the S-order into that word time.
// Purely combinational: match = (n == wc).
module compare_unit
  import dcc_pkg::*;
(
  input  idx_t n,
  input  idx_t wc,
  output logic match
);
  assign match = (n == wc);
endmodule
