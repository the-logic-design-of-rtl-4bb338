// timing_unit: decodes the bit counter into the machine's timing signals.
//
// t[n] is T_n, the n-th bit time of the 16-bit word time. Each T_n is an AND
// of the counter stages, true when the count is n-1 (count 15 gives T0), as
// drawn in the decoding gates of the original timing unit. t1_12 is the
// train (T1-T12), the twelve data bits; t1_6 is (T1-T6), the six bits used
// by the N and I registers. These trains are formed, as in the original, from
// a few counter terms: (T1-T12) from counts 0..7 and 8..11, (T1-T6) from
// counts 0..3 and 4..5. Purely combinational.
module timing_unit (
  input  logic [3:0]  b,
  output logic [15:0] t,
  output logic        t1_12,
  output logic        t1_6
);
  always_comb begin
    for (int n = 0; n < 16; n++) t[n] = (b == 4'(n + 15));
    t1_12 = !b[3] || (b[3] && !b[2]);          // counts 0..11
    t1_6  = (!b[2] && !b[3]) || (b[2] && !b[1] && !b[3]);  // counts 0..5
  end
endmodule
