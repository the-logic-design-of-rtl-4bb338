// word_counter: the six-bit WORD COUNTER.
//
// It holds the location number (0..60) of the store word that will appear
// next at the delay line output, not the word now passing. It steps at the
// end of every word time (in bit time T15) and wraps from 60 to 0, because the
// delay line holds 61 words. The wrap value comes from the store size; the
// reset value of 1 (word 0 is passing in the first word time after reset) is
// this design's choice, matching the delay line's reset position.
// Interface: step is T15; wc is the count.
module word_counter
  import dcc_pkg::*;
#(
  parameter int WORDS = 61
) (
  input  logic clk,
  input  logic rst_n,
  input  logic step,
  output idx_t wc
);
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)    wc <= idx_t'(1 % WORDS);
    else if (step) wc <= (wc == idx_t'(WORDS - 1)) ? '0 : wc + idx_t'(1);
endmodule
