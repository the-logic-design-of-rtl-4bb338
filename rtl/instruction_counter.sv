// instruction_counter: the six-bit INSTRUCTION COUNTER.
//
// Holds the number of the program step being executed. ZERO COUNTER clears
// it; it is increased by one when a step completes (or when START is
// pressed) and wraps from 63 to 0; for a jump it is loaded from the control
// register. Clear has priority over load, load over increment; the priority
// is this design's choice. All actions happen on the rising clock edge.
module instruction_counter
  import dcc_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic zero,
  input  logic incr,
  input  logic load,
  input  idx_t d,
  output idx_t ic
);
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)     ic <= '0;
    else if (zero)  ic <= '0;
    else if (load)  ic <= d;
    else if (incr)  ic <= ic + idx_t'(1);
endmodule
