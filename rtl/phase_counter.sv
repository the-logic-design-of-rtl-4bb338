// phase_counter: the PHASE COUNTER of the multiplication and division units.
//
// Counts the word-long phases of a multiply (7 phases) or divide (12
// phases). clear sets it to phase 1 at the start of an order; step (given in
// T15 of each phase) advances it. The count width of four bits covers the
// twelve division phases.
module phase_counter (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       clear,
  input  logic       step,
  output logic [3:0] phase
);
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)     phase <= 4'd1;
    else if (clear) phase <= 4'd1;
    else if (step)  phase <= phase + 4'd1;
endmodule
