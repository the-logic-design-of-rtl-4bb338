// adder_subtractor: the serial ADDER/SUBTRACTOR.
//
// One full adder/subtractor stage and a carry/borrow flip-flop W. Operands
// arrive one bit per bit time, least significant first: X (augend or
// minuend) and Y (addend or subtrahend). z is the sum or difference of the
// current bit, combinational. On each clock with step set, W takes the output
// carry (sub = 0) or output borrow (sub = 1) of the truth table
//   Z = X ^ Y ^ W, Co = majority(X, Y, W), Bo = ~X&Y | ~X&W | Y&W,
// ready for the next bit. clr (given in T0, before the first data bit)
// empties W; clr has priority over step. The same unit serves the 12-bit data
// words (T1..T12) and the 6-bit N and I quantities (T1..T6).
module adder_subtractor (
  input  logic clk,
  input  logic rst_n,
  input  logic x,
  input  logic y,
  input  logic sub,
  input  logic clr,
  input  logic step,
  output logic z
);
  logic w, co, bo;
  assign z  = x ^ y ^ w;
  assign co = (x & y) | (x & w) | (y & w);
  assign bo = (~x & y) | (~x & w) | (y & w);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)    w <= 1'b0;
    else if (clr)  w <= 1'b0;
    else if (step) w <= sub ? bo : co;
endmodule
