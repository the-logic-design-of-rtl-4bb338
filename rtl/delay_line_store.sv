// delay_line_store: STORE S, the recirculating magnetostrictive delay line.
//
// The line holds WORDS words of WORD_TIME_BITS bits (61 x 16 = 976 bits,
// 4880 us at 200 kc/s). Each word carries a 12-bit data word, least
// significant bit first, in its bit times T1..T12, and four spacer bits.
// Bits leave the line one per clock at dout and normally re-enter it
// unchanged; while we is set the gating logic of the pack enters din instead,
// which is how a word is written as it passes. The line is modelled as a bit
// array with a rotating read/write position: the bit at dout during a clock
// is the one that re-enters the line on that clock's edge, so a written bit
// reappears at dout exactly WORDS*WORD_TIME_BITS clocks later. The position
// starts at zero on reset, which aligns word 0, bit time T0 with the first bit
// time after reset; the line contents are not cleared (a real line starts
// with whatever it holds). The output flip-flop of the pack is folded into
// the array read.
module delay_line_store #(
  parameter int WORDS          = 61,
  parameter int WORD_TIME_BITS = 16
) (
  input  logic clk,
  input  logic rst_n,
  input  logic we,
  input  logic din,
  output logic dout
);
  localparam int BITS = WORDS * WORD_TIME_BITS;
  localparam int PW   = $clog2(BITS);

  logic          line [BITS];
  logic [PW-1:0] pos;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)                       pos <= '0;
    else if (pos == PW'(BITS - 1))    pos <= '0;
    else                              pos <= pos + PW'(1);

  always_ff @(posedge clk)
    if (we) line[pos] <= din;

  assign dout = line[pos];
endmodule
