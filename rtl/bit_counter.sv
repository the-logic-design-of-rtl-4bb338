// bit_counter: the four-stage BIT COUNTER of the control unit.
//
// It counts the master clock pulses T and gives a binary count of 0 to 15,
// one count per bit time, wrapping from 15 to 0. The timing unit decodes this
// count into the sixteen bit-time signals. As in the timing unit's decoding
// gates, the count during bit time Tn is n-1 (T0 is count 15); reset puts the
// counter at 15, so the first bit time after reset is T0. The counter runs
// freely, as the delay line never stops. Interface: b is the count; it
// advances on every rising clock edge.
module bit_counter (
  input  logic       clk,
  input  logic       rst_n,
  output logic [3:0] b
);
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) b <= 4'd15;
    else        b <= b + 4'd1;
endmodule
