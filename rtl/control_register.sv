// control_register: the CONTROL REGISTER, or N-REGISTER.
//
// Six bits. It takes, by parallel load from the location encoder, a store
// location, a jump target step or the integer N of an I-register order. It
// shifts right one place per bit time while shift is set (in T1..T6),
// offering its least significant bit on lsb and taking sin at the top: so N
// can be recirculated, sent to an I-register, or replaced bit by bit with
// N - I during the modification stage. Parallel load wins over shift.
module control_register
  import dcc_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic load,
  input  idx_t d,
  input  logic shift,
  input  logic sin,
  output idx_t n,
  output logic lsb
);
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)     n <= '0;
    else if (load)  n <= d;
    else if (shift) n <= {sin, n[IDX_BITS-1:1]};
  assign lsb = n[0];
endmodule
