// enter_bus: the ENTER bus and the inputs to the adder/subtractor.
//
// In a serial machine every transfer is a choice of which bit enters a
// register on the next shift. This block makes those choices for one bit
// time: from the serial bits on offer (A, Q, the selected H- and
// I-registers, the delay line, N, the adder output and the quotient digit)
// it picks, as the sequencer's control word says, the bit entering A, Q, the
// H-registers, the I-registers, N and the delay line, and the X and Y
// operands of the adder/subtractor. The operands are chosen from the
// register bits only, never from the adder output z, so there is no
// combinational loop. Purely combinational; a one-of-many
// select per destination is this design's form of the original gating.
module enter_bus
  import dcc_pkg::*;
(
  input  dp_ctrl_t ctrl,
  input  dp_bits_t bits,
  input  logic     z,
  output logic     a_in,
  output logic     q_in,
  output logic     h_in,
  output logic     i_in,
  output logic     n_in,
  output logic     s_in,
  output logic     x,
  output logic     y
);
  function automatic logic pick(src_e s, dp_bits_t v, logic zv);
    unique case (s)
      SRC_ONE: return 1'b1;
      SRC_A0:  return v.a0;
      SRC_A11: return v.a11;
      SRC_Q0:  return v.q0;
      SRC_H:   return v.h;
      SRC_S:   return v.s;
      SRC_N:   return v.n;
      SRC_I:   return v.i;
      SRC_Z:   return zv;
      SRC_QD:  return v.qd;
      default: return 1'b0;
    endcase
  endfunction

  assign a_in = pick(ctrl.a_src, bits, z);
  assign q_in = pick(ctrl.q_src, bits, z);
  assign h_in = pick(ctrl.h_src, bits, z);
  assign i_in = pick(ctrl.i_src, bits, z);
  assign n_in = pick(ctrl.n_src, bits, z);
  assign s_in = pick(ctrl.s_src, bits, z);
  assign x    = pick(ctrl.x_src, bits, 1'b0);
  assign y    = pick(ctrl.y_src, bits, 1'b0);
endmodule
