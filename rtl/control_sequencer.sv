// control_sequencer: the control unit's sequencing logic.
//
// It runs the machine word time by word time and, within a word time, bit
// time by bit time, producing the datapath control word (dp_ctrl_t) for every
// bit time. It holds the START-STOP logic, decodes the order bus bars of the
// program board, and contains the modification stage, the jump/test logic,
// the gating that increases the instruction counter, the TEST flip-flop and
// the two OUTPUT flip-flops.
//
// A program step passes through these word-long states (all state changes at
// the end of bit time T15):
//   SETUP   N is loaded in T0 from the location encoder (location, jump
//           target or integer N, whichever the order uses).
//   MODIFY  only if hub M is plugged: N <- N - I in T1..T6 through the
//           adder/subtractor, I recirculating (M1 uses I1, M2 uses I2).
//   WAIT    S-orders only: word times pass until the compare unit finds the
//           word counter equal to N, so the wanted store word comes next.
//   EXEC    the order itself: one word time, seven phases for a multiply,
//           twelve for a divide. At the end of the last phase the
//           instruction counter is increased by one, or loaded from N if a
//           jump is taken; a HALT instead stops the machine (IDLE).
// Serial operations take T1..T12 (data words) or T1..T6 (N and I); the
// one-place shifts of A use T13 (and T0, T14 in a multiply phase); the
// carry flip-flop is cleared in T0.
// Buttons (one-clock pulses): ZERO COUNTER clears the instruction counter
// while the machine is stopped; START, while stopped, increases it by one at
// the next word boundary and runs; STOP AND INITIALIZE stops the machine at
// once and clears the TEST and OUTPUT flip-flops.
// The phase structure, order list, T-timing of the serial words and the
// multiply/divide algorithms follow the original machine; the SETUP word,
// the bit times chosen for the shifts, and the behaviour of the buttons
// beyond their one-line descriptions are this design's own.
module control_sequencer
  import dcc_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst_n,
  // timing
  input  logic [15:0]            t,
  input  logic                   t1_12,
  input  logic                   t1_6,
  // program board (through the decoder) and location encoder
  input  logic [ORDER_LINES-1:0] order_lines,
  input  logic [REG_LINES-1:0]   reg_lines,
  // buttons
  input  logic                   btn_start,
  input  logic                   btn_stop,
  input  logic                   btn_zero,
  // status
  input  logic                   match,      // compare unit
  input  word_t                  a,          // A-register, for the jump tests
  input  logic                   z,          // adder/subtractor output
  input  logic [3:0]             phase,
  input  logic                   mul_pre_shift,
  input  logic                   mul_add_en,
  input  logic                   mul_sub,
  input  logic                   mul_shift_mem,
  input  logic                   qd,
  // datapath control
  output dp_ctrl_t               ctrl,
  output logic                   n_load,
  output logic                   ic_zero,
  output logic                   ic_incr,
  output logic                   ic_load,
  output logic                   phase_clear,
  output logic                   phase_step,
  output logic                   mul_start,
  output logic                   mul_decide,
  output logic                   div_decide,
  // status outputs
  output logic                   running,
  output logic                   test_ff,
  output logic [1:0]             out_ff,
  output order_e                 order
);
  typedef enum logic [2:0] { S_IDLE, S_SETUP, S_MODIFY, S_WAIT, S_EXEC } state_e;
  state_e state;

  logic       start_pend;
  logic       zero_acc;       // all bits of I - N were zero so far
  logic [1:0] h_sel;
  logic       i_sel;
  logic       mod_on, mod_sel;
  logic       s_order, last_phase, jump_taken;
  logic [5:0] order_num;

  // Order decoding: the energised order bus bar, as its order number.
  always_comb begin
    order_num = '0;
    for (int k = 0; k < ORDER_LINES; k++)
      if (order_lines[k]) order_num = order_num | 6'(k + 1);
    order = order_e'(order_num);
  end

  // Register and modifier bus bars.
  always_comb begin
    h_sel   = 2'(reg_lines[1] ? 1 : 0) | 2'(reg_lines[2] ? 2 : 0) | 2'(reg_lines[3] ? 3 : 0);
    i_sel   = reg_lines[5];
    mod_on  = reg_lines[6] | reg_lines[7];
    mod_sel = reg_lines[7];
  end

  always_comb begin
    unique case (order)
      ORD_S_TO_H, ORD_H_TO_S, ORD_S_TO_A, ORD_A_TO_S, ORD_A_TO_S_CL,
      ORD_ADD_S, ORD_SUB_S: s_order = 1'b1;
      default:              s_order = 1'b0;
    endcase
    unique case (order)
      ORD_MUL_H: last_phase = (phase == 4'd7);
      ORD_DIV_H: last_phase = (phase == 4'd12);
      default:   last_phase = 1'b1;
    endcase
    // Jump/test logic.
    unique case (order)
      ORD_JUMP_NEG:  jump_taken = a[WORD_BITS-1];
      ORD_JUMP_ZERO: jump_taken = (a == '0);
      ORD_TEST_MOD:  jump_taken = !test_ff;
      ORD_JUMP:      jump_taken = 1'b1;
      default:       jump_taken = 1'b0;
    endcase
  end

  assign running = (state != S_IDLE);

  // Word-level sequencing.
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      state      <= S_IDLE;
      start_pend <= 1'b0;
      test_ff    <= 1'b0;
      out_ff     <= '0;
      zero_acc   <= 1'b0;
    end else if (btn_stop) begin
      state      <= S_IDLE;
      start_pend <= 1'b0;
      test_ff    <= 1'b0;
      out_ff     <= '0;
    end else begin
      if (btn_start && state == S_IDLE) start_pend <= 1'b1;
      // I - N -> I: remember whether every result bit is zero.
      if (state == S_EXEC && order == ORD_I_SUB_N) begin
        if (t[0])            zero_acc <= 1'b1;
        else if (t1_6 && z)  zero_acc <= 1'b0;
        if (t[15])           test_ff  <= zero_acc;
      end
      if (state == S_EXEC && order == ORD_OUTPUT && t[13]) begin
        if (reg_lines[4]) out_ff[0] <= 1'b1;
        if (reg_lines[5]) out_ff[1] <= 1'b1;
      end
      if (t[15]) begin
        unique case (state)
          S_IDLE:
            if (start_pend) begin
              start_pend <= 1'b0;
              state      <= S_SETUP;
            end
          S_SETUP:
            if (mod_on)                  state <= S_MODIFY;
            else if (s_order && !match)  state <= S_WAIT;
            else                         state <= S_EXEC;
          S_MODIFY:
            if (s_order && !match)       state <= S_WAIT;
            else                         state <= S_EXEC;
          S_WAIT:
            if (match)                   state <= S_EXEC;
          S_EXEC:
            if (last_phase)              state <= (order == ORD_HALT) ? S_IDLE : S_SETUP;
          default:                       state <= S_IDLE;
        endcase
      end
    end

  // Counter and unit strobes.
  always_comb begin
    n_load      = (state == S_SETUP) && t[0];
    ic_zero     = btn_zero && (state == S_IDLE);
    ic_incr     = t[15] && !btn_stop &&
                  (((state == S_IDLE) && start_pend) ||
                   ((state == S_EXEC) && last_phase && order != ORD_HALT && !jump_taken));
    ic_load     = t[15] && !btn_stop && (state == S_EXEC) && last_phase && jump_taken;
    phase_clear = t[15] && (state != S_EXEC);
    phase_step  = t[15] && (state == S_EXEC) && !last_phase;
    mul_start   = (state == S_EXEC) && (order == ORD_MUL_H) && (phase == 4'd1) && t[0];
    mul_decide  = (state == S_EXEC) && (order == ORD_MUL_H) && (phase != 4'd1) && t[0];
    div_decide  = (state == S_EXEC) && (order == ORD_DIV_H) && (phase != 4'd12) && t[0];
  end

  // Bit-level datapath control.
  always_comb begin
    ctrl         = '0;           // everything holds, sources ZERO
    ctrl.h_sel   = h_sel;
    ctrl.i_sel   = (state == S_MODIFY) ? mod_sel : i_sel;
    ctrl.add_clr = t[0];

    if (state == S_MODIFY && t1_6) begin
      // N <- N - I; I recirculates.
      ctrl.x_src   = SRC_N;  ctrl.y_src = SRC_I;
      ctrl.add_sub = 1'b1;   ctrl.add_step = 1'b1;
      ctrl.n_shift = 1'b1;   ctrl.n_src = SRC_Z;
      ctrl.i_shift = 1'b1;   ctrl.i_src = SRC_I;
    end

    if (state == S_EXEC) begin
      unique case (order)
        ORD_H_TO_A: if (t1_12) begin
          ctrl.a_op = A_SHR; ctrl.a_src = SRC_H;
          ctrl.h_shift = 1'b1; ctrl.h_src = SRC_H;
        end
        ORD_A_TO_H, ORD_A_TO_H_CL: if (t1_12) begin
          ctrl.h_shift = 1'b1; ctrl.h_src = SRC_A0;
          ctrl.a_op = A_SHR;
          ctrl.a_src = (order == ORD_A_TO_H) ? SRC_A0 : SRC_ZERO;
        end
        ORD_ADD_H, ORD_SUB_H: if (t1_12) begin
          ctrl.x_src = SRC_A0; ctrl.y_src = SRC_H;
          ctrl.add_sub = (order == ORD_SUB_H); ctrl.add_step = 1'b1;
          ctrl.a_op = A_SHR; ctrl.a_src = SRC_Z;
          ctrl.h_shift = 1'b1; ctrl.h_src = SRC_H;
        end
        ORD_S_TO_H: if (t1_12) begin
          ctrl.h_shift = 1'b1; ctrl.h_src = SRC_S;
        end
        ORD_H_TO_S: if (t1_12) begin
          ctrl.s_write = 1'b1; ctrl.s_src = SRC_H;
          ctrl.h_shift = 1'b1; ctrl.h_src = SRC_H;
        end
        ORD_S_TO_A: if (t1_12) begin
          ctrl.a_op = A_SHR; ctrl.a_src = SRC_S;
        end
        ORD_A_TO_S, ORD_A_TO_S_CL: if (t1_12) begin
          ctrl.s_write = 1'b1; ctrl.s_src = SRC_A0;
          ctrl.a_op = A_SHR;
          ctrl.a_src = (order == ORD_A_TO_S) ? SRC_A0 : SRC_ZERO;
        end
        ORD_ADD_S, ORD_SUB_S: if (t1_12) begin
          ctrl.x_src = SRC_A0; ctrl.y_src = SRC_S;
          ctrl.add_sub = (order == ORD_SUB_S); ctrl.add_step = 1'b1;
          ctrl.a_op = A_SHR; ctrl.a_src = SRC_Z;
        end
        ORD_SHR_A: if (t[13]) begin
          ctrl.a_op = A_SHR; ctrl.a_src = SRC_A11;
        end
        ORD_SHL_A: if (t[13]) ctrl.a_op = A_SHL_KEEP;
        ORD_INPUT: if (t[13]) ctrl.a_op = A_LOAD_D;
        ORD_N_TO_I: if (t1_6) begin
          ctrl.i_shift = 1'b1; ctrl.i_src = SRC_N;
          ctrl.n_shift = 1'b1; ctrl.n_src = SRC_N;
        end
        ORD_I_ADD_N, ORD_I_SUB_N: if (t1_6) begin
          ctrl.x_src = SRC_I; ctrl.y_src = SRC_N;
          ctrl.add_sub = (order == ORD_I_SUB_N); ctrl.add_step = 1'b1;
          ctrl.i_shift = 1'b1; ctrl.i_src = SRC_Z;
          ctrl.n_shift = 1'b1; ctrl.n_src = SRC_N;
        end
        ORD_MUL_H: begin
          if (phase == 4'd1) begin
            // Phase 1: the multiplier moves from A into Q; A is cleared.
            if (t1_12) begin
              ctrl.a_op = A_SHR; ctrl.a_src = SRC_ZERO;
              ctrl.q_op = Q_SHR; ctrl.q_src = SRC_A0;
            end
          end else begin
            if ((t[0] && mul_pre_shift) ||
                (t[13] && !(mul_shift_mem && phase == 4'd7)) ||
                (t[14] && !mul_shift_mem && phase != 4'd7)) begin
              // Right shift of the double-length partial product A:Q.
              ctrl.a_op = A_SHR; ctrl.a_src = SRC_A11;
              ctrl.q_op = Q_SHR; ctrl.q_src = SRC_A0;
            end
            if (t1_12) begin
              ctrl.h_shift = 1'b1; ctrl.h_src = SRC_H;
              ctrl.a_op = A_SHR;
              if (mul_add_en) begin
                ctrl.x_src = SRC_A0; ctrl.y_src = SRC_H;
                ctrl.add_sub = mul_sub; ctrl.add_step = 1'b1;
                ctrl.a_src = SRC_Z;
              end else begin
                ctrl.a_src = SRC_A0;
              end
            end
          end
        end
        ORD_DIV_H: begin
          if (phase != 4'd12) begin
            if (t1_12) begin
              // Subtract the divisor if the signs agreed, else add it.
              ctrl.x_src = SRC_A0; ctrl.y_src = SRC_H;
              ctrl.add_sub = qd; ctrl.add_step = 1'b1;
              ctrl.a_op = A_SHR; ctrl.a_src = SRC_Z;
              ctrl.h_shift = 1'b1; ctrl.h_src = SRC_H;
            end
            if (t[13]) begin
              // New partial remainder by a left shift; digit into Q.
              ctrl.a_op = A_SHL;
              ctrl.q_op = Q_SHL; ctrl.q_src = SRC_QD;
            end
          end else begin
            // Phase 12: the quotient moves from Q into A. The digits q0..q10
            // stand for +1/-1 at weights 1 .. 2^-10; as a two's complement
            // fraction that is {q1..q10, 1, 0}.
            if (t[1]) begin
              ctrl.a_op = A_SHR; ctrl.a_src = SRC_ZERO;
            end else if (t[2]) begin
              ctrl.a_op = A_SHR; ctrl.a_src = SRC_ONE;
            end else if (t1_12) begin
              ctrl.a_op = A_SHR; ctrl.a_src = SRC_Q0;
              ctrl.q_op = Q_SHR; ctrl.q_src = SRC_ZERO;
            end
          end
        end
        default: ;
      endcase
    end
  end

  // Only one order, one location, one H-register may be energised at a time.
  a_one_order: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(order_lines));
  a_one_h:     assert property (@(posedge clk) disable iff (!rst_n) $onehot0(reg_lines[3:0]));
endmodule
