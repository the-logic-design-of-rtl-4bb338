// program_board: the pluggable PROGRAM BOARD.
//
// The program is wired on a panel. Each of the 64 program steps has four
// hubs: O (order), R (register), L (location) and M (modifier). A step's hubs
// are energised through isolating diodes by its decoder line D0..D63, and a
// wire from a hub to a bus bar energises that bus bar: one of the 32 order
// bus bars, the register bus bars H1 H2 H3 H4 I1 I2, the modifier bus bars
// M1 M2, or one of the location bus bars L0..L60. Because of the diodes the
// bus bars are the OR of the energised steps' wiring only.
// The wiring is held here as a table of one step_t per step, written through
// the plug port (plug_we, plug_step, plug_data), which stands for the
// operator's wiring; reset removes all wires. Outputs: order_lines[k] is the
// bus bar of order k+1; reg_lines bits 0..7 are H1 H2 H3 H4 I1 I2 M1 M2;
// loc_lines[j] is Lj. Combinational from d.
module program_board
  import dcc_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   plug_we,
  input  idx_t                   plug_step,
  input  step_t                  plug_data,
  input  logic [STEPS-1:0]       d,
  output logic [ORDER_LINES-1:0] order_lines,
  output logic [REG_LINES-1:0]   reg_lines,
  output logic [LOCATIONS-1:0]   loc_lines
);
  step_t wiring [STEPS];

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)       wiring <= '{default: step_t'('0)};
    else if (plug_we) wiring[plug_step] <= plug_data;

  always_comb begin
    order_lines = '0;
    reg_lines   = '0;
    loc_lines   = '0;
    for (int s = 0; s < STEPS; s++) begin
      if (d[s]) begin
        if (wiring[s].order != ORD_NONE && 32'(wiring[s].order) <= ORDER_LINES)
          order_lines[32'(wiring[s].order) - 1] = 1'b1;
        if (wiring[s].regsel != REG_NONE)
          reg_lines[32'(wiring[s].regsel) - 1] = 1'b1;
        if (wiring[s].modifier == MOD_M1) reg_lines[6] = 1'b1;
        if (wiring[s].modifier == MOD_M2) reg_lines[7] = 1'b1;
        if (wiring[s].loc_valid && 32'(wiring[s].loc) < LOCATIONS)
          loc_lines[wiring[s].loc] = 1'b1;
      end
    end
  end
endmodule
