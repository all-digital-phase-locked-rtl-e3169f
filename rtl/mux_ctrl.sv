// mux_ctrl: programmable MUX control circuit of the SSCG.
//
// First remaps the modulator's overflow code for the chosen mode:
//   overflow1_new = overflow1 | (overflow0 & ~select)
//   overflow0_new = overflow0 & select
// In 20-phase mode (select = 1) the code passes unchanged; in 10-phase mode
// only every second DCO phase is used, so a step of one 10-phase position is
// two 1/20 steps and "01" becomes "10". The step count
// 2*overflow1_new + overflow0_new then moves the 5-bit phase select
// (sel4..sel0) that many positions earlier, modulo 20. Picking an earlier
// phase shortens the divider's period, the loop slows the DCO to compensate,
// and the output is spread downwards.
//
// Interface: clk (F_DIV), rst_n, select, ov0, ov1 -> sel. sel changes on the
// rising F_DIV edge, which coincides with a rising edge of the selected
// phase; the old and the earlier new phase are then both high, so the switch
// makes no glitch. The remapping equations follow the original control
// circuit; the modulo-20 select counter and the use of even phases in
// 10-phase mode are this implementation's own.
`timescale 1ps / 1fs
module mux_ctrl
  import sscg_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  select,
  input  logic  ov0,
  input  logic  ov1,
  output psel_t sel
);

  logic       ov1_new, ov0_new;
  logic [1:0] step;

  assign ov1_new = ov1 | (ov0 & ~select);
  assign ov0_new = ov0 & select;
  assign step    = {ov1_new, ov0_new};

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)                 sel <= '0;
    else if (!select && sel[0]) sel <= sel - 1'b1;  // re-align to an even phase
    else if (sel >= psel_t'(step))
                                sel <= sel - psel_t'(step);
    else                        sel <= sel + psel_t'(N_PHASES) - psel_t'(step);

endmodule
