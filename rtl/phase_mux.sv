// phase_mux: 20-to-1 multiplexer that feeds the selected DCO phase to the
// ADPLL's frequency divider (the "phase rotation" point of the SSCG).
// Purely combinational; an out-of-range select value chooses phase 0.
// Interface: phases[19:0], sel[4:0] -> out.
`timescale 1ps / 1fs
module phase_mux
  import sscg_pkg::*;
(
  input  logic [N_PHASES-1:0] phases,
  input  psel_t               sel,
  output logic                out
);

  always_comb begin
    out = phases[0];
    for (int k = 0; k < N_PHASES; k++)
      if (sel == psel_t'(k)) out = phases[k];
  end

endmodule
