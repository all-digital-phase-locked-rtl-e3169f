// dco: behavioural model of the ten-stage differential digitally-controlled
// oscillator (not synthesizable: the real part is a custom ring of tri-state
// inverter delay cells).
//
// The ring has ten differential delay stages with one crossed connection, so
// a transition travels around it twice per period and the ten true and ten
// complement stage outputs give 20 phases spaced by one stage delay,
// period/20. phases[k] lags phases[k-1] by one stage delay, and phases[0]
// follows phases[19]. In each stage the coarse code switches parallel driving
// inverters (more drive, less delay) and the fine code switches loading
// latches (more load, more delay). Only the first stage also has the
// dithering load controlled by F0.
//
// Period model: linear in the codes, with the average gains measured for the
// circuit: 22.68 ps per coarse code (faster), 13.02 ps per fine code (slower)
// and 1.30 ps for the dither bit (slower), anchored at 1.2 GHz
// (833.33 ps) for coarse 0110, fine 011, F0 = 0, the operating point of the
// coarse-code sweep. The dither delay is added to stage 1 only (half per
// transition, two transitions per period); the rest of the period is shared
// evenly by the ten stages. The linear model is this implementation's
// simplification; it spans about 0.98-1.69 GHz instead of the measured
// 0.888-1.526 GHz at the typical corner.
//
// Interface: en (oscillates while high, all phases low while low), coarse,
// fine, f0 -> phases[19:0]. Control inputs take effect on the next
// transition through each stage.
`timescale 1ps / 1fs
module dco
  import sscg_pkg::*;
#(
  parameter real T_ANCHOR_PS = 833.33,  // period at the anchor code
  parameter real KC_PS       = 22.68,   // period change per coarse code
  parameter real KF_PS       = 13.02,   // period change per fine code
  parameter real KD_PS       = 1.30,    // period change of the dither bit
  parameter int  C_ANCHOR    = 6,
  parameter int  F_ANCHOR    = 3
) (
  input  logic                en,
  input  coarse_t             coarse,
  input  fine_t               fine,
  input  logic                f0,
  output logic [N_PHASES-1:0] phases
);

  logic [N_STAGES-1:0] node;
  real base_period_ps;   // period without dither
  real d_stage_ps;       // delay of stages 2..10
  real d_first_ps;       // delay of stage 1, including the dither load

  always_comb begin
    base_period_ps = T_ANCHOR_PS
                   - KC_PS * (real'(int'(coarse)) - real'(C_ANCHOR))
                   + KF_PS * (real'(int'(fine))   - real'(F_ANCHOR));
    d_stage_ps = base_period_ps / real'(N_PHASES);
    d_first_ps = d_stage_ps + (f0 ? KD_PS / 2.0 : 0.0);
  end

  // All stages are held low while en is low, so the ring always starts from
  // one clean wavefront.
  initial node = '0;

  // Stage 1 closes the ring through the crossed connection.
  always @(node[N_STAGES-1] or en)
    node[0] <= #(d_first_ps) (en ? ~node[N_STAGES-1] : 1'b0);

  for (genvar i = 1; i < N_STAGES; i++) begin : g_stage
    always @(node[i-1] or en)
      node[i] <= #(d_stage_ps) (en & node[i-1]);
  end

  assign phases = {~node, node};

endmodule
