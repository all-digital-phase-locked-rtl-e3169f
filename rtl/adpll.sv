// adpll: all-digital phase-locked loop with 20 output phases.
//
// Loop: PFD (with phase threshold detector) -> DLF -> DCO -> divider -> PFD.
// The PFD reports whether the reference or the divided clock came first (UP,
// DW) and whether the error exceeds half a cycle (Fast). The DLF uses Fast to
// choose between stepping the 4-bit coarse code (frequency acquisition) and
// the 3-bit fine code (phase acquisition). A first-order sigma-delta
// modulator clocked by the DCO turns the fine code into the dither bit F0
// that loads the first DCO stage, refining the frequency resolution.
//
// The divider input fb_clk is a port: in a plain PLL it is tied to
// phases[0]; in the spread-spectrum generator a phase multiplexer drives it.
// The locked DCO frequency is 10 x f_ref (1.2 GHz for 120 MHz).
//
// Interface: f_ref, rst_n, fb_clk -> phases, f_div, word, f0, up, dw, fast,
// q1, q2 (the threshold detector's two samples).
`timescale 1ps / 1fs
module adpll
  import sscg_pkg::*;
(
  input  logic                f_ref,
  input  logic                rst_n,
  input  logic                fb_clk,
  output logic [N_PHASES-1:0] phases,
  output logic                f_div,
  output dco_word_t           word,
  output logic                f0,
  output logic                up,
  output logic                dw,
  output logic                fast,
  output logic                q1,
  output logic                q2
);

  pfd u_pfd (
    .f_ref (f_ref), .f_div (f_div), .rst_n (rst_n),
    .up (up), .dw (dw), .fast (fast), .q1 (q1), .q2 (q2)
  );

  dlf u_dlf (
    .f_div (f_div), .f_ref (f_ref), .rst_n (rst_n),
    .up (up), .dw (dw), .fast (fast), .word (word)
  );

  dither_sdm u_sdm (
    .f_dco (phases[0]), .rst_n (rst_n), .fine (word.fine), .f0 (f0)
  );

  dco u_dco (
    .en (rst_n), .coarse (word.coarse), .fine (word.fine), .f0 (f0),
    .phases (phases)
  );

  freq_div u_div (
    .f_in (fb_clk), .rst_n (rst_n), .f_out (f_div)
  );

endmodule
