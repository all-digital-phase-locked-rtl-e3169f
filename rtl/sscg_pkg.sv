// sscg_pkg: constants and types shared by the ADPLL and the spread-spectrum
// clock generator (SSCG) built around it.
//
// The DCO is steered by an 8-bit control word: four binary-weighted coarse
// bits (C8, C4, C2, C1), three binary-weighted fine bits (F4, F2, F1) and one
// dithering bit F0. The loop divides the 1.2 GHz DCO clock by 10 to compare it
// with a 120 MHz reference. The DCO offers 20 equally spaced phases; the SSCG
// rotates the divider input through them to lower the output frequency by up
// to 5000 ppm.
`timescale 1ps / 1fs
package sscg_pkg;

  localparam int unsigned COARSE_W  = 4;   // C8, C4, C2, C1
  localparam int unsigned FINE_W    = 3;   // F4, F2, F1
  localparam int unsigned N_STAGES  = 10;  // differential delay stages in the ring
  localparam int unsigned N_PHASES  = 2 * N_STAGES;  // 20 output phases
  localparam int unsigned PSEL_W    = 5;   // sel0..sel4
  localparam int unsigned PROF_W    = 6;   // triangular profile word
  localparam int unsigned SDM_ACC_W = 5;   // modulo-32 accumulator (M = 2^5)

  typedef logic [COARSE_W-1:0] coarse_t;
  typedef logic [FINE_W-1:0]   fine_t;
  typedef logic [PSEL_W-1:0]   psel_t;
  typedef logic [PROF_W-1:0]   prof_t;

  // Control word from the loop filter to the DCO (the dither bit travels separately).
  typedef struct packed {
    coarse_t coarse;
    fine_t   fine;
  } dco_word_t;

  // Reset values of the loop filter: a code near the middle of the DCO range.
  localparam coarse_t COARSE_INIT = 4'b1000;
  localparam fine_t   FINE_INIT   = 3'b100;

endpackage
