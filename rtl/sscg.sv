// sscg: spread-spectrum clock generator built on the 20-phase ADPLL.
//
// The ADPLL locks its DCO to 10 x f_ref (1.2 GHz from 120 MHz). To spread
// the spectrum, a 20:1 multiplexer sits between the DCO phases and the
// divider. Each divided-clock cycle a triangular profile word A goes through
// a first-order sigma-delta modulator (modulo 32); each overflow moves the
// multiplexer to an earlier DCO phase. Every step shortens the divider's
// period by 1/P of a DCO period, so the loop settles at
//   f_dco = f_ref * (N - A/(P*M))  averaged by the modulator,
// i.e. down-spread by up to Amax/(N*P*M) = 5000 ppm at a 31.25 kHz
// triangle. select = 0 uses 10 phases (Amax 16, coarser steps, fewer
// switching phases in use); select = 1 uses all 20 (Amax 32, finer steps).
// ssc_switch = 0 holds the profile at zero and the output is a plain
// 1.2 GHz clock. The profile generator, modulator and MUX control all run on
// the divided clock F_DIV.
//
// Interface: f_ref, rst_n, select, ssc_switch -> phases, f_dco (phase 0),
// f_dco_b (its complement), f_div, and observation ports for the loop
// codes, the profile word and the phase select.
`timescale 1ps / 1fs
module sscg
  import sscg_pkg::*;
#(
  parameter int unsigned AMAX_10  = 16,
  parameter int unsigned AMAX_20  = 32,
  parameter int unsigned PRESC_10 = 120,
  parameter int unsigned PRESC_20 = 60
) (
  input  logic                f_ref,
  input  logic                rst_n,
  input  logic                select,
  input  logic                ssc_switch,
  output logic [N_PHASES-1:0] phases,
  output logic                f_dco,
  output logic                f_dco_b,
  output logic                f_div,
  output coarse_t             coarse,
  output fine_t               fine,
  output logic                f0,
  output logic                up,
  output logic                dw,
  output logic                fast,
  output logic                q1,
  output logic                q2,
  output prof_t               profile,
  output logic                at_peak,
  output logic                ov0,
  output logic                ov1,
  output psel_t               phase_sel
);

  logic      fb_clk;
  dco_word_t word;

  adpll u_adpll (
    .f_ref (f_ref), .rst_n (rst_n), .fb_clk (fb_clk),
    .phases (phases), .f_div (f_div), .word (word), .f0 (f0),
    .up (up), .dw (dw), .fast (fast), .q1 (q1), .q2 (q2)
  );

  phase_mux u_mux (.phases (phases), .sel (phase_sel), .out (fb_clk));

  profile_gen #(
    .AMAX_10 (AMAX_10), .AMAX_20 (AMAX_20),
    .PRESC_10 (PRESC_10), .PRESC_20 (PRESC_20)
  ) u_prof (
    .clk (f_div), .rst_n (rst_n), .ssc_on (ssc_switch), .select (select),
    .a (profile), .at_peak (at_peak)
  );

  ssc_sdm u_ssdm (.clk (f_div), .rst_n (rst_n), .a (profile), .ov0 (ov0), .ov1 (ov1));

  mux_ctrl u_mctl (
    .clk (f_div), .rst_n (rst_n), .select (select), .ov0 (ov0), .ov1 (ov1),
    .sel (phase_sel)
  );

  assign f_dco   = phases[0];
  assign f_dco_b = phases[N_STAGES];
  assign coarse  = word.coarse;
  assign fine    = word.fine;

endmodule
