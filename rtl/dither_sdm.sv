// dither_sdm: first-order sigma-delta modulator that turns the 3-bit fine
// code into the DCO dithering bit F0.
//
// A 3-bit accumulator adds the fine code (F4, F2, F1) to its own state on
// every rising edge of the DCO clock f_dco. The adder's carry is the
// modulator output; because a ripple adder's carry can glitch while it
// settles, the carry is resampled on the falling edge of f_dco and only that
// clean copy drives F0. Over 8 DCO cycles F0 is high exactly `fine` times, so
// the average DCO period moves by fine/8 of the dither step, giving the loop a
// resolution finer than one fine code.
//
// Interface: f_dco, rst_n, fine -> f0. Timing: accumulator on posedge f_dco,
// f0 on the following negedge. Structure follows the design description;
// the asynchronous reset to zero is this implementation's choice.
`timescale 1ps / 1fs
module dither_sdm
  import sscg_pkg::*;
(
  input  logic  f_dco,
  input  logic  rst_n,
  input  fine_t fine,
  output logic  f0
);

  fine_t acc;
  logic  carry;

  always_ff @(posedge f_dco or negedge rst_n)
    if (!rst_n) {carry, acc} <= '0;
    else        {carry, acc} <= {1'b0, acc} + {1'b0, fine};

  always_ff @(negedge f_dco or negedge rst_n)
    if (!rst_n) f0 <= 1'b0;
    else        f0 <= carry;

endmodule
