// dlf: accumulator-based digital loop filter of the ADPLL.
//
// Clocked by the divided clock f_div. On each f_div rising edge it takes the
// latest PFD decision and moves one of two saturating counters by one code:
//   Fast = 1 (frequency acquisition): UP -> coarse + 1, DW -> coarse - 1,
//                                     fine code held;
//   Fast = 0 (phase acquisition):     UP -> fine - 1,   DW -> fine + 1,
//                                     coarse code held.
// A larger coarse code raises and a larger fine code lowers the DCO
// frequency, so UP (reference ahead) always speeds the DCO up.
//
// Decision capture (own choice): at the f_div edge the PFD's UP flag still
// holds its value from before the edge, so "reference led" is read directly.
// "Divided clock led" is the DW flag being found high by a reference edge;
// that event is recorded by a toggle flip-flop clocked by f_ref and picked up
// at the next f_div edge (or DW is still high at the f_div edge, meaning
// the divided clock led again without a reference edge in between).
// Both codes reset to the middle of their range; both saturate at their ends.
//
// Interface: f_div, f_ref, rst_n, up, dw, fast -> word (coarse, fine).
// Latency: the code changes on the f_div edge that closes the comparison.
`timescale 1ps / 1fs
module dlf
  import sscg_pkg::*;
(
  input  logic      f_div,
  input  logic      f_ref,
  input  logic      rst_n,
  input  logic      up,
  input  logic      dw,
  input  logic      fast,
  output dco_word_t word
);

  logic dw_tog;       // toggles once per "divided clock led" event, f_ref domain
  logic dw_tog_seen;  // copy of dw_tog taken at the last f_div edge
  logic lead, lag;

  always_ff @(posedge f_ref or negedge rst_n)
    if (!rst_n)  dw_tog <= 1'b0;
    else if (dw) dw_tog <= ~dw_tog;

  assign lead = up;
  assign lag  = ~up & ((dw_tog != dw_tog_seen) | dw);

  always_ff @(posedge f_div or negedge rst_n)
    if (!rst_n) begin
      dw_tog_seen <= 1'b0;
      word.coarse <= COARSE_INIT;
      word.fine   <= FINE_INIT;
    end else begin
      dw_tog_seen <= dw_tog;
      if (fast) begin
        if (lead && word.coarse != '1)     word.coarse <= word.coarse + 1'b1;
        else if (lag && word.coarse != '0) word.coarse <= word.coarse - 1'b1;
      end else begin
        if (lead && word.fine != '0)       word.fine <= word.fine - 1'b1;
        else if (lag && word.fine != '1)   word.fine <= word.fine + 1'b1;
      end
    end

endmodule
