// pfd: phase/frequency detector with phase threshold detector.
//
// A tri-state PFD compares the rising edges of the reference clock f_ref and
// the divided DCO clock f_div. The first edge to arrive raises its flag (UP for
// the reference, DW for the divided clock); when the other edge arrives both
// flags are cleared together. A phase threshold detector then tells whether
// the phase error exceeds half a cycle: UP is sampled on the falling edge of
// f_ref into Q1, DW on the falling edge of f_div into Q2, and Fast = Q1 | Q2.
// A flag still high half a reference (or divided) period after it was set
// means the phase error is beyond +/-pi, and the loop filter then switches
// to coarse (frequency) acquisition.
//
// Interface: f_ref, f_div, rst_n (asynchronous, active low) -> up, dw, fast.
// Timing: up/dw change on the rising clock edges (no modelled reset pulse
// width: the clear is immediate); q1/q2 change on the falling edges.
// The structure and sampling edges follow the design description; the
// global reset is an addition of this implementation. The PFD clear is a
// combinational function of its own flip-flop outputs, as in any tri-state
// PFD; this is intentional.
`timescale 1ps / 1fs
module pfd (
  input  logic f_ref,
  input  logic f_div,
  input  logic rst_n,
  output logic up,
  output logic dw,
  output logic fast,
  output logic q1,
  output logic q2
);

  logic clr;
  assign clr = (up & dw) | ~rst_n;

  always_ff @(posedge f_ref or posedge clr)
    if (clr) up <= 1'b0;
    else     up <= 1'b1;

  always_ff @(posedge f_div or posedge clr)
    if (clr) dw <= 1'b0;
    else     dw <= 1'b1;

  // Phase threshold detector
  always_ff @(negedge f_ref or negedge rst_n)
    if (!rst_n) q1 <= 1'b0;
    else        q1 <= up;

  always_ff @(negedge f_div or negedge rst_n)
    if (!rst_n) q2 <= 1'b0;
    else        q2 <= dw;

  assign fast = q1 | q2;

endmodule
