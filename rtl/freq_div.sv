// freq_div: divide-by-10 feedback divider of the ADPLL.
//
// A toggle flip-flop divides the input by 2 first, so that only one flip-flop
// runs at the full DCO rate; a three-flip-flop shift ring then divides by 5.
// In the ring the first flip-flop loads NAND(q2, q3), the second loads q1 and
// the third loads q2; the ring cycles through the five states
// 100 -> 110 -> 111 -> 011 -> 001 and q3 is the output (high 3 of 5 half-rate
// cycles). Every rising edge of f_out coincides with a rising edge of f_in.
//
// Interface: f_in, rst_n (asynchronous, active low) -> f_out.
// The /2-then-/5 arrangement and the ring's connections follow the original
// divider; taking its feedback gate as a NAND (the gate that makes this ring
// divide by 5) and adding a reset are this implementation's choices.
`timescale 1ps / 1fs
module freq_div (
  input  logic f_in,
  input  logic rst_n,
  output logic f_out
);

  logic       div2;
  logic [2:0] q;

  always_ff @(posedge f_in or negedge rst_n)
    if (!rst_n) div2 <= 1'b0;
    else        div2 <= ~div2;

  always_ff @(posedge div2 or negedge rst_n)
    if (!rst_n) q <= 3'b000;
    else        q <= {q[1], q[0], ~(q[1] & q[2])};

  assign f_out = q[2];

endmodule
