// ssc_sdm: first-order sigma-delta modulator of the SSCG.
//
// Accumulates the profile word A (6 bits, at most 32) modulo M = 32 once per
// divided-clock cycle: a 6-bit adder sums A and the 5-bit residue; the low
// five sum bits become the new residue, sum bit 5 is overflow0 and the
// adder's carry out is overflow1. The 2-bit overflow {overflow1, overflow0}
// is therefore the number of 1/20-period phase steps to take this cycle,
// and its average is A / 32. Since A <= 32 and the residue is below 32,
// overflow1 stays 0 in normal use; it is kept so that the MUX control's
// truth table is complete.
// A first-order modulator is used because its output is never negative, so
// the phase only ever rotates one way (down-spread only).
//
// Interface: clk (F_DIV), rst_n, a -> ov0, ov1 (registered, one cycle after
// the sum). The accumulator width, M = 32 and the two overflow outputs
// follow the design description; which sum bit is called overflow0 is this
// implementation's reading, chosen so that "01" means one phase step as in
// the MUX control truth table.
`timescale 1ps / 1fs
module ssc_sdm
  import sscg_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  prof_t a,
  output logic  ov0,
  output logic  ov1
);

  logic [SDM_ACC_W-1:0] res;
  logic [PROF_W:0]      sum;

  assign sum = {1'b0, a} + {{(PROF_W + 1 - SDM_ACC_W){1'b0}}, res};

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      res <= '0;
      ov0 <= 1'b0;
      ov1 <= 1'b0;
    end else begin
      res <= sum[SDM_ACC_W-1:0];
      ov0 <= sum[SDM_ACC_W];
      ov1 <= sum[SDM_ACC_W+1];
    end

endmodule
