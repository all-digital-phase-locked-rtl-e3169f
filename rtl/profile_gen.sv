// profile_gen: triangular modulation profile generator of the SSCG.
//
// Produces the 6-bit word A that sets the instantaneous frequency deviation
// f = f_nom * (1 - A / (N * P * M)). A runs 0, 1, ..., Amax, Amax-1, ..., 1,
// 0, ... : an up/down counter that reverses when it reaches Amax or 0.
// A prescaler holds each value for PRESC cycles of the divided clock, so one
// triangle lasts 2 * Amax * PRESC reference cycles.
//   10-phase mode (select = 0): Amax = 16, PRESC = 120
//   20-phase mode (select = 1): Amax = 32, PRESC = 60
// Both give 5000 ppm down-spread at 120 MHz / 3840 = 31.25 kHz.
// With ssc_on = 0 the counter and prescaler are held at zero, so A = 0 and
// the output is not spread. Amax, the prescale values and the triangle
// shape follow the design description; the gating by ssc_on and the exact
// prescaler/counter arrangement are this implementation's choices.
//
// Interface: clk (F_DIV), rst_n, ssc_on, select -> a, at_peak (high while
// A = Amax). A changes on the clk edge that ends each prescale interval.
`timescale 1ps / 1fs
module profile_gen
  import sscg_pkg::*;
#(
  parameter int unsigned AMAX_10  = 16,
  parameter int unsigned AMAX_20  = 32,
  parameter int unsigned PRESC_10 = 120,
  parameter int unsigned PRESC_20 = 60
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  ssc_on,
  input  logic  select,
  output prof_t a,
  output logic  at_peak
);

  localparam int unsigned PCNT_W = $clog2((PRESC_10 > PRESC_20 ? PRESC_10 : PRESC_20) + 1);

  logic [PCNT_W-1:0] pcnt;
  logic              down;
  prof_t             amax;
  logic [PCNT_W-1:0] presc;

  assign amax    = select ? prof_t'(AMAX_20) : prof_t'(AMAX_10);
  assign presc   = select ? PCNT_W'(PRESC_20) : PCNT_W'(PRESC_10);
  assign at_peak = (a == amax);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      pcnt <= '0;
      a    <= '0;
      down <= 1'b0;
    end else if (!ssc_on) begin
      pcnt <= '0;
      a    <= '0;
      down <= 1'b0;
    end else if (pcnt >= presc - 1'b1) begin
      pcnt <= '0;
      if (!down) begin
        if (a >= amax) begin
          a    <= amax - 1'b1;
          down <= 1'b1;
        end else begin
          a <= a + 1'b1;
        end
      end else begin
        if (a == '0) begin
          a    <= prof_t'(1);
          down <= 1'b0;
        end else begin
          a <= a - 1'b1;
        end
      end
    end else begin
      pcnt <= pcnt + 1'b1;
    end

endmodule
