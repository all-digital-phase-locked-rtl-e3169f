// tb_dither_resolution: the oscillator and the dither modulator together.
// With F0 driven by the modulator, the average DCO period for fine code f
// must be T(C, f, 0) + 1.30 ps * f / 8: the dither bit adds its delay in
// exactly f of every 8 cycles, so the loop sees eight times finer steps
// between the fine codes. Measured over 800 cycles (a multiple of 8) for all
// fine codes at two coarse codes.
`timescale 1ps / 1fs
module tb_dither_resolution;
  import sscg_pkg::*;
  logic en = 1'b0, rst_n = 1'b1, f0;
  coarse_t coarse = 4'd6;
  fine_t fine = '0;
  logic [N_PHASES-1:0] phases;
  int checks = 0, failures = 0;

  dco u_dco (.en, .coarse, .fine, .f0, .phases);
  dither_sdm u_sdm (.f_dco (phases[0]), .rst_n, .fine, .f0);

  initial #1 rst_n = 0;

  initial begin
    real t0, t1, avg, want;
    #100 rst_n = 1; en = 1;
    for (int c = 5; c <= 6; c++) begin
      for (int f = 0; f < 8; f++) begin
        @(posedge phases[0]);
        coarse = coarse_t'(c); fine = fine_t'(f);
        repeat (16) @(posedge phases[0]);
        t0 = $realtime;
        repeat (800) @(posedge phases[0]);
        t1 = $realtime;
        avg = (t1 - t0) / 800.0;
        want = 833.33 - 22.68 * (c - 6) + 13.02 * (f - 3) + 1.30 * f / 8.0;
        checks++;
        if (avg < want - 0.02 || avg > want + 0.02) begin
          failures++;
          $display("FAIL: C=%0d F=%0d mean period %f ps, want %f", c, f, avg, want);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
