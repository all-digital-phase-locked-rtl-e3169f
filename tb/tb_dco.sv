// tb_dco: measures the DCO model's period and phase spacing.
// For a set of codes the period of phase 0 is compared with
// 833.33 - 22.68*(C-6) + 13.02*(F-3) + 1.30*F0 ps, each phase must lag the
// previous one by period/20, and the frequency must rise with the coarse code
// and fall with the fine code.
`timescale 1ps / 1fs
module tb_dco;
  import sscg_pkg::*;
  logic en = 0, f0 = 0;
  coarse_t coarse = 4'd6;
  fine_t   fine = 3'd3;
  logic [N_PHASES-1:0] phases;
  int checks = 0, failures = 0;

  dco dut (.en, .coarse, .fine, .f0, .phases);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  function automatic real expected(int c, int f, int d);
    return 833.33 - 22.68 * (c - 6) + 13.02 * (f - 3) + 1.30 * d;
  endfunction

  real t_edge [N_PHASES];
  real prev_period;

  task automatic measure(input int c, input int f, input int d, output real period);
    real t0, t1;
    coarse = coarse_t'(c); fine = fine_t'(f); f0 = d[0];
    repeat (3) @(posedge phases[0]);
    t0 = $realtime;
    @(posedge phases[0]);
    t1 = $realtime;
    period = t1 - t0;
    check(period > expected(c, f, d) - 0.05 && period < expected(c, f, d) + 0.05,
          $sformatf("code %0d/%0d/%0d: period %f want %f", c, f, d, period, expected(c, f, d)));
    if (d == 0) begin
      // phases rise in index order, one stage delay apart
      for (int k = 1; k < N_PHASES; k++) begin
        @(posedge phases[k]);
        t_edge[k] = $realtime - t1;
        check(t_edge[k] > k * period / 20.0 - 0.05 && t_edge[k] < k * period / 20.0 + 0.05,
              $sformatf("phase %0d lags by %f, want %f", k, t_edge[k], k * period / 20.0));
      end
    end
  endtask

  initial begin
    real p;
    #100;
    check(phases == {{N_STAGES{1'b1}}, {N_STAGES{1'b0}}}, "ring held in its reset state while disabled");
    en = 1;
    measure(6, 3, 0, p);
    measure(6, 3, 1, p);
    prev_period = 1.0e9;
    for (int c = 0; c < 16; c++) begin
      measure(c, 3, 0, p);
      check(p < prev_period, "frequency must rise with the coarse code");
      prev_period = p;
    end
    prev_period = 0.0;
    for (int f = 0; f < 8; f++) begin
      measure(6, f, 0, p);
      check(p > prev_period, "frequency must fall with the fine code");
      prev_period = p;
    end
    en = 0;
    #2000 check(phases == {{N_STAGES{1'b1}}, {N_STAGES{1'b0}}}, "ring stops when disabled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
