// tb_sscg: end-to-end test of the spread-spectrum clock generator at its
// default parameters.
//
// Sequence:
//  1. 100 MHz reference, spreading off: the loop must acquire frequency
//     (Fast, coarse steps) and settle at 1 GHz.
//  2. 120 MHz reference, spreading off: lock at 1.2 GHz; the DCO must make
//     10 cycles per reference cycle (checked over 400 cycles).
//  3. Spreading on, 20-phase mode, one full triangle (3840 reference cycles,
//     31.25 kHz): the average DCO frequency must drop by half the 5000 ppm
//     deviation, i.e. 38400 * (1 - 0.0025) = 38304 DCO cycles (+/-12), and
//     a window around the triangle's peak must show close to 5000 ppm.
//  4. The same in 10-phase mode (only even phases, two-step rotation).
//  5. Spreading off again: the frequency returns to 10 x f_ref.
// Every mechanism is counted and must occur at least once: Fast, coarse and
// fine steps, F0 dithering, profile peaks in both modes, single and double
// phase steps, phase-select wrap-around, and both switch settings.
`timescale 1ps / 1fs
module tb_sscg;
  import sscg_pkg::*;

  real t_ref_ps = 10000.0;
  logic f_ref = 1'b0, rst_n = 1'b1, select = 1'b1, ssc_switch = 1'b0;
  logic [N_PHASES-1:0] phases;
  logic f_dco, f_dco_b, f_div, f0, up, dw, fast, q1, q2, at_peak, ov0, ov1;
  coarse_t coarse;
  fine_t fine;
  prof_t profile;
  psel_t phase_sel;

  sscg dut (
    .f_ref, .rst_n, .select, .ssc_switch, .phases, .f_dco, .f_dco_b, .f_div,
    .coarse, .fine, .f0, .up, .dw, .fast, .q1, .q2, .profile, .at_peak, .ov0, .ov1,
    .phase_sel
  );

  always #(t_ref_ps / 2.0) f_ref = ~f_ref;

  int checks = 0, failures = 0;

  // reset is asserted by an edge so that asynchronous resets take effect
  initial #1 rst_n = 0;

  int ref_cycles = 0, dco_edges = 0;
  int n_fast = 0, n_coarse = 0, n_fine = 0, n_f0 = 0;
  int n_peak10 = 0, n_peak20 = 0, n_step1 = 0, n_step2 = 0, n_wrap = 0;
  int n_off = 0, n_on = 0, n_bad_phase = 0;
  coarse_t last_coarse;
  fine_t last_fine;
  psel_t last_sel;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  always @(posedge f_dco) dco_edges++;
  always @(posedge f0) n_f0++;

  always @(posedge f_ref) if (rst_n) begin
    ref_cycles++;
    if (fast) n_fast++;
    if (coarse != last_coarse) n_coarse++;
    if (fine != last_fine) n_fine++;
    last_coarse = coarse;
    last_fine = fine;
    if (ssc_switch) n_on++; else n_off++;
  end

  always @(posedge f_div) if (rst_n) begin
    if (at_peak && ssc_switch) begin
      if (select) n_peak20++; else n_peak10++;
    end
  end

  // classify each change of the phase select (sampled just after F_DIV)
  always @(posedge f_div) if (rst_n) begin
    int d;
    #1;
    d = (int'(last_sel) - int'(phase_sel) + N_PHASES) % N_PHASES;
    if (d == 1) n_step1++;
    if (d == 2) n_step2++;
    if (d != 0 && phase_sel > last_sel) n_wrap++;
    if (d > 3) n_bad_phase++;
    if (!select && phase_sel[0]) n_bad_phase++;
    last_sel = phase_sel;
  end

  task automatic count_dco(input int n_ref, output int edges);
    int e0, r0;
    e0 = dco_edges; r0 = ref_cycles;
    wait (ref_cycles == r0 + n_ref);
    edges = dco_edges - e0;
  endtask

  initial begin
    int e, e1, e2, e3;
    last_coarse = COARSE_INIT;
    last_fine = FINE_INIT;
    last_sel = '0;
    #(3 * t_ref_ps);
    @(negedge f_ref) rst_n = 1'b1;

    // 1. 1 GHz (USB 3.0 point)
    wait (ref_cycles == 300);
    count_dco(200, e);
    $display("100 MHz ref: %0d DCO cycles in 200 ref cycles, coarse=%0d", e, coarse);
    check(e >= 1995 && e <= 2005, "not locked at 1 GHz");

    // 2. 1.2 GHz (SATA-III point)
    t_ref_ps = 8333.333;
    wait (ref_cycles == 800);
    count_dco(400, e);
    $display("120 MHz ref: %0d DCO cycles in 400 ref cycles, coarse=%0d", e, coarse);
    check(e >= 3995 && e <= 4005, "not locked at 1.2 GHz");

    // 3. 20-phase spreading, one triangle. The middle window covers profile
    //    steps 28..36 (A = 28..32..28, mean 268/9), so the DCO should run
    //    268/9/6400 = 0.465 % slow there: 5400 * (1 - 0.004653) = 5374.9.
    @(negedge f_div) select = 1'b1; ssc_switch = 1'b1;
    count_dco(1680, e1);
    count_dco(540, e2);
    count_dco(1620, e3);
    e = e1 + e2 + e3;
    $display("20-phase SSC: %0d DCO cycles in 3840 ref cycles (unspread 38400), %0d around the peak (unspread 5400)", e, e2);
    check(e >= 38292 && e <= 38316, "20-phase mean frequency not 0.25% low");
    check(e2 >= 5365 && e2 <= 5385, "20-phase peak deviation not near 5000 ppm");

    // 4. The same in 10-phase mode: window over steps 14..18 (A = 14..16..14,
    //    mean 14.8): 6000 * (1 - 14.8/3200) = 5972.3.
    @(negedge f_div) ssc_switch = 1'b0;
    repeat (2) @(negedge f_div);
    select = 1'b0; ssc_switch = 1'b1;
    count_dco(1680, e1);
    count_dco(600, e2);
    count_dco(1560, e3);
    e = e1 + e2 + e3;
    $display("10-phase SSC: %0d DCO cycles in 3840 ref cycles (unspread 38400), %0d around the peak (unspread 6000)", e, e2);
    check(e >= 38292 && e <= 38316, "10-phase mean frequency not 0.25% low");
    check(e2 >= 5962 && e2 <= 5982, "10-phase peak deviation not near 5000 ppm");

    // 5. spreading off
    @(negedge f_div) ssc_switch = 1'b0;
    for (int w = 0; w < 8; w++) begin
      count_dco(100, e);
      $display("  after off, window %0d: %0d DCO cycles, coarse=%0d fine=%0d fast=%0d", w, e, coarse, fine, n_fast);
    end
    count_dco(400, e);
    $display("SSC off: %0d DCO cycles in 400 ref cycles", e);
    check(e >= 3995 && e <= 4005, "not back at 1.2 GHz");

    $display("mechanisms: fast=%0d coarse=%0d fine=%0d f0=%0d peak10=%0d peak20=%0d step1=%0d step2=%0d wrap=%0d on=%0d off=%0d",
             n_fast, n_coarse, n_fine, n_f0, n_peak10, n_peak20, n_step1, n_step2, n_wrap, n_on, n_off);
    check(n_fast > 0, "Fast never asserted");
    check(n_coarse > 0, "coarse code never stepped");
    check(n_fine > 0, "fine code never stepped");
    check(n_f0 > 0, "F0 never dithered");
    check(n_peak10 == 120, $sformatf("10-phase peak held %0d cycles, want 120", n_peak10));
    check(n_peak20 == 60, $sformatf("20-phase peak held %0d cycles, want 60", n_peak20));
    check(n_step1 > 0, "no single phase step");
    check(n_step2 > 0, "no double phase step");
    check(n_wrap > 0, "phase select never wrapped");
    check(n_on > 0 && n_off > 0, "switch not exercised");
    check(n_bad_phase == 0, "illegal phase step or odd phase in 10-phase mode");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(real'(10000) * 10000.0);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
