// tb_adpll: closed-loop test of the ADPLL with the divider fed from phase 0.
//
// Two operating points the design targets are run back to back: a 120 MHz
// reference (1.2 GHz DCO, SATA-III) from reset, then a step to 100 MHz
// (1 GHz, USB 3.0), which is far enough away to need frequency acquisition.
// For each it checks that the coarse code stops moving and Fast stays low
// within 240 reference cycles of the start (the lock-in time claimed for the
// design), and that afterwards the DCO makes exactly 10 cycles per reference
// cycle on average (200 reference cycles counted, +/-5 edges: a phase error
// below half a reference period) and F_DIV one edge per F_REF edge.
// Fast, coarse steps, fine steps and F0 dithering must each occur.
`timescale 1ps / 1fs
module tb_adpll;
  import sscg_pkg::*;

  localparam int N_CYCLES = 600;
  localparam int LOCK_MAX = 240;

  real t_ref_ps = 8333.333;
  logic f_ref = 1'b0, rst_n = 1'b1;
  logic [N_PHASES-1:0] phases;
  logic f_div, f0, up, dw, fast, q1, q2;
  dco_word_t word;

  adpll dut (
    .f_ref (f_ref), .rst_n (rst_n), .fb_clk (phases[0]),
    .phases (phases), .f_div (f_div), .word (word), .f0 (f0),
    .up (up), .dw (dw), .fast (fast), .q1 (q1), .q2 (q2)
  );

  always #(t_ref_ps / 2.0) f_ref = ~f_ref;

  int checks = 0, failures = 0;

  // reset is asserted by an edge so that asynchronous resets take effect
  initial #1 rst_n = 0;

  int ref_cycles = 0, last_unlock = 0;
  int dco_edges = 0, div_edges = 0;
  int fast_seen = 0, coarse_moves = 0, fine_moves = 0, f0_rises = 0;
  coarse_t last_coarse;
  fine_t   last_fine;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  always @(posedge phases[0]) dco_edges++;
  always @(posedge f_div)     div_edges++;
  always @(posedge f0)        f0_rises++;

  always @(posedge f_ref) if (rst_n) begin
    ref_cycles++;
    if (fast) fast_seen++;
    if (word.coarse != last_coarse) coarse_moves++;
    if (word.fine != last_fine) fine_moves++;
    if (fast || word.coarse != last_coarse) last_unlock = ref_cycles;
    last_coarse = word.coarse;
    last_fine   = word.fine;
  end

  task automatic run_point(input string name);
    int e0, d0, r0, start;
    start = ref_cycles;
    last_unlock = start;
    wait (ref_cycles == start + N_CYCLES - 200);
    e0 = dco_edges; d0 = div_edges; r0 = ref_cycles;
    wait (ref_cycles == start + N_CYCLES);
    $display("%s: locked after %0d ref cycles, coarse=%b fine=%b, %0d DCO edges in %0d ref cycles",
             name, last_unlock - start, word.coarse, word.fine, dco_edges - e0, ref_cycles - r0);
    check(last_unlock - start <= LOCK_MAX, $sformatf("%s: lock took %0d cycles", name, last_unlock - start));
    check((dco_edges - e0) >= 10 * (ref_cycles - r0) - 5 &&
          (dco_edges - e0) <= 10 * (ref_cycles - r0) + 5, {name, ": DCO not at 10 x f_ref"});
    check((div_edges - d0) >= (ref_cycles - r0) - 1 &&
          (div_edges - d0) <= (ref_cycles - r0) + 1, {name, ": F_DIV not at f_ref"});
  endtask

  initial begin
    last_coarse = COARSE_INIT;
    last_fine   = FINE_INIT;
    #(3 * t_ref_ps);
    @(negedge f_ref) rst_n = 1'b1;
    run_point("120 MHz");
    t_ref_ps = 10000.0;
    run_point("100 MHz");
    check(fast_seen > 0, "Fast never asserted");
    check(coarse_moves > 0, "coarse code never moved");
    check(fine_moves > 0, "fine code never moved");
    check(f0_rises > 0, "dither bit never toggled");
    $display("mechanisms: fast=%0d coarse=%0d fine=%0d f0=%0d", fast_seen, coarse_moves, fine_moves, f0_rises);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(real'(2 * N_CYCLES + 100) * 10000.0);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
