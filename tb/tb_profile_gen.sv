// tb_profile_gen: runs the triangular profile generator through full
// triangles in both modes and compares every output with an independent
// model: A(t) = tri(floor(t / PRESC)), tri rising 0..Amax then falling, with
// period 2*Amax*PRESC cycles (3840 in both modes, 31.25 kHz at 120 MHz).
// Also checks that ssc_on = 0 forces A = 0.
`timescale 1ps / 1fs
module tb_profile_gen;
  import sscg_pkg::*;
  logic clk = 0, rst_n = 1, ssc_on = 0, select = 0;
  prof_t a;
  logic at_peak;
  int checks = 0, failures = 0;

  // reset is asserted by an edge so that asynchronous resets take effect
  initial #1 rst_n = 0;

  profile_gen dut (.clk, .rst_n, .ssc_on, .select, .a, .at_peak);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  always #4166.6665 clk = ~clk;

  function automatic int tri_value(int t, int amax, int presc);
    int s;
    s = (t / presc) % (2 * amax);
    return (s <= amax) ? s : 2 * amax - s;
  endfunction

  task automatic run_mode(input bit sel, input int amax, input int presc);
    int peaks, period;
    @(negedge clk) ssc_on = 0; select = sel;
    @(negedge clk) check(a == 0, "A held at 0 while spreading is off");
    ssc_on = 1;
    peaks = 0;
    period = 2 * amax * presc;
    for (int t = 0; t < 2 * period; t++) begin
      check(int'(a) == tri_value(t, amax, presc),
            $sformatf("mode %0d cycle %0d: A=%0d want %0d", sel, t, a, tri_value(t, amax, presc)));
      check(at_peak == (int'(a) == amax), "at_peak");
      if (at_peak) peaks++;
      @(negedge clk);
    end
    check(peaks == 2 * presc, $sformatf("peak held %0d cycles", peaks));
    check(period == 3840, "modulation period is 3840 reference cycles");
  endtask

  initial begin
    #10000 rst_n = 1;
    run_mode(0, 16, 120);
    run_mode(1, 32, 60);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
