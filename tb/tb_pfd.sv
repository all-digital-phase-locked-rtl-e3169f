// tb_pfd: directed test of the tri-state PFD and its phase threshold detector.
// Edges of f_ref and f_div are placed by hand; expected levels of UP, DW,
// Q1, Q2 and Fast follow from the edge order and the half-cycle threshold.
`timescale 1ps / 1fs
module tb_pfd;
  logic f_ref = 0, f_div = 0, rst_n = 1;
  logic up, dw, fast, q1, q2;
  int checks = 0, failures = 0;

  // reset is asserted by an edge so that asynchronous resets take effect
  initial #1 rst_n = 0;

  pfd dut (.f_ref, .f_div, .rst_n, .up, .dw, .fast, .q1, .q2);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  // one comparison: ref rises at tr, div rises at td (relative, ps); both
  // clocks have a 4000 ps high time
  task automatic compare(input int tr, input int td, input bit exp_fast);
    int t0;
    t0 = (tr < td) ? tr : td;
    fork
      begin #(tr); f_ref = 1; #4000; f_ref = 0; end
      begin #(td); f_div = 1; #4000; f_div = 0; end
      begin
        #(t0 + 10);
        if (tr < td) check(up && !dw, "UP expected after reference edge");
        else if (td < tr) check(dw && !up, "DW expected after divided edge");
        #((tr > td ? tr - td : td - tr) + 10 - 10);
        #10 check(!up && !dw, "PFD not cleared after second edge");
      end
    join
    #100 check(fast == exp_fast, $sformatf("Fast=%b expected %b", fast, exp_fast));
    check(fast == (q1 | q2), "Fast != Q1|Q2");
    #3000;
  endtask

  initial begin
    #100 rst_n = 1;
    #100 check(!up && !dw && !fast, "reset state");
    compare(0, 1000, 0);        // reference leads by 1 ns: small error
    check(!q1 && !q2, "no threshold after small lead");
    compare(1000, 0, 0);        // divided clock leads by 1 ns
    compare(0, 5000, 1);        // reference leads by more than half a period
    check(q1 && !q2, "Q1 expected for large reference lead");
    compare(0, 500, 0);         // back to small error: Q1 clears
    compare(5000, 0, 1);        // divided clock leads by more than half a period
    check(q2 && !q1, "Q2 expected for large divided lead");
    compare(300, 0, 0);
    compare(0, 0, 0);           // coincident edges: nothing happens
    check(!up && !dw, "coincident edges");
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
