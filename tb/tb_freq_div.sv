// tb_freq_div: checks the /2 + /5 divider: every output period is 10 input
// periods, the output is high for 6 of them, and each output rising edge
// falls on an input rising edge.
`timescale 1ps / 1fs
module tb_freq_div;
  logic f_in = 0, rst_n = 1, f_out;
  int checks = 0, failures = 0;

  // reset is asserted by an edge so that asynchronous resets take effect
  initial #1 rst_n = 0;
  int n_in = 0, last_rise = -1, last_fall = -1, rises = 0;
  bit in_rose_now = 0;

  freq_div dut (.f_in, .rst_n, .f_out);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  always #416.665 f_in = ~f_in;
  always @(posedge f_in) if (rst_n) n_in++;

  always @(posedge f_out) begin
    check(f_in == 1'b1, "output rose while input low");
    if (last_rise >= 0) check(n_in - last_rise == 10, $sformatf("period %0d input cycles", n_in - last_rise));
    last_rise = n_in;
    rises++;
  end
  always @(negedge f_out) if (last_rise >= 0) begin
    check(n_in - last_rise == 6, $sformatf("high for %0d input cycles", n_in - last_rise));
  end

  initial begin
    #2000;
    check(f_out == 1'b0, "reset output");
    @(negedge f_in) rst_n = 1;
    wait (rises == 50);
    check(rises == 50, "edges seen");
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
