// tb_ssc_sdm: checks the SSCG sigma-delta modulator against a modulo-32
// accumulator model, and that a constant input A yields exactly A overflows
// in 32 cycles (A = 16 and A = 32 are the two peak deviations).
`timescale 1ps / 1fs
module tb_ssc_sdm;
  import sscg_pkg::*;
  logic clk = 0, rst_n = 1, ov0, ov1;
  prof_t a = '0;
  int checks = 0, failures = 0;

  // reset is asserted by an edge so that asynchronous resets take effect
  initial #1 rst_n = 0;
  int res = 0, e0 = 0, e1 = 0;

  ssc_sdm dut (.clk, .rst_n, .a, .ov0, .ov1);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n) begin
    int s;
    s = res + int'(a);
    e0 = (s >> 5) & 1;
    e1 = (s >> 6) & 1;
    res = s % 32;
  end

  initial begin
    int cnt;
    #20;
    @(negedge clk) rst_n = 1;
    for (int i = 0; i < 500; i++) begin
      a = prof_t'($urandom_range(0, 63));
      @(negedge clk);
      check(ov0 == e0[0] && ov1 == e1[0], $sformatf("A=%0d ov=%b%b want %0d%0d", a, ov1, ov0, e1, e0));
    end
    for (int v = 0; v <= 32; v += 4) begin
      a = prof_t'(v);
      @(negedge clk);
      cnt = 0;
      for (int n = 0; n < 32; n++) begin
        @(negedge clk);
        cnt += int'(ov0) + 2 * int'(ov1);
      end
      check(cnt == v, $sformatf("A=%0d gave %0d steps in 32 cycles", v, cnt));
    end
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
