// tb_dither_sdm: checks the fine-code sigma-delta modulator.
// A reference accumulator predicts F0 on every falling DCO edge; the input
// 001 sequence from reset reproduces the carry on the 8th accumulation, and
// for every fine code F0 must be high exactly `fine` times in 8 cycles.
`timescale 1ps / 1fs
module tb_dither_sdm;
  import sscg_pkg::*;
  logic f_dco = 0, rst_n = 1, f0;
  fine_t fine = 3'b001;
  int checks = 0, failures = 0;

  // reset is asserted by an edge so that asynchronous resets take effect
  initial #1 rst_n = 0;
  int acc = 0, exp_carry = 0;

  dither_sdm dut (.f_dco, .rst_n, .fine, .f0);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  always #416.665 f_dco = ~f_dco;

  always @(posedge f_dco) if (rst_n) begin
    exp_carry = (acc + int'(fine)) >= 8;
    acc = (acc + int'(fine)) % 8;
  end

  initial begin
    int ones;
    #1000;
    @(negedge f_dco) rst_n = 1;
    // input 001: carry only on the 8th accumulation
    for (int n = 1; n <= 16; n++) begin
      @(negedge f_dco); #1;
      check(f0 == ((n % 8) == 0), $sformatf("001 sequence, cycle %0d f0=%b", n, f0));
      check(f0 == exp_carry[0], "reference model");
    end
    for (int v = 0; v < 8; v++) begin
      @(posedge f_dco); #1 fine = fine_t'(v);
      @(negedge f_dco);
      ones = 0;
      for (int n = 0; n < 8; n++) begin
        @(negedge f_dco); #1;
        ones += f0;
        check(f0 == exp_carry[0], "reference model");
      end
      check(ones == v, $sformatf("fine=%0d gave %0d ones in 8 cycles", v, ones));
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
