// tb_dlf: random test of the digital loop filter against a reference model.
// Each step presents one PFD outcome (reference led, divided clock led and
// caught by a reference edge, divided clock led twice, or no decision) with a
// random Fast level, clocks f_div once and compares the coarse and fine codes
// with saturating counters kept in the testbench.
`timescale 1ps / 1fs
module tb_dlf;
  import sscg_pkg::*;
  logic f_div = 0, f_ref = 0, rst_n = 1, up = 0, dw = 0, fast = 0;
  dco_word_t word;
  int checks = 0, failures = 0;

  // reset is asserted by an edge so that asynchronous resets take effect
  initial #1 rst_n = 0;
  int exp_c, exp_f, n_sat = 0, n_coarse = 0, n_fine = 0;

  dlf dut (.f_div, .f_ref, .rst_n, .up, .dw, .fast, .word);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin
    int kind;
    bit lead, lag;
    #100 rst_n = 1;
    #10 check(word.coarse == COARSE_INIT && word.fine == FINE_INIT, "reset codes");
    exp_c = COARSE_INIT; exp_f = FINE_INIT;
    for (int i = 0; i < 3000; i++) begin
      kind = $urandom_range(0, 3);
      fast = ($urandom_range(0, 2) == 0);
      lead = 0; lag = 0;
      case (kind)
        0: begin up = 1; lead = 1; end                             // reference led
        1: begin dw = 1; #50 f_ref = 1; #50 f_ref = 0; dw = 0; lag = 1; end
        2: begin dw = 1; lag = 1; end                              // divided led again
        default: ;
      endcase
      #50 f_div = 1;
      #50 f_div = 0; up = 0; dw = 0;
      if (fast) begin
        if (lead && exp_c < 15) exp_c++;
        else if (lag && exp_c > 0) exp_c--;
        n_coarse += (lead || lag);
      end else begin
        if (lead && exp_f > 0) exp_f--;
        else if (lag && exp_f < 7) exp_f++;
        n_fine += (lead || lag);
      end
      if (exp_c == 0 || exp_c == 15 || exp_f == 0 || exp_f == 7) n_sat++;
      #10 check(int'(word.coarse) == exp_c && int'(word.fine) == exp_f,
                $sformatf("step %0d kind %0d fast %0b: got %0d/%0d want %0d/%0d",
                          i, kind, fast, word.coarse, word.fine, exp_c, exp_f));
    end
    check(n_sat > 0 && n_coarse > 0 && n_fine > 0, "coverage");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
