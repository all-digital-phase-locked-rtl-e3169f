// tb_mux_ctrl: checks the overflow remapping truth table of the MUX control
// circuit in both modes and the modulo-20 phase-select arithmetic against a
// reference model, including wrap-around below phase 0.
`timescale 1ps / 1fs
module tb_mux_ctrl;
  import sscg_pkg::*;
  logic clk = 0, rst_n = 1, select = 1, ov0 = 0, ov1 = 0;
  psel_t sel;
  int checks = 0, failures = 0;

  // reset is asserted by an edge so that asynchronous resets take effect
  initial #1 rst_n = 0;
  int exp_sel = 0, wraps = 0;

  mux_ctrl dut (.clk, .rst_n, .select, .ov0, .ov1, .sel);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  always #5 clk = ~clk;

  // truth table rows {ov1, ov0, select} -> {ov1_new, ov0_new}
  function automatic int table_step(bit o1, bit o0, bit s);
    case ({o1, o0, s})
      3'b000: return 0;  3'b001: return 0;
      3'b010: return 2;  3'b011: return 1;
      3'b100: return 2;  3'b101: return 2;
      3'b110: return 2;  3'b111: return 3;
    endcase
    return 0;
  endfunction

  initial begin
    #20;
    @(negedge clk) rst_n = 1;
    check(sel == 0, "reset select");
    for (int m = 0; m < 2; m++) begin
      select = m[0];
      @(negedge clk);
      exp_sel = int'(sel);
      for (int i = 0; i < 400; i++) begin
        ov1 = ($urandom_range(0, 7) == 0);
        ov0 = $urandom_range(0, 1);
        @(negedge clk);
        if (exp_sel - table_step(ov1, ov0, select) < 0) wraps++;
        exp_sel = (exp_sel - table_step(ov1, ov0, select) + 20) % 20;
        check(int'(sel) == exp_sel, $sformatf("mode %0d ov=%b%b sel=%0d want %0d", select, ov1, ov0, sel, exp_sel));
        if (!select) check(sel[0] == 1'b0, "10-phase mode uses even phases only");
      end
    end
    check(wraps > 0, "wrap-around exercised");
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
