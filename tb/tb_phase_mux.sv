// tb_phase_mux: random phase vectors and select values; the output must equal
// the selected bit.
`timescale 1ps / 1fs
module tb_phase_mux;
  import sscg_pkg::*;
  logic [N_PHASES-1:0] phases;
  psel_t sel;
  logic out;
  int checks = 0, failures = 0;

  phase_mux dut (.phases, .sel, .out);

  initial begin
    for (int i = 0; i < 2000; i++) begin
      phases = N_PHASES'($urandom);
      sel = psel_t'($urandom_range(0, N_PHASES - 1));
      #1;
      checks++;
      if (out !== phases[sel]) begin
        failures++;
        $display("FAIL: sel=%0d phases=%b out=%b", sel, phases, out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
