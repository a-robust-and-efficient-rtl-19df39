// tb_phase_predictor: checks the DTC code prediction.
// Reset code must be half a UI (16). At every CKR edge the code must become
// (16 - f) mod 32 for the fractional phase f presented before the edge; it
// must hold between edges.
module tb_phase_predictor;
  import adpll_pkg::*;
  timeunit 1ps; timeprecision 1fs;

  logic ckr = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;   // asynchronous reset pulse at start
  logic [FRAC_W-1:0] phase_next_frac, dtc_code;
  int checks = 0, failures = 0;
  int expect_code;

  phase_predictor dut (.*);

  always #25000 ckr = ~ckr;

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    phase_next_frac = 5'd3;
    #10000;
    checks++; if (dtc_code != 5'd16) begin failures++; $display("FAIL reset %0d", dtc_code); end
    #50000 rst_n = 1'b1;
    for (int k = 0; k < 64; k++) begin
      phase_next_frac = (k < 32) ? FRAC_W'(k) : FRAC_W'($urandom);
      expect_code = (16 - int'(phase_next_frac) + 32) % 32;
      @(posedge ckr); #1;
      checks++;
      if (int'(dtc_code) != expect_code) begin
        failures++; $display("FAIL f=%0d code=%0d exp=%0d", phase_next_frac, dtc_code, expect_code);
      end
      phase_next_frac = FRAC_W'($urandom);   // must not matter until next edge
      #10000;
      checks++;
      if (int'(dtc_code) != expect_code) begin failures++; $display("FAIL hold"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
