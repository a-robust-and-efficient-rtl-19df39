// tb_tdc_encoder: checks the thermometer-to-fraction conversion.
// Tap vectors are generated from a DCO waveform (period P taps, duty 50 %,
// last rising edge e taps ago); the expected eps is e, saturated at 31 when
// the edge is beyond 31 taps or absent.
module tb_tdc_encoder;
  import adpll_pkg::*;
  timeunit 1ps; timeprecision 1fs;

  logic [TDC_TAPS-1:0] taps;
  logic [FRAC_W-1:0]   eps;
  int checks = 0, failures = 0;

  tdc_encoder dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int p, e, exp_e;
    for (int k = 0; k < 2000; k++) begin
      p = (k < 1000) ? 32 : $urandom_range(28, 44);
      e = $urandom_range(0, p - 1);
      // tap j looks j cells into the past; rising edge between cells e+1 and e
      for (int j = 0; j < TDC_TAPS; j++) begin
        int back;
        back = e - j;                  // >0 after the edge, <=0 before
        if (j <= e) taps[j] = (back < p / 2) ? 1'b1 : 1'b0;
        else begin
          int d;
          d = (j - e - 1) % p;         // cells before the edge
          taps[j] = (d < p - p / 2) ? 1'b0 : 1'b1;
        end
      end
      exp_e = (e > 31) ? 31 : e;
      #1;
      checks++;
      if (int'(eps) != exp_e) begin
        failures++; $display("FAIL p=%0d e=%0d eps=%0d taps=%b", p, e, eps, taps);
      end
    end
    taps = '0; #1;                      // DCO stopped: no edge
    checks++; if (eps != 5'd31) begin failures++; $display("FAIL no edge"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
