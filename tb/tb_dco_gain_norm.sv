// tb_dco_gain_norm: checks the conversion from UI/cycle to bank codes.
// Expected code = round(y * 20 MHz / K_bank * norm) with K = 1.953125 MHz,
// 390.625 kHz, 31.25 kHz, saturated to [-128,127], [-128,127], [-32,31].
// Values within 0.01 of a rounding boundary may round either way.
module tb_dco_gain_norm;
  import adpll_pkg::*;
  timeunit 1ps; timeprecision 1fs;

  mode_t mode;
  logic [NORM_W-1:0] norm;
  logic signed [DLF_W-1:0] y;
  logic signed [7:0] code;
  int checks = 0, failures = 0;

  dco_gain_norm dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real g, v, r;
    int lo, hi, e;
    for (int k = 0; k < 3000; k++) begin
      mode = mode_t'(k % 3);
      norm = (k < 1500) ? NORM_UNITY : NORM_W'($urandom_range(32768, 98304));
      case (mode)
        MODE_PVT: begin g = 20.0e6 / 1.953125e6; lo = -128; hi = 127; end
        MODE_ACQ: begin g = 20.0e6 / 390.625e3;  lo = -128; hi = 127; end
        default:  begin g = 20.0e6 / 31.25e3;    lo = -32;  hi = 31;  end
      endcase
      // inputs span the bank range and beyond
      y = DLF_W'(int'((real'($urandom_range(0, 20000)) - 10000.0) / 10000.0 * 1.5 * real'(hi) / g * 65536.0));
      #1;
      v = real'(y) / 65536.0 * g * real'(norm) / 65536.0;
      r = v - $floor(v);
      e = int'($floor(v + 0.5));
      if (e > hi) e = hi;
      if (e < lo) e = lo;
      checks++;
      if (int'(code) != e && !(r > 0.49 && r < 0.51 && (int'(code) - e == 1 || e - int'(code) == 1))) begin
        failures++; $display("FAIL mode=%0d y=%0d norm=%0d code=%0d exp=%0d (%f)", mode, y, norm, code, e, v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
