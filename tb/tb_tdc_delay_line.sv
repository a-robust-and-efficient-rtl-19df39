// tb_tdc_delay_line: checks the TDC delay-line model.
// The DCO clock has a known period and phase. At random reference times the
// expected level of every tap, ckv(t_ref - j*tau), is computed from that
// closed-form waveform and compared with the sampled taps.
module tb_tdc_delay_line;
  import adpll_pkg::*;
  timeunit 1ps; timeprecision 1fs;

  localparam real TP  = 430.0;                // DCO period used here, ps
  localparam real TAU = 1.0e12 / 2.4e9 / 32.0;

  logic ckv = 1'b0, fref_d = 1'b0;
  logic [TDC_TAPS-1:0] taps;
  int checks = 0, failures = 0;
  realtime t0;

  tdc_delay_line dut (.*);

  // ckv rises at t0 + n*TP, falls at t0 + n*TP + TP/2
  initial begin
    #1000;
    t0 = $realtime;
    forever begin
      ckv = 1'b1; #(TP / 2.0);
      ckv = 1'b0; #(TP / 2.0);
    end
  end

  function automatic logic level_at(real s);
    real ph;
    ph = (s - t0) / TP;
    ph = ph - $floor(ph);
    return (ph < 0.5) ? 1'b1 : 1'b0;
  endfunction

  initial begin
    #3000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int bad;
    real tr;
    #5000;
    for (int k = 0; k < 200; k++) begin
      #(1000.0 + real'($urandom_range(0, 99999)) / 100.0);
      fref_d = 1'b1;
      tr = $realtime;
      #1;
      bad = 0;
      for (int j = 0; j < TDC_TAPS; j++) begin
        real s, fr;
        s  = tr - real'(j) * TAU;
        fr = (s - t0) / TP - $floor((s - t0) / TP);
        // skip taps within 0.01 ps of a DCO edge
        if (fr * TP > 0.01 && (fr - 0.5 > 0.0 ? fr - 0.5 : 0.5 - fr) * TP > 0.01 && (1.0 - fr) * TP > 0.01)
          if (taps[j] !== level_at(s)) bad++;
      end
      checks++;
      if (bad != 0) begin failures++; $display("FAIL k=%0d %0d taps wrong %b", k, bad, taps); end
      #100 fref_d = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
