// tb_dtc_model: measures the delay of the DTC model for every code and
// compares it with code * (1/2.4 GHz) / 32, within 1 fs. Also checks the
// falling edge is delayed by the same amount.
module tb_dtc_model;
  import adpll_pkg::*;
  timeunit 1ps; timeprecision 1fs;

  logic fref = 1'b0, fref_d;
  logic [FRAC_W-1:0] code;
  int checks = 0, failures = 0;
  realtime t0, t1, t2, t3;
  real expd;

  dtc_model dut (.*);

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 32; c++) begin
      code = FRAC_W'(c);
      expd = real'(c) * (1.0e12 / 2.4e9) / 32.0;
      #20000 fref = 1'b1; t0 = $realtime;
      if (c != 0) @(posedge fref_d);
      t1 = $realtime;
      #20000 fref = 1'b0; t2 = $realtime;
      if (c != 0) @(negedge fref_d);
      t3 = $realtime;
      checks += 2;
      if ((t1 - t0 - expd) > 0.001 || (t1 - t0 - expd) < -0.001) begin
        failures++; $display("FAIL rise code %0d: %f vs %f", c, t1 - t0, expd);
      end
      if ((t3 - t2 - expd) > 0.001 || (t3 - t2 - expd) < -0.001) begin
        failures++; $display("FAIL fall code %0d: %f vs %f", c, t3 - t2, expd);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
