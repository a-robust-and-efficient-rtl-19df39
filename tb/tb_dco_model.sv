// tb_dco_model: checks the DCO model's tuning law.
// For random bank codes the frequency measured over 200 periods must equal
// 2.4 GHz + p*1.953125 MHz + a*390.625 kHz + t*31.25 kHz within 1 kHz;
// the extremes of the PVT bank must give about 2.15 and 2.65 GHz;
// bias = 0 must stop the clock.
module tb_dco_model;
  import adpll_pkg::*;
  timeunit 1ps; timeprecision 1fs;

  logic signed [PVT_W-1:0] otw_p;
  logic signed [ACQ_W-1:0] otw_a;
  logic signed [TRK_W-1:0] otw_t;
  logic [BIAS_W-1:0] bias;
  logic ckv;
  int checks = 0, failures = 0;

  dco_model dut (.*);

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic measure(output real f);
    realtime t0;
    repeat (3) @(posedge ckv);
    t0 = $realtime;
    repeat (200) @(posedge ckv);
    f = 200.0 / (($realtime - t0) * 1.0e-12);
  endtask

  initial begin
    real f, fe;
    int n;
    bias = 22'h200000;
    otw_p = '0; otw_a = '0; otw_t = '0;
    for (int k = 0; k < 24; k++) begin
      if (k == 0) begin otw_p = -8'sd128; otw_a = '0; otw_t = '0; end
      else if (k == 1) begin otw_p = 8'sd127; end
      else begin
        otw_p = PVT_W'($urandom); otw_a = ACQ_W'($urandom); otw_t = TRK_W'($urandom);
      end
      measure(f);
      fe = 2.4e9 + real'(otw_p) * 1.953125e6 + real'(otw_a) * 390.625e3 + real'(otw_t) * 31.25e3;
      checks++;
      if ((f - fe) > 1.0e3 || (f - fe) < -1.0e3) begin
        failures++; $display("FAIL p=%0d a=%0d t=%0d f=%f exp %f", otw_p, otw_a, otw_t, f, fe);
      end
      if (k == 0) begin checks++; if (f < 2.149e9 || f > 2.151e9) begin failures++; $display("FAIL fmin %f", f); end end
      if (k == 1) begin checks++; if (f < 2.647e9 || f > 2.649e9) begin failures++; $display("FAIL fmax %f", f); end end
    end
    bias = '0;
    #2000;
    n = 0;
    fork
      begin repeat (50) @(posedge ckv); n = 1; end
      #20000;
    join_any
    disable fork;
    checks++;
    if (n != 0 || ckv != 1'b0) begin failures++; $display("FAIL oscillates with zero bias"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
