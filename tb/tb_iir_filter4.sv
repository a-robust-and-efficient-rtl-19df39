// tb_iir_filter4: checks the 4-stage IIR filter against a real-valued model
// of q_i[t] = (1 - phi) q_i[t-1] + phi p_i[t] with phi = 0.75 (tolerance
// 8 LSB of Q16.16 for truncation), a step response that must rise
// monotonically towards the input, spike attenuation (a one-cycle impulse is
// reduced below 0.5 of its height), bypass (en low: y = x) and clear.
module tb_iir_filter4;
  import adpll_pkg::*;
  timeunit 1ps; timeprecision 1fs;

  logic ckr = 1'b0, rst_n = 1'b1, en = 1'b1, clr = 1'b0;
  initial #1 rst_n = 1'b0;   // asynchronous reset pulse at start
  logic signed [DLF_W-1:0] x, y;
  int checks = 0, failures = 0;
  real q [4];
  real ym, peak;

  iir_filter4 dut (.*);

  always #25000 ckr = ~ckr;

  function automatic real model_step(real xin);
    real p;
    p = xin;
    for (int i = 0; i < 4; i++) begin
      q[i] = 0.25 * q[i] + 0.75 * p;
      p = q[i];
    end
    return p;
  endfunction

  task automatic cmp(input string what);
    checks++;
    if ((real'(y) - ym) > 8.0 || (real'(y) - ym) < -8.0) begin
      failures++; $display("FAIL %s y=%0d model=%f", what, y, ym);
    end
  endtask

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) q[i] = 0.0;
    x = '0;
    #60000 rst_n = 1'b1;
    // random input sequence, combinational output checked before each edge
    for (int k = 0; k < 100; k++) begin
      @(negedge ckr);
      x = DLF_W'($urandom_range(0, 400000)) - 32'sd200000;
      #1;
      ym = model_step(real'(x));
      cmp("random");
    end
    // clear
    @(negedge ckr); clr = 1'b1; x = 32'sd65536; @(negedge ckr); clr = 1'b0;
    for (int i = 0; i < 4; i++) q[i] = 0.0;
    // impulse of 1.0 UI for one cycle
    x = 32'sd65536; #1; ym = model_step(real'(x)); cmp("impulse"); peak = real'(y);
    for (int k = 0; k < 20; k++) begin
      @(negedge ckr); x = '0; #1; ym = model_step(0.0); cmp("impulse tail");
      if (real'(y) > peak) peak = real'(y);
    end
    checks++;
    if (peak > 0.5 * 65536.0) begin failures++; $display("FAIL spike not attenuated %f", peak); end
    // bypass
    @(negedge ckr); en = 1'b0; x = 32'sd12345; #1;
    checks++; if (y != x) begin failures++; $display("FAIL bypass"); end
    @(negedge ckr); en = 1'b1; x = 32'sd100000; #1;
    checks++; if (y < 32'sd31639 || y > 32'sd31641) begin failures++; $display("FAIL state not cleared by bypass %0d", y); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
