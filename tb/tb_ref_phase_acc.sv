// tb_ref_phase_acc: checks the reference phase accumulator.
// After reset the first CKR edge must load restart_int * 1 UI + FCW, each
// later edge must add FCW modulo 2^21; phase_next must always show the value
// of the next edge. FCW is changed on the fly (integer and fractional).
module tb_ref_phase_acc;
  import adpll_pkg::*;
  timeunit 1ps; timeprecision 1fs;

  logic ckr = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;   // asynchronous reset pulse at start
  logic [FCW_W-1:0] fcw;
  logic [PH_I-1:0]  restart_int;
  logic [PH_W-1:0]  phase_r, phase_next;
  logic             started;
  int checks = 0, failures = 0;
  longint model;

  ref_phase_acc dut (.*);

  always #25000 ckr = ~ckr;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #50000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    fcw = FCW_DEFAULT;
    restart_int = 16'd1234;
    #60000 rst_n = 1'b1;
    check(phase_r == 0 && !started, "reset state");
    @(posedge ckr); #1;
    model = (64'd1234 << FRAC_W) + (120 << FRAC_W);
    check(started, "started after first edge");
    check(phase_r == PH_W'(model), $sformatf("restart %0d vs %0d", phase_r, model));
    for (int k = 0; k < 30; k++) begin
      if (k == 10) fcw = FCW_W'((120 << FRAC_W) + 17);   // 120 + 17/32
      if (k == 20) fcw = FCW_W'($urandom_range(1, (1 << FCW_W) - 1));
      restart_int = 16'($urandom);                        // ignored now
      #1;
      check(phase_next == PH_W'(model + fcw), "phase_next");
      @(posedge ckr); #1;
      model = (model + fcw) % (64'd1 << PH_W);
      check(phase_r == PH_W'(model), $sformatf("k=%0d %0d vs %0d", k, phase_r, model));
    end
    // wrap-around of the 16-bit integer part
    fcw = FCW_W'(8191);
    repeat (300) begin
      @(posedge ckr); #1;
      model = (model + fcw) % (64'd1 << PH_W);
    end
    check(phase_r == PH_W'(model), "after wrap");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
