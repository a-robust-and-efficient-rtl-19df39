// tb_adpll_full: one complete synthesis run of adpll_top at its default
// parameters. The reference is 20 MHz and FCW = 125, so the loop must move
// the DCO from its 2.4 GHz centre to 2.5 GHz: mostly with the PVT bank, then
// ACQ, then tracking. Checks: the modes appear in order, the loop is in TRK
// within 1.2 us, the frequency measured from DCO time stamps is within
// 250 kHz of 2.5 GHz, and 20 reference cycles hold 2500 +-1 DCO edges.
module tb_adpll_full;
  import adpll_pkg::*;
  timeunit 1ps; timeprecision 1fs;

  logic fref = 1'b0, rst_n = 1'b1;
  logic ckv, locked;
  mode_t mode;
  logic signed [PE_W-1:0] pe_full;
  logic signed [PVT_W-1:0] otw_p;
  logic signed [ACQ_W-1:0] otw_a;
  logic signed [TRK_W-1:0] otw_t;
  int checks = 0, failures = 0;

  adpll_top dut (.fref, .rst_n, .fcw(FCW_W'(125 << FRAC_W)), .norm(NORM_UNITY),
                 .bias(22'h3fffff), .ckv, .mode, .locked, .pe_full, .otw_p, .otw_a,
                 .otw_t);

  initial #1 rst_n = 1'b0;
  always #25000 fref = ~fref;

  realtime ts [25];
  int n = 0;
  always @(posedge ckv) begin
    for (int i = 24; i > 0; i--) ts[i] = ts[i-1];
    ts[0] = $realtime;
    n++;
  end

  // order of modes
  int seen_acq = 0, seen_trk = 0, bad_order = 0;
  always @(posedge dut.u_core.ckr) begin
    if (mode == MODE_ACQ) seen_acq++;
    if (mode == MODE_TRK) begin
      seen_trk++;
      if (seen_acq == 0) bad_order++;
    end
    if (mode == MODE_PVT && (seen_acq != 0 || seen_trk != 0)) bad_order++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    realtime t_rel;
    real f;
    int n0;
    #100000 rst_n = 1'b1;
    t_rel = $realtime;
    wait (locked);
    $display("tracking after %0.3f us", ($realtime - t_rel) / 1.0e6);
    check($realtime - t_rel < 1.2e6, "lock time");
    repeat (20) @(posedge dut.u_core.ckr);
    #10000;
    f = 24.0e12 / (ts[0] - ts[24]);
    $display("f = %0.4f MHz (p=%0d a=%0d t=%0d)", f / 1.0e6, otw_p, otw_a, otw_t);
    check(f - 2.5e9 < 250.0e3 && f - 2.5e9 > -250.0e3, "output frequency");
    @(posedge dut.u_core.ckr);
    n0 = n;
    repeat (20) @(posedge dut.u_core.ckr);
    check(n - n0 >= 2499 && n - n0 <= 2501, $sformatf("edge count %0d", n - n0));
    check(seen_acq > 0 && seen_trk > 0 && bad_order == 0, "mode order");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
