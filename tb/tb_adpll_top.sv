// tb_adpll_top: end-to-end test of the closed-loop ADPLL.
//
// Instance A: DCO natural frequency 137 MHz too high, FCW = 120 (2.4 GHz
// from 20 MHz), unity gain normalisation. After reset the loop must pass
// PVT -> ACQ -> TRK, reach |f - 2.4 GHz| < 250 kHz within 1.2 us of the
// first reference edge and stay there; over 20 reference cycles exactly
// 2400 +-1 DCO edges must occur. Then a single-event transient delays one
// reference edge by 1 ns: the phase error must jump, the IIR must keep the
// frequency excursion below 1.5 MHz, and the loop must be back within 250 kHz
// and +-2/32 UI of its pre-event phase error within 1.2 us. A second
// transient adds a 1 ns pulse to the reference: it must show up as one extra
// loop clock edge and the loop must recover within 1.2 us as well.
// Instance B: natural frequency 180 MHz too low, fractional FCW = 120+17/32
// (2410.625 MHz), gain normalisation 0.875: must lock and produce
// 120.53125*32 = 3857 +-1 edges per 32 reference cycles; the DTC codes must
// take several values (phase prediction at work).
// Frequencies are measured from DCO edge time stamps over 24 periods.
// Counted mechanisms: phase restart, each gear shift, integer part off in
// TRK, IIR and integral path active, DTC code changes, SET recovery.
module tb_adpll_top;
  import adpll_pkg::*;
  timeunit 1ps; timeprecision 1fs;

  localparam real TREF = 50000.0;

  logic fref_a = 1'b0, fref_b = 1'b0, rst_n = 1'b1;
  logic ckv_a, ckv_b, locked_a, locked_b;
  mode_t mode_a, mode_b;
  logic signed [PE_W-1:0] pe_a, pe_b;
  logic signed [PVT_W-1:0] p_a, p_b;
  logic signed [ACQ_W-1:0] a_a, a_b;
  logic signed [TRK_W-1:0] t_a, t_b;
  logic [FCW_W-1:0] fcw_b = FCW_W'((120 << FRAC_W) + 17);
  int checks = 0, failures = 0;
  logic set_req = 1'b0;   // delay A's next rising reference edge by 1 ns
  logic glitch_req = 1'b0;   // add a 1 ns pulse in A's next low phase

  adpll_top #(.F_OFF_HZ(137.0e6)) u_a (
    .fref(fref_a), .rst_n, .fcw(FCW_DEFAULT), .norm(NORM_UNITY), .bias(22'h3fffff),
    .ckv(ckv_a), .mode(mode_a), .locked(locked_a), .pe_full(pe_a),
    .otw_p(p_a), .otw_a(a_a), .otw_t(t_a));
  adpll_top #(.F_OFF_HZ(-180.0e6)) u_b (
    .fref(fref_b), .rst_n, .fcw(fcw_b), .norm(NORM_W'(57344)), .bias(22'h3fffff),
    .ckv(ckv_b), .mode(mode_b), .locked(locked_b), .pe_full(pe_b),
    .otw_p(p_b), .otw_a(a_b), .otw_t(t_b));

  initial #1 rst_n = 1'b0;

  // references; A's rising edge can be delayed once by set_extra
  always begin
    #(TREF / 2.0) fref_b = 1'b1;
    #(TREF / 2.0) fref_b = 1'b0;
  end
  always begin
    real d;
    logic g;
    d = set_req ? 1000.0 : 0.0;
    g = glitch_req;
    set_req = 1'b0;
    glitch_req = 1'b0;
    if (g) begin
      #(TREF / 4.0 + 173.0);        // not a whole number of DCO periods
      fref_a = 1'b1;
      #1000.0;
      fref_a = 1'b0;
      #(TREF / 4.0 - 1173.0 + d);
    end else begin
      #(TREF / 2.0 + d);
    end
    fref_a = 1'b1;
    #(TREF / 2.0 - d);
    fref_a = 1'b0;
  end

  // frequency from time stamps of the last 24 DCO periods
  realtime ts_a [25], ts_b [25];
  int na = 0, nb = 0;
  always @(posedge ckv_a) begin
    for (int i = 24; i > 0; i--) ts_a[i] = ts_a[i-1];
    ts_a[0] = $realtime; na++;
  end
  always @(posedge ckv_b) begin
    for (int i = 24; i > 0; i--) ts_b[i] = ts_b[i-1];
    ts_b[0] = $realtime; nb++;
  end
  function automatic real freq_a();
    return 24.0e12 / (ts_a[0] - ts_a[24]);
  endfunction
  function automatic real freq_b();
    return 24.0e12 / (ts_b[0] - ts_b[24]);
  endfunction

  // mechanism counters
  int n_restart, n_pvt2acq, n_acq2trk, n_intoff, n_iir, n_integ, n_dtc_change, n_set;
  mode_t pm_a = MODE_PVT, pm_b = MODE_PVT;
  int n_ckr_a = 0;
  always @(posedge u_a.u_core.ckr) n_ckr_a++;
  logic [FRAC_W-1:0] last_dtc_b;
  always @(posedge u_a.u_core.ckr) begin
    if (u_a.u_core.started && !$past(u_a.u_core.started)) n_restart++;
    if (mode_a == MODE_ACQ && pm_a == MODE_PVT) n_pvt2acq++;
    if (mode_a == MODE_TRK && pm_a == MODE_ACQ) n_acq2trk++;
    if (mode_a == MODE_TRK && !u_a.u_core.u_pd.int_en) n_intoff++;
    if (mode_a == MODE_TRK && u_a.u_core.u_dlf.v != u_a.u_core.u_dlf.u) n_iir++;
    if (mode_a == MODE_TRK && u_a.u_core.u_dlf.u_pi.integ != 0) n_integ++;
    pm_a = mode_a;
  end
  always @(posedge u_b.u_core.ckr) begin
    if (u_b.u_core.started && !$past(u_b.u_core.started)) n_restart++;
    if (mode_b == MODE_ACQ && pm_b == MODE_PVT) n_pvt2acq++;
    if (mode_b == MODE_TRK && pm_b == MODE_ACQ) n_acq2trk++;
    if (u_b.dtc_code != last_dtc_b) n_dtc_change++;
    last_dtc_b = u_b.dtc_code;
    pm_b = mode_b;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #80000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    realtime t_rel, t_settle, t_set;
    real f, fmax_dev;
    int n0, pe_before, k;
    #100000 rst_n = 1'b1;
    t_rel = $realtime;
    // ---- acquisition of A: wait until within 250 kHz for 5 reference cycles
    t_settle = -1.0; k = 0;
    for (int c = 0; c < 200 && t_settle < 0.0; c++) begin
      @(posedge u_a.u_core.ckr); #10000;
      f = freq_a();
      if (locked_a && (f - 2.4e9 < 250.0e3) && (f - 2.4e9 > -250.0e3)) k++; else k = 0;
      if (k == 5) t_settle = $realtime - t_rel - 4.0 * TREF;
    end
    $display("A: settled after %0.3f us (p=%0d a=%0d t=%0d)", t_settle / 1.0e6, p_a, a_a, t_a);
    check(t_settle > 0.0 && t_settle < 1.2e6, "A settling time");
    // ---- frequency by edge count over 20 reference cycles, checked for jitter
    repeat (5) @(posedge u_a.u_core.ckr);
    n0 = na;
    repeat (20) @(posedge u_a.u_core.ckr);
    n0 = na - n0;
    fmax_dev = 0.0;
    repeat (20) begin
      @(posedge u_a.u_core.ckr); #10000;
      f = freq_a() - 2.4e9;
      if (f < 0.0) f = -f;
      if (f > fmax_dev) fmax_dev = f;
    end
    $display("A: %0d edges in 20 cycles, max deviation %0.1f kHz", n0, fmax_dev / 1.0e3);
    check(n0 >= 2399 && n0 <= 2401, "A edge count");
    check(fmax_dev < 250.0e3, "A stays locked");
    // ---- single-event transient: one reference edge 1 ns late
    @(posedge u_a.u_core.ckr); #1000;
    pe_before = int'(pe_a);
    @(posedge fref_a); #1000;
    set_req = 1'b1;
    @(posedge fref_a);
    t_set = $realtime;
    @(posedge u_a.u_core.ckr); #1;
    $display("A: SET phase error %0d (before %0d)", pe_a, pe_before);
    check(int'(pe_a) - pe_before > 6 || pe_before - int'(pe_a) > 6, "SET visible in phase error");
    fmax_dev = 0.0; k = 0; t_settle = -1.0;
    for (int c = 0; c < 60; c++) begin
      @(posedge u_a.u_core.ckr); #10000;
      f = freq_a() - 2.4e9;
      if (f < 0.0) f = -f;
      if (f > fmax_dev) fmax_dev = f;
      if (f < 250.0e3 && (int'(pe_a) - pe_before) <= 2 && (pe_before - int'(pe_a)) <= 2) k++; else k = 0;
      if (k == 5 && t_settle < 0.0) t_settle = $realtime - t_set - 4.0 * TREF;
    end
    $display("A: after SET max deviation %0.1f kHz, recovered in %0.3f us", fmax_dev / 1.0e3, t_settle / 1.0e6);
    check(fmax_dev < 1.5e6, "SET frequency excursion");
    check(t_settle > 0.0 && t_settle < 1.2e6, "SET recovery time");
    if (t_settle > 0.0) n_set++;
    // ---- second transient: a 1 ns pulse added to the reference
    repeat (10) @(posedge u_a.u_core.ckr);
    #1000;
    pe_before = int'(pe_a);
    @(posedge fref_a); #1000;
    glitch_req = 1'b1;
    @(negedge fref_a);
    t_set = $realtime;
    n0 = n_ckr_a;
    fmax_dev = 0.0; k = 0; t_settle = -1.0e9;
    for (int c = 0; c < 60; c++) begin
      @(posedge u_a.u_core.ckr); #10000;
      f = freq_a() - 2.4e9;
      if (f < 0.0) f = -f;
      if (f > fmax_dev) fmax_dev = f;
      if (locked_a && f < 250.0e3 && (int'(pe_a) - pe_before) <= 2 && (pe_before - int'(pe_a)) <= 2) k++; else k = 0;
      if (k == 5 && t_settle < -1.0e8) t_settle = $realtime - t_set - 4.0 * TREF;
    end
    // the pulse is one extra retimed reference edge
    n0 = n_ckr_a - n0;
    $display("A: %0d loop clock edges in %0d reference periods", n0, int'(($realtime - t_set) / TREF));
    check(n0 == int'(($realtime - t_set) / TREF) + 1, "glitch reached the loop clock");
    if (t_settle < 0.0 && t_settle > -1.0e8) t_settle = 0.0;   // never left the band
    $display("A: after 1 ns glitch max deviation %0.1f kHz, recovered in %0.3f us", fmax_dev / 1.0e3, t_settle / 1.0e6);
    check(fmax_dev < 1.5e6, "glitch frequency excursion");
    check(t_settle >= 0.0 && t_settle < 1.2e6, "glitch recovery time");
    if (t_settle >= 0.0) n_set++;
    // ---- instance B: fractional FCW and non-unity normalisation
    check(locked_b, "B locked");
    @(posedge u_b.u_core.ckr);
    n0 = nb;
    repeat (32) @(posedge u_b.u_core.ckr);
    $display("B: %0d edges in 32 cycles (p=%0d a=%0d t=%0d)", nb - n0, p_b, a_b, t_b);
    check(nb - n0 >= 3856 && nb - n0 <= 3858, "B edge count");
    f = freq_b() - 2410.625e6;
    check(f < 300.0e3 && f > -300.0e3, $sformatf("B frequency off by %0.1f kHz", f / 1.0e3));
    // ---- mechanisms
    $display("restart=%0d pvt2acq=%0d acq2trk=%0d intoff=%0d iir=%0d integ=%0d dtc_changes=%0d set=%0d",
             n_restart, n_pvt2acq, n_acq2trk, n_intoff, n_iir, n_integ, n_dtc_change, n_set);
    check(n_restart == 2, "phase restart");
    check(n_pvt2acq == 2, "PVT to ACQ");
    check(n_acq2trk == 2, "ACQ to TRK");
    check(n_intoff > 0, "integer part off in tracking");
    check(n_iir > 0, "IIR active");
    check(n_integ > 0, "integral path active");
    check(n_dtc_change > 10, "DTC prediction codes change");
    check(n_set == 2, "both transients recovered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
