// tb_adpll_workloads: the operating points the ADPLL is specified for, run
// one after the other on the default adpll_top (DCO natural frequency at its
// 2.4 GHz centre), with a reset between them:
//   - the two ends of the lock range: FCW 108 (2.16 GHz) and 132 (2.64 GHz)
//     from 20 MHz;
//   - the ends of the reference range 20 MHz +- 5 MHz at 2.4 GHz:
//     15 MHz with FCW 160 and 25 MHz with FCW 96. The gain normalisation is
//     derived for 20 MHz, so norm is set to f_ref / 20 MHz (0.75, 1.25).
// For each: tracking reached within 1.2 us, frequency within 300 kHz of
// FCW * f_ref (from DCO time stamps) and FCW*20 +-1 DCO edges in 20
// reference cycles.
module tb_adpll_workloads;
  import adpll_pkg::*;
  timeunit 1ps; timeprecision 1fs;

  logic fref = 1'b0, rst_n = 1'b1;
  logic ckv, locked;
  mode_t mode;
  logic signed [PE_W-1:0] pe_full;
  logic signed [PVT_W-1:0] otw_p;
  logic signed [ACQ_W-1:0] otw_a;
  logic signed [TRK_W-1:0] otw_t;
  logic [FCW_W-1:0] fcw;
  logic [NORM_W-1:0] norm;
  real tref = 50000.0;
  int checks = 0, failures = 0;

  adpll_top dut (.fref, .rst_n, .fcw, .norm, .bias(22'h3fffff), .ckv, .mode, .locked,
                 .pe_full, .otw_p, .otw_a, .otw_t);

  always begin
    #(tref / 2.0) fref = 1'b1;
    #(tref / 2.0) fref = 1'b0;
  end

  realtime ts [25];
  int n = 0;
  always @(posedge ckv) begin
    for (int i = 24; i > 0; i--) ts[i] = ts[i-1];
    ts[0] = $realtime;
    n++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic run_case(input int fcw_int, input real tref_ps, input int norm_q16);
    realtime t_rel;
    real f, fexp;
    int n0;
    tref = tref_ps;
    fcw  = FCW_W'(fcw_int << FRAC_W);
    norm = NORM_W'(norm_q16);
    rst_n = 1'b0;
    #200000 rst_n = 1'b1;
    t_rel = $realtime;
    fork
      wait (locked);
      #3000000;
    join_any
    disable fork;
    check(locked && $realtime - t_rel < 1.2e6,
          $sformatf("FCW %0d: tracking after %0.3f us", fcw_int, ($realtime - t_rel) / 1.0e6));
    repeat (20) @(posedge dut.u_core.ckr);
    #10000;
    f = 24.0e12 / (ts[0] - ts[24]);
    fexp = real'(fcw_int) * 1.0e12 / tref_ps;
    $display("FCW %0d, f_ref %0.1f MHz: f = %0.4f MHz (exp %0.4f) p=%0d a=%0d t=%0d",
             fcw_int, 1.0e6 / tref_ps, f / 1.0e6, fexp / 1.0e6, otw_p, otw_a, otw_t);
    check(f - fexp < 300.0e3 && f - fexp > -300.0e3, "frequency");
    @(posedge dut.u_core.ckr);
    n0 = n;
    repeat (20) @(posedge dut.u_core.ckr);
    check(n - n0 >= 20 * fcw_int - 1 && n - n0 <= 20 * fcw_int + 1,
          $sformatf("edge count %0d", n - n0));
  endtask

  initial begin
    #30000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    fcw = FCW_DEFAULT;
    norm = NORM_UNITY;
    #1 rst_n = 1'b0;
    run_case(108, 50000.0, 65536);
    run_case(132, 50000.0, 65536);
    run_case(160, 1.0e12 / 15.0e6, 49152);
    run_case(96, 40000.0, 81920);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
