// tb_dlf: checks the loop filter and tuning-word registers.
// Expected codes are worked out in real arithmetic:
//   PVT: otw_p = round(1.0   * (pe - pe0)/32 * 10.24)
//   ACQ: otw_a = round(0.75  * (pe - pe0)/32 * 51.2)
//   TRK: otw_t follows the fine error through the IIR and PI (real model),
//        saturated to 6 bits.
// pe0 is the error on the mode's first cycle (the bank must then be 0), the
// inactive banks must hold, and the combiner must use pe_fine in TRK
// (pe_full is then driven with garbage).
module tb_dlf;
  import adpll_pkg::*;
  timeunit 1ps; timeprecision 1fs;

  logic ckr = 1'b0, rst_n = 1'b1, en = 1'b1, mode_entry = 1'b0;
  mode_t mode;
  logic signed [PE_W-1:0]  pe_full, pe_fine;
  logic [NORM_W-1:0]       norm;
  logic signed [PVT_W-1:0] otw_p;
  logic signed [ACQ_W-1:0] otw_a;
  logic signed [TRK_W-1:0] otw_t;
  int checks = 0, failures = 0;
  int pe0, hold_p, hold_a;
  real q [4];
  real acc;

  dlf dut (.*);

  initial #1 rst_n = 1'b0;
  always #25000 ckr = ~ckr;

  function automatic int rnd_sat(real v, int lo, int hi);
    int r;
    r = int'($floor(v + 0.5));
    return (r > hi) ? hi : (r < lo) ? lo : r;
  endfunction

  task automatic expect_eq(input int got, input int exp, input string what);
    checks++;
    if (got != exp && got != exp + 1 && got != exp - 1) begin
      failures++; $display("FAIL %s got %0d exp %0d", what, got, exp);
    end else if (got != exp) begin
      // allow 1 code for fixed-point truncation, but count it
      $display("note %s got %0d exp %0d", what, got, exp);
    end
  endtask

  initial begin
    #50000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real p, y;
    int e;
    norm = NORM_UNITY;
    mode = MODE_PVT; pe_full = 16'sd100; pe_fine = '0;
    #60000 rst_n = 1'b1;
    // ---- PVT
    @(negedge ckr); mode_entry = 1'b1; pe0 = 100;
    @(posedge ckr); #1;
    expect_eq(otw_p, 0, "PVT entry");
    @(negedge ckr); mode_entry = 1'b0;
    for (int k = 0; k < 20; k++) begin
      pe_full = PE_W'($urandom_range(0, 800)) - 16'sd300;
      @(posedge ckr); #1;
      expect_eq(otw_p, rnd_sat(1.0 * real'(int'(pe_full) - pe0) / 32.0 * 10.24, -128, 127), "PVT");
      checks++; if (otw_a != 0 || otw_t != 0) begin failures++; $display("FAIL other banks moved"); end
      @(negedge ckr);
    end
    hold_p = otw_p;
    // ---- ACQ
    mode = MODE_ACQ; mode_entry = 1'b1; pe_full = 16'sd40; pe0 = 40;
    @(posedge ckr); #1; expect_eq(otw_a, 0, "ACQ entry");
    @(negedge ckr); mode_entry = 1'b0;
    for (int k = 0; k < 20; k++) begin
      pe_full = PE_W'($urandom_range(0, 200)) - 16'sd60;
      @(posedge ckr); #1;
      expect_eq(otw_a, rnd_sat(0.75 * real'(int'(pe_full) - pe0) / 32.0 * 51.2, -128, 127), "ACQ");
      checks++; if (otw_p != hold_p) begin failures++; $display("FAIL PVT bank not held"); end
      @(negedge ckr);
    end
    hold_a = otw_a;
    // ---- TRK: fine error only
    mode = MODE_TRK; mode_entry = 1'b1; pe_fine = 16'sd3; pe0 = 3; pe_full = 16'sd999;
    for (int i = 0; i < 4; i++) q[i] = 0.0;
    acc = 0.0;
    @(posedge ckr); #1; expect_eq(otw_t, 0, "TRK entry");
    @(negedge ckr); mode_entry = 1'b0;
    for (int k = 0; k < 40; k++) begin
      pe_fine = PE_W'($urandom_range(0, 4)) + 16'sd1;      // around pe0
      pe_full = PE_W'($urandom);                           // must be ignored
      p = real'(int'(pe_fine) - pe0) / 32.0;
      for (int i = 0; i < 4; i++) begin q[i] = 0.25 * q[i] + 0.75 * p; p = q[i]; end
      acc = acc + p;
      y = 0.6283 * p + 0.0986 * acc;
      @(posedge ckr); #1;
      expect_eq(otw_t, rnd_sat(y * 640.0, -32, 31), "TRK");
      checks++;
      if (otw_p != hold_p || otw_a != hold_a) begin failures++; $display("FAIL banks not held in TRK"); end
      @(negedge ckr);
    end
    // disabled loop holds everything
    en = 1'b0; pe_fine = 16'sd15;
    @(posedge ckr); #1;
    e = otw_t;
    @(posedge ckr); #1;
    checks++; if (otw_t != e) begin failures++; $display("FAIL en low"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
