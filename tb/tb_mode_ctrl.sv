// tb_mode_ctrl: checks the PVT -> ACQ -> TRK sequencing.
// Scenario 1: the phase error keeps changing by 10/32 UI per cycle (large
// frequency error) -> each acquisition mode must time out after 16 cycles.
// Scenario 2: the change drops to 2/32 UI (within the PVT threshold 4) and
// then to 1/32 UI (within the ACQ threshold 1) -> PVT must end after the
// second calm cycle, ACQ likewise. mode_entry must pulse on the first cycle
// of each mode and locked must follow TRK.
module tb_mode_ctrl;
  import adpll_pkg::*;
  timeunit 1ps; timeprecision 1fs;

  logic ckr = 1'b0, rst_n = 1'b1, en = 1'b0;
  logic signed [PE_W-1:0] pe_full;
  mode_t mode;
  logic mode_entry, locked;
  int checks = 0, failures = 0;
  int cyc, t_acq, t_trk, entries;

  mode_ctrl dut (.*);

  initial #1 rst_n = 1'b0;
  always #25000 ckr = ~ckr;

  task automatic run(input int step_pvt, input int step_acq);
    int pe;
    cyc = 0; t_acq = -1; t_trk = -1; entries = 0; pe = 0;
    rst_n = 1'b0; en = 1'b0; pe_full = '0;
    #60000 rst_n = 1'b1;
    @(negedge ckr); en = 1'b1;
    while (cyc < 60) begin
      if (mode_entry) entries++;
      pe += (mode == MODE_PVT) ? step_pvt : step_acq;
      pe_full = PE_W'(pe);
      @(posedge ckr); #1;
      cyc++;
      if (mode == MODE_ACQ && t_acq < 0) t_acq = cyc;
      if (mode == MODE_TRK && t_trk < 0) t_trk = cyc;
      checks++;
      if (locked != (mode == MODE_TRK)) begin failures++; $display("FAIL locked flag"); end
      @(negedge ckr);
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
    run(10, 10);
    checks += 3;
    if (t_acq != 16) begin failures++; $display("FAIL timeout PVT at %0d", t_acq); end
    if (t_trk != 32) begin failures++; $display("FAIL timeout ACQ at %0d", t_trk); end
    if (entries != 3) begin failures++; $display("FAIL entries %0d", entries); end
    run(2, 1);
    // PVT: entry cycle, dwell 1, dwell>=2 calm(1st), calm(2nd) -> switch
    checks += 3;
    if (t_acq != 4) begin failures++; $display("FAIL PVT lock at %0d", t_acq); end
    if (t_trk != 8) begin failures++; $display("FAIL ACQ lock at %0d", t_trk); end
    if (entries != 3) begin failures++; $display("FAIL entries %0d", entries); end
    run(2, 2);   // ACQ never calm: time-out
    checks++;
    if (t_trk != 4 + 16) begin failures++; $display("FAIL ACQ time-out at %0d", t_trk); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
