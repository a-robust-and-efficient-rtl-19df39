// tb_phase_detector: checks PE = (phase_r + dtc) - (cnt_cap + eps/32).
// Random operands are built from a chosen true error so the expected value is
// known without re-deriving the block's arithmetic: pe_full must equal the
// chosen error (Q.5) while int_en is high, pe_fine its fraction wrapped to
// [-0.5, 0.5), and with int_en low pe_full must equal pe_fine.
module tb_phase_detector;
  import adpll_pkg::*;
  timeunit 1ps; timeprecision 1fs;

  logic                   int_en;
  logic [PH_W-1:0]        phase_r;
  logic [FRAC_W-1:0]      dtc_code, eps;
  logic [PH_I-1:0]        cnt_cap;
  logic signed [PE_W-1:0] pe_full, pe_fine;
  int checks = 0, failures = 0;

  phase_detector dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int err, var_ph, ref_ph, fine_exp, dtc;
    for (int k = 0; k < 3000; k++) begin
      // error in 1/32 UI, mostly small, sometimes large
      err    = (k % 4 == 0) ? $urandom_range(0, 60000) - 30000 : $urandom_range(0, 400) - 200;
      var_ph = $urandom;                           // count and eps, 21 bits used
      var_ph = var_ph & ((1 << PH_W) - 1);
      ref_ph = (var_ph + err) & ((1 << PH_W) - 1);
      dtc    = $urandom_range(0, 31);
      {cnt_cap, eps} = PH_W'(var_ph);
      phase_r  = PH_W'(ref_ph - dtc);
      dtc_code = FRAC_W'(dtc);
      fine_exp = ((err % 32) + 32) % 32;
      if (fine_exp >= 16) fine_exp -= 32;
      int_en = 1'b1;
      #1;
      checks += 2;
      if (int'(pe_full) != err) begin failures++; $display("FAIL full %0d exp %0d", pe_full, err); end
      if (int'(pe_fine) != fine_exp) begin failures++; $display("FAIL fine %0d exp %0d", pe_fine, fine_exp); end
      int_en = 1'b0;
      #1;
      checks++;
      if (int'(pe_full) != fine_exp) begin failures++; $display("FAIL isolated %0d exp %0d", pe_full, fine_exp); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
