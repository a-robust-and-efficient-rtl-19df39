// phase_detector: digital phase error of the ADPLL.
//
// Phase error PE = reference phase - variable phase, in DCO unit intervals:
//   reference phase = phase_r (sum of FCW) + dtc_code (the delay the DTC added
//                     to this reference edge, which shifts the ideal phase)
//   variable phase  = cnt_cap (integer DCO edge count) + eps (TDC fraction)
// Positive PE means the DCO lags and must speed up.
//
// Two results:
//   pe_full  integer + fractional error, signed Q10.5 (valid for |PE| < 1024).
//   pe_fine  fractional error only, wrapped to [-0.5, 0.5) UI, signed Q10.5.
// When int_en is low (tracking), the integer operands are forced to zero
// (operand isolation), so the integer subtractor stops switching, and pe_full
// equals pe_fine. Purely combinational; it is read at the CKR edge.
// The error equation follows the design; formats and isolation are this
// design's choices.
module phase_detector
  import adpll_pkg::*;
(
  input  logic                    int_en,
  input  logic [PH_W-1:0]         phase_r,
  input  logic [FRAC_W-1:0]       dtc_code,
  input  logic [PH_I-1:0]         cnt_cap,
  input  logic [FRAC_W-1:0]       eps,
  output logic signed [PE_W-1:0]  pe_full,
  output logic signed [PE_W-1:0]  pe_fine
);
  timeunit 1ps; timeprecision 1fs;

  logic [PH_W-1:0]   ref_ph;
  logic [PH_W-1:0]   ref_iso, var_iso, diff;
  logic [FRAC_W-1:0] fine;

  always_comb begin
    ref_ph  = phase_r + PH_W'(dtc_code);
    // fraction: modulo 1 UI, read as signed 5 bits => [-16, 15] / 32 UI
    fine    = ref_ph[FRAC_W-1:0] - eps;
    pe_fine = PE_W'(signed'(fine));
    ref_iso = int_en ? ref_ph : {{PH_I{1'b0}}, ref_ph[FRAC_W-1:0]};
    var_iso = int_en ? {cnt_cap, eps} : {{PH_I{1'b0}}, eps};
    diff    = ref_iso - var_iso;
    pe_full = int_en ? signed'(diff[PE_W-1:0]) : pe_fine;
  end
endmodule
