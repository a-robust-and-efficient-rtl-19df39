// adpll_top: radiation-hardened all-digital PLL frequency synthesiser.
//
// Closed loop from a 20 MHz reference to a 2.4 GHz DCO clock (FCW = 120):
//   fref -> dtc_model (delay predicted from FCW) -> fref_d
//   fref_d sampled by ckv in ref_retimer -> CKR (loop clock) + capture strobe
//   ckv_counter (integer DCO phase) and tdc_delay_line/tdc_encoder (fraction)
//   ref_phase_acc (sum of FCW) and phase_predictor (next DTC code)
//   phase_detector -> mode_ctrl (PVT/ACQ/TRK) and dlf (combiner, IIR, PI,
//   normalisation, bank registers) -> dco_model banks p/a/t -> ckv
// The synthesizable loop is adpll_core; this module adds the three analog
// parts as behavioural models and closes the loop.
// Nothing in the loop runs before the first CKR edge after reset; the first
// CKR cycle only restarts the reference phase, the loop acts from the second.
// Tuning words change once per reference cycle, 2-3 DCO periods after the
// reference edge. The DTC, TDC delay line and DCO are behavioural models of
// analog parts; everything else is synthesizable. F_OFF_HZ offsets the DCO's
// natural frequency for testing.
module adpll_top
  import adpll_pkg::*;
#(
  parameter real F_OFF_HZ = 0.0
) (
  input  logic                    fref,
  input  logic                    rst_n,
  input  logic [FCW_W-1:0]        fcw,
  input  logic [NORM_W-1:0]       norm,
  input  logic [BIAS_W-1:0]       bias,
  output logic                    ckv,
  output mode_t                   mode,
  output logic                    locked,
  output logic signed [PE_W-1:0]  pe_full,
  output logic signed [PVT_W-1:0] otw_p,
  output logic signed [ACQ_W-1:0] otw_a,
  output logic signed [TRK_W-1:0] otw_t
);
  timeunit 1ps; timeprecision 1fs;

  logic                fref_d;
  logic [FRAC_W-1:0]   dtc_code;
  logic [TDC_TAPS-1:0] taps;

  dtc_model      u_dtc  (.fref, .code(dtc_code), .fref_d);
  tdc_delay_line u_tdl  (.ckv, .fref_d, .taps);
  adpll_core     u_core (.ckv, .rst_n, .fref_d, .taps, .fcw, .norm, .dtc_code, .mode,
                         .locked, .pe_full, .otw_p, .otw_a, .otw_t);
  dco_model #(.F_OFF_HZ(F_OFF_HZ)) u_dco (.otw_p, .otw_a, .otw_t, .bias, .ckv);
endmodule
