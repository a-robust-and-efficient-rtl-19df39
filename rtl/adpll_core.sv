// adpll_core: synthesizable digital part of the ADPLL.
//
// Everything of the loop except the three analog parts (reference DTC, TDC
// delay line, DCO), which connect through the ports:
//   in:  ckv (DCO clock), fref_d (reference after the DTC), taps (sampled
//        TDC delay line), fcw, norm
//   out: dtc_code (delay for the next reference edge), otw_p/otw_a/otw_t
//        (DCO bank codes), mode, locked, pe_full
// Two clock domains: ckv (retimer flops and edge counter, 2.4 GHz) and the
// retimed reference CKR generated here (20 MHz; phase accumulator, phase
// predictor, mode controller, loop filter). The count crosses from ckv to
// CKR one DCO period before the CKR edge that reads it; the TDC taps are
// sampled at fref_d, two or more DCO periods before that edge.
// The first CKR edge after reset restarts the reference phase; the loop
// filter and mode controller act from the second.
module adpll_core
  import adpll_pkg::*;
(
  input  logic                    ckv,
  input  logic                    rst_n,
  input  logic                    fref_d,
  input  logic [TDC_TAPS-1:0]     taps,
  input  logic [FCW_W-1:0]        fcw,
  input  logic [NORM_W-1:0]       norm,
  output logic [FRAC_W-1:0]       dtc_code,
  output mode_t                   mode,
  output logic                    locked,
  output logic signed [PE_W-1:0]  pe_full,
  output logic signed [PVT_W-1:0] otw_p,
  output logic signed [ACQ_W-1:0] otw_a,
  output logic signed [TRK_W-1:0] otw_t
);
  timeunit 1ps; timeprecision 1fs;

  logic                   ckr, cap, started, mode_entry;
  logic [FRAC_W-1:0]      eps;
  logic [PH_I-1:0]        cnt_cap;
  logic [PH_W-1:0]        phase_r, phase_next;
  logic signed [PE_W-1:0] pe_fine;

  ref_retimer     u_rtm  (.ckv, .rst_n, .fref_d, .cap, .ckr);
  ckv_counter     u_cnt  (.ckv, .rst_n, .cap, .cnt_cap);
  tdc_encoder     u_tenc (.taps, .eps);
  ref_phase_acc   u_acc  (.ckr, .rst_n, .fcw, .restart_int(cnt_cap),
                          .phase_r, .phase_next, .started);
  phase_predictor u_pred (.ckr, .rst_n, .phase_next_frac(phase_next[FRAC_W-1:0]),
                          .dtc_code);
  phase_detector  u_pd   (.int_en(mode != MODE_TRK), .phase_r, .dtc_code, .cnt_cap,
                          .eps, .pe_full, .pe_fine);
  mode_ctrl       u_mode (.ckr, .rst_n, .en(started), .pe_full, .mode, .mode_entry,
                          .locked);
  dlf             u_dlf  (.ckr, .rst_n, .en(started), .mode, .mode_entry, .pe_full,
                          .pe_fine, .norm, .otw_p, .otw_a, .otw_t);
endmodule
