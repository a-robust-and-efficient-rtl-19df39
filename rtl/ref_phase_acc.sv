// ref_phase_acc: reference phase accumulator of the ADPLL.
//
// The ideal (reference) phase is the running sum of the frequency command
// word FCW, one addition per retimed reference cycle: FRef_phi[k] = sum FCW.
// FCW is unsigned Q8.5 (FCW = 120 selects 2.4 GHz from 20 MHz). The phase is
// kept modulo 2^PH_I UI with FRAC_W fractional bits; only its difference to
// the DCO phase matters.
//
// Phase restart: on the first CKR edge after reset the accumulator is loaded
// with the captured DCO edge count (restart_int) so the loop starts with a
// phase error near zero, instead of assuming aligned edges at time zero.
// Timing: phase_r is the reference phase belonging to the reference edge that
// the current CKR cycle processes (valid once started is high); phase_next is one FCW later and feeds the
// phase predictor, which must set the DTC before the next reference edge.
// The accumulation follows the design; the restart rule is this design's own.
module ref_phase_acc
  import adpll_pkg::*;
(
  input  logic             ckr,
  input  logic             rst_n,
  input  logic [FCW_W-1:0] fcw,
  input  logic [PH_I-1:0]  restart_int,
  output logic [PH_W-1:0]  phase_r,
  output logic [PH_W-1:0]  phase_next,
  output logic             started
);
  timeunit 1ps; timeprecision 1fs;

  // value phase_r takes at the next CKR edge
  assign phase_next = started ? phase_r + PH_W'(fcw)
                              : {restart_int, {FRAC_W{1'b0}}} + PH_W'(fcw);

  always_ff @(posedge ckr or negedge rst_n) begin
    if (!rst_n) begin
      phase_r <= '0;
      started <= 1'b0;
    end else begin
      phase_r <= phase_next;
      started <= 1'b1;
    end
  end
endmodule
