// phase_predictor: FCW-based phase prediction for the reference DTC.
//
// Because the reference phase is the running sum of FCW, the position of the
// next reference edge inside a DCO period is known in advance: it is the
// fractional part f of the next reference phase. The reference edge is
// delayed by a digital-to-time converter (DTC) so that it lands at a fixed
// point of the DCO period; the time-to-digital converter then only resolves
// jitter and loop error instead of a whole period.
//
// At each CKR edge the code for the next reference edge is registered:
//   dtc_code = (0.5 - f) mod 1, in 1/32 UI.
// The delayed edge thus sits half a DCO period after a DCO rising edge when
// locked, away from the DCO edges that the counter capture would race with.
// The register is in the CKR domain, which follows the reference edge by 2-3
// DCO periods, so the code is stable long before the next reference edge.
// Reset value: half a UI (f = 0). Predicting the delay from FCW follows the
// design; the half-UI target is this design's own choice.
module phase_predictor
  import adpll_pkg::*;
(
  input  logic              ckr,
  input  logic              rst_n,
  input  logic [FRAC_W-1:0] phase_next_frac,
  output logic [FRAC_W-1:0] dtc_code
);
  timeunit 1ps; timeprecision 1fs;

  localparam logic [FRAC_W-1:0] HALF_UI = FRAC_W'(1 << (FRAC_W - 1));

  always_ff @(posedge ckr or negedge rst_n) begin
    if (!rst_n) dtc_code <= HALF_UI;
    else        dtc_code <= HALF_UI - phase_next_frac;  // modulo 2^FRAC_W
  end
endmodule
