// tdc_encoder: converts the sampled TDC delay line into a phase fraction.
//
// taps[j] is the DCO clock level j delay cells before the reference edge.
// The most recent DCO rising edge lies between taps j+1 (low) and j (high)
// for the smallest such j; the time since that edge is j cells. With
// TDC_PER_UI = 32 cells per nominal DCO period, j is directly the fractional
// variable phase eps in 1/32 UI. If no rising edge is found within the first
// 32 cells (DCO slower than nominal) eps saturates at 31. Normalisation to
// the nominal period rather than a measured one is this design's choice.
// Purely combinational.
module tdc_encoder
  import adpll_pkg::*;
#(
  parameter int TAPS = TDC_TAPS
) (
  input  logic [TAPS-1:0]   taps,
  output logic [FRAC_W-1:0] eps
);
  timeunit 1ps; timeprecision 1fs;

  localparam int MAXC = (1 << FRAC_W) - 1;

  logic found;

  always_comb begin
    eps   = FRAC_W'(MAXC);
    found = 1'b0;
    for (int j = 0; j < TAPS - 1; j++) begin
      if (!found && taps[j] && !taps[j+1]) begin
        found = 1'b1;
        eps   = (j > MAXC) ? FRAC_W'(MAXC) : FRAC_W'(j);
      end
    end
  end
endmodule
