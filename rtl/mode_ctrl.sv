// mode_ctrl: gear-shift controller PVT -> ACQ -> TRK.
//
// The loop first centres the DCO with the coarse PVT bank, then acquires the
// channel with the ACQ bank (together, frequency acquisition) and finally
// tracks phase with the fine TRK bank. The per-cycle change of the full phase
// error, d = PE[t] - PE[t-1], is the residual frequency error in UI per
// reference cycle. A mode is left when |d| <= THR (in 1/32 UI) on two
// consecutive cycles after at least MIN_DWELL cycles in the mode, or after
// MAX_DWELL cycles at the latest. TRK is final until reset.
// Outputs: mode, mode_entry (high on the first enabled cycle of each mode,
// including the first PVT cycle after reset) and locked (in TRK).
// All registers on CKR; the decision made at edge t is the mode at edge t+1.
// The PVT -> ACQ -> TRK sequence follows the design; the switching rule and
// thresholds are this design's choice (about one bank step each).
module mode_ctrl
  import adpll_pkg::*;
#(
  parameter int THR_PVT   = 4,     // 0.125 UI/cycle = 2.5 MHz
  parameter int THR_ACQ   = 1,     // 1/32 UI/cycle  = 625 kHz
  parameter int MIN_DWELL = 2,
  parameter int MAX_DWELL = 16
) (
  input  logic                   ckr,
  input  logic                   rst_n,
  input  logic                   en,
  input  logic signed [PE_W-1:0] pe_full,
  output mode_t                  mode,
  output logic                   mode_entry,
  output logic                   locked
);
  timeunit 1ps; timeprecision 1fs;

  logic signed [PE_W-1:0] pe_prev, d, mag;
  logic [4:0]             dwell;
  logic [1:0]             calm;
  logic                   in_band, advance;
  int                     thr;

  always_comb begin
    d       = pe_full - pe_prev;
    mag     = (d < 0) ? -d : d;
    thr     = (mode == MODE_PVT) ? THR_PVT : THR_ACQ;
    in_band  = !mode_entry && (int'(mag) <= thr) && (int'(dwell) >= MIN_DWELL);
    advance = (mode != MODE_TRK) &&
              ((in_band && calm >= 2'd1) || int'(dwell) >= MAX_DWELL - 1);
  end

  always_ff @(posedge ckr or negedge rst_n) begin
    if (!rst_n) begin
      mode       <= MODE_PVT;
      mode_entry <= 1'b1;
      pe_prev    <= '0;
      dwell      <= '0;
      calm       <= '0;
    end else if (en) begin
      pe_prev    <= pe_full;
      mode_entry <= 1'b0;
      if (advance) begin
        mode       <= (mode == MODE_PVT) ? MODE_ACQ : MODE_TRK;
        mode_entry <= 1'b1;
        dwell      <= '0;
        calm       <= '0;
      end else begin
        if (mode != MODE_TRK && dwell != 5'h1f) dwell <= dwell + 1'b1;
        calm <= in_band ? ((calm == 2'd3) ? calm : calm + 1'b1) : 2'd0;
      end
    end
  end

  assign locked = (mode == MODE_TRK);
endmodule
