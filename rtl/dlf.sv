// dlf: digital loop filter with the three DCO tuning-word registers.
//
// Data path, evaluated at every CKR edge while en is high:
//   combiner  selects the error: full (counter + TDC) error during PVT and
//             ACQ, the fine TDC error alone in tracking, where the integer
//             part is switched off.
//   offset    on the first cycle of a mode (mode_entry) the current error is
//             stored as that mode's zero: u = err - offset. The new bank
//             starts at its centre code while the previous bank keeps its
//             last code, so each gear shift leaves the frequency in place.
//   IIR       4-stage spike filter, in the path only in tracking.
//   PI        alpha * u (+ rho * sum u in tracking).
//   normalise codes per UI/cycle for the active bank, round, saturate.
//   banks     the active bank register (otw_p, otw_a or otw_t) loads the code;
//             the others hold. All reset to 0, the 2.4 GHz centre.
// The tuning words change one CKR edge after the reference edge is measured;
// there is no further pipeline latency.
// Combiner, IIR, PI and normalisation follow the design. Using both the adder
// (acquisition) and the multiplexer (tracking) for the combiner, the offset
// capture and the order IIR -> PI -> normalisation are this design's reading.
module dlf
  import adpll_pkg::*;
(
  input  logic                    ckr,
  input  logic                    rst_n,
  input  logic                    en,
  input  mode_t                   mode,
  input  logic                    mode_entry,
  input  logic signed [PE_W-1:0]  pe_full,
  input  logic signed [PE_W-1:0]  pe_fine,
  input  logic [NORM_W-1:0]       norm,
  output logic signed [PVT_W-1:0] otw_p,
  output logic signed [ACQ_W-1:0] otw_a,
  output logic signed [TRK_W-1:0] otw_t
);
  timeunit 1ps; timeprecision 1fs;

  logic signed [PE_W-1:0]  pe_sel;
  logic signed [DLF_W-1:0] x, offset, u, v, y;
  logic signed [7:0]       code;
  logic                    trk, clr;

  assign trk    = (mode == MODE_TRK);
  assign clr    = mode_entry;
  assign pe_sel = trk ? pe_fine : pe_full;                 // combiner
  assign x      = DLF_W'(pe_sel) <<< (DLF_F - FRAC_W);     // Q.5 -> Q16.16
  assign u      = mode_entry ? '0 : x - offset;

  iir_filter4 u_iir (.ckr, .rst_n, .en(trk), .clr, .x(u), .y(v));
  pi_controller u_pi (.ckr, .rst_n, .en, .mode, .clr, .u(v), .y(y));
  dco_gain_norm u_norm (.mode, .norm, .y, .code);

  always_ff @(posedge ckr or negedge rst_n) begin
    if (!rst_n) begin
      offset <= '0;
      otw_p  <= '0;
      otw_a  <= '0;
      otw_t  <= '0;
    end else if (en) begin
      if (mode_entry) offset <= x;
      unique case (mode)
        MODE_PVT: otw_p <= code;
        MODE_ACQ: otw_a <= code;
        default:  otw_t <= TRK_W'(code);
      endcase
    end
  end
endmodule
