// dco_gain_norm: DCO gain normalisation, loop output to bank tuning code.
//
// The loop filter output y is a frequency correction in UI per reference
// cycle (1 UI/cycle = f_R = 20 MHz). A bank with step K Hz per code needs
// f_R / K codes per UI/cycle:
//   PVT: K = 500 MHz / 2^8 = 1.953 MHz  ->  10.24
//   ACQ: K = 100 MHz / 2^8 = 390.6 kHz  ->  51.2
//   TRK: K =   2 MHz / 2^6 = 31.25 kHz  ->  640
// The factor is further scaled by the input norm (Q2.16, 65536 = unity),
// which lets the normalisation be trimmed at run time. The result is rounded
// to the nearest code and saturated to the signed range of the active bank
// (8, 8 or 6 bits, two's complement around the 2.4 GHz centre).
// Combinational. Ranges and bank widths follow the design's DCO table; the
// rounding, saturation and the Q formats are this design's choices.
module dco_gain_norm
  import adpll_pkg::*;
#(
  parameter int unsigned F_REF_HZ = 20_000_000,
  parameter int unsigned K_PVT_HZ = 1_953_125,   // 500 MHz / 2^8
  parameter int unsigned K_ACQ_HZ = 390_625,     // 100 MHz / 2^8
  parameter int unsigned K_TRK_HZ = 31_250       //   2 MHz / 2^6
) (
  input  mode_t                   mode,
  input  logic [NORM_W-1:0]       norm,
  input  logic signed [DLF_W-1:0] y,
  output logic signed [7:0]       code
);
  timeunit 1ps; timeprecision 1fs;

  // f_R / K in Q16 (truncated): 671088, 3355443, 41943040
  localparam logic [31:0] G_PVT = 32'((64'(F_REF_HZ) << 16) / 64'(K_PVT_HZ));
  localparam logic [31:0] G_ACQ = 32'((64'(F_REF_HZ) << 16) / 64'(K_ACQ_HZ));
  localparam logic [31:0] G_TRK = 32'((64'(F_REF_HZ) << 16) / 64'(K_TRK_HZ));

  logic [31:0]        g;
  logic [49:0]        g_norm;
  logic signed [63:0] geff, prod, c, lo, hi;

  always_comb begin
    unique case (mode)
      MODE_PVT: begin g = G_PVT; lo = -(64'sd1 <<< (PVT_W - 1)); end
      MODE_ACQ: begin g = G_ACQ; lo = -(64'sd1 <<< (ACQ_W - 1)); end
      default:  begin g = G_TRK; lo = -(64'sd1 <<< (TRK_W - 1)); end
    endcase
    hi     = -lo - 64'sd1;
    g_norm = 50'(g) * 50'(norm);                              // Q32
    geff   = signed'(64'(g_norm >> 16));                      // Q16
    prod   = 64'(y) * geff;                                   // Q32
    c      = (prod + (64'sd1 <<< 31)) >>> 32;                 // round
    if (c > hi)      c = hi;
    else if (c < lo) c = lo;
    code = 8'(c);
  end
endmodule
