// adpll_pkg: types and fixed-point constants shared by the ADPLL blocks.
//
// Phases are measured in DCO unit intervals (UI, one 2.4 GHz period) with
// FRAC_W = 5 fractional bits, i.e. 1/32 UI = 13 ps, the fine time-to-digital
// converter resolution. The loop filter works in signed Q16.16 (DLF_W bits,
// DLF_F fractional). Gains are signed Q16 integers (1.0 = 65536).
// The bank widths (8/8/6 bits) and step sizes follow the DCO table of the
// design; the fixed-point formats are this design's own choice.
package adpll_pkg;
  timeunit 1ps; timeprecision 1fs;

  // Operating modes: coarse process/voltage/temperature centring, medium
  // acquisition (channel select), fine tracking.
  typedef enum logic [1:0] {
    MODE_PVT = 2'd0,
    MODE_ACQ = 2'd1,
    MODE_TRK = 2'd2
  } mode_t;

  localparam int FRAC_W = 5;      // fractional phase bits (1/32 UI)
  localparam int FCW_I  = 8;      // integer FCW bits
  localparam int FCW_W  = FCW_I + FRAC_W;
  localparam int PH_I   = 16;     // integer phase bits (wrap modulo 2^16)
  localparam int PH_W   = PH_I + FRAC_W;
  localparam int PE_W   = 16;     // signed phase error, Q10.5 UI
  localparam int DLF_W  = 32;     // loop filter word, signed Q16.16
  localparam int DLF_F  = 16;
  localparam int NORM_W = 18;     // gain correction, unsigned Q2.16

  localparam int PVT_W = 8;
  localparam int ACQ_W = 8;
  localparam int TRK_W = 6;
  localparam int BIAS_W = 22;

  localparam int TDC_TAPS   = 48; // delay line length (1.5 nominal periods)
  localparam int TDC_PER_UI = 32; // taps per nominal DCO period

  localparam logic [FCW_W-1:0] FCW_DEFAULT = FCW_W'(120 << FRAC_W);
  localparam logic [NORM_W-1:0] NORM_UNITY = NORM_W'(1 << 16);

  // Q16 gain constant from a real value, rounded.
  function automatic int q16(real v);
    return int'(v * 65536.0);
  endfunction
endpackage
