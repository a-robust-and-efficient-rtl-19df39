// pi_controller: proportional-integral gains of the loop filter.
//
//   y = alpha(mode) * u + rho * I,   I = I[t-1] + u   (tracking only)
//
// u and y are signed Q16.16 (UI and UI per reference cycle). The proportional
// gain steps down from mode to mode (PVT 1.0, ACQ 0.75, TRK 0.6283) so the
// loop bandwidth shrinks as the banks get finer; in PVT and ACQ the loop is
// type I (proportional only). In tracking the integral path (rho = 0.0986)
// is switched on, making the loop type II. clr empties the integrator.
// Zero latency: y is combinational from u and the integrator register.
// alpha = 0.6283 and rho = 0.0986 for the settled loop follow the design;
// the acquisition gains are this design's choice.
module pi_controller
  import adpll_pkg::*;
#(
  parameter int ALPHA_PVT = 65536,   // 1.0    in Q16
  parameter int ALPHA_ACQ = 49152,   // 0.75   in Q16
  parameter int ALPHA_TRK = 41176,   // 0.6283 in Q16
  parameter int RHO_TRK   = 6462     // 0.0986 in Q16
) (
  input  logic                    ckr,
  input  logic                    rst_n,
  input  logic                    en,
  input  mode_t                   mode,
  input  logic                    clr,
  input  logic signed [DLF_W-1:0] u,
  output logic signed [DLF_W-1:0] y
);
  timeunit 1ps; timeprecision 1fs;

  logic signed [DLF_W-1:0] integ, integ_nxt;
  logic signed [63:0]      p_term, i_term;
  int                      alpha;

  always_comb begin
    unique case (mode)
      MODE_PVT: alpha = ALPHA_PVT;
      MODE_ACQ: alpha = ALPHA_ACQ;
      default:  alpha = ALPHA_TRK;
    endcase
    integ_nxt = (mode == MODE_TRK) ? integ + u : '0;
    p_term    = 64'(u) * 64'(alpha);
    i_term    = 64'(integ_nxt) * 64'(RHO_TRK);
    y         = DLF_W'((p_term + i_term) >>> 16);
  end

  always_ff @(posedge ckr or negedge rst_n) begin
    if (!rst_n)      integ <= '0;
    else if (clr)    integ <= '0;
    else if (en)     integ <= integ_nxt;
  end
endmodule
