// dco_model: behavioural model of the LC digitally controlled oscillator.
//
// Behavioural model (not synthesizable logic): the real part is an LC tank
// kept oscillating by a negative-resistance pair, tuned by three banks of
// binary-weighted switched varactors. Here the output frequency is linear in
// the signed (two's complement) bank codes around the centre:
//   f = F_C_HZ + F_OFF_HZ + p * 500 MHz/2^8 + a * 100 MHz/2^8 + t * 2 MHz/2^6
// giving 2.15-2.65 GHz (PVT), +-50 MHz (ACQ) and +-1 MHz (TRK) as in the
// design's DCO table. F_OFF_HZ stands for the process/voltage/temperature
// error of the natural frequency that the PVT bank must remove.
// bias is the 22-bit tank bias current control; the model oscillates while
// it is non-zero and stops (output low) when it is zero. Its effect on phase
// noise is not modelled. Codes are read every half period.
module dco_model
  import adpll_pkg::*;
#(
  parameter real F_C_HZ   = 2.4e9,
  parameter real F_OFF_HZ = 0.0
) (
  input  logic signed [PVT_W-1:0] otw_p,
  input  logic signed [ACQ_W-1:0] otw_a,
  input  logic signed [TRK_W-1:0] otw_t,
  input  logic [BIAS_W-1:0]       bias,
  output logic                    ckv
);
  timeunit 1ps; timeprecision 1fs;

  localparam real K_PVT = 500.0e6 / 256.0;
  localparam real K_ACQ = 100.0e6 / 256.0;
  localparam real K_TRK = 2.0e6 / 64.0;

  real f_hz;

  always_comb
    f_hz = F_C_HZ + F_OFF_HZ + real'(otw_p) * K_PVT + real'(otw_a) * K_ACQ
         + real'(otw_t) * K_TRK;

  // Edge times are accumulated in real arithmetic so the rounding of each
  // delay to the time precision does not build up into a frequency error.
  realtime t_next;

  initial begin
    ckv = 1'b0;
    t_next = 0.0;
    forever begin
      if (bias == '0) begin
        ckv = 1'b0;
        @(bias);
        t_next = $realtime;
      end else begin
        t_next = t_next + 0.5e12 / f_hz;
        #(t_next - $realtime) ckv = ~ckv;
      end
    end
  end
endmodule
