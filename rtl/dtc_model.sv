// dtc_model: behavioural model of the reference digital-to-time converter.
//
// Behavioural model (not synthesizable logic): the DTC is a delay circuit.
// It delays the reference clock by code * T_NOM_PS / 32, an ideal converter
// normalised to the nominal 2.4 GHz DCO period. The code is read at each
// reference edge, so it may change between edges. Delay-line circuit and
// calibration are not modelled.
module dtc_model
  import adpll_pkg::*;
#(
  parameter real T_NOM_PS = 1.0e12 / 2.4e9
) (
  input  logic              fref,
  input  logic [FRAC_W-1:0] code,
  output logic              fref_d
);
  timeunit 1ps; timeprecision 1fs;

  real dly;

  initial fref_d = 1'b0;

  // transport delay: each edge is scheduled independently
  always @(posedge fref) begin
    dly = real'(code) * T_NOM_PS / real'(1 << FRAC_W);
    fork
      begin
        #(dly);
        fref_d = 1'b1;
      end
    join_none
  end
  always @(negedge fref) begin
    fork
      begin
        #(dly);
        fref_d = 1'b0;
      end
    join_none
  end
endmodule
