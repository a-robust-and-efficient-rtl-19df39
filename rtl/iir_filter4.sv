// iir_filter4: four cascaded first-order IIR stages (4th-order low-pass).
//
// Stage i computes q_i[t] = (1 - phi_i) q_i[t-1] + phi_i p_i[t], with
// p_1 = x and p_{i+1} = q_i; y = q_4. The cascade attenuates short phase
// error spikes (for example a single-event transient on the reference) before
// they reach the PI controller. Zero latency (each stage is combinational
// from its stored state); state updates on CKR. With en low the filter is
// bypassed (y = x) and its state cleared; clr clears the state.
// The cascade and its equation follow the design. The coefficient values are
// not given there; 0.75 for every stage is this design's choice, picked so the
// tracking loop with alpha = 0.6283, rho = 0.0986 settles without ringing.
module iir_filter4
  import adpll_pkg::*;
#(
  parameter int PHI1 = 49152,        // Q16, 0.75
  parameter int PHI2 = 49152,
  parameter int PHI3 = 49152,
  parameter int PHI4 = 49152
) (
  input  logic                    ckr,
  input  logic                    rst_n,
  input  logic                    en,
  input  logic                    clr,
  input  logic signed [DLF_W-1:0] x,
  output logic signed [DLF_W-1:0] y
);
  timeunit 1ps; timeprecision 1fs;

  logic signed [DLF_W-1:0] q1, q2, q3;

  iir_stage #(.PHI(PHI1)) u_s1 (.ckr, .rst_n, .en, .clr, .p(x),  .q(q1));
  iir_stage #(.PHI(PHI2)) u_s2 (.ckr, .rst_n, .en, .clr, .p(q1), .q(q2));
  iir_stage #(.PHI(PHI3)) u_s3 (.ckr, .rst_n, .en, .clr, .p(q2), .q(q3));
  iir_stage #(.PHI(PHI4)) u_s4 (.ckr, .rst_n, .en, .clr, .p(q3), .q(y));
endmodule
