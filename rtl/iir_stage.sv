// iir_stage: one first-order IIR low-pass stage of the loop filter.
//
//   q[t] = (1 - phi) * q[t-1] + phi * p[t]  =  q[t-1] + phi * (p[t] - q[t-1])
//
// phi is a Q16 constant (65536 = 1.0). The output q is combinational from
// the input and the stored q[t-1], so the stage adds no clock of latency; the
// state register loads q at each CKR edge while en is high. With en low the
// stage passes its input through and holds its state at zero; clr also zeroes
// the state. Data are signed Q16.16.
module iir_stage
  import adpll_pkg::*;
#(
  parameter int PHI = 49152          // 0.75 in Q16
) (
  input  logic                    ckr,
  input  logic                    rst_n,
  input  logic                    en,
  input  logic                    clr,
  input  logic signed [DLF_W-1:0] p,
  output logic signed [DLF_W-1:0] q
);
  timeunit 1ps; timeprecision 1fs;

  logic signed [DLF_W-1:0] q_prev;
  logic signed [63:0]      prod;

  always_comb begin
    prod = 64'(p - q_prev) * 64'(PHI);
    q    = en ? q_prev + DLF_W'(prod >>> 16) : p;
  end

  always_ff @(posedge ckr or negedge rst_n) begin
    if (!rst_n)          q_prev <= '0;
    else if (clr || !en) q_prev <= '0;
    else                 q_prev <= q;
  end
endmodule
