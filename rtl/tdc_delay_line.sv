// tdc_delay_line: behavioural model of the time-to-digital converter's
// delay line and sampling flip-flops.
//
// Behavioural model (not synthesizable logic): in silicon this is a chain of
// delay cells on the DCO clock whose taps are sampled by the reference edge.
// At each rising edge of the delayed reference fref_d, taps[j] is set to the
// level the DCO clock had at time t_ref - j*TAU_PS, j = 0..TAPS-1. The model
// keeps the times of the last few DCO edges to reconstruct those levels.
// TAU_PS defaults to the nominal DCO period / 32 = 13 ps. The outputs change
// only at reference edges and hold in between.
module tdc_delay_line
  import adpll_pkg::*;
#(
  parameter int  TAPS   = TDC_TAPS,
  parameter real TAU_PS = 1.0e12 / 2.4e9 / 32.0
) (
  input  logic            ckv,
  input  logic            fref_d,
  output logic [TAPS-1:0] taps
);
  timeunit 1ps; timeprecision 1fs;

  localparam int HIST = 8;

  realtime edge_t [HIST];   // most recent DCO edge first
  logic    edge_v [HIST];   // level after that edge

  initial begin
    taps = '0;
    for (int i = 0; i < HIST; i++) begin
      edge_t[i] = 0.0;
      edge_v[i] = 1'b0;
    end
  end

  always @(ckv) begin
    for (int i = HIST - 1; i > 0; i--) begin
      edge_t[i] = edge_t[i-1];
      edge_v[i] = edge_v[i-1];
    end
    edge_t[0] = $realtime;
    edge_v[0] = ckv;
  end

  always @(posedge fref_d) begin
    realtime now, s;
    now = $realtime;
    for (int j = 0; j < TAPS; j++) begin
      s = now - real'(j) * TAU_PS;
      taps[j] = 1'b0;
      for (int i = HIST - 1; i >= 0; i--) begin
        if (edge_t[i] <= s) taps[j] = edge_v[i];
      end
    end
  end
endmodule
