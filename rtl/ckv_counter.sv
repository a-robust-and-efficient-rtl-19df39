// ckv_counter: DCO edge counter, the integer part of the variable phase.
//
// Counts every rising edge of the DCO clock ckv modulo 2^PH_I and, on the
// DCO edge where the retimer's strobe cap is high, copies the count into
// cnt_cap. cnt_cap then equals the number of DCO edges up to and including
// the first DCO edge after the reference edge (plus the count at reset), and
// stays constant for a whole reference cycle, so the CKR domain reads it
// safely. The counter follows the design; its width is this design's choice.
module ckv_counter
  import adpll_pkg::*;
(
  input  logic            ckv,
  input  logic            rst_n,
  input  logic            cap,
  output logic [PH_I-1:0] cnt_cap
);
  timeunit 1ps; timeprecision 1fs;

  logic [PH_I-1:0] cnt;

  always_ff @(posedge ckv or negedge rst_n) begin
    if (!rst_n) begin
      cnt     <= '0;
      cnt_cap <= '0;
    end else begin
      cnt <= cnt + 1'b1;
      if (cap) cnt_cap <= cnt;
    end
  end
endmodule
