// ref_retimer: generates the retimed reference clock CKR.
//
// The digital part of the loop runs on the reference re-clocked by the DCO
// output, so every loop register sees a clock edge that is synchronous to the
// DCO counter. The delayed reference fref_d is sampled by three DCO-clocked
// flip-flops s1..s3:
//   cap = s1 & ~s2  one-DCO-cycle strobe after the first DCO edge following
//                   the reference edge; the edge counter captures on it.
//   ckr = s3        rises one DCO cycle after the capture, so the captured
//                   count is stable at every CKR rising edge.
// CKR has the reference's period and duty cycle, shifted by 2-3 DCO periods.
// Re-timing the reference follows the design; the flop depth is this design's.
module ref_retimer (
  input  logic ckv,
  input  logic rst_n,
  input  logic fref_d,
  output logic cap,
  output logic ckr
);
  timeunit 1ps; timeprecision 1fs;

  logic s1, s2, s3;

  always_ff @(posedge ckv or negedge rst_n) begin
    if (!rst_n) begin
      s1 <= 1'b0;
      s2 <= 1'b0;
      s3 <= 1'b0;
    end else begin
      s1 <= fref_d;
      s2 <= s1;
      s3 <= s2;
    end
  end

  assign cap = s1 & ~s2;
  assign ckr = s3;
endmodule
