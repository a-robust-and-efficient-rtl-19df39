// tb_ref_retimer: checks the retimed reference clock and capture strobe.
// ckv runs at 2.4 GHz; fref_d rises at random offsets inside a DCO period.
// Expected: cap is high for exactly one DCO cycle, starting at the first DCO
// edge after the reference edge (+1 edge for the registered strobe), and ckr
// rises two DCO edges after the first sampling edge, once per reference edge.
module tb_ref_retimer;
  timeunit 1ps; timeprecision 1fs;

  logic ckv = 1'b0, rst_n = 1'b1, fref_d = 1'b0;
  initial #1 rst_n = 1'b0;   // asynchronous reset pulse at start
  logic cap, ckr;
  int checks = 0, failures = 0;
  int ncap, nckr, edge_no, cap_edge, ckr_edge, ref_edge;

  ref_retimer dut (.*);

  always #(1.0e12 / 2.4e9 / 2.0) ckv = ~ckv;

  // count DCO edges; record on which edge cap/ckr are seen high/rising
  logic ckr_q;
  always @(posedge ckv) begin
    edge_no++;
    #1;
    if (cap) begin ncap++; cap_edge = edge_no; end
    if (ckr && !ckr_q) begin nckr++; ckr_edge = edge_no; end
    ckr_q = ckr;
  end

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ckr_q = 1'b0;
    #3000 rst_n = 1'b1;
    for (int k = 0; k < 40; k++) begin
      ncap = 0; nckr = 0;
      #(10000.0 + real'($urandom_range(0, 4166)) / 10.0);
      fref_d = 1'b1;
      ref_edge = edge_no;             // edges before the reference edge
      #25000;
      fref_d = 1'b0;
      #15000;
      checks += 3;
      if (ncap != 1) begin failures++; $display("FAIL cap cycles %0d", ncap); end
      if (nckr != 1) begin failures++; $display("FAIL ckr edges %0d", nckr); end
      // first sampling edge = ref_edge+1 sets s1; cap is seen high at that edge
      if (cap_edge != ref_edge + 1 || ckr_edge != ref_edge + 3) begin
        failures++;
        $display("FAIL timing ref=%0d cap=%0d ckr=%0d", ref_edge, cap_edge, ckr_edge);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
