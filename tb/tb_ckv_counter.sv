// tb_ckv_counter: checks the DCO edge counter.
// The testbench counts DCO edges itself and pulses cap for one DCO cycle at
// random times; cnt_cap must equal the count of edges before the capturing
// edge and must hold between captures, including across the 16-bit wrap.
module tb_ckv_counter;
  import adpll_pkg::*;
  timeunit 1ps; timeprecision 1fs;

  logic ckv = 1'b0, rst_n = 1'b1, cap = 1'b0;
  initial #1 rst_n = 1'b0;   // asynchronous reset pulse at start
  logic [PH_I-1:0] cnt_cap;
  int checks = 0, failures = 0;
  int unsigned edges = 0, expect_cap = 0;

  ckv_counter dut (.*);

  always #208 ckv = ~ckv;

  always @(posedge ckv) if (rst_n) begin
    if (cap) expect_cap = edges;      // value before this edge's increment
    edges++;
  end

  initial begin
    #400000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000 rst_n = 1'b1;
    for (int k = 0; k < 700; k++) begin
      repeat ($urandom_range(3, 200)) @(negedge ckv);
      cap = 1'b1;
      @(negedge ckv);
      cap = 1'b0;
      @(negedge ckv);
      checks++;
      if (cnt_cap != PH_I'(expect_cap)) begin
        failures++; $display("FAIL cap %0d exp %0d", cnt_cap, PH_I'(expect_cap));
      end
    end
    $display("edges counted %0d", edges);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
