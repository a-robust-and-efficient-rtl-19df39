// tb_pi_controller: checks the PI gains against a real-valued model.
// PVT: y = 1.0 u; ACQ: y = 0.75 u; TRK: y = 0.6283 u + 0.0986 * sum(u)
// including the current sample; clr empties the sum; outside TRK the sum is
// not kept. Tolerance 2 LSB of Q16.16 (gain quantisation and truncation).
module tb_pi_controller;
  import adpll_pkg::*;
  timeunit 1ps; timeprecision 1fs;

  logic ckr = 1'b0, rst_n = 1'b1, en = 1'b1, clr = 1'b0;
  initial #1 rst_n = 1'b0;   // asynchronous reset pulse at start
  mode_t mode;
  logic signed [DLF_W-1:0] u, y;
  int checks = 0, failures = 0;
  real acc, ym, tol;

  pi_controller dut (.*);

  always #25000 ckr = ~ckr;

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mode = MODE_PVT; u = '0; acc = 0.0;
    #60000 rst_n = 1'b1;
    for (int k = 0; k < 150; k++) begin
      @(negedge ckr);
      if (k == 40) mode = MODE_ACQ;
      if (k == 80) mode = MODE_TRK;
      clr = (k == 120);
      u = DLF_W'($urandom_range(0, 200000)) - 32'sd100000;
      #1;
      case (mode)
        MODE_PVT: ym = real'(u);
        MODE_ACQ: ym = 0.75 * real'(u);
        default: begin
          acc = acc + real'(u);
          ym = 0.6283 * real'(u) + 0.0986 * acc;
        end
      endcase
      tol = 2.0 + 1.0e-4 * (acc < 0 ? -acc : acc) + 1.0e-4 * (u < 0 ? -real'(u) : real'(u));
      checks++;
      if ((real'(y) - ym) > tol || (real'(y) - ym) < -tol) begin
        failures++; $display("FAIL k=%0d mode=%0d y=%0d model=%f", k, mode, y, ym);
      end
      if (clr) acc = 0.0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
