// tb_pll_vco -- checks the behavioural charge pump / loop filter / VCO
// model. The expected frequencies are worked out from the component
// values: with no pump the VCO holds 8 MHz; 10 us of pump-up charges the
// integrator by 0.75 V * 10 us / (R1 C) = 0.417 V, i.e. +0.833 MHz with
// KV = 2 MHz/V, and while pumping the proportional path R2/R1 adds
// 0.342 V (+0.683 MHz); 10 us of pump-down brings it back to 8 MHz; a long
// pump-up stops at the 9 MHz end of the swing. Frequencies are measured by
// counting output edges over 20 us.
`timescale 1ns / 1ps
module tb_pll_vco;
  logic pu_n = 1, pd_n = 1, vco_out;
  real  freq_hz;
  int checks = 0, failures = 0;

  pll_vco dut (.*);

  initial begin
    #5ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int edges;
  always @(posedge vco_out) edges++;

  task automatic measure(input real exp_mhz, input real tol_mhz, input string what);
    real f;
    edges = 0;
    #20us;
    f = real'(edges) / 20.0;
    checks++;
    if (f < exp_mhz - tol_mhz || f > exp_mhz + tol_mhz) begin
      failures++;
      $display("FAIL %s: %f MHz, expected %f", what, f, exp_mhz);
    end else
      $display("%s: %f MHz", what, f);
  endtask

  initial begin
    measure(8.0, 0.06, "free running");
    pu_n = 0;
    #10us;
    // During pump up: integrator 0.417 V plus proportional 0.342 V, rising.
    measure(9.0, 0.06, "pumping up (clamped)");
    pu_n = 1;
    #1us;
    // 30 us of pump-up in total reached the clamp; the integrator holds
    // 0.75 * 30 us / 18 us = 1.25 V -> clamp at 9 MHz.
    measure(9.0, 0.06, "after long pump up");
    pd_n = 0;
    #(1.25 * 18.0 * 1000.0 / 0.75 * 1ns);   // discharge exactly to 0 V
    pd_n = 1;
    measure(8.0, 0.06, "after equal pump down");
    pu_n = 0;
    #10us;
    pu_n = 1;
    measure(8.0 + 2.0 * 0.75 * 10.0 / 18.0, 0.06, "after 10 us pump up");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
