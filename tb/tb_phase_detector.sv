// tb_phase_detector -- drives R and V as square waves on a sampling clock
// and compares detector #1 and #2 with a reference model written in the
// testbench: a pump-up window opens at a falling edge of R and closes at the
// next falling edge of V, and vice versa; detector #2 follows the chip's
// truth table. Three cases: R leading (pump up), V leading (pump down) and
// coincident edges (lock, both outputs high). Also measures that the
// pump-up pulse width equals the phase lead.
`timescale 1ns / 1ps
module tb_phase_detector;
  import fdc_pkg::*;
  logic clk = 0, rst = 1, r = 1, v = 1;
  logic u1_n, d1_n, u2_n, d2_n;
  pd_state_e state;
  int checks = 0, failures = 0;
  int up_cycles, dn_cycles;

  phase_detector dut (.*);

  always #5 clk = !clk;

  initial begin
    #2ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference model of detector #1, same sampling as the chip model.
  logic r_q = 1, v_q = 1, m_up = 0, m_dn = 0;
  always @(posedge clk) begin
    if (rst) begin
      r_q <= 0; v_q <= 0; m_up <= 0; m_dn <= 0;
    end else begin
      logic rf, vf, nu, nd;
      rf = r_q && !r; vf = v_q && !v;
      nu = m_up || rf; nd = m_dn || vf;
      if (nu && nd) begin nu = 0; nd = 0; end
      m_up <= nu; m_dn <= nd; r_q <= r; v_q <= v;
    end
  end

  always @(negedge clk) if (!rst) begin
    checks++;
    if (u1_n !== !m_up || d1_n !== !m_dn || u2_n !== !(r && !v) || d2_n !== !(r && v)) begin
      failures++;
      if (failures < 10)
        $display("FAIL t=%0t r=%b v=%b u1=%b d1=%b u2=%b d2=%b model up=%b dn=%b",
                 $time, r, v, u1_n, d1_n, u2_n, d2_n, m_up, m_dn);
    end
    if (!u1_n) up_cycles++;
    if (!d1_n) dn_cycles++;
  end

  // Square waves of period 16 clocks; V delayed by 'lag' clocks (negative:
  // V leads).
  // Both start high after a reset, so the first falling edges come in the
  // intended order.
  task automatic run(input int lag, input int periods);
    int rd, vd;
    rd = lag < 0 ? -lag : 0;
    vd = lag > 0 ? lag : 0;
    @(posedge clk) #1;
    rst = 1; r = 1; v = 1;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int t = 0; t < periods * 16; t++) begin
      @(posedge clk) #1;
      r = (t < rd) ? 1'b1 : ((t - rd) % 16 < 8);
      v = (t < vd) ? 1'b1 : ((t - vd) % 16 < 8);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 0;
    // R leads by 3 clocks: pump up 3 clocks per period, never down.
    up_cycles = 0; dn_cycles = 0;
    run(3, 20);
    checks++;
    if (dn_cycles != 0 || up_cycles < 3 * 19 || up_cycles > 3 * 20 + 1) begin
      failures++; $display("FAIL lead: up=%0d dn=%0d", up_cycles, dn_cycles);
    end
    // V leads by 2 clocks: pump down.
    up_cycles = 0; dn_cycles = 0;
    run(-2, 20);
    checks++;
    if (dn_cycles < 2 * 19 || up_cycles > 3) begin
      failures++; $display("FAIL lag: up=%0d dn=%0d", up_cycles, dn_cycles);
    end
    // In phase: lock, both high after the transient.
    up_cycles = 0; dn_cycles = 0;
    run(0, 20);
    checks++;
    if (up_cycles != 0 || dn_cycles != 0) begin
      failures++; $display("FAIL lock: up=%0d dn=%0d", up_cycles, dn_cycles);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
