// tb_pll_capture -- capture time of the read PLL after a step in data rate.
//
// The whole subsystem (fdc_top, default parameters) receives a continuous
// FM preamble of 00 bytes -- clock pulses only, one every 4 us at nominal
// rate, the pattern that precedes every address mark. The data rate is
// stepped: nominal, +3 %, -3 %, +5 %, nominal. After each step the test
// measures the VCO frequency on the vco_clk pin, averaged over 16 periods
// (one half bit cell), and finds the capture time: the moment after which
// the frequency stays within 1 % of sixteen times the new pulse rate. The
// design goal is capture within six byte times (6 x 32 us = 192 us). The
// test also checks that once captured, RDT reads the preamble correctly:
// every clock window full and every data window empty.
`timescale 1ns / 1ps
module tb_pll_capture;
  logic        rst = 1, timing_clk = 0, phi2 = 0;
  logic [15:0] addr = 16'h8000;
  logic        vma = 0, rw = 1;
  logic [7:0]  cpu_wdata = 0, ctrl_rdata;
  logic        ctrl_dir, fdc_cs_n;
  logic [2:0]  fdc_rs;
  logic [7:0]  fdc_dout = 0;
  logic        fdc_bd = 0, fdc_txak_n = 1;
  logic        fdc_hld = 0, fdc_stp = 0, fdc_hdr = 0, fdc_wgt = 0, fdc_wdt = 0, fdc_lct = 0;
  logic        fdc_idx, fdc_rdy, fdc_wpt, fdc_trz, fdc_rdt, fdc_dck;
  logic        pia_cs_n;
  logic [1:0]  pia_rs;
  logic [7:0]  pia_dout = 0, pia_pa_out = 8'hFF, pia_pa_oe = 8'h00, pia_pa_in;
  logic        two_side = 0;
  logic [3:0]  drv_select_n;
  logic        drv_side_n, drv_hdld_n, drv_step_n, drv_stepin_n, drv_wgate_n, drv_wdata_n, drv_lowcur_n;
  logic        drv_index_n = 1, drv_ready_n = 0, drv_wprot_n = 1, drv_trk00_n = 1, drv_rdata_n = 1;
  logic        vco_clk, pd_up_n, pd_down_n, pd2_u_n, pd2_d_n;
  logic [3:0]  eprom_fit = 4'hF, eprom_cs_n;
  logic        eprom1_full = 0, mem_read_n, mem_write_n, ram_sel, dram_ras_n, dram_we_n;
  logic [1:0]  dram_cas_n;
  logic [6:0]  dram_addr, refresh_row;

  int checks = 0, failures = 0;

  fdc_top dut (.*);

  always #25 timing_clk = !timing_clk;
  always #500 phi2 = !phi2;

  initial begin
    #10ms;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // VCO frequency from the last 16 periods.
  realtime edges [$];
  real     f_meas = 0.0;
  always @(posedge vco_clk) begin
    edges.push_back($realtime);
    if (edges.size() > 17) void'(edges.pop_front());
    if (edges.size() == 17) f_meas = 16.0e3 / (edges[16] - edges[0]);   // MHz
  end

  // Raw clock pulses at the current rate.
  real half_ns = 2000.0;
  bit  running = 1;
  initial begin
    #3000;
    while (running) begin
      drv_rdata_n = 0;
      #200 drv_rdata_n = 1;
      #(2.0 * half_ns - 200.0);
    end
  end

  // Windows as the FDC sees them: RDT on both DCK edges.
  int  win_ok, win_bad;
  bit  last_rdt;
  bit  count_windows = 0;
  always @(fdc_dck) if (!rst) begin
    #1;
    if (count_windows) begin
      // 00 preamble: windows must alternate full (clock) / empty (data).
      if (fdc_rdt != last_rdt) win_ok++; else win_bad++;
    end
    last_rdt = fdc_rdt;
  end

  int n_up, n_down;
  always @(negedge pd_up_n)   n_up++;
  always @(negedge pd_down_n) n_down++;

  // One rate step: run STEP_US, sample the VCO every 0.5 us, return the
  // capture time in microseconds (-1 if never within 1 %).
  task automatic step(input real rate_err, input string name, output real capture_us);
    real target, t0, samples [$];
    int  last_out;
    half_ns = 2000.0 / (1.0 + rate_err);
    target  = 8.0 * (1.0 + rate_err);
    t0      = $realtime;
    for (int i = 0; i < 1600; i++) begin         // 800 us
      #500;
      samples.push_back(f_meas);
    end
    last_out = -1;
    foreach (samples[i])
      if (samples[i] < target * 0.99 || samples[i] > target * 1.01) last_out = i;
    capture_us = (last_out == samples.size() - 1) ? -1.0 : (last_out + 1) * 0.5;
    $display("%-10s rate %6.3f kHz  VCO %6.3f MHz (target %6.3f)  capture %6.1f us",
             name, 500.0 * (1.0 + rate_err), f_meas, target, capture_us);
  endtask

  initial begin
    real cap;
    #2000 rst = 0;
    step(0.0, "nominal", cap);
    check(cap >= 0.0, "locks at nominal rate");
    begin
      real errs [4] = '{0.03, -0.03, 0.05, 0.0};
      string names [4] = '{"+3 %", "-3 %", "+5 %", "nominal"};
      for (int k = 0; k < 4; k++) begin
        win_ok = 0; win_bad = 0;
        step(errs[k], names[k], cap);
        check(cap >= 0.0, "VCO captured");
        check(cap <= 192.0, "capture within six byte times");
        // Windows after capture: run 200 us more and count.
        count_windows = 1;
        win_ok = 0; win_bad = 0;
        #200us;
        count_windows = 0;
        $display("           windows after capture: %0d right, %0d wrong", win_ok, win_bad);
        check(win_bad == 0 && win_ok > 90, "preamble decoded after capture");
      end
    end
    running = 0;
    check(n_up > 0 && n_down > 0, "mechanism: both pump directions");
    $display("pump up %0d, pump down %0d", n_up, n_down);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
