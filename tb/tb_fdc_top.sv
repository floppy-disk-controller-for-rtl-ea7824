// tb_fdc_top -- end-to-end test of the floppy disk subsystem with all
// parameters at their defaults.
//
// The testbench plays the parts the board buys in: the MPU (bus cycles at
// 1 MHz), the FDC and PIA (register data, BD, DMA acknowledge, port lines),
// the drive (status lines and a raw FM pulse stream) and the dynamic RAM
// chips (two 4116 bank models). Two processes run at once:
//
//  * Disk read: the drive sends one complete IBM 3740 sector -- gap, six
//    bytes of 00, ID address mark FE (clock C7), track, side, sector,
//    length, CRC, gap, 00s, data mark FB, 128 data bytes, CRC -- at a bit
//    rate 1.5 % above nominal, so the PLL has to pull the VCO off 8 MHz.
//    The testbench, acting as the FDC, samples RDT on both DCK edges, finds
//    the two address marks by their missing clocks and checks every byte
//    and both CRCs (CRC-CCITT x^16+x^12+x^5+1, preset FFFF, computed here).
//  * Bus traffic: scratch-pad RAM writes and reads, FDC and PIA register
//    reads through their address images, DMA cycles with TxAK, drive
//    selection through the PIA port, step pulses, and dynamic RAM
//    writes/reads with hidden refresh, plus EPROM selects.
//
// Every mechanism is counted and must occur at least once: pump up, pump
// down, phase lock, flywheel windows (missing pulses), missing-clock
// address marks, data-out and data-in buffer directions, DMA, drive
// selection, refresh-only and access cycles, EPROM selection.
`timescale 1ns / 1ps
module tb_fdc_top;
  logic        rst = 1, timing_clk = 0, phi2 = 0;
  logic [15:0] addr = 0;
  logic        vma = 0, rw = 1;
  logic [7:0]  cpu_wdata = 0, ctrl_rdata;
  logic        ctrl_dir;
  logic        fdc_cs_n;
  logic [2:0]  fdc_rs;
  logic [7:0]  fdc_dout = 0;
  logic        fdc_bd = 0, fdc_txak_n = 1;
  logic        fdc_hld = 0, fdc_stp = 0, fdc_hdr = 0, fdc_wgt = 0, fdc_wdt = 0, fdc_lct = 0;
  logic        fdc_idx, fdc_rdy, fdc_wpt, fdc_trz, fdc_rdt, fdc_dck;
  logic        pia_cs_n;
  logic [1:0]  pia_rs;
  logic [7:0]  pia_dout = 0, pia_pa_out = 8'hFF, pia_pa_oe = 8'h00, pia_pa_in;
  logic [3:0]  drv_select_n;
  logic        drv_side_n, drv_hdld_n, drv_step_n, drv_stepin_n, drv_wgate_n, drv_wdata_n, drv_lowcur_n;
  logic        drv_index_n = 1, drv_ready_n = 0, drv_wprot_n = 1, drv_trk00_n = 1;
  logic        drv_rdata_n = 1, two_side = 0;
  logic        vco_clk, pd_up_n, pd_down_n, pd2_u_n, pd2_d_n;
  logic [3:0]  eprom_fit = 4'b1111, eprom_cs_n;
  logic        eprom1_full = 0;
  logic        mem_read_n, mem_write_n, ram_sel, dram_ras_n, dram_we_n;
  logic [1:0]  dram_cas_n;
  logic [6:0]  dram_addr, refresh_row;
  logic [7:0]  dout0, dout1;

  int checks = 0, failures = 0;

  fdc_top dut (.*);
  dram4116_model bank0 (.ras_n(dram_ras_n), .cas_n(dram_cas_n[0]), .addr(dram_addr), .we_n(dram_we_n), .din(cpu_wdata), .dout(dout0));
  dram4116_model bank1 (.ras_n(dram_ras_n), .cas_n(dram_cas_n[1]), .addr(dram_addr), .we_n(dram_we_n), .din(cpu_wdata), .dout(dout1));

  always #25 timing_clk = !timing_clk;

  initial begin
    #30ms;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // ---------------- mechanism counters ----------------
  int n_pump_up, n_pump_down, n_lock_windows, n_flywheel, n_marks;
  int n_dir_out, n_dir_in, n_dma, n_select, n_refresh_only, n_ram_access, n_eprom, n_step;

  always @(negedge pd_up_n)   n_pump_up++;
  always @(negedge pd_down_n) n_pump_down++;

  // ---------------- disk side: raw FM stream ----------------
  localparam real RATE_ERR = 0.015;              // data 1.5 % fast
  localparam real HALF_NS  = 2000.0 / (1.0 + RATE_ERR);

  bit      sent_bits [$];
  logic [7:0] id_bytes [4];
  logic [7:0] data_bytes [128];

  function automatic logic [15:0] crc_ccitt(input logic [15:0] crc, input logic [7:0] b);
    for (int i = 7; i >= 0; i--) begin
      bit fb;
      fb = crc[15] ^ b[i];
      crc = {crc[14:0], 1'b0};
      if (fb) crc = crc ^ 16'h1021;
    end
    return crc;
  endfunction

  task automatic raw_pulse();
    fork
      begin
        drv_rdata_n = 0;
        #200 drv_rdata_n = 1;
      end
    join_none
  endtask

  task automatic fm_byte(input logic [7:0] d, input logic [7:0] c);
    for (int i = 7; i >= 0; i--) begin
      if (c[i]) raw_pulse();
      #(HALF_NS);
      if (d[i]) raw_pulse();
      #(HALF_NS);
    end
  endtask

  task automatic send_sector();
    logic [15:0] crc;
    for (int i = 0; i < 16; i++) fm_byte(8'hFF, 8'hFF);      // gap
    for (int i = 0; i < 6; i++)  fm_byte(8'h00, 8'hFF);
    fm_byte(8'hFE, 8'hC7);                                   // ID address mark
    crc = crc_ccitt(16'hFFFF, 8'hFE);
    foreach (id_bytes[i]) begin
      fm_byte(id_bytes[i], 8'hFF);
      crc = crc_ccitt(crc, id_bytes[i]);
    end
    fm_byte(crc[15:8], 8'hFF);
    fm_byte(crc[7:0], 8'hFF);
    for (int i = 0; i < 11; i++) fm_byte(8'hFF, 8'hFF);      // ID gap
    for (int i = 0; i < 6; i++)  fm_byte(8'h00, 8'hFF);
    fm_byte(8'hFB, 8'hC7);                                   // data address mark
    crc = crc_ccitt(16'hFFFF, 8'hFB);
    foreach (data_bytes[i]) begin
      fm_byte(data_bytes[i], 8'hFF);
      crc = crc_ccitt(crc, data_bytes[i]);
    end
    fm_byte(crc[15:8], 8'hFF);
    fm_byte(crc[7:0], 8'hFF);
    ->body_done;
    for (int i = 0; i < 8; i++) fm_byte(8'hFF, 8'hFF);
  endtask

  // VCO frequency, counted on the vco_clk pin over 200 us of the final gap.
  event body_done;
  real  vco_mhz = 0.0;
  task automatic measure_vco();
    int n = 0;
    @(body_done);
    fork
      forever @(posedge vco_clk) n++;
      #200us;
    join_any
    disable fork;
    vco_mhz = n / 200.0;
  endtask

  // ---------------- FDC side: sample RDT on both DCK edges ----------------
  bit got [$];
  always @(fdc_dck) if (!rst) begin
    #1;
    got.push_back(fdc_rdt);
    if (!fdc_rdt) n_flywheel++;
    if (pd_up_n && pd_down_n) n_lock_windows++;
  end

  function automatic int find_mark(input int from, input logic [7:0] d, input logic [7:0] c);
    for (int p = from; p + 16 <= got.size(); p++) begin
      bit ok;
      ok = 1;
      for (int i = 0; i < 8; i++)
        if (got[p + 2*i] != c[7-i] || got[p + 2*i + 1] != d[7-i]) ok = 0;
      if (ok) return p;
    end
    return -1;
  endfunction

  function automatic logic [7:0] get_byte(input int p);
    logic [7:0] b;
    for (int i = 0; i < 8; i++) b[7-i] = got[p + 2*i + 1];
    return b;
  endfunction

  task automatic check_sector();
    int p;
    logic [15:0] crc;
    logic [7:0]  b;
    p = find_mark(0, 8'hFE, 8'hC7);
    check(p >= 0, "ID address mark found");
    if (p < 0) return;
    n_marks++;
    crc = crc_ccitt(16'hFFFF, 8'hFE);
    for (int i = 0; i < 4; i++) begin
      b = get_byte(p + 16 * (i + 1));
      check(b == id_bytes[i], "ID byte");
      crc = crc_ccitt(crc, b);
    end
    check({get_byte(p + 80), get_byte(p + 96)} == crc, "ID CRC");
    p = find_mark(p + 112, 8'hFB, 8'hC7);
    check(p >= 0, "data address mark found");
    if (p < 0) return;
    n_marks++;
    crc = crc_ccitt(16'hFFFF, 8'hFB);
    for (int i = 0; i < 128; i++) begin
      b = get_byte(p + 16 * (i + 1));
      check(b == data_bytes[i], "data byte");
      crc = crc_ccitt(crc, b);
    end
    check({get_byte(p + 16 * 129), get_byte(p + 16 * 130)} == crc, "data CRC");
  endtask

  // ---------------- MPU side ----------------
  // One bus cycle: address/R/W/VMA set up in phi1, data at the end of phi2.
  task automatic bus_cycle(input logic [15:0] a, input bit r, input logic [7:0] d, input bit v,
                           output logic [7:0] q, output bit dir_seen);
    phi2 = 0;
    #12;
    addr = a; rw = r; vma = v; cpu_wdata = d;
    // The FDC and PIA models answer when selected.
    #100;
    fdc_bd = !fdc_txak_n ? !rw : (!fdc_cs_n && rw);
    #388;
    phi2 = 1;
    #480;
    q = ctrl_rdata;
    dir_seen = ctrl_dir;
    if (!ctrl_dir) n_dir_out++; else n_dir_in++;
    #20;
  endtask

  task automatic mpu_traffic();
    logic [7:0] q, shadow [256];
    bit dir;
    logic [7:0] dram_shadow [int];
    // Scratch-pad RAM at EF00-EFFF.
    for (int i = 0; i < 256; i++) begin
      shadow[i] = 8'($urandom);
      bus_cycle(16'hEF00 + 16'(i), 0, shadow[i], 1, q, dir);
      check(dir == 1, "RAM write: data in");
    end
    for (int i = 0; i < 256; i += 3) begin
      bus_cycle(16'hEF00 + 16'(i), 1, 0, 1, q, dir);
      check(dir == 0 && q == shadow[i], "RAM read back, data out");
    end
    // FDC registers and their images (A5-A3 undecoded).
    for (int i = 0; i < 64; i++) begin
      fdc_dout = 8'(i * 7 + 1);
      bus_cycle(16'hEC00 + 16'(i), 1, 0, 1, q, dir);
      check(dir == 0 && q == fdc_dout && fdc_rs == 3'(i), "FDC register read");
    end
    // PIA: four registers and their images.
    for (int i = 0; i < 64; i++) begin
      pia_dout = 8'(i ^ 8'h5A);
      bus_cycle(16'hEC40 + 16'(i), 1, 0, 1, q, dir);
      check(dir == 0 && q == pia_dout && pia_rs == 2'(i), "PIA register read");
    end
    // A location nothing on the module answers: buffers stay inward.
    bus_cycle(16'hED10, 1, 0, 1, q, dir);
    check(dir == 1, "unused page: data in");
    // Drive selection through the PIA port: released after reset, then drive 1.
    check(drv_select_n == 4'hF, "no drive selected after reset");
    pia_pa_oe = 8'h1F; pia_pa_out = 8'hFD;
    #10;
    check(drv_select_n == 4'b1101 && drv_side_n == 1'b1, "drive 1 selected");
    if (drv_select_n == 4'b1101) n_select++;
    check(pia_pa_in[4:0] == 5'b11101, "port read back");
    two_side = 1;
    pia_pa_out = 8'hF6;                                       // drive 0, side 1
    #10;
    check(drv_select_n == 4'b1110 && drv_side_n == 1'b0, "drive 0 side 1, PA3 as side select");
    two_side = 0;
    // Status lines, head load and step pulses.
    drv_trk00_n = 0; drv_index_n = 0; #10;
    check(fdc_trz && fdc_idx && fdc_rdy && !fdc_wpt, "drive status to FDC");
    drv_trk00_n = 1; drv_index_n = 1;
    fdc_hld = 1; fdc_hdr = 1;
    for (int i = 0; i < 3; i++) begin
      // The MPU keeps running (VMA low) while the FDC steps the head.
      fdc_stp = 1;
      repeat (32) bus_cycle(16'h8000, 1, 0, 0, q, dir);
      check(!drv_step_n && !drv_stepin_n && !drv_hdld_n, "step pulse on the drive line");
      fdc_stp = 0;
      bus_cycle(16'h8000, 1, 0, 0, q, dir);
      n_step++;
    end
    // DMA: FDC acknowledges; memory-to-FDC (R/W = 1) and FDC-to-memory.
    fdc_txak_n = 0;
    bus_cycle(16'h0100, 1, 0, 1, q, dir);
    check(dir == 1, "DMA memory read: data into the module");
    fdc_dout = 8'hA5;
    bus_cycle(16'h0101, 0, 0, 1, q, dir);
    check(dir == 0 && q == 8'hA5, "DMA memory write: FDC data out");
    fdc_txak_n = 1;
    n_dma++;
    // Dynamic RAM with hidden refresh: writes, idle cycles, reads.
    for (int i = 0; i < 200; i++) begin
      logic [14:0] a;
      logic [7:0] d;
      a = 15'($urandom); d = 8'($urandom);
      bus_cycle({1'b0, a}, 0, d, 1, q, dir);
      dram_shadow[int'(a)] = d;
      check(!mem_write_n && mem_read_n && ram_sel, "DRAM write buffer enable");
      n_ram_access++;
    end
    for (int i = 0; i < 2600; i++) begin
      bus_cycle(16'hE000 + 16'(i % 4) * 16'h0800, 1, 0, 1, q, dir);   // EPROM cycles
      if (eprom_cs_n != 4'hF) n_eprom++;
      check(eprom_cs_n == ~(4'b0001 << (i % 4)) && !mem_read_n, "EPROM select");
      n_refresh_only++;
    end
    foreach (dram_shadow[k]) begin
      bus_cycle(16'(k), 1, 0, 1, q, dir);
      q = k[14] ? dout1 : dout0;
      check(q == dram_shadow[k] && !mem_read_n, "DRAM read back after 2.6 ms");
      n_ram_access++;
    end
    check(bank0.violations == 0 && bank1.violations == 0, "DRAM timing");
    check(bank0.max_age < 130us && bank1.max_age < 130us, "refresh period");
  endtask

  initial begin
    foreach (id_bytes[i]) id_bytes[i] = 8'($urandom);
    id_bytes[3] = 8'h00;
    foreach (data_bytes[i]) data_bytes[i] = 8'($urandom);
    #2000 rst = 0;
    fork
      measure_vco();
      begin
        send_sector();
        #10us;
        check_sector();
      end
      mpu_traffic();
    join
    $display("VCO %f MHz (data needs %f)", vco_mhz, 8.0 * (1.0 + RATE_ERR));
    check(vco_mhz > 8.0 * (1.0 + RATE_ERR) - 0.06 && vco_mhz < 8.0 * (1.0 + RATE_ERR) + 0.06,
          "VCO pulled to 16 x data rate");
    $display("pump up %0d, pump down %0d, lock windows %0d, flywheel windows %0d, marks %0d",
             n_pump_up, n_pump_down, n_lock_windows, n_flywheel, n_marks);
    $display("data out %0d, data in %0d, dma %0d, select %0d, steps %0d, refresh-only %0d, RAM access %0d, EPROM %0d",
             n_dir_out, n_dir_in, n_dma, n_select, n_step, n_refresh_only, n_ram_access, n_eprom);
    check(n_pump_up > 0, "mechanism: pump up");
    check(n_pump_down > 0, "mechanism: pump down");
    check(n_lock_windows > 0, "mechanism: lock");
    check(n_flywheel > 0, "mechanism: flywheel window");
    check(n_marks == 2, "mechanism: missing-clock address marks");
    check(n_dir_out > 0 && n_dir_in > 0, "mechanism: both buffer directions");
    check(n_dma > 0, "mechanism: DMA");
    check(n_select > 0, "mechanism: drive select");
    check(n_step > 0, "mechanism: step");
    check(n_refresh_only > 0 && n_ram_access > 0, "mechanism: refresh-only and access cycles");
    check(n_eprom > 0, "mechanism: EPROM select");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
