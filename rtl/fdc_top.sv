// fdc_top -- floppy disk subsystem of an M6800 microcomputer: the
// controller module and the RAM/EPROM module on the M6800 bus.
//
// Controller module (EC00-EFFF):
//   ctrl_decode     FDC at EC00-EC3F, drive-select PIA at EC40-EC7F,
//                   256-byte scratch-pad RAM at EF00-EFFF
//   bus_dir_ctrl    direction of the module's data buffers, including
//                   DMA transfers acknowledged by the FDC (TxAK)
//   scratch_ram     the 256-byte RAM
//   drive_interface open-collector drivers / receivers to the drives,
//                   drive select lines from the PIA port
//   data_separator, phase_detector, pll_vco
//                   read data recovery: raw FM pulses -> RDT and DCK for
//                   the FDC, with a PLL locked to 16 x the pulse rate
// RAM/EPROM module:
//   mem_decode      RAM SELECT (0000-7FFF), four EPROM selects (E000-FFFF),
//                   READ/WRITE buffer enables
//   refresh_ctrl    hidden refresh and row/column multiplexing of the two
//                   16 Kbyte dynamic RAM banks
//
// The MC6843 FDC, the MC6821 PIA, the dynamic RAM and EPROM chips and the
// drives are parts bought in; their pins are ports here. Tri-state busses
// are split into separate directions: cpu_wdata is the data the MPU drives,
// ctrl_rdata the data the controller module returns (valid when ctrl_dir is
// 0), and fdc_dout / pia_dout the data those chips drive onto the internal
// bus. pll_vco is a behavioural model of the analog loop filter and VCO and
// makes this top simulation-only; the rest is synthesizable.
//
// Clocks: phi2 (the bus E clock, 1 MHz), timing_clk (20 MHz, replaces the
// monostable delays of the refresh logic), and the internal VCO (8 MHz,
// vco_clk output) for the data separator.
//
// Reset: rst clears the data separator's flip-flops asynchronously, as the
// clear inputs of its TTL flip-flops do, and clears the refresh logic
// synchronously to timing_clk; the lint note that rst is used both ways is
// therefore intended. The VCO model's delay note comes from pll_vco.
`timescale 1ns / 1ps
module fdc_top (
  input  logic        rst,          // reset, active high
  input  logic        timing_clk,   // 20 MHz timing clock for the refresh logic
  // M6800 bus
  input  logic        phi2,
  input  logic [15:0] addr,
  input  logic        vma,
  input  logic        rw,
  input  logic [7:0]  cpu_wdata,
  output logic [7:0]  ctrl_rdata,   // controller module read data
  output logic        ctrl_dir,     // controller data buffers: 0 = out, 1 = in
  // MC6843 FDC pins
  output logic        fdc_cs_n,
  output logic [2:0]  fdc_rs,
  input  logic [7:0]  fdc_dout,
  input  logic        fdc_bd,
  input  logic        fdc_txak_n,
  input  logic        fdc_hld, fdc_stp, fdc_hdr, fdc_wgt, fdc_wdt, fdc_lct,
  output logic        fdc_idx, fdc_rdy, fdc_wpt, fdc_trz,
  output logic        fdc_rdt,      // read data
  output logic        fdc_dck,      // data clock
  // MC6821 PIA pins
  output logic        pia_cs_n,
  output logic [1:0]  pia_rs,
  input  logic [7:0]  pia_dout,
  input  logic [7:0]  pia_pa_out,
  input  logic [7:0]  pia_pa_oe,
  input  logic        two_side,     // strap: PA3 drives SIDE SELECT (three double-sided drives)
  output logic [7:0]  pia_pa_in,
  // Drive interface (active-low lines)
  output logic [3:0]  drv_select_n,
  output logic        drv_side_n, drv_hdld_n, drv_step_n, drv_stepin_n,
  output logic        drv_wgate_n, drv_wdata_n, drv_lowcur_n,
  input  logic        drv_index_n, drv_ready_n, drv_wprot_n, drv_trk00_n,
  input  logic        drv_rdata_n,
  // Data recovery observation
  output logic        vco_clk,
  output logic        pd_up_n, pd_down_n,   // phase detector #1 (to charge pump)
  output logic        pd2_u_n, pd2_d_n,     // phase detector #2
  // RAM/EPROM module straps and pins
  input  logic [3:0]  eprom_fit,
  input  logic        eprom1_full,
  output logic [3:0]  eprom_cs_n,
  output logic        mem_read_n, mem_write_n,
  output logic        ram_sel,
  output logic        dram_ras_n,
  output logic [1:0]  dram_cas_n,
  output logic [6:0]  dram_addr,
  output logic        dram_we_n,
  output logic [6:0]  refresh_row
);
  import fdc_pkg::*;

  // ---------------- controller module ----------------
  logic       sram_cs_n;
  logic [1:0] page_spare_n, area_spare_n;
  logic [7:0] sram_rdata;

  ctrl_decode u_decode (
    .addr, .vma, .fdc_cs_n, .pia_cs_n, .sram_cs_n,
    .page_spare_n, .area_spare_n, .rs(fdc_rs)
  );
  assign pia_rs = addr[1:0];

  bus_dir_ctrl u_dir (
    .rw, .fdc_bd, .txak_n(fdc_txak_n), .fdc_cs_n, .pia_cs_n,
    .ram_cs_n(sram_cs_n), .dir(ctrl_dir)
  );

  scratch_ram u_sram (
    .e_clk(phi2), .cs_n(sram_cs_n), .rw, .addr(addr[7:0]),
    .wdata(cpu_wdata), .rdata(sram_rdata)
  );

  // Internal bus as seen by the MPU side of the buffers.
  always_comb begin
    if (!sram_cs_n)                      ctrl_rdata = sram_rdata;
    else if (!pia_cs_n)                  ctrl_rdata = pia_dout;
    else if (!fdc_cs_n || !fdc_txak_n)   ctrl_rdata = fdc_dout;
    else                                 ctrl_rdata = 8'hFF;
  end

  logic raw_data;
  drive_interface u_drv (
    .fdc_hld, .fdc_stp, .fdc_hdr, .fdc_wgt, .fdc_wdt, .fdc_lct,
    .fdc_idx, .fdc_rdy, .fdc_wpt, .fdc_trz, .raw_data,
    .pa_out(pia_pa_out), .pa_oe(pia_pa_oe), .pa_in(pia_pa_in), .two_side(two_side),
    .drv_select_n, .drv_side_n, .drv_hdld_n, .drv_step_n, .drv_stepin_n,
    .drv_wgate_n, .drv_wdata_n, .drv_lowcur_n,
    .drv_index_n, .drv_ready_n, .drv_wprot_n, .drv_trk00_n,
    .drv_rdata_n
  );

  // Data recovery loop.
  logic       ref_r, var_v, pulse_seen;
  logic [3:0] window;
  pd_state_e  pd_state;
  real        vco_freq;

  data_separator u_sep (
    .vco_clk, .rst, .raw_data, .rdt(fdc_rdt), .dck(fdc_dck),
    .ref_r, .var_v, .pulse_seen, .window
  );

  phase_detector u_pd (
    .clk(vco_clk), .rst, .r(ref_r), .v(var_v),
    .u1_n(pd_up_n), .d1_n(pd_down_n), .u2_n(pd2_u_n), .d2_n(pd2_d_n),
    .state(pd_state)
  );

  pll_vco u_vco (.pu_n(pd_up_n), .pd_n(pd_down_n), .vco_out(vco_clk), .freq_hz(vco_freq));

  // ---------------- RAM/EPROM module ----------------
  logic bank1_sel, eprom_sel, s_col, refreshing;

  mem_decode u_mdec (
    .addr, .vma, .rw, .eprom_fit, .eprom1_full,
    .ram_sel, .bank1_sel, .eprom_cs_n, .eprom_sel,
    .read_n(mem_read_n), .write_n(mem_write_n)
  );

  refresh_ctrl u_ref (
    .clk(timing_clk), .rst, .phi2, .ram_sel, .a14(bank1_sel),
    .cpu_addr(addr[13:0]), .ras_n(dram_ras_n), .cas_n(dram_cas_n),
    .dram_addr, .s_col, .refresh(refreshing), .row_cnt(refresh_row)
  );
  assign dram_we_n = rw;
endmodule
