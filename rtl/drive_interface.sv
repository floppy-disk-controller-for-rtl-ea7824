// drive_interface -- line drivers and receivers between the controller
// module and up to four daisy-chained diskette drives.
//
// All drive interface lines are active low. Outputs to the drives are open
// collector drivers (LS38 type) with the 220/330 ohm termination in the last
// drive, so an undriven line reads high; inputs from the drives are received
// through inverters (LS04 type) terminated on the controller board. The FDC
// works with active-high signals, so every shared control and status line is
// inverted once here.
//
// The four dedicated SELECT lines are different: they come straight from
// the drive-select PIA port through non-inverting open-collector buffers
// (7417 type). After a reset the PIA turns its port into inputs, the lines
// float high and no drive is selected; an inverting driver would instead
// select all drives at once. pa_oe models the PIA data direction register:
// a port pin that is not an output reads as released (high).
//
// Four port pins are used, PA0-PA3, which serve either four single-sided
// drives or three double-sided ones. With the strap two_side low, PA0-PA3
// are SELECT 0-3 and SIDE SELECT stays released (high = side 0, the state
// an unconnected line has, so single-sided drives work unchanged). With
// two_side high, PA3 drives SIDE SELECT through the same kind of
// non-inverting buffer and SELECT 3 stays released. Which pin takes the
// side line, and the strap, are choices of this design. The PIA reads its
// port pins back as they are. Purely combinational.
`timescale 1ns / 1ps
module drive_interface (
  // FDC side, active high
  input  logic       fdc_hld,      // head load
  input  logic       fdc_stp,      // step pulse
  input  logic       fdc_hdr,      // head direction, 1 = step in
  input  logic       fdc_wgt,      // write gate
  input  logic       fdc_wdt,      // write data pulses
  input  logic       fdc_lct,      // low current track
  output logic       fdc_idx,      // index
  output logic       fdc_rdy,      // drive ready
  output logic       fdc_wpt,      // write protect
  output logic       fdc_trz,      // track zero
  output logic       raw_data,     // raw read pulses to the data separator
  // PIA port A
  input  logic [7:0] pa_out,       // output register
  input  logic [7:0] pa_oe,        // 1 = pin is an output
  input  logic       two_side,     // strap: 1 = PA3 is SIDE SELECT
  output logic [7:0] pa_in,        // pin levels read back by the PIA
  // Drive side, active-low lines
  output logic [3:0] drv_select_n, // dedicated select lines
  output logic       drv_side_n,   // side select (low = side 1)
  output logic       drv_hdld_n,   // head load
  output logic       drv_step_n,   // step
  output logic       drv_stepin_n, // direction, low = in
  output logic       drv_wgate_n,  // write gate
  output logic       drv_wdata_n,  // write data
  output logic       drv_lowcur_n, // low write current
  input  logic       drv_index_n,
  input  logic       drv_ready_n,
  input  logic       drv_wprot_n,
  input  logic       drv_trk00_n,
  input  logic       drv_rdata_n   // raw read data pulses
);
  logic [7:0] pa_pin;

  // PIA pins: driven when an output, pulled up otherwise.
  assign pa_pin = (pa_out & pa_oe) | ~pa_oe;

  // Non-inverting select and side buffers.
  assign drv_select_n = {pa_pin[3] || two_side, pa_pin[2:0]};
  assign drv_side_n   = pa_pin[3] || !two_side;

  // Open-collector inverting drivers.
  assign drv_hdld_n   = !fdc_hld;
  assign drv_step_n   = !fdc_stp;
  assign drv_stepin_n = !fdc_hdr;
  assign drv_wgate_n  = !fdc_wgt;
  assign drv_wdata_n  = !fdc_wdt;
  assign drv_lowcur_n = !fdc_lct;

  // Inverting receivers.
  assign fdc_idx  = !drv_index_n;
  assign fdc_rdy  = !drv_ready_n;
  assign fdc_wpt  = !drv_wprot_n;
  assign fdc_trz  = !drv_trk00_n;
  assign raw_data = !drv_rdata_n;

  assign pa_in = pa_pin;
endmodule
