// data_separator -- digital part of the read data recovery circuit.
//
// The drive delivers "raw data": a single-density (FM) pulse train in which
// a clock pulse starts every 4 us bit cell and a data pulse follows 2 us
// later for a one, so pulses come at most every 2 us (500 kHz) and at most
// one in a row can be missing. A VCO locked to 16 times that rate (8 MHz)
// clocks this circuit. It turns the pulse train into a continuous read data
// level (RDT) and a data clock (DCK) for the FDC, which samples RDT on both
// edges of DCK, one half bit cell (clock or data bit) per DCK edge.
//
//   FF1  set by the rising edge of a raw data pulse, cleared by FF2.
//   FF2  samples FF1 on the VCO clock; while it is set (one VCO period) it
//        clears FF1, sets FF3 and makes the window counter load 9.
//   Window counter  4-bit synchronous counter on the VCO clock. Loading 9
//        puts its MSB rising 15 VCO periods later, so it keeps producing a
//        window edge when a pulse is missing (flywheel). Its carry-out
//        (count 15) is the reference R of the phase detector.
//   FF3  data flip-flop: set by FF2, cleared (D = 0) by the inverted MSB of
//        the window counter, i.e. when the MSB falls, 7 VCO periods after a
//        load -- half-way between two nominal pulse positions.
//   FF4  on the same window edge takes FF3's value: RDT = 1 when a pulse was
//        seen in the window just ended.
//   FF5  toggles on the window edge: DCK, 250 kHz, so that each DCK edge
//        carries one half bit cell.
//   Variable counter  free-running divide-by-16 of the VCO; its carry-out
//        is the feedback V of the phase detector.
//
// Structure, preset value and ratios follow the design. The exact phase of
// the synchronous load (the VCO edge after FF2 sets) assumes 74161-style
// synchronous counters; rst is an addition of this model that clears the
// counters and flip-flops, since the board relies on power-up states.
//
// Timing: RDT and DCK change together, 7 VCO periods after the load caused
// by the pulse of that window; one window is 16 VCO periods (2 us at 8 MHz).
`timescale 1ns / 1ps
module data_separator
  import fdc_pkg::*;
(
  input  logic       vco_clk,    // 16 x pulse-rate clock from the VCO
  input  logic       rst,        // reset, active high
  input  logic       raw_data,   // raw read pulses, active high
  output logic       rdt,        // read data to the FDC (FF4)
  output logic       dck,        // data clock to the FDC (FF5)
  output logic       ref_r,      // window counter carry-out (phase detector R)
  output logic       var_v,      // variable counter carry-out (phase detector V)
  output logic       pulse_seen, // FF2: one VCO period per detected pulse
  output logic [3:0] window      // window counter value, for observation
);
  logic ff1, ff2, ff3, ff4, ff5;
  logic ff1_clr, ff3_ld;
  logic win_clk;
  logic [3:0] win_cnt, var_cnt;

  // FF1: edge-triggered by the raw data pulse, asynchronously cleared.
  assign ff1_clr = ff2 || rst;
  always_ff @(posedge raw_data or posedge ff1_clr)
    if (ff1_clr) ff1 <= 1'b0;
    else         ff1 <= 1'b1;

  // FF2: synchroniser on the VCO clock.
  always_ff @(posedge vco_clk)
    if (rst) ff2 <= 1'b0;
    else     ff2 <= ff1;

  // Window counter, loaded with 9 while FF2 is set.
  always_ff @(posedge vco_clk)
    if (rst)      win_cnt <= 4'd0;
    else if (ff2) win_cnt <= WINDOW_PRESET;
    else          win_cnt <= win_cnt + 4'd1;

  // Variable (feedback) counter: VCO divided by 16.
  always_ff @(posedge vco_clk)
    if (rst) var_cnt <= 4'd0;
    else     var_cnt <= var_cnt + 4'd1;

  assign win_clk = !win_cnt[3];

  // FF3: set by FF2 (cleared by rst), clocked low by the window edge.
  assign ff3_ld = ff2 || rst;
  always_ff @(posedge win_clk or posedge ff3_ld)
    if (ff3_ld) ff3 <= !rst;
    else        ff3 <= 1'b0;

  // FF4 (read data) and FF5 (data clock) on the window edge.
  always_ff @(posedge win_clk or posedge rst)
    if (rst) begin
      ff4 <= 1'b0;
      ff5 <= 1'b0;
    end else begin
      ff4 <= ff3;
      ff5 <= !ff5;
    end

  assign rdt        = ff4;
  assign dck        = ff5;
  assign ref_r      = (win_cnt == 4'd15);
  assign var_v      = (var_cnt == 4'd15);
  assign pulse_seen = ff2;
  assign window     = win_cnt;
endmodule
