// fdc_pkg -- constants shared by the floppy disk controller system.
//
// Holds the memory map of the M6800 system in which the controller and the
// RAM/EPROM module live, and the data-recovery constants. The addresses are
// those of the system memory map: 32 Kbyte dynamic RAM at 0000-7FFF, EPROMs
// at E000-FFFF, the controller module's 1 Kbyte window at EC00-EFFF with the
// FDC at EC00-EC3F, the drive-select PIA at EC40-EC7F and the 256-byte
// scratch-pad RAM at EF00-EFFF.
`timescale 1ns / 1ps
package fdc_pkg;

  // Controller module window EC00-EFFF: A15..A10 = 111011
  localparam logic [5:0]  CTRL_WIN_A15_10 = 6'b111011;
  localparam logic [15:0] FDC_BASE        = 16'hEC00;
  localparam logic [15:0] PIA_BASE        = 16'hEC40;
  localparam logic [15:0] SRAM_BASE       = 16'hEF00;
  localparam logic [15:0] EPROM_BASE      = 16'hE000;

  // Data recovery: VCO runs at 16 times the 500 kHz pulse rate (8 MHz);
  // the window counter is preset to 9 on every detected pulse.
  localparam int unsigned VCO_PER_WINDOW = 16;
  localparam logic [3:0]  WINDOW_PRESET  = 4'd9;

  // 4116 dynamic RAM: 128 rows refreshed every 2 ms.
  localparam int unsigned DRAM_ROWS      = 128;

  // Phase detector #1 output state (U1/D1 are active low on the chip).
  typedef enum logic [1:0] {
    PD_LOCK = 2'b00,   // both outputs high (inactive)
    PD_UP   = 2'b01,   // pump up active
    PD_DOWN = 2'b10    // pump down active
  } pd_state_e;

endpackage
