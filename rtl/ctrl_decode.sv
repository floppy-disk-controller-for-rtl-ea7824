// ctrl_decode -- address decoder of the floppy disk controller module.
//
// The module occupies the 1 Kbyte window EC00-EFFF of the M6800 memory map.
// A15, A14, A13, A11, A10 high, A12 low and VMA high enable a first 2-to-4
// decoder half, which splits the window by A9/A8 into four 256-byte pages:
//   Y0  EC00-ECFF  enables the second decoder half
//   Y1  ED00-EDFF  spare
//   Y2  EE00-EEFF  spare
//   Y3  EF00-EFFF  256-byte scratch-pad RAM select (full decoding)
// The second half, enabled by Y0, splits EC00-ECFF by A7/A6 into four
// 64-byte areas: EC00-EC3F selects the FDC and EC40-EC7F the drive-select
// PIA. A5-A3 (FDC) and A5-A2 (PIA) are left undecoded, so each device has
// images in its 64-byte area. A2-A0 go to the FDC register selects RS2-RS0
// (the PIA uses A1-A0).
//
// The decode structure (two LS139 halves, the address bits used and the
// device areas) follows the design; the two spare outputs of each half are
// brought out as ports. Purely combinational: selects are valid one gate
// delay after the address and VMA settle.
`timescale 1ns / 1ps
module ctrl_decode
  import fdc_pkg::*;
(
  input  logic [15:0] addr,      // MPU address bus A15-A0
  input  logic        vma,       // valid memory address, high when addr valid
  output logic        fdc_cs_n,  // FDC chip select, EC00-EC3F
  output logic        pia_cs_n,  // PIA chip select, EC40-EC7F
  output logic        sram_cs_n, // scratch-pad RAM select, EF00-EFFF
  output logic [1:0]  page_spare_n, // ED00 and EE00 pages (Y1, Y2 of first half)
  output logic [1:0]  area_spare_n, // EC80 and ECC0 areas (Y2, Y3 of second half)
  output logic [2:0]  rs         // FDC register select RS2-RS0
);
  logic       win_en_n;
  logic [3:0] page_n;
  logic [3:0] area_n;

  // Window enable: A15..A10 = 111011 and VMA.
  assign win_en_n = !(vma && addr[15:10] == CTRL_WIN_A15_10);

  dec2to4_n u_page (.en_n(win_en_n), .a0(addr[8]), .a1(addr[9]), .y_n(page_n));
  dec2to4_n u_area (.en_n(page_n[0]), .a0(addr[6]), .a1(addr[7]), .y_n(area_n));

  assign sram_cs_n    = page_n[3];
  assign page_spare_n = page_n[2:1];
  assign fdc_cs_n     = area_n[0];
  assign pia_cs_n     = area_n[1];
  assign area_spare_n = area_n[3:2];
  assign rs           = addr[2:0];
endmodule
