// mem_decode -- address decoding and buffer control of the RAM/EPROM module.
//
// RAM: the 32 Kbyte dynamic RAM fills 0000-7FFF and is selected by A15 low
// with VMA high (active-high RAM SELECT); A14 later picks one of its two
// 16 Kbyte banks.
// EPROM: A15, A14, A13 and VMA all high enable a 2-to-4 decoder half
// (E000-FFFF) whose select inputs are A11 and A12, giving four 2 Kbyte
// selects: EPROM 0 E000-E7FF, EPROM 1 E800-EFFF, EPROM 2 F000-F7FF and
// EPROM 3 F800-FFFF. EPROM 1 normally answers only at E800-EBFF: its select
// is ORed with A10 so that EC00-EFFF stays free for the controller module;
// strap eprom1_full selects all of E800-EFFF. A socket whose strap in
// eprom_fit is 0 has its select pulled up (never selected).
// Buffer control: the four EPROM selects are NANDed into an active-high
// EPROM SELECT; RAM SELECT NOR EPROM SELECT enables a second decoder half
// whose A0 input is R/W and whose A1 is grounded, so write_n (Y0) goes low
// on a write to the module and read_n (Y1) on a read.
//
// The decode structure follows the design; numbering the EPROMs 0-3 and
// modelling the jumpers as strap inputs are choices of this model. Purely
// combinational.
`timescale 1ns / 1ps
module mem_decode (
  input  logic [15:0] addr,        // MPU address A15-A0
  input  logic        vma,         // valid memory address
  input  logic        rw,          // 1 = read
  input  logic [3:0]  eprom_fit,   // strap: 1 = EPROM select connected
  input  logic        eprom1_full, // strap: EPROM 1 answers at E800-EFFF
  output logic        ram_sel,     // RAM SELECT, active high
  output logic        bank1_sel,   // A14: 0 = bank 0 (0000-3FFF), 1 = bank 1
  output logic [3:0]  eprom_cs_n,  // EPROM chip selects, active low
  output logic        eprom_sel,   // any EPROM selected, active high
  output logic        read_n,      // read buffer enable, active low
  output logic        write_n      // write buffer enable, active low
);
  logic       rom_en_n;
  logic [3:0] rom_y_n;
  logic [3:0] buf_y_n;

  assign ram_sel   = !addr[15] && vma;
  assign bank1_sel = addr[14];

  assign rom_en_n = !(addr[15] && addr[14] && addr[13] && vma);
  dec2to4_n u_rom (.en_n(rom_en_n), .a0(addr[11]), .a1(addr[12]), .y_n(rom_y_n));

  always_comb begin
    eprom_cs_n[0] = rom_y_n[0] || !eprom_fit[0];
    eprom_cs_n[1] = (eprom1_full ? rom_y_n[1] : (rom_y_n[1] || addr[10])) || !eprom_fit[1];
    eprom_cs_n[2] = rom_y_n[2] || !eprom_fit[2];
    eprom_cs_n[3] = rom_y_n[3] || !eprom_fit[3];
  end

  assign eprom_sel = !(&eprom_cs_n);

  dec2to4_n u_buf (.en_n(!(ram_sel || eprom_sel)), .a0(rw), .a1(1'b0), .y_n(buf_y_n));
  assign write_n = buf_y_n[0];
  assign read_n  = buf_y_n[1];
endmodule
