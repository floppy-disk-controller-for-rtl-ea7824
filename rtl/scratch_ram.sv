// scratch_ram -- 256 x 8 static scratch-pad RAM of the controller module.
//
// Occupies EF00-EFFF and is shared by the monitor, the disk firmware and the
// operating system. On the board it is built from two 256 x 4 static RAM
// chips; here it is one 256 x 8 array. Write: on the falling edge of the
// bus E (phi2) clock while selected with R/W low, at the end of the cycle as
// the M6800 bus defines. Read: asynchronous, data valid while selected with
// R/W high. The clocking point and the asynchronous read are choices of
// this model.
`timescale 1ns / 1ps
module scratch_ram #(
  parameter int unsigned DEPTH = 256,  // bytes
  parameter int unsigned AW    = 8
) (
  input  logic          e_clk,   // bus E / phi2 clock
  input  logic          cs_n,    // chip select, active low
  input  logic          rw,      // 1 = read, 0 = write
  input  logic [AW-1:0] addr,    // A7-A0
  input  logic [7:0]    wdata,   // data from the internal bus
  output logic [7:0]    rdata    // data to the internal bus
);
  logic [7:0] mem [DEPTH];

  always_ff @(negedge e_clk)
    if (!cs_n && !rw) mem[addr] <= wdata;

  assign rdata = mem[addr];
endmodule
