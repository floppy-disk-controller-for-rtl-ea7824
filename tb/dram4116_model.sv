// dram4116_model -- behavioural model of one bank of eight 16K x 1 dynamic
// RAMs (4116 type), seen as 16K x 8, for testbenches only.
//
// RAS falling latches the 7-bit row and refreshes that row; CAS falling
// while RAS is low latches the column and writes din when we_n is low;
// dout shows the addressed byte while CAS is low. A row not refreshed for
// T_REF (2 ms) loses its contents (reads return inverted data). Timing
// rules checked and counted in 'violations': RAS precharge >= 120 ns,
// RAS low >= 200 ns, CAS only while RAS is low, RAS-to-CAS >= 25 ns and
// the row address held >= 25 ns after RAS falls.
`timescale 1ns / 1ps
module dram4116_model #(
  parameter realtime T_REF = 2ms
) (
  input  logic       ras_n,
  input  logic       cas_n,
  input  logic [6:0] addr,
  input  logic       we_n,
  input  logic [7:0] din,
  output logic [7:0] dout
);
  logic [7:0] mem [16384];
  realtime    last_ref [128];
  logic [6:0] row, col;
  realtime    t_ras_fall, t_ras_rise;
  int         violations = 0;
  int         refreshes = 0;
  realtime    max_age = 0;

  initial begin
    foreach (last_ref[i]) last_ref[i] = 0;
    foreach (mem[i]) mem[i] = 8'h00;
    t_ras_fall = 0;
    t_ras_rise = 0;
  end

  always @(negedge ras_n) begin
    if ($realtime - t_ras_rise < 120.0 && $realtime > 1000.0) violations++;
    t_ras_fall = $realtime;
    row = addr;
    if ($realtime - last_ref[addr] > max_age && $realtime > 0.0) max_age = $realtime - last_ref[addr];
    if ($realtime - last_ref[addr] > T_REF)
      for (int c = 0; c < 128; c++) mem[{c[6:0], addr}] = ~mem[{c[6:0], addr}];
    last_ref[addr] = $realtime;
    refreshes++;
  end

  always @(posedge ras_n) begin
    if ($realtime - t_ras_fall < 200.0 && $realtime > 1000.0) violations++;
    t_ras_rise = $realtime;
  end

  // Row address hold after RAS falls.
  always @(addr) if (!ras_n && $realtime - t_ras_fall < 25.0 && $realtime > 1000.0) violations++;

  always @(negedge cas_n) begin
    if (ras_n) violations++;
    if ($realtime - t_ras_fall < 25.0) violations++;
    col = addr;
    if (!we_n) mem[{col, row}] = din;
  end

  assign dout = mem[{col, row}];
endmodule
