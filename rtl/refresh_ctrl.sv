// refresh_ctrl -- hidden refresh and address multiplexing for two banks of
// 16K x 1 dynamic RAMs (4116 type) on an M6800 bus.
//
// The M6800 transfers data only while phi2 is high, so every phi1 half
// cycle (phi2 low) is free for a RAS-only refresh cycle. The controller
// refreshes one row in every phi1: on each falling edge of phi2 the 7-bit
// refresh counter advances, the refresh address replaces the CPU address on
// the RAM address lines, RAS goes high for the precharge time and then low
// again to latch the refresh row. All 128 rows are therefore refreshed
// every 128 bus cycles (128 us at 1 MHz), well inside the 2 ms the 4116
// needs, and no CPU cycle is ever lost.
//
// phi2 half cycle: the CPU address drives the RAM through a 14-to-7
// selector, row = A6-A0, column = A13-A7. If RAM SELECT was high at the
// rising edge of phi2, RAS is precharged again, falls with the CPU row
// address, the selector line S then switches to the column address and the
// CAS of the bank chosen by A14 falls until phi2 falls. RAS is common to
// both banks, so the bank not accessed sees a RAS-only cycle. If the RAM is
// not selected, RAS simply stays low from the refresh through phi2 and no
// CAS occurs ("refresh only" cycle).
//
// On the board the precharge, S and CAS delays come from flip-flops wired
// as monostables and RC-delayed gates. Here they are counts of a fast timing
// clock clk (default 20 MHz, 50 ns): T_RP = 3 ticks (150 ns precharge,
// inside the 150-180 ns the design aims for), T_S = 1 tick of row address
// hold before S, T_CAS = 1 tick from S to CAS. phi2 is sampled on clk, so
// all outputs lag phi2 by one clk period. These tick counts and the
// sampling are choices of this model.
`timescale 1ns / 1ps
module refresh_ctrl #(
  parameter int unsigned T_RP  = 3,   // RAS precharge, clk ticks
  parameter int unsigned T_S   = 1,   // RAS low to row/column switch, ticks
  parameter int unsigned T_CAS = 1    // S to CAS low, ticks
) (
  input  logic             clk,       // timing clock, much faster than phi2
  input  logic             rst,       // synchronous reset, active high
  input  logic             phi2,      // M6800 phase-2 clock
  input  logic             ram_sel,   // RAM SELECT (A15 low and VMA)
  input  logic             a14,       // bank select
  input  logic [13:0]      cpu_addr,  // A13-A0
  output logic             ras_n,     // row address strobe, both banks
  output logic [1:0]       cas_n,     // column address strobe per bank
  output logic [6:0]       dram_addr, // multiplexed RAM address
  output logic             s_col,     // selector: 1 = column address
  output logic             refresh,   // 1 while the refresh row is driven
  output logic [6:0]       row_cnt    // refresh counter
);
  localparam int unsigned TW = 8;

  logic          phi2_q;
  logic          in_phi2;     // 1 during the phi2 half as seen on clk
  logic          access;      // RAM selected in this phi2 half
  logic          bank;        // A14 latched at phi2 rise
  logic [TW-1:0] t;           // ticks since the last phi2 edge

  always_ff @(posedge clk) begin
    if (rst) begin
      phi2_q  <= 1'b0;
      in_phi2 <= 1'b0;
      access  <= 1'b0;
      bank    <= 1'b0;
      t       <= '0;
      row_cnt <= '0;
    end else begin
      phi2_q <= phi2;
      if (phi2 && !phi2_q) begin          // phi2 rises: CPU half
        in_phi2 <= 1'b1;
        access  <= ram_sel;
        bank    <= a14;
        t       <= '0;
      end else if (!phi2 && phi2_q) begin // phi2 falls: refresh half
        in_phi2 <= 1'b0;
        access  <= 1'b0;
        row_cnt <= row_cnt + 1'b1;
        t       <= '0;
      end else if (t != '1) begin
        t <= t + 1'b1;
      end
    end
  end

  always_comb begin
    refresh   = !in_phi2;
    // RAS high during precharge at the start of the refresh half and at the
    // start of an accessed phi2 half; low otherwise.
    ras_n     = (refresh || access) && (t < TW'(T_RP));
    s_col     = in_phi2 && access && (t >= TW'(T_RP + T_S));
    cas_n     = 2'b11;
    if (in_phi2 && access && (t >= TW'(T_RP + T_S + T_CAS)))
      cas_n[bank] = 1'b0;
    if (refresh)    dram_addr = row_cnt;
    else if (s_col) dram_addr = cpu_addr[13:7];
    else            dram_addr = cpu_addr[6:0];
  end

  // CAS never falls while RAS is high.
  a_cas_needs_ras: assert property (@(posedge clk) disable iff (rst) (cas_n != 2'b11) |-> !ras_n);
  // At most one bank's CAS at a time.
  a_one_cas: assert property (@(posedge clk) disable iff (rst) cas_n != 2'b00);
endmodule
