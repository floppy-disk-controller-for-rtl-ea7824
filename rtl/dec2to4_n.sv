// dec2to4_n -- one half of a dual 2-to-4 line decoder (LS139 type).
//
// All outputs are high while the active-low enable is high. When enabled,
// output y_n[{a1,a0}] goes low and the other three stay high, as in the
// LS139 truth table. Purely combinational; used for every address decoder
// in the controller and memory modules.
`timescale 1ns / 1ps
module dec2to4_n (
  input  logic       en_n,   // active-low enable
  input  logic       a0,     // select, least significant
  input  logic       a1,     // select, most significant
  output logic [3:0] y_n     // active-low outputs Y0..Y3
);
  always_comb begin
    y_n = 4'b1111;
    if (!en_n) y_n[{a1, a0}] = 1'b0;
  end
endmodule
