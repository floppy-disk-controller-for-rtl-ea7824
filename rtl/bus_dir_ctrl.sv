// bus_dir_ctrl -- direction control of the controller module's data buffers.
//
// The module's bidirectional data buffers sit between the MPU bus and the
// internal data bus. dir = 0 drives data out to the MPU (a read), dir = 1
// lets data in (a write, or nothing selected, which is the idle state).
// Five internal nodes named as in the circuit:
//   A = FDC selected or TxAK active         C = PIA or RAM selected
//   B = R/W while TxAK inactive             D = NOT (A AND FDC BD)
//   E = NOT (B AND C)                       dir = D AND E
// So with nothing selected dir = 1; PIA or RAM selected gives dir = NOT R/W;
// FDC selected gives dir = NOT BD (BD equals R/W outside DMA); during a DMA
// acknowledge, BD is the inverse of R/W and dir follows R/W, as if the FDC
// were the bus master. Node equations are derived from the node values the
// design states for each case. Purely combinational.
`timescale 1ns / 1ps
module bus_dir_ctrl (
  input  logic rw,        // MPU R/W, 1 = read
  input  logic fdc_bd,    // FDC bus direction output, 1 = FDC drives the bus
  input  logic txak_n,    // FDC DMA transmit acknowledge, active low
  input  logic fdc_cs_n,  // FDC select, active low
  input  logic pia_cs_n,  // PIA select, active low
  input  logic ram_cs_n,  // scratch-pad RAM select, active low
  output logic dir        // 0 = data out (read), 1 = data in (write/idle)
);
  logic a, b, c, d, e;
  always_comb begin
    a   = !(fdc_cs_n && txak_n);
    c   = !(pia_cs_n && ram_cs_n);
    b   = rw && txak_n;
    d   = !(a && fdc_bd);
    e   = !(b && c);
    dir = d && e;
  end
endmodule
