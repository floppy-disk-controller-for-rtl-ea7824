// phase_detector -- the two phase detectors of an MC4044 phase/frequency
// detector, as used in the data recovery loop.
//
// Detector #1 is sequential and responds only to the negative transitions of
// its inputs R (reference) and V (variable/feedback), so its output does not
// depend on duty cycle. A falling edge of R that comes before the matching
// falling edge of V drives U1 low ("pump up") until V falls; a falling edge
// of V that leads drives D1 low ("pump down") until R falls. When the two
// edges coincide both outputs stay high: the lock state. U1 and D1 are never
// low together. This is modelled as the usual pair of edge-set flags that
// clear each other; the chip's cross-coupled gate network is asynchronous,
// while here the inputs are sampled on clk, which must be at least as fast
// as the fastest input edge (the VCO clock that also clocks the counters
// producing R and V is used in this design).
//
// Detector #2 is combinational and follows the truth table of the chip:
//   R V | U2 D2
//   0 0 |  1  1
//   0 1 |  1  1
//   1 0 |  0  1
//   1 1 |  1  0
//
// Timing: U1/D1 change one clk edge after the sampled edge of R or V.
`timescale 1ns / 1ps
module phase_detector
  import fdc_pkg::*;
(
  input  logic      clk,     // sampling clock (VCO)
  input  logic      rst,     // synchronous reset to the lock state
  input  logic      r,       // reference input (pin 1)
  input  logic      v,       // variable input (pin 3)
  output logic      u1_n,    // detector #1 pump up, active low (pin 13)
  output logic      d1_n,    // detector #1 pump down, active low (pin 2)
  output logic      u2_n,    // detector #2 output U2 (pin 12)
  output logic      d2_n,    // detector #2 output D2 (pin 6)
  output pd_state_e state    // detector #1 state, for observation
);
  logic r_q, v_q;
  logic r_fall, v_fall;
  logic up_f, dn_f;

  assign r_fall = r_q && !r;
  assign v_fall = v_q && !v;

  always_ff @(posedge clk) begin
    if (rst) begin
      r_q  <= 1'b0;
      v_q  <= 1'b0;
      up_f <= 1'b0;
      dn_f <= 1'b0;
    end else begin
      r_q <= r;
      v_q <= v;
      // A flag sets on its input's falling edge; when both would be set,
      // both clear (lock).
      if ((up_f || r_fall) && (dn_f || v_fall)) begin
        up_f <= 1'b0;
        dn_f <= 1'b0;
      end else begin
        up_f <= up_f || r_fall;
        dn_f <= dn_f || v_fall;
      end
    end
  end

  assign u1_n  = !up_f;
  assign d1_n  = !dn_f;
  assign state = up_f ? PD_UP : (dn_f ? PD_DOWN : PD_LOCK);

  // Detector #2: combinational.
  assign u2_n = !(r && !v);
  assign d2_n = !(r && v);

  // Detector #1 never asserts both outputs.
  a_not_both: assert property (@(posedge clk) disable iff (rst) !(up_f && dn_f));
endmodule
