// pll_vco -- behavioural model of the analog part of the data recovery
// phase-locked loop: charge pump, active loop filter and varactor-tuned VCO.
// This is not synthesizable logic; it exists so that the digital loop can be
// simulated closed.
//
// Charge pump: while pump-up (pu_n low) is active the error voltage is
// +V_PUMP, while pump-down (pd_n low) is active it is -V_PUMP, otherwise 0
// (high impedance, no change). V_PUMP is 0.75 V, one base-emitter drop,
// which with a +-2 pi phase range gives the detector gain of about
// 0.12 V/rad.
// Loop filter: op-amp integrator with input resistor R1 and feedback R2 in
// series with C, transfer (1 + s T1) / (s T2) with T1 = R2 C and
// T2 = R1 C. Values R1 = 1.8 kohm, R2 = 820 ohm, C = 0.01 uF give a natural
// frequency near 7.3e4 rad/s and a damping of about 0.3, chosen for lock
// within six byte times.
// VCO: f = F_CENTER + KV * v, KV = 2 MHz/V (12.5e6 rad/s/V), clamped to the
// 7-9 MHz swing.
// The filter state is integrated every STEP_NS nanoseconds; the output is a
// square wave whose half period is recomputed at every edge. Lint notes a
// delay that a synthesis tool would drop; that is the point of a model.
`timescale 1ns / 1ps
module pll_vco #(
  parameter real F_CENTER_HZ = 8.0e6,
  parameter real KV_HZ_PER_V = 2.0e6,
  parameter real V_PUMP      = 0.75,
  parameter real R1_OHM      = 1800.0,
  parameter real R2_OHM      = 820.0,
  parameter real C_FARAD     = 1.0e-8,
  parameter real F_MIN_HZ    = 7.0e6,
  parameter real F_MAX_HZ    = 9.0e6,
  parameter real STEP_NS     = 2.0,
  parameter real F_START_HZ  = 8.0e6   // frequency at time zero
) (
  input  logic pu_n,     // pump up, active low (UF)
  input  logic pd_n,     // pump down, active low (DF)
  output logic vco_out,  // oscillator output
  output real  freq_hz   // present VCO frequency, for observation
);
  real v_int;   // integrator (capacitor) voltage
  real v_err;
  real v_ctl;

  initial begin
    v_int   = (F_START_HZ - F_CENTER_HZ) / KV_HZ_PER_V;
    v_ctl   = v_int;
    freq_hz = F_START_HZ;
    vco_out = 1'b0;
  end

  // Charge pump and loop filter.
  always begin
    #(STEP_NS);
    if (!pu_n && pd_n)      v_err = V_PUMP;
    else if (!pd_n && pu_n) v_err = -V_PUMP;
    else                    v_err = 0.0;
    v_int   = v_int + v_err * (STEP_NS * 1.0e-9) / (R1_OHM * C_FARAD);
    v_ctl   = v_int + v_err * R2_OHM / R1_OHM;
    freq_hz = F_CENTER_HZ + KV_HZ_PER_V * v_ctl;
    if (freq_hz < F_MIN_HZ) freq_hz = F_MIN_HZ;
    if (freq_hz > F_MAX_HZ) freq_hz = F_MAX_HZ;
  end

  // Oscillator.
  always begin
    #(0.5e9 / freq_hz);
    vco_out = !vco_out;
  end
endmodule
