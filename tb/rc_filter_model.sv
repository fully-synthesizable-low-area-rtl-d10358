// rc_filter_model: behavioural model of the first-order passive RC
// reconstruction filter that follows the DDPM DAC output (simulation only).
//
// The digital output drives a series resistor R into a capacitor C to ground,
// so between two edges of vin the output relaxes exponentially towards 0 or
// VDD with time constant tau = R*C. The model is event driven and exact for
// an ideal square input: on every change of vin it advances the capacitor
// voltage and the running time integral of the output in closed form. The
// reference values are a 400 kOhm resistor and a 5 pF capacitor
// (tau = 2 us).
//
// The output driver is modelled as a pure delay that may differ for rising
// (T_RISE_NS) and falling (T_FALL_NS) edges. With T_FALL_NS > T_RISE_NS
// every pulse of ones is widened by the difference, so the error grows with
// the number of rising/falling edge pairs in a frame. This is the source of
// the dual-slope gain error that the input calibration corrects. With both
// delays 0 (the default) the driver is ideal.
//
// Use: call vout_now() for the present output voltage and integral_now() for
// the integral of the output since time 0, in V*ns; the mean output over a
// window is the difference of two integrals divided by the window length.
`timescale 1ns/1ps
module rc_filter_model #(
  parameter real R_OHM = 400.0e3,
  parameter real C_F   = 5.0e-12,
  parameter real VDD   = 1.0,
  parameter real T_RISE_NS = 0.0,
  parameter real T_FALL_NS = 0.0
) (
  input logic vin
);
  localparam real TAU_NS = R_OHM * C_F * 1.0e9;

  real v0    = 0.0;   // capacitor voltage at t0
  real u     = 0.0;   // level driven since t0
  real t0    = 0.0;
  real integ = 0.0;   // integral of the output up to t0

  function automatic real vout_now();
    real dt = $realtime - t0;
    return u + (v0 - u) * $exp(-dt / TAU_NS);
  endfunction

  function automatic real integral_now();
    real dt = $realtime - t0;
    return integ + u * dt + (v0 - u) * TAU_NS * (1.0 - $exp(-dt / TAU_NS));
  endfunction

  function automatic void drive(input logic level);
    integ = integral_now();
    v0    = vout_now();
    t0    = $realtime;
    u     = level ? VDD : 0.0;
  endfunction

  // Driver: each edge of vin reaches the filter after its own delay.
  logic vd = 1'b0;
  always @(posedge vin) vd <= #(T_RISE_NS) 1'b1;
  always @(negedge vin) vd <= #(T_FALL_NS) 1'b0;

  always @(vd) drive(vd);
endmodule
