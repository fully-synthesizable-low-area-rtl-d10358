// ddpm_pkg: constants shared by the DDPM (Dyadic Digital Pulse Modulation) DAC.
//
// DDPM_N is the converter resolution of the reference configuration (12 bits,
// 2^12 = 4096 clock cycles per conversion). The clock divider has N-1 stages so
// that the clock can be slowed by any 2^h, h = 0..N-1, matching the range of
// the resolution setting. The calibration word formats (gain as an unsigned
// fixed-point number with DDPM_GAIN_FRAC fraction bits) are this design's own
// choice; the algorithm only asks for a gain and an offset per code half.
package ddpm_pkg;

  // Resolution of the converter in bits.
  localparam int unsigned DDPM_N = 12;

  // Number of divide-by-two stages of the clock divider.
  localparam int unsigned DDPM_DIV_STAGES = DDPM_N - 1;

  // Calibration gain: unsigned, GAIN_W bits with GAIN_FRAC fraction bits
  // (1.0 = 2^GAIN_FRAC, range 0 .. just under 4.0).
  localparam int unsigned DDPM_GAIN_W    = 16;
  localparam int unsigned DDPM_GAIN_FRAC = 14;

  // Width of a control field able to hold the values 0 .. n-1 (at least 1 bit).
  function automatic int unsigned sel_width(int unsigned n);
    return (n > 1) ? $clog2(n) : 1;
  endfunction

endpackage
