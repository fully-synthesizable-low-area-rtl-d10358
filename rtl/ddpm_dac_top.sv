// ddpm_dac_top: digital core of the fully synthesizable DDPM digital-to-analog
// converter (12-bit reference configuration).
//
// Signal flow: din -> input pre-calibration (per-half gain and offset) ->
// DDPM modulator -> dac_out. dac_out is a one-bit stream that a first-order
// RC low-pass filter outside this module turns into the analog voltage
// VDD * D / 2^N (with D the calibrated code). The modulator runs on mod_clk,
// which the clock divider derives from clk_in as clk_in / 2^cfg.
//
// Operating points, with f_in the input clock:
//   nominal         h = 0, cfg = 0: N bits, f_in / 2^N samples per second
//   clock-scaled    h = k, cfg = k: N-k bits, same sample rate, lower power
//   rate-scaled     h = 0, cfg = k: N bits, sample rate divided by 2^k
// In the reference configuration f_in = 225 MHz gives 55 kS/s at 12 bits.
//
// Interface and timing:
//   clk_in, rst_n   input clock (on chip it comes from a ring oscillator) and
//                   active-low asynchronous reset.
//   cfg             clock division exponent, applied glitch-free within
//                   2^(N-1) clk_in cycles; cfg_active shows the value in use.
//   din, h          code and resolution setting, in the mod_clk domain: both
//                   are sampled on the rising mod_clk edge that ends a cycle in
//                   which sample_req is 1. With h > 0 the code's h LSBs are
//                   dropped after calibration (din is MSB-justified).
//   gain0/off0,     calibration coefficients for codes below / from mid-scale;
//   gain1/off1      gain 1.0 = 2^GF, offsets in units of 2^-GF LSB.
//   cal_sat         the calibrated code was clamped to the code range.
//   mod_clk         the modulator clock, for a driver that feeds din.
//   dac_out         DDPM stream to the output driver and RC filter.
// Putting the calibration in front of the modulator follows the published
// calibration scheme; the coefficient formats are this design's choice.
module ddpm_dac_top #(
  parameter int unsigned N      = ddpm_pkg::DDPM_N,
  parameter int unsigned STAGES = N - 1,
  parameter int unsigned GW     = ddpm_pkg::DDPM_GAIN_W,
  parameter int unsigned GF     = ddpm_pkg::DDPM_GAIN_FRAC,
  parameter int unsigned HW     = ddpm_pkg::sel_width(N),
  parameter int unsigned CW     = ddpm_pkg::sel_width(STAGES + 1),
  parameter int unsigned OW     = N + GW + 1
) (
  input  logic                 clk_in,
  input  logic                 rst_n,
  input  logic [CW-1:0]        cfg,
  input  logic [N-1:0]         din,
  input  logic [HW-1:0]        h,
  input  logic [GW-1:0]        gain0,
  input  logic signed [OW-1:0] off0,
  input  logic [GW-1:0]        gain1,
  input  logic signed [OW-1:0] off1,
  output logic [CW-1:0]        cfg_active,
  output logic                 mod_clk,
  output logic                 sample_req,
  output logic                 cal_sat,
  output logic                 dac_out
);

  logic [N-1:0] dcal;

  ddpm_clk_div #(.STAGES(STAGES), .CW(CW)) u_clk_div (
    .clk_in     (clk_in),
    .rst_n      (rst_n),
    .cfg        (cfg),
    .cfg_active (cfg_active),
    .clk_out    (mod_clk)
  );

  ddpm_input_cal #(.N(N), .GW(GW), .GF(GF), .OW(OW)) u_cal (
    .din   (din),
    .gain0 (gain0),
    .off0  (off0),
    .gain1 (gain1),
    .off1  (off1),
    .dcal  (dcal),
    .sat   (cal_sat)
  );

  ddpm_modulator #(.N(N), .HW(HW)) u_mod (
    .clk        (mod_clk),
    .rst_n      (rst_n),
    .din        (dcal),
    .h          (h),
    .sample_req (sample_req),
    .dout       (dac_out)
  );

endmodule
