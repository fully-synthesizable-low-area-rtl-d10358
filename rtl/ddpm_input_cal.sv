// ddpm_input_cal: input pre-calibration that cancels the dual-slope gain error
// of the DDPM DAC.
//
// Why. Unequal rise and fall times of the output driver add an error per
// rising/falling edge pair. For codes below mid-scale each extra LSB adds an
// edge pair, above mid-scale each extra LSB removes one, so the transfer curve
// is piecewise linear with a kink at 2^(N-1). The correction applies its own
// gain and offset to each half:
//   dcal = GAIN0 * din + OFF0   when din[N-1] = 0
//   dcal = GAIN1 * din + OFF1   when din[N-1] = 1
// The half is chosen by a mux driven by the input MSB. With offsets chosen for
// continuity at mid-scale (OFFx = 2^(N-1) * (1 - GAINx)) both formulas give the
// same value at din = 2^(N-1), so which half owns that one code does not
// matter.
//
// Number formats (this design's choice): gains are unsigned with GF fraction
// bits (1.0 = 2^GF); offsets are signed two's complement in the same scale
// (one LSB of dcal = 2^GF). The sum is rounded to the nearest integer
// (half up) and clamped to 0 .. 2^N-1; sat flags a clamp.
//
// Timing: purely combinational; it sits in front of the modulator's sample
// register.
module ddpm_input_cal #(
  parameter int unsigned N  = ddpm_pkg::DDPM_N,
  parameter int unsigned GW = ddpm_pkg::DDPM_GAIN_W,
  parameter int unsigned GF = ddpm_pkg::DDPM_GAIN_FRAC,
  parameter int unsigned OW = N + GW + 1
) (
  input  logic [N-1:0]         din,
  input  logic [GW-1:0]        gain0,
  input  logic signed [OW-1:0] off0,
  input  logic [GW-1:0]        gain1,
  input  logic signed [OW-1:0] off1,
  output logic [N-1:0]         dcal,
  output logic                 sat
);

  localparam int unsigned SW = OW + 2;   // product and sum width, with headroom

  logic [GW-1:0]        gain;
  logic signed [OW-1:0] off;
  logic signed [SW-1:0] prod;
  logic signed [SW-1:0] sum;
  logic signed [SW-1:0] rounded;

  // Region mux driven by the MSB of the input code.
  assign gain = din[N-1] ? gain1 : gain0;
  assign off  = din[N-1] ? off1  : off0;

  always_comb begin
    prod    = $signed(SW'(gain) * SW'(din));
    sum     = prod + SW'(off);
    rounded = (sum + (SW'(1) <<< (GF - 1))) >>> GF;
    sat     = 1'b0;
    if (rounded < 0) begin
      dcal = '0;
      sat  = 1'b1;
    end else if (rounded > SW'((1 << N) - 1)) begin
      dcal = '1;
      sat  = 1'b1;
    end else begin
      dcal = rounded[N-1:0];
    end
  end

endmodule
