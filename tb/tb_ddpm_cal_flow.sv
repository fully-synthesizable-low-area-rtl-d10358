// tb_ddpm_cal_flow: the two-region calibration procedure run end to end on a
// converter whose output driver has unequal rise and fall delays.
//
// The RC filter model delays falling edges 10 ps more than rising ones, so
// each pulse of ones is 10 ps too long. Below mid-scale a frame holds D
// isolated ones, above mid-scale 2^N - D isolated zeros: the transfer curve has
// slope (1 + e) below and (1 - e) above mid-scale (e = 10 ps / T_clk), about
// 4.6 LSB of error at mid-scale.
// Procedure, with the calibration first set to unity:
//   1. measure the mean output at mid-scale and full scale,
//   2. GAIN0 = LSB / (V(2^(N-1)) / 2^(N-1)),
//      GAIN1 = LSB / ((V(2^N-1) - V(2^(N-1))) / (2^(N-1) - 1)),
//      OFFx = 2^(N-1) - GAINx * 2^(N-1),
//   3. measure the transfer curve every 128 codes before and after
//      calibration and fit a straight line to each (codes 256 .. 3840, away
//      from clamping).
// The uncalibrated curve must show more than 1 LSB of integral nonlinearity
// (the effect is present), the calibrated one less than 0.75 LSB and less than
// half the uncalibrated value. Each measurement is the mean filter output over
// one frame, taken after three frames of settling.
`timescale 1ns/1ps
module tb_ddpm_cal_flow;
  localparam int N = 12, GW = 16, GF = 14, OW = N + GW + 1, HW = 4, CW = 4;
  localparam realtime TIN = 4.444;
  localparam real VDD = 1.0;
  localparam real LSB = VDD / 4096.0;
  localparam int NPTS = 33;

  logic clk_in = 1'b0, rst_n = 1'b0;
  logic [CW-1:0] cfg = '0;
  logic [N-1:0] din = '0;
  logic [HW-1:0] h = '0;
  logic [GW-1:0] gain0 = GW'(1 << GF), gain1 = GW'(1 << GF);
  logic signed [OW-1:0] off0 = '0, off1 = '0;
  logic [CW-1:0] cfg_active;
  logic mod_clk, sample_req, cal_sat, dac_out;

  int checks = 0, failures = 0;

  always #(TIN / 2.0) clk_in = ~clk_in;

  ddpm_dac_top dut (
    .clk_in(clk_in), .rst_n(rst_n), .cfg(cfg), .din(din), .h(h),
    .gain0(gain0), .off0(off0), .gain1(gain1), .off1(off1),
    .cfg_active(cfg_active), .mod_clk(mod_clk), .sample_req(sample_req),
    .cal_sat(cal_sat), .dac_out(dac_out));

  rc_filter_model #(.VDD(VDD), .T_RISE_NS(0.100), .T_FALL_NS(0.110)) u_rc (.vin(dac_out));

  initial begin : watchdog
    #(TIN * 3_000_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // ---- code driver and frame-mean capture ----
  int      want = 0;
  bit      take = 1'b0;
  int      windows = 0;
  realtime w_t0 = 0;
  real     w_i0 = 0.0;
  real     last_mean = 0.0;

  always @(negedge mod_clk) if (rst_n) begin
    take = sample_req;
    if (sample_req) din = N'(want);
  end

  always @(posedge mod_clk) if (rst_n && take) begin
    if (w_t0 > 0) last_mean = (u_rc.integral_now() - w_i0) / ($realtime - w_t0);
    w_t0 = $realtime;
    w_i0 = u_rc.integral_now();
    windows++;
  end

  task automatic measure(input int code, output real v);
    int start;
    want = code;
    start = windows;
    wait (windows >= start + 5);
    v = last_mean;
  endtask

  // Worst deviation from the least-squares line, in LSB of that line's slope.
  function automatic real inl_lsb(input real xs[NPTS], input real ys[NPTS]);
    real sx = 0, sy = 0, sxx = 0, sxy = 0, n = 0, a, b, worst = 0;
    for (int i = 0; i < NPTS; i++) if (xs[i] >= 256 && xs[i] <= 3840) begin
      sx += xs[i]; sy += ys[i]; sxx += xs[i] * xs[i]; sxy += xs[i] * ys[i]; n += 1;
    end
    b = (n * sxy - sx * sy) / (n * sxx - sx * sx);
    a = (sy - b * sx) / n;
    for (int i = 0; i < NPTS; i++) if (xs[i] >= 256 && xs[i] <= 3840) begin
      real d = (ys[i] - (a + b * xs[i])) / b;
      if (d < 0) d = -d;
      if (d > worst) worst = d;
    end
    return worst;
  endfunction

  real xs[NPTS], v_raw[NPTS], v_cal[NPTS];
  real v_mid, v_top, g0, g1, o0, o1, inl_raw, inl_cal;
  int  n_sat = 0;

  always @(posedge mod_clk) if (cal_sat) n_sat++;

  initial begin
    repeat (4) @(negedge clk_in);
    rst_n = 1'b1;
    // 1. uncalibrated curve and the two calibration points
    for (int i = 0; i < NPTS; i++) begin
      xs[i] = (i == NPTS - 1) ? 4095.0 : real'(i * 128);
      measure(int'(xs[i]), v_raw[i]);
    end
    measure(2048, v_mid);
    measure(4095, v_top);
    check(v_mid > 2048.0 * LSB, "mid-scale reads high with longer pulses");
    // 2. coefficients
    g0 = LSB / (v_mid / 2048.0);
    g1 = LSB / ((v_top - v_mid) / 2047.0);
    o0 = 2048.0 - g0 * 2048.0;
    o1 = 2048.0 - g1 * 2048.0;
    gain0 = GW'(int'($floor(g0 * 16384.0 + 0.5)));
    gain1 = GW'(int'($floor(g1 * 16384.0 + 0.5)));
    off0  = OW'(int'($floor(o0 * 16384.0 + 0.5)));
    off1  = OW'(int'($floor(o1 * 16384.0 + 0.5)));
    $display("GAIN0 %f OFF0 %f GAIN1 %f OFF1 %f", g0, o0, g1, o1);
    check(g0 < 1.0 && g1 > 1.0, "gains correct the two slopes in opposite directions");
    // 3. calibrated curve
    for (int i = 0; i < NPTS; i++) measure(int'(xs[i]), v_cal[i]);
    inl_raw = inl_lsb(xs, v_raw);
    inl_cal = inl_lsb(xs, v_cal);
    $display("INL uncalibrated %f LSB, calibrated %f LSB", inl_raw, inl_cal);
    check(inl_raw > 1.0, "dual-slope error visible before calibration");
    check(inl_cal < 0.75, $sformatf("calibrated INL %f LSB", inl_cal));
    check(inl_cal < inl_raw / 2.0, "calibration halves the INL at least");
    // mid-scale is a fixed point of the correction
    check((v_cal[16] - v_raw[16]) < 0.5 * LSB && (v_raw[16] - v_cal[16]) < 0.5 * LSB,
          "mid-scale unchanged by calibration");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
