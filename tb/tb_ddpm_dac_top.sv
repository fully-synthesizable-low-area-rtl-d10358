// tb_ddpm_dac_top: end-to-end testbench of the DDPM DAC at its default
// (12-bit) parameters, with the RC reconstruction filter modelled.
//
// The input clock runs at 225 MHz (4.444 ns). A driver feeds a code on every sample
// request; a checker, on the falling edges of the modulator clock, closes
// each conversion frame and checks
//   * its length in modulator cycles (2^(N-h)) and in input-clock time
//     (2^(N-h) * 2^cfg input periods, i.e. 55 kS/s at full resolution),
//   * the number of ones in the stream, which must equal the calibrated and
//     truncated code (reference computed in floating point in this file),
//   * once a code has been held for ten filter time constants, the mean
//     filter output over a frame against VDD * code / 2^(N-h), within half a
//     12-bit LSB.
// Operating points: nominal (h=0, cfg=0), calibration with two gain/offset
// regions and clamping, clock-scaled (h=2, cfg=2: 10 bits at the same sample
// rate), rate-scaled (h=0, cfg=2: 12 bits at a quarter of the rate) and the
// 1-bit extreme (h=11). It counts how often each mechanism happened (resolution
// change, clock-division change, each calibration region, clamping, scaled
// frames) and counts a failure for any that never did.
`timescale 1ns/1ps
module tb_ddpm_dac_top;
  localparam int N = 12, GW = 16, GF = 14, OW = N + GW + 1, HW = 4, CW = 4;
  localparam realtime TIN = 4.444;   // 225 MHz input clock (4.444 ns)
  localparam real VDD = 1.0;

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

  rc_filter_model #(.VDD(VDD)) u_rc (.vin(dac_out));

  initial begin : watchdog
    #(TIN * 1_500_000);
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

  // ---- reference model of the calibration (floating point) ----
  function automatic int cal_ref(input int d, output bit sat, output bit upper);
    real scale = real'(1 << GF);
    real g, o, v;
    upper = (d >= (1 << (N - 1)));
    g = upper ? real'(gain1) / scale : real'(gain0) / scale;
    o = upper ? real'(off1) / scale  : real'(off0) / scale;
    v = $floor(g * d + o + 0.5);
    sat = (v < 0.0) || (v > real'((1 << N) - 1));
    return (v < 0.0) ? 0 : (v > real'((1 << N) - 1)) ? (1 << N) - 1 : int'(v);
  endfunction

  // ---- mechanism counters ----
  int n_h_change = 0, n_cfg_change = 0, n_region0 = 0, n_region1 = 0;
  int n_sat = 0, n_scaled_frames = 0, n_analog = 0, n_frames = 0;

  // ---- driver / checker ----
  int  want_code = 0, want_h = 0;
  int  hold = 0;                 // frames completed with the same code and h
  int  n_settled = 0;            // analog checks made for the current code
  realtime t_change = 0;         // when the current code / h started
  localparam realtime SETTLE = 10.0 * 2000.0;   // ten filter time constants
  longint npos = 0;              // modulator edges since reset
  int  h_eff = 0;                // resolution setting in force
  int  fr_h = 0, fr_eff = 0, fr_code = 0;
  bit  fr_valid = 1'b0;
  int  ones = 0, mcyc = 0;
  realtime fr_t0 = 0;
  real fr_i0 = 0.0;
  int  fr_cfg = 0;
  bit  cfg_stable = 1'b0;
  int  last_cfg_active = 0;

  always @(posedge mod_clk) if (rst_n) npos++;

  always @(cfg_active) begin
    if (rst_n && int'(cfg_active) != last_cfg_active) begin
      n_cfg_change++;
      cfg_stable = 1'b0;
      t_change = $realtime;   // bit durations changed: let the filter settle
      n_settled = 0;
    end
    last_cfg_active = int'(cfg_active);
  end

  always @(negedge mod_clk) if (rst_n) begin
    ones += int'(dac_out);
    mcyc++;
    if (sample_req) begin
      // close the running frame
      if (fr_valid) begin
        automatic int len = 1 << (N - fr_h);
        n_frames++;
        check(mcyc == len, $sformatf("frame length %0d, expected %0d", mcyc, len));
        check(ones == fr_eff, $sformatf("ones %0d, expected %0d (code %0d h %0d)", ones, fr_eff, fr_code, fr_h));
        if (cfg_stable && fr_cfg == int'(cfg_active)) begin
          automatic realtime expect_t = TIN * real'(len) * real'(1 << fr_cfg);
          automatic realtime dt = $realtime - fr_t0;
          check(dt > expect_t - 0.01 && dt < expect_t + 0.01,
                $sformatf("sample period %0t, expected %0t", dt, expect_t));
        end
        if (fr_h > 0) n_scaled_frames++;
        hold++;
        if (hold >= 1 && fr_t0 - t_change >= SETTLE && cfg_stable && fr_cfg == int'(cfg_active)) begin
          automatic real mean = (u_rc.integral_now() - fr_i0) / ($realtime - fr_t0);
          automatic real expect_v = VDD * real'(fr_eff) / real'(1 << (N - fr_h));
          n_analog++;
          n_settled++;
          check(mean > expect_v - VDD / 8192.0 && mean < expect_v + VDD / 8192.0,
                $sformatf("filter mean %f V, expected %f V (code %0d h %0d cfg %0d)", mean, expect_v, fr_code, fr_h, fr_cfg));
        end
      end
      // start the next frame
      begin
        bit s, up;
        automatic int c, hprev = h_eff;
        if (npos % (1 << N) == 0) h_eff = want_h;
        if (h_eff != hprev) n_h_change++;
        c = cal_ref(want_code, s, up);
        if (want_code != fr_code || h_eff != fr_h) begin
          hold = 0;
          n_settled = 0;
          t_change = $realtime;
        end
        if (s) n_sat++;
        if (up) n_region1++; else n_region0++;
        din     = N'(want_code);
        h       = HW'(want_h);
        fr_code = want_code;
        fr_h    = h_eff;
        fr_eff  = c >> h_eff;
        fr_cfg  = int'(cfg_active);
        cfg_stable = 1'b1;
        fr_valid = 1'b1;
        ones = 0;
        mcyc = 0;
        fr_t0 = $realtime;
        fr_i0 = u_rc.integral_now();
      end
    end
  end

  // Hold a code until the filter has settled and two frames were checked.
  task automatic convert(input int code, input int hh);
    want_code = code;
    want_h    = hh;
    @(negedge mod_clk);
    wait (n_settled >= 2 && fr_code == code && fr_h == hh);
    @(negedge mod_clk);
  endtask

  task automatic set_cfg(input int k);
    cfg = CW'(k);
    wait (int'(cfg_active) == k);
  endtask

  initial begin
    repeat (4) @(negedge clk_in);
    rst_n = 1'b1;
    // nominal: 12 bits, 225 MHz, 55 kS/s
    convert(0, 0);
    convert(1, 0);
    convert(2048, 0);
    convert(3000, 0);
    convert(4095, 0);
    convert(int'($urandom_range(0, 4095)), 0);
    // two-region calibration, continuous at mid-scale, upper region clamps
    gain0 = GW'(int'(1.02 * 16384.0));
    off0  = OW'(int'($floor(2048.0 * (1.0 - real'(gain0) / 16384.0) * 16384.0 + 0.5)));
    gain1 = GW'(int'(1.05 * 16384.0));
    off1  = OW'(int'($floor(2048.0 * (1.0 - real'(gain1) / 16384.0) * 16384.0 + 0.5)));
    convert(1000, 0);
    convert(3000, 0);
    convert(4095, 0);
    gain0 = GW'(1 << GF); gain1 = GW'(1 << GF); off0 = '0; off1 = '0;
    // clock-scaled: 10 bits at the same 55 kS/s, clock / 4
    set_cfg(2);
    convert(32'h2D8 << 2, 2);
    convert(32'h3FF << 2, 2);
    // rate-scaled: 12 bits at a quarter of the sample rate
    convert(1234, 0);
    // 1-bit extreme at the full clock
    set_cfg(0);
    convert(32'h800, 11);
    convert(0, 11);
    convert(777, 0);

    check(n_h_change > 0,      "resolution change never happened");
    check(n_cfg_change > 0,    "clock-division change never happened");
    check(n_region0 > 0,       "lower calibration region never used");
    check(n_region1 > 0,       "upper calibration region never used");
    check(n_sat > 0,           "calibration clamp never happened");
    check(n_scaled_frames > 0, "no reduced-resolution frame");
    check(n_analog > 0,        "no analog check");
    $display("frames %0d, analog checks %0d, h changes %0d, cfg changes %0d, region0 %0d, region1 %0d, clamps %0d, scaled frames %0d",
             n_frames, n_analog, n_h_change, n_cfg_change, n_region0, n_region1, n_sat, n_scaled_frames);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
