// tb_ddpm_sine_workload: dynamic test of the DDPM DAC with a full-swing sine
// (1 kHz, and 20.3 kHz, near the Nyquist frequency, at the nominal point),
// 3 ms of signal at each of the three operating points of the reference
// configuration
// (225 MHz input clock, RC filter 400 kOhm / 5 pF):
//   nominal        h = 0, cfg = 0: 12 bits at about 55 kS/s
//   clock-scaled   h = 2, cfg = 2: 10 bits at about 55 kS/s, clock / 4
//   rate-scaled    h = 0, cfg = 2: 12 bits at about 13.7 kS/s, clock / 4
// For every conversion the code is the sine sampled at the start of the
// frame. The mean of the filtered output over each frame (taken exactly from
// the filter model's integral) is collected, a sine of known frequency plus an
// offset is fitted by least squares, and the residual gives the SNDR. The
// ideal RTL is limited by quantization only, so the SNDR must be within 4 dB
// of 6.02*B + 1.76 dB (B = resolution in bits) and not above it by more than
// 6 dB. The digital stream is also checked frame by frame: its number of ones
// must equal the code and its length must be 2^(N-h) modulator cycles.
`timescale 1ns/1ps
module tb_ddpm_sine_workload;
  localparam int N = 12, GW = 16, GF = 14, OW = N + GW + 1, HW = 4, CW = 4;
  localparam realtime TIN = 4.444;      // 225 MHz
  localparam real VDD = 1.0;
  localparam real PI = 3.14159265358979323846;
  localparam realtime RUN_NS = 3.0e6;   // 3 ms of signal per operating point
  real F_SIG = 1.0e3;                   // Hz

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
    #(TIN * 4_000_000);
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

  // ---- per-frame capture ----
  int      bits = 12;                // resolution of the running test
  int      h_set = 0;
  bit      running = 1'b0;
  int      ones = 0, mcyc = 0;
  int      cur_eff = -1;             // (N-h)-bit code of the running frame
  bit      take = 1'b0;              // a sample edge is next
  realtime fr_t0 = 0;
  real     fr_i0 = 0.0;
  real     ts[$], ys[$];             // frame start time (s), frame mean (V)
  int      n_frames = 0;

  function automatic int sine_code(input real t_s, input int b);
    real full = real'((1 << b) - 1);
    return int'($floor(full / 2.0 * (1.0 + 0.999 * $sin(2.0 * PI * F_SIG * t_s)) + 0.5));
  endfunction

  always @(negedge mod_clk) if (rst_n) begin
    ones += int'(dac_out);
    mcyc++;
    take = sample_req;
    if (sample_req && running) begin
      // code for the frame that starts at the coming edge
      cur_eff = sine_code($realtime * 1.0e-9, bits);
      din = N'(cur_eff << h_set);
      h   = HW'(h_set);
    end
  end

  int fr_eff = -1;
  int fr_len = 0;
  always @(posedge mod_clk) if (rst_n && take) begin
    // the window from this sample edge to the next holds exactly one frame
    if (fr_eff >= 0) begin
      n_frames++;
      check(ones == fr_eff, $sformatf("ones %0d, expected %0d", ones, fr_eff));
      check(mcyc == fr_len, $sformatf("frame length %0d, expected %0d", mcyc, fr_len));
      ts.push_back(fr_t0 * 1.0e-9);
      ys.push_back((u_rc.integral_now() - fr_i0) / ($realtime - fr_t0));
    end
    fr_eff = running ? cur_eff : -1;
    fr_len = 1 << bits;
    fr_t0  = $realtime;
    fr_i0  = u_rc.integral_now();
    ones = 0;
    mcyc = 0;
  end

  // Least-squares fit of y = a*sin(wt) + b*cos(wt) + c; returns SNDR in dB.
  function automatic real sndr_db(input int skip);
    real s[3][3], r[3], sol[3], det, m[3][3];
    real w = 2.0 * PI * F_SIG;
    real noise = 0.0;
    int  n = 0;
    for (int i = 0; i < 3; i++) begin r[i] = 0.0; for (int j = 0; j < 3; j++) s[i][j] = 0.0; end
    for (int k = skip; k < ts.size(); k++) begin
      real v[3];
      v[0] = $sin(w * ts[k]); v[1] = $cos(w * ts[k]); v[2] = 1.0;
      for (int i = 0; i < 3; i++) begin
        r[i] += v[i] * ys[k];
        for (int j = 0; j < 3; j++) s[i][j] += v[i] * v[j];
      end
    end
    det = s[0][0] * (s[1][1] * s[2][2] - s[1][2] * s[2][1])
        - s[0][1] * (s[1][0] * s[2][2] - s[1][2] * s[2][0])
        + s[0][2] * (s[1][0] * s[2][1] - s[1][1] * s[2][0]);
    for (int c = 0; c < 3; c++) begin            // Cramer's rule
      m = s;
      for (int i = 0; i < 3; i++) m[i][c] = r[i];
      sol[c] = (m[0][0] * (m[1][1] * m[2][2] - m[1][2] * m[2][1])
              - m[0][1] * (m[1][0] * m[2][2] - m[1][2] * m[2][0])
              + m[0][2] * (m[1][0] * m[2][1] - m[1][1] * m[2][0])) / det;
    end
    for (int k = skip; k < ts.size(); k++) begin
      real e = ys[k] - (sol[0] * $sin(w * ts[k]) + sol[1] * $cos(w * ts[k]) + sol[2]);
      noise += e * e;
      n++;
    end
    noise /= real'(n);
    return 10.0 * $log10(((sol[0] * sol[0] + sol[1] * sol[1]) / 2.0) / noise);
  endfunction

  int n_points = 0;

  task automatic run_point(input string name, input int hh, input int k, input real f_hz);
    real sndr, ideal;
    realtime t_end;
    cfg = CW'(k);
    F_SIG = f_hz;
    wait (int'(cfg_active) == k);
    // h only changes at a full-frame boundary: restart capture cleanly
    running = 1'b0;
    h_set = hh;
    bits = N - hh;
    h = HW'(hh);
    din = '0;
    repeat ((1 << N) + 8) @(negedge mod_clk);
    ts.delete(); ys.delete();
    running = 1'b1;
    t_end = $realtime + RUN_NS;
    wait ($realtime >= t_end);
    running = 1'b0;
    sndr = sndr_db(3);
    ideal = 6.02 * real'(bits) + 1.76;
    $display("%s: %0d frames, SNDR %f dB, ENOB %f bit (quantization limit %f dB)",
             name, ys.size(), sndr, (sndr - 1.76) / 6.02, ideal);
    check(ys.size() > 20, {name, ": too few frames"});
    check(sndr > ideal - 4.0 && sndr < ideal + 6.0, $sformatf("%s: SNDR %f dB", name, sndr));
    n_points++;
  endtask

  initial begin
    repeat (4) @(negedge clk_in);
    rst_n = 1'b1;
    run_point("nominal 12 bit, 55 kS/s, 1 kHz", 0, 0, 1.0e3);
    run_point("nominal 12 bit, 55 kS/s, 20.3 kHz", 0, 0, 20.3e3);
    run_point("clock-scaled 10 bit, 55 kS/s, 1 kHz", 2, 2, 1.0e3);
    run_point("rate-scaled 12 bit, 13.7 kS/s, 1 kHz", 0, 2, 1.0e3);
    check(n_points == 4, "not every operating point ran");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
