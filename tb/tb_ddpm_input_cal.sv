// tb_ddpm_input_cal: self-checking testbench of the two-region input
// pre-calibration.
//
// For several coefficient sets (identity, mid-scale-continuous gain/offset
// pairs of the form OFF = 2^(N-1) * (1 - GAIN), and random sets that drive the
// result out of range) every one of the 4096 codes is applied and the output
// is compared with a reference computed in floating point:
// round(GAIN * D + OFF) clamped to 0 .. 4095, using GAIN0/OFF0 below
// mid-scale and GAIN1/OFF1 from mid-scale up. The saturation flag is checked
// too, and the continuous sets must map mid-scale onto itself.
`timescale 1ns/1ps
module tb_ddpm_input_cal;
  localparam int N = 12, GW = 16, GF = 14, OW = N + GW + 1;

  logic [N-1:0] din;
  logic [GW-1:0] gain0, gain1;
  logic signed [OW-1:0] off0, off1;
  logic [N-1:0] dcal;
  logic sat;

  int checks = 0, failures = 0;

  ddpm_input_cal dut (.din(din), .gain0(gain0), .off0(off0), .gain1(gain1),
                      .off1(off1), .dcal(dcal), .sat(sat));

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  function automatic longint to_fix(input real v);
    return longint'($floor(v * real'(1 << GF) + 0.5));
  endfunction

  task automatic sweep(input real g0, input real o0, input real g1, input real o1);
    real scale = real'(1 << GF);
    gain0 = GW'(to_fix(g0));
    gain1 = GW'(to_fix(g1));
    off0  = OW'(to_fix(o0));
    off1  = OW'(to_fix(o1));
    for (int d = 0; d < (1 << N); d++) begin
      real g = (d >= (1 << (N - 1))) ? real'(gain1) / scale : real'(gain0) / scale;
      real o = (d >= (1 << (N - 1))) ? real'(off1) / scale : real'(off0) / scale;
      real v = $floor(g * d + o + 0.5);
      int  e;
      bit  es;
      es = (v < 0.0) || (v > real'((1 << N) - 1));
      e  = (v < 0.0) ? 0 : (v > real'((1 << N) - 1)) ? (1 << N) - 1 : int'(v);
      din = N'(d);
      #1;
      check(int'(dcal) == e && sat == es,
            $sformatf("d=%0d g0=%f o0=%f g1=%f o1=%f: got %0d/%0b expected %0d/%0b",
                      d, g0, o0, g1, o1, dcal, sat, e, es));
    end
  endtask

  task automatic continuous(input real g0, input real g1);
    real half = real'(1 << (N - 1));
    sweep(g0, half * (1.0 - g0), g1, half * (1.0 - g1));
    din = N'(1 << (N - 1));
    #1;
    check(int'(dcal) == (1 << (N - 1)), "mid-scale maps onto itself");
  endtask

  initial begin
    sweep(1.0, 0.0, 1.0, 0.0);           // identity
    continuous(1.02, 0.985);
    continuous(0.9995, 1.0007);
    continuous(0.97, 1.03);
    sweep(1.1, 3.25, 0.9, -7.5);         // discontinuous, saturates at the top
    sweep(0.8, -20.0, 1.3, -900.0);      // negative results clamp to 0
    for (int r = 0; r < 4; r++)
      sweep(real'($urandom_range(8000, 24000)) / 16384.0, real'($urandom_range(0, 2000)) - 1000.0 + 0.3,
            real'($urandom_range(8000, 24000)) / 16384.0, real'($urandom_range(0, 4000)) - 2000.0 - 0.7);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
