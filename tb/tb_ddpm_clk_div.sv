// tb_ddpm_clk_div: self-checking testbench of the clock divider / selector.
//
// For every division exponent 0 .. STAGES (and one value above, which must be
// read as STAGES) it requests the setting, checks that it becomes active
// within 2^STAGES input cycles, then checks that every clk_out period equals
// 2^cfg input periods and that the number of clk_out rising edges in a
// 4096-cycle window is 4096 / 2^cfg. A monitor measures every high and low
// phase of clk_out across all switches: none may be shorter than half a
// period of the faster of the clocks selected before and after it (no glitch
// or truncated phase when the selection changes).
`timescale 1ns/1ps
module tb_ddpm_clk_div;
  localparam int STAGES = 11;
  localparam int CW = 4;
  localparam realtime TIN = 10.0;

  logic clk_in = 1'b0, rst_n = 1'b0;
  logic [CW-1:0] cfg = '0;
  logic [CW-1:0] cfg_active;
  logic clk_out;

  int checks = 0, failures = 0;

  always #(TIN / 2) clk_in = ~clk_in;

  ddpm_clk_div dut (.clk_in(clk_in), .rst_n(rst_n), .cfg(cfg),
                    .cfg_active(cfg_active), .clk_out(clk_out));

  initial begin : watchdog
    #(TIN * 400_000);
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

  // Pulse-width monitor, active after reset: every high or low phase must last
  // at least half a period of the faster of the clocks selected before and
  // after it (a switch may not cut a phase short).
  realtime t_edge = 0;
  realtime min_high = 1.0e9, min_low = 1.0e9;
  int k_prev = 0;
  int short_phases = 0;
  always @(clk_out) begin
    if (rst_n && t_edge > 0) begin
      automatic int k_min = (int'(cfg_active) < k_prev) ? int'(cfg_active) : k_prev;
      automatic realtime w = $realtime - t_edge;
      if (w < (TIN / 2.0) * real'(1 << k_min) - 0.001) short_phases++;
      if (clk_out == 1'b0) min_high = (w < min_high) ? w : min_high;
      else                 min_low  = (w < min_low)  ? w : min_low;
    end
    t_edge = $realtime;
    k_prev = int'(cfg_active);
  end

  int rises = 0;
  realtime t_rise_prev = 0, period = 0;
  always @(posedge clk_out) begin
    rises++;
    period = $realtime - t_rise_prev;
    t_rise_prev = $realtime;
  end

  task automatic try_cfg(input int req, input int expect_k);
    int waited = 0;
    int r0;
    realtime exp_period = TIN * (1 << expect_k);
    @(posedge clk_in);
    cfg = CW'(req);
    while (int'(cfg_active) != expect_k && waited < (1 << STAGES) + 2) begin
      @(posedge clk_in);
      waited++;
    end
    check(int'(cfg_active) == expect_k, $sformatf("cfg %0d not applied", req));
    check(waited <= (1 << STAGES), $sformatf("cfg %0d latency %0d", req, waited));
    // let one full output period pass, then measure
    repeat ((1 << expect_k) + 1) @(posedge clk_in);
    #1;
    r0 = rises;
    for (int c = 0; c < 4096; c++) begin
      @(posedge clk_in);
      #1;
      if (c >= (1 << expect_k) && clk_out && t_rise_prev == $realtime - 1.0)
        check(period == exp_period, $sformatf("cfg %0d period %0t", req, period));
    end
    check(rises - r0 == 4096 / (1 << expect_k), $sformatf("cfg %0d edge count %0d", req, rises - r0));
  endtask

  initial begin
    repeat (3) @(negedge clk_in);
    rst_n = 1'b1;
    for (int k = 0; k <= STAGES; k++) try_cfg(k, k);
    try_cfg(STAGES + 2, STAGES);
    // switches in the other direction and between far-apart settings
    try_cfg(0, 0);
    try_cfg(7, 7);
    try_cfg(1, 1);
    try_cfg(11, 11);
    try_cfg(2, 2);
    check(min_high >= TIN / 2, $sformatf("shortest high phase %0t", min_high));
    check(min_low  >= TIN / 2, $sformatf("shortest low phase %0t", min_low));
    check(short_phases == 0, $sformatf("%0d phases cut short by a switch", short_phases));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
