// tb_ddpm_modulator: self-checking testbench of the DDPM modulator.
//
// Two instances are exercised:
//  * the 12-bit default instance, fed with edge codes and random codes at
//    several resolution settings h. Each output frame is compared bit by bit
//    with a reference sequence built by the recursive definition
//    S_i = {S_(i-1), b[N-i], S_(i-1)}, frame = {S_N, 0}, which is independent
//    of the counter/mux implementation. The number of ones per frame must equal
//    the code and sample_req must recur every 2^(N-h) cycles.
//  * a 4-bit instance checked against literal bit strings: 1011 gives
//    1011101110111010, and with h = 1, 2, 3 the codes 101, 10 and 1 give
//    10111010, 1010 and 10 (the example of resolution scaling).
// Outputs are sampled on the falling clock edge; inputs change there too.
`timescale 1ns/1ps
module tb_ddpm_modulator;
  localparam int N  = 12;
  localparam int HW = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [N-1:0]  din = '0;
  logic [HW-1:0] h = '0;
  logic sample_req, dout;

  logic [3:0] din4 = '0;
  logic [1:0] h4 = '0;
  logic sample_req4, dout4;

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  ddpm_modulator dut (.clk(clk), .rst_n(rst_n), .din(din), .h(h),
                      .sample_req(sample_req), .dout(dout));
  ddpm_modulator #(.N(4), .HW(2)) dut4 (.clk(clk), .rst_n(rst_n), .din(din4), .h(h4),
                      .sample_req(sample_req4), .dout(dout4));

  initial begin : watchdog
    #(10 * 200_000);
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

  // Recursive construction of an m-bit DDPM frame (index 1 .. 2^m).
  function automatic void ddpm_ref(input int unsigned code, input int m, ref bit seq[$]);
    bit s[$];
    s = {};
    for (int i = 1; i <= m; i++) begin
      bit b = bit'((code >> (m - i)) & 1);
      s = {s, b, s};
    end
    seq = {1'b0, s, 1'b0};   // seq[0] unused, seq[2^m] = trailing 0
  endfunction

  bit last_expected = 1'b0;   // last bit of the previous frame
  int pos = 0;                // cycles since reset, at the current boundary
  int h_use = 0;              // resolution setting in force

  // Called at a falling edge where sample_req is 1: runs one conversion.
  task automatic frame12(input int unsigned code, input int hh);
    bit seq[$];
    int heff;
    int m;
    int len;
    int ones = 0;
    int unsigned eff;
    // a new h only applies where a full 2^N frame begins
    if (pos % (1 << N) == 0) h_use = (hh > N - 1) ? N - 1 : hh;
    heff = h_use;
    m = N - heff;
    len = 1 << m;
    pos += len;
    eff = (code >> heff);
    ddpm_ref(eff, m, seq);
    din = N'(code);
    h   = HW'(hh);
    for (int k = 0; k < len; k++) begin
      @(negedge clk);
      if (k == 0) check(dout == last_expected, "frame boundary bit");
      else begin
        check(dout == seq[k], $sformatf("code %0d h %0d bit %0d", code, hh, k));
        ones += int'(dout);
      end
      check(sample_req == (k == len - 1), $sformatf("sample_req period h=%0d k=%0d", hh, k));
    end
    last_expected = seq[len];
    check(ones == int'(eff), $sformatf("ones %0d != code %0d", ones, eff));
  endtask

  task automatic frame4(input logic [3:0] code, input int hh, input string expect_bits);
    int len = expect_bits.len() + 1;   // plus the trailing 0
    din4 = code;
    h4   = 2'(hh);
    for (int k = 0; k < len; k++) begin
      @(negedge clk);
      if (k > 0)
        check(dout4 == (expect_bits[k-1] == "1"), $sformatf("4-bit code %b h %0d bit %0d", code, hh, k));
      check(sample_req4 == (k == len - 1), "4-bit sample_req period");
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    check(sample_req == 1'b1 && dout == 1'b0, "state after reset");
    // 12-bit instance
    frame12(0, 0);
    frame12(4095, 0);
    frame12(2048, 0);
    frame12(1, 0);
    frame12(2730, 0);
    for (int r = 0; r < 4; r++) frame12($urandom_range(0, 4095), 0);
    frame12(32'b1011_0110_1100, 2);
    do frame12($urandom_range(0, 4095), 2); while (pos % 4096 != 0);
    for (int r = 0; r < 4; r++) begin
      int hh = $urandom_range(1, 11);
      do frame12($urandom_range(0, 4095), hh); while (pos % 4096 != 0);
    end
    // a request made mid-frame waits for the full-frame boundary
    frame12(32'hA00, 3);
    frame12(32'hB00, 6);       // still h = 3
    do frame12(32'hC00, 6); while (pos % 4096 != 0);
    do frame12(32'hFFF, 11); while (pos % 4096 != 0);
    do frame12(32'h800, 15); while (pos % 4096 != 0);   // h above N-1 is read as N-1
    frame12(32'h123, 0);       // back to full resolution
    @(negedge clk);
    check(dout == last_expected, "final bit");

    // 4-bit instance, literal sequences, started from a fresh sample boundary
    rst_n = 1'b0;
    @(negedge clk);
    rst_n = 1'b1;
    frame4(4'b1011, 0, "101110111011101");
    repeat (2) frame4(4'b1010, 1, "1011101");
    repeat (4) frame4(4'b1000, 2, "101");
    repeat (8) frame4(4'b1000, 3, "1");
    @(negedge clk);
    check(dout4 == 1'b0, "4-bit trailing zero");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
