// ddpm_modulator: N-bit Dyadic Digital Pulse Modulation (DDPM) modulator with
// graceful timing degradation and run-time resolution scaling.
//
// What it produces. For an input code D = b[N-1..0] the DDPM sequence is
// 2^N bits long: S_0 is empty, S_i = {S_(i-1), b[N-i], S_(i-1)}, and the frame
// is {S_N, 0}. Every other bit is b[N-1], every other remaining bit is b[N-2],
// and so on; b[i] appears 2^i times, so the stream holds exactly D ones and its
// average is VDD * D / 2^N once low-pass filtered.
//
// How. A chain of N T-flip-flops (cnt) counts the cycles of a frame. A chain of
// N 2:1 multiplexers picks the bit: the mux next to the output selects
// b[N-1] whenever cnt[0] is 1, otherwise it passes on the decision of the
// next mux, which selects b[N-2] whenever cnt[1] is 1, and so on; the last mux
// chooses between b[0] and a constant 0. The selected bit is therefore
// b[N-1-tz], tz being the number of trailing zeros of cnt (0 when cnt = 0).
// The result is registered in the output flip-flop. The path from a counter
// flip-flop to the output crosses N-i muxes for bit b[i], so b[0] has the
// longest path and b[N-1] the shortest: when the clock is too fast or the
// supply too low, timing fails in the LSBs first and the resolution degrades
// gracefully instead of failing in the MSB.
//
// Resolution scaling. With h set, the h LSBs of the sampled code are forced to
// 0 and a new code is sampled every 2^(N-h) cycles instead of 2^N: the unit
// then works as an (N-h)-bit modulator at 2^h times the sample rate, without
// changing the counter or the mux chain.
//
// Interface and timing (single clock, active-low asynchronous reset):
//   din         sampled on the rising edge that ends a cycle in which
//               sample_req is 1; MSB-justified (its h LSBs are ignored).
//   h           resolution reduction, 0 .. N-1 (larger values read as N-1).
//               It is taken only at a full 2^N-cycle frame boundary (counter
//               all 0), where every sub-frame length is aligned; codes
//               sampled in between keep the h in use.
//   sample_req  1 during the last cycle of each (sub-)frame, i.e. while the
//               low N-h bits of the counter are 0. The first frame starts right
//               after reset.
//   dout        DDPM stream, one bit per clock, one cycle after the selection.
// After reset dout is 0 and the first sample is taken on the first edge. The
// mux-chain structure and counter follow the published architecture; the
// input sample register, the moment h takes effect (at the next full-frame
// boundary, since the free-running counter is only aligned to every sub-frame
// length there) and the reset behaviour are this design's choices.
module ddpm_modulator #(
  parameter int unsigned N  = ddpm_pkg::DDPM_N,
  parameter int unsigned HW = ddpm_pkg::sel_width(N)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [N-1:0]  din,
  input  logic [HW-1:0] h,
  output logic          sample_req,
  output logic          dout
);

  logic [N-1:0]  cnt;       // T-FF chain, cnt[0] toggles every cycle
  logic [N-1:0]  code_q;    // sampled code, h LSBs already cleared
  logic [HW-1:0] h_q;       // resolution setting of the running conversion
  logic [N:0]    x;         // mux chain, x[0] = constant 0, x[N] = selected bit
  logic [N-1:0]  frame_mask;
  logic [N-1:0]  lsb_mask;
  logic [HW-1:0] h_lim;
  logic [HW-1:0] h_next;    // h of the conversion that starts at this edge

  // Counter made of cascaded T-flip-flops: stage k toggles when all
  // less significant stages are 1.
  for (genvar k = 0; k < N; k++) begin : g_cnt
    if (k == 0) begin : g_first
      ddpm_tff u_tff (.clk(clk), .rst_n(rst_n), .t(1'b1), .q(cnt[k]));
    end else begin : g_next
      ddpm_tff u_tff (.clk(clk), .rst_n(rst_n), .t(&cnt[k-1:0]), .q(cnt[k]));
    end
  end

  // Cascaded 2:1 muxes, from the LSB (farthest from the output) to the MSB.
  // The mux of input bit b[i] is steered by counter stage N-1-i.
  assign x[0] = 1'b0;
  for (genvar i = 0; i < N; i++) begin : g_mux
    assign x[i+1] = cnt[N-1-i] ? code_q[i] : x[i];
  end

  // A (sub-)frame of the running conversion spans the low N-h_q counter bits.
  always_comb begin
    frame_mask = '0;
    for (int unsigned k = 0; k < N; k++)
      if (k < N - 32'(h_q)) frame_mask[k] = 1'b1;
  end
  assign sample_req = ((cnt & frame_mask) == '0);

  // Resolution requested for the next conversion (h >= N is read as N-1).
  assign h_lim = (32'(h) > N - 1) ? HW'(N - 1) : h;
  assign h_next = (cnt == '0) ? h_lim : h_q;
  always_comb begin
    lsb_mask = '1;
    for (int unsigned k = 0; k < N; k++)
      if (k < 32'(h_next)) lsb_mask[k] = 1'b0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      code_q <= '0;
      h_q    <= '0;
      dout   <= 1'b0;
    end else begin
      dout <= x[N];
      if (sample_req) begin
        code_q <= din & lsb_mask;
        h_q    <= h_next;
      end
    end
  end

endmodule
