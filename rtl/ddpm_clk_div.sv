// ddpm_clk_div: frequency divider and clock selector that sets the modulator
// clock to f_in / 2^cfg.
//
// How. STAGES cascaded T-flip-flops form a synchronous binary counter on
// clk_in; stage k toggles at f_in / 2^(k+1), so the chain offers the divided
// clocks f_in/2, f_in/4, ... A multiplexer steered by the configuration picks
// clk_in itself (cfg = 0) or stage cfg-1 as clk_out. Slowing the clock by 2^h
// either keeps the sample rate while trading resolution (together with the
// modulator's h setting) or keeps the resolution while lowering the sample
// rate and the power.
//
// Glitch-free switching (this design's choice, the selection rule is not
// published): the configuration is copied into cfg_q on a falling edge of
// clk_in while the whole counter is 0. At that moment clk_in and every
// divided clock are low, so changing the mux cannot produce a short pulse. A
// new setting therefore takes effect within 2^STAGES input cycles. Values of
// cfg above STAGES are read as STAGES.
//
// Interface: clk_in input clock, rst_n active-low asynchronous reset (counter
// cleared, cfg_q = 0 so clk_out follows clk_in during reset), cfg requested
// division exponent, cfg_active the exponent in use, clk_out divided clock.
module ddpm_clk_div #(
  parameter int unsigned STAGES = ddpm_pkg::DDPM_DIV_STAGES,
  parameter int unsigned CW     = ddpm_pkg::sel_width(STAGES + 1)
) (
  input  logic          clk_in,
  input  logic          rst_n,
  input  logic [CW-1:0] cfg,
  output logic [CW-1:0] cfg_active,
  output logic          clk_out
);

  logic [STAGES-1:0] div;
  logic [CW-1:0]     cfg_q;
  logic [CW-1:0]     cfg_lim;
  logic [STAGES:0]   clk_taps;   // clk_taps[0] = clk_in, clk_taps[k] = f_in / 2^k

  for (genvar k = 0; k < STAGES; k++) begin : g_div
    if (k == 0) begin : g_first
      ddpm_tff u_tff (.clk(clk_in), .rst_n(rst_n), .t(1'b1), .q(div[k]));
    end else begin : g_next
      ddpm_tff u_tff (.clk(clk_in), .rst_n(rst_n), .t(&div[k-1:0]), .q(div[k]));
    end
  end

  assign cfg_lim = (32'(cfg) > STAGES) ? CW'(STAGES) : cfg;

  always_ff @(negedge clk_in or negedge rst_n) begin
    if (!rst_n)              cfg_q <= '0;
    else if (div == '0)      cfg_q <= cfg_lim;
  end

  assign clk_taps   = {div, clk_in};
  assign clk_out    = clk_taps[cfg_q];
  assign cfg_active = cfg_q;

endmodule
