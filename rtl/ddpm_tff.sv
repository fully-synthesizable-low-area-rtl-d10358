// ddpm_tff: toggle flip-flop, the basic cell of the DDPM modulator and of the
// clock divider.
//
// On every rising clock edge q inverts when t is 1 and holds when t is 0.
// rst_n clears q asynchronously (active low). A chain of these cells, where
// each stage toggles when all earlier stages are 1, is a binary counter: stage
// k runs at f_clk / 2^(k+1). The asynchronous reset is this design's choice.
module ddpm_tff (
  input  logic clk,
  input  logic rst_n,
  input  logic t,
  output logic q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  q <= 1'b0;
    else if (t)  q <= ~q;
  end

endmodule
