// mash_ncl: noise cancellation network of the MASH 1-1-1 modulator.
//
// Combines the carries c1, c2, c3 of the three cascaded accumulators into
//   y[n] = c1[n] + (1 - z^-1) c2[n] + (1 - z^-1)^2 c3[n],
// which cancels the quantization error of the first two stages and leaves the
// third stage's error shaped by (1 - z^-1)^3. It is built as the published
// network: c3 is differenced, added to c2, that sum is differenced and added
// to c1. Two one-bit-wide difference registers hold c3[n-1] and the
// intermediate sum s2[n-1] = c2[n-1] + c3[n-1] - c3[n-2].
//
// The result lies in -3..+4 and is registered into a 4-bit two's-complement
// word, so y appears one clock after the carries that produce it. The
// 4-bit width follows the output width quoted for the synthesizer's modulator;
// the output register and the zero reset of the delay elements are this
// design's choices.
module mash_ncl
  import mash_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      c1,
  input  logic      c2,
  input  logic      c3,
  output mash_out_t y
);

  // c3[n-1]
  logic                c3_q;
  // s2[n] = c2 + c3 - c3[n-1], in -1..2
  logic signed [2:0]   s2;
  logic signed [2:0]   s2_q;
  mash_out_t           y_d;

  always_comb begin
    s2  = $signed({2'b00, c2}) + $signed({2'b00, c3}) - $signed({2'b00, c3_q});
    y_d = mash_out_t'($signed({3'b000, c1})) + mash_out_t'(s2) - mash_out_t'(s2_q);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      c3_q <= 1'b0;
      s2_q <= '0;
      y    <= '0;
    end else begin
      c3_q <= c3;
      s2_q <= s2;
      y    <= y_d;
    end
  end

endmodule
