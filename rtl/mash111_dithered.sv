// mash111_dithered: dithered third-order MASH 1-1-1 digital sigma-delta
// modulator for a fractional-N frequency synthesizer.
//
// Three ACC_BITS-bit accumulators are cascaded: the constant (or slowly
// varying) fractional word x drives stage 1, and each stage's residue drives
// the next. Their carries are combined by the noise cancellation network
// into a multibit output y in -3..+4 whose average is x / 2^ACC_BITS; the
// synthesizer adds y to its integer division ratio.
//
// Spur reduction: a plain MASH with a constant input is periodic and produces
// spur tones. Here the bit d[n] of a small LFSR (as wide as the accumulators)
// replaces the LSB of the input of stage 2 and of stage 3. The input x is
// left untouched, no adder is added, and the dither reaches the output shaped
// by (1 - z^-1) + (1 - z^-1)^2, while its double summation inside stage 3
// breaks the periodicity of the third stage's error. This choice of paths,
// the 8-bit accumulators and the 8-bit LFSR follow the published design; the
// LFSR is as wide as the accumulators (W) for any W from 3 to 16.
//
// Interface: clk (sample clock = reference clock), rst_n (synchronous,
// active low: residues to zero, LFSR to its seed), dither_en (1 = dither
// active; 0 = plain MASH 1-1-1, LFSR frozen), x (unsigned fractional word),
// y (signed output). Timing: one output per clock; y[n] reflects x and the
// dither of the previous clock (one register of latency in the network).
// The third stage's residue e3 and the LFSR register contents are not used
// outside their blocks; a lint tool reports them as unused signals.
module mash111_dithered
  import mash_pkg::*;
#(
  parameter int unsigned W = ACC_BITS
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         dither_en,
  input  logic [W-1:0] x,
  output mash_out_t    y
);

  logic [W-1:0] e1, e2, e3;
  logic         c1, c2, c3;
  logic         d;
  logic [W-1:0] lfsr_state;

  dither_lfsr #(.WIDTH(W)) u_lfsr (
    .clk  (clk),
    .rst_n(rst_n),
    .en   (dither_en),
    .state(lfsr_state),
    .d    (d)
  );

  mash_accumulator #(.WIDTH(W)) u_stage1 (
    .clk(clk), .rst_n(rst_n), .x(x),  .dither_sel(1'b0),      .d(d), .c(c1), .e(e1)
  );

  mash_accumulator #(.WIDTH(W)) u_stage2 (
    .clk(clk), .rst_n(rst_n), .x(e1), .dither_sel(dither_en), .d(d), .c(c2), .e(e2)
  );

  mash_accumulator #(.WIDTH(W)) u_stage3 (
    .clk(clk), .rst_n(rst_n), .x(e2), .dither_sel(dither_en), .d(d), .c(c3), .e(e3)
  );

  mash_ncl u_ncl (
    .clk(clk), .rst_n(rst_n), .c1(c1), .c2(c2), .c3(c3), .y(y)
  );

endmodule
