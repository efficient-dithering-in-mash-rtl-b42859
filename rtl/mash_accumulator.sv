// mash_accumulator: one first-order stage of the MASH 1-1-1 modulator.
//
// A WIDTH-bit accumulator modulo M = 2^WIDTH. Each clock the stage adds its
// input word to the stored residue; the carry out of the WIDTH-bit adder is
// the one-bit quantizer output c[n] (the sum is at least M), and the WIDTH
// low bits of the sum are the new residue e[n], which is both stored for the
// next cycle and passed on, in the same cycle, as the input of the next stage.
//
// Dither: when dither_sel is high the LSB of the input word is replaced by the
// dither bit d before the addition. No adder is added for it: the LSB is
// substituted, which to first order behaves like adding d/M at the stage input.
//
// Interface: x (input word), dither_sel/d (LSB substitution), c (carry,
// combinational), e (residue, combinational), all in the current sample.
// The residue register resets to zero (synchronous active-low rst_n).
//
// The accumulator structure (adder, 1-bit quantizer by overflow, residue fed
// back through one delay and forward to the next stage) follows the
// published MASH accumulator model; the LSB substitution point follows the
// proposed dithering scheme. Reset to zero is this design's choice.
module mash_accumulator
  import mash_pkg::*;
#(
  parameter int unsigned WIDTH = ACC_BITS
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] x,
  input  logic             dither_sel,
  input  logic             d,
  output logic             c,
  output logic [WIDTH-1:0] e
);

  logic [WIDTH-1:0] acc_q;
  logic [WIDTH-1:0] x_eff;
  logic [WIDTH:0]   sum;

  always_comb begin
    x_eff = dither_sel ? {x[WIDTH-1:1], d} : x;
    sum   = {1'b0, x_eff} + {1'b0, acc_q};
    c     = sum[WIDTH];
    e     = sum[WIDTH-1:0];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) acc_q <= '0;
    else        acc_q <= e;
  end

endmodule
