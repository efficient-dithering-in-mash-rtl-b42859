// dither_lfsr: one-bit pseudorandom dither source for the MASH modulator.
//
// A WIDTH-bit Fibonacci linear feedback shift register. Each enabled clock the
// register shifts one place towards its MSB and the XOR of the bits selected by
// TAPS enters at bit 0. The dither bit d is the MSB. TAPS defaults to the
// maximal-length tap set for WIDTH from mash_pkg (widths 3..16); with the
// default 8 bits, x^8 + x^6 + x^5 + x^4 + 1, the sequence repeats every
// 2^8 - 1 = 255 clocks and holds 128 ones and 127 zeros per period, which is
// the balance the dither analysis relies on.
//
// Interface: clk, synchronous active-low rst_n (loads SEED), en (advance),
// state (register contents), d (dither bit, valid in the same cycle as state).
// Timing: d changes one clock after each cycle in which en is high.
//
// The LFSR width equal to the accumulator width (8 bits) follows the
// fabricated modulator; the polynomial, seed, bit taken as output and the
// enable are this design's choices.
module dither_lfsr
  import mash_pkg::*;
#(
  parameter int unsigned          WIDTH = LFSR_BITS,
  parameter logic [WIDTH-1:0]     TAPS  = WIDTH'(lfsr_taps(WIDTH)),
  parameter logic [WIDTH-1:0]     SEED  = WIDTH'(LFSR_SEED)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  output logic [WIDTH-1:0] state,
  output logic             d
);

  logic feedback;

  always_comb feedback = ^(state & TAPS);

  always_ff @(posedge clk) begin
    if (!rst_n)  state <= SEED;
    else if (en) state <= {state[WIDTH-2:0], feedback};
  end

  assign d = state[WIDTH-1];

  // An all-zero register would lock the generator.
  a_nonzero: assert property (@(posedge clk) rst_n |-> state != '0);

endmodule
