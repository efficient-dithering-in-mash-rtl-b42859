// mash_pkg: constants and types shared by the dithered MASH 1-1-1 modulator.
//
// The modulator is built from three first-order M-bit accumulators (M = 8),
// an M-bit LFSR that supplies the one-bit dither, and a noise cancellation
// network whose output spans -3..+4 and is carried as a 4-bit two's-complement
// number. The accumulator and LFSR widths and the 4 output bits are the values
// of the fabricated modulator; the LFSR polynomials (a table of maximal-length
// tap sets, so the LFSR can follow the accumulator width) and the seed are
// this design's own choice. Default: x^8 + x^6 + x^5 + x^4 + 1, period 255.
package mash_pkg;

  // Width of each accumulator (the modulator's input resolution).
  localparam int unsigned ACC_BITS  = 8;
  // Width of the dither LFSR.
  localparam int unsigned LFSR_BITS = 8;
  // Width of the signed modulator output.
  localparam int unsigned OUT_BITS  = 4;

  // Feedback taps of a maximal-length LFSR of n bits (3 <= n <= 16), as a
  // mask: bit k set means register bit k enters the XOR feedback. A tap t of
  // the usual tap lists is mask bit t-1; for 8 bits the taps 8, 6, 5, 4 give
  // the polynomial x^8 + x^6 + x^5 + x^4 + 1. Widths outside the table fall
  // back to the two top bits, which is not maximal.
  function automatic logic [31:0] lfsr_taps(input int unsigned n);
    case (n)
      3:       return 32'h0006;  // 3,2
      4:       return 32'h000C;  // 4,3
      5:       return 32'h0014;  // 5,3
      6:       return 32'h0030;  // 6,5
      7:       return 32'h0060;  // 7,6
      8:       return 32'h00B8;  // 8,6,5,4
      9:       return 32'h0110;  // 9,5
      10:      return 32'h0240;  // 10,7
      11:      return 32'h0500;  // 11,9
      12:      return 32'h0829;  // 12,6,4,1
      13:      return 32'h100D;  // 13,4,3,1
      14:      return 32'h2015;  // 14,5,3,1
      15:      return 32'h6000;  // 15,14
      16:      return 32'hD008;  // 16,15,13,4
      default: return 32'(3) << (n - 2);
    endcase
  endfunction

  // Non-zero value loaded into the LFSR at reset (any width).
  localparam logic [31:0] LFSR_SEED = 32'h1;

  // Modulator output word: y[n] in -3..+4.
  typedef logic signed [OUT_BITS-1:0] mash_out_t;

endpackage
