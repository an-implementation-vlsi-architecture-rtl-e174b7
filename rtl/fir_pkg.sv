// Shared sizes of the 8-tap FIR filter built from Vedic multipliers and
// Kogge-Stone adders.
//
// The filter has eight taps, 8-bit input samples, 8-bit coefficients and a
// 16-bit output; these are the sizes of the published design (input fin[7:0],
// coefficients h0..h7 of 8 bits each, output fout[15:0]).  The output is as
// wide as one product, so the sum of the eight products is kept modulo 2^16.
package fir_pkg;

  // Number of filter taps (coefficients h0..h7).
  localparam int unsigned TAPS   = 8;
  // Width of an input sample and of a coefficient.
  localparam int unsigned DATA_W = 8;

endpackage
