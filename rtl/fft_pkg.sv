// fft_pkg: word widths and number formats shared by the radix-2 butterfly
// (fft_radix_2) and the eight-point transform built from it (fft_8_point).
//
// Every sample is a complex number carried as two signed two's-complement
// words, real and imaginary, of DATA_W bits each. The 8-bit sample width and
// the port packing (eight samples in 64 bits, four twiddle factors in 32 bits)
// follow the published port lists of the two blocks.
//
// Twiddle factors are signed TW_W-bit fixed-point numbers with TW_FRAC
// fractional bits, so that +1.0 is 2**TW_FRAC. With the default 8 bits and 6
// fractional bits both +1.0 (64) and -1.0 (-64) are exact. The twiddle format
// is this design's choice: the source names an 8-bit twiddle port but not the
// position of its binary point.
package fft_pkg;

  // Width of the real or imaginary part of one sample.
  localparam int unsigned DATA_W = 8;
  // Width of the real or imaginary part of one twiddle factor.
  localparam int unsigned TW_W = 8;
  // Fractional bits of a twiddle factor (+1.0 == 2**TW_FRAC).
  localparam int unsigned TW_FRAC = 6;

  // Transform size of the larger design and the twiddle factors it takes:
  // W_8^k for k = 0..3.
  localparam int unsigned N_POINTS = 8;
  localparam int unsigned N_TWIDDLE = N_POINTS / 2;

endpackage
