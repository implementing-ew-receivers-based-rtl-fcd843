// fft_pkg: constants, types and small helpers shared by the large-point FFT.
//
// Numbers are fixed-point two's complement. A complex sample is carried as a
// pair of signed vectors of a width chosen by each module; twiddle factors are
// 18-bit Q1.16 values (the twiddle word length of 18 bits follows the design
// description; the Q1.16 split is this implementation's choice). Block
// exponents are unsigned and count right shifts already applied to the data.
package fft_pkg;

  // Twiddle word length and its fraction bits (1.0 = 2^TW_FRAC).
  localparam int TW      = 18;
  localparam int TW_FRAC = 16;
  // Width of a block exponent.
  localparam int EW      = 6;
  // Column transform length L = 1024 = 4^5 and log2 of the largest N (1024 * 4^5).
  localparam int LOG2_L  = 10;
  localparam int LOG2_NMAX = 20;

  // Number of bits needed to hold a signed value whose magnitude pattern is m,
  // where m is the OR over all values v of (v ^ sign-replicated v): the
  // position of the highest set bit plus one sign bit.
  function automatic int signed_bits(input logic [63:0] m);
    int b;
    b = 1;
    for (int i = 0; i < 64; i++)
      if (m[i]) b = i + 2;
    return b;
  endfunction

endpackage
