// fft_pkg: constants, types and helper functions shared by the radix-4
// real-data FFT processors.
//
// Twiddle factors are 16-bit signed words (the word length the design
// specifies for twiddles) in Q2.14 format, so that +1.0 (16384) and -1.0 are
// exact.  The Q2.14 format is this design's own choice.  The package also holds
// the controller state type and a helper that reverses the base-4 digits of an
// address, which gives the order in which an in-place radix-4
// decimation-in-frequency (DIF) FFT leaves its results.
package fft_pkg;

  // Twiddle word length and number of fraction bits.
  localparam int TW_W    = 16;
  localparam int TW_FRAC = 14;

  // Controller states: idle, sample loading, radix-4 stages, radix-2 combine
  // stage, result unloading.
  typedef enum logic [2:0] {
    S_IDLE   = 3'd0,
    S_LOAD   = 3'd1,
    S_R4     = 3'd2,
    S_R2     = 3'd3,
    S_UNLOAD = 3'd4
  } fft_state_e;

  // Reverse the base-4 digits of the low NBITS bits of v (NBITS even).
  function automatic int unsigned digit_rev4(int unsigned v, int nbits);
    int unsigned r;
    r = 0;
    for (int d = 0; d < nbits / 2; d++) begin
      r = (r << 2) | ((v >> (2 * d)) & 3);
    end
    return r;
  endfunction

  // Lowest non-zero base-4 digit of the low NBITS bits of v (0 if v is 0).
  function automatic int unsigned low_digit4(int unsigned v, int nbits);
    int unsigned d;
    d = 0;
    for (int i = nbits / 2 - 1; i >= 0; i--) begin
      if (((v >> (2 * i)) & 3) != 0) d = (v >> (2 * i)) & 3;
    end
    return d;
  endfunction

endpackage
