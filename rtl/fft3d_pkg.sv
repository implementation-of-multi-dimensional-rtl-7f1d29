// fft3d_pkg: types and constants shared by the 3D FFT pipeline.
//
// A sample is one complex number: a 16-bit two's-complement real part and a
// 16-bit imaginary part, 32 bits in all, matching the 32-bit word size of the
// data set. Angles used by the CORDIC twiddle rotators are 16-bit binary
// angles where 2^16 stands for a full turn (2*pi). The split of the 32 bits
// into two 16-bit halves and the angle format are this design's own choice.
package fft3d_pkg;

  localparam int unsigned SAMPLE_W = 16;           // bits per real / imag part
  localparam int unsigned ANGLE_W  = 16;           // 2^ANGLE_W == full turn

  typedef logic signed [SAMPLE_W-1:0] comp_t;

  typedef struct packed {
    comp_t re;
    comp_t im;
  } sample_t;                                      // 32-bit complex sample

  typedef logic signed [ANGLE_W-1:0] angle_t;

  // The CORDIC keeps its residual angle with ZFRAC extra fraction bits.
  localparam int unsigned ZFRAC = 4;
  localparam int unsigned ZW    = ANGLE_W + ZFRAC;
  typedef logic signed [ZW-1:0] zangle_t;

  // Rounded atan(2^-i) in units of 2^-20 turn, i = 0..15:
  // CORDIC_ATAN(i) = round(atan(2^-i) / (2*pi) * 2^(ANGLE_W+ZFRAC)).
  function automatic zangle_t cordic_atan(input int unsigned i);
    case (i)
      0:  return zangle_t'(131072);
      1:  return zangle_t'(77376);
      2:  return zangle_t'(40884);
      3:  return zangle_t'(20753);
      4:  return zangle_t'(10417);
      5:  return zangle_t'(5213);
      6:  return zangle_t'(2607);
      7:  return zangle_t'(1304);
      8:  return zangle_t'(652);
      9:  return zangle_t'(326);
      10: return zangle_t'(163);
      11: return zangle_t'(81);
      12: return zangle_t'(41);
      13: return zangle_t'(20);
      14: return zangle_t'(10);
      default: return zangle_t'(5);
    endcase
  endfunction

  // Destination table of a bit permutation of an index word: entry j is the
  // position that index bit j moves to. Up to 32 index bits, 5 bits each.
  typedef logic [31:0][4:0] bitmap_t;

  function automatic bitmap_t identity_map();
    bitmap_t m;
    for (int j = 0; j < 32; j++) m[j] = 5'(j);
    return m;
  endfunction

  // BRAM permutation between the 1st and 2nd FFT (2*LOG_N index bits):
  // bit reversal of the lowest LOG_N bits combined with the exchange of the
  // two dimension fields. Bit j < LOG_N (bit-reversed frequency of dimension
  // 1) goes to 2*LOG_N-1-j; bit j >= LOG_N (dimension 2) goes to j-LOG_N.
  function automatic bitmap_t bram_map(input int unsigned log_n);
    bitmap_t m = identity_map();
    for (int unsigned j = 0; j < 2 * log_n; j++)
      m[j] = (j < log_n) ? 5'(2 * log_n - 1 - j) : 5'(j - log_n);
    return m;
  endfunction

  // Bit reversal of the lowest LOG_N index bits.
  function automatic bitmap_t bitrev_map(input int unsigned log_n);
    bitmap_t m = identity_map();
    for (int unsigned j = 0; j < log_n; j++) m[j] = 5'(log_n - 1 - j);
    return m;
  endfunction

  // The part of the 3D rotation done in SDRAM (3*LOG_N index bits). The full
  // rotation moves every bit j to (j + LOG_N) mod 3*LOG_N, so that dimension
  // 3 ends up in the lowest bits. The LOCK lowest bits are locked inside a
  // burst and stay put; the LOCK lowest bits of dimension 3, whose final place
  // they occupy, are parked at LOG_N..LOG_N+LOCK-1 instead. The auxiliary
  // permutation then exchanges the two groups.
  function automatic bitmap_t sdram_map(input int unsigned log_n,
                                        input int unsigned lock);
    bitmap_t m = identity_map();
    for (int unsigned j = 0; j < 3 * log_n; j++) begin
      if (j < lock)                  m[j] = 5'(j);
      else if (j < 2 * log_n)        m[j] = 5'(j + log_n);
      else if (j < 2 * log_n + lock) m[j] = 5'(j - log_n);
      else                           m[j] = 5'(j - 2 * log_n);
    end
    return m;
  endfunction

  // Auxiliary permutation after the SDRAM (LOG_N+LOCK index bits): exchanges
  // the LOCK burst-locked bits at 0..LOCK-1 with the bits parked at
  // LOG_N..LOG_N+LOCK-1.
  function automatic bitmap_t aux_map(input int unsigned log_n,
                                      input int unsigned lock);
    bitmap_t m = identity_map();
    for (int unsigned j = 0; j < log_n + lock; j++) begin
      if (j < lock)       m[j] = 5'(j + log_n);
      else if (j >= log_n) m[j] = 5'(j - log_n);
    end
    return m;
  endfunction

endpackage
