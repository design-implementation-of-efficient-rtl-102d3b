// ofdm_pkg: constants, sample type and twiddle-factor table shared by the
// 16-subcarrier, 16-QAM OFDM transceiver.
//
// The transceiver moves complex baseband samples as a packed struct of two
// signed DW-bit words. Twiddle factors W16^k = exp(-j*2*pi*k/16) are held in
// signed fixed point with TW_FRAC fractional bits (1.0 = 2^14 = 16384); the
// values are cos(2*pi*k/16) rounded to the nearest integer after scaling by
// 2^14, and sin(2*pi*k/16) = cos(2*pi*(k-4)/16). The FFT size (16 points,
// radix 4) and the 4 bits per 16-QAM symbol follow the published design; the
// word widths, the fixed-point format and the constellation amplitude are this
// implementation's own choices.
package ofdm_pkg;

  localparam int N_FFT        = 16;   // subcarriers per OFDM symbol
  localparam int BITS_PER_SYM = 4;    // 16-QAM: 4 bits per subcarrier
  localparam int BITS_PER_OFDM = N_FFT * BITS_PER_SYM;  // 64 bits per OFDM symbol
  localparam int DW           = 16;   // bits per real/imaginary sample word
  localparam int TW_FRAC      = 14;   // fractional bits of a twiddle factor
  localparam int QAM_UNIT     = 1024; // sample value of constellation level 1
  localparam int CP_LEN       = 4;    // cyclic-prefix length in samples

  typedef logic signed [DW-1:0] sample_t;

  typedef struct packed {
    sample_t re;
    sample_t im;
  } cplx_t;

  typedef logic signed [TW_FRAC+1:0] tw_t;  // range -1.0 .. +1.0

  // cos(2*pi*k/16) * 2^TW_FRAC, rounded
  function automatic tw_t cos16(input int k);
    case (k & 15)
      0:       return tw_t'(16384);
      1, 15:   return tw_t'(15137);
      2, 14:   return tw_t'(11585);
      3, 13:   return tw_t'(6270);
      4, 12:   return tw_t'(0);
      5, 11:   return tw_t'(-6270);
      6, 10:   return tw_t'(-11585);
      7, 9:    return tw_t'(-15137);
      default: return tw_t'(-16384);
    endcase
  endfunction

  // sin(2*pi*k/16) * 2^TW_FRAC
  function automatic tw_t sin16(input int k);
    return cos16(k - 4);
  endfunction

endpackage
