// ofdm_pkg: types and constants shared by the 16-QAM OFDM transceiver.
//
// Samples are complex fixed-point numbers: SAMPLE_W-bit two's complement
// real and imaginary parts with SAMPLE_FRAC fractional bits, so the 16-QAM
// levels -3, -1, +1, +3 are -3*2^SAMPLE_FRAC ... +3*2^SAMPLE_FRAC. The word
// length and binary point are this design's choice; they leave room for the
// 16-fold growth of the unscaled receive FFT. Twiddle factors are Q1.14.
package ofdm_pkg;

  parameter int SAMPLE_W    = 18;  // bits per real or imaginary part
  parameter int SAMPLE_FRAC = 10;  // fractional bits: 1.0 = 1024
  parameter int FFT_N       = 16;  // IFFT/FFT length
  parameter int UPSAMPLE    = 16;  // symbol repetition (cyclic prefix)
  parameter int TW_FRAC     = 14;  // twiddle fraction bits

  typedef logic signed [SAMPLE_W-1:0] sample_t;

  typedef struct packed {
    sample_t re;
    sample_t im;
  } cplx_t;

  localparam int CPLX_W = $bits(cplx_t);

  // 16-QAM symbol: [3:2] in-phase di-bit, [1:0] quadrature di-bit
  typedef logic [3:0] qam_sym_t;
  typedef logic [1:0] dibit_t;

  // one level of Table 1 (Gray coded di-bit -> -3,-1,+1,+3), in sample units
  function automatic sample_t level_of(dibit_t d);
    case (d)
      2'b00:   return sample_t'(-3 * (1 <<< SAMPLE_FRAC));
      2'b01:   return sample_t'(-1 * (1 <<< SAMPLE_FRAC));
      2'b11:   return sample_t'( 1 * (1 <<< SAMPLE_FRAC));
      default: return sample_t'( 3 * (1 <<< SAMPLE_FRAC));
    endcase
  endfunction

  // one decision of Table 2 (thresholds -2, 0, +2; boundaries go low)
  function automatic dibit_t dibit_of(sample_t s);
    if (s <= sample_t'(-2 * (1 <<< SAMPLE_FRAC)))  return 2'b00;
    else if (s <= sample_t'(0))                    return 2'b01;
    else if (s <= sample_t'(2 * (1 <<< SAMPLE_FRAC))) return 2'b11;
    else                                           return 2'b10;
  endfunction

endpackage
