// mfcc_pkg: sizes and fixed-point constants shared by the MFCC feature
// extraction blocks.
//
// Frame and filter-bank sizes follow the design: a 256-point FFT frame,
// 40 triangular Mel filters computed on 5 time-shared MACs, 13 cepstral
// coefficients, and fixed-point values scaled by 10000 in the logarithm
// path. Word widths are this implementation's own choice.
package mfcc_pkg;

  // Frame / filter bank geometry
  localparam int unsigned N_BINS  = 256;  // FFT points per frame
  localparam int unsigned N_FILT  = 40;   // triangular Mel filters
  localparam int unsigned N_MAC   = 5;    // time-shared MACs in the filter bank
  localparam int unsigned N_CEP   = 13;   // cepstral coefficients per frame

  // Word widths (implementation choices)
  localparam int unsigned SAMPLE_W = 16;  // speech sample / FFT real and imaginary part
  localparam int unsigned MAG_W    = 16;  // |FFT| magnitude, unsigned
  localparam int unsigned COEF_W   = 16;  // filter weight x 10000, unsigned
  localparam int unsigned EMAG_W   = 40;  // ear-magnitude accumulator, unsigned
  localparam int unsigned LOG_W    = 32;  // ln() x 10000, signed
  localparam int unsigned COS_W    = 16;  // cosine, signed, COS_FRAC fraction bits
  localparam int unsigned COS_FRAC = 14;
  localparam int unsigned CEP_W    = 32;  // cepstral coefficient x 10000, signed

  // Logarithm fixed point: every value is scaled by 10000
  localparam int unsigned LOG_SCALE  = 10000;
  localparam int unsigned LN2_Q16    = 45426;  // round(ln(2) * 2^16)
  localparam int          LOG_CORR   = 40000;  // "subtract 4" weight-scaling correction, x 10000

  // DCT gain 2/40 in Q16
  localparam int unsigned DCT_GAIN_Q16 = 3277; // round(2/40 * 2^16)

  typedef logic [$clog2(N_FILT)-1:0] filt_idx_t;
  typedef logic [$clog2(N_BINS)-1:0] bin_idx_t;

  // One complex FFT output word as it sits in the Read-FIFO
  typedef struct packed {
    logic signed [SAMPLE_W-1:0] re;
    logic signed [SAMPLE_W-1:0] im;
  } cplx_t;

endpackage
