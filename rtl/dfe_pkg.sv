// dfe_pkg: shared widths, sample types and fixed-point helpers of the
// 802.11ac two-way channelizer.
//
// The channelizer carries complex baseband samples as an I/Q struct of two
// signed words. Input samples are IN_W-bit two's-complement integers (the A/D
// word), filter coefficients are signed Q1.15 words, internal sums are kept at
// full precision in ACC_W bits (in units of 2^-COEF_FRAC of an input LSB), and
// the outputs are rounded (half up) and saturated to OUT_W bits after a right
// shift by OUT_SHIFT, i.e. an output LSB is 1/4 of an input LSB.
//
// All word lengths here are this design's own choice: the filter structure
// was evaluated in floating point, so no fixed-point format is prescribed.
package dfe_pkg;

  localparam int unsigned IN_W      = 12;  // A/D word per rail
  localparam int unsigned COEF_W    = 16;  // coefficient word, Q1.15
  localparam int unsigned COEF_FRAC = 15;
  localparam int unsigned ACC_W     = 36;  // full-precision sums
  localparam int unsigned OUT_W     = 16;  // output word per rail
  localparam int unsigned OUT_SHIFT = 13;  // acc LSB -> output LSB

  typedef logic signed [IN_W-1:0]   sample_t;
  typedef logic signed [COEF_W-1:0] coef_t;
  typedef logic signed [ACC_W-1:0]  acc_t;
  typedef logic signed [OUT_W-1:0]  out_t;

  typedef struct packed {
    sample_t re;
    sample_t im;
  } iq_t;

  typedef struct packed {
    out_t re;
    out_t im;
  } out_iq_t;

  // Two consecutive input samples x(2m) and x(2m+1): one polyphase step.
  typedef struct packed {
    iq_t x0;  // x(2m),   feeds the delay branch
    iq_t x1;  // x(2m+1), feeds the Hilbert-transformer branch
  } pair_t;

  typedef enum logic {
    MODE_LINEAR = 1'b0,  // continuous filtering, CP removed after decimation
    MODE_CYCLIC = 1'b1   // CP removed first, per-symbol cyclic convolution
  } mode_e;

  // Round half up, shift right by OUT_SHIFT, saturate to OUT_W bits.
  function automatic out_t round_sat(input acc_t v);
    acc_t r;
    r = (v + (acc_t'(1) <<< (OUT_SHIFT - 1))) >>> OUT_SHIFT;
    if (r > acc_t'((1 <<< (OUT_W - 1)) - 1))
      return out_t'((1 <<< (OUT_W - 1)) - 1);
    else if (r < -acc_t'(1 <<< (OUT_W - 1)))
      return out_t'(-(1 <<< (OUT_W - 1)));
    else
      return out_t'(r);
  endfunction

endpackage
