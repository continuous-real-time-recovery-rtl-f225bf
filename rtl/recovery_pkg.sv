// recovery_pkg: shared types and helpers of the overlap-add recovery processor.
//
// The processor removes quadratic phase distortion from a chirped optical
// readout by filtering the ADC stream with a long FIR filter evaluated as
// FFT-based overlap-add block convolution. This package holds what its
// modules share: the rescale used wherever a wide word is cut down to a
// 16-bit word. The cut positions follow the source; rounding and saturating
// in the rescale are this design's.
package recovery_pkg;

  // Right shift by sh with rounding to nearest (half up), then saturation to
  // ow bits (two's complement). The result is returned sign-extended in 64
  // bits; the caller keeps the low ow bits. Rounding rather than truncation
  // matters here: a floor would add -1/2 LSB to every frequency bin, and a
  // bias common to all bins comes out of the inverse transform as an impulse
  // of -N/2 LSB (before the final shift) on the first sample of every segment.
  function automatic logic signed [63:0] shift_sat(input logic signed [63:0] v,
                                                   input int unsigned sh,
                                                   input int unsigned ow);
    logic signed [63:0] s, hi, lo;
    s  = (sh == 0) ? v : (v + (64'sd1 <<< (sh - 1))) >>> sh;
    hi = (64'sd1 <<< (ow - 1)) - 64'sd1;
    lo = -(64'sd1 <<< (ow - 1));
    if (s > hi) return hi;
    if (s < lo) return lo;
    return s;
  endfunction

endpackage
