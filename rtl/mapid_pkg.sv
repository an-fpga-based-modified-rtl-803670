// mapid_pkg: types and widths shared by the MA-PID controller.
//
// The compensator works on sign-magnitude error samples (an ADC_W-bit
// magnitude plus a sign bit), unsigned effective gains of GAIN_W bits and
// incremental-PID coefficients of COEF_W bits. Product and increment widths
// follow from those so that no intermediate result can overflow for any
// gain that fits GAIN_W. The four adaptation states are the ones the
// controller distinguishes for every error sample (steady, rising transient,
// falling transient, transition through zero).
package mapid_pkg;

  // Width of the effective gains Kp+alpha, Ki+beta, Kd+gamma (unsigned).
  localparam int GAIN_W = 16;
  // Width of a = Kp+Ki+Kd and |b| = Kp+2Kd; c = Kd needs only GAIN_W.
  localparam int COEF_W = GAIN_W + 2;

  // Classification of one error sample by the gain adaptation.
  typedef enum logic [1:0] {
    ST_STEADY     = 2'd0,  // |e(k)| below threshold: alpha = beta = gamma = 0
    ST_RISING     = 2'd1,  // |e(k)| >= |e(k-1)|: full DeltaK, peak updated
    ST_FALLING    = 2'd2,  // |e(k)| <  |e(k-1)|: DeltaK scaled by |e|/|peak|
    ST_TRANSITION = 2'd3   // sign change: DeltaK_p2, DeltaK_i2
  } adapt_state_t;

endpackage
