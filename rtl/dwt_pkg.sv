// dwt_pkg: types and constants shared by the multiple-lifting 2-D DWT.
//
// The (9,7) lifting filter is the irreversible JPEG2000 filter: four lifting
// steps (alpha, beta, gamma, delta) followed by scaling of the lowpass by 1/K
// and the highpass by K. Coefficients are signed fixed-point numbers with
// COEF_FRAC fractional bits, rounded to nearest from the real values; the
// product of a coefficient and a sum is truncated toward minus infinity by an
// arithmetic right shift. Word widths are this design's choice: 8-bit unsigned
// pixels and 16-bit signed words for every intermediate value, which leaves
// headroom for one 2-D decomposition level of 8-bit images.
//
// lift_state_t is the set of four registers of one 1-D lifting core (Fig. 2 of
// the scheme): the previous even input sample and the previous results of the
// first three lifting steps. It is the word stored per column in the temporal
// buffer and per row in the row-DWT register array.
package dwt_pkg;

  localparam int PIX_W     = 8;   // input pixel width (unsigned)
  localparam int DATA_W    = 16;  // signed word width of all coefficients
  localparam int COEF_W    = 16;  // signed coefficient width
  localparam int COEF_FRAC = 12;  // fractional bits of the coefficients

  typedef logic signed [DATA_W-1:0] data_t;
  typedef logic signed [COEF_W-1:0] coef_t;
  typedef logic        [PIX_W-1:0]  pix_t;

  // round(c * 2**12) of the JPEG2000 (9,7) lifting constants
  localparam coef_t ALPHA = -16'sd6497;  // -1.586134342
  localparam coef_t BETA  = -16'sd217;   // -0.052980118
  localparam coef_t GAMMA =  16'sd3616;  //  0.882911076
  localparam coef_t DELTA =  16'sd1817;  //  0.443506852
  localparam coef_t K_HI  =  16'sd5039;  //  K   = 1.230174105 (highpass gain)
  localparam coef_t K_LO  =  16'sd3330;  //  1/K = 0.812893066 (lowpass gain)

  // The four registers of one lifting core.
  typedef struct packed {
    data_t x_even;  // previous even input sample x(2n-2)
    data_t d1;      // previous first predict result
    data_t s1;      // previous first update result
    data_t d2;      // previous second predict result
  } lift_state_t;

  localparam int STATE_W = $bits(lift_state_t);

  // Boundary controls of one lifting step (symmetric extension).
  typedef struct packed {
    logic first1;  // second step of a line: the missing d1(-1) mirrors d1(1)
    logic first2;  // third step of a line:  the missing d2(-1) mirrors d2(1)
    logic last;    // step holding the last sample: missing x(L) mirrors x(L-2)
    logic flush;   // step after the last sample: missing s1(L) mirrors s1(L-2)
  } lift_flags_t;

  // Which intermediate band an output coefficient pair belongs to.
  typedef enum logic {BAND_L = 1'b0, BAND_H = 1'b1} vband_e;

endpackage
