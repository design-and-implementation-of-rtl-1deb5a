// mar_pkg: widths and constants shared by the motion-artifact-reduction LMS
// filter and its APC-OMS look-up-table multipliers.
//
// The 5-bit APC-OMS digit, the 9-word LUT and the shift range 0..3 follow the
// APC-OMS scheme (odd multiples A..15A plus 2A). Sample width, coefficient
// width, fixed-point scaling, filter length and step size are this design's
// own choices; the defaults of the modules' parameters are taken from here.
package mar_pkg;

  // APC-OMS digit: a 5-bit unsigned slice x4..x0 of the multiplier input.
  localparam int unsigned DIGIT_W   = 5;
  // LUT depth: eight odd multiples (A,3A,...,15A) and 2A as ninth word.
  localparam int unsigned LUT_DEPTH = 9;
  localparam int unsigned LUT_AW    = 4;   // address d3 d2 d1 d0

  // Fixed-point format of the adaptive filter (design choices).
  localparam int unsigned DATA_W   = 16;  // ECG samples x(n), d(n), y(n), e(n)
  localparam int unsigned COEF_W   = 16;  // weights w_i(n), signed
  localparam int unsigned COEF_FRAC = 14; // weight fractional bits (Q2.14)
  localparam int unsigned TAPS     = 8;   // filter length L
  localparam int unsigned MU_SHIFT = 20;  // w += (x*e) >>> MU_SHIFT

  // Width of a LUT word / APC-OMS unit result for a COEF_W-bit operand A:
  // |31A| < 2^(COEF_W+4), so COEF_W+5 signed bits hold every value.
  function automatic int unsigned apc_w(int unsigned a_w);
    return a_w + 5;
  endfunction

  // Number of 5-bit digits needed to cover an n-bit word.
  function automatic int unsigned n_digits(int unsigned n);
    return (n + DIGIT_W - 1) / DIGIT_W;
  endfunction

  // Sequencer states of the LMS core (one pass per input sample).
  typedef enum logic [1:0] {
    S_IDLE,    // waiting for a sample pair x(n), d(n)
    S_FILTER,  // y(n) = w^T x(n) and e(n) = d(n) - y(n) registered
    S_ADAPT,   // adaptive weight control computing w(n+1)
    S_WLOAD    // tap LUTs refilled with multiples of the new weights
  } lms_state_e;

  // States of the adaptive weight control.
  typedef enum logic [1:0] {
    W_IDLE,    // waiting for an error sample
    W_ELOAD,   // error LUT being filled with multiples of e(n)
    W_UPDATE   // all weights updated in one cycle
  } wctl_state_e;

endpackage
