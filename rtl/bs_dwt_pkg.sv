// bs_dwt_pkg -- types and constants shared by the B-spline DWT blocks.
//
// The filter selector names the three wavelet filter banks the datapath can
// switch between on line. The real constants are the distributed-part
// coefficients 1/r, b/a and 1/a of each bank: r is the real root and
// a = c*c', b = c+c' the products/sums of the complex root pairs of the
// polynomial Phi_{l-1}(theta). They are quantised to two's complement with
// COEF_FRAC fractional bits by quant(), rounding to the nearest integer, at
// elaboration time, so the hardware only ever sees integer constants.
package bs_dwt_pkg;

  typedef enum logic [1:0] {
    FILT_9_7   = 2'd0,   // CDF 9/7: Q = W_ab(z), R = L_r(-z)
    FILT_6_10  = 2'd1,   // 6/10:    Q = L_r(z),  R = W_ab(-z)
    FILT_10_18 = 2'd2    // 10/18:   Q = W_a1b1(z), R = W_a0b0(-z) W_a2b2(-z)
  } filter_e;

  // 9/7 and 6/10 share one real root r and one complex pair (a, b).
  localparam real BA_9_7  = -1.079303580344;
  localparam real IA_9_7  =  6.847681897167;
  localparam real IR_9_7  = -2.920696419656;
  // 10/18: three complex pairs, index 0 = smallest modulus, 2 = largest.
  localparam real BA1_10_18 = -2.603974030008;
  localparam real IA1_10_18 = 10.445744319527;
  localparam real BA0_10_18 = -6.457178409811;
  localparam real IA0_10_18 = 12.114739453982;
  localparam real BA2_10_18 =  2.061152439819;
  localparam real IA2_10_18 =  7.301607799117;

  // Round v * 2^frac to the nearest integer (ties away from zero).
  function automatic int quant(real v, int frac);
    real s;
    s = v * real'(64'd1 << frac);
    return (s >= 0.0) ? int'($floor(s + 0.5)) : -int'($floor(-s + 0.5));
  endfunction

endpackage
