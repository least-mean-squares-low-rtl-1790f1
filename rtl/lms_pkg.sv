// lms_pkg: constants and types shared by the LMS adaptive filter.
//
// The filter works on 64-bit two's complement samples, the word size of the
// 64x64 Vedic multiplier it is built around; products and the filter sum are
// 128 bits. The fixed-point split (DEF_FRAC_W fractional bits), the tap count and
// the power-of-two step size are this design's own defaults: the tap count is
// chosen so that the filter uses eight 64x64 multipliers (four for the filter
// sum, four for the weight update).
package lms_pkg;

  localparam int unsigned DATA_W   = 64;           // sample, weight and error width
  localparam int unsigned PROD_W   = 2 * DATA_W;   // product and filter-sum width
  localparam int unsigned DEF_TAPS     = 4;           // filter length M
  localparam int unsigned DEF_FRAC_W   = 32;           // fractional bits of samples/weights
  localparam int unsigned DEF_MU_SHIFT = 3;           // step size mu = 2^-MU_SHIFT

  typedef logic signed [DATA_W-1:0] sample_t;
  typedef logic signed [PROD_W-1:0] product_t;

  // Five-step schedule of one sample through the adaptation loop.
  typedef enum logic [2:0] {
    ST_IDLE,     // waiting for a sample; accepting it shifts the delay line
    ST_FILT,     // filter products u[n-k]*w_k are captured by the multipliers
    ST_ERR,      // yk summed, e = d - y formed and registered
    ST_UPD,      // update products u[n-k]*e are captured by the multipliers
    ST_WRITE     // w_k += mu*u[n-k]*e; results presented with out_valid
  } lms_state_e;

endpackage
