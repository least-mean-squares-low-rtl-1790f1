// lms_error: estimation error of the LMS filter, e = d - y.
//
// The filter sum yk carries 2*FRAC_W fractional bits; it is shifted right
// arithmetically by FRAC_W and truncated to 64 bits to give the filter output
// y in the sample format, which is subtracted from the reference d. Truncation
// (rounding toward minus infinity) and wrap-around on overflow are this
// design's choices.
//
// Purely combinational.
module lms_error
  import lms_pkg::*;
#(
  parameter int unsigned FRAC_W = lms_pkg::DEF_FRAC_W
) (
  input  product_t yk,
  input  sample_t  d,
  output sample_t  y,
  output sample_t  e
);

  product_t yk_scaled;

  always_comb begin
    yk_scaled = yk >>> FRAC_W;
    y         = sample_t'(yk_scaled);
    e         = d - y;
  end

endmodule
