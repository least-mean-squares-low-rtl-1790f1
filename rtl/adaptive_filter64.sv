// adaptive_filter64: LMS adaptive FIR filter on 64-bit samples, built on
// Urdhva Tiryagbhyam (Vedic) multipliers.
//
// For each input x(n) with reference d(n) the filter computes
//   y(n)    = sum_k u[n-k] * w_k          (lms_fir, full-precision sum yk)
//   e(n)    = d(n) - y(n)                 (lms_error)
//   w_k    += mu * u[n-k] * e(n)          (lms_weight_update)
// so the coefficients move toward those that make y track d. The loop uses
// 2*TAPS signed 64x64 Vedic multipliers, TAPS for the filter sum and TAPS for
// the update; each has one clock of latency, and lms_ctrl runs one sample
// through the loop in five clocks.
//
// Number format (this design's choice): samples, reference, error and weights
// are two's complement with FRAC_W fractional bits; yk is the exact 128-bit
// sum with 2*FRAC_W fractional bits. mu = 2^-MU_SHIFT. Weights reset to zero.
//
// Interface: a sample (x_in, d_in) is taken on a clock where in_valid and
// in_ready are both high. out_valid is high for one clock, five clocks later,
// and then yk, y_out, e_out and the updated weights w_out belong to that
// sample; they hold until the next sample's results. Synchronous, active-high
// reset.
module adaptive_filter64
  import lms_pkg::*;
#(
  parameter int unsigned TAPS     = lms_pkg::DEF_TAPS,
  parameter int unsigned FRAC_W   = lms_pkg::DEF_FRAC_W,
  parameter int unsigned MU_SHIFT = lms_pkg::DEF_MU_SHIFT
) (
  input  logic     clk,
  input  logic     rst,
  input  logic     in_valid,
  output logic     in_ready,
  input  sample_t  x_in,
  input  sample_t  d_in,
  output logic     out_valid,
  output product_t yk,
  output sample_t  y_out,
  output sample_t  e_out,
  output sample_t  w_out [TAPS]
);

  logic     accept, err_en, upd_en;
  sample_t  u [TAPS];
  sample_t  w [TAPS];
  sample_t  d_q, y_d, e_d;
  product_t yk_d;

  lms_ctrl u_ctrl (
    .clk, .rst, .in_valid, .in_ready, .accept, .err_en, .upd_en, .out_valid
  );

  lms_fir #(.TAPS(TAPS)) u_fir (
    .clk, .rst, .shift_en(accept), .x_in, .w, .u, .yk(yk_d)
  );

  lms_error #(.FRAC_W(FRAC_W)) u_err (.yk(yk_d), .d(d_q), .y(y_d), .e(e_d));

  lms_weight_update #(.TAPS(TAPS), .FRAC_W(FRAC_W), .MU_SHIFT(MU_SHIFT)) u_upd (
    .clk, .rst, .u, .e(e_out), .upd_en, .w
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      d_q   <= '0;
      yk    <= '0;
      y_out <= '0;
      e_out <= '0;
    end else begin
      if (accept) d_q <= d_in;
      if (err_en) begin
        yk    <= yk_d;
        y_out <= y_d;
        e_out <= e_d;
      end
    end
  end

  assign w_out = w;

endmodule
