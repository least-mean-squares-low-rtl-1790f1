// tb_adaptive_filter64: end-to-end test of the LMS adaptive filter, with the
// tap count reduced to 2 (four 64x64 multipliers) to keep the build short;
// every other parameter is at its default.
//
// The filter is used for system identification: the reference d(n) is the
// output of an "unknown" FIR of the same length with fixed coefficients, driven by the same
// random input x(n) in [-1, 1). Halfway through, the unknown system is
// replaced by another one, so the filter must re-adapt. For every sample the
// testbench runs its own LMS model (wide integer arithmetic, division for the
// scaling) and compares yk, y, e and all weights with it exactly. It also
// checks
//   - the schedule: out_valid exactly five clocks after the sample is taken,
//     in_ready low while a sample is in flight, one result per sample;
//   - convergence: at the end of each half the error is below 2^-20 and the
//     weights are within 2^-16 of the unknown coefficients.
// Mechanisms counted (each must occur): samples offered while the filter was
// busy (in_ready low), idle clocks without a sample, positive and negative
// errors, weight updates, and convergence after the system change.
module tb_adaptive_filter64;
  import lms_pkg::*;
  localparam int TAPS    = 2;
  localparam int F       = DEF_FRAC_W;
  localparam int MU      = DEF_MU_SHIFT;
  localparam int HALF    = 600;
  localparam int SAMPLES = 2 * HALF;
  // coefficients of the unknown system before and after the change
  localparam real H_A [4] = '{0.5, -0.25, 0.125, 0.75};
  localparam real H_B [4] = '{-0.375, 0.625, 0.25, -0.5};

  logic     clk = 1'b0, rst;
  logic     in_valid, in_ready, out_valid;
  sample_t  x_in, d_in, y_out, e_out;
  product_t yk;
  sample_t  w_out [TAPS];

  adaptive_filter64 #(.TAPS(TAPS)) dut (
    .clk, .rst, .in_valid, .in_ready, .x_in, .d_in,
    .out_valid, .yk, .y_out, .e_out, .w_out
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_busy_offers = 0, n_idle = 0, n_pos_err = 0, n_neg_err = 0, n_updates = 0, n_converged = 0;
  int n_results = 0;

  initial begin : watchdog
    repeat (SAMPLES * 12 + 200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- reference model ------------------------------------------------
  typedef logic signed [255:0] wide_t;
  sample_t m_u [TAPS];
  sample_t m_w [TAPS];
  sample_t h   [TAPS];

  function automatic wide_t floor_div(wide_t num, int sh);
    wide_t den, q;
    den = wide_t'(1) <<< sh;
    q   = num / den;
    if (num < 0 && (num % den) != 0) q = q - 1;
    return q;
  endfunction

  function automatic sample_t q(real v);   // real -> fixed point with F fraction bits
    return sample_t'($rtoi(v * (2.0 ** F)));
  endfunction

  function automatic sample_t abs64(sample_t v);
    return (v < 0) ? -v : v;
  endfunction

  task automatic check(string what, logic [127:0] got, logic [127:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 15) $display("%s: expected %h got %h", what, exp, got);
    end
  endtask

  // ---- stimulus and checking ---------------------------------------------
  initial begin
    wide_t   acc, hsum;
    sample_t x, d, m_y, m_e;
    int      t_out;

    rst = 1'b1; in_valid = 1'b0; x_in = '0; d_in = '0;
    for (int k = 0; k < TAPS; k++) begin m_u[k] = '0; m_w[k] = '0; end
    repeat (4) @(negedge clk);
    rst = 1'b0;

    for (int n = 0; n < SAMPLES; n++) begin
      if (n < HALF) begin
        for (int k = 0; k < TAPS; k++) h[k] = q(H_A[k % 4]);
      end else begin
        for (int k = 0; k < TAPS; k++) h[k] = q(H_B[k % 4]);
      end
      // input in [-1, 1); the unknown system sees the same delay line
      x = sample_t'($signed({$urandom, $urandom}) >>> (63 - F));
      for (int k = TAPS - 1; k > 0; k--) m_u[k] = m_u[k-1];
      m_u[0] = x;
      hsum = '0;
      for (int k = 0; k < TAPS; k++) hsum += wide_t'(m_u[k]) * wide_t'(h[k]);
      d = sample_t'(floor_div(hsum, F));

      // occasionally leave the filter idle before offering the sample
      if ($urandom % 4 == 0) begin
        repeat ($urandom_range(3, 1)) begin @(negedge clk); n_idle++; end
      end
      x_in = x; d_in = d; in_valid = 1'b1;
      while (!in_ready) @(negedge clk);
      @(negedge clk);                      // taken on this edge
      // keep offering the next value while busy: in_ready must stay low
      x_in = ~x; d_in = ~d;
      if ($urandom % 2 == 0) in_valid = 1'b0;
      t_out = 0;
      for (int c = 1; c <= 8 && t_out == 0; c++) begin
        if (in_valid && !in_ready && !out_valid) n_busy_offers++;
        if (out_valid) t_out = c;
        else begin
          if (c < 5) begin checks++; if (in_ready) begin failures++; $display("in_ready high while busy"); end end
          @(negedge clk);
        end
      end
      in_valid = 1'b0;
      checks++;
      if (t_out != 5) begin
        failures++;
        $display("sample %0d: out_valid after %0d clocks, expected 5", n, t_out);
      end
      n_results++;

      // model of one LMS iteration
      acc = '0;
      for (int k = 0; k < TAPS; k++) acc += wide_t'(m_u[k]) * wide_t'(m_w[k]);
      m_y = sample_t'(floor_div(acc, F));
      m_e = d - m_y;
      check("yk", yk, 128'(acc));
      check("y", 128'(y_out), 128'(m_y));
      check("e", 128'(e_out), 128'(m_e));
      for (int k = 0; k < TAPS; k++) begin
        m_w[k] = m_w[k] + sample_t'(floor_div(wide_t'(m_u[k]) * wide_t'(m_e), F + MU));
        check($sformatf("w%0d", k), 128'(w_out[k]), 128'(m_w[k]));
      end
      n_updates++;
      if (m_e > 0) n_pos_err++;
      if (m_e < 0) n_neg_err++;

      // convergence at the end of each half
      if (n == HALF - 1 || n == SAMPLES - 1) begin
        logic ok;
        ok = abs64(e_out) < (64'sd1 <<< (F - 20));
        for (int k = 0; k < TAPS; k++) ok &= abs64(w_out[k] - h[k]) < (64'sd1 <<< (F - 16));
        checks++;
        if (ok) n_converged++;
        else begin
          failures++;
          $display("not converged after sample %0d: e=%0d", n, e_out);
        end
      end
    end

    $display("mechanisms: results=%0d busy_offers=%0d idle=%0d pos_err=%0d neg_err=%0d updates=%0d converged=%0d",
             n_results, n_busy_offers, n_idle, n_pos_err, n_neg_err, n_updates, n_converged);
    if (n_busy_offers == 0) begin failures++; $display("never offered a sample while busy"); end
    if (n_idle == 0)        begin failures++; $display("never left idle"); end
    if (n_pos_err == 0 || n_neg_err == 0) begin failures++; $display("error sign never changed"); end
    if (n_updates != SAMPLES) begin failures++; $display("wrong number of updates"); end
    if (n_converged != 2)   begin failures++; $display("did not converge in both halves"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
