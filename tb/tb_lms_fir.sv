// tb_lms_fir: self-checking testbench of the variable-coefficient FIR stage.
//
// Samples are pushed into the delay line with random gaps while the weights
// are changed at random. After every clock the testbench compares the
// tap-input vector with its own copy of the delay line, and the filter sum yk
// with sum u[n-k]*w_k computed here from the tap values and weights of the
// previous clock (the multipliers' one clock of latency). Reset must clear
// the delay line.
module tb_lms_fir;
  import lms_pkg::*;
  localparam int TAPS = 2;   // reduced from the default 4 to keep the build short

  logic     clk = 1'b0, rst, shift_en;
  sample_t  x_in;
  sample_t  w [TAPS];
  sample_t  u [TAPS];
  product_t yk;
  sample_t  model_u [TAPS];
  sample_t  prev_u [TAPS], prev_w [TAPS];
  product_t expect_yk;
  int       checks = 0, failures = 0, shifts = 0;

  lms_fir #(.TAPS(TAPS)) dut (.clk, .rst, .shift_en, .x_in, .w, .u, .yk);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic sample_t rnd_q();
    // value in [-2, 2) with DEF_FRAC_W fractional bits, or a full-range word
    logic [63:0] r;
    r = {$urandom, $urandom};
    return ($urandom % 4 == 0) ? sample_t'(r) : ($signed(r) >>> (63 - DEF_FRAC_W - 1));
  endfunction

  initial begin
    rst = 1'b1; shift_en = 1'b0; x_in = '0;
    for (int k = 0; k < TAPS; k++) begin w[k] = '0; model_u[k] = '0; end
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int k = 0; k < TAPS; k++) begin
      checks++;
      if (u[k] !== '0) begin failures++; $display("tap %0d not cleared by reset", k); end
    end
    for (int i = 0; i < 3000; i++) begin
      prev_u = u;
      shift_en = ($urandom % 3 != 0);
      x_in = rnd_q();
      if ($urandom % 4 == 0) for (int k = 0; k < TAPS; k++) w[k] = rnd_q();
      prev_w = w;
      @(negedge clk);
      if (shift_en) begin
        for (int k = TAPS - 1; k > 0; k--) model_u[k] = model_u[k-1];
        model_u[0] = x_in;
        shifts++;
      end
      for (int k = 0; k < TAPS; k++) begin
        checks++;
        if (u[k] !== model_u[k]) begin
          failures++;
          if (failures < 10) $display("tap %0d: expected %h got %h", k, model_u[k], u[k]);
        end
      end
      // yk now reflects the tap values and weights that were present at the edge
      expect_yk = '0;
      for (int k = 0; k < TAPS; k++) expect_yk += product_t'(prev_u[k]) * product_t'(prev_w[k]);
      checks++;
      if (yk !== expect_yk) begin
        failures++;
        if (failures < 10) $display("yk: expected %h got %h", expect_yk, yk);
      end
    end
    if (shifts == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
