// tb_lms_weight_update: self-checking testbench of the coefficient update.
//
// Random tap vectors u and errors e are applied; on about half of the clocks
// upd_en is raised one clock after them (the multipliers' latency) and every
// weight must become w_k + floor(u_k*e / 2^(FRAC_W+MU_SHIFT)) modulo 2^64,
// worked out here with the * operator and division; on the other clocks the
// weights must hold. Reset must clear the weights.
module tb_lms_weight_update;
  import lms_pkg::*;
  localparam int TAPS = 2;   // reduced from the default 4 to keep the build short
  localparam int SH   = DEF_FRAC_W + DEF_MU_SHIFT;

  logic     clk = 1'b0, rst, upd_en;
  sample_t  u [TAPS];
  sample_t  e;
  sample_t  w [TAPS];
  sample_t  model_w [TAPS];
  int       checks = 0, failures = 0, updates = 0;

  lms_weight_update #(.TAPS(TAPS)) dut (.clk, .rst, .u, .e, .upd_en, .w);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic sample_t rnd_q();
    logic [63:0] r;
    r = {$urandom, $urandom};
    return $signed(r) >>> $urandom_range(63, 20);
  endfunction

  function automatic sample_t step_of(sample_t a, sample_t b);
    logic signed [191:0] prod, q, div;
    prod = 192'(a) * 192'(b);
    div  = 192'sd1 <<< SH;
    q    = prod / div;
    if (prod < 0 && (prod % div) != 0) q = q - 1;
    return sample_t'(q);
  endfunction

  initial begin
    rst = 1'b1; upd_en = 1'b0; e = '0;
    for (int k = 0; k < TAPS; k++) begin u[k] = '0; model_w[k] = '0; end
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int k = 0; k < TAPS; k++) begin
      checks++;
      if (w[k] !== '0) begin failures++; $display("weight %0d not cleared by reset", k); end
    end
    for (int i = 0; i < 3000; i++) begin
      for (int k = 0; k < TAPS; k++) u[k] = rnd_q();
      e = rnd_q();
      upd_en = 1'b0;
      @(negedge clk);               // products of u and e are captured
      upd_en = ($urandom % 2 == 0);
      if (upd_en) begin
        for (int k = 0; k < TAPS; k++) model_w[k] = model_w[k] + step_of(u[k], e);
        updates++;
      end
      @(negedge clk);
      for (int k = 0; k < TAPS; k++) begin
        checks++;
        if (w[k] !== model_w[k]) begin
          failures++;
          if (failures < 10) $display("w%0d: expected %h got %h", k, model_w[k], w[k]);
        end
      end
    end
    if (updates == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
