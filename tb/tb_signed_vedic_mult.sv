// tb_signed_vedic_mult: self-checking testbench of the signed 64x64 multiplier.
//
// A new signed operand pair is applied every clock: random values of all
// magnitudes and both signs, and the corners 0, 1, -1, the most positive and
// the most negative number. Just before the next clock edge the output must
// still hold the previous product, one clock later the new one; the expected
// value is the signed product computed with the * operator.
module tb_signed_vedic_mult;
  import lms_pkg::*;

  logic     clk = 1'b0;
  sample_t  a, b, a_prev, b_prev;
  product_t p, expect_p;
  int       checks = 0, failures = 0;
  int       neg_products = 0;

  signed_vedic_mult dut (.clk, .a, .b, .p);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic sample_t pick(input int unsigned sel);
    logic [63:0] r;
    int unsigned sh;
    r  = {$urandom, $urandom};
    sh = $urandom_range(63, 0);
    case (sel % 8)
      0: return '0;
      1: return 64'sd1;
      2: return -64'sd1;
      3: return {1'b0, {63{1'b1}}};
      4: return {1'b1, {63{1'b0}}};
      5: return sample_t'($signed(r) >>> sh);
      default: return sample_t'(r);
    endcase
  endfunction

  initial begin
    a = '0; b = '0;
    @(negedge clk);
    for (int i = 0; i < 4000; i++) begin
      a_prev = a; b_prev = b;
      a = pick($urandom);
      b = pick($urandom);
      #1;
      expect_p = product_t'(a_prev) * product_t'(b_prev);
      checks++;
      if (p !== expect_p) begin
        failures++;
        if (failures < 10) $display("latency: expected %h, got %h", expect_p, p);
      end
      @(negedge clk);
      expect_p = product_t'(a) * product_t'(b);
      if (expect_p < 0) neg_products++;
      checks++;
      if (p !== expect_p) begin
        failures++;
        if (failures < 10) $display("mismatch: %0d * %0d = %0d, got %0d", a, b, expect_p, p);
      end
    end
    if (neg_products == 0) begin
      failures++;
      $display("no negative product was exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
