// tb_lms_error: self-checking testbench of the error stage e = d - y.
//
// Random 128-bit filter sums (small, large, both signs) and references are
// applied; y must be the sum divided by 2^FRAC_W, rounded toward minus
// infinity and reduced to 64 bits, and e must be d - y modulo 2^64, both
// worked out here with arithmetic on wider integers.
module tb_lms_error;
  import lms_pkg::*;

  product_t yk;
  sample_t  d, y, e;
  int       checks = 0, failures = 0;

  lms_error dut (.yk, .d, .y, .e);

  initial begin : watchdog
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic signed [191:0] wide, q;
    sample_t ref_y, ref_e;
    for (int i = 0; i < 5000; i++) begin
      yk = {$urandom, $urandom, $urandom, $urandom};
      if (i % 3 == 0) yk = yk >>> $urandom_range(127, 40);
      d  = {$urandom, $urandom};
      if (i % 2 == 0) d = d >>> $urandom_range(63, 20);
      #1;
      // floor(yk / 2^FRAC_W) by division, independent of the shifter
      wide  = 192'(yk);
      q     = wide / (192'sd1 <<< DEF_FRAC_W);
      if (wide < 0 && (wide % (192'sd1 <<< DEF_FRAC_W)) != 0) q = q - 1;
      ref_y = sample_t'(q);
      ref_e = sample_t'(192'(d) - q);
      checks += 2;
      if (y !== ref_y) begin
        failures++;
        if (failures < 10) $display("y: yk=%h expected %h got %h", yk, ref_y, y);
      end
      if (e !== ref_e) begin
        failures++;
        if (failures < 10) $display("e: d=%h expected %h got %h", d, ref_e, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
