// tb_vedic_8x8: self-checking testbench of the 8x8 Vedic multiplier.
//
// A new operand pair is applied on every clock (exhaustive operands, plus the
// corner cases 0, 1 and all ones), and the product seen one clock later is
// compared with the operands' product computed here with the * operator.
// This checks both the value and the one-clock latency at a rate of one
// multiplication per clock.
module tb_vedic_8x8;
  localparam int N = 8;
  localparam int COUNT = 65536;

  logic           clk = 1'b0;
  logic [N-1:0]   a, b, a_prev, b_prev;
  logic [2*N-1:0] p, expect_p;
  int             checks = 0, failures = 0;

  vedic_8x8 dut (.clk, .a, .b, .p);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (COUNT + 200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [N-1:0] pick(input int unsigned idx, input int which);
    logic [63:0] r;
    r = {$urandom, $urandom};
    if (N <= 8) return (which == 0) ? N'(idx) : N'(idx >> N);
    case (idx % 7)
      0: return '0;
      1: return N'(1);
      2: return '1;
      3: return {1'b1, {(N-1){1'b0}}};
      default: return N'(r);
    endcase
  endfunction

  initial begin
    a = '0; b = '0;
    @(negedge clk);
    for (int unsigned i = 0; i < COUNT; i++) begin
      a_prev = a; b_prev = b;
      a = pick(i, 0);
      b = (N <= 8) ? pick(i, 1) : pick(i / 7 + i, 0);
      // before the next clock edge the output still holds the previous product
      #1;
      expect_p = (2*N)'(a_prev) * (2*N)'(b_prev);
      if (i > 0) begin
        checks++;
        if (p !== expect_p) begin
          failures++;
          if (failures < 10) $display("latency: expected previous product %h, got %h", expect_p, p);
        end
      end
      @(negedge clk);
      // one clock later it holds the product of the new operands
      expect_p = (2*N)'(a) * (2*N)'(b);
      checks++;
      if (p !== expect_p) begin
        failures++;
        if (failures < 10) $display("mismatch: %h * %h = %h, got %h", a, b, expect_p, p);
      end
    end
    // all-ones operands: (2^N-1)^2 = 2^(2N) - 2^(N+1) + 1
    a = '1; b = '1;
    @(negedge clk);
    checks++;
    if (p !== ((2*N)'(1) - ((2*N)'(1) << (N+1)))) begin
      failures++;
      $display("all-ones product wrong: %h", p);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
