// tb_cla_adder: self-checking testbench of the carry look-ahead adder.
//
// Two instances are checked against the + operator: an 8-bit adder with every
// operand pair and both carry-in values (all carry chains inside and between
// groups), and the 64-bit default with random operands and carry-chain corner
// cases (all ones plus one, alternating patterns).
module tb_cla_adder;
  logic [7:0]  a8, b8, s8;
  logic        ci8, co8;
  logic [63:0] a64, b64, s64;
  logic        ci64, co64;
  int          checks = 0, failures = 0;

  cla_adder #(.W(8)) dut8  (.a(a8),  .b(b8),  .cin(ci8),  .sum(s8),  .cout(co8));
  cla_adder          dut64 (.a(a64), .b(b64), .cin(ci64), .sum(s64), .cout(co64));

  initial begin : watchdog
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check64(input logic [63:0] x, input logic [63:0] y, input logic c);
    logic [64:0] ref_sum;
    a64 = x; b64 = y; ci64 = c;
    #1;
    ref_sum = {1'b0, x} + {1'b0, y} + 65'(c);
    checks++;
    if ({co64, s64} !== ref_sum) begin
      failures++;
      if (failures < 10) $display("64-bit: %h + %h + %0d = %h, got %h", x, y, c, ref_sum, {co64, s64});
    end
  endtask

  initial begin
    for (int i = 0; i < 512; i++) begin
      for (int j = 0; j < 256; j++) begin
        a8 = 8'(i); b8 = 8'(j); ci8 = i[8];
        #1;
        checks++;
        if ({co8, s8} !== 9'(a8) + 9'(b8) + 9'(ci8)) begin
          failures++;
          if (failures < 10) $display("8-bit: %h + %h + %0d, got %h", a8, b8, ci8, {co8, s8});
        end
      end
    end
    check64('1, 64'd1, 1'b0);
    check64('1, '0, 1'b1);
    check64('1, '1, 1'b1);
    check64(64'h5555_5555_5555_5555, 64'haaaa_aaaa_aaaa_aaaa, 1'b1);
    check64(64'h8000_0000_0000_0000, 64'h8000_0000_0000_0000, 1'b0);
    for (int i = 0; i < 5000; i++)
      check64({$urandom, $urandom}, {$urandom, $urandom}, 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
