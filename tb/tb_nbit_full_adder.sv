// Self-checking testbench for nbit_full_adder.
// The default 4-bit adder is checked exhaustively (every a, b and cin); a
// 16-bit instance, the width used in the 16x16 multiplier, gets random
// operands plus the all-ones carry-chain cases. Expected values come from the
// simulator's own + operator. A time watchdog ends a hung run.
module tb_nbit_full_adder;
  logic [3:0]  a4, b4, s4;
  logic        c4, co4;
  logic [15:0] a16, b16, s16;
  logic        c16, co16;
  int checks = 0, failures = 0;

  nbit_full_adder dut4 (.a(a4), .b(b4), .cin(c4), .sum(s4), .cout(co4));
  nbit_full_adder #(.WIDTH(16)) dut16 (.a(a16), .b(b16), .cin(c16), .sum(s16), .cout(co16));

  task automatic check16(input logic [15:0] x, input logic [15:0] y, input logic c);
    logic [16:0] exp;
    a16 = x; b16 = y; c16 = c;
    #1;
    exp = 17'(x) + 17'(y) + 17'(c);
    checks++;
    if ({co16, s16} !== exp) begin
      failures++;
      $display("FAIL 16-bit %h + %h + %b: got %h, expected %h", x, y, c, {co16, s16}, exp);
    end
  endtask

  initial begin
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++)
        for (int c = 0; c < 2; c++) begin
          a4 = 4'(i); b4 = 4'(j); c4 = 1'(c);
          #1;
          checks++;
          if ({co4, s4} !== 5'(i + j + c)) begin
            failures++;
            $display("FAIL 4-bit %0d + %0d + %0d: got %0d", i, j, c, {co4, s4});
          end
        end
    check16(16'hFFFF, 16'h0000, 1'b1);
    check16(16'hFFFF, 16'hFFFF, 1'b1);
    check16(16'h8000, 16'h8000, 1'b0);
    for (int k = 0; k < 2000; k++)
      check16(16'($urandom), 16'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
