// End-to-end self-checking testbench for the 16x16 Array of Array
// multiplier aoa_mult16x16, at its default (and only) size.
//
// Applies corner operands (zero, one, all ones, single bits), the operand
// pairs of the reference simulation (FFFF x FFFF, FFC0 x 0001,
// FFC0 x 0002), walking-one products, and 200000 random pairs; every product
// is compared with the integer product a * b.
// The two carries that the partial-product addition has to place are
// counted at the 16x16 level: the carry out of the crosswise-product adder
// and the carry out of the second adder. Each must occur at least once, or a
// failure is counted. A time watchdog ends a hung run.
module tb_aoa_mult16x16;
  logic [15:0] a, b;
  logic [31:0] p;
  int checks = 0, failures = 0;
  int cross_carries = 0, second_carries = 0;

  aoa_mult16x16 dut (.a(a), .b(b), .p(p));

  task automatic apply(input logic [15:0] x, input logic [15:0] y);
    logic [31:0] exp;
    a = x; b = y;
    #1;
    exp = 32'(x) * 32'(y);
    checks++;
    if (dut.u_comb.cy1) cross_carries++;
    if (dut.u_comb.cy2) second_carries++;
    if (p !== exp) begin
      failures++;
      if (failures <= 10) $display("FAIL %h * %h: got %h, expected %h", x, y, p, exp);
    end
  endtask

  initial begin
    apply(16'h0000, 16'h0000);
    apply(16'h0001, 16'h0001);
    apply(16'hFFFF, 16'h0000);
    apply(16'hFFFF, 16'h0001);
    // operand pairs of the reference waveform
    apply(16'hFFFF, 16'hFFFF);
    apply(16'hFFC0, 16'h0001);
    apply(16'hFFC0, 16'h0002);
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++) begin
        apply(16'(1) << i, 16'(1) << j);
        apply(~(16'(1) << i), 16'hFFFF);
      end
    for (int k = 0; k < 200000; k++)
      apply(16'($urandom), 16'($urandom));
    $display("cross-product adder carries: %0d, second adder carries: %0d",
             cross_carries, second_carries);
    if (cross_carries == 0) begin
      failures++;
      $display("FAIL carry out of the crosswise-product adder never occurred");
    end
    if (second_carries == 0) begin
      failures++;
      $display("FAIL carry out of the second adder never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
