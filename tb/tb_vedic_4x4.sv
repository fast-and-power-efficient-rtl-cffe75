// Self-checking testbench for the 4x4 block vedic_4x4.
// Every one of the 16 x 16 operand pairs is applied and the product is
// compared with the integer product a * b. A time watchdog ends a hung run.
module tb_vedic_4x4;
  logic [3:0] a, b;
  logic [7:0] p;
  int checks = 0, failures = 0;

  vedic_4x4 dut (.a(a), .b(b), .p(p));

  initial begin
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++) begin
        a = 4'(i); b = 4'(j);
        #1;
        checks++;
        if (p !== 8'(i * j)) begin
          failures++;
          if (failures <= 10) $display("FAIL %0d * %0d: got %0d", i, j, p);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
