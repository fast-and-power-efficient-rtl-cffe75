// Self-checking testbench for the fundamental 2x2 block vedic_2x2.
// All 16 input combinations are applied and each product is compared with
// the integer product a * b, which is the 2x2 multiplication truth table.
// A time watchdog ends a hung run.
module tb_vedic_2x2;
  logic [1:0] a, b;
  logic [3:0] p;
  int checks = 0, failures = 0;

  vedic_2x2 dut (.a(a), .b(b), .p(p));

  initial begin
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) begin
        a = 2'(i); b = 2'(j);
        #1;
        checks++;
        if (p !== 4'(i * j)) begin
          failures++;
          $display("FAIL %0d * %0d: got %0d", i, j, p);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
