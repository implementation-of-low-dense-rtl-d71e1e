// tb_vedic_2x2: exhaustive self-checking test of the 2x2 Vedic multiplier
// (all 16 operand pairs against a*b).
module tb_vedic_2x2;
  logic [1:0] a, b;
  logic [3:0] r;
  int checks = 0, failures = 0;

  vedic_2x2 dut (.a(a), .b(b), .r(r));

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) begin
        a = 2'(i);
        b = 2'(j);
        #1;
        checks++;
        if (int'(r) != i * j) begin
          failures++;
          $display("FAIL %0d*%0d = %0d", i, j, r);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule : tb_vedic_2x2
