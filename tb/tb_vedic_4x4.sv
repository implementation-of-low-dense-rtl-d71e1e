// tb_vedic_4x4: exhaustive self-checking test of the 4x4 Vedic
// multiplier: every operand pair is compared with a*b.
module tb_vedic_4x4;
  logic [4-1:0] a, b;
  logic [8-1:0] s;
  int checks = 0, failures = 0;

  vedic_4x4 dut (.a(a), .b(b), .s(s));

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < (1 << 4); i++)
      for (int j = 0; j < (1 << 4); j++) begin
        a = 4'(i);
        b = 4'(j);
        #1;
        checks++;
        if (int'(s) != i * j) begin
          failures++;
          if (failures < 10) $display("FAIL %0d*%0d = %0d", i, j, s);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule : tb_vedic_4x4
