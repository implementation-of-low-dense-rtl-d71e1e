// tb_vedic_8x8: exhaustive self-checking test of the 8x8 Vedic
// multiplier: every operand pair is compared with a*b.
module tb_vedic_8x8;
  logic [8-1:0] a, b;
  logic [16-1:0] s;
  int checks = 0, failures = 0;

  vedic_8x8 dut (.a(a), .b(b), .s(s));

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < (1 << 8); i++)
      for (int j = 0; j < (1 << 8); j++) begin
        a = 8'(i);
        b = 8'(j);
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
endmodule : tb_vedic_8x8
