// tb_cla_adder: self-checking test of the carry look-ahead adder:
// exhaustive at the default width 4 (including carry-in), random plus
// carry-chain corner cases at width 16.
module tb_cla_adder;
  logic [3:0]  a4, b4, s4;
  logic        ci4, co4;
  logic [15:0] a16, b16, s16;
  logic        ci16, co16;
  int checks = 0, failures = 0;

  cla_adder dut4 (.a(a4), .b(b4), .cin(ci4), .sum(s4), .cout(co4));
  cla_adder #(.W(16)) dut16 (.a(a16), .b(b16), .cin(ci16), .sum(s16), .cout(co16));

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++)
        for (int c = 0; c < 2; c++) begin
          a4 = 4'(i); b4 = 4'(j); ci4 = 1'(c);
          #1;
          checks++;
          if ({co4, s4} != 5'(i + j + c)) begin
            failures++;
            if (failures < 10) $display("FAIL w4 %0d+%0d+%0d = %0d", i, j, c, {co4, s4});
          end
        end
    for (int n = 0; n < 5000; n++) begin
      case (n)
        0: begin a16 = 16'hFFFF; b16 = 16'h0000; ci16 = 1'b1; end
        1: begin a16 = 16'hFFFF; b16 = 16'hFFFF; ci16 = 1'b1; end
        2: begin a16 = 16'h7FFF; b16 = 16'h0001; ci16 = 1'b0; end
        default: begin a16 = 16'($urandom); b16 = 16'($urandom); ci16 = 1'($urandom); end
      endcase
      #1;
      checks++;
      if ({co16, s16} != 17'(a16) + 17'(b16) + 17'(ci16)) begin
        failures++;
        if (failures < 10) $display("FAIL w16 %h+%h+%0d = %h", a16, b16, ci16, {co16, s16});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule : tb_cla_adder
