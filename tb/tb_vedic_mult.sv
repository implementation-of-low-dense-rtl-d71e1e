// tb_vedic_mult: self-checking test of the recursive Vedic multiplier at
// its default width of 32 bits and, in a second instance, at 16 bits.
// Checks corner operands, the reference pair 0x38000000 x 0x338FFFFF
// (product 0x0B477FFFC8000000) and random pairs against a 64-bit a*b.
module tb_vedic_mult;
  logic [31:0] a, b;
  logic [63:0] p;
  logic [15:0] a16, b16;
  logic [31:0] p16;
  int checks = 0, failures = 0;

  vedic_mult dut (.a(a), .b(b), .p(p));
  vedic_mult #(.WIDTH(16)) dut16 (.a(a16), .b(b16), .p(p16));

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic [31:0] x, input logic [31:0] y);
    logic [63:0] exp;
    a = x;
    b = y;
    a16 = x[15:0];
    b16 = y[31:16];
    exp = 64'(x) * 64'(y);
    #1;
    checks += 2;
    if (p !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %h*%h = %h expected %h", x, y, p, exp);
    end
    if (p16 !== 32'(x[15:0]) * 32'(y[31:16])) begin
      failures++;
      if (failures < 10) $display("FAIL16 %h*%h = %h", x[15:0], y[31:16], p16);
    end
  endtask

  initial begin
    chk(32'h3800_0000, 32'h338F_FFFF);
    checks++;
    if (p !== 64'h0B47_7FFF_C800_0000) begin
      failures++;
      $display("FAIL fixed vector %h", p);
    end
    chk(32'hFFFF_FFFF, 32'hFFFF_FFFF);
    chk(32'hFFFF_FFFF, 32'h0000_0001);
    chk(32'h0000_0000, 32'hDEAD_BEEF);
    chk(32'h8000_0000, 32'h8000_0000);
    chk(32'hFFFF_0000, 32'h0000_FFFF);
    for (int n = 0; n < 20000; n++) chk($urandom, $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule : tb_vedic_mult
