// tb_input_adder_unit: self-checking test of the N-point input adder unit
// at its default N = 16 and at N = 32, with extreme and random samples.
// Expected values: a(i) = x(i) + x(N-1-i), b(i) = x(i) - x(N-1-i).
module tb_input_adder_unit;
  import dct_ref_pkg::*;

  localparam int W = 8;

  logic signed [W-1:0] x16 [16];
  logic signed [W:0]   a16 [8], b16 [8];
  logic signed [W-1:0] x32 [32];
  logic signed [W:0]   a32 [16], b32 [16];
  int checks = 0, failures = 0;

  input_adder_unit #(.W(W)) dut16 (.x(x16), .a(a16), .b(b16));
  input_adder_unit #(.N(32), .W(W)) dut32 (.x(x32), .a(a32), .b(b32));

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    int v16[16], v32[32];
    for (int n = 0; n < 1000; n++) begin
      for (int j = 0; j < 16; j++) v16[j] = (n < 2) ? ((n == 0) ? 127 : -128) : rnd_sample(W);
      for (int j = 0; j < 32; j++) v32[j] = (n < 2) ? ((j % 2 == 0) ? 127 : -128) : rnd_sample(W);
      for (int j = 0; j < 16; j++) x16[j] = W'(v16[j]);
      for (int j = 0; j < 32; j++) x32[j] = W'(v32[j]);
      #1;
      for (int i = 0; i < 8; i++) begin
        chk(int'(a16[i]), v16[i] + v16[15-i], "a16");
        chk(int'(b16[i]), v16[i] - v16[15-i], "b16");
      end
      for (int i = 0; i < 16; i++) begin
        chk(int'(a32[i]), v32[i] + v32[31-i], "a32");
        chk(int'(b32[i]), v32[i] - v32[31-i], "b32");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule : tb_input_adder_unit
