// tb_dct16_reconfig: self-checking test of the 16/8-point reconfigurable
// approximate DCT. With sel16 = 1 the outputs are compared with the
// recursive 16-point reference, with sel16 = 0 the two halves are compared
// with two independent 8-point references. Modes alternate on random data;
// each mode must be exercised.
module tb_dct16_reconfig;
  import dct_ref_pkg::*;

  localparam int DATA_W = 8;

  logic                     sel16;
  logic signed [DATA_W-1:0] x [16];
  logic signed [DATA_W+3:0] f [16];
  int checks = 0, failures = 0;
  int n16 = 0, n8 = 0;

  dct16_reconfig #(.DATA_W(DATA_W)) dut (.sel16(sel16), .x(x), .f(f));

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int v[16], fr[16], h0[8], h1[8], f0[8], f1[8];
    for (int n = 0; n < 2000; n++) begin
      sel16 = ($urandom % 2 == 1);
      for (int j = 0; j < 16; j++) v[j] = (n < 4) ? ((n % 2 == 0) ? 127 : -128) : rnd_sample(DATA_W);
      for (int j = 0; j < 16; j++) x[j] = DATA_W'(v[j]);
      #1;
      if (sel16) begin
        n16++;
        ref16(v, fr);
      end else begin
        n8++;
        for (int j = 0; j < 8; j++) begin h0[j] = v[j]; h1[j] = v[8+j]; end
        ref8(h0, f0);
        ref8(h1, f1);
        for (int j = 0; j < 8; j++) begin fr[j] = f0[j]; fr[8+j] = f1[j]; end
      end
      for (int k = 0; k < 16; k++) begin
        checks++;
        if (int'(f[k]) != fr[k]) begin
          failures++;
          if (failures < 10) $display("FAIL sel16=%0d f[%0d]=%0d expected %0d", sel16, k, f[k], fr[k]);
        end
      end
    end
    checks += 2;
    if (n16 == 0) failures++;
    if (n8 == 0) failures++;
    $display("modes: 16-point %0d, 2x8-point %0d", n16, n8);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule : tb_dct16_reconfig
