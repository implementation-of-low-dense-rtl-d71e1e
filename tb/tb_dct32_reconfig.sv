// tb_dct32_reconfig: self-checking test of the 32/16/8-point
// reconfigurable approximate DCT. Random sizes and samples; each result is
// compared with one 32-point, two 16-point or four 8-point references.
// Every size must be exercised.
module tb_dct32_reconfig;
  import dct_pkg::*;
  import dct_ref_pkg::*;

  localparam int DATA_W = 8;

  dct_size_e                size;
  logic signed [DATA_W-1:0] x [32];
  logic signed [DATA_W+4:0] f [32];
  int checks = 0, failures = 0;
  int nmode [3] = '{0, 0, 0};

  dct32_reconfig #(.DATA_W(DATA_W)) dut (.size(size), .x(x), .f(f));

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int v[32], fr[32], h16[16], g16[16], h8[8], g8[8];
    int m;
    for (int n = 0; n < 3000; n++) begin
      m = (n < 6) ? n % 3 : int'($urandom % 3);
      size = (m == 0) ? DCT_8 : (m == 1) ? DCT_16 : DCT_32;
      for (int j = 0; j < 32; j++) v[j] = (n < 6) ? ((n < 3) ? 127 : -128) : rnd_sample(DATA_W);
      for (int j = 0; j < 32; j++) x[j] = DATA_W'(v[j]);
      #1;
      nmode[m]++;
      if (m == 2) ref32(v, fr);
      else if (m == 1) begin
        for (int h = 0; h < 2; h++) begin
          for (int j = 0; j < 16; j++) h16[j] = v[16*h+j];
          ref16(h16, g16);
          for (int j = 0; j < 16; j++) fr[16*h+j] = g16[j];
        end
      end else begin
        for (int h = 0; h < 4; h++) begin
          for (int j = 0; j < 8; j++) h8[j] = v[8*h+j];
          ref8(h8, g8);
          for (int j = 0; j < 8; j++) fr[8*h+j] = g8[j];
        end
      end
      for (int k = 0; k < 32; k++) begin
        checks++;
        if (int'(f[k]) != fr[k]) begin
          failures++;
          if (failures < 10) $display("FAIL size=%s f[%0d]=%0d expected %0d", size.name(), k, f[k], fr[k]);
        end
      end
    end
    for (int i = 0; i < 3; i++) begin
      checks++;
      if (nmode[i] == 0) failures++;
    end
    $display("modes: 8-point %0d, 16-point %0d, 32-point %0d", nmode[0], nmode[1], nmode[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule : tb_dct32_reconfig
