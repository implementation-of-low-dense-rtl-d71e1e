// tb_dct_approx_n: self-checking test of the fixed-length approximate DCT
// at its default length 64 and at 8, 16 and 32.
//
// The reference matrices are built in the testbench from the definition of
// the recursion, one length at a time: T8 = round(2*C8) and, for n > 8,
//   T_n[2k][c]   = T_n/2[k][c],     T_n[2k][n-1-c]   =  T_n/2[k][c]
//   T_n[2k+1][c] = T_n/2[k][c],     T_n[2k+1][n-1-c] = -T_n/2[k][c]
// for c < n/2 (even rows from the sums, odd rows from the differences).
// The testbench checks that every T_n has mutually orthogonal rows and that
// each output equals T_N * x for impulses, full-scale and random inputs.
module tb_dct_approx_n;
  import dct_ref_pkg::*;

  localparam int DATA_W = 8;
  localparam int NMAX   = 64;

  logic signed [DATA_W-1:0] x8 [8],  x16 [16], x32 [32], x64 [64];
  logic signed [DATA_W+2:0] f8 [8];
  logic signed [DATA_W+3:0] f16 [16];
  logic signed [DATA_W+4:0] f32 [32];
  logic signed [DATA_W+5:0] f64 [64];
  int checks = 0, failures = 0;
  // tm[l] holds the reference matrix of length 8 << l
  int tm [4][NMAX][NMAX];

  dct_approx_n #(.N(8),  .DATA_W(DATA_W)) dut8  (.x(x8),  .f(f8));
  dct_approx_n #(.N(16), .DATA_W(DATA_W)) dut16 (.x(x16), .f(f16));
  dct_approx_n #(.N(32), .DATA_W(DATA_W)) dut32 (.x(x32), .f(f32));
  dct_approx_n dut64 (.x(x64), .f(f64));

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

  function automatic int expect_out(int l, int r, int v[NMAX]);
    int acc = 0;
    for (int c = 0; c < (8 << l); c++) acc += tm[l][r][c] * v[c];
    return acc;
  endfunction

  initial begin
    int v[NMAX];
    // build the reference matrices
    for (int r = 0; r < 8; r++)
      for (int c = 0; c < 8; c++) tm[0][r][c] = t8(r, c);
    for (int l = 1; l < 4; l++) begin
      automatic int n = 8 << l;
      for (int k = 0; k < n / 2; k++)
        for (int c = 0; c < n / 2; c++) begin
          tm[l][2*k][c]       =  tm[l-1][k][c];
          tm[l][2*k][n-1-c]   =  tm[l-1][k][c];
          tm[l][2*k+1][c]     =  tm[l-1][k][c];
          tm[l][2*k+1][n-1-c] = -tm[l-1][k][c];
        end
    end
    // orthogonality of the reference rows
    for (int l = 0; l < 4; l++)
      for (int r = 0; r < (8 << l); r++)
        for (int q = r + 1; q < (8 << l); q++) begin
          automatic int dot = 0;
          for (int c = 0; c < (8 << l); c++) dot += tm[l][r][c] * tm[l][q][c];
          chk(dot, 0, $sformatf("rows %0d,%0d of length %0d orthogonal", r, q, 8 << l));
        end
    // stimulus: impulses, full scale, random
    for (int n = 0; n < 600; n++) begin
      for (int c = 0; c < NMAX; c++) begin
        if (n < NMAX) v[c] = (c == n) ? 1 : 0;
        else if (n == NMAX) v[c] = 127;
        else if (n == NMAX + 1) v[c] = -128;
        else if (n == NMAX + 2) v[c] = (c % 2 != 0) ? -128 : 127;
        else v[c] = rnd_sample(DATA_W);
      end
      for (int c = 0; c < 8; c++)  x8[c]  = DATA_W'(v[c]);
      for (int c = 0; c < 16; c++) x16[c] = DATA_W'(v[c]);
      for (int c = 0; c < 32; c++) x32[c] = DATA_W'(v[c]);
      for (int c = 0; c < 64; c++) x64[c] = DATA_W'(v[c]);
      #1;
      for (int r = 0; r < 8; r++)  chk(int'(f8[r]),  expect_out(0, r, v), $sformatf("N=8 f[%0d]", r));
      for (int r = 0; r < 16; r++) chk(int'(f16[r]), expect_out(1, r, v), $sformatf("N=16 f[%0d]", r));
      for (int r = 0; r < 32; r++) chk(int'(f32[r]), expect_out(2, r, v), $sformatf("N=32 f[%0d]", r));
      for (int r = 0; r < 64; r++) chk(int'(f64[r]), expect_out(3, r, v), $sformatf("N=64 f[%0d]", r));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule : tb_dct_approx_n
