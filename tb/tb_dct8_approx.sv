// tb_dct8_approx: self-checking test of the approximate 8-point DCT.
// Applies impulses, extremes and random vectors and compares every output
// with the matrix product round(2*C8) * x from dct_ref_pkg. Also checks
// that the reference matrix has the expected integer values (row 1 is
// 1 1 1 0 0 -1 -1 -1, row 6 is 0 -1 1 0 0 1 -1 0) and that it is
// orthogonal: T*T' is diagonal.
module tb_dct8_approx;
  import dct_ref_pkg::*;

  localparam int IN_W = 8;

  logic signed [IN_W-1:0] x [8];
  logic signed [IN_W+2:0] f [8];
  int checks = 0, failures = 0;

  dct8_approx #(.IN_W(IN_W)) dut (.x(x), .f(f));

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_vec(input int xv[8]);
    int fr[8];
    for (int j = 0; j < 8; j++) x[j] = IN_W'(xv[j]);
    #1;
    ref8(xv, fr);
    for (int i = 0; i < 8; i++) begin
      checks++;
      if (int'(f[i]) != fr[i]) begin
        failures++;
        if (failures < 10) $display("FAIL f[%0d]=%0d expected %0d", i, f[i], fr[i]);
      end
    end
  endtask

  initial begin
    int xv[8];
    automatic int row1[8] = '{1, 1, 1, 0, 0, -1, -1, -1};
    automatic int row6[8] = '{0, -1, 1, 0, 0, 1, -1, 0};
    // reference matrix sanity
    for (int j = 0; j < 8; j++) begin
      checks += 2;
      if (t8(1, j) != row1[j]) failures++;
      if (t8(6, j) != row6[j]) failures++;
    end
    for (int r = 0; r < 8; r++)
      for (int s = 0; s < 8; s++) if (r != s) begin
        automatic int dot = 0;
        for (int j = 0; j < 8; j++) dot += t8(r, j) * t8(s, j);
        checks++;
        if (dot != 0) begin failures++; $display("FAIL rows %0d,%0d not orthogonal", r, s); end
      end
    // impulses: the output is column j of the matrix
    for (int j = 0; j < 8; j++) begin
      xv = '{default: 0};
      xv[j] = 1;
      check_vec(xv);
    end
    // extremes
    xv = '{default: 127};  check_vec(xv);
    xv = '{default: -128}; check_vec(xv);
    for (int j = 0; j < 8; j++) xv[j] = (j % 2 != 0) ? -128 : 127;
    check_vec(xv);
    // random
    for (int n = 0; n < 2000; n++) begin
      for (int j = 0; j < 8; j++) xv[j] = rnd_sample(IN_W);
      check_vec(xv);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule : tb_dct8_approx
