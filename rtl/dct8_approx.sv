// dct8_approx: multiplier-free approximate 8-point DCT.
//
// Computes F = T * X where T is the 8x8 integer matrix obtained by rounding
// every entry of 2*C8 (the exact orthonormal DCT-II matrix) to the nearest
// integer, so every coefficient is 0, +1 or -1. The flow graph has three
// adder stages and 22 adders in total:
//   stage 1: butterflies  a(i) = x(i) + x(7-i),  c(i) = x(i) - x(7-i)
//   stage 2: even half    a0+a3, a1+a2, a0-a3, a2-a1
//            odd half     c0+c1, c0-c1, c2+c3, c2-c3
//   stage 3: F0 = (a0+a3)+(a1+a2)   F4 = (a0+a3)-(a1+a2)
//            F2 = a0-a3             F6 = a2-a1
//            F1 = (c0+c1)+c2        F5 = (c0-c1)+c3
//            F3 = c0-(c2+c3)        F7 = (c2-c3)-c1
// The three-stage structure, the 22-addition count and the absence of shifts
// follow the signal-flow graph the design is based on; the signs of the
// individual coefficients are those of the rounded 2*C8 matrix.
//
// Interface: x[0..7] signed IN_W-bit samples, f[0..7] signed (IN_W+3)-bit
// coefficients, kept at full precision (no overflow is possible).
// Timing: purely combinational, three adder delays from x to f. The output
// is not scaled; the transform carries a gain that a quantiser would absorb.
module dct8_approx #(
  parameter int unsigned IN_W = 8
) (
  input  logic signed [IN_W-1:0] x [8],
  output logic signed [IN_W+2:0] f [8]
);

  logic signed [IN_W:0]   a [4];   // even butterfly sums
  logic signed [IN_W:0]   c [4];   // odd butterfly differences
  logic signed [IN_W+1:0] e [4];   // stage-2 even terms
  logic signed [IN_W+1:0] d [4];   // stage-2 odd terms

  always_comb begin
    // stage 1
    for (int i = 0; i < 4; i++) begin
      a[i] = (IN_W+1)'(x[i]) + (IN_W+1)'(x[7-i]);
      c[i] = (IN_W+1)'(x[i]) - (IN_W+1)'(x[7-i]);
    end
    // stage 2
    e[0] = (IN_W+2)'(a[0]) + (IN_W+2)'(a[3]);
    e[1] = (IN_W+2)'(a[1]) + (IN_W+2)'(a[2]);
    e[2] = (IN_W+2)'(a[0]) - (IN_W+2)'(a[3]);
    e[3] = (IN_W+2)'(a[2]) - (IN_W+2)'(a[1]);
    d[0] = (IN_W+2)'(c[0]) + (IN_W+2)'(c[1]);
    d[1] = (IN_W+2)'(c[0]) - (IN_W+2)'(c[1]);
    d[2] = (IN_W+2)'(c[2]) + (IN_W+2)'(c[3]);
    d[3] = (IN_W+2)'(c[2]) - (IN_W+2)'(c[3]);
    // stage 3
    f[0] = (IN_W+3)'(e[0]) + (IN_W+3)'(e[1]);
    f[4] = (IN_W+3)'(e[0]) - (IN_W+3)'(e[1]);
    f[2] = (IN_W+3)'(e[2]);
    f[6] = (IN_W+3)'(e[3]);
    f[1] = (IN_W+3)'(d[0]) + (IN_W+3)'(c[2]);
    f[5] = (IN_W+3)'(d[1]) + (IN_W+3)'(c[3]);
    f[3] = (IN_W+3)'(c[0]) - (IN_W+3)'(d[2]);
    f[7] = (IN_W+3)'(d[3]) - (IN_W+3)'(c[1]);
  end

endmodule : dct8_approx
