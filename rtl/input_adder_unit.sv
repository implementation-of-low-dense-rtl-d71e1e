// input_adder_unit: N-point input pre-processing stage of the recursive
// approximate DCT.
//
// Splits an N-point DCT into two N/2-point problems using the even/odd
// symmetry of the DCT basis vectors:
//   a(i) = x(i) + x(N-1-i)    feeds the N/2-point DCT giving the even outputs
//   b(i) = x(i) - x(N-1-i)    feeds the N/2-point DCT giving the odd outputs
// for i = 0 .. N/2-1, i.e. N adders/subtractors in one level.
//
// Interface: x[0..N-1] signed W-bit, a[0..N/2-1] and b[0..N/2-1] signed
// (W+1)-bit, at full precision. Timing: combinational, one adder delay.
module input_adder_unit #(
  parameter int unsigned N = 16,
  parameter int unsigned W = 8
) (
  input  logic signed [W-1:0] x [N],
  output logic signed [W:0]   a [N/2],
  output logic signed [W:0]   b [N/2]
);

  initial begin
    if (N < 2 || (N % 2) != 0) $error("input_adder_unit: N must be even");
  end

  always_comb begin
    for (int i = 0; i < N/2; i++) begin
      a[i] = (W+1)'(x[i]) + (W+1)'(x[N-1-i]);
      b[i] = (W+1)'(x[i]) - (W+1)'(x[N-1-i]);
    end
  end

endmodule : input_adder_unit
