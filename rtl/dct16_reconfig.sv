// dct16_reconfig: reconfigurable approximate DCT computing either one
// 16-point transform or two independent 8-point transforms in parallel.
//
// The 16-point approximation is C16 ~ P16 * diag(C8, C8) * A16: a 16-point
// input adder unit (A16) produces a(i) = x(i)+x(15-i) and
// b(i) = x(i)-x(15-i); two identical approximate 8-point DCT units transform
// a and b; the output permutation unit (P16) interleaves them, the first
// unit giving the even coefficients F(2i) and the second the odd ones
// F(2i+1).
//
// Control input sel16 steers 16 two-input muxes in front of the 8-point
// units and 14 two-input muxes behind them:
//   sel16 = 1: one 16-point DCT of x[0..15]; f[2i] = U0[i], f[2i+1] = U1[i]
//   sel16 = 0: unit 0 transforms x[0..7] into f[0..7] and unit 1
//              transforms x[8..15] into f[8..15]
// f[0] and f[15] come from the same unit output in both modes and so need
// no mux, which is why 14 rather than 16 output muxes exist.
//
// Interface: x[0..15] signed DATA_W-bit; f[0..15] signed (DATA_W+4)-bit, at
// full precision in both modes (8-point results are sign-extended).
// Timing: combinational, four adder delays plus two mux levels. The width
// DATA_W is this design's own choice of default (8-bit samples).
module dct16_reconfig #(
  parameter int unsigned DATA_W = 8
) (
  input  logic                     sel16,
  input  logic signed [DATA_W-1:0] x [16],
  output logic signed [DATA_W+3:0] f [16]
);

  localparam int unsigned UW = DATA_W + 1;   // 8-point unit input width
  localparam int unsigned OW = DATA_W + 4;   // 8-point unit output width

  logic signed [UW-1:0] a [8];
  logic signed [UW-1:0] b [8];
  logic signed [UW-1:0] u0_in [8];
  logic signed [UW-1:0] u1_in [8];
  logic signed [OW-1:0] u0_out [8];
  logic signed [OW-1:0] u1_out [8];

  input_adder_unit #(.N(16), .W(DATA_W)) u_add16 (.x(x), .a(a), .b(b));

  // 16/8-point computation selection unit
  always_comb begin
    for (int i = 0; i < 8; i++) begin
      u0_in[i] = sel16 ? a[i] : UW'(x[i]);
      u1_in[i] = sel16 ? b[i] : UW'(x[8+i]);
    end
  end

  dct8_approx #(.IN_W(UW)) u_dct8_0 (.x(u0_in), .f(u0_out));
  dct8_approx #(.IN_W(UW)) u_dct8_1 (.x(u1_in), .f(u1_out));

  // output permutation unit
  always_comb begin
    for (int k = 0; k < 16; k++) begin
      if (k < 8) f[k] = sel16 ? ((k % 2 == 0) ? u0_out[k/2] : u1_out[k/2]) : u0_out[k];
      else       f[k] = sel16 ? ((k % 2 == 0) ? u0_out[k/2] : u1_out[k/2]) : u1_out[k-8];
    end
  end

endmodule : dct16_reconfig
