// dct32_reconfig: reconfigurable approximate DCT computing one 32-point
// transform, two 16-point transforms or four 8-point transforms in parallel.
//
// Datapath: a 32-point input adder unit, two 16-point input adder units and
// four approximate 8-point DCT units (U0..U3). Three control blocks make it
// reconfigurable:
//   1. 32 two-input muxes in front of the 16-point adders choose, by whether
//      the size is 32, between the 32-point adder outputs (a to the first,
//      b to the second) and the raw samples x[0..15] / x[16..31];
//   2. 32 two-input muxes in front of the 8-point units choose, by whether
//      the size is above 8, between the 16-point adder outputs and the raw
//      samples x[0..7], x[8..15], x[16..23], x[24..31];
//   3. 30 three-input muxes re-order the 32 unit outputs (Un[i] below) by
//      size; f[0] and f[31] are the same unit output in every mode:
//        DCT_32: f[4i] = U0[i], f[4i+1] = U2[i], f[4i+2] = U1[i], f[4i+3] = U3[i]
//        DCT_16: f[2i] = U0[i], f[2i+1] = U1[i], f[16+2i] = U2[i], f[17+2i] = U3[i]
//        DCT_8 : f[8n+i] = Un[i]
// The 32-point mapping follows from applying the recursive decomposition
// C_N ~ P_N * diag(C_N/2, C_N/2) * A_N twice.
//
// Interface: size selects the mode (dct_pkg::dct_size_e; 2'd3 acts as
// DCT_16); x[0..31] signed DATA_W-bit; f[0..31] signed (DATA_W+5)-bit at
// full precision. Timing: combinational, five adder delays plus three mux
// levels. DATA_W = 8 is this design's own default.
module dct32_reconfig
  import dct_pkg::*;
#(
  parameter int unsigned DATA_W = 8
) (
  input  dct_size_e                size,
  input  logic signed [DATA_W-1:0] x [32],
  output logic signed [DATA_W+4:0] f [32]
);

  localparam int unsigned AW = DATA_W + 1;   // 16-point adder input width
  localparam int unsigned UW = DATA_W + 2;   // 8-point unit input width
  localparam int unsigned OW = DATA_W + 5;   // 8-point unit output width

  logic is32;   // control block 1: size is 32
  logic gt8;    // control block 2: size is above 8

  always_comb begin
    is32 = (size == DCT_32);
    gt8  = (size != DCT_8);
  end

  // 32-point input adder unit
  logic signed [AW-1:0] a32 [16];
  logic signed [AW-1:0] b32 [16];
  input_adder_unit #(.N(32), .W(DATA_W)) u_add32 (.x(x), .a(a32), .b(b32));

  // control block 1: inputs of the two 16-point adder units
  logic signed [AW-1:0] in16 [2][16];
  always_comb begin
    for (int k = 0; k < 16; k++) begin
      in16[0][k] = is32 ? a32[k] : AW'(x[k]);
      in16[1][k] = is32 ? b32[k] : AW'(x[16+k]);
    end
  end

  logic signed [UW-1:0] a16 [2][8];
  logic signed [UW-1:0] b16 [2][8];
  input_adder_unit #(.N(16), .W(AW)) u_add16_0 (.x(in16[0]), .a(a16[0]), .b(b16[0]));
  input_adder_unit #(.N(16), .W(AW)) u_add16_1 (.x(in16[1]), .a(a16[1]), .b(b16[1]));

  // control block 2: inputs of the four 8-point units
  logic signed [UW-1:0] u_in  [4][8];
  logic signed [OW-1:0] u_out [4][8];
  always_comb begin
    for (int i = 0; i < 8; i++) begin
      u_in[0][i] = gt8 ? a16[0][i] : UW'(x[i]);
      u_in[1][i] = gt8 ? b16[0][i] : UW'(x[8+i]);
      u_in[2][i] = gt8 ? a16[1][i] : UW'(x[16+i]);
      u_in[3][i] = gt8 ? b16[1][i] : UW'(x[24+i]);
    end
  end

  for (genvar n = 0; n < 4; n++) begin : g_unit
    dct8_approx #(.IN_W(UW)) u_dct8 (.x(u_in[n]), .f(u_out[n]));
  end

  // control block 3: output permutation, one three-input mux per output
  for (genvar k = 0; k < 32; k++) begin : g_out
    // unit and unit-output index feeding f[k] in each mode
    localparam int U32 = (k % 4 == 0) ? 0 : (k % 4 == 1) ? 2 : (k % 4 == 2) ? 1 : 3;
    localparam int I32 = k / 4;
    localparam int U16 = 2 * (k / 16) + (k % 2);
    localparam int I16 = (k % 16) / 2;
    localparam int U8  = k / 8;
    localparam int I8  = k % 8;
    always_comb begin
      if (is32)     f[k] = u_out[U32][I32];
      else if (gt8) f[k] = u_out[U16][I16];
      else          f[k] = u_out[U8][I8];
    end
  end

endmodule : dct32_reconfig
