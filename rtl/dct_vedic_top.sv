// dct_vedic_top: the low-complexity approximate DCT engines and the Vedic
// multiplier side by side, each behind one output register stage.
//
// Four independent datapaths share the clock and reset:
//   d16: the 16/8-point reconfigurable approximate DCT (dct16_reconfig);
//        d16_sel16_i = 1 gives one 16-point DCT, 0 two 8-point DCTs.
//   d32: the 32/16/8-point reconfigurable approximate DCT (dct32_reconfig);
//        d32_size_i selects one 32-, two 16- or four 8-point DCTs.
//   dn:  the fixed-length DCTN_N-point approximate DCT (dct_approx_n),
//        64 points by default.
//   mul: the MULT_W x MULT_W-bit Vedic multiplier (vedic_mult).
// Each datapath is combinational; its result is captured in a register when
// the matching *_valid_i is high, and *_valid_o follows one clock later.
// So every operation has a latency of one clock and a new operation can
// start on every clock. The register stage and the valid signals are this
// design's own choice: the transforms and the multiplier themselves are
// combinational arrays of adders.
//
// Reset: rst_n is active-low and synchronous; it clears the valid flags
// only, the data registers load on valid.
module dct_vedic_top
  import dct_pkg::*;
#(
  parameter int unsigned DATA_W = 8,
  parameter int unsigned DCTN_N = 64,
  parameter int unsigned MULT_W = 32
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // 16/8-point engine
  input  logic                     d16_valid_i,
  input  logic                     d16_sel16_i,
  input  logic signed [DATA_W-1:0] d16_x_i [16],
  output logic                     d16_valid_o,
  output logic signed [DATA_W+3:0] d16_f_o [16],
  // 32/16/8-point engine
  input  logic                     d32_valid_i,
  input  dct_size_e                d32_size_i,
  input  logic signed [DATA_W-1:0] d32_x_i [32],
  output logic                     d32_valid_o,
  output logic signed [DATA_W+4:0] d32_f_o [32],
  // fixed-length DCTN_N-point engine
  input  logic                     dn_valid_i,
  input  logic signed [DATA_W-1:0] dn_x_i [DCTN_N],
  output logic                     dn_valid_o,
  output logic signed [DATA_W+$clog2(DCTN_N)-1:0] dn_f_o [DCTN_N],
  // Vedic multiplier
  input  logic                     mul_valid_i,
  input  logic [MULT_W-1:0]        mul_a_i,
  input  logic [MULT_W-1:0]        mul_b_i,
  output logic                     mul_valid_o,
  output logic [2*MULT_W-1:0]      mul_p_o
);

  logic signed [DATA_W+3:0] d16_f [16];
  logic signed [DATA_W+4:0] d32_f [32];
  logic signed [DATA_W+$clog2(DCTN_N)-1:0] dn_f [DCTN_N];
  logic [2*MULT_W-1:0]      mul_p;

  dct16_reconfig #(.DATA_W(DATA_W)) u_dct16 (
    .sel16(d16_sel16_i), .x(d16_x_i), .f(d16_f)
  );

  dct32_reconfig #(.DATA_W(DATA_W)) u_dct32 (
    .size(d32_size_i), .x(d32_x_i), .f(d32_f)
  );

  dct_approx_n #(.N(DCTN_N), .DATA_W(DATA_W)) u_dctn (
    .x(dn_x_i), .f(dn_f)
  );

  vedic_mult #(.WIDTH(MULT_W)) u_mult (
    .a(mul_a_i), .b(mul_b_i), .p(mul_p)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      d16_valid_o <= 1'b0;
      d32_valid_o <= 1'b0;
      dn_valid_o  <= 1'b0;
      mul_valid_o <= 1'b0;
    end else begin
      d16_valid_o <= d16_valid_i;
      d32_valid_o <= d32_valid_i;
      dn_valid_o  <= dn_valid_i;
      mul_valid_o <= mul_valid_i;
    end
  end

  always_ff @(posedge clk) begin
    if (d16_valid_i) d16_f_o <= d16_f;
    if (d32_valid_i) d32_f_o <= d32_f;
    if (dn_valid_i)  dn_f_o  <= dn_f;
    if (mul_valid_i) mul_p_o <= mul_p;
  end

endmodule : dct_vedic_top
