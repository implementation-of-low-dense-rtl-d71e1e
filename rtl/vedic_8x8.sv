// vedic_8x8: 8x8-bit unsigned Vedic multiplier.
//
// Built like the 4x4 unit one level up: the operands are split into 4-bit
// halves, four 4x4 Vedic units form the four partial products in parallel
// and three 8-bit carry look-ahead adders (vedic_combine) merge them into
// the 16-bit product. That the 8x8 unit is made of four 4x4 units follows
// the document; reusing the 4x4 unit's three-adder merge for it is this
// design's own choice.
//
// Interface: a, b 8-bit unsigned; s = a*b, 16-bit. Timing: combinational.
module vedic_8x8 (
  input  logic [7:0]  a,
  input  logic [7:0]  b,
  output logic [15:0] s
);

  logic [7:0] p_ll, p_lh, p_hl, p_hh;

  vedic_4x4 u_ll (.a(a[3:0]), .b(b[3:0]), .s(p_ll));
  vedic_4x4 u_lh (.a(a[3:0]), .b(b[7:4]), .s(p_lh));
  vedic_4x4 u_hl (.a(a[7:4]), .b(b[3:0]), .s(p_hl));
  vedic_4x4 u_hh (.a(a[7:4]), .b(b[7:4]), .s(p_hh));

  vedic_combine #(.H(4)) u_comb (
    .p_ll(p_ll), .p_lh(p_lh), .p_hl(p_hl), .p_hh(p_hh), .prod(s)
  );

endmodule : vedic_8x8
