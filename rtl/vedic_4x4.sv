// vedic_4x4: 4x4-bit unsigned Vedic multiplier.
//
// Splits a = A3A2A1A0 and b = B3B2B1B0 into 2-bit halves and forms the four
// crosswise/vertical products A1A0 x B1B0, A1A0 x B3B2, A3A2 x B1B0 and
// A3A2 x B3B2 in four 2x2 Vedic units, which work in parallel. Three carry
// look-ahead adders (vedic_combine) sum them into the 8-bit product
// S7..S0; S1S0 come straight from the A1A0 x B1B0 unit.
//
// Interface: a, b 4-bit unsigned; s = a*b, 8-bit. Timing: combinational.
module vedic_4x4 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  output logic [7:0] s
);

  logic [3:0] p_ll, p_lh, p_hl, p_hh;

  vedic_2x2 u_ll (.a(a[1:0]), .b(b[1:0]), .r(p_ll));
  vedic_2x2 u_lh (.a(a[1:0]), .b(b[3:2]), .r(p_lh));
  vedic_2x2 u_hl (.a(a[3:2]), .b(b[1:0]), .r(p_hl));
  vedic_2x2 u_hh (.a(a[3:2]), .b(b[3:2]), .r(p_hh));

  vedic_combine #(.H(2)) u_comb (
    .p_ll(p_ll), .p_lh(p_lh), .p_hl(p_hl), .p_hh(p_hh), .prod(s)
  );

endmodule : vedic_4x4
