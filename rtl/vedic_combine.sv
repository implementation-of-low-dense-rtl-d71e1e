// vedic_combine: adder network that merges the four partial products of a
// 2H x 2H Vedic multiplier into its 4H-bit product.
//
// The operands are split into halves, a = {ah, al} and b = {bh, bl}, and
// four H x H multipliers form p_ll = al*bl, p_lh = al*bh, p_hl = ah*bl and
// p_hh = ah*bh (each 2H bits). Three carry look-ahead adders, all 2H bits
// wide, then form the product:
//   adder 1: m = p_lh + p_hl                       (crosswise sum, carry ca1)
//   adder 2: t = m + upper half of p_ll            (carry ca2)
//   adder 3: upper half of product = p_hh + {ca1 or ca2, upper half of t}
// The product is {adder-3 sum, lower half of t, lower half of p_ll}.
// ca1 and ca2 both weigh 2^(2H) and can never be 1 together, because
// p_lh + p_hl + (p_ll >> H) < 2^(2H+1); a single OR therefore merges them.
// Adder 3 can never carry out for a correct product; an assertion checks
// that its carry stays 0.
// The three-adder arrangement follows the 4x4 block diagram; how the second
// carry re-enters is this design's own choice, since the diagram leaves it
// open.
//
// Interface: four 2H-bit partial products in, 4H-bit product out.
// Timing: combinational, three adder delays.
module vedic_combine #(
  parameter int unsigned H = 2
) (
  input  logic [2*H-1:0] p_ll,
  input  logic [2*H-1:0] p_lh,
  input  logic [2*H-1:0] p_hl,
  input  logic [2*H-1:0] p_hh,
  output logic [4*H-1:0] prod
);

  logic [2*H-1:0] m, t, hi, b3;
  logic           ca1, ca2, ca3;

  cla_adder #(.W(2*H)) u_add1 (.a(p_lh), .b(p_hl), .cin(1'b0), .sum(m), .cout(ca1));
  cla_adder #(.W(2*H)) u_add2 (.a(m), .b({{H{1'b0}}, p_ll[2*H-1:H]}), .cin(1'b0),
                               .sum(t), .cout(ca2));

  always_comb begin
    b3 = '0;
    b3[H-1:0] = t[2*H-1:H];
    b3[H]     = ca1 | ca2;
  end

  cla_adder #(.W(2*H)) u_add3 (.a(p_hh), .b(b3), .cin(1'b0), .sum(hi), .cout(ca3));

  assign prod = {hi, t[H-1:0], p_ll[H-1:0]};

  // the product always fits in 4H bits, so adder 3 never carries out
  always_comb begin
    assert final (!ca3) else $error("vedic_combine: carry out of adder 3");
  end

endmodule : vedic_combine
