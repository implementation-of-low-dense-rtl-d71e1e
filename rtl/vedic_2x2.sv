// vedic_2x2: 2x2-bit unsigned multiplier after the Urdhva-Tiryagbhyam
// ("vertically and crosswise") sutra.
//
// With a = a1a0 and b = b1b0:
//   vertical   r0 = a0.b0
//   crosswise  a0.b1 + a1.b0 in a half adder: sum is r1, carry goes on
//   vertical   a1.b1 + that carry in a second half adder: sum r2, carry r3
// Four two-input ANDs form the bit products and two half adders sum them,
// as in the document's block diagram.
//
// Interface: a, b 2-bit unsigned; r = a*b, 4-bit. Timing: combinational,
// one AND plus two half-adder delays.
module vedic_2x2 (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [3:0] r
);

  logic a0b0, a0b1, a1b0, a1b1;
  logic c1;

  always_comb begin
    a0b0 = a[0] & b[0];
    a0b1 = a[0] & b[1];
    a1b0 = a[1] & b[0];
    a1b1 = a[1] & b[1];
  end

  assign r[0] = a0b0;
  half_adder u_ha_cross (.a(a0b1), .b(a1b0), .sum(r[1]), .carry(c1));
  half_adder u_ha_top   (.a(a1b1), .b(c1),   .sum(r[2]), .carry(r[3]));

endmodule : vedic_2x2
