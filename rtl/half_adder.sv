// half_adder: one-bit half adder, sum = a XOR b, carry = a AND b.
// Building block of the 2x2 Vedic multiplier. Combinational.
module half_adder (
  input  logic a,
  input  logic b,
  output logic sum,
  output logic carry
);

  always_comb begin
    sum   = a ^ b;
    carry = a & b;
  end

endmodule : half_adder
