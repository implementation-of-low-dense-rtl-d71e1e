// cla_adder: W-bit carry look-ahead adder.
//
// Each bit forms generate g(i) = a(i).b(i) and propagate p(i) = a(i)^b(i).
// Every carry is computed directly from these and the carry-in in
// two-level sum-of-products form,
//   c(i+1) = g(i) + p(i)g(i-1) + ... + p(i)..p(1)g(0) + p(i)..p(0)cin,
// so no carry ripples through earlier sum bits; sum(i) = p(i) ^ c(i).
// The adder is used to combine the partial products of the Vedic
// multipliers. Flat look-ahead over all W bits (rather than grouped
// look-ahead) is this design's own choice; the widths used are at most 32.
//
// Interface: a, b W-bit unsigned, cin; sum W-bit and cout.
// Timing: combinational.
module cla_adder #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);

  logic [W-1:0] g, p;
  logic [W:0]   c;

  assign g    = a & b;
  assign p    = a ^ b;
  assign c[0] = cin;

  for (genvar i = 0; i < W; i++) begin : g_carry
    // one product term per generate point j <= i, plus the carry-in term
    logic [i+1:0] t;
    assign t[i+1] = cin & (&p[i:0]);
    for (genvar j = 0; j <= i; j++) begin : g_term
      if (j == i) begin : g_last
        assign t[j] = g[j];
      end else begin : g_prop
        assign t[j] = g[j] & (&p[i:j+1]);
      end
    end
    assign c[i+1] = |t;
  end

  assign sum  = p ^ c[W-1:0];
  assign cout = c[W];

endmodule : cla_adder
