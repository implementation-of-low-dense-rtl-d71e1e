// vedic_mult: WIDTH x WIDTH-bit unsigned Vedic multiplier, WIDTH a power of
// two (default 32, the operand width of the reference multiplier).
//
// The construction that turns four 2x2 units into a 4x4 unit and four 4x4
// units into an 8x8 unit is applied again at every doubling of the width:
// a 2C-bit product is four C-bit products of the operand halves
// (low x low, low x high, high x low, high x high) merged by the
// three-adder network of vedic_combine. Built bottom-up:
//   level 0: (WIDTH/8)^2 hand-built 8x8 units multiply every 8-bit chunk of
//            a with every 8-bit chunk of b, all in parallel;
//   level k: each product of 8*2^k-bit chunks i, j is merged from the four
//            level k-1 products of chunks (2i, 2j), (2i, 2j+1), (2i+1, 2j)
//            and (2i+1, 2j+1);
//   the single product of the last level is a*b.
// For WIDTH = 32 this is sixteen 8x8 units, four 16-bit merges and one
// 32-bit merge. Widths 2, 4 and 8 use the hand-built units directly.
// Extending the 2x2 -> 4x4 -> 8x8 scheme beyond 8 bits this way is this
// design's own choice.
//
// Interface: a, b WIDTH-bit unsigned; p = a*b, 2*WIDTH bits.
// Timing: combinational; the 8x8 units, then log2(WIDTH/8) levels of three
// adders each.
module vedic_mult #(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0]   a,
  input  logic [WIDTH-1:0]   b,
  output logic [2*WIDTH-1:0] p
);

  if (WIDTH == 2) begin : g_2x2
    vedic_2x2 u_mul (.a(a), .b(b), .r(p));
  end else if (WIDTH == 4) begin : g_4x4
    vedic_4x4 u_mul (.a(a), .b(b), .s(p));
  end else if (WIDTH == 8) begin : g_8x8
    vedic_8x8 u_mul (.a(a), .b(b), .s(p));
  end else if (WIDTH >= 16 && (WIDTH & (WIDTH - 1)) == 0) begin : g_tree
    localparam int unsigned NL = $clog2(WIDTH / 8);   // merge levels

    for (genvar k = 0; k <= NL; k++) begin : g_lvl
      localparam int unsigned CW = 8 << k;            // chunk width
      localparam int unsigned NC = WIDTH / CW;        // chunks per operand
      logic [2*CW-1:0] pp [NC][NC];                   // chunk products

      for (genvar i = 0; i < NC; i++) begin : g_i
        for (genvar j = 0; j < NC; j++) begin : g_j
          if (k == 0) begin : g_leaf
            vedic_8x8 u_mul (
              .a(a[CW*i +: CW]), .b(b[CW*j +: CW]), .s(pp[i][j])
            );
          end else begin : g_merge
            vedic_combine #(.H(CW/2)) u_comb (
              .p_ll(g_lvl[k-1].pp[2*i][2*j]),
              .p_lh(g_lvl[k-1].pp[2*i][2*j+1]),
              .p_hl(g_lvl[k-1].pp[2*i+1][2*j]),
              .p_hh(g_lvl[k-1].pp[2*i+1][2*j+1]),
              .prod(pp[i][j])
            );
          end
        end
      end
    end

    assign p = g_lvl[NL].pp[0][0];
  end else begin : g_bad
    $error("vedic_mult: WIDTH must be a power of two, at least 2");
  end

endmodule : vedic_mult
