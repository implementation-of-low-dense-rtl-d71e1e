// dct_approx_n: fixed-length N-point approximate DCT for any power of two
// N >= 8 (default 64), built by unrolling the recursion
//   C_N ~ P_N * diag(C_N/2, C_N/2) * A_N
// down to the 8-point kernel.
//
// Structure: L = log2(N/8) levels of input adder units, then 2^L
// approximate 8-point kernels.
//   level s has 2^s segments of N/2^s samples; an input adder unit on
//   segment j produces a(i) = x(i) + x(M-1-i) as segment 2j and
//   b(i) = x(i) - x(M-1-i) as segment 2j+1 of level s+1 (M = N/2^s);
//   kernel j transforms the 8-sample segment j of the last level.
// Output permutation: each level sends a-results to even and b-results to
// odd coefficients, so kernel j's output i lands on
//   f[i * 2^L + bitreverse_L(j)].
// Cost: N adders per level plus 22 per kernel, N(log2 N - 1/4) additions
// in all (368 for N = 64). Every level widens the data by one bit, so the
// outputs are DATA_W + log2(N) bits and cannot overflow.
// The recursion and its addition count follow the document; the generic
// length parameter, the sample width and the unscaled integer output are
// this design's own choices.
//
// Interface: x[0..N-1] signed DATA_W-bit; f[0..N-1] signed
// (DATA_W + log2 N)-bit. Timing: combinational, log2(N) adder delays.
module dct_approx_n #(
  parameter int unsigned N      = 64,
  parameter int unsigned DATA_W = 8
) (
  input  logic signed [DATA_W-1:0]         x [N],
  output logic signed [DATA_W+$clog2(N)-1:0] f [N]
);

  localparam int unsigned L  = $clog2(N) - 3;   // adder levels above 8 points
  localparam int unsigned NK = N / 8;           // number of 8-point kernels
  localparam int unsigned KW = DATA_W + L;      // kernel input width

  initial begin
    if (N < 8 || (N & (N - 1)) != 0) $error("dct_approx_n: N must be a power of two >= 8");
  end

  // kernel inputs and outputs
  logic signed [KW-1:0] k_in  [NK][8];
  logic signed [KW+2:0] k_out [NK][8];

  if (L == 0) begin : g_no_levels
    always_comb begin
      for (int i = 0; i < 8; i++) k_in[0][i] = x[i];
    end
  end else begin : g_levels
    for (genvar s = 0; s < L; s++) begin : g_lvl
      localparam int unsigned NS = 1 << s;        // segments at this level
      localparam int unsigned M  = N >> s;        // samples per segment
      localparam int unsigned W  = DATA_W + s;    // sample width here
      logic signed [W-1:0] seg_in  [NS][M];
      logic signed [W:0]   seg_out [2*NS][M/2];

      if (s == 0) begin : g_from_x
        always_comb begin
          for (int i = 0; i < N; i++) seg_in[0][i] = x[i];
        end
      end else begin : g_from_prev
        always_comb begin
          for (int j = 0; j < NS; j++)
            for (int i = 0; i < M; i++) seg_in[j][i] = g_lvl[s-1].seg_out[j][i];
        end
      end

      for (genvar j = 0; j < NS; j++) begin : g_seg
        input_adder_unit #(.N(M), .W(W)) u_add (
          .x(seg_in[j]), .a(seg_out[2*j]), .b(seg_out[2*j+1])
        );
      end
    end

    always_comb begin
      for (int j = 0; j < NK; j++)
        for (int i = 0; i < 8; i++) k_in[j][i] = g_lvl[L-1].seg_out[j][i];
    end
  end

  for (genvar j = 0; j < NK; j++) begin : g_kernel
    dct8_approx #(.IN_W(KW)) u_dct8 (.x(k_in[j]), .f(k_out[j]));
  end

  // output permutation: kernel j, output i -> f[i * NK + bitreverse(j)]
  function automatic int unsigned bitrev(int unsigned v, int unsigned bits);
    int unsigned r = 0;
    for (int unsigned b = 0; b < bits; b++) r = (r << 1) | ((v >> b) & 1);
    return r;
  endfunction

  for (genvar j = 0; j < NK; j++) begin : g_perm_j
    for (genvar i = 0; i < 8; i++) begin : g_perm_i
      assign f[i * NK + bitrev(j, L)] = k_out[j][i];
    end
  end

endmodule : dct_approx_n
