// dct_ref_pkg: reference models for the approximate DCT testbenches.
//
// The 8-point reference matrix is computed here from the DCT definition,
//   c(i,j) = e(i) * sqrt(2/N) * cos((2j+1) i pi / (2N)),  e(0) = 1/sqrt(2),
// as T(i,j) = round(2 * c(i,j)) for N = 8, and applied as a plain
// matrix-vector product. The 16- and 32-point references apply the
// recursive decomposition F(2k) = T_N/2 * a, F(2k+1) = T_N/2 * b with
// a(i) = x(i) + x(N-1-i) and b(i) = x(i) - x(N-1-i). None of this shares
// code with the RTL.
package dct_ref_pkg;

  function automatic int t8(int i, int j);
    real e, c;
    e = (i == 0) ? 1.0 / $sqrt(2.0) : 1.0;
    c = 2.0 * e * $sqrt(2.0 / 8.0) * $cos((2.0 * j + 1.0) * i * 3.14159265358979 / 16.0);
    return (c >= 0.0) ? $rtoi(c + 0.5) : -$rtoi(-c + 0.5);
  endfunction

  function automatic void ref8(input int x[8], output int f[8]);
    for (int i = 0; i < 8; i++) begin
      f[i] = 0;
      for (int j = 0; j < 8; j++) f[i] += t8(i, j) * x[j];
    end
  endfunction

  function automatic void ref16(input int x[16], output int f[16]);
    int a[8], b[8], fa[8], fb[8];
    for (int i = 0; i < 8; i++) begin
      a[i] = x[i] + x[15-i];
      b[i] = x[i] - x[15-i];
    end
    ref8(a, fa);
    ref8(b, fb);
    for (int k = 0; k < 8; k++) begin
      f[2*k]   = fa[k];
      f[2*k+1] = fb[k];
    end
  endfunction

  function automatic void ref32(input int x[32], output int f[32]);
    int a[16], b[16], fa[16], fb[16];
    for (int i = 0; i < 16; i++) begin
      a[i] = x[i] + x[31-i];
      b[i] = x[i] - x[31-i];
    end
    ref16(a, fa);
    ref16(b, fb);
    for (int k = 0; k < 16; k++) begin
      f[2*k]   = fa[k];
      f[2*k+1] = fb[k];
    end
  endfunction

  // random signed sample of w bits; every 4th call returns an extreme value
  function automatic int rnd_sample(int w);
    int unsigned r;
    r = $urandom;
    case (r % 8)
      0: return (1 << (w - 1)) - 1;
      1: return -(1 << (w - 1));
      default: return int'($urandom_range((1 << w) - 1)) - (1 << (w - 1));
    endcase
  endfunction

endpackage : dct_ref_pkg
