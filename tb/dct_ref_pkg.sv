// dct_ref_pkg: reference model of the approximate DCT for the testbenches.
//
// The N-point approximate transform is given as a matrix of -1/0/+1
// coefficients, built recursively from the 8-point matrix:
//   output 2m   of C_N = row m of C_{N/2} applied to a(i) = x(i) + x(N-1-i)
//   output 2m+1 of C_N = row m of C_{N/2} applied to u(j) = x(N/2-1-j) - x(N/2+j)
// so coefficients are computed here as matrix entries, independently of the
// adder network used in the hardware.
package dct_ref_pkg;

  localparam int T8 [8][8] = '{
    '{ 1,  1,  1,  1,  1,  1,  1,  1},
    '{ 1,  1,  1,  0,  0, -1, -1, -1},
    '{ 1,  0,  0, -1, -1,  0,  0,  1},
    '{ 1,  0, -1, -1,  1,  1,  0, -1},
    '{ 1, -1, -1,  1,  1, -1, -1,  1},
    '{ 1, -1,  0,  1, -1,  0,  1, -1},
    '{ 0, -1,  1,  0,  0,  1, -1,  0},
    '{ 0, -1,  1, -1,  1, -1,  1,  0}};

  // coefficient of input i in output k of the n-point approximate DCT
  function automatic int cmat(int n, int k, int i);
    int h;
    if (n == 8) return T8[k][i];
    h = n / 2;
    if (k % 2 == 0)
      return (i < h) ? cmat(h, k / 2, i) : cmat(h, k / 2, n - 1 - i);
    else
      return (i < h) ? cmat(h, (k - 1) / 2, h - 1 - i) : -cmat(h, (k - 1) / 2, i - h);
  endfunction

  // lookup table of cmat for n = 8, 16, 32, filled by init_tables()
  int c8 [8][8];
  int c16 [16][16];
  int c32 [32][32];

  function automatic void init_tables();
    for (int k = 0; k < 8; k++)  for (int i = 0; i < 8; i++)  c8[k][i]  = cmat(8, k, i);
    for (int k = 0; k < 16; k++) for (int i = 0; i < 16; i++) c16[k][i] = cmat(16, k, i);
    for (int k = 0; k < 32; k++) for (int i = 0; i < 32; i++) c32[k][i] = cmat(32, k, i);
  endfunction

  function automatic int coef(int n, int k, int i);
    case (n)
      8:       return c8[k][i];
      16:      return c16[k][i];
      default: return c32[k][i];
    endcase
  endfunction

  // random value in the signed range of w bits
  function automatic int rand_signed(int w);
    int unsigned r;
    r = $urandom;
    return int'(r % (1 << w)) - (1 << (w - 1));
  endfunction

endpackage
