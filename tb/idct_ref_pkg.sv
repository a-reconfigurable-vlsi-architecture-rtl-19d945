// idct_ref_pkg: reference model of the 8x8 IDCT used by the testbenches.
//
// The constants are worked out directly from the 1-D IDCT definition
//   x(n) = sum_k c(k)/2 * z(k) * cos((2n+1) k pi / 16),  c(0) = 1/sqrt(2), else 1,
// as C[k][n] = round(c(k)/2 * cos(...) * 2^8), without the quadrant folding
// the hardware uses. idct2d_int() is the bit-exact integer model of the
// datapath (each stage: full-precision dot product, add 2^7, arithmetic shift
// right by 8, saturate to the stage's width); idct2d_real() is the exact
// real-valued transform X = C^T Z C for accuracy checks.
package idct_ref_pkg;

  localparam real PI = 3.14159265358979323846;

  typedef int block_t [8][8];
  typedef real rblock_t [8][8];

  function automatic real c_real(input int k, input int n);
    real ck;
    ck = (k == 0) ? 1.0 / $sqrt(2.0) : 1.0;
    return ck / 2.0 * $cos(real'((2 * n + 1) * k) * PI / 16.0);
  endfunction

  function automatic int c_int(input int k, input int n);
    return int'($floor(c_real(k, n) * 256.0 + 0.5));
  endfunction

  function automatic longint sat(input longint v, input int w);
    longint hi, lo;
    hi = (longint'(1) <<< (w - 1)) - 1;
    lo = -(longint'(1) <<< (w - 1));
    return (v > hi) ? hi : (v < lo) ? lo : v;
  endfunction

  function automatic longint rescale(input longint acc, input int w);
    return sat((acc + 128) >>> 8, w);
  endfunction

  // Stage 1: T[i][j] = sum_k C[k][i] Z[k][j], rescaled to tw bits.
  function automatic block_t stage1(input block_t z, input int tw);
    block_t t;
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8; j++) begin
        longint acc = 0;
        for (int k = 0; k < 8; k++) acc += longint'(c_int(k, i)) * z[k][j];
        t[i][j] = int'(rescale(acc, tw));
      end
    return t;
  endfunction

  // Stage 2: X[i][j] = sum_k T[i][k] C[k][j], rescaled to ow bits.
  function automatic block_t stage2(input block_t t, input int ow);
    block_t x;
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8; j++) begin
        longint acc = 0;
        for (int k = 0; k < 8; k++) acc += longint'(t[i][k]) * c_int(k, j);
        x[i][j] = int'(rescale(acc, ow));
      end
    return x;
  endfunction

  function automatic block_t idct2d_int(input block_t z, input int tw, input int ow);
    return stage2(stage1(z, tw), ow);
  endfunction

  function automatic rblock_t idct2d_real(input block_t z);
    rblock_t x;
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8; j++) begin
        real s = 0.0;
        for (int k = 0; k < 8; k++)
          for (int l = 0; l < 8; l++)
            s += c_real(k, i) * z[k][l] * c_real(l, j);
        x[i][j] = s;
      end
    return x;
  endfunction

endpackage
