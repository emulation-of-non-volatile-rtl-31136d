// tb_dct_ref_pkg: reference model shared by the DCT testbenches.
// pix(b, i) gives pixel i (row-major, i = r*8 + c) of test block b from a
// fixed integer hash, so stimulus and checker agree without storing data.
// ref_coef computes the orthonormal 2D DCT-II coefficient
//   Y[l][k] = sum_r sum_c C[l][r] * C[k][c] * (X[r][c] - 128)
// with C[i][j] = a(i) cos(pi/8 (j + 1/2) i), a(0) = 1/sqrt(8), a(i) = 1/2,
// in real arithmetic, rounded to the nearest integer.
package tb_dct_ref_pkg;

  function automatic logic [7:0] pix(input int unsigned b, input int unsigned i);
    int unsigned h;
    h = (b * 32'd2654435761) ^ (i * 32'd40503) ^ 32'h5bd1e995;
    h = h ^ (h >> 13);
    h = h * 32'd1274126177;
    h = h ^ (h >> 16);
    // mix of smooth and noisy blocks: every third block is a gradient
    if (b % 3 == 1) return 8'((i / 8) * 20 + (i % 8) * 9);
    return h[7:0];
  endfunction

  function automatic real cmat(input int i, input int j);
    real a;
    a = (i == 0) ? 1.0 / $sqrt(8.0) : 0.5;
    return a * $cos(3.14159265358979 / 8.0 * (real'(j) + 0.5) * real'(i));
  endfunction

  function automatic int ref_coef(input int unsigned b, input int l, input int k);
    real s;
    s = 0.0;
    for (int r = 0; r < 8; r++)
      for (int c = 0; c < 8; c++)
        s += cmat(l, r) * cmat(k, c) * (real'(pix(b, r*8 + c)) - 128.0);
    return $rtoi(s >= 0.0 ? s + 0.5 : s - 0.5);
  endfunction

  // 1D row transform value of block b, row r, coefficient k (real)
  function automatic real ref_row(input int unsigned b, input int r, input int k);
    real s;
    s = 0.0;
    for (int c = 0; c < 8; c++) s += cmat(k, c) * (real'(pix(b, r*8 + c)) - 128.0);
    return s;
  endfunction

endpackage
