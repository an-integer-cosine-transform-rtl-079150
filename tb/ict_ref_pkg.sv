// Reference arithmetic for the ICT testbenches: the 8x8 integer kernel
// J(10,9,6,2,3,1) written out row by row, and direct matrix products with
// it, computed without any of the factorizations used in the hardware.
package ict_ref_pkg;

  localparam int J [8][8] = '{
    '{ 1,   1,   1,   1,   1,   1,   1,   1},
    '{10,   9,   6,   2,  -2,  -6,  -9, -10},
    '{ 3,   1,  -1,  -3,  -3,  -1,   1,   3},
    '{ 9,  -2, -10,  -6,   6,  10,   2,  -9},
    '{ 1,  -1,  -1,   1,   1,  -1,  -1,   1},
    '{ 6, -10,   2,   9,  -9,  -2,  10,  -6},
    '{ 1,  -3,   3,  -1,  -1,   3,  -3,   1},
    '{ 2,  -6,   9, -10,  10,  -9,   6,  -2}
  };

  // Squared norm of kernel row u.
  function automatic int row_norm2(int u);
    int s = 0;
    for (int n = 0; n < 8; n++) s += J[u][n] * J[u][n];
    return s;
  endfunction

  // 1-D transform of one vector.
  function automatic void ict1d(input longint x [8], output longint y [8]);
    for (int k = 0; k < 8; k++) begin
      y[k] = 0;
      for (int n = 0; n < 8; n++) y[k] += J[k][n] * x[n];
    end
  endfunction

  // Scale factor k_u*k_v times 2^24, rounded up, from the row norms.
  function automatic longint norm_scale(int u, int v);
    real s = (2.0 ** 24) / $sqrt(real'(row_norm2(u)) * real'(row_norm2(v)));
    return longint'($ceil(s - 1.0e-6));
  endfunction

  // Normalized 12-bit value of an unnormalized 2-D coefficient, rounded to
  // nearest with ties away from zero, saturated.
  function automatic longint normalize(longint y, int u, int v);
    longint p = y * norm_scale(u, v);
    longint r = (p < 0) ? -((-p + (64'sd1 <<< 23)) >>> 24) : (p + (64'sd1 <<< 23)) >>> 24;
    if (r > 2047)  r = 2047;
    if (r < -2048) r = -2048;
    return r;
  endfunction

endpackage
