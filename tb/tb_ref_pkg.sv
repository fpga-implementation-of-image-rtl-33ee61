// tb_ref_pkg: reference models for the testbenches.
//
// The DCT reference multiplies by the full 8x8 matrix, whose entries are
// derived from the cosine function itself (sign and which basis value), with
// the 8-bit basis magnitudes 63, 59, 53, 45, 36, 24, 12 for k = 1..7; it
// shares no structure with the even/odd, shift-and-add hardware. The median
// reference sorts, the Sobel reference applies the kernels directly.
package tb_ref_pkg;

  localparam real PI = 3.14159265358979;

  // Integer DCT matrix entry M[n][m] ~ 128 * (k_n/2) cos((2m+1) n pi/16).
  function automatic int dct_m(input int n, input int m);
    int  mag [8] = '{0, 63, 59, 53, 45, 36, 24, 12};
    real c, best;
    int  j, bj;
    if (n == 0) return 45;
    c    = $cos(real'((2*m+1)*n) * PI / 16.0);
    best = 10.0;
    bj   = 1;
    for (j = 1; j < 8; j++) begin
      real d;
      d = $cos(real'(j) * PI / 16.0) - (c < 0.0 ? -c : c);
      if (d < 0.0) d = -d;
      if (d < best) begin best = d; bj = j; end
    end
    return (c < 0.0) ? -mag[bj] : mag[bj];
  endfunction

  function automatic int rnd7(input longint s);
    return int'((s + 64) >>> 7);
  endfunction

  // Forward 1-D DCT of eight integers.
  function automatic void dct8(input int x [8], output int z [8]);
    for (int n = 0; n < 8; n++) begin
      longint s = 0;
      for (int m = 0; m < 8; m++) s += longint'(dct_m(n, m)) * x[m];
      z[n] = rnd7(s);
    end
  endfunction

  // Inverse 1-D DCT (transposed matrix).
  function automatic void idct8(input int z [8], output int x [8]);
    for (int m = 0; m < 8; m++) begin
      longint s = 0;
      for (int n = 0; n < 8; n++) s += longint'(dct_m(n, m)) * z[n];
      x[m] = rnd7(s);
    end
  endfunction

  // 2-D DCT of a block x[r*8+c]: rows first, then columns; z[k*8+c].
  function automatic void dct2(input int x [64], output int z [64]);
    int y [64], v [8], o [8];
    for (int r = 0; r < 8; r++) begin
      for (int c = 0; c < 8; c++) v[c] = x[r*8+c];
      dct8(v, o);
      for (int c = 0; c < 8; c++) y[r*8+c] = o[c];
    end
    for (int c = 0; c < 8; c++) begin
      for (int r = 0; r < 8; r++) v[r] = y[r*8+c];
      dct8(v, o);
      for (int k = 0; k < 8; k++) z[k*8+c] = o[k];
    end
  endfunction

  // 2-D IDCT: columns first, then rows, clamped to 0..255; x[r*8+c].
  function automatic void idct2_pix(input int z [64], output int x [64]);
    int w [64], v [8], o [8];
    for (int c = 0; c < 8; c++) begin
      for (int k = 0; k < 8; k++) v[k] = z[k*8+c];
      idct8(v, o);
      for (int r = 0; r < 8; r++) w[r*8+c] = o[r];
    end
    for (int r = 0; r < 8; r++) begin
      for (int c = 0; c < 8; c++) v[c] = w[r*8+c];
      idct8(v, o);
      for (int c = 0; c < 8; c++) x[r*8+c] = (o[c] < 0) ? 0 : (o[c] > 255) ? 255 : o[c];
    end
  endfunction

  function automatic int median9(input int v [9]);
    int t [9];
    t = v;
    for (int i = 0; i < 9; i++)
      for (int j = 0; j < 8 - i; j++)
        if (t[j] > t[j+1]) begin int h = t[j]; t[j] = t[j+1]; t[j+1] = h; end
    return t[4];
  endfunction

  // w[r*3+c]
  function automatic int sobel9(input int w [9]);
    int gx, gy, m;
    gx = (w[2] + 2*w[5] + w[8]) - (w[0] + 2*w[3] + w[6]);
    gy = (w[6] + 2*w[7] + w[8]) - (w[0] + 2*w[1] + w[2]);
    m  = (gx < 0 ? -gx : gx) + (gy < 0 ? -gy : gy);
    return (m > 255) ? 255 : m;
  endfunction

endpackage
