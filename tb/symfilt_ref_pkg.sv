// symfilt_ref_pkg: bit-exact software model of the 3x3 separable-denominator
// 2-D symmetry filters, for the testbenches. It evaluates the difference
// equations directly on the pixel history of the raster-scanned image
// (z2^-1 = one sample back, z1^-1 = M2 samples back), not the hardware's
// delay network.
//   Type-1: y1[n] = x[n] + sum_i b0i*y1[n-i*M2]
//           y[n]  = sum_c a_c*(sum of y1[n-i*M2-j] over the (i,j) that a_c stands for)
//                   + sum_j b0j*y[n-j]
//   Type-2: y2[n] = x[n] + sum_j b0j*y2[n-j]
//           y[n]  = sum_ij a_owner(i,j)*y2[n-i*M2-j] + sum_i b0i*y[n-i*M2]
// Words are 16-bit and wrap; each product is (c*d) >>> 14 cut to 16 bits.
// The coefficient sharing tables below are the four numerator matrices written
// out by hand (entries are set indices: 0 a00, 1 a01, 2 a02, 3 a03, 4 a10,
// 5 a11, 6 a12, 7 a13, 8 a22, 9 a23, 10 a33).
package symfilt_ref_pkg;

  localparam int OWN [4][4][4] = '{
    '{'{0, 1, 2, 3}, '{1, 5, 6, 7}, '{2, 6, 8, 9}, '{3, 7, 9, 10}},  // diagonal
    '{'{0, 1, 2, 0}, '{2, 5, 5, 1}, '{1, 5, 5, 2}, '{0, 2, 1, 0}},   // fourfold rotational
    '{'{0, 1, 2, 3}, '{4, 5, 6, 7}, '{4, 5, 6, 7}, '{0, 1, 2, 3}},   // quadrantal
    '{'{0, 1, 1, 0}, '{1, 5, 5, 1}, '{1, 5, 5, 1}, '{0, 1, 1, 0}}    // octagonal
  };

  function automatic int w16(longint v);
    return int'(shortint'(v[15:0]));
  endfunction

  function automatic int cm(int c, int d);
    longint p;
    p = longint'(c) * longint'(d);
    return w16(p >>> 14);
  endfunction

  class ref_filter;
    int m2;
    bit type2;
    int sym;
    int a[11];
    int b[3];
    int hv[$];  // y1 (Type-1) or y2 (Type-2) history, [0] = newest
    int hy[$];  // y history

    function new(int m2_i, bit type2_i, int sym_i);
      m2 = m2_i; type2 = type2_i; sym = sym_i;
      clear();
    endfunction

    function void clear();
      hv.delete(); hy.delete();
      for (int k = 0; k < 4 * m2 + 8; k++) begin hv.push_back(0); hy.push_back(0); end
    endfunction

    // Sample k steps back, after the current sample was pushed (k = 0 current).
    function int v(int k); return hv[k]; endfunction

    function int step(int x);
      longint acc;
      int pre[11];
      if (!type2) begin
        acc = x;
        for (int i = 1; i <= 3; i++) acc += cm(b[i-1], hv[i*m2 - 1]);
        hv.push_front(w16(acc)); void'(hv.pop_back());
        for (int c = 0; c < 11; c++) pre[c] = 0;
        for (int i = 0; i < 4; i++)
          for (int j = 0; j < 4; j++)
            pre[OWN[sym][i][j]] = w16(longint'(pre[OWN[sym][i][j]]) + hv[i*m2 + j]);
        acc = 0;
        for (int c = 0; c < 11; c++) acc += cm(a[c], pre[c]);
        for (int j = 1; j <= 3; j++) acc += cm(b[j-1], hy[j-1]);
      end else begin
        acc = x;
        for (int j = 1; j <= 3; j++) acc += cm(b[j-1], hv[j-1]);
        hv.push_front(w16(acc)); void'(hv.pop_back());
        acc = 0;
        for (int i = 0; i < 4; i++)
          for (int j = 0; j < 4; j++)
            acc += cm(a[OWN[sym][i][j]], hv[i*m2 + j]);
        for (int i = 1; i <= 3; i++) acc += cm(b[i-1], hy[i*m2 - 1]);
      end
      hy.push_front(w16(acc)); void'(hy.pop_back());
      return hy[0];
    endfunction
  endclass

  // A random coefficient set with a stable denominator: |b01|+|b02|+|b03| < 1.
  function automatic void rand_coefs(output int a[11], output int b[3]);
    for (int k = 0; k < 3; k++) b[k] = int'($urandom_range(0, 3000)) - 1500;   // |b| < 0.092
    for (int k = 0; k < 11; k++) a[k] = int'($urandom_range(0, 8000)) - 4000;  // |a| < 0.25
  endfunction

  function automatic int sat10(int y, int shift);
    int s;
    s = y >>> shift;
    if (s > 511) return 511;
    if (s < -512) return -512;
    return s;
  endfunction

endpackage
