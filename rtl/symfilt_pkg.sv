// symfilt_pkg: word formats, coefficient set, symmetry modes and the coefficient
// sharing rules of the 3x3 (N = 3) separable-denominator 2-D symmetry filters.
//
// Data words are 16-bit two's complement and every sum wraps modulo 2^16.
// Coefficients are 16-bit two's complement with COEF_FRAC fraction bits; the
// 16x16 product is shifted right arithmetically by COEF_FRAC and cut to 16 bits.
// The 16-bit register width, 16-bit coefficients and 16x16 multipliers follow
// the reference implementation; the binary point, truncation and wrap-around
// are this design's choices.
//
// Numerator coefficient a_ij multiplies z1^-i z2^-j, with z2^-1 one pixel and
// z1^-1 one image line (M2 pixels) of a raster-scanned image. Under a symmetry
// only some a_ij are independent. The union of the independent coefficients of
// the four symmetries is {a00,a01,a02,a03,a10,a11,a12,a13,a22,a23,a33}; these
// eleven plus b01..b03 (with b_k0 = b_0k) make up a coefficient set.
package symfilt_pkg;

  localparam int unsigned N         = 3;   // filter order, fixed by the structures
  localparam int unsigned DW        = 16;  // data word (register) width
  localparam int unsigned CW        = 16;  // coefficient width
  localparam int unsigned COEF_FRAC = 14;  // coefficient fraction bits (Q2.14)
  localparam int unsigned XW        = 10;  // filter input and output pixel width
  localparam int unsigned NUM_A     = 11;  // independent numerator coefficients (union)
  localparam int unsigned NUM_B     = 3;   // b01, b02, b03
  localparam int unsigned NCOEF     = NUM_A + NUM_B;
  localparam int unsigned NTAP      = (N + 1) * (N + 1);  // taps (i,j), bit i*4+j

  typedef logic signed [DW-1:0] data_t;
  typedef logic signed [CW-1:0] coef_t;
  typedef logic [NTAP-1:0]      tapmask_t;

  // Symmetry modes of the multimode filter.
  typedef enum logic [1:0] {
    DSM  = 2'd0,  // diagonal:            a_ij = a_ji
    FRSM = 2'd1,  // fourfold rotational: a_ij = a_j(N-i)
    QSM  = 2'd2,  // quadrantal:          a_ij = a_(N-i)j
    OSM  = 2'd3   // octagonal:           diagonal and quadrantal together
  } mode_t;

  // Index of each independent numerator coefficient in a coefficient set.
  localparam int unsigned A00 = 0, A01 = 1, A02 = 2, A03 = 3, A10 = 4, A11 = 5,
                          A12 = 6, A13 = 7, A22 = 8, A23 = 9, A33 = 10;

  // Row (power of z1) on which the multiplier of each coefficient sits: a_pq on row p.
  localparam int unsigned A_ROW [NUM_A] = '{0, 0, 0, 0, 1, 1, 1, 1, 2, 2, 3};

  // Column (power of z2) of each coefficient.
  localparam int unsigned A_COL [NUM_A] = '{0, 1, 2, 3, 0, 1, 2, 3, 2, 3, 3};

  // Type-1 Block 2 delay layout, from the general structure: the multiplier of
  // a_ij takes its level node after F_PRE(j) z^-1 registers of the column, and
  // its product passes D_POST(j) z^-1 registers inside the row; F_PRE + D_POST = j.
  function automatic int unsigned f_pre(input int unsigned j);
    return (j == 0) ? 0 : (j == 3) ? 2 : 1;
  endfunction

  function automatic int unsigned d_post(input int unsigned j);
    return (j >= 2) ? 1 : 0;
  endfunction

  // Gray delays of tap (i,j) when it is added in front of the multiplier of the
  // coefficient at (p,q): (i - p) + d_post(j) - d_post(q). Negative means the
  // tap cannot be moved to that multiplier.
  function automatic int gray_delay(input int unsigned i, input int unsigned j,
                                    input int unsigned p, input int unsigned q);
    return int'(i) - int'(p) + int'(d_post(j)) - int'(d_post(q));
  endfunction

  typedef struct packed {
    coef_t [NUM_B-1:0] b;  // b[0] = b01, b[1] = b02, b[2] = b03
    coef_t [NUM_A-1:0] a;  // indexed by A00 .. A33
  } coefs_t;

  // Coefficient times data word, scaled back to a data word.
  function automatic data_t cmul(input coef_t c, input data_t d);
    logic signed [DW+CW-1:0] p;
    p = c * d;
    return data_t'(p >>> COEF_FRAC);
  endfunction

  // Set index of coefficient a_pq; only the eleven independent ones are legal.
  function automatic int unsigned a_index(input int unsigned p, input int unsigned q);
    case (p * 4 + q)
      0:  return A00;
      1:  return A01;
      2:  return A02;
      3:  return A03;
      4:  return A10;
      5:  return A11;
      6:  return A12;
      7:  return A13;
      10: return A22;
      11: return A23;
      default: return A33;
    endcase
  endfunction

  // The independent coefficient that stands for a_ij under symmetry m.
  function automatic int unsigned owner(input mode_t m, input int unsigned i,
                                        input int unsigned j);
    int unsigned p, q, t;
    p = i;
    q = j;
    case (m)
      DSM: begin
        if (p > q) begin t = p; p = q; q = t; end
      end
      QSM: begin
        if (p > N - p) p = N - p;
      end
      OSM: begin
        if (p > N - p) p = N - p;
        if (q > N - q) q = N - q;
        if (p > q) begin t = p; p = q; q = t; end
      end
      default: begin  // FRSM: rotate (p,q) -> (q, N-p) until it reaches a00, a01, a02 or a11
        for (int k = 0; k < 4; k++) begin
          if (!((p == 0 && q < N) || (p == 1 && q == 1))) begin
            t = p; p = q; q = N - t;
          end
        end
      end
    endcase
    return a_index(p, q);
  endfunction

  // Taps (i,j) whose delayed signal belongs to coefficient c under symmetry m.
  function automatic tapmask_t sym_tap_mask(input mode_t m, input int unsigned c);
    tapmask_t r;
    for (int unsigned i = 0; i <= N; i++)
      for (int unsigned j = 0; j <= N; j++)
        r[i*(N+1)+j] = (owner(m, i, j) == c);
    return r;
  endfunction

  // Connection pattern of all eleven numerator pre-adders under symmetry m.
  typedef tapmask_t [NUM_A-1:0] ibpattern_t;

  function automatic ibpattern_t ib_pattern(input mode_t m);
    ibpattern_t r;
    for (int unsigned c = 0; c < NUM_A; c++) r[c] = sym_tap_mask(m, c);
    return r;
  endfunction

  // Output word to XW-bit pixel: undo the input shift and saturate.
  function automatic logic signed [XW-1:0] to_pixel(input data_t y, input int unsigned shift);
    data_t s;
    s = y >>> shift;
    if (s > data_t'(2 ** (XW - 1) - 1)) return {1'b0, {(XW - 1){1'b1}}};
    if (s < -data_t'(2 ** (XW - 1)))    return {1'b1, {(XW - 1){1'b0}}};
    return s[XW-1:0];
  endfunction

endpackage
