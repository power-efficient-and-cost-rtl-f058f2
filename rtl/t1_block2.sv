// t1_block2: Block 2 of the Type-1 filters, the numerator and the pixel recursion
//   Y = sum_ij a_ij z1^-i z2^-j Y1 + b01 z^-1 Y + b02 z^-2 Y + b03 z^-3 Y.
// Under a symmetry several a_ij are equal. Each independent coefficient has one
// multiplier, and the delayed Y1 signals of all the positions it stands for are
// summed in front of it (the Type-1 rule: cut paths are added before the
// independent multiplier). tap_mask[k] bit i*4+j connects position (i,j) to
// the pre-adder of multiplier k; mul_on[k] low holds the multiplier input at 0.
// In the multimode filter these come from the interconnection-box control; in
// the single-symmetry filters they are constants and unused paths vanish.
//
// Delay layout. It keeps the fixed paths of the general Type-1 structure:
//  - level node lvl[i] = Y1 z^-i(M2-1) (from Block 1) feeds a column of two
//    z^-1 registers; position (i,j) reads the column after f_pre(j) = 0,1,1,2
//    registers;
//  - in every row the products of columns 2 and 3 are summed and pass one z^-1
//    before the products of columns 0 and 1 join (d_post(j) = 0,0,1,1);
//  - the rows meet on an output chain with one z^-1 per row, so row i adds the
//    z^-i that completes z1^-i = z^-i*M2.
// A position (i,j) moved in front of the multiplier of a_pq (on row p, column
// q) lacks gray_delay = (i-p) + d_post(j) - d_post(q) registers. These are
// shared as in the delay-arrangement equation of the reference design:
// positions needing e extra delays are added at stage e of a per-multiplier
// chain acc_e = (taps of stage e) + z^-1 acc_(e+1), and acc_0 is the
// multiplier input. Stages 0..4 suffice for N = 3.
// A tap_mask bit for a position with a negative gray delay is illegal (an
// assertion checks this); owner() never produces one.
// The b01..b03 feedback mirrors row 0: b01 and b02 read Y z^-1, b03 reads
// Y z^-2, and b02, b03 join the delayed part of row 0.
// Timing: y is combinational in lvl[0] only through position (0,0), which
// belongs to a00 under every symmetry; it enters a00's pre-adder last and the
// a00 product is added to y last: Block 1 adder, pre-adder, multiplier, final
// adder (Tm + 3Ta). The row sums are ordered as trees, so that after any
// multiplier at most three adders follow; paths that start at a register
// also pass the pre-adder stage in front of the multiplier (one adder, two
// for a02 under fourfold rotational symmetry). State advances on en and is
// zeroed by clr.
module t1_block2
  import symfilt_pkg::*;
#(
  parameter int unsigned NMUL = NUM_A,
  // set index (A00..A33) of each multiplier, which fixes its row and column
  parameter int unsigned MIDX [NMUL] = '{A00, A01, A02, A03, A10, A11, A12, A13, A22, A23, A33}
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   en,
  input  logic                   clr,
  input  data_t    [N:0]         lvl,
  input  coef_t    [NMUL-1:0]    a,
  input  tapmask_t [NMUL-1:0]    tap_mask,
  input  logic     [NMUL-1:0]    mul_on,
  input  coef_t    [NUM_B-1:0]   b,
  output data_t                  y
);

  localparam int unsigned EMAX = 4;  // deepest gray-delay stage

  data_t col  [N+1][3];        // col[i][d] = lvl[i] z^-d, d = 0..2
  data_t acc  [NMUL][EMAX+1];  // gray-delay chain sums, acc[k][0] = multiplier input
  data_t gq   [NMUL][1:EMAX];  // gray-delay registers: gq[k][e] = z^-1 acc[k][e]
  data_t pm   [N+1][N+1];     // product of the multiplier at (row, column), or 0
  data_t late [N+1];           // per row: column-2/3 products, before their z^-1
  data_t lq   [N+1];           // z^-1 late
  data_t oc_d [1:N];           // row r sum plus the output chain from below it
  data_t oc_q [1:N];           // output chain: oc_q[r] = z^-1 oc_d[r]
  data_t yd1, yd2;             // Y z^-1, Y z^-2

  // Positions each multiplier can reach (gray delay not negative).
  typedef tapmask_t [NMUL-1:0] reach_t;

  function automatic reach_t make_reach();
    reach_t r;
    r = '0;
    for (int unsigned k = 0; k < NMUL; k++)
      for (int unsigned i = 0; i <= N; i++)
        for (int unsigned j = 0; j <= N; j++)
          r[k][i*(N+1)+j] = gray_delay(i, j, A_ROW[MIDX[k]], A_COL[MIDX[k]]) >= 0;
    return r;
  endfunction

  localparam reach_t REACH = make_reach();

  // A connection to a position the multiplier cannot reach would be dropped.
  always_comb
    for (int k = 0; k < NMUL; k++)
      assert ((tap_mask[k] & ~REACH[k]) == '0)
        else $error("t1_block2: multiplier %0d connected to an unreachable position", k);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i <= N; i++) begin col[i][1] <= '0; col[i][2] <= '0; lq[i] <= '0; end
      for (int k = 0; k < NMUL; k++) for (int e = 1; e <= EMAX; e++) gq[k][e] <= '0;
      for (int r = 1; r <= N; r++) oc_q[r] <= '0;
      yd1 <= '0; yd2 <= '0;
    end else if (clr) begin
      for (int i = 0; i <= N; i++) begin col[i][1] <= '0; col[i][2] <= '0; lq[i] <= '0; end
      for (int k = 0; k < NMUL; k++) for (int e = 1; e <= EMAX; e++) gq[k][e] <= '0;
      for (int r = 1; r <= N; r++) oc_q[r] <= '0;
      yd1 <= '0; yd2 <= '0;
    end else if (en) begin
      for (int i = 0; i <= N; i++) begin
        col[i][1] <= col[i][0];
        col[i][2] <= col[i][1];
        lq[i]     <= late[i];
      end
      for (int k = 0; k < NMUL; k++) for (int e = 1; e <= EMAX; e++) gq[k][e] <= acc[k][e];
      for (int r = 1; r <= N; r++) oc_q[r] <= oc_d[r];
      yd1 <= y;
      yd2 <= yd1;
    end
  end

  always_comb begin
    for (int i = 0; i <= N; i++) col[i][0] = lvl[i];
    for (int r = 0; r <= N; r++) for (int q = 0; q <= N; q++) pm[r][q] = '0;
    for (int k = 0; k < NMUL; k++) begin
      // gray-delay chain, deepest stage first
      for (int e = EMAX; e >= 0; e--) begin
        acc[k][e] = (e == EMAX) ? data_t'(0) : gq[k][e+1];
        for (int unsigned i = 0; i <= N; i++)
          for (int unsigned j = 0; j <= N; j++)
            if (tap_mask[k][i*(N+1)+j] && (i + j > 0) &&
                gray_delay(i, j, A_ROW[MIDX[k]], A_COL[MIDX[k]]) == e)
              acc[k][e] += col[i][f_pre(j)];
      end
      // position (0,0), combinational in X, enters last
      if (tap_mask[k][0] && gray_delay(0, 0, A_ROW[MIDX[k]], A_COL[MIDX[k]]) == 0)
        acc[k][0] += col[0][0];
      pm[A_ROW[MIDX[k]]][A_COL[MIDX[k]]] = cmul(a[k], mul_on[k] ? acc[k][0] : data_t'(0));
    end
    // Row sums, ordered as trees: a product meets at most two adders before a
    // register, and at most three before y.
    late[0] = (pm[0][2] + pm[0][3]) + (cmul(b[1], yd1) + cmul(b[2], yd2));
    for (int r = 1; r <= N; r++) late[r] = pm[r][2] + pm[r][3];
    oc_d[N] = (pm[N][0] + pm[N][1]) + lq[N];
    for (int r = 1; r < N; r++) oc_d[r] = (pm[r][0] + pm[r][1]) + (lq[r] + oc_q[r+1]);
    y = ((pm[0][1] + cmul(b[0], yd1)) + (lq[0] + oc_q[1])) + pm[0][0];
  end

endmodule
