// t2_block4: Block 4 of the Type-2 filters, the numerator and the line recursion
//   Y = sum_ij a_ij z1^-i z2^-j Y2 + b01 z1^-1 Y + b02 z1^-2 Y + b03 z1^-3 Y,
// z1^-1 = z^-M2. Each independent coefficient of the symmetry SYM multiplies a
// delayed Y2 once; its product is branched to every position (i,j) the
// coefficient stands for (the Type-2 rule: paths are dispatched after the
// multiplier).
//
// Delay layout. It keeps the fixed paths after the multipliers of the general
// Type-2 structure:
//  - rows 1..3: the products of columns 2 and 3 are summed and pass one z^-1
//    before columns 0 and 1 and b0i * Y z^-i join (dp = 0,0,1,1);
//  - row 0: column 3 passes one z^-1, then columns 1 and 2 join and the sum
//    passes another z^-1 before column 0 joins (dp = 0,1,1,2);
//  - the row sums run down the output chain row 3 -> SR -> + row 2 -> SR ->
//    + row 1 -> SR -> + row 0 = Y, each SR holding M2-1 words.
// Position (i,j) therefore still needs pre(i,j) = i + j - dp_i(j) delays
// before it joins its row. The multiplier of a_pq reads Y2 z^-pre(p,q) from a
// shared input column, and its product runs down a dispatch line; position
// (i,j) takes it after gray delay pre(i,j) - pre(p,q) stages, the shared
// delays of the reference delay-arrangement equation. For a01 under the
// octagonal symmetry these are 0,1,1,3,2,4,4,4, as in the reference.
// Timing: y is combinational in y2 through the a00 multiplier and one adder;
// the a00 product is added last (Tm + 2Ta from X with the Block 3 adder). The
// row sums are ordered so that no product passes more than two adders before
// a register. State advances on en and is zeroed by clr.
module t2_block4
  import symfilt_pkg::*;
#(
  parameter int unsigned M2   = 8,
  parameter mode_t       SYM  = DSM,
  parameter int unsigned NMUL = 10,
  // set index of each multiplier's coefficient
  parameter int unsigned MIDX [NMUL] = '{A00, A01, A02, A03, A11, A12, A13, A22, A23, A33}
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  logic                clr,
  input  data_t               y2,
  input  coef_t [NMUL-1:0]    a,
  input  coef_t [NUM_B-1:0]   b,
  output data_t               y
);

  localparam int unsigned DMAX = 2 * N - 1;  // deepest pre(i,j): position (3,3)

  // post-multiplier delay inside row i for column j
  function automatic int unsigned dp(input int unsigned i, input int unsigned j);
    if (i == 0) return (j == 0) ? 0 : (j == 3) ? 2 : 1;
    return (j >= 2) ? 1 : 0;
  endfunction

  function automatic int unsigned pre(input int unsigned i, input int unsigned j);
    return i + j - dp(i, j);
  endfunction

  // Local multiplier and gray delay of every position i*4+j under SYM, worked
  // out when the design is elaborated.
  typedef logic [3:0]         lidx_t;
  typedef lidx_t [NTAP-1:0]   locmap_t;
  typedef logic [2:0]         gdel_t;
  typedef gdel_t [NTAP-1:0]   gmap_t;

  function automatic locmap_t make_loc();
    locmap_t r;
    r = '0;
    for (int unsigned i = 0; i <= N; i++)
      for (int unsigned j = 0; j <= N; j++)
        for (int unsigned k = 0; k < NMUL; k++)
          if (MIDX[k] == owner(SYM, i, j)) r[i*(N+1)+j] = lidx_t'(k);
    return r;
  endfunction

  localparam locmap_t LOC = make_loc();

  function automatic gmap_t make_gray();
    gmap_t r;
    r = '0;
    for (int unsigned i = 0; i <= N; i++)
      for (int unsigned j = 0; j <= N; j++)
        for (int unsigned k = 0; k < NMUL; k++)
          if (MIDX[k] == owner(SYM, i, j))
            r[i*(N+1)+j] = gdel_t'(pre(i, j) - pre(A_ROW[MIDX[k]], A_COL[MIDX[k]]));
    return r;
  endfunction

  localparam gmap_t GRAY = make_gray();

  initial begin
    for (int unsigned i = 0; i <= N; i++)
      for (int unsigned j = 0; j <= N; j++) begin
        automatic int unsigned k = 32'(LOC[i*(N+1)+j]);
        assert (k < NMUL && MIDX[k] == owner(SYM, i, j) &&
                pre(i, j) >= pre(A_ROW[MIDX[k]], A_COL[MIDX[k]]))
          else $error("t2_block4: position (%0d,%0d) has no usable multiplier", i, j);
      end
  end

  data_t ycol [DMAX+1];      // ycol[d] = Y2 z^-d
  data_t pd   [NMUL][DMAX+1];// pd[k][g] = product k z^-g
  data_t ent  [N+1][N+1];    // product entering position (i,j)
  data_t r0a_q, r0b_q;       // row 0 post-adder delays
  data_t rq   [1:N];         // rows 1..3 post-adder delay
  data_t r0a, r0b;
  data_t lat  [1:N];
  data_t s    [1:N];         // s[i] = row i sum plus the chain from above, into SR i
  data_t sq   [1:N];         // SR outputs
  data_t yv_q [1:N];         // Y z^-1 .. Y z^-3

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int d = 1; d <= DMAX; d++) ycol[d] <= '0;
      for (int k = 0; k < NMUL; k++) for (int g = 1; g <= DMAX; g++) pd[k][g] <= '0;
      for (int r = 1; r <= N; r++) begin rq[r] <= '0; yv_q[r] <= '0; end
      r0a_q <= '0; r0b_q <= '0;
    end else if (clr) begin
      for (int d = 1; d <= DMAX; d++) ycol[d] <= '0;
      for (int k = 0; k < NMUL; k++) for (int g = 1; g <= DMAX; g++) pd[k][g] <= '0;
      for (int r = 1; r <= N; r++) begin rq[r] <= '0; yv_q[r] <= '0; end
      r0a_q <= '0; r0b_q <= '0;
    end else if (en) begin
      for (int d = 1; d <= DMAX; d++) ycol[d] <= ycol[d-1];
      for (int k = 0; k < NMUL; k++) for (int g = 1; g <= DMAX; g++) pd[k][g] <= pd[k][g-1];
      for (int r = 1; r <= N; r++) rq[r] <= lat[r];
      r0a_q <= r0a;
      r0b_q <= r0b;
      yv_q[1] <= y;
      for (int r = 2; r <= N; r++) yv_q[r] <= yv_q[r-1];
    end
  end

  always_comb begin
    ycol[0] = y2;
    for (int k = 0; k < NMUL; k++)
      pd[k][0] = cmul(a[k], ycol[pre(A_ROW[MIDX[k]], A_COL[MIDX[k]])]);
    for (int unsigned i = 0; i <= N; i++)
      for (int unsigned j = 0; j <= N; j++)
        ent[i][j] = pd[int'(LOC[i*(N+1)+j])][int'(GRAY[i*(N+1)+j])];
    // Adders are ordered as trees so that a product meets at most two adders
    // before a register; the one product of Y2 itself below, position (0,1)
    // when a01 reads Y2 directly, is added last.
    r0a = ent[0][3];
    r0b = (r0a_q + ent[0][2]) + ent[0][1];
    for (int r = 1; r <= N; r++) lat[r] = ent[r][3] + ent[r][2];
    // row r (columns 0, 1, b0r term, delayed columns 2, 3) plus the chain above
    s[N] = (ent[N][1] + ent[N][0]) + (cmul(b[N-1], yv_q[N]) + rq[N]);
    for (int r = N - 1; r >= 1; r--)
      s[r] = (ent[r][1] + ent[r][0]) + (cmul(b[r-1], yv_q[r]) + (rq[r] + sq[r+1]));
    // a00*Y2, the only term combinational in X, is added last: the path from X
    // is the Block 3 adder, the a00 multiplier and one adder (Tm + 2Ta).
    y = (r0b_q + sq[1]) + ent[0][0];
  end

  for (genvar r = 1; r <= N; r++) begin : g_sr
    line_delay #(.LEN(M2 - 1), .W(DW)) u_sr (
      .clk, .rst_n, .en, .clr, .d(s[r]), .q(sq[r])
    );
  end

endmodule
