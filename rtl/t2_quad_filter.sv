// t2_quad_filter: Type-2 3x3 separable-denominator 2-D IIR filter with quadrantal
// magnitude symmetry, the transpose of the Type-1 structure. It computes
// Y2 = X + sum_j b0j z2^-j Y2 and Y = sum_ij a_ij z1^-i z2^-j Y2 +
// sum_i b0i z1^-i Y on a raster-scanned image M2 pixels wide (z1^-1 = z^-M2),
// where the numerator obeys a_ij = a_(3-i)j.
// Only the 8 independent numerator coefficients (a00 .. a03, a10 .. a13) have a multiplier;
// each product is branched after the multiplier to every position the
// coefficient stands for (see t2_block4). The Block 3 / Block 4 split follows
// the reference structure. Multipliers: 3 (Block 3) + 8 + 3 (b01..b03).
// Interface: x in, y out, combinational from x to y; state advances on en and
// is zeroed by clr. Of the coefficient set only b and the independent a are read.
module t2_quad_filter
  import symfilt_pkg::*;
#(
  parameter int unsigned M2 = 8
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   en,
  input  logic   clr,
  input  coefs_t coefs,
  input  data_t  x,
  output data_t  y
);

  localparam mode_t       SYM = QSM;
  localparam int unsigned NM  = 8;
  localparam int unsigned MIDX [NM] = '{A00, A01, A02, A03, A10, A11, A12, A13};

  data_t          y2;
  coef_t [NM-1:0] a;

  always_comb begin
    for (int unsigned k = 0; k < NM; k++) a[k] = coefs.a[MIDX[k]];
  end

  t2_block3 u_block3 (
    .clk, .rst_n, .en, .clr, .x, .b(coefs.b), .y2
  );

  t2_block4 #(.M2(M2), .SYM(SYM), .NMUL(NM), .MIDX(MIDX)) u_block4 (
    .clk, .rst_n, .en, .clr, .y2, .a, .b(coefs.b), .y
  );

endmodule
