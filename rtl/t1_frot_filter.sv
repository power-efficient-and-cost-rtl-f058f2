// t1_frot_filter: Type-1 3x3 separable-denominator 2-D IIR filter with fourfold rotational
// magnitude symmetry. It computes Y1 = X + sum_i b0i z1^-i Y1 and
// Y = sum_ij a_ij z1^-i z2^-j Y1 + sum_j b0j z2^-j Y on a raster-scanned image
// M2 pixels wide (z1^-1 = z^-M2), where the numerator obeys a_ij = a_j(3-i).
// Only the 4 independent numerator coefficients (a00 a01 a02 a11) have a multiplier;
// the taps of the coefficients equal to each are summed in a pre-adder in
// front of it (Type-1 structure: paths are added before the multiplier).
// Block 1, the row placement of the multipliers and the merged (gray) delays
// in front of them follow the reference delay arrangement (see t1_block2).
// Multipliers: 3 (Block 1) + 4 + 3 (b01..b03).
// Interface: x in, y out, combinational from x to y; state advances on en and
// is zeroed by clr. Coefficients come from a coefficient set, of which only
// b and the independent a are read.
module t1_frot_filter
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

  localparam mode_t       SYM = FRSM;
  localparam int unsigned NM  = 4;
  localparam int unsigned MIDX [NM] = '{A00, A01, A02, A11};

  typedef tapmask_t [NM-1:0] masks_t;

  // Fixed connections of the pre-adders, worked out when the design is elaborated.
  function automatic masks_t masks();
    masks_t r;
    for (int unsigned k = 0; k < NM; k++) r[k] = sym_tap_mask(SYM, MIDX[k]);
    return r;
  endfunction

  localparam masks_t TAP_MASK = masks();

  data_t [N:0]    lvl;
  coef_t [NM-1:0] a;

  always_comb begin
    for (int unsigned k = 0; k < NM; k++) a[k] = coefs.a[MIDX[k]];
  end

  t1_block1 #(.M2(M2)) u_block1 (
    .clk, .rst_n, .en, .clr, .x, .b(coefs.b), .lvl
  );

  t1_block2 #(.NMUL(NM), .MIDX(MIDX)) u_block2 (
    .clk, .rst_n, .en, .clr, .lvl, .a, .tap_mask(TAP_MASK), .mul_on('1), .b(coefs.b), .y
  );

endmodule
