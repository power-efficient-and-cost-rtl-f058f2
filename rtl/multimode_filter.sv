// multimode_filter: 3x3 separable-denominator 2-D IIR filter whose numerator
// can be constrained to one of four magnitude-response symmetries, chosen by
// mode: diagonal (DSM), fourfold rotational (FRSM), quadrantal (QSM) or
// octagonal (OSM). It computes, for a raster-scanned image M2 pixels wide,
//   Y1 = X + sum_i b0i z1^-i Y1,
//   Y  = sum_ij a_ij z1^-i z2^-j Y1 + sum_j b0j z2^-j Y,
// with z2^-1 one pixel and z1^-1 = z^-M2 one line, and with the a_ij that the
// mode makes equal sharing one multiplier.
// Structure: one Type-1 Block 1 (three multipliers) shared by all modes; one
// Type-1 Block 2 holding the union of the independent numerator multipliers
// (a00 a01 a02 a03 a10 a11 a12 a13 a22 a23 a33) and three for b01..b03,
// 17 multipliers in all; the interconnection-box control switches the paths
// into the pre-adders. That split and the multiplier set follow the reference
// architecture; the box wiring itself is this design's own.
// Interface: one 16-bit word x per enabled cycle, y combinational in x
// (critical path: Block 1 adder, pre-adder, multiplier, final adder). Each
// mode gives the same y as the matching single-symmetry Type-1 filter.
module multimode_filter
  import symfilt_pkg::*;
#(
  parameter int unsigned M2 = 8
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   en,
  input  logic   clr,
  input  mode_t  mode,
  input  coefs_t coefs,
  input  data_t  x,
  output data_t  y
);

  data_t    [N:0]       lvl;
  tapmask_t [NUM_A-1:0] tap_mask;
  logic     [NUM_A-1:0] mul_on;

  t1_block1 #(.M2(M2)) u_block1 (
    .clk, .rst_n, .en, .clr, .x, .b(coefs.b), .lvl
  );

  ib_ctrl u_ib (.mode, .tap_mask, .mul_on);

  t1_block2 #(.NMUL(NUM_A)) u_block2 (
    .clk, .rst_n, .en, .clr, .lvl, .a(coefs.a), .tap_mask, .mul_on, .b(coefs.b), .y
  );

endmodule
