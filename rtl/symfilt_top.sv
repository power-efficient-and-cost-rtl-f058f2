// symfilt_top: 2-D symmetry filter system for N = 3 on a raster-scanned image
// M2 pixels wide. The main path is the multimode filter, which switches between
// diagonal, fourfold rotational, quadrantal and octagonal symmetry. Beside it,
// on the same pixel stream and the same coefficient registers, stand the four
// Type-1 and the four Type-2 single-symmetry filters, each with its own output.
//
// Operation: write the fourteen coefficients through coef_in (see coef_loader);
// mode_in is latched with them. When coef_ready is high, one pixel is taken on
// every cycle with in_valid high; cycles with in_valid low stall all filters.
// A pixel is placed in the 16-bit word shifted left by IN_SHIFT (fraction bits
// for the arithmetic, the remaining bits as headroom for the recursion gain);
// outputs are shifted back and saturated to 10 bits, and registered:
// out_valid and the outputs follow the accepted pixel by one cycle.
// The 10-bit pixels, 16-bit words and single coefficient input follow the
// reference implementation; IN_SHIFT, saturation and the output register are
// this design's choices.
module symfilt_top
  import symfilt_pkg::*;
#(
  parameter int unsigned M2       = 8,
  parameter int unsigned IN_SHIFT = 3
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         coef_we,
  input  coef_t                        coef_in,
  input  mode_t                        mode_in,
  output logic                         coef_ready,
  output mode_t                        mode,
  input  logic                         in_valid,
  input  logic signed [XW-1:0]         x_in,
  output logic                         out_valid,
  output logic signed [XW-1:0]         y_mm,
  output logic signed [3:0][XW-1:0]    y_t1,  // diagonal, fourfold, quadrantal, octagonal
  output logic signed [3:0][XW-1:0]    y_t2
);

  coefs_t         coefs;
  logic           clr;
  logic           en;
  data_t          x;
  data_t          ymm;
  data_t [3:0]    yt1, yt2;

  coef_loader u_coef (
    .clk, .rst_n, .coef_we, .coef_in, .mode_in, .coefs, .mode, .ready(coef_ready), .clr
  );

  assign en = in_valid && coef_ready;
  assign x  = data_t'(x_in) <<< IN_SHIFT;

  multimode_filter #(.M2(M2)) u_mm (.clk, .rst_n, .en, .clr, .mode, .coefs, .x, .y(ymm));

  t1_diag_filter #(.M2(M2)) u_t1_diag (.clk, .rst_n, .en, .clr, .coefs, .x, .y(yt1[0]));
  t1_frot_filter #(.M2(M2)) u_t1_frot (.clk, .rst_n, .en, .clr, .coefs, .x, .y(yt1[1]));
  t1_quad_filter #(.M2(M2)) u_t1_quad (.clk, .rst_n, .en, .clr, .coefs, .x, .y(yt1[2]));
  t1_oct_filter  #(.M2(M2)) u_t1_oct  (.clk, .rst_n, .en, .clr, .coefs, .x, .y(yt1[3]));

  t2_diag_filter #(.M2(M2)) u_t2_diag (.clk, .rst_n, .en, .clr, .coefs, .x, .y(yt2[0]));
  t2_frot_filter #(.M2(M2)) u_t2_frot (.clk, .rst_n, .en, .clr, .coefs, .x, .y(yt2[1]));
  t2_quad_filter #(.M2(M2)) u_t2_quad (.clk, .rst_n, .en, .clr, .coefs, .x, .y(yt2[2]));
  t2_oct_filter  #(.M2(M2)) u_t2_oct  (.clk, .rst_n, .en, .clr, .coefs, .x, .y(yt2[3]));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      y_mm      <= '0;
      y_t1      <= '0;
      y_t2      <= '0;
    end else begin
      out_valid <= en;
      if (en) begin
        y_mm <= to_pixel(ymm, IN_SHIFT);
        for (int k = 0; k < 4; k++) begin
          y_t1[k] <= to_pixel(yt1[k], IN_SHIFT);
          y_t2[k] <= to_pixel(yt2[k], IN_SHIFT);
        end
      end
    end
  end

endmodule
