// t1_block1: Block 1 of the Type-1 filters, the line recursion
//   Y1 = X + b01 z1^-1 Y1 + b02 z1^-2 Y1 + b03 z1^-3 Y1,   z1^-1 = z^-M2.
// Y1 runs up a column of three shift registers of M2-1 words; the column nodes
// lvl[i] = Y1 z^-i(M2-1) feed b0i and, in Block 2, the numerator rows. The
// products b0i*lvl[i] go down a transposed chain with one z^-1 register per
// level, which supplies the missing z^-1 of each line delay, so no signal is
// broadcast to all rows. Three multipliers and three adders, as in the
// reference structure.
// Timing: lvl[0] = Y1 is combinational in x (one adder); all state advances on
// en and is zeroed by clr.
module t1_block1
  import symfilt_pkg::*;
#(
  parameter int unsigned M2 = 8
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  logic                clr,
  input  data_t               x,
  input  coef_t [NUM_B-1:0]   b,
  output data_t [N:0]         lvl
);

  data_t c1_q, c2_q, c3_q;  // z^-1 registers of the transposed b chain

  assign lvl[0] = x + c1_q;

  for (genvar i = 0; i < N; i++) begin : g_sr
    line_delay #(.LEN(M2 - 1), .W(DW)) u_sr (
      .clk, .rst_n, .en, .clr, .d(lvl[i]), .q(lvl[i+1])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c1_q <= '0; c2_q <= '0; c3_q <= '0;
    end else if (clr) begin
      c1_q <= '0; c2_q <= '0; c3_q <= '0;
    end else if (en) begin
      c3_q <= cmul(b[2], lvl[3]);
      c2_q <= cmul(b[1], lvl[2]) + c3_q;
      c1_q <= cmul(b[0], lvl[1]) + c2_q;
    end
  end

endmodule
