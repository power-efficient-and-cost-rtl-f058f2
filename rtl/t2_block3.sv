// t2_block3: Block 3 of the Type-2 filters, the pixel recursion
//   Y2 = X + b01 z^-1 Y2 + b02 z^-2 Y2 + b03 z^-3 Y2.
// Transposed form: Y2 is multiplied by b01..b03 at once and the products run
// down a chain of three z^-1 registers and two adders back to the input adder,
// as in the reference structure (three multipliers, three adders).
// Timing: y2 is combinational in x (one adder); state advances on en and is
// zeroed by clr.
module t2_block3
  import symfilt_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en,
  input  logic              clr,
  input  data_t             x,
  input  coef_t [NUM_B-1:0] b,
  output data_t             y2
);

  data_t q1, q2, q3;

  assign y2 = x + q1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q1 <= '0; q2 <= '0; q3 <= '0;
    end else if (clr) begin
      q1 <= '0; q2 <= '0; q3 <= '0;
    end else if (en) begin
      q3 <= cmul(b[2], y2);
      q2 <= cmul(b[1], y2) + q3;
      q1 <= cmul(b[0], y2) + q2;
    end
  end

endmodule
