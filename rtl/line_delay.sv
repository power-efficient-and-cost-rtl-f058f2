// line_delay: the shift register (SR) of a line buffer. It delays a W-bit word
// by LEN enabled clock cycles. In the filters LEN = M2-1: together with one z^-1
// register kept on the neighbouring adder chain it makes the line delay
// z1^-1 = z^-M2 of a raster-scanned image whose lines are M2 pixels wide.
// Interface: d in, q out; en advances the register by one pixel, clr zeroes it
// synchronously, rst_n zeroes it asynchronously.
module line_delay #(
  parameter int unsigned LEN = 7,
  parameter int unsigned W   = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic         clr,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  logic [W-1:0] sr [LEN];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < LEN; k++) sr[k] <= '0;
    end else if (clr) begin
      for (int k = 0; k < LEN; k++) sr[k] <= '0;
    end else if (en) begin
      sr[0] <= d;
      for (int k = 1; k < LEN; k++) sr[k] <= sr[k-1];
    end
  end

  assign q = sr[LEN-1];

  initial assert (LEN >= 1) else $error("line_delay: LEN must be at least 1");

endmodule
