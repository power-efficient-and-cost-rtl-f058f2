// tb_ib_ctrl: for each mode, checks that every tap (i,j) reaches exactly the
// multiplier of the coefficient it equals (hand-written sharing tables) and
// no other, and that exactly the multipliers of the mode's independent
// coefficients are switched on.
module tb_ib_ctrl;
  import symfilt_pkg::*;
  import symfilt_ref_pkg::*;
  mode_t mode = DSM;
  tapmask_t [10:0] tap_mask;
  logic [10:0] mul_on;
  int checks = 0, failures = 0;
  // independent coefficients per mode: diagonal 10, fourfold 4, quadrantal 8, octagonal 3
  localparam logic [10:0] USED [4] = '{11'b111_1110_1111, 11'b000_0010_0111,
                                        11'b000_1111_1111, 11'b000_0010_0011};

  ib_ctrl dut (.mode, .tap_mask, .mul_on);

  initial begin
    for (int m = 0; m < 4; m++) begin
      mode = mode_t'(m);
      #1;
      for (int i = 0; i < 4; i++)
        for (int j = 0; j < 4; j++)
          for (int c = 0; c < 11; c++) begin
            checks++;
            if (tap_mask[c][i*4+j] != (OWN[m][i][j] == c)) begin
              failures++;
              $display("mode %0d tap (%0d,%0d) multiplier %0d: %0b", m, i, j, c, tap_mask[c][i*4+j]);
            end
          end
      checks++;
      if (mul_on != USED[m]) begin
        failures++;
        $display("mode %0d mul_on=%b expected %b", m, mul_on, USED[m]);
      end
      checks++;
      if ($countones(mul_on) != ((m == 0) ? 10 : (m == 1) ? 4 : (m == 2) ? 8 : 3)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
