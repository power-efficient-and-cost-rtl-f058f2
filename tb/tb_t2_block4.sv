// tb_t2_block4: drives Block 4 (default: diagonal symmetry, ten multipliers)
// with a random Y2 sequence and checks
// y[n] = sum_ij a_owner(i,j)*y2[n-i*M2-j] + sum_i b0i*y[n-i*M2]
// against a software model, with stalls.
module tb_t2_block4;
  import symfilt_pkg::*;
  import symfilt_ref_pkg::*;
  localparam int M2 = 8;
  // set index -> port index of the default multiplier list a00 a01 a02 a03 a11 a12 a13 a22 a23 a33
  localparam int PORT [11] = '{0, 1, 2, 3, -1, 4, 5, 6, 7, 8, 9};
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, clr = 1'b0;
  data_t y2 = '0, y;
  coef_t [9:0] a = '0;
  coef_t [2:0] b = '0;
  int checks = 0, failures = 0;
  int h2[$], hy[$];
  int ca[11], cb[3];

  t2_block4 dut (.clk, .rst_n, .en, .clr, .y2, .a, .b, .y);

  always #5 clk = ~clk;
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int s = 0; s < 3; s++) begin
      rand_coefs(ca, cb);
      for (int c = 0; c < 11; c++) if (PORT[c] >= 0) a[PORT[c]] = coef_t'(ca[c]);
      for (int k = 0; k < 3; k++) b[k] = coef_t'(cb[k]);
      h2.delete(); hy.delete();
      for (int k = 0; k < 4 * M2 + 4; k++) begin h2.push_back(0); hy.push_back(0); end
      clr = 1'b1; @(negedge clk); clr = 1'b0;
      for (int n = 0; n < 400; n++) begin
        longint acc;
        en = ($urandom_range(0, 7) != 0);
        y2 = data_t'(int'($urandom_range(0, 8191)) - 4096);
        #1;
        if (en) begin
          h2.push_front(int'(y2)); void'(h2.pop_back());
          acc = 0;
          for (int i = 0; i < 4; i++)
            for (int j = 0; j < 4; j++) acc += cm(ca[OWN[0][i][j]], h2[i*M2+j]);
          for (int i = 1; i <= 3; i++) acc += cm(cb[i-1], hy[i*M2-1]);
          hy.push_front(w16(acc)); void'(hy.pop_back());
          checks++;
          if (int'(y) != hy[0]) begin
            failures++;
            if (failures < 5) $display("set %0d n %0d y=%0d expected %0d", s, n, y, hy[0]);
          end
        end
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
