// tb_t1_block2: drives Block 2 with the column nodes of a random sequence s
// (lvl[i] = s[n-i*(M2-1)]), random coefficients and random tap connections,
// (only positions that can reach the multiplier: i - p + [j>=2] - [q>=2] >= 0
// for coefficient a_pq), with some multipliers switched off (input held at 0),
// and checks y[n] = sum_k a_k*(sum of the connected s[n-i*M2-j]) +
// sum_j b0j*y[n-j] against a software model, with stalls.
module tb_t1_block2;
  import symfilt_pkg::*;
  import symfilt_ref_pkg::*;
  localparam int M2 = 8;
  localparam int ROWS [11] = '{0, 0, 0, 0, 1, 1, 1, 1, 2, 2, 3};
  localparam int COLS [11] = '{0, 1, 2, 3, 0, 1, 2, 3, 2, 3, 3};
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, clr = 1'b0;
  data_t [3:0] lvl = '0;
  coef_t [10:0] a = '0;
  tapmask_t [10:0] tap_mask = '0;
  logic [10:0] mul_on = '1;
  coef_t [2:0] b = '0;
  data_t y;
  int checks = 0, failures = 0;
  int hs[$], hy[$];
  int ca[11], cb[3];

  t1_block2 dut (.clk, .rst_n, .en, .clr, .lvl, .a, .tap_mask, .mul_on, .b, .y);

  always #5 clk = ~clk;
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int s = 0; s < 4; s++) begin
      rand_coefs(ca, cb);
      for (int k = 0; k < 11; k++) begin
        a[k] = coef_t'(ca[k]);
        mul_on[k] = ($urandom_range(0, 4) != 0);
        for (int i = 0; i < 4; i++)
          for (int j = 0; j < 4; j++)
            tap_mask[k][i*4+j] = (i - ROWS[k] + int'(j >= 2) - int'(COLS[k] >= 2) >= 0) && ($urandom_range(0, 3) == 0);
      end
      for (int k = 0; k < 3; k++) b[k] = coef_t'(cb[k]);
      hs.delete(); hy.delete();
      for (int k = 0; k < 4 * M2 + 4; k++) begin hs.push_back(0); hy.push_back(0); end
      clr = 1'b1; @(negedge clk); clr = 1'b0;
      for (int n = 0; n < 400; n++) begin
        longint acc;
        int pre;
        en = ($urandom_range(0, 7) != 0);
        if (en) begin
          hs.push_front(int'($urandom_range(0, 8191)) - 4096); void'(hs.pop_back());
        end
        for (int i = 0; i < 4; i++) lvl[i] = data_t'(hs[i*(M2-1)]);
        #1;
        if (en) begin
          acc = 0;
          for (int k = 0; k < 11; k++) begin
            pre = 0;
            for (int i = 0; i < 4; i++)
              for (int j = 0; j < 4; j++)
                if (tap_mask[k][i*4+j] && mul_on[k]) pre = w16(longint'(pre) + hs[i*M2+j]);
            acc += cm(ca[k], pre);
          end
          for (int j = 1; j <= 3; j++) acc += cm(cb[j-1], hy[j-1]);
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
