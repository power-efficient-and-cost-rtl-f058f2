// tb_t1_block1: drives random words with stalls into Block 1 and checks the
// four column nodes: lvl[0] = y1[n] = x[n] + sum_i b0i*y1[n-i*M2] and
// lvl[i] = y1[n-i*(M2-1)], against a software model.
module tb_t1_block1;
  import symfilt_pkg::*;
  import symfilt_ref_pkg::*;
  localparam int M2 = 8;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, clr = 1'b0;
  data_t x = '0;
  coef_t [2:0] b = '0;
  data_t [3:0] lvl;
  int checks = 0, failures = 0;
  int h[$];
  int ca[11], cb[3];

  t1_block1 #(.M2(M2)) dut (.clk, .rst_n, .en, .clr, .x, .b, .lvl);

  always #5 clk = ~clk;
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int s = 0; s < 3; s++) begin
      rand_coefs(ca, cb);
      for (int k = 0; k < 3; k++) b[k] = coef_t'(cb[k] * 6);  // larger than the default range
      h.delete();
      for (int k = 0; k < 4 * M2; k++) h.push_back(0);
      clr = 1'b1; @(negedge clk); clr = 1'b0;
      for (int n = 0; n < 500; n++) begin
        int y1;
        longint acc;
        en = ($urandom_range(0, 7) != 0);
        x  = data_t'(int'($urandom_range(0, 8191)) - 4096);
        #1;
        if (en) begin
          acc = int'(x);
          for (int i = 1; i <= 3; i++) acc += cm(b[i-1], h[i*M2-1]);
          y1 = w16(acc);
          h.push_front(y1); void'(h.pop_back());
          for (int i = 0; i <= 3; i++) begin
            checks++;
            if (int'(lvl[i]) != h[i*(M2-1)]) begin
              failures++;
              if (failures < 5) $display("set %0d n %0d lvl[%0d]=%0d expected %0d", s, n, i, lvl[i], h[i*(M2-1)]);
            end
          end
        end
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
