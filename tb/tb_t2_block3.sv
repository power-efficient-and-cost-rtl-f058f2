// tb_t2_block3: checks y2[n] = x[n] + sum_j b0j*y2[n-j] with random
// coefficients and stalls against a software model.
module tb_t2_block3;
  import symfilt_pkg::*;
  import symfilt_ref_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, clr = 1'b0;
  data_t x = '0, y2;
  coef_t [2:0] b = '0;
  int checks = 0, failures = 0;
  int h[$];
  int ca[11], cb[3];

  t2_block3 dut (.clk, .rst_n, .en, .clr, .x, .b, .y2);

  always #5 clk = ~clk;
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int s = 0; s < 3; s++) begin
      rand_coefs(ca, cb);
      for (int k = 0; k < 3; k++) b[k] = coef_t'(cb[k] * 6);
      h = '{0, 0, 0};
      clr = 1'b1; @(negedge clk); clr = 1'b0;
      for (int n = 0; n < 400; n++) begin
        longint acc;
        en = ($urandom_range(0, 7) != 0);
        x  = data_t'(int'($urandom_range(0, 8191)) - 4096);
        #1;
        if (en) begin
          acc = int'(x);
          for (int j = 1; j <= 3; j++) acc += cm(b[j-1], h[j-1]);
          h.push_front(w16(acc)); void'(h.pop_back());
          checks++;
          if (int'(y2) != h[0]) begin
            failures++;
            if (failures < 5) $display("set %0d n %0d y2=%0d expected %0d", s, n, y2, h[0]);
          end
        end
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
