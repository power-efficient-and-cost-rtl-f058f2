// tb_coef_loader: writes coefficient sets word by word with random gaps and
// checks: ready low while loading, clr high for exactly the cycle after the
// fourteenth word, working registers and mode taking the new set together with
// ready, and a new write dropping ready while the old set is kept.
module tb_coef_loader;
  import symfilt_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, coef_we = 1'b0;
  coef_t coef_in = '0;
  mode_t mode_in = DSM, mode;
  coefs_t coefs;
  logic ready, clr;
  int checks = 0, failures = 0;
  coef_t w[14];
  coefs_t prev;

  coef_loader dut (.clk, .rst_n, .coef_we, .coef_in, .mode_in, .coefs, .mode, .ready, .clr);

  always #5 clk = ~clk;
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("%0t: %s", $time, what); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    chk(!ready && !clr, "ready or clr after reset");
    for (int s = 0; s < 6; s++) begin
      prev = coefs;
      for (int k = 0; k < 14; k++) begin
        w[k] = coef_t'($urandom);
        coef_in = w[k]; coef_we = 1'b1;
        @(negedge clk);
        coef_we = 1'b0;
        chk(!ready, "ready while loading");
        if (k < 13) begin
          chk(!clr, "clr before the last word");
          chk(coefs == prev, "working registers changed while loading");
          repeat ($urandom_range(0, 2)) begin
            @(negedge clk);
            chk(!clr && !ready, "clr or ready in a gap");
          end
        end
      end
      mode_in = mode_t'(s % 4);
      chk(clr, "no clr after the last word");
      @(negedge clk);
      chk(!clr, "clr longer than one cycle");
      chk(ready, "ready not set after transfer");
      chk(mode == mode_t'(s % 4), "mode not latched");
      for (int k = 0; k < 3; k++)  chk(coefs.b[k] == w[k], "b coefficient");
      for (int k = 0; k < 11; k++) chk(coefs.a[k] == w[3+k], "a coefficient");
      repeat (3) @(negedge clk);
      chk(ready && !clr, "ready not held");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
