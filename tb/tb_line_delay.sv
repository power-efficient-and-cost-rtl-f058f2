// tb_line_delay: checks that q equals the input of LEN enabled cycles earlier,
// with random stalls and a clear in the middle.
module tb_line_delay;
  localparam int LEN = 7;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, clr = 1'b0;
  logic [15:0] d = '0, q;
  int checks = 0, failures = 0;
  logic [15:0] hist[$];

  line_delay #(.LEN(LEN), .W(16)) dut (.clk, .rst_n, .en, .clr, .d, .q);

  always #5 clk = ~clk;
  initial begin #20000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    for (int k = 0; k < LEN; k++) hist.push_back('0);
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 600; n++) begin
      en  = ($urandom_range(0, 4) != 0);
      clr = (n == 300);
      d   = 16'($urandom);
      @(posedge clk);
      if (clr) begin
        for (int k = 0; k < LEN; k++) hist[k] = '0;
      end else if (en) begin
        hist.push_front(d);
        void'(hist.pop_back());
      end
      #1;
      checks++;
      if (q !== hist[LEN-1]) begin
        failures++;
        if (failures < 5) $display("n=%0d q=%h expected %h", n, q, hist[LEN-1]);
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
