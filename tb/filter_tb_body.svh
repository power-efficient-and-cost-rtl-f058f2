// Shared body of the filter testbenches. The including module defines
//   localparam int M2, NSETS, NPIX; localparam bit T2; localparam int SYM
// (SYM = -1 steps through the four modes, one per coefficient set) and
// instantiates the filter on clk, rst_n, en, clr, mode, coefs, x and y.
// For every coefficient set the filter state is cleared, then NPIX random
// words are applied with about one cycle in ten stalled (en low). y is
// combinational in x: it is compared with the software model in the same
// cycle, for every accepted word. Ends with the TB_RESULT line.

  import symfilt_pkg::*;
  import symfilt_ref_pkg::*;

  logic   clk = 1'b0;
  logic   rst_n = 1'b0;
  logic   en = 1'b0;
  logic   clr = 1'b0;
  mode_t  mode = DSM;
  coefs_t coefs = '0;
  data_t  x = '0;
  data_t  y;

  int checks = 0;
  int failures = 0;
  int stalls = 0;
  ref_filter rf;
  int ca[11];
  int cb[3];

  always #5 clk = ~clk;

  initial begin
    #(10 * (NSETS * (NPIX + 4) + 100));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int expv;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int s = 0; s < NSETS; s++) begin
      int sym;
      sym = (SYM < 0) ? (s % 4) : SYM;
      rand_coefs(ca, cb);
      for (int k = 0; k < 11; k++) coefs.a[k] = coef_t'(ca[k]);
      for (int k = 0; k < 3; k++)  coefs.b[k] = coef_t'(cb[k]);
      mode = mode_t'(sym);
      rf = new(M2, T2, sym);
      rf.a = ca;
      rf.b = cb;
      clr = 1'b1; en = 1'b0;
      @(negedge clk);
      clr = 1'b0;
      for (int n = 0; n < NPIX; n++) begin
        en = ($urandom_range(0, 9) != 0);
        x  = data_t'(int'($urandom_range(0, 8191)) - 4096);
        #1;
        if (en) begin
          expv = rf.step(int'(x));
          checks++;
          if (int'(y) != expv) begin
            failures++;
            if (failures < 10)
              $display("set %0d sym %0d pixel %0d: y=%0d expected %0d", s, sym, n, y, expv);
          end
        end else stalls++;
        @(negedge clk);
      end
    end
    if (stalls == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
