// tb_symfilt_top: end-to-end test of the filter system at its default size
// (M2 = 8). It runs NSETS coefficient sets, each loaded word by word through
// the single coefficient input with the mode stepping DSM, FRSM, QSM, OSM, and
// streams NPIX random 10-bit pixels per set with random stalls; pixels offered
// while a set is loading must be ignored. Every registered output of the
// multimode filter and of the eight single-symmetry filters is compared with
// the software model one cycle after its pixel was accepted, and the
// multimode output is compared with the single-symmetry Type-1 filter of the
// same mode. Every tenth set uses large numerator coefficients so that the
// outputs saturate. Each mechanism (parallel load, every mode, mode switch,
// stall, pixel ignored while loading, saturation) is counted and must occur.
module tb_symfilt_top;
  import symfilt_pkg::*;
  import symfilt_ref_pkg::*;

  localparam int M2    = 8;
  localparam int SH    = 3;
  localparam int NSETS = 100;
  localparam int NPIX  = 1000;

  logic clk = 1'b0, rst_n = 1'b0;
  logic coef_we = 1'b0;
  coef_t coef_in = '0;
  mode_t mode_in = DSM;
  logic coef_ready;
  mode_t mode;
  logic in_valid = 1'b0;
  logic signed [9:0] x_in = '0;
  logic out_valid;
  logic signed [9:0] y_mm;
  logic signed [3:0][9:0] y_t1, y_t2;

  symfilt_top dut (
    .clk, .rst_n, .coef_we, .coef_in, .mode_in, .coef_ready, .mode,
    .in_valid, .x_in, .out_valid, .y_mm, .y_t1, .y_t2
  );

  int checks = 0, failures = 0;
  int n_load = 0, n_switch = 0, n_stall = 0, n_ignored = 0, n_sat = 0;
  int n_mode[4] = '{0, 0, 0, 0};
  ref_filter rmm, r1[4], r2[4];
  int ca[11], cb[3];
  int e_mm, e1[4], e2[4];
  bit pend = 1'b0;

  always #5 clk = ~clk;

  initial begin
    #(10 * NSETS * (NPIX * 2 + 200));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("%0t %s: got %0d expected %0d", $time, what, got, exp);
    end
  endtask

  // Compare the registered outputs of the pixel accepted in the previous cycle.
  task automatic check_outputs();
    chk(int'(out_valid), int'(pend), "out_valid");
    if (pend) begin
      chk(int'(y_mm), e_mm, "multimode");
      chk(int'(y_mm), int'($signed(y_t1[int'(mode)])), "multimode vs single-symmetry filter");
      for (int k = 0; k < 4; k++) begin
        chk(int'($signed(y_t1[k])), e1[k], $sformatf("type-1 filter %0d", k));
        chk(int'($signed(y_t2[k])), e2[k], $sformatf("type-2 filter %0d", k));
      end
    end
  endtask

  // One clock cycle: drive at the falling edge, check after the rising edge.
  task automatic cycle(input bit we, input int w, input bit v, input int px);
    bit accept;
    coef_we = we; coef_in = coef_t'(w); in_valid = v; x_in = 10'(px);
    accept = v && coef_ready;
    if (v && !coef_ready) n_ignored++;
    if (!v && coef_ready) n_stall++;
    if (accept) begin
      int xw, yv;
      xw   = px <<< SH;
      yv   = rmm.step(xw);
      e_mm = sat10(yv, SH);
      if (e_mm != (yv >>> SH)) n_sat++;
      for (int k = 0; k < 4; k++) begin
        e1[k] = sat10(r1[k].step(xw), SH);
        e2[k] = sat10(r2[k].step(xw), SH);
      end
    end
    @(posedge clk);
    #1;
    pend = accept;
    check_outputs();
    @(negedge clk);
  endtask

  initial begin
    int prev_mode;
    prev_mode = -1;
    rmm = new(M2, 1'b0, 0);
    for (int k = 0; k < 4; k++) begin r1[k] = new(M2, 1'b0, k); r2[k] = new(M2, 1'b1, k); end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int s = 0; s < NSETS; s++) begin
      int m;
      m = s % 4;
      rand_coefs(ca, cb);
      if (s % 10 == 9) for (int k = 0; k < 11; k++) ca[k] = int'($urandom_range(0, 32000)) - 16000;
      mode_in = mode_t'(m);
      // serial load: b01 b02 b03 a00 .. a33, pixels offered now and then are ignored
      for (int k = 0; k < 14; k++) begin
        cycle(1'b1, (k < 3) ? cb[k] : ca[k-3], $urandom_range(0, 3) == 0, int'($urandom_range(0, 1023)) - 512);
        if (k < 13 && $urandom_range(0, 3) == 0)
          cycle(1'b0, 0, $urandom_range(0, 1) == 0, int'($urandom_range(0, 1023)) - 512);
      end
      // transfer cycle: state cleared, models restart
      chk(int'(coef_ready), 0, "ready before transfer");
      cycle(1'b0, 0, 1'b0, 0);
      chk(int'(coef_ready), 1, "ready after transfer");
      chk(int'(mode), m, "mode latched");
      n_load++;
      n_mode[m]++;
      if (prev_mode >= 0 && prev_mode != m) n_switch++;
      prev_mode = m;
      rmm = new(M2, 1'b0, m);
      rmm.a = ca; rmm.b = cb;
      for (int k = 0; k < 4; k++) begin
        r1[k].clear(); r1[k].a = ca; r1[k].b = cb;
        r2[k].clear(); r2[k].a = ca; r2[k].b = cb;
      end
      for (int n = 0; n < NPIX; n++) begin
        bit v;
        v = ($urandom_range(0, 9) != 0);
        if (!v) n--;  // NPIX accepted pixels per set
        cycle(1'b0, 0, v, int'($urandom_range(0, 1023)) - 512);
      end
    end
    cycle(1'b0, 0, 1'b0, 0);
    $display("loads=%0d mode_switches=%0d modes=%0d/%0d/%0d/%0d stalls=%0d ignored=%0d saturated=%0d",
             n_load, n_switch, n_mode[0], n_mode[1], n_mode[2], n_mode[3], n_stall, n_ignored, n_sat);
    if (n_load == 0 || n_switch == 0 || n_stall == 0 || n_ignored == 0 || n_sat == 0) failures++;
    for (int k = 0; k < 4; k++) if (n_mode[k] == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
