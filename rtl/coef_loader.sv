// coef_loader: coefficient input of the filters. The fourteen distinct
// coefficients arrive one 16-bit word per coef_we pulse on a single input, in
// the order b01 b02 b03 a00 a01 a02 a03 a10 a11 a12 a13 a22 a23 a33, and are
// stored in shadow registers. On the clock edge after the fourteenth word they
// are copied in parallel into the working registers that drive the
// multipliers, mode_in is latched, clr is high for that one cycle so the
// filters start from zero state, and ready rises: the filters may then run.
// Serial loading through one input and parallel transfer before the filter
// starts follow the reference implementation; the word order, the mode latch
// and the clear are this design's choices.
// A coef_we while running starts a new set: ready falls at once and the old
// working set stays until the new one is complete.
module coef_loader
  import symfilt_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   coef_we,
  input  coef_t  coef_in,
  input  mode_t  mode_in,
  output coefs_t coefs,
  output mode_t  mode,
  output logic   ready,
  output logic   clr
);

  coef_t                      shadow [NCOEF];
  logic [$clog2(NCOEF+1)-1:0] cnt;
  logic                       xfer_q;  // last word written: transfer on the next edge

  assign clr = xfer_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < NCOEF; k++) shadow[k] <= '0;
      cnt    <= '0;
      xfer_q <= 1'b0;
      coefs  <= '0;
      mode   <= DSM;
      ready  <= 1'b0;
    end else begin
      xfer_q <= 1'b0;
      if (coef_we) begin
        shadow[cnt] <= coef_in;
        ready       <= 1'b0;
        if (cnt == $bits(cnt)'(NCOEF - 1)) begin
          cnt    <= '0;
          xfer_q <= 1'b1;
        end else begin
          cnt <= cnt + 1'b1;
        end
      end
      if (xfer_q) begin
        for (int k = 0; k < NUM_B; k++) coefs.b[k] <= shadow[k];
        for (int k = 0; k < NUM_A; k++) coefs.a[k] <= shadow[NUM_B + k];
        mode  <= mode_in;
        ready <= 1'b1;
      end
    end
  end

  // A transfer always follows the last word and never coincides with a new one.
  assert property (@(posedge clk) disable iff (!rst_n) xfer_q |-> (cnt == 0));

endmodule
