// tb_t1_diag_filter: self-checking testbench of t1_diag_filter. Random coefficient sets and
// random input words with stalls; every output sample is compared with a
// software model of the difference equations (symfilt_ref_pkg).
module tb_t1_diag_filter;
  localparam int M2    = 8;
  localparam int NSETS = 3;
  localparam int NPIX  = 400;
  localparam bit T2    = 1'b0;
  localparam int SYM   = 0;

`include "filter_tb_body.svh"

  t1_diag_filter #(.M2(M2)) dut (.clk, .rst_n, .en, .clr, .coefs, .x, .y);

endmodule
