// tb_multimode_filter: self-checking testbench of multimode_filter. Random coefficient sets and
// random input words with stalls; every output sample is compared with a
// software model of the difference equations (symfilt_ref_pkg).
module tb_multimode_filter;
  localparam int M2    = 8;
  localparam int NSETS = 8;
  localparam int NPIX  = 400;
  localparam bit T2    = 1'b0;
  localparam int SYM   = -1;

`include "filter_tb_body.svh"

  multimode_filter #(.M2(M2)) dut (.clk, .rst_n, .en, .clr, .mode, .coefs, .x, .y);

endmodule
