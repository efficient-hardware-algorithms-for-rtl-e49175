// fpga_algorithms_top_tb: end-to-end test of fpga_algorithms_top at reduced
// sizes (4 GCD cores of 128 bits, 3 compressors, 4 decompressors, 32 x 32
// image, all 180 angles). The test itself is in top_tb_body.svh.
module fpga_algorithms_top_tb;
  localparam int N_GCD = 4, GCD_W = 128, N_LZWC = 3, N_LZWD = 4;
  localparam int N_THETA = 180, XW = 5, YW = 5;
  localparam int LZW_BYTES = 400;
  localparam longint WATCHDOG_NS = 64'd50_000_000;
`include "top_tb_body.svh"
  fpga_algorithms_top #(
    .N_GCD(N_GCD), .GCD_W(GCD_W), .N_LZWC(N_LZWC), .N_LZWD(N_LZWD),
    .N_THETA(N_THETA), .XW(XW), .YW(YW)
  ) dut (.*);
endmodule
