// fpga_algorithms_top: the three independent accelerators of this design,
// side by side, each with its own ports.
//
//  * GCD: an array of N_GCD Euclidean-algorithm cores for W-bit integers
//    (gcd_array), loaded and read through one shared bus.
//  * LZW: N_LZWC compressors and N_LZWD decompressors, each an independent
//    byte/code stream engine with its own dictionary memory
//    (lzw_compressor, lzw_decompressor). Their streams are brought out as
//    arrays indexed by module number.
//  * Hough: the line Hough transform of a raster-scanned edge image with
//    per-angle voting memories and a maximum filter (hough_line).
//
// The module counts 1280, 24 and 34 and the 180 angles are the design's
// figures; everything shares one clock and one synchronous active-low reset.
// Nothing connects the three parts: they only share the device.
module fpga_algorithms_top
  import lzw_pkg::*;
#(
  parameter int unsigned N_GCD    = 1280,
  parameter int unsigned GCD_W    = 1024,
  parameter int unsigned N_LZWC   = 24,
  parameter int unsigned N_LZWD   = 34,
  parameter int unsigned N_THETA  = 180,
  parameter int unsigned XW       = 9,
  parameter int unsigned YW       = 9,
  parameter int unsigned CNT_W    = 16,
  localparam int unsigned GIW     = (N_GCD > 1) ? $clog2(N_GCD) : 1,
  localparam int unsigned RHO_W   = ((XW > YW) ? XW : YW) + 2
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // GCD core array
  input  logic                 gcd_ld_valid,
  input  logic [GIW-1:0]       gcd_ld_core,
  input  logic [GCD_W-1:0]     gcd_ld_x,
  input  logic [GCD_W-1:0]     gcd_ld_y,
  output logic                 gcd_ld_accept,
  output logic [N_GCD-1:0]     gcd_busy,
  output logic [N_GCD-1:0]     gcd_done,
  input  logic [GIW-1:0]       gcd_rd_core,
  output logic [GCD_W-1:0]     gcd_rd_result,
  output logic                 gcd_rd_done,
  output logic [31:0]          gcd_rd_cycles,
  // LZW compressors
  input  logic [N_LZWC-1:0]    lzc_in_valid,
  output logic [N_LZWC-1:0]    lzc_in_ready,
  input  logic [CHAR_W-1:0]    lzc_in_data  [N_LZWC],
  input  logic [N_LZWC-1:0]    lzc_in_last,
  output logic [N_LZWC-1:0]    lzc_out_valid,
  input  logic [N_LZWC-1:0]    lzc_out_ready,
  output logic [CODE_W-1:0]    lzc_out_code [N_LZWC],
  output logic [N_LZWC-1:0]    lzc_out_last,
  // LZW decompressors
  input  logic [N_LZWD-1:0]    lzd_in_valid,
  output logic [N_LZWD-1:0]    lzd_in_ready,
  input  logic [CODE_W-1:0]    lzd_in_code  [N_LZWD],
  input  logic [N_LZWD-1:0]    lzd_in_last,
  output logic [N_LZWD-1:0]    lzd_out_valid,
  input  logic [N_LZWD-1:0]    lzd_out_ready,
  output logic [CHAR_W-1:0]    lzd_out_data [N_LZWD],
  output logic [N_LZWD-1:0]    lzd_out_last,
  // line Hough transform
  input  logic [CNT_W-1:0]     hough_threshold,
  input  logic                 hough_pix_valid,
  output logic                 hough_pix_ready,
  input  logic                 hough_pix_edge,
  output logic                 hough_peak_valid,
  output logic [RHO_W-1:0]     hough_peak_rho,
  output logic [N_THETA-1:0]   hough_peak_mask,
  output logic                 hough_frame_done
);
  gcd_array #(.N_CORES(N_GCD), .W(GCD_W)) u_gcd (
    .clk, .rst_n,
    .ld_valid(gcd_ld_valid), .ld_core(gcd_ld_core), .ld_x(gcd_ld_x), .ld_y(gcd_ld_y),
    .ld_accept(gcd_ld_accept), .busy_mask(gcd_busy), .done_mask(gcd_done),
    .rd_core(gcd_rd_core), .rd_result(gcd_rd_result), .rd_done(gcd_rd_done),
    .rd_cycles(gcd_rd_cycles)
  );

  for (genvar i = 0; i < N_LZWC; i++) begin : g_lzc
    lzw_compressor u_c (
      .clk, .rst_n,
      .in_valid(lzc_in_valid[i]), .in_ready(lzc_in_ready[i]),
      .in_data(lzc_in_data[i]), .in_last(lzc_in_last[i]),
      .out_valid(lzc_out_valid[i]), .out_ready(lzc_out_ready[i]),
      .out_code(lzc_out_code[i]), .out_last(lzc_out_last[i])
    );
  end

  for (genvar i = 0; i < N_LZWD; i++) begin : g_lzd
    lzw_decompressor u_d (
      .clk, .rst_n,
      .in_valid(lzd_in_valid[i]), .in_ready(lzd_in_ready[i]),
      .in_code(lzd_in_code[i]), .in_last(lzd_in_last[i]),
      .out_valid(lzd_out_valid[i]), .out_ready(lzd_out_ready[i]),
      .out_data(lzd_out_data[i]), .out_last(lzd_out_last[i])
    );
  end

  hough_line #(.N_THETA(N_THETA), .XW(XW), .YW(YW), .CNT_W(CNT_W)) u_hough (
    .clk, .rst_n,
    .threshold(hough_threshold),
    .pix_valid(hough_pix_valid), .pix_ready(hough_pix_ready), .pix_edge(hough_pix_edge),
    .peak_valid(hough_peak_valid), .peak_rho(hough_peak_rho), .peak_mask(hough_peak_mask),
    .frame_done(hough_frame_done)
  );
endmodule
