// hough_theta_unit: one partition of the line Hough parameter space, the
// accumulator column of one angle theta, with its own vote memory.
//
// How it works: pixels arrive in raster-scan order, every pixel of the image,
// flagged sof (first pixel of the frame) and sol (first pixel of a row). The
// unit tracks rho = x*cos(theta) + y*sin(theta) without multiplying: along a
// row it adds cos(theta) per pixel, and at the start of each row it restarts
// from a row base that grows by sin(theta) per row. For an edge pixel, rho is
// rounded to a bin, offset by RHO_BINS/2 so that negative rho has a bin, and
// the next cycle that bin of the accumulator memory is incremented
// (saturating). A vote to a bin read by the previous vote is counted correctly
// because the increment is a single-cycle read-modify-write.
//
// After the frame the owner reads the memory back one bin per clock (rd_en,
// rd_addr; data on rd_data one cycle later) and each read also clears the
// bin, so the memory is empty for the next frame.
//
// Splitting the parameter space into one memory per angle, all voting in
// parallel, follows the design; the incremental rho arithmetic, the rounding
// and the sizes are this implementation's choices.
module hough_theta_unit
  import hough_pkg::*;
#(
  parameter int unsigned THETA    = 0,     // this unit's angle index
  parameter int unsigned N_THETA  = 180,
  parameter int unsigned XW       = 9,     // image width  2**XW
  parameter int unsigned YW       = 9,     // image height 2**YW
  parameter int unsigned CNT_W    = 16,
  localparam int unsigned MW      = (XW > YW) ? XW : YW,
  localparam int unsigned RHO_W   = MW + 2,
  localparam int unsigned RHO_BINS = 1 << RHO_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             pix_valid,
  input  logic             sof,
  input  logic             sol,
  input  logic             pix_edge,
  input  logic             rd_en,
  input  logic [RHO_W-1:0] rd_addr,
  output logic [CNT_W-1:0] rd_data
);
  localparam int unsigned AW = MW + TRIG_FRAC + 4;   // rho with fraction bits
  localparam trig_t COS_Q = trig_q(THETA, N_THETA, 1'b0);
  localparam trig_t SIN_Q = trig_q(THETA, N_THETA, 1'b1);

  logic signed [AW-1:0] row_base, rho_prev, rho_cur;
  logic [CNT_W-1:0]     acc [RHO_BINS];

  always_comb begin
    if (sof)      rho_cur = '0;
    else if (sol) rho_cur = row_base + AW'(SIN_Q);
    else          rho_cur = rho_prev + AW'(COS_Q);
  end

  // bin = round(rho) + RHO_BINS/2
  logic signed [AW-1:0] rho_round;
  logic [RHO_W-1:0]     bin;
  always_comb begin
    rho_round = (rho_cur + AW'(1 << (TRIG_FRAC - 1))) >>> TRIG_FRAC;
    bin       = RHO_W'(rho_round + AW'(RHO_BINS / 2));
  end

  logic             vote_q;
  logic [RHO_W-1:0] bin_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      row_base <= '0;
      rho_prev <= '0;
      vote_q   <= 1'b0;
      bin_q    <= '0;
    end else begin
      vote_q <= pix_valid && pix_edge;
      bin_q  <= bin;
      if (pix_valid) begin
        rho_prev <= rho_cur;
        if (sof || sol) row_base <= rho_cur;
      end
    end
  end

  // accumulator memory: vote port during the frame, read-and-clear after it
  logic [CNT_W-1:0] cur_cnt;
  assign cur_cnt = acc[bin_q];
  always_ff @(posedge clk) begin
    if (vote_q) begin
      if (cur_cnt != '1) acc[bin_q] <= cur_cnt + 1'b1;
    end else if (rd_en) begin
      acc[rd_addr] <= '0;
    end
    if (rd_en) rd_data <= acc[rd_addr];
  end

  // reading back while votes are still landing would lose them
  assert property (@(posedge clk) disable iff (!rst_n) !(vote_q && rd_en));
endmodule
