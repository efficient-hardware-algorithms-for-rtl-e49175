// hough_line: line-detecting Hough transform of a binary edge image given
// pixel by pixel in raster-scan order.
//
// How it works: N_THETA hough_theta_unit instances, one per angle, each with
// its own accumulator memory, all vote for the same pixel in the same clock,
// so the whole image is voted in one pass of 2**XW * 2**YW cycles (one pixel
// per clock). After the last pixel the controller lets the last votes land,
// then reads every rho bin of all angles in parallel, one bin per clock,
// clearing it as it goes, and streams those columns through hough_max_filter.
// Peaks come out as (rho bin, angle mask) pairs; only columns holding at
// least one peak are reported. frame_done pulses when the scan is over and
// the next frame may start.
//
// Phases and timing: after reset the accumulators are cleared (RHO_BINS
// cycles, pix_ready low). VOTE: pix_ready high, one pixel per clock; the
// pixel coordinates are counted here, x fastest. DRAIN: 2 cycles. SCAN:
// RHO_BINS + 2 cycles. A frame thus takes 2**(XW+YW) + RHO_BINS + 4 cycles
// plus any input gaps.
//
// Rho of angle k (theta = k*pi/N_THETA) is round(x cos + y sin) with the
// fixed-point table of hough_pkg, stored in bin rho + RHO_BINS/2. A peak at
// bin b and angle k is the line x cos(theta) + y sin(theta) = b - RHO_BINS/2.
//
// One memory and one voting unit per angle, raster-scan input and the
// maximum filter follow the design; 180 angles match its 180 block RAMs.
// The 512 x 512 image, the counter width and the interface are this
// implementation's choices.
module hough_line #(
  parameter int unsigned N_THETA  = 180,
  parameter int unsigned XW       = 9,
  parameter int unsigned YW       = 9,
  parameter int unsigned CNT_W    = 16,
  localparam int unsigned MW      = (XW > YW) ? XW : YW,
  localparam int unsigned RHO_W   = MW + 2,
  localparam int unsigned RHO_BINS = 1 << RHO_W
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [CNT_W-1:0]   threshold,
  input  logic               pix_valid,
  output logic               pix_ready,
  input  logic               pix_edge,
  output logic               peak_valid,
  output logic [RHO_W-1:0]   peak_rho,
  output logic [N_THETA-1:0] peak_mask,
  output logic               frame_done
);
  typedef enum logic [1:0] {P_CLEAR, P_VOTE, P_DRAIN, P_SCAN} phase_t;
  phase_t phase;

  logic [XW-1:0]  x;
  logic [YW-1:0]  y;
  logic [RHO_W:0] addr;       // scan address, RHO_BINS = flush column
  logic [1:0]     drain;
  logic           take;

  assign pix_ready = (phase == P_VOTE);
  assign take      = pix_valid && pix_ready;

  logic sof, sol;
  assign sof = (x == '0) && (y == '0);
  assign sol = (x == '0);

  logic             rd_en;
  logic [CNT_W-1:0] rd_data [N_THETA];
  assign rd_en = ((phase == P_SCAN) || (phase == P_CLEAR)) && (addr < (RHO_W+1)'(RHO_BINS));

  for (genvar k = 0; k < N_THETA; k++) begin : g_theta
    hough_theta_unit #(
      .THETA(k), .N_THETA(N_THETA), .XW(XW), .YW(YW), .CNT_W(CNT_W)
    ) u_unit (
      .clk(clk), .rst_n(rst_n),
      .pix_valid(take), .sof(sof), .sol(sol), .pix_edge(pix_edge),
      .rd_en(rd_en), .rd_addr(addr[RHO_W-1:0]), .rd_data(rd_data[k])
    );
  end

  // read data arrive one cycle after the address
  logic             col_valid;
  logic [RHO_W:0]   col_rho;
  logic [CNT_W-1:0] col [N_THETA];
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      col_valid <= 1'b0;
      col_rho   <= '0;
    end else begin
      col_valid <= (phase == P_SCAN);
      col_rho   <= addr;
    end
  end
  always_comb
    for (int k = 0; k < int'(N_THETA); k++)
      col[k] = (col_rho == (RHO_W+1)'(RHO_BINS)) ? '0 : rd_data[k];

  logic               pk_valid;
  logic [RHO_W-1:0]   pk_rho;
  logic [N_THETA-1:0] pk_mask;
  hough_max_filter #(.N_THETA(N_THETA), .RHO_W(RHO_W), .CNT_W(CNT_W)) u_max (
    .clk(clk), .rst_n(rst_n), .threshold(threshold),
    .col_valid(col_valid), .col_rho(col_rho), .col(col),
    .pk_valid(pk_valid), .pk_rho(pk_rho), .pk_mask(pk_mask)
  );

  assign peak_valid = pk_valid && (pk_mask != '0);
  assign peak_rho   = pk_rho;
  assign peak_mask  = pk_mask;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      phase      <= P_CLEAR;
      x          <= '0;
      y          <= '0;
      addr       <= '0;
      drain      <= '0;
      frame_done <= 1'b0;
    end else begin
      frame_done <= 1'b0;
      unique case (phase)
        P_CLEAR: begin
          addr <= addr + 1'b1;
          if (addr == (RHO_W+1)'(RHO_BINS - 1)) begin
            addr  <= '0;
            phase <= P_VOTE;
          end
        end
        P_VOTE: if (take) begin
          x <= x + 1'b1;
          if (x == '1) begin
            y <= y + 1'b1;
            if (y == '1) begin
              drain <= '0;
              phase <= P_DRAIN;
            end
          end
        end
        P_DRAIN: begin
          drain <= drain + 1'b1;
          if (drain == 2'd1) begin
            addr  <= '0;
            phase <= P_SCAN;
          end
        end
        P_SCAN: begin
          addr <= addr + 1'b1;
          if (addr == (RHO_W+1)'(RHO_BINS)) begin
            addr  <= '0;
            phase <= P_VOTE;
          end
        end
        default: phase <= P_CLEAR;
      endcase
      // the filter's last output (flush column) marks the end of the frame
      if (pk_valid && pk_rho == RHO_W'(RHO_BINS - 1)) frame_done <= 1'b1;
    end
  end
endmodule
