// hough_max_filter: 3x3 maximum filter with threshold over the (theta, rho)
// vote array, which it receives one rho column (all angles) per clock.
//
// How it works: the filter keeps the last two columns (rho-2 and rho-1).
// When column rho arrives, each cell of column rho-1 is compared with its
// eight neighbours at theta-1..theta+1 and rho-2..rho. It is a peak when its
// count reaches the threshold, is greater than the neighbours that come before
// it in (rho, theta) order and not smaller than those that come after (a
// cell with no votes is never a peak); this
// tie rule keeps exactly one peak on a plateau of equal counts. Neighbours
// outside the array count as zero. Columns must arrive with col_rho counting
// up from 0; column 0 restarts the filter, and the caller ends the scan with
// one all-zero column at rho = RHO_BINS so that the last real column is also
// judged.
//
// Output, registered one cycle after the column that completes the window:
// pk_valid with pk_rho (the centre column) and pk_mask, one bit per angle.
// pk_valid is raised for every centre column, with or without peaks.
//
// Using a maximum filter to keep only true local maxima after voting follows
// the design; the window size, the tie rule and the threshold input are this
// implementation's choices.
module hough_max_filter #(
  parameter int unsigned N_THETA = 180,
  parameter int unsigned RHO_W   = 11,
  parameter int unsigned CNT_W   = 16
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [CNT_W-1:0]   threshold,
  input  logic               col_valid,
  input  logic [RHO_W:0]     col_rho,
  input  logic [CNT_W-1:0]   col [N_THETA],
  output logic               pk_valid,
  output logic [RHO_W-1:0]   pk_rho,
  output logic [N_THETA-1:0] pk_mask
);
  logic [CNT_W-1:0] lo [N_THETA];   // column rho-2
  logic [CNT_W-1:0] mid[N_THETA];   // column rho-1 (centre)

  function automatic logic [CNT_W-1:0] at(input logic [CNT_W-1:0] c [N_THETA], input int t);
    return (t < 0 || t >= int'(N_THETA)) ? '0 : c[t];
  endfunction

  logic [N_THETA-1:0] mask;
  always_comb begin
    for (int t = 0; t < int'(N_THETA); t++) begin
      logic [CNT_W-1:0] v;
      v = mid[t];
      mask[t] = (v >= threshold) && (v != '0)
             && (v >  at(lo, t - 1)) && (v > at(lo, t)) && (v > at(lo, t + 1))
             && (v >  at(mid, t - 1))
             && (v >= at(mid, t + 1))
             && (v >= at(col, t - 1)) && (v >= at(col, t)) && (v >= at(col, t + 1));
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pk_valid <= 1'b0;
      pk_rho   <= '0;
      pk_mask  <= '0;
      for (int t = 0; t < int'(N_THETA); t++) begin lo[t] <= '0; mid[t] <= '0; end
    end else begin
      pk_valid <= col_valid && (col_rho != '0);
      if (col_valid) begin
        for (int t = 0; t < int'(N_THETA); t++) begin
          lo[t]  <= (col_rho == '0) ? '0 : mid[t];
          mid[t] <= col[t];
        end
        pk_rho  <= RHO_W'(col_rho - 1'b1);
        pk_mask <= (col_rho == '0) ? '0 : mask;
      end
    end
  end
endmodule
