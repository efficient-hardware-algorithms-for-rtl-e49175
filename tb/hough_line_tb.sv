// hough_line_tb: end-to-end test of hough_line on 64 x 64 images with all
// 180 angles. Each frame holds a few straight lines plus random noise pixels
// and is streamed in raster order with random input gaps. The reported peaks
// are compared with a software Hough transform (direct rho computation, full
// vote array, 3x3 maximum filter with threshold), and the planted horizontal
// line y = 20 must show up as a peak at theta = 90 degrees, rho = 20. Two
// frames run back to back, so the read-and-clear of the first is checked by
// the second. With no gaps a frame must take 2**(XW+YW) + RHO_BINS + 5
// cycles from its first pixel to frame_done.
module hough_line_tb;
  import hough_ref_pkg::*;
  localparam int N = 180, XW = 6, YW = 6, CW = 16;
  localparam int RW = ((XW > YW) ? XW : YW) + 2, NB = 1 << RW;
  localparam int W = 1 << XW, H = 1 << YW;

  logic clk = 0, rst_n = 0;
  logic [CW-1:0] threshold;
  logic pix_valid = 0, pix_ready, pix_edge = 0;
  logic peak_valid, frame_done;
  logic [RW-1:0] peak_rho;
  logic [N-1:0] peak_mask;
  int checks = 0, failures = 0;

  hough_line #(.N_THETA(N), .XW(XW), .YW(YW), .CNT_W(CW)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int votes [NB][N];
  logic [N-1:0] expm [NB];
  bit img [H][W];
  int got_peaks;
  bit planted_found;

  function automatic int get(input int r, input int t);
    return (r < 0 || r >= NB || t < 0 || t >= N) ? 0 : votes[r][t];
  endfunction

  always @(posedge clk) if (rst_n && peak_valid) begin
    checks++;
    got_peaks++;
    if (peak_mask != expm[peak_rho]) begin
      failures++;
      $display("FAIL rho bin %0d: mask %h expected %h", peak_rho, peak_mask, expm[peak_rho]);
    end
    expm[peak_rho] = '0;     // each column reported once
    if (peak_rho == RW'(20 + NB / 2) && peak_mask[90]) planted_found = 1;
  end

  task automatic frame(input bit gaps, input int thr, output longint cyc);
    longint t0;
    int exp_peaks;
    threshold = CW'(thr);
    foreach (img[y, x]) img[y][x] = ($urandom_range(0, 99) < 2) || (y == 20) || (x == 45) || (x + y == 70);
    foreach (votes[r, t]) votes[r][t] = 0;
    foreach (img[y, x]) if (img[y][x]) for (int t = 0; t < N; t++) votes[ref_bin(x, y, t, N, NB)][t]++;
    exp_peaks = 0;
    for (int r = 0; r < NB; r++) begin
      for (int t = 0; t < N; t++) begin
        int v;
        bit p;
        v = votes[r][t];
        p = (v >= thr) && (v != 0);
        for (int dr = -1; dr <= 1; dr++)
          for (int dt = -1; dt <= 1; dt++) begin
            if (dr == 0 && dt == 0) continue;
            if (dr < 0 || (dr == 0 && dt < 0)) p &= (v > get(r + dr, t + dt));
            else                               p &= (v >= get(r + dr, t + dt));
          end
        expm[r][t] = p;
      end
      if (expm[r] != 0) exp_peaks++;
    end
    got_peaks = 0;
    planted_found = 0;
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        @(negedge clk);
        while (gaps && $urandom_range(0, 7) == 0) begin pix_valid = 0; @(negedge clk); end
        pix_valid = 1; pix_edge = img[y][x];
        while (!pix_ready) @(negedge clk);
        if (x == 0 && y == 0) t0 = $time;
      end
    @(negedge clk); pix_valid = 0;
    while (!frame_done) @(negedge clk);
    cyc = ($time - t0) / 10;
    checks += 2;
    if (got_peaks != exp_peaks) begin failures++; $display("FAIL %0d peak columns, expected %0d", got_peaks, exp_peaks); end
    if (!planted_found) begin failures++; $display("FAIL planted line y=20 not found"); end
  endtask

  initial begin
    longint c;
    threshold = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    frame(1, 20, c);
    frame(0, 30, c);
    checks++;
    if (c != W * H + NB + 5) begin failures++; $display("FAIL frame took %0d cycles", c); end
    $display("frame cycles %0d", c);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
