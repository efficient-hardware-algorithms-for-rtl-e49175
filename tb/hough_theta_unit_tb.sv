// hough_theta_unit_tb: self-checking test of hough_theta_unit. Two units, at
// 37 and 150 degrees (negative cosine), see a 32 x 32 image with random edge
// pixels and a straight run of edges that piles many votes into single bins,
// over two frames. After each frame every bin is read back and compared with
// a histogram of directly computed rho bins; the second frame also shows that
// reading clears the memory.
module hough_theta_unit_tb;
  import hough_ref_pkg::*;
  localparam int N = 180, XW = 5, YW = 5, CW = 16;
  localparam int RW = ((XW > YW) ? XW : YW) + 2, BINS = 1 << RW;
  localparam int TH0 = 37, TH1 = 150;

  logic clk = 0, rst_n = 0;
  logic pix_valid = 0, sof = 0, sol = 0, pix_edge = 0, rd_en = 0;
  logic [RW-1:0] rd_addr = '0;
  logic [CW-1:0] rd0, rd1;
  int checks = 0, failures = 0;

  hough_theta_unit #(.THETA(TH0), .N_THETA(N), .XW(XW), .YW(YW), .CNT_W(CW)) u0 (
    .clk, .rst_n, .pix_valid, .sof, .sol, .pix_edge, .rd_en, .rd_addr, .rd_data(rd0));
  hough_theta_unit #(.THETA(TH1), .N_THETA(N), .XW(XW), .YW(YW), .CNT_W(CW)) u1 (
    .clk, .rst_n, .pix_valid, .sof, .sol, .pix_edge, .rd_en, .rd_addr, .rd_data(rd1));

  always #5 clk = ~clk;
  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int h0 [BINS], h1 [BINS];

  task automatic sweep(input bit check);
    for (int b = 0; b <= BINS; b++) begin
      @(negedge clk);
      if (b > 0 && check) begin
        checks += 2;
        if (rd0 != CW'(h0[b-1])) begin failures++; $display("FAIL t%0d bin %0d: %0d vs %0d", TH0, b-1, rd0, h0[b-1]); end
        if (rd1 != CW'(h1[b-1])) begin failures++; $display("FAIL t%0d bin %0d: %0d vs %0d", TH1, b-1, rd1, h1[b-1]); end
      end
      rd_en = (b < BINS); rd_addr = RW'(b);
    end
    @(negedge clk); rd_en = 0;
  endtask

  task automatic frame(input int density);
    foreach (h0[b]) begin h0[b] = 0; h1[b] = 0; end
    for (int y = 0; y < (1 << YW); y++)
      for (int x = 0; x < (1 << XW); x++) begin
        bit e;
        e = ($urandom_range(0, 99) < density) || (x == y);
        @(negedge clk);
        while ($urandom_range(0, 3) == 0) begin pix_valid = 0; @(negedge clk); end
        pix_valid = 1; sof = (x == 0 && y == 0); sol = (x == 0); pix_edge = e;
        if (e) begin h0[ref_bin(x, y, TH0, N, BINS)]++; h1[ref_bin(x, y, TH1, N, BINS)]++; end
      end
    @(negedge clk); pix_valid = 0;
    repeat (2) @(negedge clk);
    sweep(1);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    sweep(0);          // clear the memories after power-up
    frame(20);
    frame(5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
