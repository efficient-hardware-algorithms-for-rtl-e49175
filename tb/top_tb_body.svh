// Body of the end-to-end testbench of fpga_algorithms_top. The
// including module declares the sizes (localparams) and instantiates the
// top as `dut` on the signals declared here.
//
// What it runs, all at once on one clock:
//  * GCD: every core of the array gets an operand pair with a planted common
//    factor; a load to a busy core is tried and must be refused; all results
//    are read back and checked against a binary GCD.
//  * LZW: each compressor gets its own stream; its codes are checked against
//    a software LZW coder, and the codes of compressor i are fed to
//    decompressor i (decompressors beyond the compressors get reference
//    codes), whose bytes must equal the original stream. Output back-pressure
//    is random.
//  * Hough: one frame with planted lines; the horizontal line y = 5 must be
//    reported as a peak at theta = 90 degrees.
// Mechanisms counted, each must occur: refused GCD load, LZW dictionary hit
// (match extended), LZW miss (code emitted), cScSc decode, output stall,
// Hough peak, Hough frame end.
  import lzw_pkg::*;
  import lzw_ref_pkg::*;
  localparam int GIW = (N_GCD > 1) ? $clog2(N_GCD) : 1;
  localparam int RW = ((XW > YW) ? XW : YW) + 2, NB = 1 << RW;

  logic clk = 0, rst_n = 0;
  logic gcd_ld_valid = 0, gcd_ld_accept, gcd_rd_done;
  logic [GIW-1:0] gcd_ld_core = '0, gcd_rd_core = '0;
  logic [GCD_W-1:0] gcd_ld_x = '0, gcd_ld_y = '0, gcd_rd_result;
  logic [N_GCD-1:0] gcd_busy, gcd_done;
  logic [31:0] gcd_rd_cycles;
  logic [N_LZWC-1:0] lzc_in_valid = '0, lzc_in_ready, lzc_in_last = '0;
  logic [N_LZWC-1:0] lzc_out_valid, lzc_out_ready, lzc_out_last;
  logic [CHAR_W-1:0] lzc_in_data [N_LZWC];
  logic [CODE_W-1:0] lzc_out_code [N_LZWC];
  logic [N_LZWD-1:0] lzd_in_valid, lzd_in_ready, lzd_in_last;
  logic [N_LZWD-1:0] lzd_out_valid, lzd_out_ready, lzd_out_last;
  logic [CODE_W-1:0] lzd_in_code [N_LZWD];
  logic [CHAR_W-1:0] lzd_out_data [N_LZWD];
  logic [15:0] hough_threshold = 16'd8;
  logic hough_pix_valid = 0, hough_pix_ready, hough_pix_edge = 0;
  logic hough_peak_valid, hough_frame_done;
  logic [RW-1:0] hough_peak_rho;
  logic [N_THETA-1:0] hough_peak_mask;

  int checks = 0, failures = 0;
  int n_refused = 0, n_hit = 0, n_miss = 0, n_kwk = 0, n_stall = 0, n_peak = 0, n_frame = 0;

  always #5 clk = ~clk;
  initial begin
    #(WATCHDOG_NS);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [GCD_W-1:0] stein(input logic [GCD_W-1:0] a, input logic [GCD_W-1:0] b);
    int k = 0;
    if (a == 0) return b;
    if (b == 0) return a;
    while (((a | b) & 1) == 0) begin a >>= 1; b >>= 1; k++; end
    while ((a & 1) == 0) a >>= 1;
    while (b != 0) begin
      while ((b & 1) == 0) b >>= 1;
      if (a > b) begin logic [GCD_W-1:0] t = a; a = b; b = t; end
      b = b - a;
    end
    return a << k;
  endfunction

  function automatic logic [GCD_W-1:0] rnd(input int bits);
    logic [GCD_W-1:0] v = '0;
    for (int i = 0; i < GCD_W / 32; i++) v[i*32 +: 32] = $urandom;
    return (bits >= GCD_W) ? v : (v & ((GCD_W'(1) << bits) - 1));
  endfunction

  // ---------------- GCD ----------------
  bit gcd_ok = 0;
  initial begin : gcd_test
    logic [GCD_W-1:0] expg [N_GCD];
    wait (rst_n);
    for (int i = 0; i < N_GCD; i++) begin
      logic [GCD_W-1:0] g, a, b;
      g = rnd(GCD_W / 8) | 1; a = rnd(GCD_W - GCD_W / 8 - 2); b = rnd(GCD_W - GCD_W / 8 - 2);
      @(negedge clk);
      gcd_ld_valid = 1; gcd_ld_core = GIW'(i); gcd_ld_x = g * a; gcd_ld_y = g * b;
      expg[i] = stein(g * a, g * b);
    end
    @(negedge clk);
    gcd_ld_core = '0;
    #1 if (!gcd_ld_accept) n_refused++;
    @(negedge clk);
    gcd_ld_valid = 0;
    wait (gcd_done == '1);
    for (int i = 0; i < N_GCD; i++) begin
      @(negedge clk);
      gcd_rd_core = GIW'(i);
      #1;
      checks++;
      if (!gcd_rd_done || gcd_rd_result != expg[i]) begin
        failures++; $display("FAIL gcd core %0d", i);
      end
    end
    gcd_ok = 1;
  end

  // ---------------- LZW ----------------
  bytes_t stream [N_LZWD];
  codes_t ccodes [N_LZWD];
  int c_idx [N_LZWC];
  int d_in_idx [N_LZWD];
  int d_out_idx [N_LZWD];
  int lzw_streams_done = 0;
  codes_t fifo [N_LZWD];   // codes waiting for decompressor i

  initial foreach (stream[i]) begin
    stream[i] = make_data(i % 4, LZW_BYTES + 7 * i);
    ccodes[i] = compress(stream[i]);
    c_idx[i % N_LZWC] = 0;
    d_in_idx[i] = 0;
    d_out_idx[i] = 0;
    if (i >= N_LZWC) fifo[i] = ccodes[i];
  end

  always @(posedge clk) begin
    lzc_out_ready <= N_LZWC'($urandom);
    lzd_out_ready <= N_LZWD'($urandom);
  end

  for (genvar i = 0; i < N_LZWC; i++) begin : g_feed_c
    initial begin
      wait (rst_n);
      for (int k = 0; k < stream[i].size(); k++) begin
        @(negedge clk);
        lzc_in_valid[i] = 1; lzc_in_data[i] = stream[i][k]; lzc_in_last[i] = (k == stream[i].size() - 1);
        @(posedge clk);
        while (!lzc_in_ready[i]) @(posedge clk);
      end
      @(negedge clk);
      lzc_in_valid[i] = 0;
    end
  end

  always @(posedge clk) if (rst_n) begin
    for (int i = 0; i < N_LZWC; i++) begin
      if (lzc_out_valid[i] && !lzc_out_ready[i]) n_stall++;
      if (lzc_out_valid[i] && lzc_out_ready[i]) begin
        checks++;
        if (c_idx[i] >= ccodes[i].size() || 32'(lzc_out_code[i]) != ccodes[i][c_idx[i]]
            || lzc_out_last[i] != (c_idx[i] == ccodes[i].size() - 1)) begin
          failures++; $display("FAIL compressor %0d code %0d", i, c_idx[i]);
        end
        n_miss++;
        fifo[i].push_back(32'(lzc_out_code[i]));
        c_idx[i]++;
        // every byte not ending a code extended a match: a dictionary hit
        if (lzc_out_last[i]) n_hit += stream[i].size() - c_idx[i];
      end
    end
    for (int i = 0; i < N_LZWD; i++) begin
      if (lzd_in_valid[i] && lzd_in_ready[i]) begin
        // code j > 0 naming the entry the decoder is about to create
        if (d_in_idx[i] > 0 && d_in_idx[i] - 1 < int'(DICT_SIZE - FIRST_CODE)
            && 32'(lzd_in_code[i]) == FIRST_CODE + d_in_idx[i] - 1) n_kwk++;
        void'(fifo[i].pop_front());
        d_in_idx[i]++;
      end
      if (lzd_out_valid[i] && !lzd_out_ready[i]) n_stall++;
      if (lzd_out_valid[i] && lzd_out_ready[i]) begin
        checks++;
        if (d_out_idx[i] >= stream[i].size() || lzd_out_data[i] != stream[i][d_out_idx[i]]
            || lzd_out_last[i] != (d_out_idx[i] == stream[i].size() - 1)) begin
          failures++; $display("FAIL decompressor %0d byte %0d", i, d_out_idx[i]);
        end
        d_out_idx[i]++;
        if (d_out_idx[i] == stream[i].size()) lzw_streams_done++;
      end
    end
  end

  always_comb
    for (int i = 0; i < N_LZWD; i++) begin
      lzd_in_valid[i] = rst_n && (fifo[i].size() != 0);
      lzd_in_code[i]  = (fifo[i].size() != 0) ? CODE_W'(fifo[i][0]) : '0;
      lzd_in_last[i]  = (fifo[i].size() != 0) && (d_in_idx[i] == ccodes[i].size() - 1);
    end

  // ---------------- Hough ----------------
  bit hough_ok = 0, planted = 0;
  always @(posedge clk) if (rst_n) begin
    if (hough_peak_valid) begin
      n_peak++;
      if (hough_peak_rho == RW'(5 + NB / 2) && hough_peak_mask[N_THETA / 2]) planted = 1;
    end
    if (hough_frame_done) n_frame++;
  end

  initial begin : hough_test
    wait (rst_n);
    for (int y = 0; y < (1 << YW); y++)
      for (int x = 0; x < (1 << XW); x++) begin
        @(negedge clk);
        hough_pix_valid = 1;
        hough_pix_edge = (y == 5) || (x == y) || ($urandom_range(0, 99) == 0);
        while (!hough_pix_ready) @(negedge clk);
      end
    @(negedge clk);
    hough_pix_valid = 0;
    wait (n_frame == 1);
    checks++;
    if (!planted) begin failures++; $display("FAIL planted line not detected"); end
    hough_ok = 1;
  end

  initial begin
    foreach (lzc_in_data[i]) lzc_in_data[i] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (gcd_ok && hough_ok && lzw_streams_done == N_LZWD);
    repeat (5) @(negedge clk);
    $display("mechanisms: refused_load=%0d dict_hit=%0d code_out=%0d cScSc=%0d stall=%0d peak=%0d frame=%0d",
             n_refused, n_hit, n_miss, n_kwk, n_stall, n_peak, n_frame);
    checks += 7;
    if (n_refused == 0) begin failures++; $display("FAIL no refused load"); end
    if (n_hit == 0)     begin failures++; $display("FAIL no dictionary hit"); end
    if (n_miss == 0)    begin failures++; $display("FAIL no code emitted"); end
    if (n_kwk == 0)     begin failures++; $display("FAIL no cScSc decode"); end
    if (n_stall == 0)   begin failures++; $display("FAIL no output stall"); end
    if (n_peak == 0)    begin failures++; $display("FAIL no Hough peak"); end
    if (n_frame == 0)   begin failures++; $display("FAIL no Hough frame end"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
