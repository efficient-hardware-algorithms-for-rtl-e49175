// hough_max_filter_tb: self-checking test of hough_max_filter on a small
// 12-angle by 32-bin array. Random arrays with few values (so that equal
// neighbours and plateaus are common) and arrays with isolated spikes are
// streamed column by column, followed by the zero flush column; every output
// mask is compared with peaks found on the whole 2-D array in software:
// count >= threshold, non-zero, greater than the neighbours before it in
// (rho, theta) order, not smaller than those after it.
module hough_max_filter_tb;
  localparam int N = 12, RW = 5, CW = 8, NB = 1 << RW;

  logic clk = 0, rst_n = 0;
  logic [CW-1:0] threshold;
  logic col_valid = 0;
  logic [RW:0] col_rho = '0;
  logic [CW-1:0] col [N];
  logic pk_valid;
  logic [RW-1:0] pk_rho;
  logic [N-1:0] pk_mask;
  int checks = 0, failures = 0, peaks_seen = 0;

  hough_max_filter #(.N_THETA(N), .RHO_W(RW), .CNT_W(CW)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int a [NB][N];
  logic [N-1:0] expm [NB];
  int next_out;

  function automatic int get(input int r, input int t);
    return (r < 0 || r >= NB || t < 0 || t >= N) ? 0 : a[r][t];
  endfunction

  always @(posedge clk) if (rst_n && pk_valid) begin
    checks++;
    if (pk_rho != RW'(next_out) || pk_mask != expm[next_out]) begin
      failures++;
      $display("FAIL rho %0d (exp %0d): mask %b expected %b", pk_rho, next_out, pk_mask, expm[next_out]);
    end
    if (pk_mask != 0) peaks_seen++;
    next_out++;
  end

  task automatic run(input int kind, input int thr);
    threshold = CW'(thr);
    for (int r = 0; r < NB; r++)
      for (int t = 0; t < N; t++)
        a[r][t] = (kind == 0) ? $urandom_range(0, 3)
                              : (($urandom_range(0, 19) == 0) ? $urandom_range(1, 200) : 0);
    for (int r = 0; r < NB; r++)
      for (int t = 0; t < N; t++) begin
        int v;
        bit p;
        v = a[r][t];
        p = (v >= thr) && (v != 0);
        for (int dr = -1; dr <= 1; dr++)
          for (int dt = -1; dt <= 1; dt++) begin
            if (dr == 0 && dt == 0) continue;
            if (dr < 0 || (dr == 0 && dt < 0)) p &= (v > get(r + dr, t + dt));
            else                               p &= (v >= get(r + dr, t + dt));
          end
        expm[r][t] = p;
      end
    next_out = 0;
    for (int r = 0; r <= NB; r++) begin
      @(negedge clk);
      col_valid = 1; col_rho = (RW+1)'(r);
      for (int t = 0; t < N; t++) col[t] = (r < NB) ? CW'(a[r][t]) : '0;
    end
    @(negedge clk); col_valid = 0;
    repeat (3) @(negedge clk);
    checks++;
    if (next_out != NB) begin failures++; $display("FAIL %0d columns out", next_out); end
  endtask

  initial begin
    threshold = '0;
    foreach (col[t]) col[t] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 4; i++) run(0, 1 + i % 3);
    for (int i = 0; i < 4; i++) run(1, 50);
    checks++;
    if (peaks_seen == 0) begin failures++; $display("FAIL no peaks at all"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
