// gcd_array_tb: self-checking test of gcd_array with 8 cores of 256 bits.
// All cores are loaded on consecutive cycles with operand pairs that share a
// planted factor and run at the same time; a load to a busy core must be
// refused and must not disturb it. Every result is then read through the
// read-out port and compared with a binary GCD computed in the testbench.
module gcd_array_tb;
  localparam int N = 8, W = 256, IW = $clog2(N);
  logic clk = 0, rst_n = 0;
  logic ld_valid = 0, ld_accept;
  logic [IW-1:0] ld_core = '0, rd_core = '0;
  logic [W-1:0] ld_x = '0, ld_y = '0, rd_result;
  logic [N-1:0] busy_mask, done_mask;
  logic rd_done;
  logic [31:0] rd_cycles;
  int checks = 0, failures = 0;

  gcd_array #(.N_CORES(N), .W(W)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0] stein(input logic [W-1:0] a, input logic [W-1:0] b);
    int k = 0;
    if (a == 0) return b;
    if (b == 0) return a;
    while (((a | b) & 1) == 0) begin a >>= 1; b >>= 1; k++; end
    while ((a & 1) == 0) a >>= 1;
    while (b != 0) begin
      while ((b & 1) == 0) b >>= 1;
      if (a > b) begin logic [W-1:0] t = a; a = b; b = t; end
      b = b - a;
    end
    return a << k;
  endfunction

  function automatic logic [W-1:0] rnd(input int bits);
    logic [W-1:0] v = '0;
    for (int i = 0; i < W / 32; i++) v[i*32 +: 32] = $urandom;
    return v & ((W'(1) << bits) - 1);
  endfunction

  logic [W-1:0] exp_g [N];

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int round = 0; round < 2; round++) begin
      for (int i = 0; i < N; i++) begin
        logic [W-1:0] g, a, b;
        g = rnd(40) | 1; a = rnd(200); b = rnd(200);
        @(negedge clk);
        ld_valid = 1; ld_core = IW'(i); ld_x = g * a; ld_y = g * b;
        exp_g[i] = stein(g * a, g * b);
        #1;
        checks++;
        if (!ld_accept) begin failures++; $display("FAIL idle core %0d refused", i); end
      end
      // a second load to core 0 while it is busy: refused, ignored
      @(negedge clk);
      ld_core = '0; ld_x = 12; ld_y = 8;
      #1;
      checks++;
      if (ld_accept || !busy_mask[0]) begin failures++; $display("FAIL busy core accepted a load"); end
      @(negedge clk);
      ld_valid = 0;
      checks++;
      if (busy_mask != '1) begin failures++; $display("FAIL not all cores busy: %b", busy_mask); end
      wait (done_mask == '1);
      for (int i = 0; i < N; i++) begin
        @(negedge clk);
        rd_core = IW'(i);
        #1;
        checks++;
        if (!rd_done || rd_result != exp_g[i] || rd_cycles == 0) begin
          failures++; $display("FAIL core %0d: %h expected %h", i, rd_result, exp_g[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
