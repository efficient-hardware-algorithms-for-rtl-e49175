// gcd_core_tb: self-checking test of gcd_core at its default width.
// Drives random operand pairs, pairs with a planted common factor, and the
// corner cases (zero operands, equal operands, X < Y), and compares each
// result with a binary (Stein) GCD computed in the testbench, which shares no
// arithmetic with the core's division-based method. Also checks that a run
// takes no more than 3*W + 64 cycles (about W cycles of quotient bits plus two per Euclidean step).
module gcd_core_tb;
  localparam int unsigned W = 1024;
  logic clk = 0, rst_n = 0, start = 0;
  logic [W-1:0] x_in, y_in, result;
  logic busy, done;
  logic [31:0] cycles;
  int checks = 0, failures = 0;

  gcd_core #(.W(W)) dut (.*);
  always #5 clk = ~clk;

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
    if (bits < W) v &= (({{(W-1){1'b0}}, 1'b1} << bits) - 1);
    return v;
  endfunction

  task automatic run(input logic [W-1:0] a, input logic [W-1:0] b);
    logic [W-1:0] exp;
    exp = stein(a, b);
    @(negedge clk); x_in = a; y_in = b; start = 1;
    @(negedge clk); start = 0;
    wait (done);
    @(negedge clk);
    checks++;
    if (result !== exp) begin
      failures++;
      $display("FAIL gcd: got %h expected %h", result, exp);
    end
    checks++;
    if (cycles == 0 || cycles > 3 * W + 64) begin
      failures++;
      $display("FAIL cycles=%0d", cycles);
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    x_in = '0; y_in = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(48, 18);
    run(18, 48);
    run(0, 0);
    run(12345, 0);
    run(0, 777);
    run(97, 97);
    run(1, rnd(W));
    for (int i = 0; i < 12; i++) run(rnd(W), rnd(W));
    for (int i = 0; i < 12; i++) begin
      logic [W-1:0] g, a, b;
      g = rnd(128) | 1; a = rnd(W - 130); b = rnd(W - 130);
      run(g * a, g * b);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
