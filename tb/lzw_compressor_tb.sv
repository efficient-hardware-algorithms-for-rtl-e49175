// lzw_compressor_tb: self-checking test of lzw_compressor. Streams of several
// kinds (a single byte, long runs, a four-letter alphabet, text-like data and
// random bytes long enough to fill the 4096-entry dictionary) are sent with
// random gaps; the output, taken with random back-pressure, is compared code by
// code with a software LZW coder, including out_last on the final code only.
module lzw_compressor_tb;
  import lzw_pkg::*;
  import lzw_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, in_last = 0;
  logic [CHAR_W-1:0] in_data = '0;
  logic out_valid, out_ready = 0, out_last;
  logic [CODE_W-1:0] out_code;
  int checks = 0, failures = 0;

  lzw_compressor dut (.*);
  always #5 clk = ~clk;

  initial begin
    #3000000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  codes_t expq;
  int     got_n;
  bit     max_code_seen;

  always @(posedge clk) out_ready <= ($urandom_range(0, 3) != 0);

  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    checks++;
    if (expq.size() == 0) begin
      failures++; $display("FAIL unexpected code %0d", out_code);
    end else begin
      int unsigned e;
      e = expq.pop_front();
      if (out_code != CODE_W'(e) || out_last != (expq.size() == 0)) begin
        failures++;
        $display("FAIL code %0d: got %0d last=%0b expected %0d last=%0b",
                 got_n, out_code, out_last, e, expq.size() == 0);
      end
      if (e >= DICT_SIZE - 256) max_code_seen = 1;
    end
    got_n++;
  end

  int last_ncodes;
  task automatic send(input bytes_t d);
    codes_t c;
    c = compress(d);
    last_ncodes = c.size();
    foreach (c[i]) expq.push_back(c[i]);
    for (int i = 0; i < d.size(); i++) begin
      @(negedge clk);
      while ($urandom_range(0, 4) == 0) @(negedge clk);
      in_valid = 1; in_data = d[i]; in_last = (i == d.size() - 1);
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      @(negedge clk);
      in_valid = 0; in_last = 0;
    end
    while (expq.size() != 0) @(negedge clk);
  endtask

  initial begin
    bytes_t d;
    repeat (3) @(negedge clk);
    rst_n = 1;
    d = {8'h41}; send(d);
    d = make_data(2, 300); send(d);
    d = make_data(1, 800); send(d);
    d = make_data(3, 1500); send(d);
    d = make_data(0, 6000); send(d);   // fills the dictionary
    // every code but the last adds an entry: more codes than free entries
    // means the dictionary ran full, and codes from its top end were used
    checks++;
    if (last_ncodes <= DICT_SIZE - FIRST_CODE + 1 || !max_code_seen) begin
      failures++; $display("FAIL dictionary never filled (%0d codes)", last_ncodes);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
