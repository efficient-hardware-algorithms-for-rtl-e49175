// lzw_decompressor_tb: self-checking test of lzw_decompressor. Test streams
// (a single byte, long runs that produce the cScSc case, a four-letter
// alphabet, text-like data and random bytes that fill the dictionary) are
// coded by a software LZW coder; the codes are sent with random gaps and the
// decoded bytes, taken with random back-pressure, must equal the original
// stream byte for byte, with out_last on the final byte only. Also checks that
// a stream decodes in at most 3 cycles per byte plus 2 per code when the
// output is never held back.
module lzw_decompressor_tb;
  import lzw_pkg::*;
  import lzw_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, in_last = 0;
  logic [CODE_W-1:0] in_code = '0;
  logic out_valid, out_ready = 0, out_last;
  logic [CHAR_W-1:0] out_data;
  int checks = 0, failures = 0;
  bit stall_out = 1;
  int kwk_seen = 0;

  lzw_decompressor dut (.*);
  always #5 clk = ~clk;

  initial begin
    #3000000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bytes_t expq;
  always @(posedge clk) out_ready <= stall_out ? ($urandom_range(0, 3) != 0) : 1'b1;

  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    checks++;
    if (expq.size() == 0) begin
      failures++; $display("FAIL unexpected byte %0d", out_data);
    end else begin
      byte unsigned e;
      e = expq.pop_front();
      if (out_data != e || out_last != (expq.size() == 0)) begin
        failures++;
        $display("FAIL byte: got %0d last=%0b expected %0d last=%0b", out_data, out_last, e, expq.size() == 0);
      end
    end
  end

  // count codes that name the entry not yet in the dictionary
  always @(posedge clk) if (rst_n && in_valid && in_ready && !dut.first_q
                            && (CODE_W+1)'(in_code) == dut.next_code) kwk_seen++;

  task automatic send(input bytes_t d, input bit gaps);
    codes_t c;
    c = compress(d);
    foreach (d[i]) expq.push_back(d[i]);
    for (int i = 0; i < c.size(); i++) begin
      @(negedge clk);
      while (gaps && $urandom_range(0, 4) == 0) @(negedge clk);
      in_valid = 1; in_code = CODE_W'(c[i]); in_last = (i == c.size() - 1);
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      @(negedge clk);
      in_valid = 0; in_last = 0;
    end
    while (expq.size() != 0) @(negedge clk);
  endtask

  initial begin
    bytes_t d;
    longint t0, t1;
    int ncodes;
    repeat (3) @(negedge clk);
    rst_n = 1;
    d = {8'h41}; send(d, 1);
    d = make_data(2, 300); send(d, 1);
    d = make_data(1, 800); send(d, 1);
    d = make_data(3, 1500); send(d, 1);
    d = make_data(0, 6000); send(d, 1);
    // throughput with no gaps and no back-pressure
    stall_out = 0;
    repeat (2) @(negedge clk);
    d = make_data(3, 2000);
    ncodes = compress(d).size();
    t0 = $time;
    send(d, 0);
    t1 = $time;
    checks++;
    if ((t1 - t0) / 10 > 3 * d.size() + 2 * ncodes) begin
      failures++; $display("FAIL too slow: %0d cycles for %0d bytes", (t1 - t0) / 10, d.size());
    end
    checks++;
    if (kwk_seen == 0) begin failures++; $display("FAIL cScSc case never occurred"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
