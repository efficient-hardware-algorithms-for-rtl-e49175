// lzw_compressor: LZW compression of a byte stream into CODE_W-bit codes.
//
// How it works: the module keeps the code w of the longest string matched so
// far. For each new character c it looks for the entry (w, c) in its
// dictionary memory. On a hit, w becomes that entry's code and the next
// character is taken. On a miss, w is sent out, (w, c) is stored under the
// next free code, and w restarts as the single character c. At the end of the
// input the remaining w is sent out with out_last, and the dictionary is
// emptied for the next stream. When all codes are in use no further entries
// are added and the codes in use stay valid (static dictionary from then on).
//
// The dictionary is one memory of DICT_SIZE entries (prefix, character)
// written once per miss. It is searched by reading entries FIRST_CODE ..
// next_code-1 one per clock, so a character costs one cycle when the
// dictionary is empty and up to (next_code - FIRST_CODE) cycles otherwise.
// The LZW algorithm is the design's; the sequential search of a single
// dictionary memory is this implementation's choice.
//
// Interface: valid/ready streams. in_data with in_last on the final byte of a
// stream; out_code with out_last on the final code. Synchronous reset, active
// low. Streams of one byte are allowed.
module lzw_compressor
  import lzw_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  output logic              in_ready,
  input  logic [CHAR_W-1:0] in_data,
  input  logic              in_last,
  output logic              out_valid,
  input  logic              out_ready,
  output logic [CODE_W-1:0] out_code,
  output logic              out_last
);
  typedef enum logic [2:0] {S_FIRST, S_NEXT, S_SEARCH, S_EMIT, S_FLUSH} state_t;
  state_t state;

  dict_entry_t       dict [DICT_SIZE];
  logic [CODE_W:0]   next_code;          // one bit wider: DICT_SIZE means full
  logic [CODE_W-1:0] w_q;                // code of the current match
  logic [CHAR_W-1:0] c_q;                // character being appended
  logic              last_q;             // c_q was the last input byte
  logic [CODE_W-1:0] idx;                // search pointer

  dict_entry_t probe;
  logic        hit;
  always_comb begin
    probe = dict[idx];
    hit   = (probe.prefix == w_q) && (probe.ch == c_q);
  end

  always_comb begin
    in_ready  = (state == S_FIRST) || (state == S_NEXT);
    out_valid = (state == S_EMIT) || (state == S_FLUSH);
    out_code  = w_q;
    out_last  = (state == S_FLUSH);
  end

  always_ff @(posedge clk) begin
    if (state == S_EMIT && out_ready && next_code < (CODE_W+1)'(DICT_SIZE))
      dict[next_code[CODE_W-1:0]] <= '{prefix: w_q, ch: c_q};
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= S_FIRST;
      next_code <= (CODE_W+1)'(FIRST_CODE);
      w_q       <= '0;
      c_q       <= '0;
      last_q    <= 1'b0;
      idx       <= '0;
    end else begin
      unique case (state)
        S_FIRST: if (in_valid) begin
          w_q   <= CODE_W'(in_data);
          state <= in_last ? S_FLUSH : S_NEXT;
        end
        S_NEXT: if (in_valid) begin
          c_q    <= in_data;
          last_q <= in_last;
          idx    <= CODE_W'(FIRST_CODE);
          state  <= (next_code == (CODE_W+1)'(FIRST_CODE)) ? S_EMIT : S_SEARCH;
        end
        S_SEARCH: begin
          if (hit) begin
            w_q   <= idx;
            state <= last_q ? S_FLUSH : S_NEXT;
          end else if ((CODE_W+1)'(idx) == next_code - 1'b1) begin
            state <= S_EMIT;
          end else begin
            idx <= idx + 1'b1;
          end
        end
        S_EMIT: if (out_ready) begin
          if (next_code < (CODE_W+1)'(DICT_SIZE)) next_code <= next_code + 1'b1;
          w_q   <= CODE_W'(c_q);
          state <= last_q ? S_FLUSH : S_NEXT;
        end
        S_FLUSH: if (out_ready) begin
          next_code <= (CODE_W+1)'(FIRST_CODE);
          state     <= S_FIRST;
        end
        default: state <= S_FIRST;
      endcase
    end
  end

  // Output must hold steady while it waits for the consumer.
  assert property (@(posedge clk) disable iff (!rst_n)
    (out_valid && !out_ready) |=> (out_valid && $stable(out_code) && $stable(out_last)));
endmodule
