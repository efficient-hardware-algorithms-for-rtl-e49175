// lzw_decompressor: LZW decompression of CODE_W-bit codes back into bytes.
//
// How it works: the module rebuilds the compressor's dictionary as it reads
// codes. For a code k it walks the chain of prefix codes from k down to a
// single character, pushing one character per clock onto a stack memory, and
// then pops the stack to send the string out first character first. The
// character reached at the end of the walk is the string's first character;
// the entry (previous code, that character) is added under the next free
// code. A code equal to the next free code (the string is not in the
// dictionary yet: the "cScSc" case) is decoded as the previous string followed
// by its own first character: the previous code is walked and the first
// character is sent once more at the end. The dictionary stops growing when
// all codes are used, in step with lzw_compressor. After the code marked
// in_last the dictionary is emptied.
//
// Timing: a code of an n-character string takes one cycle to accept, n
// cycles of walking and n cycles of output (n + 1 in the cScSc case).
// The LZW algorithm is the design's; the chain walk with a stack memory is
// this implementation's choice.
//
// Interface: valid/ready streams; in_code with in_last on the final code of a
// stream, out_data with out_last on the final byte. Synchronous reset, active
// low. The first code of a stream must be below FIRST_CODE and every code at
// most the next free code, as a compressor produces.
module lzw_decompressor
  import lzw_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  output logic              in_ready,
  input  logic [CODE_W-1:0] in_code,
  input  logic              in_last,
  output logic              out_valid,
  input  logic              out_ready,
  output logic [CHAR_W-1:0] out_data,
  output logic              out_last
);
  typedef enum logic [1:0] {S_IN, S_WALK, S_OUT, S_EXTRA} state_t;
  state_t state;

  localparam int unsigned SPW = CODE_W;   // strings are shorter than DICT_SIZE

  dict_entry_t       dict  [DICT_SIZE];
  logic [CHAR_W-1:0] stack [DICT_SIZE];
  logic [SPW-1:0]    sp;                 // stack fill level
  logic [CODE_W:0]   next_code;
  logic [CODE_W-1:0] prev_q;             // previous code
  logic              first_q;            // next code is the first of a stream
  logic [CODE_W-1:0] k_q;                // code being decoded
  logic [CODE_W-1:0] cur;                // walk pointer
  logic              kwk_q;              // cScSc case
  logic              last_q;
  logic [CHAR_W-1:0] fc_q;               // first character of the string

  logic        cur_is_char;
  dict_entry_t ent;
  logic        add_entry;
  always_comb begin
    cur_is_char = (32'(cur) < FIRST_CODE);
    ent         = dict[cur];
    add_entry   = (state == S_WALK) && cur_is_char && !first_q
                  && (next_code < (CODE_W+1)'(DICT_SIZE));
  end

  logic top_is_final;
  always_comb begin
    top_is_final = (sp == SPW'(1));
    in_ready  = (state == S_IN);
    out_valid = (state == S_OUT) || (state == S_EXTRA);
    out_data  = (state == S_EXTRA) ? fc_q : stack[sp - 1'b1];
    out_last  = last_q && ((state == S_EXTRA) || (top_is_final && !kwk_q));
  end

  always_ff @(posedge clk) begin
    if (state == S_WALK)
      stack[sp] <= cur_is_char ? cur[CHAR_W-1:0] : ent.ch;
    if (add_entry)
      dict[next_code[CODE_W-1:0]] <= '{prefix: prev_q, ch: cur[CHAR_W-1:0]};
  end

  // End of one code's output: remember it, or start over after the last code.
  task automatic finish_code();
    prev_q  <= k_q;
    first_q <= last_q;
    if (last_q) next_code <= (CODE_W+1)'(FIRST_CODE);
    state   <= S_IN;
  endtask

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= S_IN;
      sp        <= '0;
      next_code <= (CODE_W+1)'(FIRST_CODE);
      prev_q    <= '0;
      first_q   <= 1'b1;
      k_q       <= '0;
      cur       <= '0;
      kwk_q     <= 1'b0;
      last_q    <= 1'b0;
      fc_q      <= '0;
    end else begin
      unique case (state)
        S_IN: if (in_valid) begin
          k_q    <= in_code;
          last_q <= in_last;
          sp     <= '0;
          if (!first_q && (CODE_W+1)'(in_code) == next_code) begin
            cur   <= prev_q;
            kwk_q <= 1'b1;
          end else begin
            cur   <= in_code;
            kwk_q <= 1'b0;
          end
          state <= S_WALK;
        end
        S_WALK: begin
          sp <= sp + 1'b1;
          if (cur_is_char) begin
            fc_q <= cur[CHAR_W-1:0];
            if (add_entry) next_code <= next_code + 1'b1;
            state <= S_OUT;
          end else begin
            cur <= ent.prefix;
          end
        end
        S_OUT: if (out_ready) begin
          sp <= sp - 1'b1;
          if (top_is_final) begin
            if (kwk_q) state <= S_EXTRA;
            else       finish_code();
          end
        end
        S_EXTRA: if (out_ready) finish_code();
        default: state <= S_IN;
      endcase
    end
  end

  // A code may name at most the entry that is about to be created.
  assert property (@(posedge clk) disable iff (!rst_n)
    (in_valid && in_ready) |-> ((CODE_W+1)'(in_code) <= next_code));
  assert property (@(posedge clk) disable iff (!rst_n)
    (out_valid && !out_ready) |=> (out_valid && $stable(out_data)));
endmodule
