// gcd_core: greatest common divisor of two W-bit unsigned integers by the
// Euclidean algorithm.
//
// How it works: the core holds the pair (X, Y) and repeats
// (X, Y) <- (Y, X mod Y) until Y is zero; X is then the GCD. The remainder
// X mod Y is found by aligned shift-and-subtract division: Y is shifted left
// until its top set bit lines up with that of X, then one quotient bit is
// resolved per clock (subtract if the partial remainder is not smaller,
// shift the divisor right). A remainder step therefore costs
// (msb(X) - msb(Y) + 1) cycles, and a whole GCD of random W-bit operands costs
// about W cycles plus one cycle per Euclidean step.
//
// The Euclidean iteration itself is the one the design is built on; the
// bit-serial remainder datapath, the operand width and the handshake are this
// implementation's own choices.
//
// Interface: pulse `start` for one cycle while `busy` is low, with the
// operands on x_in / y_in. `busy` goes high the next cycle. When the result is
// ready `done` rises with `result` valid and both hold until the next start.
// gcd(0, 0) = 0 and gcd(a, 0) = a. `cycles` counts the clocks of the last run.
module gcd_core #(
  parameter int unsigned W = 1024
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic [W-1:0]         x_in,
  input  logic [W-1:0]         y_in,
  output logic                 busy,
  output logic                 done,
  output logic [W-1:0]         result,
  output logic [31:0]          cycles
);
  localparam int unsigned LW = $clog2(W + 1);

  typedef enum logic [1:0] {S_IDLE, S_CHECK, S_DIV} state_t;
  state_t state;

  logic [W-1:0]  x_q, y_q;      // Euclidean pair
  logic [W-1:0]  rem_q;         // partial remainder of x_q / y_q
  logic [W-1:0]  div_q;         // shifted divisor
  logic [LW-1:0] cnt_q;         // quotient bits left to resolve - 1

  // Position of the most significant set bit plus one (0 for a zero word).
  function automatic logic [LW-1:0] bitlen(input logic [W-1:0] v);
    logic [LW-1:0] n;
    n = '0;
    for (int unsigned i = 0; i < W; i++)
      if (v[i]) n = LW'(i + 1);
    return n;
  endfunction

  logic [LW-1:0] len_x, len_y, shift;
  always_comb begin
    len_x = bitlen(x_q);
    len_y = bitlen(y_q);
    shift = (len_x > len_y) ? LW'(len_x - len_y) : '0;
  end

  logic          ge;
  logic [W-1:0]  rem_next;
  always_comb begin
    ge       = (rem_q >= div_q);
    rem_next = ge ? (rem_q - div_q) : rem_q;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      x_q    <= '0;
      y_q    <= '0;
      rem_q  <= '0;
      div_q  <= '0;
      cnt_q  <= '0;
      done   <= 1'b0;
      result <= '0;
      cycles <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          x_q    <= x_in;
          y_q    <= y_in;
          done   <= 1'b0;
          cycles <= '0;
          state  <= S_CHECK;
        end
        S_CHECK: begin
          cycles <= cycles + 1;
          if (y_q == '0) begin
            result <= x_q;
            done   <= 1'b1;
            state  <= S_IDLE;
          end else begin
            rem_q <= x_q;
            div_q <= y_q << shift;
            cnt_q <= shift;
            state <= S_DIV;
          end
        end
        S_DIV: begin
          cycles <= cycles + 1;
          rem_q  <= rem_next;
          div_q  <= div_q >> 1;
          cnt_q  <= cnt_q - 1'b1;
          if (cnt_q == '0) begin
            // rem_next is X mod Y: move to (Y, X mod Y)
            x_q   <= y_q;
            y_q   <= rem_next;
            state <= S_CHECK;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

  // The remainder is always smaller than the divisor once a step ends.
  assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_DIV && cnt_q == '0) |-> (rem_next < y_q));
endmodule
