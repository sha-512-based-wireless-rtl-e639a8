// sha512_msg_sched -- SHA-512 message schedule W0..W79.
//
// For rounds 0..15 the schedule word is the block's own word (m_word). From
// round 16 on it is computed from the previous sixteen words:
//   W_t = sigma1(W_{t-2}) + W_{t-7} + sigma0(W_{t-15}) + W_{t-16}  (mod 2^64).
// A 16-entry shift register holds W_{t-16} .. W_{t-1}; win[0] is the oldest.
// The reference system only refers to the standard for this computation; the
// shift-register organisation is this design's choice.
//
// Interface: w_next is the schedule word of the current round, combinational
// from use_msg / m_word and the window. Pulsing shift for one cycle pushes
// w_next into the window, which moves the schedule to the next round. The
// window needs no reset: rounds 0..15 refill it completely for every block.
module sha512_msg_sched
  import sha512_pkg::*;
(
  input  logic  clk,
  input  logic  shift,     // accept w_next and advance to the next round
  input  logic  use_msg,   // round t < 16: take the block word
  input  word_t m_word,
  output word_t w_next
);

  word_t win [16];

  always_comb begin
    if (use_msg) w_next = m_word;
    else         w_next = small_sigma1(win[14]) + win[9] + small_sigma0(win[1]) + win[0];
  end

  always_ff @(posedge clk) begin
    if (shift) begin
      for (int i = 0; i < 15; i++) win[i] <= win[i+1];
      win[15] <= w_next;
    end
  end

endmodule
