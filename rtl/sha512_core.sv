// sha512_core -- SHA-512 hash core with a 64-bit word interface.
//
// After reset the core waits in IDLE until Start is high. It then loads the
// message one 64-bit word at a time from DataIn into its block-RAM buffer,
// taking a word every IN_DIV clock cycles (the first one the cycle after
// Start). The word taken while Stop is high is the last one. The core then
// pads the message, sets H to the initial hash value and compresses the
// padded message block by block. When the last block is done it puts the
// eight 64-bit words of the digest on DataOut, H0 first, one per clock cycle,
// with DigestReady high for exactly those eight cycles. DataOut is zero
// outside that window. Then it returns to IDLE.
//
// What follows the reference system: the ports (clk, reset, Start, DataIn[63:0],
// Stop, DataOut[63:0], DigestReady), idle until Start, word loading at half
// the compute clock (78.5 vs 157 MHz, hence IN_DIV = 2), the Stop command
// ending the message, one block RAM, a 3584-bit (56-word) maximum message,
// DigestReady lasting eight 64-bit words. This design's choices: one clock
// with a load strobe instead of two clocks, the word taken with Stop being
// part of the message, words past MAX_WORDS being dropped, active-high
// synchronous reset, padding generated on read, and a three-cycle round.
//
// Latency: DigestReady rises 1 + 243 * nblocks clock cycles after the cycle
// in which the last word is taken: per block 242 cycles of compression (see
// sha512_compress) and one of hand-over. One block: 244 cycles, 1.55 us at
// 157 MHz; the longest message (4 blocks): 973 cycles.
module sha512_core
  import sha512_pkg::*;
#(
  parameter int unsigned IN_DIV    = 2,   // clk cycles per loaded word
  parameter int unsigned MAX_WORDS = 56,  // longest message: 56 x 64 = 3584 bits
  parameter int unsigned BUF_WORDS = 64   // buffer depth, 4 blocks
) (
  input  logic        clk,
  input  logic        reset,
  input  logic        Start,
  input  logic [63:0] DataIn,
  input  logic        Stop,
  output logic [63:0] DataOut,
  output logic        DigestReady
);

  localparam int unsigned AW = $clog2(BUF_WORDS);
  localparam int unsigned DW = (IN_DIV > 1) ? $clog2(IN_DIV) : 1;

  typedef enum logic [2:0] {C_IDLE, C_LOAD, C_INIT, C_BLOCK, C_NEXT, C_OUT} core_e;
  core_e st;

  logic [DW-1:0]   div;
  logic [AW:0]     nwords;
  logic [AW-5:0]   blk;          // current block
  logic [AW-3:0]   nblocks;
  logic [2:0]      oidx;
  state_t          H;

  // buffer
  logic            buf_we;
  logic [AW-1:0]   raddr, raddr_q;
  word_t           rdata, padded;

  // compression / schedule
  logic            c_start, w_req, w_take, c_done;
  logic [6:0]      w_idx, t;
  word_t           w_t;
  state_t          c_sum;

  logic sample;
  assign sample = (st == C_LOAD) && (div == '0);
  assign buf_we = sample && (nwords < (AW+1)'(MAX_WORDS));

  sha512_msg_buf #(.DEPTH(BUF_WORDS)) u_buf (
    .clk, .we(buf_we), .waddr(nwords[AW-1:0]), .wdata(DataIn),
    .raddr, .rdata
  );

  // a new read is issued when the compressor asks; otherwise the address is held
  assign raddr = w_req ? {blk, w_idx[3:0]} : raddr_q;

  sha512_padder #(.IDXW(AW)) u_pad (
    .idx(raddr_q), .nwords, .mem_word(rdata), .word(padded), .nblocks
  );

  sha512_msg_sched u_sched (
    .clk, .shift(w_take), .use_msg(t < 7'd16), .m_word(padded), .w_next(w_t)
  );

  sha512_compress u_comp (
    .clk, .reset, .start(c_start), .h_in(H),
    .w_req, .w_idx, .w_take, .t, .w_t,
    .busy(), .done(c_done), .sum(c_sum)
  );

  assign c_start = (st == C_INIT) || (st == C_NEXT);

  always_ff @(posedge clk) begin
    if (reset) begin
      st          <= C_IDLE;
      div         <= '0;
      nwords      <= '0;
      blk         <= '0;
      oidx        <= '0;
      H           <= IV;
      raddr_q     <= '0;
      DataOut     <= '0;
      DigestReady <= 1'b0;
    end else begin
      raddr_q     <= raddr;
      DataOut     <= '0;
      DigestReady <= 1'b0;
      unique case (st)
        C_IDLE: begin
          if (Start) begin
            div    <= '0;
            nwords <= '0;
            st     <= C_LOAD;
          end
        end
        C_LOAD: begin
          div <= (div == DW'(IN_DIV - 1)) ? '0 : div + DW'(1);
          if (sample) begin
            if (buf_we) nwords <= nwords + (AW+1)'(1);
            if (Stop) begin
              H   <= IV;         // ready for the compressor's start in C_INIT
              blk <= '0;
              st  <= C_INIT;
            end
          end
        end
        C_INIT: st <= C_BLOCK;   // compressor starts on block 0 this cycle
        C_BLOCK: if (c_done) begin
          H <= c_sum;
          if ((AW-2)'(blk) + (AW-2)'(1) == nblocks) begin
            oidx <= '0;
            st   <= C_OUT;
          end else begin
            blk <= blk + 1'b1;
            st  <= C_NEXT;
          end
        end
        C_NEXT: st <= C_BLOCK;   // compressor starts on the next block
        C_OUT: begin
          DataOut     <= H[oidx];
          DigestReady <= 1'b1;
          oidx        <= oidx + 3'd1;
          if (oidx == 3'd7) st <= C_IDLE;
        end
        default: st <= C_IDLE;
      endcase
    end
  end

endmodule
