// sha512_padder -- SHA-512 message padding applied on the fly.
//
// The core stores only the message words. When a block is read back, this
// unit replaces everything beyond the message by the padding the algorithm
// prescribes: a single 1 bit right after the message followed by zeros, and
// the message length L in bits as a 128-bit number at the end of the last
// 1024-bit block. Because the core accepts whole 64-bit words, the 1 bit is
// always the top bit of a word (0x8000_0000_0000_0000) and L = 64 * nwords.
// The padding is computed rather than written into the buffer, which saves the
// cycles of writing it; that is this design's choice.
//
// Interface (all combinational):
//   idx       index of the 64-bit word in the padded message
//   nwords    number of message words stored (1 .. 2**IDXW - 3)
//   mem_word  buffer contents at idx (used when idx < nwords)
//   word      padded-message word at idx
//   nblocks   number of 1024-bit blocks of the padded message
module sha512_padder #(
  parameter int unsigned IDXW = 6            // index width: 2**IDXW words of buffer
) (
  input  logic [IDXW-1:0] idx,
  input  logic [IDXW:0]   nwords,
  input  logic [63:0]     mem_word,
  output logic [63:0]     word,
  output logic [IDXW-3:0] nblocks
);

  // blocks = ceil((nwords + 1 pad word + 2 length words) / 16)
  logic [IDXW:0]   nb_full;
  logic [IDXW:0]   last_idx;    // index of the low length word
  logic [IDXW+6:0] len_bits;

  always_comb begin
    nb_full  = (nwords + (IDXW+1)'(3 + 15)) >> 4;
    nblocks  = nb_full[IDXW-3:0];
    last_idx = (nb_full << 4) - (IDXW+1)'(1);
    len_bits = {nwords, 6'b0};

    if ({1'b0, idx} < nwords)           word = mem_word;
    else if ({1'b0, idx} == nwords)     word = 64'h8000_0000_0000_0000;
    else if ({1'b0, idx} == last_idx)   word = 64'(len_bits);
    else                                word = '0;   // zeros and upper length word
  end

endmodule
