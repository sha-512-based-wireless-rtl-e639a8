// sha512_msg_buf -- message buffer of the SHA-512 core (one block RAM).
//
// Holds the 64-bit message words as they are loaded, so that the blocks can
// be read back for hashing after the end of the message is known. One write
// port and one read port with a registered (synchronous) read, the shape a
// block RAM infers from. DEPTH = 64 words is four 1024-bit blocks, room for the
// longest message the core accepts (56 words = 3584 bits) plus its padding.
// The reference system states a single block RAM and the 3584-bit limit; the depth and
// the port arrangement are this design's choice.
//
// Timing: a write happens at the clock edge when we is high; rdata shows
// mem[raddr] one cycle after raddr is applied. Contents are not reset.
module sha512_msg_buf #(
  parameter int unsigned DEPTH = 64,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [63:0]   wdata,
  input  logic [AW-1:0] raddr,
  output logic [63:0]   rdata
);

  logic [63:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

endmodule
