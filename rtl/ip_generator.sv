// ip_generator -- source of the cell's identification code for hashing.
//
// Presents the node's identification code (ID_WORDS 64-bit words, word 0
// first) on IP and raises ENDFlag together with the last word, so that the
// SHA-512 core, which takes a word every STEP cycles and treats the word seen
// with its Stop input high as the last, loads exactly the code. A synchronous
// active-high reset restarts the sequence at word 0; STEP cycles later the
// next word appears, and the last word is then held with ENDFlag high until
// the next reset. In the node the reset is also pulsed with every SHA-512
// start, which keeps the words in step with the core's loading.
//
// The block, its clk/reset inputs and its IP[63:0]/ENDFlag outputs are those
// of the system diagram; the default code is the 64-bit word 0x6162636461626364
// ("abcdabcd") of the reference simulation. The word sequencing is this
// design's choice: the reference system does not describe its insides.
module ip_generator #(
  parameter int unsigned               ID_WORDS = 1,
  parameter logic [ID_WORDS*64-1:0]    ID_VALUE = 64'h6162636461626364, // word 0 in the low bits
  parameter int unsigned               STEP     = 2
) (
  input  logic        clk,
  input  logic        reset,
  output logic [63:0] IP,
  output logic        ENDFlag
);

  localparam int unsigned IW = (ID_WORDS > 1) ? $clog2(ID_WORDS) : 1;
  localparam int unsigned SW = (STEP > 1) ? $clog2(STEP) : 1;

  logic [IW-1:0] idx;
  logic [SW-1:0] cnt;
  logic          last;

  assign last = (idx == IW'(ID_WORDS - 1));

  always_ff @(posedge clk) begin
    if (reset) begin
      idx <= '0;
      cnt <= '0;
    end else if (!last) begin
      if (cnt == SW'(STEP - 1)) begin
        cnt <= '0;
        idx <= idx + IW'(1);
      end else begin
        cnt <= cnt + SW'(1);
      end
    end
  end

  assign IP      = ID_VALUE[idx*64 +: 64];
  assign ENDFlag = last;

endmodule
