// tb_sha512_padder -- for every message length the buffer can take
// (1 .. 61 words), checks every word of the padded message and the block
// count against the reference padding, with random buffer contents.
module tb_sha512_padder;
  import sha512_ref_pkg::*;
  logic [5:0]  idx;
  logic [6:0]  nwords;
  logic [63:0] mem_word, word;
  logic [3:0]  nblocks;
  int checks = 0, failures = 0;
  w64 msg[$], padded[$];
  w64 mem[64];

  sha512_padder #(.IDXW(6)) dut (.idx, .nwords, .mem_word, .word, .nblocks);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 1; n <= 61; n++) begin
      msg = {};
      for (int i = 0; i < 64; i++) mem[i] = {$urandom, $urandom};
      for (int i = 0; i < n; i++) msg.push_back(mem[i]);
      ref_pad(msg, padded);
      nwords = 7'(n);
      for (int i = 0; i < padded.size(); i++) begin
        idx = 6'(i);
        mem_word = mem[i];
        #1;
        checks++;
        if (word !== padded[i]) begin
          failures++;
          $display("FAIL n=%0d idx=%0d got %h expected %h", n, i, word, padded[i]);
        end
      end
      checks++;
      if (int'(nblocks) != padded.size() / 16) begin
        failures++;
        $display("FAIL n=%0d nblocks %0d expected %0d", n, nblocks, padded.size() / 16);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
