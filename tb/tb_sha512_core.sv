// tb_sha512_core -- loads messages through the Start / DataIn / Stop
// interface and checks the streamed digest.
//   * "abcdabcd" (one word, Start and Stop high together) against the digest
//     of the reference simulation, 7edbb312...7cecc8;
//   * random messages of 1, 13 (one block), 14 (padding spills into a second
//     block), 29, 45 and 56 words (four blocks, the longest message) against
//     the reference model;
//   * a 60-word input, whose words past the 56th must be dropped;
//   * DigestReady high for exactly 8 consecutive cycles, DataOut zero
//     outside them; a word is taken only every IN_DIV = 2 cycles (the tb
//     changes DataIn each cycle, with a junk word in between);
//   * latency from the Stop word to the first digest word: 1 + 243 * blocks.
module tb_sha512_core;
  import sha512_ref_pkg::*;
  logic        clk = 0, reset, Start, Stop, DigestReady;
  logic [63:0] DataIn, DataOut;
  int checks = 0, failures = 0;
  w64 hv[8];

  sha512_core dut (.clk, .reset, .Start, .DataIn, .Stop, .DataOut, .DigestReady);

  always #5 clk = ~clk;

  task automatic check(logic [63:0] got, logic [63:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // send n words (each valid on the sampling cycle), collect and compare
  task automatic hash(input w64 msg[$], input w64 exp[8], input string name);
    int n = msg.size();
    int lat = 0, nblk;
    w64 kept[$];
    for (int i = 0; i < n && i < 56; i++) kept.push_back(msg[i]);
    nblk = (kept.size() + 3 + 15) / 16;
    @(negedge clk);
    Start = 1;
    DataIn = 64'hdead_beef_dead_beef;
    @(negedge clk);
    Start = 0;
    for (int i = 0; i < n; i++) begin
      DataIn = msg[i];
      Stop = (i == n - 1);
      @(negedge clk);
      Stop = 0;
      DataIn = {$urandom, $urandom};      // not sampled: IN_DIV = 2
      if (i != n - 1) @(negedge clk);
    end
    while (!DigestReady) begin
      check(DataOut, 64'h0, {name, " DataOut idle"});
      @(negedge clk);
      lat++;
    end
    check(64'(lat), 64'(1 + 243 * nblk), {name, " latency"});
    for (int i = 0; i < 8; i++) begin
      check(64'(DigestReady), 64'd1, {name, " DigestReady"});
      check(DataOut, exp[i], $sformatf("%s H%0d", name, i));
      @(negedge clk);
    end
    check(64'(DigestReady), 64'd0, {name, " DigestReady falls"});
    check(DataOut, 64'h0, {name, " DataOut after"});
  endtask

  initial begin
    w64 m[$], kept[$];
    w64 e[8];
    int lens[7];
    lens = '{1, 13, 14, 29, 45, 56, 60};
    reset = 1; Start = 0; Stop = 0; DataIn = 0;
    repeat (3) @(negedge clk);
    reset = 0;
    repeat (3) @(negedge clk);
    check(64'(DigestReady), 64'd0, "idle after reset");

    // reference simulation: Start and Stop high, DataIn = "abcdabcd"
    @(negedge clk);
    Start = 1; Stop = 1; DataIn = 64'h6162636461626364;
    @(negedge clk);
    Start = 0;
    @(negedge clk);
    Stop = 0;
    while (!DigestReady) @(negedge clk);
    e = '{64'h7edbb31279e6b88a, 64'hc79812e2f77f5b23, 64'h4f817797c7cf9826,
          64'h3d557ecfc992f1c4, 64'h3e8b169e11e3aace, 64'hb4407da8390517ca,
          64'hc5e64f579344e15f, 64'h589be5c20e7cecc8};
    for (int i = 0; i < 8; i++) begin
      check(DataOut, e[i], $sformatf("abcdabcd H%0d", i));
      @(negedge clk);
    end
    check(64'(DigestReady), 64'd0, "abcdabcd DigestReady falls");

    foreach (e[i]) e[i] = '0;
    for (int k = 0; k < 7; k++) begin
      m = {};
      kept = {};
      for (int i = 0; i < lens[k]; i++) m.push_back({$urandom, $urandom});
      for (int i = 0; i < lens[k] && i < 56; i++) kept.push_back(m[i]);
      ref_hash(kept, hv);
      for (int i = 0; i < 8; i++) e[i] = hv[i];
      hash(m, e, $sformatf("len%0d", lens[k]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
