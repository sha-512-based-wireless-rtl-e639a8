// tb_sha512_compress -- compresses the one-block message "abcdabcd" from the
// initial hash value and several random blocks from random hash values, and
// checks the result against the reference compression. Also checks:
//   * 242 cycles from start to done (1 fetch, 80 rounds x 3, 1 done cycle);
//   * every schedule word is requested (w_req/w_idx) one cycle before the
//     round takes it, in order 0..79;
//   * for "abcdabcd", the final internal registers printed in the reference
//     simulation: a, T1, T2, Kt, Cx..Cz (= f, g, h) and Mx, My (= b, c).
module tb_sha512_compress;
  import sha512_ref_pkg::*;
  import sha512_pkg::state_t;
  logic       clk = 0, reset, start;
  state_t     h_in, sum;
  logic       w_req, w_take, busy, done;
  logic [6:0] w_idx, t;
  w64         w_t;
  w64         wref[80], blk[16], hv[8];
  int checks = 0, failures = 0;
  int expect_idx;

  sha512_compress dut (.clk, .reset, .start, .h_in, .w_req, .w_idx, .w_take, .t, .w_t,
                       .busy, .done, .sum);

  always #5 clk = ~clk;
  assign w_t = (t < 80) ? wref[t] : '0;

  task automatic check(logic [63:0] got, logic [63:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // request / take order
  always @(posedge clk) if (!reset) begin
    if (w_take) begin
      check(64'(t), 64'(expect_idx), "round taking a word");
    end
    if (w_req) expect_idx = int'(w_idx);
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_block(bit fig3);
    int cycles = 0;
    ref_schedule(blk, wref);
    for (int i = 0; i < 8; i++) h_in[i] = hv[i];
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    cycles = 1;
    while (!done) begin
      @(negedge clk);
      cycles++;
    end
    check(64'(cycles), 64'd242, "cycles start to done");
    ref_compress(blk, hv);
    for (int i = 0; i < 8; i++) check(sum[i], hv[i], $sformatf("H%0d", i));
    if (fig3) begin
      check(dut.a,  64'h14d1ccaa8629ef82, "a");
      check(dut.T1, 64'h2fbdcd780be2f77f, "T1");
      check(dut.T2, 64'he513ff327a46f803, "T2");
      check(dut.Kt, 64'h6c44198c4a475817, "Kt");
      check(dut.Cx, 64'h193b151c0dc6abab, "Cx");
      check(dut.Cy, 64'ha66275ab980323f4, "Cy");
      check(dut.Cz, 64'hfcbb18a8fafecb4f, "Cz");
      check(dut.Mx, 64'h0c30645d72b4b3e8, "Mx");
      check(dut.My, 64'h13128424c93a9ffb, "My");
    end
    @(negedge clk);
    check(64'(busy), 64'd0, "idle after done");
  endtask

  initial begin
    reset = 1; start = 0;
    repeat (3) @(negedge clk);
    reset = 0;
    // "abcdabcd": one word, pad word, zeros, length 64
    foreach (blk[i]) blk[i] = '0;
    blk[0] = 64'h6162636461626364;
    blk[1] = 64'h8000_0000_0000_0000;
    blk[15] = 64'd64;
    for (int i = 0; i < 8; i++) hv[i] = ref_iv(i);
    run_block(1);
    for (int r = 0; r < 4; r++) begin
      foreach (blk[i]) blk[i] = {$urandom, $urandom};
      for (int i = 0; i < 8; i++) hv[i] = {$urandom, $urandom};
      run_block(0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
