// tb_sha512_msg_sched -- feeds random 16-word blocks (three blocks in a row,
// so the window is refilled between blocks) and checks all 80 schedule words
// of each against the reference expansion.
module tb_sha512_msg_sched;
  import sha512_ref_pkg::*;
  logic  clk = 0;
  logic  shift, use_msg;
  w64    m_word, w_next;
  w64    blk[16], w[80];
  int checks = 0, failures = 0;

  sha512_msg_sched dut (.clk, .shift, .use_msg, .m_word, .w_next);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    shift = 0; use_msg = 0; m_word = 0;
    for (int b = 0; b < 3; b++) begin
      foreach (blk[i]) blk[i] = {$urandom, $urandom};
      ref_schedule(blk, w);
      for (int t = 0; t < 80; t++) begin
        @(negedge clk);
        use_msg = (t < 16);
        m_word  = (t < 16) ? blk[t] : {$urandom, $urandom};
        shift   = 1;
        #1;
        checks++;
        if (w_next !== w[t]) begin
          failures++;
          $display("FAIL block %0d W%0d got %h expected %h", b, t, w_next, w[t]);
        end
        // idle cycle: the window must not move without shift
        @(negedge clk);
        shift = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
