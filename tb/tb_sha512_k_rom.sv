// tb_sha512_k_rom -- checks all 80 round constants against values derived
// from their definition (cube roots of the first 80 primes), plus the zero
// read beyond the table and the last constant printed in the reference
// simulation (K79 = 6c44198c4a475817).
module tb_sha512_k_rom;
  import sha512_ref_pkg::*;
  logic [6:0]  addr;
  logic [63:0] k;
  int checks = 0, failures = 0;

  sha512_k_rom dut (.addr, .k);

  task automatic check(logic [63:0] got, logic [63:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 80; t++) begin
      addr = 7'(t);
      #1 check(k, ref_k(t), $sformatf("K%0d", t));
    end
    addr = 7'd79;
    #1 check(k, 64'h6c44198c4a475817, "K79 from reference simulation");
    addr = 7'd100;
    #1 check(k, 64'h0, "out of range");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
