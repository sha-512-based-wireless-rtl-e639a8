// tb_ip_generator -- a three-word code stepped every STEP = 2 cycles: checks
// the word on IP and ENDFlag every cycle after reset, that the last word is
// held, and that a new reset restarts at word 0. Also checks the default
// one-word generator (ENDFlag at once, code 6162636461626364).
module tb_ip_generator;
  logic        clk = 0, reset;
  logic [63:0] ip3, ip1;
  logic        end3, end1;
  localparam logic [191:0] ID3 = {64'h3333_0000_0000_0003, 64'h2222_0000_0000_0002,
                                  64'h1111_0000_0000_0001};
  int checks = 0, failures = 0;

  ip_generator #(.ID_WORDS(3), .ID_VALUE(ID3), .STEP(2)) dut3 (.clk, .reset, .IP(ip3), .ENDFlag(end3));
  ip_generator dut1 (.clk, .reset, .IP(ip1), .ENDFlag(end1));

  always #5 clk = ~clk;

  task automatic check(logic [63:0] got, logic [63:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int run = 0; run < 2; run++) begin
      reset = 1;
      @(negedge clk);
      reset = 0;
      for (int c = 0; c < 10; c++) begin
        int wi;
        wi = (c / 2 > 2) ? 2 : c / 2;
        check(ip3, ID3[wi*64 +: 64], $sformatf("run %0d cycle %0d word", run, c));
        check(64'(end3), 64'(wi == 2), $sformatf("run %0d cycle %0d ENDFlag", run, c));
        check(ip1, 64'h6162636461626364, "default code");
        check(64'(end1), 64'd1, "default ENDFlag");
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
