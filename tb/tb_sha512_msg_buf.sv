// tb_sha512_msg_buf -- fills the 64-word buffer with random words, reads
// every address back (data one cycle after the address), and checks that a
// read and a write to another address in the same cycle do not interfere.
module tb_sha512_msg_buf;
  logic        clk = 0;
  logic        we;
  logic [5:0]  waddr, raddr;
  logic [63:0] wdata, rdata;
  logic [63:0] model [64];
  int checks = 0, failures = 0;

  sha512_msg_buf #(.DEPTH(64)) dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; waddr = 0; raddr = 0; wdata = 0;
    @(negedge clk);
    for (int i = 0; i < 64; i++) begin
      we = 1; waddr = 6'(i); wdata = {$urandom, $urandom}; model[i] = wdata;
      @(negedge clk);
    end
    we = 0;
    for (int i = 0; i < 64; i++) begin
      raddr = 6'(63 - i);
      @(negedge clk);
      checks++;
      if (rdata !== model[63 - i]) begin
        failures++;
        $display("FAIL addr %0d got %h expected %h", 63 - i, rdata, model[63 - i]);
      end
    end
    // simultaneous write elsewhere
    for (int i = 0; i < 32; i++) begin
      we = 1; waddr = 6'(2*i + 1); wdata = {$urandom, $urandom}; model[2*i + 1] = wdata;
      raddr = 6'(2*i);
      @(negedge clk);
      checks++;
      if (rdata !== model[2*i]) begin
        failures++;
        $display("FAIL addr %0d got %h expected %h", 2*i, rdata, model[2*i]);
      end
    end
    we = 0;
    for (int i = 0; i < 32; i++) begin
      raddr = 6'(2*i + 1);
      @(negedge clk);
      checks++;
      if (rdata !== model[2*i + 1]) begin
        failures++;
        $display("FAIL addr %0d got %h expected %h", 2*i + 1, rdata, model[2*i + 1]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
