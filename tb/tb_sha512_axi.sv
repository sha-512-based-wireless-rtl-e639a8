// tb_sha512_axi -- drives the SHA-512 peripheral over AXI4-Lite while the tb
// supplies the message words on DataIn/ENDFlag, one per IN_DIV = 2 cycles from
// the cycle after StartPulse. Checks, for a 1-word, a 14-word and a 56-word
// message: busy while hashing, done afterwards, the 16 digest registers
// against the reference model, that MessageReady/DataOut carry the digest,
// that a start written while busy is ignored, and that unmapped addresses
// read as zero.
module tb_sha512_axi;
  import sha512_ref_pkg::*;
  logic        clk = 0, aresetn;
  logic [7:0]  awaddr, araddr;
  logic        awvalid, awready, wvalid, wready, bvalid, bready, arvalid, arready, rvalid, rready;
  logic [31:0] wdata, rdata;
  logic [3:0]  wstrb;
  logic [1:0]  bresp, rresp;
  logic [63:0] DataIn, DataOut;
  logic        ENDFlag, MessageReady, StartPulse;
  int checks = 0, failures = 0;
  w64 msg[$];
  int pos;
  int starts = 0;
  int mr_words = 0;
  w64 hv[8];

  sha512_axi dut (
    .s00_axi_aclk(clk), .s00_axi_aresetn(aresetn),
    .s00_axi_awaddr(awaddr), .s00_axi_awvalid(awvalid), .s00_axi_awready(awready),
    .s00_axi_wdata(wdata), .s00_axi_wstrb(wstrb), .s00_axi_wvalid(wvalid), .s00_axi_wready(wready),
    .s00_axi_bresp(bresp), .s00_axi_bvalid(bvalid), .s00_axi_bready(bready),
    .s00_axi_araddr(araddr), .s00_axi_arvalid(arvalid), .s00_axi_arready(arready),
    .s00_axi_rdata(rdata), .s00_axi_rresp(rresp), .s00_axi_rvalid(rvalid), .s00_axi_rready(rready),
    .DataIn, .ENDFlag, .DataOut, .MessageReady, .StartPulse);

  axi_lite_master m (.clk, .awaddr, .awvalid, .awready, .wdata, .wstrb, .wvalid, .wready,
                     .bresp, .bvalid, .bready, .araddr, .arvalid, .arready, .rdata, .rresp,
                     .rvalid, .rready);

  always #5 clk = ~clk;

  // message source: word pos/2 of msg, restarted by StartPulse
  always @(posedge clk) begin
    if (StartPulse) begin
      pos <= 0;
      starts++;
    end else pos <= pos + 1;
    if (MessageReady && aresetn) begin
      if (DataOut !== hv[mr_words % 8]) begin
        failures++;
        $display("FAIL DataOut word %0d", mr_words % 8);
      end
      checks++;
      mr_words++;
    end
  end
  always_comb begin
    int wi;
    wi = pos / 2;
    if (wi >= msg.size()) wi = msg.size() - 1;
    DataIn  = (pos % 2 == 0) ? msg[wi] : 64'h0bad_0bad_0bad_0bad;
    ENDFlag = (wi == msg.size() - 1);
  end

  task automatic check(logic [63:0] got, logic [63:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] r;
    int lens[3];
    lens = '{1, 14, 56};
    aresetn = 0;
    msg = {64'h0};
    repeat (4) @(negedge clk);
    aresetn = 1;
    m.read(8'h00, r);
    check(64'(r), 64'h0, "status after reset");
    m.read(8'h10, r);
    check(64'(r), 64'h0, "unmapped address");
    for (int k = 0; k < 3; k++) begin
      int s0;
      msg = {};
      for (int i = 0; i < lens[k]; i++) msg.push_back({$urandom, $urandom});
      if (k == 0) msg[0] = 64'h6162636461626364;
      ref_hash(msg, hv);
      s0 = starts;
      m.write(8'h00, 32'h1);
      m.read(8'h00, r);
      check(64'(r), 64'h1, "busy");
      m.write(8'h00, 32'h1);           // ignored while busy
      check(64'(starts - s0), 64'd1, "one start only");
      do m.read(8'h00, r); while (r[0]);
      check(64'(r), 64'h2, "done");
      for (int j = 0; j < 16; j++) begin
        m.read(8'(8'h40 + 4 * j), r);
        check(64'(r), 64'((j % 2) != 0 ? hv[j/2][31:0] : hv[j/2][63:32]), $sformatf("len %0d digest reg %0d", lens[k], j));
      end
    end
    check(64'(mr_words), 64'd24, "MessageReady words");
    check(64'(m.bad_resp), 64'd0, "OKAY responses");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
