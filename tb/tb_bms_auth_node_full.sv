// tb_bms_auth_node_full -- one complete authentication hash on the node with
// every parameter at its default: the CPU-side master starts the hash, waits
// for done and reads the 512-bit digest of the identification code
// "abcdabcd", which must equal 7edbb312...0e7cecc8. Also checks that
// message_ready is high for eight cycles and that the LEDs show the low 16
// bits of each digest word meanwhile.
module tb_bms_auth_node_full;
  logic clk = 0, rst_n;
  logic [7:0]  awaddr, araddr;
  logic        awvalid, awready, wvalid, wready, bvalid, bready, arvalid, arready, rvalid, rready;
  logic [31:0] wdata, rdata;
  logic [3:0]  wstrb;
  logic [1:0]  bresp, rresp;
  logic [15:0] led;
  logic        message_ready;
  int checks = 0, failures = 0;
  int mr = 0;
  localparam logic [511:0] EXP = 512'h7edbb31279e6b88ac79812e2f77f5b234f817797c7cf98263d557ecfc992f1c43e8b169e11e3aaceb4407da8390517cac5e64f579344e15f589be5c20e7cecc8;

  always #5 clk = ~clk;

  bms_auth_node dut (.clk, .rst_n,
    .s_axi_awaddr(awaddr), .s_axi_awvalid(awvalid), .s_axi_awready(awready),
    .s_axi_wdata(wdata), .s_axi_wstrb(wstrb), .s_axi_wvalid(wvalid), .s_axi_wready(wready),
    .s_axi_bresp(bresp), .s_axi_bvalid(bvalid), .s_axi_bready(bready),
    .s_axi_araddr(araddr), .s_axi_arvalid(arvalid), .s_axi_arready(arready),
    .s_axi_rdata(rdata), .s_axi_rresp(rresp), .s_axi_rvalid(rvalid), .s_axi_rready(rready),
    .led, .message_ready);

  axi_lite_master m (.clk, .awaddr, .awvalid, .awready, .wdata, .wstrb, .wvalid, .wready,
                     .bresp, .bvalid, .bready, .araddr, .arvalid, .arready, .rdata, .rresp,
                     .rvalid, .rready);

  task automatic check(logic [63:0] got, logic [63:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  always @(posedge clk) if (rst_n && message_ready) begin
    check(64'(led), 64'(EXP[511 - 64*mr - 48 -: 16]), $sformatf("LED word %0d", mr));
    mr++;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] r;
    rst_n = 0;
    repeat (4) @(negedge clk);
    rst_n = 1;
    m.write(8'h00, 32'h1);
    do m.read(8'h00, r); while (r[0]);
    check(64'(r), 64'h2, "done");
    for (int j = 0; j < 16; j++) begin
      m.read(8'(8'h40 + 4 * j), r);
      check(64'(r), 64'(EXP[511 - 32*j -: 32]), $sformatf("digest reg %0d", j));
    end
    check(64'(mr), 64'd8, "message_ready cycles");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
