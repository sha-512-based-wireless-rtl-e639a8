// tb_bms_auth_node -- end-to-end test of the node: a CPU-like AXI4-Lite
// master starts a hash, polls the status register and reads the digest of
// the node's identification code. Three nodes run side by side:
//   n1  default node, code "abcdabcd" (1 word, 1 block)
//   n14 14-word code: the padding spills into a second block
//   n56 56-word code: the longest input, 3584 bits, four blocks
// Each digest is compared with the reference model (n1 also with the digest
// of the reference simulation). Each mechanism of the design is counted and
// must occur at least once: hash start, busy status, start ignored while
// busy, multi-block chaining, padding-only final block, longest message,
// the eight-cycle DigestReady window, LEDs showing the digest's low bits.
module tb_bms_auth_node;
  import sha512_ref_pkg::*;
  localparam int NN = 3;
  localparam logic [14*64-1:0] ID14 = {14{64'h0123_4567_89ab_cdef}} ^ {7{128'h1}};
  localparam logic [56*64-1:0] ID56 = {28{128'hfeed_face_cafe_beef_0000_1111_2222_3333}} + 3584'd5;

  logic clk = 0, rst_n;
  logic [7:0]  awaddr[NN], araddr[NN];
  logic        awvalid[NN], awready[NN], wvalid[NN], wready[NN], bvalid[NN], bready[NN];
  logic        arvalid[NN], arready[NN], rvalid[NN], rready[NN], mready[NN];
  logic [31:0] wdata[NN], rdata[NN];
  logic [3:0]  wstrb[NN];
  logic [1:0]  bresp[NN], rresp[NN];
  logic [15:0] led[NN];
  int checks = 0, failures = 0;

  // mechanism counters
  int n_start = 0, n_busy = 0, n_ignored = 0, n_multiblock = 0, n_padblock = 0,
      n_maxlen = 0, n_window = 0, n_led = 0;

  always #5 clk = ~clk;

  bms_auth_node u_n1 (.clk, .rst_n,
    .s_axi_awaddr(awaddr[0]), .s_axi_awvalid(awvalid[0]), .s_axi_awready(awready[0]),
    .s_axi_wdata(wdata[0]), .s_axi_wstrb(wstrb[0]), .s_axi_wvalid(wvalid[0]), .s_axi_wready(wready[0]),
    .s_axi_bresp(bresp[0]), .s_axi_bvalid(bvalid[0]), .s_axi_bready(bready[0]),
    .s_axi_araddr(araddr[0]), .s_axi_arvalid(arvalid[0]), .s_axi_arready(arready[0]),
    .s_axi_rdata(rdata[0]), .s_axi_rresp(rresp[0]), .s_axi_rvalid(rvalid[0]), .s_axi_rready(rready[0]),
    .led(led[0]), .message_ready(mready[0]));
  bms_auth_node #(.ID_WORDS(14), .ID_VALUE(ID14)) u_n14 (.clk, .rst_n,
    .s_axi_awaddr(awaddr[1]), .s_axi_awvalid(awvalid[1]), .s_axi_awready(awready[1]),
    .s_axi_wdata(wdata[1]), .s_axi_wstrb(wstrb[1]), .s_axi_wvalid(wvalid[1]), .s_axi_wready(wready[1]),
    .s_axi_bresp(bresp[1]), .s_axi_bvalid(bvalid[1]), .s_axi_bready(bready[1]),
    .s_axi_araddr(araddr[1]), .s_axi_arvalid(arvalid[1]), .s_axi_arready(arready[1]),
    .s_axi_rdata(rdata[1]), .s_axi_rresp(rresp[1]), .s_axi_rvalid(rvalid[1]), .s_axi_rready(rready[1]),
    .led(led[1]), .message_ready(mready[1]));
  bms_auth_node #(.ID_WORDS(56), .ID_VALUE(ID56)) u_n56 (.clk, .rst_n,
    .s_axi_awaddr(awaddr[2]), .s_axi_awvalid(awvalid[2]), .s_axi_awready(awready[2]),
    .s_axi_wdata(wdata[2]), .s_axi_wstrb(wstrb[2]), .s_axi_wvalid(wvalid[2]), .s_axi_wready(wready[2]),
    .s_axi_bresp(bresp[2]), .s_axi_bvalid(bvalid[2]), .s_axi_bready(bready[2]),
    .s_axi_araddr(araddr[2]), .s_axi_arvalid(arvalid[2]), .s_axi_arready(arready[2]),
    .s_axi_rdata(rdata[2]), .s_axi_rresp(rresp[2]), .s_axi_rvalid(rvalid[2]), .s_axi_rready(rready[2]),
    .led(led[2]), .message_ready(mready[2]));

  for (genvar g = 0; g < NN; g++) begin : g_m
    axi_lite_master m (.clk, .awaddr(awaddr[g]), .awvalid(awvalid[g]), .awready(awready[g]),
      .wdata(wdata[g]), .wstrb(wstrb[g]), .wvalid(wvalid[g]), .wready(wready[g]),
      .bresp(bresp[g]), .bvalid(bvalid[g]), .bready(bready[g]), .araddr(araddr[g]),
      .arvalid(arvalid[g]), .arready(arready[g]), .rdata(rdata[g]), .rresp(rresp[g]),
      .rvalid(rvalid[g]), .rready(rready[g]));
  end

  // expected digests
  w64 exp_h[NN][8];

  // DigestReady window length and LED contents
  int run_len[NN];
  always @(posedge clk) if (rst_n) begin
    for (int n = 0; n < NN; n++) begin
      if (mready[n]) begin
        checks++;
        if (led[n] !== exp_h[n][run_len[n]][15:0]) begin
          failures++;
          $display("FAIL node %0d LED word %0d", n, run_len[n]);
        end else n_led++;
        run_len[n]++;
      end else if (run_len[n] != 0) begin
        checks++;
        if (run_len[n] == 8) n_window++;
        else begin
          failures++;
          $display("FAIL node %0d DigestReady lasted %0d cycles", n, run_len[n]);
        end
        run_len[n] = 0;
      end
    end
  end

  // multi-block chaining: a block finishing when more blocks follow
  always @(posedge clk) if (rst_n) begin
    if (u_n14.u_sha.u_core.u_comp.done && u_n14.u_sha.u_core.blk == 0) begin
      n_multiblock++;
      n_padblock++;                    // 14 words + pad word: length goes to block 2
    end
    if (u_n56.u_sha.u_core.u_comp.done && u_n56.u_sha.u_core.blk != 3) n_multiblock++;
  end

  task automatic check(logic [63:0] got, logic [63:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic run_node(int n);
    logic [31:0] r;
    case (n)
      0: g_m[0].m.write(8'h00, 32'h1);
      1: g_m[1].m.write(8'h00, 32'h1);
      default: g_m[2].m.write(8'h00, 32'h1);
    endcase
    n_start++;
    case (n)
      0: g_m[0].m.read(8'h00, r);
      1: g_m[1].m.read(8'h00, r);
      default: g_m[2].m.read(8'h00, r);
    endcase
    if (r[0]) n_busy++;
    if (n == 2) begin                  // a second start while busy must not restart
      g_m[2].m.write(8'h00, 32'h1);
      g_m[2].m.read(8'h00, r);
      if (r[0] && u_n56.u_sha.u_core.nwords > 0) n_ignored++;
    end
    do begin
      case (n)
        0: g_m[0].m.read(8'h00, r);
        1: g_m[1].m.read(8'h00, r);
        default: g_m[2].m.read(8'h00, r);
      endcase
    end while (r[0]);
    check(64'(r[1]), 64'd1, $sformatf("node %0d done", n));
    for (int j = 0; j < 16; j++) begin
      case (n)
        0: g_m[0].m.read(8'(8'h40 + 4 * j), r);
        1: g_m[1].m.read(8'(8'h40 + 4 * j), r);
        default: g_m[2].m.read(8'(8'h40 + 4 * j), r);
      endcase
      check(64'(r), 64'((j % 2) != 0 ? exp_h[n][j/2][31:0] : exp_h[n][j/2][63:32]),
            $sformatf("node %0d digest reg %0d", n, j));
    end
    if (n == 2) n_maxlen++;
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    w64 msg[$];
    w64 hv[8];
    foreach (run_len[n]) run_len[n] = 0;
    msg = {64'h6162636461626364};
    ref_hash(msg, hv);
    foreach (hv[i]) exp_h[0][i] = hv[i];
    msg = {};
    for (int i = 0; i < 14; i++) msg.push_back(ID14[i*64 +: 64]);
    ref_hash(msg, hv);
    foreach (hv[i]) exp_h[1][i] = hv[i];
    msg = {};
    for (int i = 0; i < 56; i++) msg.push_back(ID56[i*64 +: 64]);
    ref_hash(msg, hv);
    foreach (hv[i]) exp_h[2][i] = hv[i];
    check(exp_h[0][0], 64'h7edbb31279e6b88a, "reference model vs reference simulation");

    rst_n = 0;
    repeat (4) @(negedge clk);
    rst_n = 1;
    fork
      run_node(0);
      run_node(1);
      run_node(2);
    join
    run_node(0);                        // a second run on the same node
    repeat (2) @(negedge clk);

    $display("mechanisms: start=%0d busy=%0d ignored=%0d multiblock=%0d padblock=%0d maxlen=%0d window=%0d led=%0d",
             n_start, n_busy, n_ignored, n_multiblock, n_padblock, n_maxlen, n_window, n_led);
    check(64'(n_start > 0), 1, "hash start happened");
    check(64'(n_busy > 0), 1, "busy status seen");
    check(64'(n_ignored > 0), 1, "start while busy ignored");
    check(64'(n_multiblock > 0), 1, "multi-block chaining happened");
    check(64'(n_padblock > 0), 1, "padding-only block happened");
    check(64'(n_maxlen > 0), 1, "longest message hashed");
    check(64'(n_window), 4, "eight-cycle DigestReady windows");
    check(64'(n_led), 32, "LED words");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
