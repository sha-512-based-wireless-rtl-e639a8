// tb_auth_scenario -- the cell-authentication exchange between a battery
// management system (server) and battery cells (clients), with the CPUs and
// the wireless link replaced by testbench tasks. Every party is a full node.
// The server's node is built with the identification code of the genuine
// cell. Each cell hashes its own code and "sends" the 512-bit digest; the
// server hashes its copy of the expected code and compares the two digests.
//   genuine cell  code "abcdabcd"           -> must be accepted
//   trojan cell   code "abcdabce" (1 bit)   -> must be rejected
// The digests are also checked against the reference model.
module tb_auth_scenario;
  import sha512_ref_pkg::*;
  localparam int NN = 3;                       // 0 server, 1 genuine, 2 trojan
  localparam logic [63:0] GENUINE = 64'h6162636461626364;
  localparam logic [63:0] TROJAN  = 64'h6162636461626365;

  logic clk = 0, rst_n;
  logic [7:0]  awaddr[NN], araddr[NN];
  logic        awvalid[NN], awready[NN], wvalid[NN], wready[NN], bvalid[NN], bready[NN];
  logic        arvalid[NN], arready[NN], rvalid[NN], rready[NN], mready[NN];
  logic [31:0] wdata[NN], rdata[NN];
  logic [3:0]  wstrb[NN];
  logic [1:0]  bresp[NN], rresp[NN];
  logic [15:0] led[NN];
  logic [511:0] dig[NN];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  for (genvar g = 0; g < NN; g++) begin : g_n
    localparam logic [63:0] CODE = (g == 2) ? TROJAN : GENUINE;
    bms_auth_node #(.ID_VALUE(CODE)) u (.clk, .rst_n,
      .s_axi_awaddr(awaddr[g]), .s_axi_awvalid(awvalid[g]), .s_axi_awready(awready[g]),
      .s_axi_wdata(wdata[g]), .s_axi_wstrb(wstrb[g]), .s_axi_wvalid(wvalid[g]), .s_axi_wready(wready[g]),
      .s_axi_bresp(bresp[g]), .s_axi_bvalid(bvalid[g]), .s_axi_bready(bready[g]),
      .s_axi_araddr(araddr[g]), .s_axi_arvalid(arvalid[g]), .s_axi_arready(arready[g]),
      .s_axi_rdata(rdata[g]), .s_axi_rresp(rresp[g]), .s_axi_rvalid(rvalid[g]), .s_axi_rready(rready[g]),
      .led(led[g]), .message_ready(mready[g]));
    axi_lite_master m (.clk, .awaddr(awaddr[g]), .awvalid(awvalid[g]), .awready(awready[g]),
      .wdata(wdata[g]), .wstrb(wstrb[g]), .wvalid(wvalid[g]), .wready(wready[g]),
      .bresp(bresp[g]), .bvalid(bvalid[g]), .bready(bready[g]), .araddr(araddr[g]),
      .arvalid(arvalid[g]), .arready(arready[g]), .rdata(rdata[g]), .rresp(rresp[g]),
      .rvalid(rvalid[g]), .rready(rready[g]));

  end

  // a node's CPU: start a hash, wait, read the digest
  task automatic cpu_write(int n, logic [7:0] a, logic [31:0] d);
    case (n)
      0: g_n[0].m.write(a, d);
      1: g_n[1].m.write(a, d);
      default: g_n[2].m.write(a, d);
    endcase
  endtask
  task automatic cpu_read(int n, logic [7:0] a, output logic [31:0] d);
    case (n)
      0: g_n[0].m.read(a, d);
      1: g_n[1].m.read(a, d);
      default: g_n[2].m.read(a, d);
    endcase
  endtask
  task automatic hash_on_node(int n);
    logic [31:0] r;
    cpu_write(n, 8'h00, 32'h1);
    do cpu_read(n, 8'h00, r); while (r[0]);
    for (int j = 0; j < 16; j++) begin
      cpu_read(n, 8'(8'h40 + 4 * j), r);
      dig[n][511 - 32*j -: 32] = r;
    end
  endtask

  task automatic check(logic [63:0] got, logic [63:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  function automatic logic [511:0] ref_digest(logic [63:0] code);
    w64 msg[$];
    w64 hv[8];
    logic [511:0] d;
    msg = {code};
    ref_hash(msg, hv);
    for (int i = 0; i < 8; i++) d[511 - 64*i -: 64] = hv[i];
    return d;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int accepted, rejected;
    logic [511:0] exp_g, exp_t;
    exp_g = ref_digest(GENUINE);
    exp_t = ref_digest(TROJAN);
    rst_n = 0;
    repeat (4) @(negedge clk);
    rst_n = 1;
    fork
      hash_on_node(0);
      hash_on_node(1);
      hash_on_node(2);
    join
    for (int i = 0; i < 8; i++) begin
      check(dig[0][511 - 64*i -: 64], exp_g[511 - 64*i -: 64], $sformatf("server H%0d", i));
      check(dig[2][511 - 64*i -: 64], exp_t[511 - 64*i -: 64], $sformatf("trojan H%0d", i));
    end
    // server decisions
    accepted = 0;
    rejected = 0;
    if (dig[1] == dig[0]) accepted++;
    if (dig[2] != dig[0]) rejected++;
    check(64'(accepted), 64'd1, "genuine cell accepted");
    check(64'(rejected), 64'd1, "trojan cell rejected");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
