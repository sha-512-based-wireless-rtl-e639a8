// sha512_axi -- AXI4-Lite peripheral enclosing the SHA-512 core.
//
// Lets the CPU start a hash and read back the 512-bit digest. The message
// words and the end-of-message flag do not come over the bus: they enter on
// DataIn and ENDFlag (wired to the identification-code generator), and the
// core's DataOut and DigestReady leave on DataOut and MessageReady, as in the
// system diagram. StartPulse repeats the core's Start so that the word source
// can restart in step with it.
//
// Register map (32-bit registers, byte addresses, ADDR_W = 8):
//   0x00 CTRL/STATUS  write: bit0 = 1 starts a hash (one-cycle Start pulse).
//                     read:  bit0 busy (started, digest not yet complete),
//                            bit1 done (a complete digest is held).
//   0x40 + 4*j        DIGEST j, j = 0..15, read only:
//                     j = 2i -> H_i[63:32], j = 2i+1 -> H_i[31:0].
// Other addresses read as zero; writes to them are ignored. Every access gets
// an OKAY response. The digest registers fill as the core streams H0..H7
// out with DigestReady high; done is set when the eighth word is stored and
// cleared by the next start.
//
// Bus timing: a write is accepted (awready and wready together) in the cycle
// both awvalid and wvalid are high and no response is pending; bvalid follows
// one cycle later. A read is accepted when arvalid is high and no read data is
// pending; rvalid follows one cycle later. The register map and the handshake
// timing are this design's choice; the reference system says only that the custom IP
// connects the core to the CPU's AXI4 bus.
module sha512_axi #(
  parameter int unsigned ADDR_W = 8,
  parameter int unsigned IN_DIV = 2
) (
  input  logic              s00_axi_aclk,
  input  logic              s00_axi_aresetn,
  // AXI4-Lite slave
  input  logic [ADDR_W-1:0] s00_axi_awaddr,
  input  logic              s00_axi_awvalid,
  output logic              s00_axi_awready,
  input  logic [31:0]       s00_axi_wdata,
  input  logic [3:0]        s00_axi_wstrb,
  input  logic              s00_axi_wvalid,
  output logic              s00_axi_wready,
  output logic [1:0]        s00_axi_bresp,
  output logic              s00_axi_bvalid,
  input  logic              s00_axi_bready,
  input  logic [ADDR_W-1:0] s00_axi_araddr,
  input  logic              s00_axi_arvalid,
  output logic              s00_axi_arready,
  output logic [31:0]       s00_axi_rdata,
  output logic [1:0]        s00_axi_rresp,
  output logic              s00_axi_rvalid,
  input  logic              s00_axi_rready,
  // core side
  input  logic [63:0]       DataIn,
  input  logic              ENDFlag,
  output logic [63:0]       DataOut,
  output logic              MessageReady,
  output logic              StartPulse
);

  logic        clk, rst;
  logic        start_q, busy, done;
  logic [2:0]  widx;
  logic [63:0] digest [8];

  assign clk = s00_axi_aclk;
  assign rst = !s00_axi_aresetn;

  sha512_core #(.IN_DIV(IN_DIV)) u_core (
    .clk, .reset(rst), .Start(start_q), .DataIn, .Stop(ENDFlag),
    .DataOut, .DigestReady(MessageReady)
  );

  assign StartPulse = start_q;

  // ---- write channel ----
  logic wr_fire;
  assign wr_fire         = s00_axi_awvalid && s00_axi_wvalid && !s00_axi_bvalid;
  assign s00_axi_awready = wr_fire;
  assign s00_axi_wready  = wr_fire;
  assign s00_axi_bresp   = 2'b00;

  always_ff @(posedge clk) begin
    if (rst) begin
      s00_axi_bvalid <= 1'b0;
      start_q        <= 1'b0;
    end else begin
      start_q <= 1'b0;
      if (wr_fire) begin
        s00_axi_bvalid <= 1'b1;
        if (s00_axi_awaddr == '0 && s00_axi_wstrb[0] && s00_axi_wdata[0] && !busy)
          start_q <= 1'b1;
      end else if (s00_axi_bready) begin
        s00_axi_bvalid <= 1'b0;
      end
    end
  end

  // ---- digest capture ----
  always_ff @(posedge clk) begin
    if (rst) begin
      busy <= 1'b0;
      done <= 1'b0;
      widx <= '0;
      for (int i = 0; i < 8; i++) digest[i] <= '0;
    end else if (start_q) begin
      busy <= 1'b1;
      done <= 1'b0;
      widx <= '0;
    end else if (MessageReady) begin
      digest[widx] <= DataOut;
      widx         <= widx + 3'd1;
      if (widx == 3'd7) begin
        busy <= 1'b0;
        done <= 1'b1;
      end
    end
  end

  // ---- read channel ----
  logic [31:0] rd_val;
  always_comb begin
    rd_val = '0;
    if (s00_axi_araddr == '0) begin
      rd_val = {30'd0, done, busy};
    end else if (s00_axi_araddr[ADDR_W-1:6] == (ADDR_W-6)'(1)) begin
      rd_val = s00_axi_araddr[2] ? digest[s00_axi_araddr[5:3]][31:0]
                                 : digest[s00_axi_araddr[5:3]][63:32];
    end
  end

  assign s00_axi_arready = s00_axi_arvalid && !s00_axi_rvalid;
  assign s00_axi_rresp   = 2'b00;

  always_ff @(posedge clk) begin
    if (rst) begin
      s00_axi_rvalid <= 1'b0;
      s00_axi_rdata  <= '0;
    end else if (s00_axi_arready) begin
      s00_axi_rvalid <= 1'b1;
      s00_axi_rdata  <= rd_val;
    end else if (s00_axi_rready) begin
      s00_axi_rvalid <= 1'b0;
    end
  end

  // ---- bus rules on this slave's side ----
  // A response, once raised, stays until the master takes it.
  a_bvalid_hold: assert property (@(posedge clk) disable iff (rst)
    s00_axi_bvalid && !s00_axi_bready |=> s00_axi_bvalid);
  a_rvalid_hold: assert property (@(posedge clk) disable iff (rst)
    s00_axi_rvalid && !s00_axi_rready |=> s00_axi_rvalid && $stable(s00_axi_rdata));

endmodule
