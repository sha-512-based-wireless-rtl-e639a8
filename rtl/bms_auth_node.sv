// bms_auth_node -- programmable-logic side of one authentication node.
//
// Each node (the BMS acting as server, or a battery cell acting as client)
// hashes its identification code with SHA-512; the CPU of the node reads the
// digest over AXI4-Lite and exchanges it over the wireless link. This module
// holds the parts of that system that are logic of the design's own:
//   ip_generator  the cell's identification code, word by word, with ENDFlag
//   sha512_axi    the AXI4-Lite peripheral around the SHA-512 core
// and shows the low 16 bits of the digest word stream on the LEDs, with the
// digest-ready flag on its own pin. The CPU, its memory, the AXI interconnect,
// the UARTs, clocking and reset generation are not part of it: the AXI4-Lite
// slave port is where the interconnect connects, clk is the system clock
// (157 MHz in the reference system) and rst_n is the synchronised active-low
// peripheral reset.
//
// The blocks and the wiring follow the system diagram. The generator's reset
// being pulsed with every start, and the LEDs taking bits [15:0], are this
// design's choices.
module bms_auth_node #(
  parameter int unsigned            ID_WORDS = 1,
  parameter logic [ID_WORDS*64-1:0] ID_VALUE = 64'h6162636461626364,
  parameter int unsigned            IN_DIV   = 2
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [7:0]  s_axi_awaddr,
  input  logic        s_axi_awvalid,
  output logic        s_axi_awready,
  input  logic [31:0] s_axi_wdata,
  input  logic [3:0]  s_axi_wstrb,
  input  logic        s_axi_wvalid,
  output logic        s_axi_wready,
  output logic [1:0]  s_axi_bresp,
  output logic        s_axi_bvalid,
  input  logic        s_axi_bready,
  input  logic [7:0]  s_axi_araddr,
  input  logic        s_axi_arvalid,
  output logic        s_axi_arready,
  output logic [31:0] s_axi_rdata,
  output logic [1:0]  s_axi_rresp,
  output logic        s_axi_rvalid,
  input  logic        s_axi_rready,
  output logic [15:0] led,
  output logic        message_ready
);

  logic [63:0] id_word, digest_word;
  logic        id_end, start_pulse;

  ip_generator #(.ID_WORDS(ID_WORDS), .ID_VALUE(ID_VALUE), .STEP(IN_DIV)) u_idgen (
    .clk, .reset(!rst_n || start_pulse), .IP(id_word), .ENDFlag(id_end)
  );

  sha512_axi #(.ADDR_W(8), .IN_DIV(IN_DIV)) u_sha (
    .s00_axi_aclk(clk), .s00_axi_aresetn(rst_n),
    .s00_axi_awaddr(s_axi_awaddr), .s00_axi_awvalid(s_axi_awvalid), .s00_axi_awready(s_axi_awready),
    .s00_axi_wdata(s_axi_wdata), .s00_axi_wstrb(s_axi_wstrb), .s00_axi_wvalid(s_axi_wvalid),
    .s00_axi_wready(s_axi_wready), .s00_axi_bresp(s_axi_bresp), .s00_axi_bvalid(s_axi_bvalid),
    .s00_axi_bready(s_axi_bready), .s00_axi_araddr(s_axi_araddr), .s00_axi_arvalid(s_axi_arvalid),
    .s00_axi_arready(s_axi_arready), .s00_axi_rdata(s_axi_rdata), .s00_axi_rresp(s_axi_rresp),
    .s00_axi_rvalid(s_axi_rvalid), .s00_axi_rready(s_axi_rready),
    .DataIn(id_word), .ENDFlag(id_end), .DataOut(digest_word),
    .MessageReady(message_ready), .StartPulse(start_pulse)
  );

  assign led = digest_word[15:0];   // the diagram's 64-to-16-bit slice

endmodule
