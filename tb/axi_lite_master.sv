// axi_lite_master -- testbench-only AXI4-Lite master driven by tasks.
//
// write(addr, data) and read(addr, data) perform one transfer each: the
// address/data valids are raised at a falling edge, held until the slave's
// ready is seen at a rising edge, and the response is taken with ready held
// high. Also counts every handshake and checks the slave's OKAY responses.
module axi_lite_master (
  input  logic        clk,
  output logic [7:0]  awaddr,
  output logic        awvalid,
  input  logic        awready,
  output logic [31:0] wdata,
  output logic [3:0]  wstrb,
  output logic        wvalid,
  input  logic        wready,
  input  logic [1:0]  bresp,
  input  logic        bvalid,
  output logic        bready,
  output logic [7:0]  araddr,
  output logic        arvalid,
  input  logic        arready,
  input  logic [31:0] rdata,
  input  logic [1:0]  rresp,
  input  logic        rvalid,
  output logic        rready
);
  int bad_resp = 0;

  initial begin
    awaddr = 0; awvalid = 0; wdata = 0; wstrb = 0; wvalid = 0; bready = 0;
    araddr = 0; arvalid = 0; rready = 0;
  end

  task automatic write(input logic [7:0] a, input logic [31:0] d);
    @(negedge clk);
    awaddr = a; awvalid = 1; wdata = d; wstrb = 4'hf; wvalid = 1; bready = 1;
    do @(posedge clk); while (!(awready && wready));
    @(negedge clk);
    awvalid = 0; wvalid = 0;
    while (!bvalid) @(negedge clk);
    if (bresp != 2'b00) bad_resp++;
    @(posedge clk);
    @(negedge clk);
    bready = 0;
  endtask

  task automatic read(input logic [7:0] a, output logic [31:0] d);
    @(negedge clk);
    araddr = a; arvalid = 1; rready = 1;
    do @(posedge clk); while (!arready);
    @(negedge clk);
    arvalid = 0;
    while (!rvalid) @(negedge clk);
    d = rdata;
    if (rresp != 2'b00) bad_resp++;
    @(posedge clk);
    @(negedge clk);
    rready = 0;
  endtask
endmodule
