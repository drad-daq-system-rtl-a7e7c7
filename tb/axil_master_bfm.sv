// axil_master_bfm: AXI4-Lite master for testbenches (one transaction at a
// time). write() returns the response and the number of clocks the address
// and data were held before being accepted; read() returns the data.
module axil_master_bfm (
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
  input  logic        rvalid,
  output logic        rready
);
  initial begin
    awaddr = '0; awvalid = 0; wdata = '0; wstrb = '0; wvalid = 0; bready = 0;
    araddr = '0; arvalid = 0; rready = 0;
  end

  task automatic write(input logic [7:0] a, input logic [31:0] d, output logic [1:0] resp, output int held);
    @(negedge clk);
    awaddr = a; awvalid = 1; wdata = d; wstrb = 4'hF; wvalid = 1;
    held = 0;
    @(posedge clk);
    while (!(awready && wready)) begin @(posedge clk); held++; end
    @(negedge clk); awvalid = 0; wvalid = 0; bready = 1;
    while (!bvalid) @(negedge clk);
    resp = bresp;
    @(negedge clk); bready = 0;
  endtask

  task automatic read(input logic [7:0] a, output logic [31:0] d);
    @(negedge clk); araddr = a; arvalid = 1;
    @(posedge clk); while (!arready) @(posedge clk);
    @(negedge clk); arvalid = 0; rready = 1;
    while (!rvalid) @(negedge clk);
    d = rdata;
    @(negedge clk); rready = 0;
  endtask
endmodule
