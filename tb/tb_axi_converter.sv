// tb_axi_converter: AXI4-Lite master tasks drive the converter. Checks that a
// full-word write to CMD i produces one cmd_valid[i] pulse with the data and
// an OKAY response, that a write to a full queue is held until the queue has
// room, that other writes get SLVERR and produce nothing, that STATUS i reads
// the (synchronized) status bits, and that ID reads 0x44524144.
module tb_axi_converter;
  import drad_pkg::*;
  localparam int N = 4;
  logic clk = 0, rst_n = 0;
  logic [7:0] awaddr = '0, araddr = '0;
  logic awvalid = 0, awready, wvalid = 0, wready, bvalid, bready = 0, arvalid = 0, arready, rvalid, rready = 0;
  logic [31:0] wdata = '0, rdata;
  logic [3:0] wstrb = '0;
  logic [1:0] bresp, rresp;
  logic [N-1:0] cmd_valid, cmd_full = '0;
  logic [31:0] cmd_data;
  ch_status_t status [N];
  int checks = 0, failures = 0;
  int pulses [N];
  logic [31:0] last_cmd;

  axi_converter #(.N_CH(N)) dut (
    .clk, .rst_n,
    .s_axil_awaddr(awaddr), .s_axil_awvalid(awvalid), .s_axil_awready(awready),
    .s_axil_wdata(wdata), .s_axil_wstrb(wstrb), .s_axil_wvalid(wvalid), .s_axil_wready(wready),
    .s_axil_bresp(bresp), .s_axil_bvalid(bvalid), .s_axil_bready(bready),
    .s_axil_araddr(araddr), .s_axil_arvalid(arvalid), .s_axil_arready(arready),
    .s_axil_rdata(rdata), .s_axil_rresp(rresp), .s_axil_rvalid(rvalid), .s_axil_rready(rready),
    .cmd_valid, .cmd_data, .cmd_full, .status);

  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n)
    for (int i = 0; i < N; i++) if (cmd_valid[i]) begin pulses[i]++; last_cmd = cmd_data; end

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic axi_write(input logic [7:0] a, input logic [31:0] d, input logic [3:0] s,
                           output logic [1:0] resp, output int wait_cycles);
    @(negedge clk);
    awaddr = a; awvalid = 1; wdata = d; wstrb = s; wvalid = 1;
    wait_cycles = 0;
    @(posedge clk);
    while (!(awready && wready)) begin @(posedge clk); wait_cycles++; end
    @(negedge clk); awvalid = 0; wvalid = 0; bready = 1;
    while (!bvalid) @(negedge clk);
    resp = bresp;
    @(negedge clk); bready = 0;
  endtask

  task automatic axi_read(input logic [7:0] a, output logic [31:0] d);
    @(negedge clk); araddr = a; arvalid = 1;
    @(posedge clk); while (!arready) @(posedge clk);
    @(negedge clk); arvalid = 0; rready = 1;
    while (!rvalid) @(negedge clk);
    d = rdata;
    @(negedge clk); rready = 0;
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [1:0] resp;
    logic [31:0] d;
    int w;
    for (int i = 0; i < N; i++) status[i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < N; i++) begin
      axi_write(8'(16*i), 32'hC0DE_0000 + i, 4'hF, resp, w);
      chk(resp == 2'b00 && pulses[i] == 1 && last_cmd == 32'hC0DE_0000 + i,
          $sformatf("CMD %0d write: resp=%0d pulses=%0d data=%h", i, resp, pulses[i], last_cmd));
    end
    // Full queue: the write waits.
    cmd_full[1] = 1;
    fork
      begin repeat (10) @(posedge clk); #1 cmd_full[1] = 0; end
      axi_write(8'h10, 32'h1234_5678, 4'hF, resp, w);
    join
    chk(w >= 9 && pulses[1] == 2 && last_cmd == 32'h1234_5678, $sformatf("write held %0d cycles by a full queue", w));
    // Partial and unmapped writes.
    axi_write(8'h20, 32'hDEAD, 4'h3, resp, w);
    chk(resp == 2'b10 && pulses[2] == 1, "partial CMD write rejected");
    axi_write(8'h24, 32'hDEAD, 4'hF, resp, w);
    chk(resp == 2'b10 && pulses[2] == 1, "write to STATUS rejected");
    axi_write(8'h80, 32'hDEAD, 4'hF, resp, w);
    chk(resp == 2'b10, "unmapped write rejected");
    // Status.
    for (int i = 0; i < N; i++) status[i] = ch_status_t'(8'(8'h5A ^ (i * 37)));
    repeat (3) @(posedge clk);
    for (int i = 0; i < N; i++) begin
      axi_read(8'(16*i + 4), d);
      chk(d == 32'(8'h5A ^ (i * 37)), $sformatf("STATUS %0d = %h", i, d));
    end
    axi_read(8'h40, d);
    chk(d == 32'h4452_4144, $sformatf("ID = %h", d));
    axi_read(8'h08, d);
    chk(d == 0, "unmapped read is 0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
