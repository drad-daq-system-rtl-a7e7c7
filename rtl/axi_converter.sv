// axi_converter: AXI4-Lite control port of the DAQ logic.
//
// The processor controls the logic through a 32-bit AXI4-Lite slave in the
// 100 MHz domain. This block turns bus writes into the command words that the
// per-channel command queues take, and answers reads with status.
//
// Register map (byte addresses, this design's own):
//   0x10*i + 0x0  CMD i     write: push the data word into channel i's queue
//   0x10*i + 0x4  STATUS i  read: drad_pkg::ch_status_t in bits [7:0]
//   0x40          ID        read: 0x4452_4144
// Registers are 32-bit words: the two lowest address bits are not decoded.
// Other addresses read as 0 and answer writes with SLVERR. A CMD write to a
// full queue is held (AWREADY/WREADY low) until the queue has room, so no
// command is lost. Status bits come from the 40 and 160 MHz domains and are
// synchronized here, bit by bit.
//
// Timing: a write is accepted in the clock where AWVALID and WVALID are both
// high, the response is valid the next clock; a read answers the clock after
// ARVALID. One outstanding transaction per direction. That an AXI4-Lite port
// is converted into the command format of the chip-management logic is from
// the document; everything else here is this design's own.
module axi_converter
  import drad_pkg::*;
#(
  parameter int unsigned N_CH   = 4,
  parameter int unsigned ADDR_W = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  // AXI4-Lite slave
  input  logic [ADDR_W-1:0] s_axil_awaddr,
  input  logic              s_axil_awvalid,
  output logic              s_axil_awready,
  input  logic [31:0]       s_axil_wdata,
  input  logic [3:0]        s_axil_wstrb,
  input  logic              s_axil_wvalid,
  output logic              s_axil_wready,
  output logic [1:0]        s_axil_bresp,
  output logic              s_axil_bvalid,
  input  logic              s_axil_bready,
  input  logic [ADDR_W-1:0] s_axil_araddr,
  input  logic              s_axil_arvalid,
  output logic              s_axil_arready,
  output logic [31:0]       s_axil_rdata,
  output logic [1:0]        s_axil_rresp,
  output logic              s_axil_rvalid,
  input  logic              s_axil_rready,
  // commands to the channel queues
  output logic [N_CH-1:0]   cmd_valid,
  output logic [31:0]       cmd_data,
  input  logic [N_CH-1:0]   cmd_full,
  // per-channel status, any clock domain
  input  ch_status_t        status [N_CH]
);
  localparam logic [31:0] ID_WORD = 32'h4452_4144;
  localparam logic [1:0]  OKAY    = 2'b00;
  localparam logic [1:0]  SLVERR  = 2'b10;

  // Write path.
  logic [ADDR_W-5:0] wch;
  logic [1:0]        wreg;
  logic              w_is_cmd, w_room, accept;

  assign wch      = s_axil_awaddr[ADDR_W-1:4];
  assign wreg     = s_axil_awaddr[3:2];
  assign w_is_cmd = (int'(wch) < N_CH) && (wreg == 2'd0);
  assign w_room   = !w_is_cmd || !cmd_full[wch[$clog2(N_CH)-1:0]];
  assign accept   = s_axil_awvalid && s_axil_wvalid && !s_axil_bvalid && w_room;

  assign s_axil_awready = accept;
  assign s_axil_wready  = accept;
  assign cmd_data       = s_axil_wdata;

  always_comb begin
    cmd_valid = '0;
    if (accept && w_is_cmd && s_axil_wstrb == 4'hF) cmd_valid[wch[$clog2(N_CH)-1:0]] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_axil_bvalid <= 1'b0;
      s_axil_bresp  <= OKAY;
    end else begin
      if (s_axil_bvalid && s_axil_bready) s_axil_bvalid <= 1'b0;
      if (accept) begin
        s_axil_bvalid <= 1'b1;
        s_axil_bresp  <= (w_is_cmd && s_axil_wstrb == 4'hF) ? OKAY : SLVERR;
      end
    end
  end

  // Status synchronizers.
  ch_status_t st_s [N_CH];
  for (genvar i = 0; i < N_CH; i++) begin : g_sync
    sync_2ff #(.W($bits(ch_status_t))) u_sync (.clk, .rst_n, .d(status[i]), .q(st_s[i]));
  end

  // Read path.
  logic [ADDR_W-5:0] rch;
  logic [1:0]        rreg;
  logic [31:0]       rword;

  assign rch  = s_axil_araddr[ADDR_W-1:4];
  assign rreg = s_axil_araddr[3:2];
  assign s_axil_arready = !s_axil_rvalid;

  always_comb begin
    rword = '0;
    if (s_axil_araddr == ADDR_W'(8'h40)) rword = ID_WORD;
    else if (int'(rch) < N_CH && rreg == 2'd1) rword = {24'd0, st_s[rch[$clog2(N_CH)-1:0]]};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_axil_rvalid <= 1'b0;
      s_axil_rdata  <= '0;
      s_axil_rresp  <= OKAY;
    end else begin
      if (s_axil_rvalid && s_axil_rready) s_axil_rvalid <= 1'b0;
      if (s_axil_arvalid && s_axil_arready) begin
        s_axil_rvalid <= 1'b1;
        s_axil_rdata  <= rword;
        s_axil_rresp  <= OKAY;
      end
    end
  end

  a_b_hold: assert property (@(posedge clk) disable iff (!rst_n)
      s_axil_bvalid && !s_axil_bready |=> s_axil_bvalid)
    else $error("axi_converter: BVALID dropped before BREADY");
  a_r_hold: assert property (@(posedge clk) disable iff (!rst_n)
      s_axil_rvalid && !s_axil_rready |=> s_axil_rvalid && $stable(s_axil_rdata))
    else $error("axi_converter: read data changed before RREADY");

  initial assert (ADDR_W >= 7 && N_CH >= 2 && N_CH <= 4)
    else $error("axi_converter: ADDR_W must be at least 7 and N_CH 2..4");
endmodule
