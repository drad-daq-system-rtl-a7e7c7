// dma_management: per-channel data FIFOs between the chip domain and the DMA.
//
// Each channel's pixel stream is produced at 160 MHz and taken by that
// channel's DMA engine at 100 MHz. One dual-clock FIFO per channel buffers the
// stream and makes the clock crossing, so the channels stay independent of
// each other. The FIFO per channel and its clock-crossing role follow the
// document; the depth (2**FIFO_AW words of 32 data bits plus TLAST) is this
// design's own. The DMA engines and the AXI4 interconnect that write the words
// into processor memory are vendor blocks outside this RTL: the m_axis ports
// are where they connect.
//
// Interface: AXI4-Stream slave per channel on clk_160 (tready = FIFO not full),
// AXI4-Stream master per channel on clk_100 (tvalid = FIFO not empty, words
// appear 2-3 clk_100 cycles after they are written).
module dma_management #(
  parameter int unsigned N_CH    = 4,
  parameter int unsigned FIFO_AW = 10
) (
  input  logic            clk_160,
  input  logic            rst160_n,
  input  logic [31:0]     s_axis_tdata [N_CH],
  input  logic [N_CH-1:0] s_axis_tvalid,
  input  logic [N_CH-1:0] s_axis_tlast,
  output logic [N_CH-1:0] s_axis_tready,
  input  logic            clk_100,
  input  logic            rst100_n,
  output logic [31:0]     m_axis_tdata [N_CH],
  output logic [N_CH-1:0] m_axis_tvalid,
  output logic [N_CH-1:0] m_axis_tlast,
  input  logic [N_CH-1:0] m_axis_tready
);
  for (genvar i = 0; i < N_CH; i++) begin : g_ch
    logic full, empty;

    async_fifo #(.W(33), .AW(FIFO_AW)) u_fifo (
      .wclk(clk_160), .wrst_n(rst160_n), .wr_en(s_axis_tvalid[i] && !full),
      .wdata({s_axis_tlast[i], s_axis_tdata[i]}), .full(full),
      .rclk(clk_100), .rrst_n(rst100_n), .rd_en(m_axis_tready[i] && !empty),
      .rdata({m_axis_tlast[i], m_axis_tdata[i]}), .empty(empty));

    assign s_axis_tready[i] = !full;
    assign m_axis_tvalid[i] = !empty;
  end
endmodule
