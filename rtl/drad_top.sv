// drad_top: programmable logic of a four-channel pixel-telescope DAQ.
//
// One FPGA-plus-processor chip replaces a rack of test-beam back-end
// equipment: the processor runs Linux and the control software, the logic
// here reads out up to four pixel readout chips at the same time, each with
// its own ADC, reference DACs and trigger link to the telescope's Trigger
// Logic Unit (TLU). The blocks and their connections follow the document's
// block diagram:
//
//   AXI4-Lite --> axi_converter --> r4s_management --> chips, ADCs, DACs, TLU
//                                        |
//                   pixel streams (160 MHz)
//                                        v
//   DMA engines <-- dma_management (per-channel clock-crossing FIFOs, 100 MHz)
//
//   clock_reset_mgmt gives each of the 40 / 160 / 100 MHz domains its reset.
//
// Outside this RTL, and connected through ports: the clock generator (clocks
// and lock flag in), the processor (AXI4-Lite port), the DMA engines and their
// AXI4 interconnect (one pixel stream per channel out, 100 MHz), the I2C buses
// (open-drain enables out, line levels in), the chip control lines, ADCs and
// TLU trigger/busy lines.
module drad_top
  import drad_pkg::*;
#(
  parameter int unsigned N_CH     = 4,
  parameter int unsigned COLS     = 155,
  parameter int unsigned ROWS     = 160,
  parameter int unsigned T_RST    = 24,
  parameter int unsigned T_SHORT  = 1,
  parameter int unsigned T_SAMPLE = 3,
  parameter int unsigned T_CAL    = 16,
  parameter int unsigned ADC_LAT  = 4,
  parameter int unsigned I2C_HZ   = 100_000,
  parameter int unsigned FIFO_AW  = 10
) (
  input  logic             clk_40,
  input  logic             clk_160,
  input  logic             clk_100,
  input  logic             arst_n,
  input  logic             mmcm_locked,
  // AXI4-Lite control (clk_100)
  input  logic [7:0]       s_axil_awaddr,
  input  logic             s_axil_awvalid,
  output logic             s_axil_awready,
  input  logic [31:0]      s_axil_wdata,
  input  logic [3:0]       s_axil_wstrb,
  input  logic             s_axil_wvalid,
  output logic             s_axil_wready,
  output logic [1:0]       s_axil_bresp,
  output logic             s_axil_bvalid,
  input  logic             s_axil_bready,
  input  logic [7:0]       s_axil_araddr,
  input  logic             s_axil_arvalid,
  output logic             s_axil_arready,
  output logic [31:0]      s_axil_rdata,
  output logic [1:0]       s_axil_rresp,
  output logic             s_axil_rvalid,
  input  logic             s_axil_rready,
  // pixel streams to the DMA engines (clk_100)
  output logic [31:0]      m_axis_tdata [N_CH],
  output logic [N_CH-1:0]  m_axis_tvalid,
  output logic [N_CH-1:0]  m_axis_tlast,
  input  logic [N_CH-1:0]  m_axis_tready,
  // I2C
  output logic [N_CH-1:0]  i2c_scl_oe,
  output logic [N_CH-1:0]  i2c_sda_oe,
  input  logic [N_CH-1:0]  i2c_scl_i,
  input  logic [N_CH-1:0]  i2c_sda_i,
  // chip control
  output logic [N_CH-1:0]  r4s_rbi,
  output logic [N_CH-1:0]  r4s_phi1,
  output logic [N_CH-1:0]  r4s_phi2,
  output logic [N_CH-1:0]  r4s_sclk,
  output logic [N_CH-1:0]  r4s_la,
  output logic [N_CH-1:0]  r4s_cal_ena,
  output logic [N_CH-1:0]  r4s_cal_pulse,
  output logic [N_CH-1:0]  r4s_hold,
  // ADCs
  output logic [N_CH-1:0]  adc_pd,
  output logic [N_CH-1:0]  adc_clk,
  input  logic [ADC_W-1:0] adc_data [N_CH],
  // TLU
  input  logic [N_CH-1:0]  tlu_trig,
  output logic [N_CH-1:0]  tlu_busy
);
  logic rst40_n, rst160_n, rst100_n;

  clock_reset_mgmt u_clkrst (
    .clk_40, .clk_160, .clk_100, .arst_n, .mmcm_locked, .rst40_n, .rst160_n, .rst100_n);

  logic [N_CH-1:0] cmd_valid, cmd_full;
  logic [31:0]     cmd_data;
  ch_status_t      status [N_CH];

  axi_converter #(.N_CH(N_CH), .ADDR_W(8)) u_axi (
    .clk(clk_100), .rst_n(rst100_n),
    .s_axil_awaddr, .s_axil_awvalid, .s_axil_awready, .s_axil_wdata, .s_axil_wstrb,
    .s_axil_wvalid, .s_axil_wready, .s_axil_bresp, .s_axil_bvalid, .s_axil_bready,
    .s_axil_araddr, .s_axil_arvalid, .s_axil_arready, .s_axil_rdata, .s_axil_rresp,
    .s_axil_rvalid, .s_axil_rready,
    .cmd_valid, .cmd_data, .cmd_full, .status);

  logic [31:0]     px_tdata [N_CH];
  logic [N_CH-1:0] px_tvalid, px_tlast, px_tready;

  r4s_management #(
    .N_CH(N_CH), .COLS(COLS), .ROWS(ROWS), .T_RST(T_RST), .T_SHORT(T_SHORT), .T_SAMPLE(T_SAMPLE),
    .T_CAL(T_CAL), .ADC_LAT(ADC_LAT), .CLK_HZ(40_000_000), .I2C_HZ(I2C_HZ)
  ) u_mgmt (
    .clk_100, .rst100_n, .clk_40, .rst40_n, .clk_160, .rst160_n,
    .cmd_valid, .cmd_data, .cmd_full, .status,
    .i2c_scl_oe, .i2c_sda_oe, .i2c_scl_i, .i2c_sda_i,
    .r4s_rbi, .r4s_phi1, .r4s_phi2, .r4s_sclk, .r4s_la, .r4s_cal_ena, .r4s_cal_pulse, .r4s_hold,
    .adc_pd, .adc_clk, .adc_data, .tlu_trig, .tlu_busy,
    .m_axis_tdata(px_tdata), .m_axis_tvalid(px_tvalid), .m_axis_tlast(px_tlast), .m_axis_tready(px_tready));

  dma_management #(.N_CH(N_CH), .FIFO_AW(FIFO_AW)) u_dma (
    .clk_160, .rst160_n,
    .s_axis_tdata(px_tdata), .s_axis_tvalid(px_tvalid), .s_axis_tlast(px_tlast), .s_axis_tready(px_tready),
    .clk_100, .rst100_n,
    .m_axis_tdata, .m_axis_tvalid, .m_axis_tlast, .m_axis_tready);
endmodule
