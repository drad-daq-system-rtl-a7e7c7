// r4s_management: management of the pixel chips, all channels.
//
// This is the core of the DAQ logic. It holds the command queues and decoder
// (r4s_registers), one write-only I2C controller per channel for the
// reference-voltage DACs on that channel's adapter board (i2c_master), and one
// sensor block per channel that drives the chip, handles the TLU trigger,
// controls the ADC and streams the captured pixels (r4s_sensor). The split
// into registers, I2C controllers and sensor blocks follows the document's
// block diagram; one I2C controller and one sensor block per channel is this
// design's reading of it.
//
// Clock domains: commands enter at 100 MHz, are decoded and drive the I2C
// controllers at 40 MHz, and run the chips and the pixel streams at 160 MHz.
// The status vector mixes domains; its reader synchronizes it.
module r4s_management
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
  parameter int unsigned CLK_HZ   = 40_000_000,
  parameter int unsigned I2C_HZ   = 100_000
) (
  input  logic             clk_100,
  input  logic             rst100_n,
  input  logic             clk_40,
  input  logic             rst40_n,
  input  logic             clk_160,
  input  logic             rst160_n,
  // commands (clk_100)
  input  logic [N_CH-1:0]  cmd_valid,
  input  logic [31:0]      cmd_data,
  output logic [N_CH-1:0]  cmd_full,
  output ch_status_t       status [N_CH],
  // I2C to the adapter-board DACs (open drain: oe = pull low)
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
  output logic [N_CH-1:0]  tlu_busy,
  // pixel streams (clk_160)
  output logic [31:0]      m_axis_tdata [N_CH],
  output logic [N_CH-1:0]  m_axis_tvalid,
  output logic [N_CH-1:0]  m_axis_tlast,
  input  logic [N_CH-1:0]  m_axis_tready
);
  logic [N_CH-1:0] i2c_req, i2c_busy, i2c_nack;
  logic [6:0]      i2c_addr [N_CH];
  logic [7:0]      i2c_b0   [N_CH];
  logic [7:0]      i2c_b1   [N_CH];
  logic [N_CH-1:0] s_cmd_valid, s_cmd_ready;
  logic [31:0]     s_cmd    [N_CH];

  r4s_registers #(.N_CH(N_CH)) u_regs (
    .clk_100, .rst100_n, .cmd_valid, .cmd_data, .cmd_full,
    .clk_40, .rst40_n, .i2c_req, .i2c_addr, .i2c_b0, .i2c_b1, .i2c_busy,
    .r4s_cmd_valid(s_cmd_valid), .r4s_cmd(s_cmd), .r4s_cmd_ready(s_cmd_ready));

  for (genvar i = 0; i < N_CH; i++) begin : g_ch
    logic armed, seq_busy, adc_on, overflow;

    i2c_master #(.CLK_HZ(CLK_HZ), .I2C_HZ(I2C_HZ)) u_i2c (
      .clk(clk_40), .rst_n(rst40_n), .req(i2c_req[i]), .addr(i2c_addr[i]), .b0(i2c_b0[i]), .b1(i2c_b1[i]),
      .busy(i2c_busy[i]), .nack(i2c_nack[i]), .scl_oe(i2c_scl_oe[i]), .sda_oe(i2c_sda_oe[i]),
      .scl_i(i2c_scl_i[i]), .sda_i(i2c_sda_i[i]));

    r4s_sensor #(
      .COLS(COLS), .ROWS(ROWS), .T_RST(T_RST), .T_SHORT(T_SHORT), .T_SAMPLE(T_SAMPLE),
      .T_CAL(T_CAL), .ADC_LAT(ADC_LAT)
    ) u_sensor (
      .clk_40, .rst40_n, .cmd_valid(s_cmd_valid[i]), .cmd(s_cmd[i]), .cmd_ready(s_cmd_ready[i]),
      .clk_160, .rst160_n,
      .r4s_rbi(r4s_rbi[i]), .r4s_phi1(r4s_phi1[i]), .r4s_phi2(r4s_phi2[i]), .r4s_sclk(r4s_sclk[i]),
      .r4s_la(r4s_la[i]), .r4s_cal_ena(r4s_cal_ena[i]), .r4s_cal_pulse(r4s_cal_pulse[i]), .r4s_hold(r4s_hold[i]),
      .adc_pd(adc_pd[i]), .adc_clk(adc_clk[i]), .adc_data(adc_data[i]),
      .tlu_trig(tlu_trig[i]), .tlu_busy(tlu_busy[i]),
      .m_axis_tdata(m_axis_tdata[i]), .m_axis_tvalid(m_axis_tvalid[i]), .m_axis_tlast(m_axis_tlast[i]),
      .m_axis_tready(m_axis_tready[i]),
      .armed, .seq_busy, .adc_on, .overflow,
      .ev_frame_done(), .ev_trig_ignored(), .ev_dropped());  // event strobes, for monitoring only

    assign status[i] = '{cmd_full: cmd_full[i], adc_on: adc_on, overflow: overflow, tlu_busy: tlu_busy[i],
                         armed: armed, seq_busy: seq_busy, i2c_nack: i2c_nack[i], i2c_busy: i2c_busy[i]};
  end
endmodule
