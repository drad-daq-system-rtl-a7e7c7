// tb_drad_top_full: the DAQ logic with every parameter at its default
// (4 channels, 155 x 160 matrix, 150/5/15 ns phases, 100 kHz I2C, 1024-word
// data FIFOs), taken through the two measurements the DAQ was validated with.
// Through the AXI4-Lite port it programs one reference DAC on channel 0,
// switches all ADCs on and reads one full frame on all four channels at the
// same time: channels 0 and 1 plain, channels 2 and 3 in calibration mode
// (test pulse injected on every row). Then it runs a one-pixel calibration
// test on channel 1. Every one of the 4 x 24 800 words is checked against the
// chip model's pattern, flags and tlast. Timing checks: a frame takes 99 568
// clocks of 160 MHz (622.3 us), 102 128 (638.3 us) with calibration, and the
// I2C bit time is 400 clocks of 40 MHz (100 kHz).
module tb_drad_top_full;
  import drad_pkg::*;
  localparam int N = 4, C = 155, R = 160;
  logic clk_40 = 0, clk_160 = 0, clk_100 = 0, arst_n = 0, mmcm_locked = 0;
  logic [7:0] awaddr, araddr;
  logic awvalid, awready, wvalid, wready, bvalid, bready, arvalid, arready, rvalid, rready;
  logic [31:0] wdata, rdata;
  logic [3:0] wstrb;
  logic [1:0] bresp, rresp;
  logic [31:0] m_tdata [N];
  logic [N-1:0] m_tvalid, m_tlast, m_tready = '1;
  logic [N-1:0] scl_oe, sda_oe, sda_pull, rbi, phi1, phi2, sclk, la, cal_ena, cal_pulse, hold, adc_pd, adc_clk;
  logic [N-1:0] tlu_trig = '0, tlu_busy;
  logic [11:0] adc_data [N];
  wire  [N-1:0] scl = ~scl_oe;
  wire  [N-1:0] sda = ~(sda_oe | sda_pull);
  int nack_at [N];
  int checks = 0, failures = 0;
  localparam int SEL_C = 77, SEL_R = 80;
  int nwords [N], bad [N], nlast [N], busy_cyc [N], idx [N];
  logic [N-1:0] exp_cal = 4'b1100;
  logic exp_single = 1'b0;

  drad_top dut (
    .clk_40, .clk_160, .clk_100, .arst_n, .mmcm_locked,
    .s_axil_awaddr(awaddr), .s_axil_awvalid(awvalid), .s_axil_awready(awready),
    .s_axil_wdata(wdata), .s_axil_wstrb(wstrb), .s_axil_wvalid(wvalid), .s_axil_wready(wready),
    .s_axil_bresp(bresp), .s_axil_bvalid(bvalid), .s_axil_bready(bready),
    .s_axil_araddr(araddr), .s_axil_arvalid(arvalid), .s_axil_arready(arready),
    .s_axil_rdata(rdata), .s_axil_rresp(rresp), .s_axil_rvalid(rvalid), .s_axil_rready(rready),
    .m_axis_tdata(m_tdata), .m_axis_tvalid(m_tvalid), .m_axis_tlast(m_tlast), .m_axis_tready(m_tready),
    .i2c_scl_oe(scl_oe), .i2c_sda_oe(sda_oe), .i2c_scl_i(scl), .i2c_sda_i(sda),
    .r4s_rbi(rbi), .r4s_phi1(phi1), .r4s_phi2(phi2), .r4s_sclk(sclk), .r4s_la(la),
    .r4s_cal_ena(cal_ena), .r4s_cal_pulse(cal_pulse), .r4s_hold(hold),
    .adc_pd, .adc_clk, .adc_data, .tlu_trig, .tlu_busy);

  axil_master_bfm bus (.clk(clk_100), .awaddr, .awvalid, .awready, .wdata, .wstrb, .wvalid, .wready,
                       .bresp, .bvalid, .bready, .araddr, .arvalid, .arready, .rdata, .rvalid, .rready);

  always #12.5  clk_40  = ~clk_40;
  always #3.125 clk_160 = ~clk_160;
  always #5     clk_100 = ~clk_100;

  function automatic logic [11:0] pv(input int r, input int c);
    return 12'((r * 7 + c * 13) % 2048);
  endfunction

  for (genvar i = 0; i < N; i++) begin : g
    r4s_chip_model #(.ADC_LAT(4)) chip (.clk(clk_160), .rbi(rbi[i]), .phi1(phi1[i]), .sclk(sclk[i]), .la(la[i]),
      .cal_ena(cal_ena[i]), .cal_pulse(cal_pulse[i]), .adc_pd(adc_pd[i]), .adc_data(adc_data[i]));
    i2c_slave_model slv (.clk(clk_40), .scl(scl[i]), .sda(sda[i]), .nack_at(nack_at[i]), .sda_pull(sda_pull[i]));
    always @(posedge clk_100) if (arst_n && m_tvalid[i] && m_tready[i]) begin
      pix_word_t w;
      int k, er, ec;
      logic [11:0] ev;
      logic [3:0] ef;
      logic el;
      w = pix_word_t'(m_tdata[i]);
      k = idx[i];
      if (exp_single) begin
        er = SEL_R; ec = SEL_C; ef = 4'b0111; el = 1'b1;
      end else begin
        er = k / C; ec = k % C; ef = {1'b0, exp_cal[i], k == 0, 1'b0}; el = (k == C*R-1);
      end
      ev = pv(er, ec) + ((exp_cal[i] || exp_single) ? 12'd2048 : 12'd0);
      if (w.row != 8'(er) || w.col != 8'(ec) || w.adc != ev || w.flags != pix_flags_t'(ef) ||
          m_tlast[i] != el) begin
        if (bad[i] < 3) $display("ch%0d word %0d: %h", i, k, m_tdata[i]);
        bad[i]++;
      end
      if (m_tlast[i]) nlast[i]++;
      idx[i] = m_tlast[i] ? 0 : k + 1;
      nwords[i]++;
    end
    always @(posedge clk_160) if (arst_n && dut.u_mgmt.g_ch[i].seq_busy) busy_cyc[i]++;
  end

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #3ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [1:0] resp;
    logic [31:0] d;
    int held, t;
    for (int i = 0; i < N; i++) nack_at[i] = -1;
    #100 mmcm_locked = 1;
    #50 arst_n = 1;
    #200;
    bus.write(8'h00, {4'(OP_I2C_WRITE), 5'd0, 7'h2C, 8'h3F, 8'hF0}, resp, held);
    for (int i = 0; i < N; i++) bus.write(8'(16*i), {4'(OP_ADC_CTRL), 28'd1}, resp, held);
    // channels 0 and 1: plain frame; channels 2 and 3: frame in calibration mode
    for (int i = 0; i < N; i++) bus.write(8'(16*i), {4'(OP_READ_FRAME), 27'd0, exp_cal[i]}, resp, held);
    t = 0;
    do begin #20us; bus.read(8'h24, d); t++; end while (d[2] && t < 100);
    #5us;
    for (int i = 0; i < N; i++) begin
      chk(nwords[i] == C*R, $sformatf("ch%0d: %0d words, expected %0d", i, nwords[i], C*R));
      chk(bad[i] == 0, $sformatf("ch%0d: %0d wrong words", i, bad[i]));
      chk(nlast[i] == 1, $sformatf("ch%0d: %0d tlast", i, nlast[i]));
      chk(busy_cyc[i] == (exp_cal[i] ? 102128 : 99568),
          $sformatf("ch%0d: frame took %0d clocks of 160 MHz", i, busy_cyc[i]));
    end
    chk(g[0].slv.bytes.size() == 3 && g[0].slv.bytes[0] == 8'h58 && g[0].slv.bytes[1] == 8'h3F &&
        g[0].slv.bytes[2] == 8'hF0, "I2C write to channel 0");
    chk(g[0].slv.bit_period == 400, $sformatf("SCL period %0d clocks of 40 MHz", g[0].slv.bit_period));
    bus.read(8'h04, d);
    chk(!d[1] && !d[5] && d[6], $sformatf("ch0 status %h: no NACK, no overflow, ADC on", d[7:0]));
    $display("frame: %0d pixels per channel, %0.1f us plain, %0.1f us with calibration",
             nwords[0], busy_cyc[0] * 6.25 / 1000.0, busy_cyc[2] * 6.25 / 1000.0);
    // one-pixel calibration test on channel 1
    exp_single = 1'b1;
    busy_cyc[1] = 0;
    bus.write(8'h10, {4'(OP_CAL_PIXEL), 12'd0, 8'(SEL_C), 8'(SEL_R)}, resp, held);
    t = 0;
    do begin #20us; bus.read(8'h14, d); t++; end while (d[2] && t < 100);
    #5us;
    chk(nwords[1] == C*R + 1 && bad[1] == 0 && nlast[1] == 2, $sformatf("one-pixel test: %0d words, %0d wrong", nwords[1] - C*R, bad[1]));
    chk(busy_cyc[1] == 102128, $sformatf("one-pixel test scan took %0d clocks", busy_cyc[1]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
