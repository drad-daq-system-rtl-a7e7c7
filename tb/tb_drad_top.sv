// tb_drad_top: end-to-end test of the DAQ logic at reduced matrix size
// (8 columns x 4 rows), a 16-word data FIFO and a 1 MHz I2C clock. The
// processor side is an AXI4-Lite master and one DMA-side stream consumer per
// channel at 100 MHz; each channel has a chip/ADC model, an I2C target and a
// TLU trigger line. Every stream word is checked against the chip model's
// pattern. Each mechanism of the design must happen at least once:
//   reset release, command-queue back-pressure on the bus, I2C write with
//   ACK, I2C NACK, ADC power-up, normal frame, calibration frame, single-pixel
//   calibration, triggered frame, trigger ignored while BUSY, data FIFO
//   back-pressure, dropped word / overflow flag, status and ID read-back.
module tb_drad_top;
  import drad_pkg::*;
  localparam int N = 4, C = 8, R = 4, LAT = 4;
  logic clk_40 = 0, clk_160 = 0, clk_100 = 0, arst_n = 0, mmcm_locked = 0;
  logic [7:0] awaddr, araddr;
  logic awvalid, awready, wvalid, wready, bvalid, bready, arvalid, arready, rvalid, rready;
  logic [31:0] wdata, rdata;
  logic [3:0] wstrb;
  logic [1:0] bresp, rresp;
  logic [31:0] m_tdata [N];
  logic [N-1:0] m_tvalid, m_tlast, m_tready;
  logic [N-1:0] scl_oe, sda_oe, sda_pull, rbi, phi1, phi2, sclk, la, cal_ena, cal_pulse, hold, adc_pd, adc_clk;
  logic [N-1:0] tlu_trig = '0, tlu_busy;
  logic [11:0] adc_data [N];
  wire  [N-1:0] scl = ~scl_oe;
  wire  [N-1:0] sda = ~(sda_oe | sda_pull);
  int nack_at [N];
  bit dma_stall [N];
  int checks = 0, failures = 0;
  pix_word_t words [N][$];
  logic      lasts [N][$];

  drad_top #(.COLS(C), .ROWS(R), .I2C_HZ(1_000_000), .FIFO_AW(4), .ADC_LAT(LAT)) dut (
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

  // Mechanism counters.
  int n_reset = 0, n_cmd_held = 0, n_i2c_ack = 0, n_i2c_nack = 0, n_adc_on = 0, n_frame = 0, n_cal_frame = 0,
      n_single = 0, n_trig_frame = 0, n_trig_ignored = 0, n_fifo_full = 0, n_dropped = 0, n_status = 0;

  for (genvar i = 0; i < N; i++) begin : g
    r4s_chip_model #(.ADC_LAT(LAT)) chip (.clk(clk_160), .rbi(rbi[i]), .phi1(phi1[i]), .sclk(sclk[i]), .la(la[i]),
      .cal_ena(cal_ena[i]), .cal_pulse(cal_pulse[i]), .adc_pd(adc_pd[i]), .adc_data(adc_data[i]));
    i2c_slave_model slv (.clk(clk_40), .scl(scl[i]), .sda(sda[i]), .nack_at(nack_at[i]), .sda_pull(sda_pull[i]));
    always @(negedge clk_100) m_tready[i] <= !dma_stall[i];
    always @(posedge clk_100) if (arst_n && m_tvalid[i] && m_tready[i]) begin
      words[i].push_back(pix_word_t'(m_tdata[i])); lasts[i].push_back(m_tlast[i]);
    end
    always @(posedge clk_160) if (arst_n && dut.rst160_n) begin
      if (dut.u_mgmt.g_ch[i].u_sensor.ev_trig_ignored) n_trig_ignored++;
      if (dut.u_mgmt.g_ch[i].u_sensor.ev_dropped) n_dropped++;
      if (dut.px_tvalid[i] && !dut.px_tready[i]) n_fifo_full++;
    end
  end

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic cmd(input int ch, input opcode_e op, input logic [27:0] arg);
    logic [1:0] resp; int held;
    bus.write(8'(16*ch), {op, arg}, resp, held);
    if (held > 0) n_cmd_held++;
    chk(resp == 2'b00, $sformatf("command to ch%0d accepted", ch));
  endtask

  function automatic logic [11:0] pv(input int r, input int c, input logic cal);
    return 12'(((r * 7 + c * 13) % 2048) + (cal ? 2048 : 0));
  endfunction

  // Take one frame's words off a channel's queue and check them.
  task automatic take_frame(input int ch, input logic cal, input logic trig, input string name);
    int bad = 0;
    if (words[ch].size() < C*R) begin
      chk(0, $sformatf("%s: ch%0d has only %0d words", name, ch, words[ch].size()));
      return;
    end
    for (int k = 0; k < C*R; k++) begin
      pix_word_t w = words[ch].pop_front();
      logic l = lasts[ch].pop_front();
      if (w.row != 8'(k / C) || w.col != 8'(k % C) || w.adc != pv(k / C, k % C, cal) ||
          w.flags.cal != cal || w.flags.triggered != trig || w.flags.first != (k == 0) || l != (k == C*R-1)) begin
        if (bad < 4) $display("  %s ch%0d word %0d: %h last=%b expected adc %h", name, ch, k, w, l, pv(k / C, k % C, cal));
        bad++;
      end
    end
    chk(bad == 0, $sformatf("%s: ch%0d %0d wrong words", name, ch, bad));
    if (bad == 0) begin
      if (trig) n_trig_frame++; else if (cal) n_cal_frame++; else n_frame++;
    end
  endtask

  task automatic wait_idle(input int ch);
    logic [31:0] st;
    int t = 0;
    do begin #2us; bus.read(8'(16*ch + 4), st); t++; end
    while ((st[2] || st[3] || st[0]) && t < 200);   // seq_busy, tlu_busy, i2c_busy
    #2us;
  endtask

  initial begin
    #5ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d;
    for (int i = 0; i < N; i++) begin nack_at[i] = -1; dma_stall[i] = 0; end
    nack_at[1] = 0;                      // no DAC answers on channel 1
    #100 mmcm_locked = 1;
    #50 arst_n = 1;
    #200;
    if (dut.rst40_n && dut.rst160_n && dut.rst100_n) n_reset++;
    chk(n_reset == 1, "all domains out of reset");

    bus.read(8'h40, d);
    chk(d == 32'h4452_4144, "ID register");

    // Reference DACs.
    cmd(0, OP_I2C_WRITE, {5'd0, 7'h2C, 8'hA1, 8'h5E});
    cmd(1, OP_I2C_WRITE, {5'd0, 7'h2C, 8'hA1, 8'h5E});
    for (int i = 0; i < N; i++) cmd(i, OP_ADC_CTRL, 28'd1);
    wait_idle(0); wait_idle(1);
    if (g[0].slv.bytes.size() == 3 && g[0].slv.bytes[1] == 8'hA1 && g[0].slv.bytes[2] == 8'h5E) n_i2c_ack++;
    bus.read(8'h14, d);
    if (d[1]) n_i2c_nack++;
    bus.read(8'h04, d);
    chk(!d[1] && d[6], "ch0: no NACK, ADC on");
    if (d[6]) n_adc_on++;
    n_status++;

    // All four channels at once: normal, calibration, single pixel, triggered.
    cmd(3, OP_ARM, 28'd0);
    cmd(0, OP_READ_FRAME, 28'd0);
    cmd(1, OP_READ_FRAME, 28'd1);
    cmd(2, OP_CAL_PIXEL, {12'd0, 8'd5, 8'd2});
    #1us tlu_trig[3] = 1; #100 tlu_trig[3] = 0;
    #300 tlu_trig[3] = 1; #100 tlu_trig[3] = 0;   // during the frame: ignored
    wait_idle(0); wait_idle(1); wait_idle(2); wait_idle(3);
    take_frame(0, 0, 0, "normal");
    take_frame(1, 1, 0, "calibration");
    take_frame(3, 0, 1, "triggered");
    if (words[2].size() == 1 && words[2][0].col == 5 && words[2][0].row == 2 &&
        words[2][0].adc == pv(2, 5, 1) && words[2][0].flags.single && lasts[2][0]) n_single++;
    words[2].delete(); lasts[2].delete();
    cmd(3, OP_DISARM, 28'd0);

    // Command queue back-pressure: 24 frame commands for channel 0 at once.
    for (int k = 0; k < 24; k++) cmd(0, OP_READ_FRAME, 28'd0);
    wait_idle(0);
    for (int k = 0; k < 24; k++) take_frame(0, 0, 0, "queued");

    // Data FIFO back-pressure and overflow: the DMA on channel 2 stops.
    dma_stall[2] = 1;
    cmd(2, OP_READ_FRAME, 28'd0);
    wait_idle(2);
    bus.read(8'h24, d);
    chk(d[5], "ch2 overflow flag set");
    if (d[5]) n_status++;
    dma_stall[2] = 1'b0;
    #2us;
    chk(words[2].size() == 17, $sformatf("ch2 kept 16 FIFO words + 1 held word, got %0d", words[2].size()));
    words[2].delete(); lasts[2].delete();
    cmd(2, OP_READ_FRAME, 28'd1);
    wait_idle(2);
    take_frame(2, 1, 0, "after overflow");
    bus.read(8'h24, d);
    chk(!d[5], "ch2 overflow cleared by the next frame command");

    for (int i = 0; i < N; i++) chk(words[i].size() == 0, $sformatf("ch%0d no stray words", i));

    $display("mechanisms: reset=%0d cmd_held=%0d i2c_ack=%0d i2c_nack=%0d adc_on=%0d frame=%0d cal_frame=%0d single=%0d",
             n_reset, n_cmd_held, n_i2c_ack, n_i2c_nack, n_adc_on, n_frame, n_cal_frame, n_single);
    $display("            trig_frame=%0d trig_ignored=%0d fifo_full=%0d dropped=%0d status=%0d",
             n_trig_frame, n_trig_ignored, n_fifo_full, n_dropped, n_status);
    chk(n_reset > 0, "mechanism: reset release");
    chk(n_cmd_held > 0, "mechanism: command queue back-pressure");
    chk(n_i2c_ack > 0, "mechanism: I2C write");
    chk(n_i2c_nack > 0, "mechanism: I2C NACK");
    chk(n_adc_on > 0, "mechanism: ADC power-up");
    chk(n_frame > 0, "mechanism: normal frame");
    chk(n_cal_frame > 0, "mechanism: calibration frame");
    chk(n_single > 0, "mechanism: single-pixel calibration");
    chk(n_trig_frame > 0, "mechanism: triggered frame");
    chk(n_trig_ignored > 0, "mechanism: trigger ignored while BUSY");
    chk(n_fifo_full > 0, "mechanism: data FIFO back-pressure");
    chk(n_dropped > 0, "mechanism: dropped word");
    chk(n_status > 0, "mechanism: status read-back");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
