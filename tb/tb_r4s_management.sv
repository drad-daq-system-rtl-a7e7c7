// tb_r4s_management: all four channels on a 5 x 3 matrix, each with its own
// chip/ADC model and I2C target. Commands enter at 100 MHz. Checks that an
// I2C write queued for a channel appears on that channel's bus only, that each
// channel runs the frame asked of it (normal, calibration, single pixel,
// triggered) at the same time as the others and streams the right words, and
// that the status vector reports I2C NACK, ADC and armed state per channel.
module tb_r4s_management;
  import drad_pkg::*;
  localparam int N = 4, C = 5, R = 3, LAT = 4;
  logic clk_100 = 0, clk_40 = 0, clk_160 = 0, rst_n = 0;
  logic [N-1:0] cmd_valid = '0, cmd_full;
  logic [31:0] cmd_data = '0;
  ch_status_t status [N];
  logic [N-1:0] scl_oe, sda_oe, sda_pull, rbi, phi1, phi2, sclk, la, cal_ena, cal_pulse, hold, adc_pd, adc_clk;
  logic [N-1:0] tlu_trig = '0, tlu_busy, tvalid, tlast;
  logic [11:0] adc_data [N];
  logic [31:0] tdata [N];
  wire  [N-1:0] scl = ~scl_oe;
  wire  [N-1:0] sda = ~(sda_oe | sda_pull);
  int nack_at [N];
  int checks = 0, failures = 0;
  pix_word_t words [N][$];

  r4s_management #(.N_CH(N), .COLS(C), .ROWS(R), .ADC_LAT(LAT), .I2C_HZ(1_000_000)) dut (
    .clk_100, .rst100_n(rst_n), .clk_40, .rst40_n(rst_n), .clk_160, .rst160_n(rst_n),
    .cmd_valid, .cmd_data, .cmd_full, .status,
    .i2c_scl_oe(scl_oe), .i2c_sda_oe(sda_oe), .i2c_scl_i(scl), .i2c_sda_i(sda),
    .r4s_rbi(rbi), .r4s_phi1(phi1), .r4s_phi2(phi2), .r4s_sclk(sclk), .r4s_la(la),
    .r4s_cal_ena(cal_ena), .r4s_cal_pulse(cal_pulse), .r4s_hold(hold),
    .adc_pd, .adc_clk, .adc_data, .tlu_trig, .tlu_busy,
    .m_axis_tdata(tdata), .m_axis_tvalid(tvalid), .m_axis_tlast(tlast), .m_axis_tready('1));

  for (genvar i = 0; i < N; i++) begin : g
    r4s_chip_model #(.ADC_LAT(LAT)) chip (.clk(clk_160), .rbi(rbi[i]), .phi1(phi1[i]), .sclk(sclk[i]), .la(la[i]),
      .cal_ena(cal_ena[i]), .cal_pulse(cal_pulse[i]), .adc_pd(adc_pd[i]), .adc_data(adc_data[i]));
    i2c_slave_model slv (.clk(clk_40), .scl(scl[i]), .sda(sda[i]), .nack_at(nack_at[i]), .sda_pull(sda_pull[i]));
    always @(posedge clk_160) if (rst_n && tvalid[i]) words[i].push_back(pix_word_t'(tdata[i]));
  end

  always #5     clk_100 = ~clk_100;
  always #12.5  clk_40  = ~clk_40;
  always #3.125 clk_160 = ~clk_160;

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic send(input int ch, input opcode_e op, input logic [27:0] arg);
    @(negedge clk_100);
    while (cmd_full[ch]) @(negedge clk_100);
    cmd_valid[ch] = 1; cmd_data = {op, arg};
    @(negedge clk_100) cmd_valid = '0;
  endtask

  function automatic logic [11:0] pv(input int r, input int c, input logic cal);
    return 12'(((r * 7 + c * 13) % 2048) + (cal ? 2048 : 0));
  endfunction

  task automatic check_frame(input int ch, input logic cal, input logic trig);
    int bad = 0;
    chk(words[ch].size() == C*R, $sformatf("ch%0d: %0d words", ch, words[ch].size()));
    foreach (words[ch][k]) begin
      pix_word_t w = words[ch][k];
      if (w.row != 8'(k / C) || w.col != 8'(k % C) || w.adc != pv(k / C, k % C, cal) ||
          w.flags.cal != cal || w.flags.triggered != trig) bad++;
    end
    chk(bad == 0, $sformatf("ch%0d: %0d wrong words", ch, bad));
  endtask

  initial begin
    #2ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < N; i++) nack_at[i] = (i == 2) ? 0 : -1;
    #100 rst_n = 1;
    #200;
    // I2C: channel 0 acknowledged, channel 2 has no device.
    send(0, OP_I2C_WRITE, {5'd0, 7'h2C, 8'h12, 8'h34});
    send(2, OP_I2C_WRITE, {5'd0, 7'h2D, 8'h56, 8'h78});
    for (int i = 0; i < N; i++) send(i, OP_ADC_CTRL, 28'd1);
    send(3, OP_ARM, 28'd1);
    send(0, OP_READ_FRAME, 28'd0);
    send(1, OP_READ_FRAME, 28'd1);
    send(2, OP_CAL_PIXEL, {12'd0, 8'd4, 8'd1});
    #500 tlu_trig[3] = 1; #50 tlu_trig[3] = 0;
    #60us;
    chk(g[0].slv.bytes.size() == 3 && g[0].slv.bytes[0] == 8'h58 && g[0].slv.bytes[1] == 8'h12 && g[0].slv.bytes[2] == 8'h34,
        "ch0 I2C bytes");
    chk(g[1].slv.starts == 0 && g[3].slv.starts == 0, "no I2C traffic on channels 1 and 3");
    chk(g[2].slv.bytes.size() == 1, "ch2 stops after the refused address");
    chk(!status[0].i2c_nack && status[2].i2c_nack, "NACK status per channel");
    chk(status[3].armed && !status[0].armed, "armed status per channel");
    chk(status[1].adc_on && !status[1].seq_busy, "ADC on and frames finished");
    check_frame(0, 0, 0);
    check_frame(1, 1, 0);
    check_frame(3, 1, 1);
    chk(words[2].size() == 1 && words[2][0].col == 4 && words[2][0].row == 1 && words[2][0].adc == pv(1, 4, 1),
        "ch2 single pixel");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
