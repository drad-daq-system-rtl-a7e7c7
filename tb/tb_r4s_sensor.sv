// tb_r4s_sensor: one channel on a 6 x 4 matrix with a chip/ADC model.
// Commands are sent in the 40 MHz domain; the pixel stream is collected in
// the 160 MHz domain and every word is checked against the chip model's
// pattern (row, column, ADC value, flags, tlast). Covered: ADC on/off, normal
// and calibration frames, single-pixel calibration, two queued frames,
// triggered readout with BUSY/HOLD and an ignored second trigger, disarm,
// and overflow on a stalled stream (cleared by the next frame command).
module tb_r4s_sensor;
  import drad_pkg::*;
  localparam int C = 6, R = 4, LAT = 4;
  localparam int FRAME = 2*24 + R*(2 + C*4);
  localparam int FRAME_CAL = 2*24 + R*(2 + 16 + C*4);
  logic clk_40 = 0, clk_160 = 0, rst40_n = 0, rst160_n = 0;
  logic cmd_valid = 0, cmd_ready;
  logic [31:0] cmd = '0;
  logic rbi, phi1, phi2, sclk, la, cal_ena, cal_pulse, hold, adc_pd, adc_clk;
  logic [11:0] adc_data;
  logic tlu_trig = 0, tlu_busy;
  logic [31:0] tdata;
  logic tvalid, tlast, tready = 1;
  logic armed, seq_busy, adc_on, overflow, ev_frame_done, ev_trig_ignored, ev_dropped;
  int checks = 0, failures = 0;
  pix_word_t words [$];
  logic      lasts [$];
  int        ignored = 0, frames = 0, busy_cyc = 0, hold_bad = 0;

  r4s_sensor #(.COLS(C), .ROWS(R), .ADC_LAT(LAT)) dut (
    .clk_40, .rst40_n, .cmd_valid, .cmd, .cmd_ready, .clk_160, .rst160_n,
    .r4s_rbi(rbi), .r4s_phi1(phi1), .r4s_phi2(phi2), .r4s_sclk(sclk), .r4s_la(la),
    .r4s_cal_ena(cal_ena), .r4s_cal_pulse(cal_pulse), .r4s_hold(hold),
    .adc_pd, .adc_clk, .adc_data, .tlu_trig, .tlu_busy,
    .m_axis_tdata(tdata), .m_axis_tvalid(tvalid), .m_axis_tlast(tlast), .m_axis_tready(tready),
    .armed, .seq_busy, .adc_on, .overflow, .ev_frame_done, .ev_trig_ignored, .ev_dropped);

  r4s_chip_model #(.ADC_LAT(LAT)) chip (.clk(clk_160), .rbi, .phi1, .sclk, .la, .cal_ena, .cal_pulse, .adc_pd, .adc_data);

  always #12.5  clk_40  = ~clk_40;
  always #3.125 clk_160 = ~clk_160;

  always @(posedge clk_160) if (rst160_n) begin
    if (tvalid && tready) begin words.push_back(pix_word_t'(tdata)); lasts.push_back(tlast); end
    if (ev_trig_ignored) ignored++;
    if (ev_frame_done) frames++;
    if (seq_busy) busy_cyc++;
    if (tlu_busy != hold) hold_bad++;
  end

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic send(input opcode_e op, input logic [27:0] arg);
    @(negedge clk_40);
    while (!cmd_ready) @(negedge clk_40);
    cmd_valid = 1; cmd = {op, arg};
    @(negedge clk_40);
    cmd_valid = 0;
  endtask

  task automatic wait_frames(input int n);
    int t = 0;
    while (frames < n && t < 100000) begin @(posedge clk_160); t++; end
    repeat (LAT + 4) @(posedge clk_160);
  endtask

  // Check a whole collected frame against the model's pattern.
  task automatic check_frame(input string name, input logic cal, input logic trig);
    int bad = 0;
    chk(words.size() == C*R, $sformatf("%s: %0d words, expected %0d", name, words.size(), C*R));
    for (int i = 0; i < words.size() && i < C*R; i++) begin
      pix_word_t w = words[i];
      int r = i / C, c = i % C;
      if (w.row != 8'(r) || w.col != 8'(c) || w.adc != chip.pixel_value(r, c, cal) ||
          w.flags.cal != cal || w.flags.triggered != trig || w.flags.single ||
          w.flags.first != (i == 0) || lasts[i] != (i == C*R-1)) begin
        if (bad < 3) $display("  %s word %0d: %h", name, i, w);
        bad++;
      end
    end
    chk(bad == 0, $sformatf("%s: %0d wrong words", name, bad));
    words.delete(); lasts.delete();
  endtask

  initial begin
    #3ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100 rst40_n = 1; rst160_n = 1;
    repeat (4) @(posedge clk_40);
    chk(adc_pd && !armed && !seq_busy && !tlu_busy, "idle after reset");

    send(OP_ADC_CTRL, 28'd1);
    repeat (4) @(posedge clk_40);
    chk(adc_on && !adc_pd, "ADC enabled");

    busy_cyc = 0;
    send(OP_READ_FRAME, 28'd0);
    wait_frames(1);
    check_frame("normal frame", 0, 0);
    chk(busy_cyc == FRAME, $sformatf("frame %0d clocks, expected %0d", busy_cyc, FRAME));

    busy_cyc = 0;
    send(OP_READ_FRAME, 28'd1);
    wait_frames(2);
    check_frame("calibration frame", 1, 0);
    chk(busy_cyc == FRAME_CAL, $sformatf("calibration frame %0d clocks, expected %0d", busy_cyc, FRAME_CAL));

    // Single pixel (column 3, row 2).
    send(OP_CAL_PIXEL, {12'd0, 8'd3, 8'd2});
    wait_frames(3);
    chk(words.size() == 1, $sformatf("single pixel: %0d words", words.size()));
    if (words.size() == 1)
      chk(words[0].col == 3 && words[0].row == 2 && words[0].adc == chip.pixel_value(2, 3, 1) &&
          words[0].flags.single && words[0].flags.cal && lasts[0], $sformatf("single pixel word %h", words[0]));
    words.delete(); lasts.delete();

    // Two frames queued back to back.
    send(OP_READ_FRAME, 28'd0);
    send(OP_READ_FRAME, 28'd0);
    wait_frames(5);
    chk(words.size() == 2*C*R, $sformatf("two queued frames: %0d words", words.size()));
    words = words[C*R:$]; lasts = lasts[C*R:$];
    check_frame("second queued frame", 0, 0);

    // Triggered readout.
    send(OP_ARM, 28'd0);
    repeat (4) @(posedge clk_40);
    chk(armed, "armed");
    #7 tlu_trig = 1; #40 tlu_trig = 0;
    repeat (10) @(posedge clk_160);
    chk(tlu_busy && hold && seq_busy, "BUSY and HOLD during triggered frame");
    #100 tlu_trig = 1; #40 tlu_trig = 0;       // arrives while busy
    wait_frames(6);
    chk(!tlu_busy && !hold, "BUSY released after the frame");
    chk(ignored == 1, $sformatf("%0d ignored triggers, expected 1", ignored));
    check_frame("triggered frame", 0, 1);
    chk(hold_bad == 0, "HOLD follows BUSY");

    send(OP_DISARM, 28'd0);
    repeat (4) @(posedge clk_40);
    #7 tlu_trig = 1; #40 tlu_trig = 0;
    repeat (200) @(posedge clk_160);
    chk(!armed && !seq_busy && frames == 6 && words.size() == 0, "no frame after disarm");

    // Overflow: stall the stream for a frame.
    @(negedge clk_160) tready = 0;
    send(OP_READ_FRAME, 28'd0);
    wait_frames(7);
    chk(overflow, "overflow set by a stalled stream");
    @(negedge clk_160) tready = 1;
    repeat (4) @(posedge clk_160);
    words.delete(); lasts.delete();
    send(OP_READ_FRAME, 28'd0);
    repeat (20) @(posedge clk_160);
    chk(!overflow, "overflow cleared by the next frame command");
    wait_frames(8);
    check_frame("frame after overflow", 0, 0);

    send(OP_ADC_CTRL, 28'd0);
    repeat (4) @(posedge clk_40);
    chk(!adc_on && adc_pd, "ADC disabled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
