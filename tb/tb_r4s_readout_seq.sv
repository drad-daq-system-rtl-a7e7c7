// tb_r4s_readout_seq: checks the readout sequencer on a small 5 x 3 matrix
// and on the full 155 x 160 matrix at the default timing.
// Small matrix, normal and calibration mode: the samples come in row-major
// order with the right col/row, last marks the final pixel, the control lines
// step a chip model to the same pixel as the sample labels, the reset phases
// last T_RST clocks (150 ns), and the frame takes
//   2*T_RST + ROWS*(2*T_SHORT + cal*T_CAL + COLS*(T_SHORT+T_SAMPLE)) clocks.
// Full matrix: 24 800 samples in 99 568 clocks (622.3 us at 160 MHz).
module tb_r4s_readout_seq;
  localparam int SC = 5, SR = 3, TCAL = 4;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  always #3.125 clk = ~clk;

  // Small instance with a chip model.
  logic start = 0, cal_mode = 0;
  logic busy, done, rbi, phi1, phi2, sclk, la, cal_ena, cal_pulse, sample, last;
  logic [7:0] col, row;
  r4s_readout_seq #(.COLS(SC), .ROWS(SR), .T_CAL(TCAL)) dut (
    .clk, .rst_n, .start, .cal_mode, .busy, .done, .rbi, .phi1, .phi2, .sclk, .la,
    .cal_ena, .cal_pulse, .sample, .col, .row, .last);
  logic [11:0] adc;
  r4s_chip_model #(.ADC_LAT(1)) chip (.clk, .rbi, .phi1, .sclk, .la, .cal_ena, .cal_pulse, .adc_pd(1'b0), .adc_data(adc));

  // Full-size instance.
  logic fstart = 0, fbusy, fdone, fsample, flast;
  logic [7:0] fcol, frow;
  logic [6:0] funused;
  r4s_readout_seq full (
    .clk, .rst_n, .start(fstart), .cal_mode(1'b0), .busy(fbusy), .done(fdone),
    .rbi(funused[0]), .phi1(funused[1]), .phi2(funused[2]), .sclk(funused[3]), .la(funused[4]),
    .cal_ena(funused[5]), .cal_pulse(funused[6]), .sample(fsample), .col(fcol), .row(frow), .last(flast));

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_small(input logic cal, input int restart_at);
    int n = 0, busy_cyc = 0, calp = 0, exp_cyc, sclk_hi = 0, rst_phase = 1, order_bad = 0, model_bad = 0;
    bit saw_last = 0, saw_done = 0, cal_ena_ok = 1;
    logic calp_d = 0;
    @(negedge clk); start = 1; cal_mode = cal;
    @(negedge clk); start = 0; cal_mode = 0;
    do begin
      @(posedge clk); #0.1;
      start = (busy_cyc == restart_at);
      if (busy) busy_cyc++;
      if (cal_pulse && !calp_d) calp++;
      calp_d = cal_pulse;
      if (busy && cal_ena !== cal) cal_ena_ok = 0;
      // First SCLK high stretch is the row-register reset.
      if (rst_phase && sclk) sclk_hi++;
      if (rst_phase && sclk_hi > 0 && !sclk) rst_phase = 0;
      if (sample) begin
        if (col != 8'(n % SC) || row != 8'(n / SC)) order_bad++;
        // The chip model must be on the same pixel (ADC latency 1: look at its state).
        if (chip.row != int'(row) || chip.col != int'(col)) model_bad++;
        if (last) saw_last = 1;
        if (last && n != SC*SR-1) order_bad++;
        n++;
      end
      if (done) saw_done = 1;
    end while (!saw_done && busy_cyc < 100000);
    exp_cyc = 2*24 + SR*(2*1 + (cal ? TCAL : 0) + SC*(1+3));
    chk(n == SC*SR, $sformatf("cal=%0b: %0d samples, expected %0d", cal, n, SC*SR));
    chk(order_bad == 0, $sformatf("cal=%0b: %0d samples out of order", cal, order_bad));
    chk(model_bad == 0, $sformatf("cal=%0b: chip model off the sampled pixel %0d times", cal, model_bad));
    chk(saw_last, "last seen");
    chk(busy_cyc == exp_cyc, $sformatf("cal=%0b: frame %0d clocks, expected %0d", cal, busy_cyc, exp_cyc));
    chk(sclk_hi == 24, $sformatf("row reset %0d clocks, expected 24 (150 ns)", sclk_hi));
    chk(calp == (cal ? SR : 0), $sformatf("cal=%0b: %0d calibration pulses", cal, calp));
    chk(cal_ena_ok, "CAL_ENA follows the mode");
  endtask

  initial begin
    int fn = 0, fcyc = 0;
    bit fbad = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (3) @(posedge clk);
    chk(!busy && !fbusy && !sample, "idle after reset");
    run_small(0, -1);
    run_small(1, -1);
    // Start ignored while busy: a second start mid-frame must not restart it.
    run_small(0, 30);
    start = 0;

    // Full matrix.
    @(negedge clk); fstart = 1; @(negedge clk); fstart = 0;
    while (!fdone && fcyc < 200000) begin
      @(posedge clk); #0.1;
      if (fbusy) fcyc++;
      if (fsample) begin
        if (fcol != 8'(fn % 155) || frow != 8'(fn / 155)) fbad = 1;
        fn++;
      end
    end
    chk(fn == 155*160, $sformatf("full frame %0d samples, expected 24800", fn));
    chk(!fbad, "full frame order");
    chk(fcyc == 99568, $sformatf("full frame %0d clocks, expected 99568", fcyc));
    $display("full frame: %0d samples in %0d clocks = %0.1f us at 160 MHz", fn, fcyc, fcyc * 6.25 / 1000.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
