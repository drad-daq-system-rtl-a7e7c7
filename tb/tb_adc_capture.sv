// tb_adc_capture: checks ADC control and capture. The ADC output is a random
// value per clock, recorded by clock number; each sample strobe must yield one
// stream word whose ADC field is the value present ADC_LAT clocks after the
// strobe, with the strobe's row, column, flags and last. Also checked: power
// down and the ADC clock (160 MHz / 2, stopped when disabled), and that a word
// meeting a stalled stream is dropped and sets the sticky overflow flag.
module tb_adc_capture;
  import drad_pkg::*;
  localparam int LAT = 4;
  logic clk = 0, rst_n = 0;
  logic adc_en_req = 0, adc_pd, adc_clk;
  logic [11:0] adc_data = '0;
  logic sample = 0, last = 0, tready = 1, clr_overflow = 0;
  logic [7:0] col = '0, row = '0;
  pix_flags_t flags = '0;
  logic [31:0] tdata;
  logic tvalid, tlast, overflow, dropped;
  int checks = 0, failures = 0, cyc = 0;
  pix_word_t exp_q [$];
  logic      exp_last_q [$];

  adc_capture #(.ADC_LAT(LAT)) dut (
    .clk, .rst_n, .adc_en_req, .adc_pd, .adc_clk, .adc_data,
    .sample, .col, .row, .last, .flags,
    .m_axis_tdata(tdata), .m_axis_tvalid(tvalid), .m_axis_tlast(tlast), .m_axis_tready(tready),
    .clr_overflow, .overflow, .dropped);

  always #3.125 clk = ~clk;

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // New ADC value every clock; remember it by clock number.
  always @(posedge clk) begin
    cyc <= cyc + 1;
    #0.1 adc_data = 12'($urandom);
  end

  // Compare every accepted word with the expected queue.
  int got = 0;
  always @(posedge clk) if (rst_n && tvalid && tready) begin
    checks++;
    if (exp_q.size() == 0) begin failures++; $display("FAIL: unexpected word %h", tdata); end
    else begin
      pix_word_t e;
      logic      el;
      e = exp_q.pop_front();
      el = exp_last_q.pop_front();
      if (tdata !== 32'(e) || tlast !== el) begin
        failures++;
        $display("FAIL: word %0d got %h/%b expected %h/%b", got, tdata, tlast, e, el);
      end
    end
    got++;
  end

  // Drive one sample strobe in the clock after the next posedge.
  task automatic strobe(input logic [7:0] c, input logic [7:0] r, input logic l, input pix_flags_t f);
    int s;
    @(posedge clk); #0.2;
    s = cyc - 1;
    sample = 1; col = c; row = r; last = l; flags = f;
    @(posedge clk); #0.2;
    sample = 0;
    // Value on adc_data during clock s + LAT.
    fork begin
      pix_word_t w;
      repeat (LAT - 1) @(posedge clk);
      #0.3;
      w.flags = f; w.row = r; w.col = c; w.adc = adc_data;
      exp_q.push_back(w); exp_last_q.push_back(l);
    end join_none
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int toggles;
    logic prev;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #0.2;
    chk(adc_pd && !adc_clk, "ADC powered down after reset");
    // Enable: count ADC clock toggles over 20 clocks.
    adc_en_req = 1;
    repeat (2) @(posedge clk); #0.2;
    chk(!adc_pd, "ADC powered up");
    toggles = 0; prev = adc_clk;
    repeat (20) begin @(posedge clk); #0.2; if (adc_clk != prev) toggles++; prev = adc_clk; end
    chk(toggles == 20, $sformatf("ADC clock toggled %0d times in 20 clocks (160/2 MHz)", toggles));

    // Back-to-back and spaced samples.
    for (int i = 0; i < 40; i++) begin
      strobe(8'(i % 155), 8'(i / 155 + 3), i == 39, pix_flags_t'(4'(i)));
      repeat ($urandom % 3) @(posedge clk);
    end
    repeat (LAT + 4) @(posedge clk);
    chk(got == 40 && exp_q.size() == 0, $sformatf("40 words delivered, got %0d", got));
    chk(!overflow, "no overflow with a ready stream");

    // Stall the stream: the second word must be dropped.
    tready = 0;
    strobe(8'd1, 8'd1, 0, '0);
    strobe(8'd2, 8'd1, 0, '0);
    repeat (LAT + 2) @(posedge clk); #0.2;
    chk(overflow, "overflow set when a word meets a stalled stream");
    // The dropped word is the second one: take it off the expected queue.
    void'(exp_q.pop_back()); void'(exp_last_q.pop_back());
    tready = 1;
    repeat (3) @(posedge clk);
    chk(got == 41, $sformatf("held word delivered after the stall, got %0d", got));
    chk(overflow, "overflow is sticky");
    @(negedge clk) clr_overflow = 1; @(negedge clk) clr_overflow = 0;
    chk(!overflow, "overflow cleared");

    adc_en_req = 0;
    repeat (3) @(posedge clk); #0.2;
    chk(adc_pd && !adc_clk, "ADC off again");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
