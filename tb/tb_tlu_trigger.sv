// tb_tlu_trigger: checks the trigger handshake. A trigger edge while armed
// and idle gives one start pulse 3 clocks later and raises BUSY and HOLD
// until seq_done; edges while busy are counted as ignored; edges while not
// armed do nothing.
module tb_tlu_trigger;
  logic clk = 0, rst_n = 0;
  logic trig_in = 0, armed = 0, seq_done = 0;
  logic start, busy_out, hold, ignored;
  int checks = 0, failures = 0, starts = 0, ign = 0;

  tlu_trigger dut (.clk, .rst_n, .trig_in, .armed, .seq_done, .start, .busy_out, .hold, .ignored);

  always #3.125 clk = ~clk;
  always @(posedge clk) if (rst_n) begin
    if (start) starts++;
    if (ignored) ign++;
  end

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic pulse_trig();
    #1.3 trig_in = 1;
    repeat (4) @(negedge clk);
    trig_in = 0;
    repeat (3) @(negedge clk);
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lat;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // Not armed: nothing happens.
    pulse_trig();
    chk(starts == 0 && !busy_out && ign == 0, $sformatf("trigger ignored silently while not armed s=%0d b=%b i=%0d", starts, busy_out, ign));
    // Armed: measure latency edge -> start.
    armed = 1;
    @(negedge clk); trig_in = 1; lat = 0;
    while (!start && lat < 10) begin @(negedge clk); lat++; end
    chk(lat == 3, $sformatf("trigger to start %0d clocks, expected 3", lat));
    @(negedge clk);
    chk(!start, "start is a single pulse");
    chk(busy_out && hold, "BUSY and HOLD high after trigger");
    trig_in = 0; repeat (3) @(negedge clk);
    // Second trigger while busy: ignored.
    pulse_trig();
    chk(starts == 1 && ign == 1, $sformatf("trigger while busy: starts=%0d ignored=%0d", starts, ign));
    chk(busy_out, "still busy");
    // Readout ends.
    seq_done = 1; @(negedge clk); seq_done = 0;
    chk(!busy_out && !hold, "BUSY and HOLD fall after seq_done");
    // Next trigger starts again.
    pulse_trig();
    chk(starts == 2 && busy_out, "next trigger accepted");
    seq_done = 1; @(negedge clk); seq_done = 0;
    armed = 0;
    pulse_trig();
    chk(starts == 2 && !busy_out, "disarmed: no start");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
