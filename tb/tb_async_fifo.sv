// tb_async_fifo: dual-clock FIFO with unrelated write (160 MHz) and read
// (100 MHz) clocks. Random pushes and pops are compared with a queue model
// (order and contents); the test also fills the FIFO to check that full rises
// after exactly 2**AW words, and drains it to check empty.
module tb_async_fifo;
  localparam int W = 16, AW = 4, DEPTH = 1 << AW;
  logic wclk = 0, rclk = 0, wrst_n = 0, rrst_n = 0;
  logic wr_en = 0, rd_en = 0, full, empty;
  logic [W-1:0] wdata = '0, rdata;
  logic [W-1:0] model [$];
  int checks = 0, failures = 0, pushed = 0, popped = 0;
  bit random_phase = 1;

  async_fifo #(.W(W), .AW(AW)) dut (.wclk, .wrst_n, .wr_en, .wdata, .full, .rclk, .rrst_n, .rd_en, .rdata, .empty);

  always #3.125 wclk = ~wclk;
  always #5     rclk = ~rclk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Writer: drives on negedge, the push happens on the next posedge.
  always @(negedge wclk) begin
    if (wrst_n && random_phase) begin
      wr_en <= ($urandom % 3 != 0) && !full && pushed < 3000;
      wdata <= W'($urandom);
    end
  end
  always @(posedge wclk) if (wr_en && !full) begin model.push_back(wdata); pushed++; end

  // Reader: checks the head word on every pop.
  always @(negedge rclk) if (rrst_n && random_phase) rd_en <= ($urandom % 2 == 0) && !empty;
  always @(posedge rclk) begin
    if (rd_en && !empty) begin
      checks++;
      if (model.size() == 0) begin failures++; $display("FAIL: pop with empty model"); end
      else begin
        logic [W-1:0] e;
        e = model.pop_front();
        if (rdata !== e) begin failures++; $display("FAIL: word %0d got %h expected %h", popped, rdata, e); end
      end
      popped++;
    end
  end

  initial begin
    #40 wrst_n = 1; rrst_n = 1;
    checks++; if (!empty || full) begin failures++; $display("FAIL: not empty after reset"); end
    wait (pushed >= 3000);
    #500;
    random_phase = 0;
    @(negedge wclk) wr_en = 0;
    @(negedge rclk) rd_en = 0;
    // Drain what is left.
    while (!empty) begin @(negedge rclk) rd_en = 1; @(posedge rclk); #0.1; @(negedge rclk) rd_en = 0; end
    rd_en = 0;
    checks++; if (model.size() != 0) begin failures++; $display("FAIL: %0d words left in model", model.size()); end
    // Fill: full must rise after exactly DEPTH pushes.
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge wclk);
      checks++; if (full) begin failures++; $display("FAIL: full after %0d words", i); end
      wr_en = 1; wdata = W'(i);
      @(negedge wclk) wr_en = 0;
    end
    @(negedge wclk);
    checks++; if (!full) begin failures++; $display("FAIL: not full after %0d words", DEPTH); end
    repeat (4) @(negedge rclk);
    checks++; if (empty) begin failures++; $display("FAIL: empty while full"); end
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge rclk) rd_en = 1;
      @(negedge rclk) rd_en = 0;
    end
    repeat (6) @(negedge wclk);
    checks++; if (!empty || full) begin failures++; $display("FAIL: flags after drain empty=%b full=%b", empty, full); end
    $display("pushed %0d popped %0d", pushed + DEPTH, popped);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
