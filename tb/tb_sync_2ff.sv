// tb_sync_2ff: checks that the synchronizer delays every bit by exactly
// STAGES destination clocks and that reset clears it.
module tb_sync_2ff;
  localparam int W = 4, STAGES = 2;
  logic clk = 0, rst_n = 0;
  logic [W-1:0] d, q;
  logic [W-1:0] hist [$];
  int checks = 0, failures = 0;

  sync_2ff #(.W(W), .STAGES(STAGES)) dut (.clk, .rst_n, .d, .q);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = '0;
    repeat (3) @(posedge clk);
    checks++; if (q !== '0) begin failures++; $display("FAIL: q not cleared by reset"); end
    rst_n = 1;
    for (int i = 0; i < STAGES; i++) hist.push_back('0);
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      checks++;
      if (q !== hist[0]) begin failures++; $display("FAIL: cycle %0d q=%h expected %h", i, q, hist[0]); end
      d = W'($urandom);
      hist.pop_front();
      hist.push_back(d);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
