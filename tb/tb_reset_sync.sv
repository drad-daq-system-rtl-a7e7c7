// tb_reset_sync: checks asynchronous assertion and release STAGES clocks
// after both the external reset and the lock flag are good.
module tb_reset_sync;
  localparam int STAGES = 3;
  logic clk = 0, arst_n = 0, locked = 0, rst_n;
  int checks = 0, failures = 0;

  reset_sync #(.STAGES(STAGES)) dut (.clk, .arst_n, .locked, .rst_n);

  always #5 clk = ~clk;

  task automatic check(input logic exp, input string what);
    checks++;
    if (rst_n !== exp) begin failures++; $display("FAIL: %s: rst_n=%b", what, rst_n); end
  endtask

  // Count clocks from release to rst_n high.
  task automatic release_and_count(input string what);
    int n = 0;
    @(negedge clk);
    arst_n = 1; locked = 1;
    while (rst_n !== 1'b1 && n < 20) begin @(posedge clk); #1; n++; end
    checks++;
    if (n != STAGES) begin failures++; $display("FAIL: %s: released after %0d clocks, expected %0d", what, n, STAGES); end
  endtask

  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4) @(posedge clk);
    check(0, "held in reset");
    locked = 1; repeat (4) @(posedge clk); #1;
    check(0, "locked but arst_n low");
    locked = 0; arst_n = 1; repeat (4) @(posedge clk); #1;
    check(0, "arst_n high but not locked");
    arst_n = 0; locked = 0;
    release_and_count("first release");
    // Asynchronous assertion, between clock edges.
    @(posedge clk); #2 arst_n = 0; #1;
    check(0, "async assert by arst_n");
    release_and_count("second release");
    @(posedge clk); #2 locked = 0; #1;
    check(0, "async assert by lock loss");
    arst_n = 0;
    release_and_count("third release");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
