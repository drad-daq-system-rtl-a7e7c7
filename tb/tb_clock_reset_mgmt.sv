// tb_clock_reset_mgmt: runs the three clocks at 40, 160 and 100 MHz and checks
// that each domain's reset releases three of its own clocks after release and
// that all three assert together when the lock flag drops.
module tb_clock_reset_mgmt;
  logic clk_40 = 0, clk_160 = 0, clk_100 = 0, arst_n = 0, mmcm_locked = 0;
  logic rst40_n, rst160_n, rst100_n;
  int checks = 0, failures = 0;
  int n40, n160, n100;

  clock_reset_mgmt dut (.clk_40, .clk_160, .clk_100, .arst_n, .mmcm_locked, .rst40_n, .rst160_n, .rst100_n);

  always #12.5  clk_40  = ~clk_40;
  always #3.125 clk_160 = ~clk_160;
  always #5     clk_100 = ~clk_100;

  // Count each domain's clocks from release until its reset goes high.
  always @(posedge clk_40)  if (arst_n && mmcm_locked && !rst40_n)  n40++;
  always @(posedge clk_160) if (arst_n && mmcm_locked && !rst160_n) n160++;
  always @(posedge clk_100) if (arst_n && mmcm_locked && !rst100_n) n100++;

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #20000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100;
    chk(!rst40_n && !rst160_n && !rst100_n, "all held in reset");
    for (int round = 0; round < 2; round++) begin
      n40 = 0; n160 = 0; n100 = 0;
      #3.3 arst_n = 1; mmcm_locked = 1;
      #500;
      chk(rst40_n && rst160_n && rst100_n, "all released");
      chk(n40 == 3,  $sformatf("40 MHz released after %0d clocks", n40));
      chk(n160 == 3, $sformatf("160 MHz released after %0d clocks", n160));
      chk(n100 == 3, $sformatf("100 MHz released after %0d clocks", n100));
      #7.7 mmcm_locked = 0; #0.5;
      chk(!rst40_n && !rst160_n && !rst100_n, "all asserted at once on lock loss");
      arst_n = 0;
      #50;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
