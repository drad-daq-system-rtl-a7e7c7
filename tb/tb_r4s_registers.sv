// tb_r4s_registers: commands for four channels are pushed at 100 MHz; at
// 40 MHz each channel must deliver them in order, I2C writes to the I2C side
// (held while i2c_busy, with address and bytes decoded) and everything else
// but NOPs to the sensor side (held while not ready). Also checks cmd_full
// after 16 queued commands.
module tb_r4s_registers;
  import drad_pkg::*;
  localparam int N = 4;
  logic clk_100 = 0, clk_40 = 0, rst100_n = 0, rst40_n = 0;
  logic [N-1:0] cmd_valid = '0, cmd_full;
  logic [31:0]  cmd_data = '0;
  logic [N-1:0] i2c_req, i2c_busy = '0, r4s_cmd_valid, r4s_cmd_ready = '1;
  logic [6:0]   i2c_addr [N];
  logic [7:0]   i2c_b0 [N], i2c_b1 [N];
  logic [31:0]  r4s_cmd [N];
  int checks = 0, failures = 0;
  logic [31:0] exp_q [N][$];
  int got [N];
  bit stall = 0;

  r4s_registers #(.N_CH(N)) dut (
    .clk_100, .rst100_n, .cmd_valid, .cmd_data, .cmd_full,
    .clk_40, .rst40_n, .i2c_req, .i2c_addr, .i2c_b0, .i2c_b1, .i2c_busy,
    .r4s_cmd_valid, .r4s_cmd, .r4s_cmd_ready);

  always #5    clk_100 = ~clk_100;
  always #12.5 clk_40  = ~clk_40;

  // Random back-pressure from the I2C and sensor sides.
  always @(negedge clk_40) begin
    i2c_busy      <= stall ? '1 : N'($urandom);
    r4s_cmd_ready <= stall ? '0 : N'($urandom);
  end

  always @(posedge clk_40) if (rst40_n) begin
    for (int i = 0; i < N; i++) begin
      if (i2c_req[i] && r4s_cmd_valid[i]) begin failures++; $display("FAIL: ch%0d both outputs at once", i); end
      if (i2c_req[i] && i2c_busy[i]) begin failures++; $display("FAIL: ch%0d I2C request while busy", i); end
      if (r4s_cmd_valid[i] && !r4s_cmd_ready[i]) begin failures++; $display("FAIL: ch%0d sensor command while not ready", i); end
      if (i2c_req[i] || r4s_cmd_valid[i]) begin
        logic [31:0] e, g;
        checks++;
        e = exp_q[i].pop_front();
        g = i2c_req[i] ? {4'(OP_I2C_WRITE), 5'd0, i2c_addr[i], i2c_b0[i], i2c_b1[i]} : r4s_cmd[i];
        if (g !== e || (i2c_req[i] != (e[31:28] == 4'(OP_I2C_WRITE)))) begin
          failures++; $display("FAIL: ch%0d got %h expected %h (i2c=%b)", i, g, e, i2c_req[i]);
        end
        got[i]++;
      end
    end
  end

  task automatic push(input int ch, input logic [31:0] w);
    @(negedge clk_100);
    while (cmd_full[ch]) @(negedge clk_100);
    cmd_valid = '0; cmd_valid[ch] = 1; cmd_data = w;
    @(negedge clk_100);
    cmd_valid = '0;
    if (w[31:28] != 4'(OP_NOP)) exp_q[ch].push_back(w);
  endtask

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int total = 0, sent = 0;
    #60 rst100_n = 1; rst40_n = 1;
    for (int k = 0; k < 400; k++) begin
      logic [3:0] op;
      int ch = $urandom % N;
      op = 4'($urandom % 8);
      if (op == 4'd7) op = 4'(OP_NOP);
      if (op == 4'(OP_I2C_WRITE)) push(ch, {op, 5'd0, 7'($urandom), 16'($urandom)});
      else push(ch, {op, 28'($urandom)});
      if (op != 4'(OP_NOP)) sent++;
    end
    repeat (200) @(posedge clk_40);
    for (int i = 0; i < N; i++) total += got[i];
    checks++;
    if (total != sent) begin failures++; $display("FAIL: delivered %0d of %0d", total, sent); end
    for (int i = 0; i < N; i++) begin
      checks++;
      if (exp_q[i].size() != 0) begin failures++; $display("FAIL: ch%0d %0d commands left", i, exp_q[i].size()); end
    end
    // Stall the outputs and fill channel 2: full after 16 commands.
    stall = 1;
    repeat (3) @(posedge clk_40);
    for (int k = 0; k < 16; k++) begin
      @(negedge clk_100);
      checks++; if (cmd_full[2]) begin failures++; $display("FAIL: full after %0d", k); end
      cmd_valid[2] = 1; cmd_data = {4'(OP_ARM), 28'(k)};
      exp_q[2].push_back(cmd_data);
      @(negedge clk_100) cmd_valid = '0;
    end
    @(negedge clk_100);
    checks++; if (!cmd_full[2]) begin failures++; $display("FAIL: not full after 16 commands"); end
    stall = 0;
    repeat (100) @(posedge clk_40);
    checks++; if (exp_q[2].size() != 0 || cmd_full[2]) begin failures++; $display("FAIL: queue not drained"); end
    $display("delivered %0d commands", total + 16);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
