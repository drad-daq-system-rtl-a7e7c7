// tb_i2c_master: runs the I2C controller at its default 40 MHz / 100 kHz
// against a target model. Checks the three bytes on the bus (address + W,
// b0, b1), one START and one STOP per transfer, the SCL bit period
// (400 clocks), the transfer length (START + 27 bits + STOP), the NACK flag
// for a missing device and for a data byte that is refused, and that a NACK
// ends the transfer early.
module tb_i2c_master;
  logic clk = 0, rst_n = 0;
  logic req = 0, busy, nack, scl_oe, sda_oe, sda_pull;
  logic [6:0] addr;
  logic [7:0] b0, b1;
  wire scl = !scl_oe;
  wire sda = !(sda_oe || sda_pull);
  int nack_at = -1;
  int checks = 0, failures = 0;

  i2c_master dut (.clk, .rst_n, .req, .addr, .b0, .b1, .busy, .nack,
                  .scl_oe, .sda_oe, .scl_i(scl), .sda_i(sda));
  i2c_slave_model slv (.clk, .scl, .sda, .nack_at, .sda_pull);

  always #12.5 clk = ~clk;

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic xfer(input logic [6:0] a, input logic [7:0] x, input logic [7:0] y,
                      input int refuse, output int cycles);
    int s0, p0;
    s0 = slv.starts; p0 = slv.stops;
    slv.bytes.delete();
    nack_at = refuse;
    @(negedge clk); addr = a; b0 = x; b1 = y; req = 1;
    @(negedge clk); req = 0;
    chk(busy, "busy after req");
    cycles = 1;
    while (busy) begin @(negedge clk); cycles++; end
    chk(slv.starts == s0 + 1, "one START");
    chk(slv.stops == p0 + 1, "one STOP");
    chk(scl && sda, "bus released at the end");
  endtask

  initial begin
    int cyc;
    repeat (5) @(posedge clk);
    rst_n = 1;
    repeat (5) @(posedge clk);
    chk(scl && sda && !busy, "idle bus after reset");

    // Normal write.
    xfer(7'h2C, 8'hA5, 8'h3C, -1, cyc);
    chk(!nack, "no NACK on acknowledged write");
    chk(slv.bytes.size() == 3, $sformatf("3 bytes received, got %0d", slv.bytes.size()));
    if (slv.bytes.size() == 3) begin
      chk(slv.bytes[0] == {7'h2C, 1'b0}, $sformatf("address byte %h", slv.bytes[0]));
      chk(slv.bytes[1] == 8'hA5, $sformatf("byte 0 %h", slv.bytes[1]));
      chk(slv.bytes[2] == 8'h3C, $sformatf("byte 1 %h", slv.bytes[2]));
    end
    chk(slv.bit_period == 400, $sformatf("SCL period %0d clocks, expected 400", slv.bit_period));
    // START (4 quarters) + 27 bits (4 quarters each) + STOP (4 quarters), 100 clocks per quarter.
    chk(cyc >= 29*400 && cyc <= 29*400 + 2, $sformatf("transfer took %0d clocks, expected %0d", cyc, 29*400));

    // Second write with other data, to catch stuck bits.
    xfer(7'h53, 8'h5A, 8'hC3, -1, cyc);
    chk(!nack && slv.bytes.size() == 3 && slv.bytes[0] == 8'hA6 && slv.bytes[1] == 8'h5A && slv.bytes[2] == 8'hC3,
        "second write bytes");

    // Missing device: address not acknowledged, transfer stops after it.
    xfer(7'h11, 8'hFF, 8'h00, 0, cyc);
    chk(nack, "NACK on missing device");
    chk(slv.bytes.size() == 1, $sformatf("only the address sent, got %0d bytes", slv.bytes.size()));
    chk(cyc < 12*400, $sformatf("early stop after address NACK (%0d clocks)", cyc));

    // Refused data byte.
    xfer(7'h2C, 8'h12, 8'h34, 1, cyc);
    chk(nack, "NACK on refused byte 0");
    chk(slv.bytes.size() == 2, "stopped after refused byte");

    // NACK clears on the next good transfer.
    xfer(7'h2C, 8'h00, 8'hFF, -1, cyc);
    chk(!nack && slv.bytes.size() == 3 && slv.bytes[2] == 8'hFF, "NACK cleared by next transfer");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
