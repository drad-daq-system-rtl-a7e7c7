// r4s_registers: command queues and command decoding, one per channel.
//
// Software writes 32-bit command words for a channel in the 100 MHz bus
// domain. Each channel has its own dual-clock FIFO that carries them into the
// 40 MHz system domain, where the head word is decoded: an I2C write
// (OP_I2C_WRITE) goes to the channel's I2C controller once it is idle, a NOP is
// dropped, and every other command goes to the channel's sensor block once it
// can take it. Commands leave each queue strictly in order, so an I2C write
// queued before a readout command finishes being handed over first (the I2C
// transfer itself then runs in parallel with the readout).
//
// That commands cross from 100 to 40 MHz through a FIFO per channel and are
// then sent to the I2C controller or the sensor block follows the document;
// the encoding (drad_pkg::opcode_e) and FIFO depth are this design's own.
//
// Interface: cmd_valid[i] pushes cmd_data for channel i (clk_100; the sender
// must respect cmd_full[i]). On clk_40 the hand-over signals are
// combinational from the FIFO head: i2c_req[i] = head is an I2C write and
// !i2c_busy[i]; r4s_cmd_valid[i] = head is a sensor command and
// r4s_cmd_ready[i]. Either pops the head on the same clock.
module r4s_registers
  import drad_pkg::*;
#(
  parameter int unsigned N_CH   = 4,
  parameter int unsigned CMD_AW = 4
) (
  input  logic        clk_100,
  input  logic        rst100_n,
  input  logic [N_CH-1:0] cmd_valid,
  input  logic [31:0]     cmd_data,
  output logic [N_CH-1:0] cmd_full,
  input  logic        clk_40,
  input  logic        rst40_n,
  output logic [N_CH-1:0] i2c_req,
  output logic [6:0]      i2c_addr [N_CH],
  output logic [7:0]      i2c_b0   [N_CH],
  output logic [7:0]      i2c_b1   [N_CH],
  input  logic [N_CH-1:0] i2c_busy,
  output logic [N_CH-1:0] r4s_cmd_valid,
  output logic [31:0]     r4s_cmd  [N_CH],
  input  logic [N_CH-1:0] r4s_cmd_ready
);
  for (genvar i = 0; i < N_CH; i++) begin : g_ch
    logic        empty, pop;
    logic [31:0] head;
    cmd_t        c;

    async_fifo #(.W(32), .AW(CMD_AW)) u_fifo (
      .wclk(clk_100), .wrst_n(rst100_n), .wr_en(cmd_valid[i]), .wdata(cmd_data), .full(cmd_full[i]),
      .rclk(clk_40), .rrst_n(rst40_n), .rd_en(pop), .rdata(head), .empty(empty));

    assign c = cmd_t'(head);

    always_comb begin
      i2c_req[i]       = 1'b0;
      r4s_cmd_valid[i] = 1'b0;
      pop              = 1'b0;
      if (!empty) begin
        unique case (c.op)
          OP_NOP:       pop = 1'b1;
          OP_I2C_WRITE: begin
            i2c_req[i] = !i2c_busy[i];
            pop        = !i2c_busy[i];
          end
          default: begin
            r4s_cmd_valid[i] = r4s_cmd_ready[i];
            pop              = r4s_cmd_ready[i];
          end
        endcase
      end
    end

    assign i2c_addr[i] = c.arg[22:16];
    assign i2c_b0[i]   = c.arg[15:8];
    assign i2c_b1[i]   = c.arg[7:0];
    assign r4s_cmd[i]  = head;
  end
endmodule
