// i2c_master: write-only I2C master for the reference-voltage DACs.
//
// Each channel's adapter board carries DACs that set the readout chip's
// reference voltages; software programs them through this controller. On req
// (while !busy) the controller latches addr, b0 and b1 and sends
//   START, addr[6:0] + W(0), ACK, b0, ACK, b1, ACK, STOP
// on an open-drain bus. If the device leaves SDA high in an ACK slot the
// transfer ends with STOP at once and nack stays set until the next req.
// That the controller is an I2C master talking to the adapter-board DACs is
// from the document; the two-byte write, the 100 kHz rate and the absence of
// reads, clock stretching and arbitration are this design's own choices.
//
// Timing: one SCL bit takes 4 quarter periods of CLK_HZ / (4 * I2C_HZ) clocks
// (100 clocks at 40 MHz and 100 kHz). busy rises the clock after req and falls
// after the STOP condition. scl_oe / sda_oe high means "pull the line low".
module i2c_master #(
  parameter int unsigned CLK_HZ = 40_000_000,
  parameter int unsigned I2C_HZ = 100_000
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       req,
  input  logic [6:0] addr,
  input  logic [7:0] b0,
  input  logic [7:0] b1,
  output logic       busy,
  output logic       nack,
  output logic       scl_oe,
  output logic       sda_oe,
  input  logic       scl_i,
  input  logic       sda_i
);
  localparam int unsigned QDIV = (CLK_HZ / (4 * I2C_HZ)) < 1 ? 1 : CLK_HZ / (4 * I2C_HZ);
  localparam int unsigned QW   = $clog2(QDIV + 1);

  typedef enum logic [2:0] {S_IDLE, S_START, S_BIT, S_ACK, S_STOP} state_e;

  state_e         state;
  logic [QW-1:0]  qcnt;      // clocks within a quarter bit
  logic [1:0]     quarter;   // quarter of the current bit
  logic [2:0]     bitn;      // bit within the byte, 7 first
  logic [1:0]     byten;     // byte 0..2
  logic [23:0]    shreg;     // bytes still to send, MSB first
  logic           tick;      // end of a quarter period

  assign tick = (qcnt == QW'(QDIV - 1));
  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      qcnt    <= '0;
      quarter <= '0;
      bitn    <= '0;
      byten   <= '0;
      shreg   <= '0;
      nack    <= 1'b0;
      scl_oe  <= 1'b0;
      sda_oe  <= 1'b0;
    end else begin
      qcnt <= (state == S_IDLE || tick) ? '0 : qcnt + 1'b1;
      if (state != S_IDLE && tick) quarter <= quarter + 1'b1;

      unique case (state)
        S_IDLE: begin
          scl_oe  <= 1'b0;
          sda_oe  <= 1'b0;
          quarter <= '0;
          if (req) begin
            shreg <= {addr, 1'b0, b0, b1};
            nack  <= 1'b0;
            byten <= '0;
            bitn  <= 3'd7;
            state <= S_START;
          end
        end
        // START: SDA falls while SCL is released, then SCL falls.
        S_START: if (tick) begin
          unique case (quarter)
            2'd0: sda_oe <= 1'b1;
            2'd1: ;
            2'd2: scl_oe <= 1'b1;
            2'd3: begin
              sda_oe <= ~shreg[23];       // first address bit
              state  <= S_BIT;
            end
          endcase
        end
        // Data bit: SDA set while SCL is low, SCL high for quarters 1-2.
        S_BIT: if (tick) begin
          unique case (quarter)
            2'd0: scl_oe <= 1'b0;
            2'd1: ;
            2'd2: scl_oe <= 1'b1;
            2'd3: begin
              shreg <= {shreg[22:0], 1'b0};
              if (bitn == 3'd0) begin
                sda_oe <= 1'b0;           // release SDA for the ACK
                state  <= S_ACK;
              end else begin
                bitn   <= bitn - 1'b1;
                sda_oe <= ~shreg[22];
              end
            end
          endcase
        end
        // ACK slot: sample SDA in the middle of the SCL high time.
        S_ACK: if (tick) begin
          unique case (quarter)
            2'd0: scl_oe <= 1'b0;
            2'd1: if (sda_i) nack <= 1'b1;
            2'd2: scl_oe <= 1'b1;
            2'd3: begin
              if (nack || byten == 2'd2) begin
                sda_oe <= 1'b1;           // hold SDA low before STOP
                state  <= S_STOP;
              end else begin
                byten  <= byten + 1'b1;
                bitn   <= 3'd7;
                sda_oe <= ~shreg[23];
                state  <= S_BIT;
              end
            end
          endcase
        end
        // STOP: SCL released, then SDA released while SCL is high.
        S_STOP: if (tick) begin
          unique case (quarter)
            2'd0: scl_oe <= 1'b0;
            2'd1: ;
            2'd2: sda_oe <= 1'b0;
            2'd3: state  <= S_IDLE;
          endcase
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // scl_i is not used: the controller does not support clock stretching.
  logic unused_scl;
  assign unused_scl = scl_i;

  a_req_when_idle: assert property (@(posedge clk) disable iff (!rst_n) req |-> !busy)
    else $warning("i2c_master: request while busy ignored");
endmodule
