// i2c_slave_model: simple I2C target for testbenches.
//
// Watches the bus on every clk edge (the clock must be much faster than SCL).
// It detects START and STOP, shifts in bytes MSB first on SCL rising edges,
// and acknowledges each byte by pulling SDA low for the ninth clock, unless
// the byte's index within the transfer equals nack_at (0 = address byte).
// Received bytes are pushed into the queue `bytes`; `starts` and `stops`
// count bus conditions, `bit_period` holds the clocks between the last two
// SCL rising edges.
module i2c_slave_model (
  input  logic clk,
  input  logic scl,
  input  logic sda,
  input  int   nack_at,
  output logic sda_pull
);
  logic       scl_d = 1'b1, sda_d = 1'b1;
  logic [7:0] sh = '0;
  int         bitcnt = 0, idx = 0;
  int         starts = 0, stops = 0;
  int         bit_period = 0, since_rise = 0;
  logic [7:0] bytes [$];

  initial sda_pull = 1'b0;

  always @(posedge clk) begin
    since_rise <= since_rise + 1;
    if (scl && scl_d && sda_d && !sda) begin
      starts <= starts + 1; bitcnt <= 0; idx <= 0;
    end
    if (scl && scl_d && !sda_d && sda) stops <= stops + 1;
    if (scl && !scl_d) begin
      bit_period <= since_rise; since_rise <= 1;
      if (bitcnt < 8) begin
        sh <= {sh[6:0], sda};
        if (bitcnt == 7) bytes.push_back({sh[6:0], sda});
        bitcnt <= bitcnt + 1;
      end else begin
        bitcnt <= 0; idx <= idx + 1;
      end
    end
    if (!scl && scl_d) begin
      // Falling edge: drive ACK after the eighth bit, release after the ninth.
      if (bitcnt == 8) sda_pull <= (idx != nack_at);
      else sda_pull <= 1'b0;
    end
    scl_d <= scl; sda_d <= sda;
  end
endmodule
