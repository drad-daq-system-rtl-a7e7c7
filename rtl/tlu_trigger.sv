// tlu_trigger: trigger handshake with the telescope's Trigger Logic Unit (TLU).
//
// The TLU raises TRIGGER when a particle crosses the telescope; each channel
// then reads its chip and signals BUSY until it can take the next event. The
// document names the trigger/busy link and gives the channel the job of
// trigger control; the handshake below is this design's own, plain-level one.
//
// trig_in is asynchronous and passes through two flip-flops. On its rising
// edge, while armed and not already busy, start pulses for one clock (to begin
// a readout), and busy_out and hold go high; both fall on the clock after
// seq_done. A rising edge that arrives while busy_out is high is not acted on
// and pulses ignored (for counting lost triggers). hold tells the chip to keep
// the sampled event while it is being read. Latency from a trig_in edge to
// start: 3 clocks.
module tlu_trigger (
  input  logic clk,
  input  logic rst_n,
  input  logic trig_in,
  input  logic armed,
  input  logic seq_done,
  output logic start,
  output logic busy_out,
  output logic hold,
  output logic ignored
);
  logic trig_s, trig_d;
  logic rise;

  sync_2ff #(.W(1), .STAGES(2)) u_sync (.clk, .rst_n, .d(trig_in), .q(trig_s));

  assign rise = trig_s && !trig_d;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      trig_d   <= 1'b0;
      start    <= 1'b0;
      busy_out <= 1'b0;
      hold     <= 1'b0;
      ignored  <= 1'b0;
    end else begin
      trig_d  <= trig_s;
      start   <= 1'b0;
      ignored <= 1'b0;
      if (seq_done) begin
        busy_out <= 1'b0;
        hold     <= 1'b0;
      end
      if (rise && armed) begin
        if (!busy_out) begin
          start    <= 1'b1;
          busy_out <= 1'b1;
          hold     <= 1'b1;
        end else begin
          ignored  <= 1'b1;
        end
      end
    end
  end
endmodule
