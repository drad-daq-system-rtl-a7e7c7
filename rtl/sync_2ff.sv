// sync_2ff: multi-stage synchronizer for level signals entering a clock domain.
//
// Each bit of d is sampled by STAGES flip-flops in the destination clock; q is
// the last stage. Use it only for bits that are independent of each other
// (status levels, sticky flags): a multi-bit value whose bits change together
// needs a FIFO instead. Latency: STAGES destination clocks. The synchronizer
// itself is this design's own; the document only states that the logic
// exchanges signals between several clock domains.
module sync_2ff #(
  parameter int unsigned W      = 1,
  parameter int unsigned STAGES = 2
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  logic [W-1:0] pipe [STAGES];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < STAGES; i++) pipe[i] <= '0;
    end else begin
      pipe[0] <= d;
      for (int i = 1; i < STAGES; i++) pipe[i] <= pipe[i-1];
    end
  end

  assign q = pipe[STAGES-1];
endmodule
