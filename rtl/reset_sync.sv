// reset_sync: reset for one clock domain, asserted asynchronously and
// released synchronously.
//
// rst_n goes low at once when arst_n is low or the clock generator is not
// locked, and goes high STAGES clocks after both are good, so every flip-flop
// of the domain leaves reset on the same edge. The design has one of these per
// clock domain (40, 160 and 100 MHz), as the document's block design shows;
// the document uses a vendor reset block, this is the simplest equivalent.
module reset_sync #(
  parameter int unsigned STAGES = 3
) (
  input  logic clk,
  input  logic arst_n,
  input  logic locked,
  output logic rst_n
);
  logic [STAGES-1:0] sr;
  logic              clr_n;

  assign clr_n = arst_n & locked;

  always_ff @(posedge clk or negedge clr_n) begin
    if (!clr_n) sr <= '0;
    else        sr <= {sr[STAGES-2:0], 1'b1};
  end

  assign rst_n = sr[STAGES-1];
endmodule
