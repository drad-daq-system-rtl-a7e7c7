// clock_reset_mgmt: clock and reset management of the DAQ logic.
//
// The design runs in three clock domains: 40 MHz main system clock (the LHC
// bunch frequency), 160 MHz for the readout-chip control signals, and 100 MHz
// for the processor-side control bus and DMA. The clocks are made by the FPGA's
// clock generator (an MMCM), which is outside this RTL; this block takes them
// as inputs together with the generator's lock flag and gives each domain its
// own reset, asserted asynchronously and released STAGES clocks after the
// external reset is released and the clocks are locked. The three domains and
// their frequencies follow the document; the reset scheme is this design's own.
// The frequency parameters document the intended clocks; an elaboration-time
// check holds them to the ratios the rest of the design assumes.
module clock_reset_mgmt #(
  parameter int unsigned F_SYS_MHZ = 40,
  parameter int unsigned F_R4S_MHZ = 160,
  parameter int unsigned F_DMA_MHZ = 100,
  parameter int unsigned STAGES    = 3
) (
  input  logic clk_40,
  input  logic clk_160,
  input  logic clk_100,
  input  logic arst_n,
  input  logic mmcm_locked,
  output logic rst40_n,
  output logic rst160_n,
  output logic rst100_n
);
  reset_sync #(.STAGES(STAGES)) u_rst40  (.clk(clk_40),  .arst_n, .locked(mmcm_locked), .rst_n(rst40_n));
  reset_sync #(.STAGES(STAGES)) u_rst160 (.clk(clk_160), .arst_n, .locked(mmcm_locked), .rst_n(rst160_n));
  reset_sync #(.STAGES(STAGES)) u_rst100 (.clk(clk_100), .arst_n, .locked(mmcm_locked), .rst_n(rst100_n));

  initial begin
    assert (F_R4S_MHZ == 4 * F_SYS_MHZ && F_DMA_MHZ > F_SYS_MHZ)
      else $error("clock_reset_mgmt: expected a 4x chip clock and a bus clock above the system clock");
  end
endmodule
