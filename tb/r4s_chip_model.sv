// r4s_chip_model: stand-in for one pixel readout chip plus its ADC, for
// testbenches only (behavioural, not synthesizable in intent).
//
// It follows the control lines the way the readout sequencer drives them: a
// rising SCLK steps the row register (RBI high loads row 0) and restarts the
// column register; a rising PHI1 while LA is high steps to the next column.
// The selected pixel's "analog" value is a known pattern,
//   value = ((row * 7 + col * 13) mod 2048) + (2048 if a calibration pulse
//           fell, with CAL_ENA high, since the row was selected),
// so a testbench can predict every sample. The ADC digitizes the selected
// pixel on every clock and outputs it ADC_LAT clocks later; it outputs 0
// while powered down. pixel_value() is the same formula for testbenches.
module r4s_chip_model #(
  parameter int ADC_LAT = 4
) (
  input  logic        clk,
  input  logic        rbi,
  input  logic        phi1,
  input  logic        sclk,
  input  logic        la,
  input  logic        cal_ena,
  input  logic        cal_pulse,
  input  logic        adc_pd,
  output logic [11:0] adc_data
);
  int         row = 0, col = -1;
  logic       cal_hit = 1'b0;
  logic       sclk_d = 1'b0, phi1_d = 1'b0, calp_d = 1'b0;
  logic [11:0] pipe [ADC_LAT];
  logic [11:0] analog;

  function automatic logic [11:0] pixel_value(input int r, input int c, input logic cal);
    return 12'(((r * 7 + c * 13) % 2048) + (cal ? 2048 : 0));
  endfunction

  initial for (int i = 0; i < ADC_LAT; i++) pipe[i] = '0;

  assign analog   = pixel_value(row, col, cal_hit);
  assign adc_data = adc_pd ? 12'd0 : pipe[ADC_LAT-1];

  always @(posedge clk) begin
    if (sclk && !sclk_d) begin
      row     <= rbi ? 0 : row + 1;
      col     <= -1;
      cal_hit <= 1'b0;
    end else begin
      if (phi1 && !phi1_d && la) col <= col + 1;
      if (!cal_pulse && calp_d && cal_ena) cal_hit <= 1'b1;
    end
    sclk_d <= sclk; phi1_d <= phi1; calp_d <= cal_pulse;
    pipe[0] <= analog;
    for (int i = 1; i < ADC_LAT; i++) pipe[i] <= pipe[i-1];
  end
endmodule
