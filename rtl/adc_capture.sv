// adc_capture: ADC control and pixel capture for one channel.
//
// The chip's analog output is digitized by one ADC per channel on the custom
// board. This block switches that ADC on and off (adc_pd is its power-down
// pin), gives it a clock (adc_clk, the 160 MHz clock divided by two, toggling
// only while enabled), and captures its output word for every pixel.
//
// The sequencer marks each pixel with a sample strobe. The ADC delivers the
// converted value ADC_LAT clocks later, so the strobe and the pixel's
// row/column/flags travel down an ADC_LAT-stage pipeline and adc_data is
// taken when they leave it. The result is one 32-bit AXI4-Stream word
// {flags, row, col, adc} (drad_pkg::pix_word_t); tlast marks the frame's last
// pixel. The chip's timing cannot wait, so a word that arrives while the
// previous one is still held (tvalid && !tready) is dropped and the sticky
// overflow flag is set until clr_overflow.
//
// That the channel manages ADC activation and clock and captures the ADC
// output after conversion follows the document; the ADC latency, width, clock
// ratio and word layout are this design's own choices.
module adc_capture
  import drad_pkg::*;
#(
  parameter int unsigned ADC_LAT = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  // ADC control and data
  input  logic             adc_en_req,
  output logic             adc_pd,
  output logic             adc_clk,
  input  logic [ADC_W-1:0] adc_data,
  // pixel marks from the sequencer
  input  logic             sample,
  input  logic [7:0]       col,
  input  logic [7:0]       row,
  input  logic             last,
  input  pix_flags_t       flags,
  // pixel stream
  output logic [31:0]      m_axis_tdata,
  output logic             m_axis_tvalid,
  output logic             m_axis_tlast,
  input  logic             m_axis_tready,
  input  logic             clr_overflow,
  output logic             overflow,
  output logic             dropped        // one-cycle pulse per dropped word
);
  typedef struct packed {
    logic       v;
    logic       last;
    pix_flags_t flags;
    logic [7:0] row;
    logic [7:0] col;
  } mark_t;

  mark_t     pipe [ADC_LAT];
  mark_t     head;
  pix_word_t w;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      adc_pd  <= 1'b1;
      adc_clk <= 1'b0;
    end else begin
      adc_pd  <= !adc_en_req;
      adc_clk <= adc_en_req ? !adc_clk : 1'b0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < ADC_LAT; i++) pipe[i] <= '0;
    end else begin
      pipe[0] <= '{v: sample, last: last, flags: flags, row: row, col: col};
      for (int i = 1; i < ADC_LAT; i++) pipe[i] <= pipe[i-1];
    end
  end

  assign head = pipe[ADC_LAT-1];
  assign w    = '{flags: head.flags, row: head.row, col: head.col, adc: adc_data};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      m_axis_tvalid <= 1'b0;
      m_axis_tdata  <= '0;
      m_axis_tlast  <= 1'b0;
      overflow      <= 1'b0;
      dropped       <= 1'b0;
    end else begin
      dropped <= 1'b0;
      if (m_axis_tvalid && m_axis_tready) m_axis_tvalid <= 1'b0;
      if (head.v) begin
        if (!m_axis_tvalid || m_axis_tready) begin
          m_axis_tvalid <= 1'b1;
          m_axis_tdata  <= w;
          m_axis_tlast  <= head.last;
        end else begin
          overflow <= 1'b1;
          dropped  <= 1'b1;
        end
      end
      if (clr_overflow) overflow <= 1'b0;
    end
  end

  a_stable: assert property (@(posedge clk) disable iff (!rst_n)
      m_axis_tvalid && !m_axis_tready |=> m_axis_tvalid && $stable(m_axis_tdata))
    else $error("adc_capture: stream word changed before it was taken");

  initial assert (ADC_LAT >= 1) else $error("adc_capture: ADC_LAT must be at least 1");
endmodule
