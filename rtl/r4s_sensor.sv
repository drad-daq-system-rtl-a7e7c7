// r4s_sensor: one readout channel, driving one pixel chip and its ADC.
//
// Commands for the chip arrive in the 40 MHz system domain and pass through a
// small dual-clock FIFO into the 160 MHz domain in which the chip's control
// lines are generated. There the channel
//   - starts a full-matrix readout (OP_READ_FRAME, optionally in calibration
//     mode, with a charge injection per row),
//   - runs a single-pixel calibration test (OP_CAL_PIXEL): the matrix is
//     scanned as usual with calibration on, but only the chosen pixel is kept,
//   - arms or disarms triggered readout (OP_ARM / OP_DISARM): each TLU trigger
//     then starts one frame, with BUSY and HOLD high until it ends,
//   - switches its ADC on or off (OP_ADC_CTRL).
// Sampled pixels leave as a 32-bit AXI4-Stream in the 160 MHz domain.
//
// The list of tasks (chip signalling for readout and calibration, the 40 to
// 160 MHz crossing, trigger control, ADC activation and clocking, data
// capture) is the document's; the command set and the way the tasks are
// combined are this design's own. A frame command waits in the FIFO while a
// frame is running; a trigger that arrives while BUSY is high is not acted on
// (ev_trig_ignored pulses); one that arrives during a command-started frame is
// not acted on either. A new READ_FRAME or ARM clears the
// sticky overflow flag.
//
// Interface: cmd_valid/cmd with cmd_ready (= FIFO not full) in the clk_40
// domain; everything else in the clk_160 domain; tlu_trig is asynchronous.
module r4s_sensor
  import drad_pkg::*;
#(
  parameter int unsigned COLS     = 155,
  parameter int unsigned ROWS     = 160,
  parameter int unsigned T_RST    = 24,
  parameter int unsigned T_SHORT  = 1,
  parameter int unsigned T_SAMPLE = 3,
  parameter int unsigned T_CAL    = 16,
  parameter int unsigned ADC_LAT  = 4
) (
  input  logic             clk_40,
  input  logic             rst40_n,
  input  logic             cmd_valid,
  input  logic [31:0]      cmd,
  output logic             cmd_ready,
  input  logic             clk_160,
  input  logic             rst160_n,
  // readout chip control
  output logic             r4s_rbi,
  output logic             r4s_phi1,
  output logic             r4s_phi2,
  output logic             r4s_sclk,
  output logic             r4s_la,
  output logic             r4s_cal_ena,
  output logic             r4s_cal_pulse,
  output logic             r4s_hold,
  // ADC
  output logic             adc_pd,
  output logic             adc_clk,
  input  logic [ADC_W-1:0] adc_data,
  // TLU
  input  logic             tlu_trig,
  output logic             tlu_busy,
  // pixel stream
  output logic [31:0]      m_axis_tdata,
  output logic             m_axis_tvalid,
  output logic             m_axis_tlast,
  input  logic             m_axis_tready,
  // status (clk_160 domain) and event pulses
  output logic             armed,
  output logic             seq_busy,
  output logic             adc_on,
  output logic             overflow,
  output logic             ev_frame_done,
  output logic             ev_trig_ignored,
  output logic             ev_dropped
);
  logic        fifo_full, fifo_empty, pop;
  logic [31:0] head;
  cmd_t        c;

  async_fifo #(.W(32), .AW(2)) u_cmd_cdc (
    .wclk(clk_40), .wrst_n(rst40_n), .wr_en(cmd_valid), .wdata(cmd), .full(fifo_full),
    .rclk(clk_160), .rrst_n(rst160_n), .rd_en(pop), .rdata(head), .empty(fifo_empty));

  assign cmd_ready = !fifo_full;
  assign c         = cmd_t'(head);

  // Command execution (160 MHz).
  logic       running;          // frame started and not yet done
  logic       man_start, trg_start, seq_start, seq_done;
  logic       arm_cal, cur_cal, cur_trig, single;
  logic [7:0] sel_col, sel_row;
  logic       clr_ovf;
  logic       is_frame_cmd;

  assign is_frame_cmd = (c.op == OP_READ_FRAME) || (c.op == OP_CAL_PIXEL);
  // Frame commands wait until no frame is running or being triggered.
  assign pop       = !fifo_empty && !(is_frame_cmd && (running || tlu_busy));
  assign man_start = pop && is_frame_cmd;
  assign seq_start = man_start || trg_start;

  always_ff @(posedge clk_160 or negedge rst160_n) begin
    if (!rst160_n) begin
      running  <= 1'b0;
      armed    <= 1'b0;
      arm_cal  <= 1'b0;
      cur_cal  <= 1'b0;
      cur_trig <= 1'b0;
      single   <= 1'b0;
      sel_col  <= '0;
      sel_row  <= '0;
      adc_on   <= 1'b0;
      clr_ovf  <= 1'b0;
    end else begin
      clr_ovf <= 1'b0;
      if (seq_done)  running <= 1'b0;
      if (seq_start) running <= 1'b1;
      if (trg_start) begin
        cur_cal  <= arm_cal;
        cur_trig <= 1'b1;
        single   <= 1'b0;
      end
      if (pop) begin
        unique case (c.op)
          OP_READ_FRAME: begin
            cur_cal  <= c.arg[0];
            cur_trig <= 1'b0;
            single   <= 1'b0;
            clr_ovf  <= 1'b1;
          end
          OP_CAL_PIXEL: begin
            cur_cal  <= 1'b1;
            cur_trig <= 1'b0;
            single   <= 1'b1;
            sel_col  <= c.arg[15:8];
            sel_row  <= c.arg[7:0];
          end
          OP_ARM: begin
            armed   <= 1'b1;
            arm_cal <= c.arg[0];
            clr_ovf <= 1'b1;
          end
          OP_DISARM:   armed  <= 1'b0;
          OP_ADC_CTRL: adc_on <= c.arg[0];
          default: ;
        endcase
      end
    end
  end

  // Trigger handshake: triggers are acted on only while armed and idle.
  logic trig_ignored;
  tlu_trigger u_tlu (
    .clk(clk_160), .rst_n(rst160_n), .trig_in(tlu_trig),
    .armed(armed && (tlu_busy || (!running && !man_start))), .seq_done,
    .start(trg_start), .busy_out(tlu_busy), .hold(r4s_hold), .ignored(trig_ignored));

  // Sequencer. cal_mode is taken from the command for manual frames.
  logic       smp, lst;
  logic [7:0] scol, srow;
  r4s_readout_seq #(
    .COLS(COLS), .ROWS(ROWS), .T_RST(T_RST), .T_SHORT(T_SHORT), .T_SAMPLE(T_SAMPLE), .T_CAL(T_CAL)
  ) u_seq (
    .clk(clk_160), .rst_n(rst160_n), .start(seq_start),
    .cal_mode(man_start ? (c.op == OP_CAL_PIXEL || c.arg[0]) : arm_cal),
    .busy(seq_busy), .done(seq_done),
    .rbi(r4s_rbi), .phi1(r4s_phi1), .phi2(r4s_phi2), .sclk(r4s_sclk), .la(r4s_la),
    .cal_ena(r4s_cal_ena), .cal_pulse(r4s_cal_pulse),
    .sample(smp), .col(scol), .row(srow), .last(lst));

  // Pixel selection and capture.
  logic       hit, keep;
  pix_flags_t fl;
  assign hit  = (scol == sel_col) && (srow == sel_row);
  assign keep = smp && (!single || hit);
  assign fl   = '{triggered: cur_trig, cal: cur_cal,
                  first: single ? 1'b1 : (scol == '0 && srow == '0), single: single};

  adc_capture #(.ADC_LAT(ADC_LAT)) u_adc (
    .clk(clk_160), .rst_n(rst160_n),
    .adc_en_req(adc_on), .adc_pd, .adc_clk, .adc_data,
    .sample(keep), .col(scol), .row(srow), .last(single ? hit : lst), .flags(fl),
    .m_axis_tdata, .m_axis_tvalid, .m_axis_tlast, .m_axis_tready,
    .clr_overflow(clr_ovf), .overflow, .dropped(ev_dropped));

  assign ev_frame_done   = seq_done;
  assign ev_trig_ignored = trig_ignored;
endmodule
