// r4s_readout_seq: control-signal generator for reading the pixel matrix.
//
// The readout chip is read through two shift registers: a row register that
// selects a row and a column register that steps through the pixels of the
// selected row, each pixel appearing in turn on the analog output. One frame
// is, in 160 MHz clock cycles:
//
//   RST_COL  T_RST     reset the column shift register   (150 ns)
//   RST_ROW  T_RST     reset the row shift register      (150 ns)
//   for each of ROWS rows:
//     ROW_A  T_SHORT   SCLK low                          (5 ns)
//     ROW_B  T_SHORT   SCLK rises: step the row register (5 ns)
//     CAL    T_CAL     calibration mode only: CAL_PULSE high, falls at the end
//     for each of COLS columns:
//       COL_SH  T_SHORT  PHI1 high: step the column register  (5 ns)
//       COL_SMP T_SAMPLE PHI2 high: pixel settles; sample at the end (15 ns)
//
// The phase order, the 150/5/15 ns durations, the 155 columns and the signal
// names (RBI, PHI1, PHI2, SCLK, LA, CAL_ENA, CAL_PULSE) follow the document's
// readout timing and calibration measurements. Durations are rounded up to
// whole 6.25 ns cycles (150 ns = 24, 5 ns -> 1, 15 ns -> 3). The levels driven
// inside each phase, the row count (160) and the calibration-pulse length are
// this design's own choices: RBI is the token shifted into the row register on
// the first row's SCLK edge, a PHI1 rising edge steps the column register, LA ("read active") is high from the first column scan to the
// end of the frame, CAL_ENA is high for the whole frame in calibration mode.
//
// Interface: a start pulse while !busy begins a frame; cal_mode is latched at
// start. All outputs are registered. sample is a one-cycle strobe on the last
// cycle of each COL_SMP, with col/row (0-based) naming the pixel and last set
// for the final pixel. done pulses one cycle after the last sample. A frame
// lasts 2*T_RST + ROWS*(2*T_SHORT + cal*T_CAL + COLS*(T_SHORT+T_SAMPLE))
// cycles from start to done (99 568 cycles, 622 us, at the defaults).
module r4s_readout_seq #(
  parameter int unsigned COLS     = 155,
  parameter int unsigned ROWS     = 160,
  parameter int unsigned T_RST    = 24,
  parameter int unsigned T_SHORT  = 1,
  parameter int unsigned T_SAMPLE = 3,
  parameter int unsigned T_CAL    = 16
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic       cal_mode,
  output logic       busy,
  output logic       done,
  output logic       rbi,
  output logic       phi1,
  output logic       phi2,
  output logic       sclk,
  output logic       la,
  output logic       cal_ena,
  output logic       cal_pulse,
  output logic       sample,
  output logic [7:0] col,
  output logic [7:0] row,
  output logic       last
);
  typedef enum logic [2:0] {S_IDLE, S_RST_COL, S_RST_ROW, S_ROW_A, S_ROW_B, S_CAL, S_COL_SH, S_COL_SMP} state_e;

  localparam int unsigned TMAX = (T_RST > T_CAL) ? T_RST : T_CAL;
  localparam int unsigned TW   = $clog2(TMAX + 1);

  state_e        state, state_n;
  logic [TW-1:0] tcnt;         // cycles left in the phase, minus one
  logic [7:0]    c, r;         // current column and row
  logic          cal_q;
  logic          phase_end, last_col, last_row;

  assign phase_end = (tcnt == '0);
  assign last_col  = (c == 8'(COLS - 1));
  assign last_row  = (r == 8'(ROWS - 1));

  function automatic logic [TW-1:0] len(input state_e s);
    unique case (s)
      S_RST_COL, S_RST_ROW: return TW'(T_RST - 1);
      S_CAL:                return TW'(T_CAL - 1);
      S_COL_SMP:            return TW'(T_SAMPLE - 1);
      default:              return TW'(T_SHORT - 1);
    endcase
  endfunction

  always_comb begin
    state_n = state;
    unique case (state)
      S_IDLE:    if (start) state_n = S_RST_COL;
      S_RST_COL: if (phase_end) state_n = S_RST_ROW;
      S_RST_ROW: if (phase_end) state_n = S_ROW_A;
      S_ROW_A:   if (phase_end) state_n = S_ROW_B;
      S_ROW_B:   if (phase_end) state_n = cal_q ? S_CAL : S_COL_SH;
      S_CAL:     if (phase_end) state_n = S_COL_SH;
      S_COL_SH:  if (phase_end) state_n = S_COL_SMP;
      S_COL_SMP: if (phase_end) state_n = !last_col ? S_COL_SH : (last_row ? S_IDLE : S_ROW_A);
      default:   state_n = S_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      tcnt  <= '0;
      c     <= '0;
      r     <= '0;
      cal_q <= 1'b0;
    end else begin
      state <= state_n;
      if (state_n != state) tcnt <= len(state_n);
      else if (!phase_end)  tcnt <= tcnt - 1'b1;
      if (state == S_IDLE && start) begin
        cal_q <= cal_mode;
        c     <= '0;
        r     <= '0;
      end
      if (state == S_COL_SMP && phase_end) begin
        c <= last_col ? '0 : c + 1'b1;
        if (last_col) r <= r + 1'b1;
      end
    end
  end

  // Output decode, registered so the chip lines change together and cleanly.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {busy, done, rbi, phi1, phi2, sclk, la, cal_ena, cal_pulse, sample, last} <= '0;
      col <= '0;
      row <= '0;
    end else begin
      busy      <= (state != S_IDLE);
      done      <= (state == S_COL_SMP) && phase_end && last_col && last_row;
      sclk      <= (state == S_RST_ROW) || (state == S_ROW_B);
      rbi       <= (state == S_ROW_A || state == S_ROW_B) && (r == '0);
      phi1      <= (state == S_RST_COL) || (state == S_COL_SH);
      phi2      <= (state == S_RST_COL) || (state == S_COL_SMP);
      la        <= (state == S_COL_SH) || (state == S_COL_SMP) ||
                   ((state == S_ROW_A || state == S_ROW_B || state == S_CAL) && (r != '0));
      cal_ena   <= cal_q && (state != S_IDLE);
      cal_pulse <= (state == S_CAL);
      sample    <= (state == S_COL_SMP) && phase_end;
      last      <= (state == S_COL_SMP) && phase_end && last_col && last_row;
      col       <= c;
      row       <= r;
    end
  end

  initial begin
    assert (COLS >= 1 && COLS <= 256 && ROWS >= 1 && ROWS <= 256)
      else $error("r4s_readout_seq: COLS and ROWS must be 1..256");
    assert (T_RST >= 1 && T_SHORT >= 1 && T_SAMPLE >= 1 && T_CAL >= 1)
      else $error("r4s_readout_seq: phase lengths must be at least one cycle");
  end
endmodule
