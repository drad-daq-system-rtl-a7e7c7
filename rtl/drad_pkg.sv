// drad_pkg: types and constants shared by the DAQ logic.
//
// The DAQ reads up to four pixel readout chips at once, one channel per chip.
// Software sends 32-bit command words to a channel; the channel either forwards
// them to its I2C controller (reference DACs on the adapter board) or acts on
// them itself (matrix readout, single-pixel calibration, triggered readout,
// ADC control). Captured pixels leave each channel as 32-bit stream words.
//
// The channel count (four) and the column count (155) follow the document; the
// command encoding, the stream word layout and the row count (160, the chip's
// known matrix height) are this design's own choices.
package drad_pkg;

  // ADC word width. The channel count (4), columns (155) and rows (160) are
  // parameters of the modules that use them.
  localparam int unsigned ADC_W = 12;

  // Command word: opcode in [31:28], payload below.
  typedef enum logic [3:0] {
    OP_NOP        = 4'h0,
    OP_I2C_WRITE  = 4'h1,  // [22:16] device address, [15:8] byte 0, [7:0] byte 1
    OP_READ_FRAME = 4'h2,  // [0] calibration mode: read the whole matrix now
    OP_ARM        = 4'h3,  // [0] calibration mode: read one frame per TLU trigger
    OP_DISARM     = 4'h4,  // leave triggered mode
    OP_CAL_PIXEL  = 4'h5,  // [15:8] column, [7:0] row: calibrate and read one pixel
    OP_ADC_CTRL   = 4'h6   // [0] ADC enable
  } opcode_e;

  typedef struct packed {
    opcode_e     op;
    logic [27:0] arg;
  } cmd_t;

  // Flags carried in each stream word.
  typedef struct packed {
    logic triggered;  // frame started by a TLU trigger
    logic cal;        // frame read in calibration mode
    logic first;      // first word of a frame
    logic single;     // single-pixel calibration result
  } pix_flags_t;

  // Stream word: {flags, row, column, ADC sample}.
  typedef struct packed {
    pix_flags_t       flags;
    logic [7:0]       row;
    logic [7:0]       col;
    logic [ADC_W-1:0] adc;
  } pix_word_t;

  // Per-channel status bits as seen by software.
  typedef struct packed {
    logic cmd_full;   // command FIFO full
    logic adc_on;     // ADC enabled
    logic overflow;   // sticky: a pixel word was dropped
    logic tlu_busy;   // BUSY driven to the TLU
    logic armed;      // waiting for triggers
    logic seq_busy;   // a readout is running
    logic i2c_nack;   // last I2C write was not acknowledged
    logic i2c_busy;   // I2C write in progress
  } ch_status_t;

endpackage
