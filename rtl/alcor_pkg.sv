// alcor_pkg: types and constants shared by the ALCOR pixel matrix and
// End-of-Column (EoC) readout.
//
// The 32-bit event word follows the field order of the design description:
// column (3 bit), pixel (3 bit), TDC address (2 bit), coarse time (15 bit),
// fine time (9 bit), packed from the most significant bit down. The idle
// value of the column data bus, 32'h1FFFFFFF, is the value seen on an idle
// column in the published waveforms. Configuration bit assignments and the
// EoC frame word formats are this implementation's own choices.
package alcor_pkg;

  localparam int unsigned COL_W    = 3;
  localparam int unsigned PIX_W    = 3;
  localparam int unsigned TDC_W    = 2;
  localparam int unsigned COARSE_W = 15;
  localparam int unsigned FINE_W   = 9;
  localparam int unsigned WORD_W   = 32;
  localparam int unsigned N_TDC    = 4;

  typedef struct packed {
    logic [COL_W-1:0]    col;
    logic [PIX_W-1:0]    pix;
    logic [TDC_W-1:0]    tdc;
    logic [COARSE_W-1:0] coarse;
    logic [FINE_W-1:0]   fine;
  } event_word_t;

  localparam logic [WORD_W-1:0] IDLE_WORD = 32'h1FFF_FFFF;

  // Pixel configuration register (one per pixel, daisy chained)
  localparam int unsigned CFG_W = 8;
  typedef struct packed {
    logic       fe_enable;   // [7] passed to the analogue front end
    logic [3:0] tdc_mask;    // [6:3] TDCs allowed to take events
    logic       trig_sel;    // [2] 0: discriminator 1, 1: discriminator 2
    logic       tot_mode;    // [1] Time-over-Threshold mode
    logic       enable;      // [0] pixel takes events
  } pixel_cfg_t;

  localparam pixel_cfg_t CFG_RESET = '{fe_enable: 1'b1, tdc_mask: 4'hF,
                                       trig_sel: 1'b0, tot_mode: 1'b0,
                                       enable: 1'b1};

  // EoC frame words (bit 32 of the second-layer word marks control words)
  localparam logic [7:0] HEADER_MARK = 8'hA5;
  typedef enum logic [2:0] {
    FR_IDLE, FR_HEADER, FR_FRAMENO, FR_DATA, FR_STATUS, FR_CRC
  } frame_state_e;

  // 8b/10b control characters used by the serialiser
  localparam logic [7:0] K28_5 = 8'hBC;  // idle comma
  localparam logic [7:0] K28_1 = 8'h3C;  // precedes a control word

endpackage
