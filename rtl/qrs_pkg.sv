// qrs_pkg - types and constants shared by the QRS detection chip.
//
// Widths: the ADC delivers 10-bit codes, the averager makes 12-bit two's
// complement samples and the wavelet filter 14-bit two's complement
// coefficients. These three widths and the timing constants at 300 Sa/s
// (TOL = 0.07 s = 21 samples, RP = 25 samples) come from the design
// description; DLY, beta and the radio byte layout are choices of this design.
package qrs_pkg;

  localparam int unsigned ADC_W   = 10;   // SAR ADC resolution
  localparam int unsigned SAMPLE_W = 12;  // processor input, two's complement
  localparam int unsigned COEFF_W = 14;   // wavelet coefficient, two's complement

  localparam int unsigned TOL_DEF = 21;   // 0.07 s * 300 Sa/s
  localparam int unsigned RP_DEF  = 25;   // refractory blanking, samples
  localparam int unsigned DLY_DEF = 21;   // FSM 2 marking delay (own choice)

  typedef logic signed [SAMPLE_W-1:0] sample_t;
  typedef logic signed [COEFF_W-1:0]  coeff_t;

  // Result of the zero-crossing rule, eq. (6): 1 = rising, 2 = falling.
  typedef enum logic [1:0] {
    ZC_NONE = 2'd0,
    ZC_RISE = 2'd1,
    ZC_FALL = 2'd2
  } zc_code_e;

  // Peak detection: zero crossings of the first difference.
  // A rising difference (code 1) marks a local minimum, a falling one
  // (code 2) a local maximum.
  typedef enum logic [1:0] {
    PK_NONE = 2'd0,
    PK_MIN  = 2'd1,
    PK_MAX  = 2'd2
  } peak_e;

  typedef enum logic [1:0] {
    F1_SEEN_NONE     = 2'd0,
    F1_SEEN_PEAK     = 2'd1,
    F1_SEEN_ZERO     = 2'd2,
    F1_SEEN_OPPOSITE = 2'd3
  } fsm1_state_e;

  typedef enum logic [1:0] {
    F2_SEEN_NONE      = 2'd0,
    F2_SEEN_CANDIDATE = 2'd1,
    F2_SEEN_CONFIRM   = 2'd2
  } fsm2_state_e;

  // Radio transmission modes.
  typedef enum logic [1:0] {
    MODE_OFF  = 2'd0,   // not a valid mode: nothing is sent
    MODE_QRS  = 2'd1,   // QRS results only, five per byte
    MODE_RAW  = 2'd2,   // raw ECG, two bytes per sample, QRS bit forced to 0
    MODE_BOTH = 2'd3    // raw ECG and QRS bit, two bytes per sample
  } tx_mode_e;

  // Every radio byte carries 3 control bits in bits [7:5]:
  // {mode[1:0], first}. 'first' is 1 on the first (or only) byte of a data
  // unit, so a receiver can re-align two-byte words.
  typedef struct packed {
    tx_mode_e   mode;
    logic       first;
  } ctrl_t;

  // Mode 1 byte: control bits, then five QRS results, oldest in bit 4.
  typedef struct packed {
    ctrl_t      ctrl;
    logic [4:0] qrs;
  } qrs_byte_t;

  // Mode 2/3 word, 16 bits sent high byte first: 3 control bits, the QRS bit
  // and the 12-bit sample exactly fill it, so the control bits appear once
  // per word, in the high byte, with first = 1.
  typedef struct packed {
    ctrl_t            ctrl;
    logic             qrs;
    logic [SAMPLE_W-1:0] sample;
  } raw_word_t;

  // CC2500 SPI command bytes (from the radio's data sheet).
  localparam logic [7:0] CC_TXFIFO_BURST = 8'h7F;
  localparam logic [7:0] CC_STROBE_STX   = 8'h35;
  localparam logic [7:0] CC_STROBE_SRES  = 8'h30;

  // CC2500 configuration registers written after reset (single-byte
  // writes: header = address with R/W = 0 and burst = 0, then the value).
  localparam logic [7:0] CC_PKTLEN   = 8'h06;   // packet length
  localparam logic [7:0] CC_PKTCTRL0 = 8'h08;   // packet format
  localparam logic [7:0] CC_FREQ2    = 8'h0D;   // carrier frequency word
  localparam logic [7:0] CC_FREQ1    = 8'h0E;
  localparam logic [7:0] CC_FREQ0    = 8'h0F;
  localparam logic [7:0] CC_MDMCFG4  = 8'h10;   // channel bandwidth, DRATE_E
  localparam logic [7:0] CC_MDMCFG3  = 8'h11;   // DRATE_M
  localparam logic [7:0] CC_MDMCFG2  = 8'h12;   // modulation, sync mode
  localparam logic [7:0] CC_MCSM0    = 8'h18;   // calibration policy
  localparam logic [7:0] CC_PATABLE  = 8'h3E;   // output power

endpackage
