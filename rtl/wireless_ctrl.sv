// wireless_ctrl - packs detection results and ECG samples for the CC2500.
//
// Three transmission modes:
//   MODE_QRS  (1): one byte per five processor samples,
//                  {ctrl, qrs[4:0]} with the oldest result in bit 4;
//   MODE_RAW  (2): two bytes per sample, {ctrl, qrs = 0, sample[11:8]}
//                  then sample[7:0];
//   MODE_BOTH (3): as MODE_RAW but carrying the QRS indication.
// ctrl is 3 bits {mode, first}; first = 1 on every byte of mode 1 and on
// the high byte of a mode 2/3 word. Bytes are collected into a packet of
// PKT_BYTES (12). The mode is sampled when a packet starts, so a packet
// never mixes formats; MODE_OFF (0) sends nothing.
//
// After reset the controller first configures the radio: an SRES strobe,
// then single-register writes that set the packet length to PKT_BYTES
// (fixed length, CRC on), the carrier to RF_KHZ, the data rate to
// (256 + DRATE_M) * 2^DRATE_E / 2^28 * f_xtal (250 kBaud with the
// defaults and a 26 MHz crystal), MSK modulation with 30/32 sync-word
// bits, calibration on every IDLE-to-TX move, and PATABLE[0] = PA_SETTING
// (0 dBm). Samples that arrive before this is done are not sent.
//
// A full packet is then copied to a transmit buffer and sent over SPI
// (mode 0, MSB first, SCLK = clk / SCLK_DIV):
//   CSn low, wait for SO low (CHIP_RDYn), 0x7F (TX FIFO burst write),
//   PKT_BYTES data bytes, CSn high; CSn low, wait for SO low,
//   0x35 (STX strobe), CSn high.
// Every SPI frame (configuration write, FIFO burst, strobe) is built in one
// frame buffer and shifted out by the same engine.
// With the 76.8 kHz clock a packet takes about 250 clocks, less than one
// processor sample (256 clocks); a packet completes at most every six
// samples, so the transmit buffer is always free when the next one is ready.
// The byte layouts, 12-byte packets, 250 kBaud, 0 dBm, 2.4 GHz band and the
// three modes follow the description; the control-bit meaning, the SPI
// sequence, the register values (from the CC2500 data sheet) and the exact
// channel are this design's. Registers not listed keep their reset values.
module wireless_ctrl
  import qrs_pkg::*;
#(
  parameter int unsigned PKT_BYTES  = 12,
  parameter int unsigned SCLK_DIV   = 2,
  parameter int unsigned XTAL_KHZ   = 26000,     // radio crystal
  parameter int unsigned RF_KHZ     = 2433000,   // carrier
  parameter int unsigned DRATE_E    = 13,        // 250 kBaud with 26 MHz
  parameter int unsigned DRATE_M    = 59,
  parameter logic [7:0]  PA_SETTING = 8'hFE      // 0 dBm
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     run,
  input  tx_mode_e mode,
  input  logic     sample_valid,
  input  sample_t  sample,
  input  logic     qrs,
  output logic     spi_csn,
  output logic     spi_sclk,
  output logic     spi_mosi,
  input  logic     spi_miso,
  output logic     pkt_sent       // one clock when a packet's STX strobe ends
);

  localparam int unsigned BC_W   = $clog2(PKT_BYTES + 1);
  localparam int unsigned HALF   = SCLK_DIV / 2;
  localparam int unsigned HALF_W = (HALF > 1) ? $clog2(HALF) : 1;

  // ---------------------------------------------------------------- packer
  logic           cfg_done;          // radio configured (SPI section)
  logic [7:0]     pbuf [PKT_BYTES];
  logic [BC_W-1:0] bcnt;
  logic [2:0]     qcnt;
  logic [3:0]     qbits;
  tx_mode_e       pmode;
  logic           pkt_ready;

  qrs_byte_t q_byte;
  raw_word_t r_word;
  logic      start_pkt;
  tx_mode_e  cur_mode;

  assign start_pkt = (bcnt == '0) && (qcnt == '0);
  assign cur_mode  = start_pkt ? mode : pmode;

  always_comb begin
    q_byte.ctrl.mode  = MODE_QRS;
    q_byte.ctrl.first = 1'b1;
    q_byte.qrs        = {qbits, qrs};
    r_word.ctrl.mode  = cur_mode;
    r_word.ctrl.first = 1'b1;
    r_word.qrs        = (cur_mode == MODE_BOTH) ? qrs : 1'b0;
    r_word.sample     = sample;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bcnt      <= '0;
      qcnt      <= '0;
      qbits     <= '0;
      pmode     <= MODE_OFF;
      pkt_ready <= 1'b0;
      for (int i = 0; i < PKT_BYTES; i++) pbuf[i] <= '0;
    end else begin
      pkt_ready <= 1'b0;
      if (!run || !cfg_done) begin
        bcnt <= '0;
        qcnt <= '0;
      end else if (sample_valid) begin
        if (start_pkt) pmode <= mode;
        unique case (cur_mode)
          MODE_QRS: begin
            if (qcnt == 3'd4) begin
              pbuf[bcnt] <= q_byte;
              qcnt       <= '0;
              if (bcnt == BC_W'(PKT_BYTES - 1)) begin
                bcnt      <= '0;
                pkt_ready <= 1'b1;
              end else begin
                bcnt <= bcnt + 1'b1;
              end
            end else begin
              qbits <= {qbits[2:0], qrs};
              qcnt  <= qcnt + 1'b1;
            end
          end
          MODE_RAW, MODE_BOTH: begin
            pbuf[bcnt]        <= r_word[15:8];
            pbuf[bcnt + 1'b1] <= r_word[7:0];
            if (bcnt == BC_W'(PKT_BYTES - 2)) begin
              bcnt      <= '0;
              pkt_ready <= 1'b1;
            end else begin
              bcnt <= bcnt + BC_W'(2);
            end
          end
          default: ;
        endcase
      end
    end
  end

  // ---------------------------------------------------------------- SPI
  // Radio configuration: frame 0 is the SRES strobe, frames 1.. are
  // {address, value} writes.
  localparam int unsigned N_CFG = 11;
  localparam int unsigned CI_W  = $clog2(N_CFG);
  localparam longint unsigned FREQ_WORD =
      (longint'(RF_KHZ) * 65536 + longint'(XTAL_KHZ) / 2) / longint'(XTAL_KHZ);

  function automatic logic [15:0] cfg_frame(input logic [CI_W-1:0] k);
    unique case (k)
      CI_W'(1):  return {CC_PKTLEN,   8'(PKT_BYTES)};
      CI_W'(2):  return {CC_PKTCTRL0, 8'h04};                 // fixed length, CRC
      CI_W'(3):  return {CC_FREQ2,    FREQ_WORD[23:16]};
      CI_W'(4):  return {CC_FREQ1,    FREQ_WORD[15:8]};
      CI_W'(5):  return {CC_FREQ0,    FREQ_WORD[7:0]};
      CI_W'(6):  return {CC_MDMCFG4,  4'h2, 4'(DRATE_E)};     // 541 kHz channel
      CI_W'(7):  return {CC_MDMCFG3,  8'(DRATE_M)};
      CI_W'(8):  return {CC_MDMCFG2,  8'h73};                 // MSK, 30/32 sync
      CI_W'(9):  return {CC_MCSM0,    8'h18};                 // calibrate IDLE->TX
      CI_W'(10): return {CC_PATABLE,  PA_SETTING};
      default:   return {CC_STROBE_SRES, 8'h00};
    endcase
  endfunction

  typedef enum logic [1:0] {
    S_IDLE,
    S_WAIT_RDY,
    S_SHIFT,
    S_GAP
  } spi_state_e;

  typedef enum logic [1:0] {
    F_CFG,                             // configuration strobe or write
    F_FIFO,                            // TX FIFO burst with a packet
    F_STX                              // transmit strobe
  } frame_e;

  spi_state_e      sstate;
  frame_e          fkind;
  logic [CI_W-1:0] cfg_idx;
  logic [7:0]      fbuf [PKT_BYTES + 1];  // frame: header byte, then data
  logic [BC_W-1:0] byte_idx;              // byte being shifted
  logic [BC_W-1:0] last_idx;              // last byte of the frame
  logic [2:0]      bit_idx;
  logic [7:0]      shreg;
  logic [HALF_W-1:0] hcnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sstate   <= S_IDLE;
      fkind    <= F_CFG;
      cfg_idx  <= '0;
      cfg_done <= 1'b0;
      byte_idx <= '0;
      last_idx <= '0;
      bit_idx  <= '0;
      shreg    <= '0;
      hcnt     <= '0;
      spi_csn  <= 1'b1;
      spi_sclk <= 1'b0;
      spi_mosi <= 1'b0;
      pkt_sent <= 1'b0;
      for (int i = 0; i <= PKT_BYTES; i++) fbuf[i] <= '0;
    end else begin
      pkt_sent <= 1'b0;
      unique case (sstate)
        S_IDLE: begin
          if (!cfg_done) begin
            {fbuf[0], fbuf[1]} <= cfg_frame(cfg_idx);
            last_idx <= (cfg_idx == '0) ? '0 : BC_W'(1);
            fkind    <= F_CFG;
            spi_csn  <= 1'b0;
            sstate   <= S_WAIT_RDY;
          end else if (pkt_ready) begin
            fbuf[0] <= CC_TXFIFO_BURST;
            for (int i = 0; i < PKT_BYTES; i++) fbuf[i + 1] <= pbuf[i];
            last_idx <= BC_W'(PKT_BYTES);
            fkind    <= F_FIFO;
            spi_csn  <= 1'b0;
            sstate   <= S_WAIT_RDY;
          end
        end
        S_WAIT_RDY: begin
          if (!spi_miso) begin
            shreg    <= fbuf[0];
            spi_mosi <= fbuf[0][7];
            byte_idx <= '0;
            bit_idx  <= '0;
            hcnt     <= '0;
            sstate   <= S_SHIFT;
          end
        end
        S_SHIFT: begin
          // mosi is stable during a whole SCLK period; the radio samples
          // it on the rising edge
          if (hcnt != HALF_W'(HALF - 1)) begin
            hcnt <= hcnt + 1'b1;
          end else begin
            hcnt <= '0;
            if (!spi_sclk) begin
              spi_sclk <= 1'b1;
            end else begin
              spi_sclk <= 1'b0;
              if (bit_idx != 3'd7) begin
                bit_idx  <= bit_idx + 1'b1;
                shreg    <= {shreg[6:0], 1'b0};
                spi_mosi <= shreg[6];
              end else if (byte_idx != last_idx) begin
                bit_idx  <= '0;
                byte_idx <= byte_idx + 1'b1;
                shreg    <= fbuf[byte_idx + 1'b1];
                spi_mosi <= fbuf[byte_idx + 1'b1][7];
              end else begin
                spi_mosi <= 1'b0;
                spi_csn  <= 1'b1;
                sstate   <= S_GAP;
              end
            end
          end
        end
        S_GAP: begin
          unique case (fkind)
            F_CFG: begin
              if (cfg_idx == CI_W'(N_CFG - 1)) cfg_done <= 1'b1;
              cfg_idx <= cfg_idx + 1'b1;
              sstate  <= S_IDLE;
            end
            F_FIFO: begin
              fbuf[0]  <= CC_STROBE_STX;
              last_idx <= '0;
              fkind    <= F_STX;
              spi_csn  <= 1'b0;
              sstate   <= S_WAIT_RDY;
            end
            default: begin
              pkt_sent <= 1'b1;
              sstate   <= S_IDLE;
            end
          endcase
        end
        default: sstate <= S_IDLE;
      endcase
    end
  end

  // a finished packet must find the transmitter idle
  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n)
    pkt_ready |-> sstate == S_IDLE);

endmodule
