// cc2500_model - behavioural SPI slave standing in for the CC2500 radio
// (testbench only).
//
// While CSn is high, SO is high. After CSn falls, SO stays high for
// RDY_CLKS clocks (crystal start-up, CHIP_RDYn) and then goes low. Bits on
// SI are taken at rising SCLK edges, MSB first. In each CSn-low frame the
// first byte is the header: 0x7F (TX FIFO burst write) stores the following
// bytes in fifo_bytes; a lone 0x35 is the STX strobe, which moves the FIFO
// contents to tx_bytes (the "sent" stream) and counts a packet. A lone 0x30
// (SRES) resets the register file; a two-byte frame whose header has the
// read and burst bits clear writes the register at that address (0x3E is
// PATABLE[0]) and is counted in cfg_writes. An STX strobe before any SRES,
// and anything else, is counted in bad_frames, as is a bit count that is not a multiple
// of 8 or an SCLK edge seen before SO went low. A CSn pulse without SCLK
// edges is ignored, and so is everything before CSn is first seen high
// (the master's pins are undefined until its reset has been applied).
module cc2500_model #(
  parameter int RDY_CLKS = 3
) (
  input  logic clk,
  input  logic csn,
  input  logic sclk,
  input  logic mosi,
  output logic miso
);
  int   fifo_bytes[$];
  int   tx_bytes[$];
  int   packets = 0;
  int   bad_frames = 0;
  int   rdy_waits = 0;      // frames in which the master had to wait for SO
  int   sres_count = 0;
  int   cfg_writes = 0;
  int   regs[64];           // written register values, -1 = not written
  int   frame[$];
  int   nbits = 0;
  logic [7:0] sh = '0;
  int   rdy_cnt = 0;
  logic sclk_q = 0, csn_q = 1;
  logic armed = 0;          // set once CSn has been seen high

  initial begin
    miso = 1'b1;
    foreach (regs[i]) regs[i] = -1;
  end

  always @(posedge clk) begin
    sclk_q <= sclk;
    csn_q  <= csn;
    if (csn) begin
      miso    <= 1'b1;
      rdy_cnt <= 0;
    end else begin
      if (rdy_cnt < RDY_CLKS) rdy_cnt <= rdy_cnt + 1;
      else miso <= 1'b0;
    end
    if (csn) armed <= 1'b1;
    if (armed && !csn && csn_q) begin
      frame.delete();
      nbits = 0;
      rdy_waits++;
    end
    if (armed && !csn && sclk && !sclk_q) begin
      if (miso) bad_frames++;
      sh = {sh[6:0], mosi};
      nbits++;
      if (nbits % 8 == 0) frame.push_back(int'(sh));
    end
    if (armed && csn && !csn_q) begin
      if (nbits == 0) ;   // CSn pulse without clocks (e.g. before reset): ignored
      else if (nbits % 8 != 0) bad_frames++;
      else if (frame[0] == 'h7F) begin
        for (int i = 1; i < frame.size(); i++) fifo_bytes.push_back(frame[i]);
      end else if (frame[0] == 'h30 && frame.size() == 1) begin
        sres_count++;
        foreach (regs[i]) regs[i] = -1;
        fifo_bytes.delete();
      end else if (frame[0] < 'h40 && frame.size() == 2 && (frame[0] < 'h30 || frame[0] == 'h3E)) begin
        regs[frame[0]] = frame[1];
        cfg_writes++;
      end else if (frame[0] == 'h35 && frame.size() == 1 && sres_count > 0) begin
        while (fifo_bytes.size() > 0) tx_bytes.push_back(fifo_bytes.pop_front());
        packets++;
      end else bad_frames++;
    end
  end
endmodule
