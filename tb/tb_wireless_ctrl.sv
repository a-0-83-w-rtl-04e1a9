// tb_wireless_ctrl - self-checking test of the packet builder and SPI master.
// Random 12-bit samples and QRS bits are offered once every SPACING clocks
// while the mode changes between 1, 3 and 2. A CC2500 model records what
// reaches its TX FIFO. The test decodes every received 12-byte packet by
// its control bits and requires that the samples and QRS bits it carries
// continue the offered sequence exactly (five QRS bits per byte in mode 1,
// one 16-bit word per sample in modes 2 and 3 with the QRS bit cleared in
// mode 2), that every packet is followed by exactly one STX strobe, that
// no SPI frame is malformed and that all three modes were seen. Before
// any data, the radio's registers must have been set after one SRES
// strobe: 12-byte fixed-length packets with CRC, a carrier within 1 kHz of
// 2433 MHz, 250 kBaud within 1 %, MSK, calibration on IDLE to TX and
// PATABLE 0xFE (0 dBm), worked out from the register values with the data
// sheet's formulas for a 26 MHz crystal.
module tb_wireless_ctrl;
  import qrs_pkg::*;
  localparam int SPACING = 256;   // clocks per sample, as 76.8 kHz / 300 Hz
  logic clk = 0, rst_n = 0, run = 0;
  tx_mode_e mode = MODE_QRS;
  logic sample_valid = 0;
  sample_t sample = '0;
  logic qrs = 0;
  logic spi_csn, spi_sclk, spi_mosi, spi_miso, pkt_sent;
  int checks = 0, failures = 0;
  int rec_s[$], rec_q[$];
  int seen_mode[4] = '{0, 0, 0, 0};
  int n_sent = 0;

  wireless_ctrl dut (.*);
  cc2500_model u_cc (.clk(clk), .csn(spi_csn), .sclk(spi_sclk), .mosi(spi_mosi), .miso(spi_miso));

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n && pkt_sent) n_sent++;

  initial begin
    repeat (2000 * SPACING) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_config();
    real f_xtal, f_rf, rate;
    f_xtal = 26.0e6;
    f_rf = real'((u_cc.regs['h0D] << 16) | (u_cc.regs['h0E] << 8) | u_cc.regs['h0F]) * f_xtal / 65536.0;
    rate = real'(256 + u_cc.regs['h11]) * real'(1 << (u_cc.regs['h10] & 'hF)) / 268435456.0 * f_xtal;
    $display("radio: %0d register writes, carrier %0.3f MHz, %0.1f Baud, PKTLEN %0d, PATABLE %02h",
             u_cc.cfg_writes, f_rf / 1.0e6, rate, u_cc.regs['h06], u_cc.regs['h3E]);
    checks++;
    if (u_cc.sres_count != 1 || u_cc.cfg_writes != 10 || u_cc.bad_frames != 0) begin
      failures++; $display("configuration frames: sres %0d writes %0d", u_cc.sres_count, u_cc.cfg_writes);
    end
    checks++;
    if (u_cc.regs['h06] != 12) begin failures++; $display("packet length %0d", u_cc.regs['h06]); end
    checks++;
    if ((u_cc.regs['h08] & 'h07) != 'h04) begin failures++; $display("PKTCTRL0 %02h", u_cc.regs['h08]); end
    checks++;
    if (f_rf < 2.400e9 || f_rf > 2.4835e9 || f_rf - 2.433e9 > 1.0e3 || 2.433e9 - f_rf > 1.0e3) begin
      failures++; $display("carrier %f", f_rf);
    end
    checks++;
    if (rate < 247.5e3 || rate > 252.5e3) begin failures++; $display("data rate %f", rate); end
    checks++;
    if (((u_cc.regs['h12] >> 4) & 7) != 7) begin failures++; $display("modulation %02h", u_cc.regs['h12]); end
    checks++;
    if (((u_cc.regs['h18] >> 4) & 3) != 1) begin failures++; $display("MCSM0 %02h", u_cc.regs['h18]); end
    checks++;
    if (u_cc.regs['h3E] != 'hFE) begin failures++; $display("PATABLE %02h", u_cc.regs['h3E]); end
  endtask

  initial begin
    int p, nbytes;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // the radio is configured first; check it with the data-sheet formulas
    wait (dut.cfg_done);
    @(negedge clk);
    check_config();
    @(negedge clk) run = 1;
    for (int k = 0; k < 1200; k++) begin
      if (k == 400) mode = MODE_BOTH;
      if (k == 800) mode = MODE_RAW;
      repeat (SPACING - 1) @(negedge clk);
      sample_valid = 1;
      sample = 12'($urandom);
      qrs = ($urandom_range(0, 6) == 0);
      rec_s.push_back(int'(sample) & 'hFFF);
      rec_q.push_back(int'(qrs));
      @(negedge clk) sample_valid = 0;
    end
    repeat (2 * SPACING) @(negedge clk);

    // decode what the radio received
    p = 0;
    nbytes = u_cc.tx_bytes.size();
    checks++;
    if (nbytes % 12 != 0 || nbytes < 12 * 40) begin
      failures++;
      $display("received %0d bytes", nbytes);
    end
    for (int b = 0; b + 12 <= nbytes; b += 12) begin
      int m;
      m = u_cc.tx_bytes[b] >> 6;
      seen_mode[m]++;
      if (m == 1) begin
        for (int i = 0; i < 12; i++) begin
          int by;
          by = u_cc.tx_bytes[b + i];
          checks++;
          if (int'(by >> 5) != 3) begin failures++; $display("mode-1 ctrl bits %0h", by); end
          for (int j = 4; j >= 0; j--) begin
            checks++;
            if (((by >> j) & 1) != rec_q[p]) begin failures++; $display("qrs bit of sample %0d", p); end
            p++;
          end
        end
      end else if (m == 2 || m == 3) begin
        for (int i = 0; i < 12; i += 2) begin
          int hi, lo;
          hi = u_cc.tx_bytes[b + i];
          lo = u_cc.tx_bytes[b + i + 1];
          checks++;
          if ((hi >> 5) != (m * 2 + 1)) begin failures++; $display("ctrl bits %0h", hi); end
          checks++;
          if ((((hi & 'hF) << 8) | lo) != rec_s[p]) begin
            failures++;
            $display("sample %0d: got %0h exp %0h", p, ((hi & 'hF) << 8) | lo, rec_s[p]);
          end
          checks++;
          if (((hi >> 4) & 1) != ((m == 3) ? rec_q[p] : 0)) begin failures++; $display("qrs of sample %0d", p); end
          p++;
        end
      end else begin
        failures++;
        $display("bad mode %0d in packet at byte %0d", m, b);
      end
    end
    checks++;
    if (seen_mode[1] == 0 || seen_mode[2] == 0 || seen_mode[3] == 0) failures++;
    checks++;
    if (u_cc.bad_frames != 0 || u_cc.packets != nbytes / 12 || n_sent != u_cc.packets) begin
      failures++;
      $display("bad frames %0d, strobes %0d, packets %0d, sent %0d", u_cc.bad_frames, u_cc.packets, nbytes / 12, n_sent);
    end
    $display("packets per mode: 1:%0d 2:%0d 3:%0d, samples decoded %0d of %0d", seen_mode[1], seen_mode[2], seen_mode[3], p, rec_s.size());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
