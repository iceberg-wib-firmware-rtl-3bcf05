// tb_wib_top: end-to-end test of the WIB data path at its default sizes (RCE
// arrangement: 16 links, 8 CDAs, 4 DAQ links of 4 streams, convert every 32
// system clocks).
//
// FEMB 0 (links 0-3, DAQ link 0) is fed through the real path: frames are
// 8b10b-encoded here, one per convert, and go through femb_rx. All other CDAs
// run their fake COLDATA generators. The four DAQ link outputs are decoded
// here with 8b10b decoders, split back into 32-bit words and every event is
// checked: SOF fields, length, CRC-32 (computed here), the event counter, the
// per-stream headers and, for every frame without capture errors, all 64
// payload bytes against the generators' pattern (byte i of stream s =
// time stamp + i + 64*s).
//
// Mechanisms made to happen and counted (a count of zero is a failure): fake
// and real-path frames, each of the five fake-frame error injections and the
// CD_errors override (seen in the stream counters and in capture_errors), a
// full frame buffer while an event builder is disabled, a corrupted symbol
// on a FEMB link, a deliberately bad CRC, a spy-buffer capture, a sync
// command (reset_count), a time-stamp load that finds the time off
// (out_of_sync), I2C write and read transfers, and a register write and
// read-back through the register bridge.
// Clocks: clk_sys 64 MHz, clk_evb and clk_cd about 210 MHz (see wib_top).
// The block structure and sizes are the firmware's; the frame and event
// formats and the clock rates are this design's choices.
module tb_wib_top;
  import wib_pkg::*;
  localparam int ND = 4;     // DAQ links at the default CDAS_PER_DAQ_LINK = 2
  localparam int NS = 4;     // streams per DAQ link

  logic clk_sys = 0, clk_evb = 0, clk_cd = 0;
  logic reset_sys = 1, reset_evb = 1, reset_cd = 1;
  always #78 clk_sys = ~clk_sys;
  always #24 clk_evb = ~clk_evb;
  always #23 clk_cd  = ~clk_cd;

  WIB_ID_t id;
  logic sync_cmd, ts_valid;
  logic [63:0] ts_in;
  convert_t convert;
  logic [FEMB_COUNT-1:0][LINKS_PER_FEMB-1:0][9:0] femb_sym;
  FEMB_Rx_Control_t [FEMB_COUNT-1:0] rx_ctrl;
  FEMB_Rx_Monitor_t [FEMB_COUNT-1:0] rx_mon;
  Fake_CD_Control_t [CDA_COUNT-1:0] fake_ctrl;
  Fake_CD_Monitor_t [CDA_COUNT-1:0] fake_mon;
  CD_Stream_Control_t [LINK_COUNT-1:0] cd_ctrl;
  CD_Stream_Monitor_t [LINK_COUNT-1:0] cd_mon;
  DAQ_Link_EB_Control_t [ND-1:0] eb_ctrl;
  DAQ_Link_EB_Monitor_t [ND-1:0] eb_mon;
  logic [ND-1:0] tx_ar, tx_dr, tx_kerr;
  logic [ND-1:0][79:0] tx;
  logic [FEMB_COUNT-1:0] i2c_start, i2c_rw, i2c_busy, i2c_done, i2c_ack_error, i2c_scl, i2c_sda_w2c, i2c_sda_c2w;
  logic [FEMB_COUNT-1:0][3:0] i2c_chip;
  logic [FEMB_COUNT-1:0][2:0] i2c_page;
  logic [FEMB_COUNT-1:0][7:0] i2c_reg, i2c_wdata, i2c_rdata;

  logic reg_wr, reg_rd, reg_done, reg_error;
  logic [31:0] reg_din, reg_dout;
  logic [15:0] reg_addr;
  logic [6:0] reg_ra_valid, reg_wa_valid, reg_rd_wr;
  logic [6:0][35:0] reg_rdata;
  logic [6:0][15:0] reg_ra, reg_wa;
  logic [6:0][31:0] reg_wd;

  wib_top dut (
    .clk_sys, .reset_sys, .clk_evb, .reset_evb, .clk_cd, .reset_cd, .WIB_ID(id),
    .sync_cmd, .ts_valid, .ts_in, .convert,
    .FEMB_RX(femb_sym), .femb_rx_control(rx_ctrl), .femb_rx_monitor(rx_mon),
    .fake_cd_control(fake_ctrl), .fake_cd_monitor(fake_mon),
    .cd_stream_control(cd_ctrl), .cd_stream_monitor(cd_mon),
    .eb_control(eb_ctrl), .eb_monitor(eb_mon),
    .tx_analog_reset(tx_ar), .tx_digital_reset(tx_dr), .tx_parallel(tx), .tx_k_error(tx_kerr),
    .i2c_start, .i2c_rw, .i2c_chip_addr(i2c_chip), .i2c_page, .i2c_reg_addr(i2c_reg),
    .i2c_wdata, .i2c_busy, .i2c_done, .i2c_rdata, .i2c_ack_error, .i2c_scl, .i2c_sda_w2c,
    .i2c_sda_c2w,
    .reg_wr_strobe(reg_wr), .reg_rd_strobe(reg_rd), .reg_data_in(reg_din),
    .reg_wr_address(reg_addr), .reg_rd_address(reg_addr), .reg_data_out(reg_dout),
    .reg_busy(), .reg_done(reg_done), .reg_error(reg_error),
    .reg_clk_domain({7{clk_evb}}), .reg_clk_domain_locked(7'b0000001),
    .reg_read_address_ack(reg_ra_valid), .reg_read_data_wr(reg_rd_wr), .reg_read_data(reg_rdata),
    .reg_write_addr_data_ack(reg_wa_valid), .reg_read_address_valid(reg_ra_valid),
    .reg_read_address(reg_ra), .reg_write_addr_data_valid(reg_wa_valid),
    .reg_write_addr(reg_wa), .reg_write_data(reg_wd));

  // Register domain 0 (on clk_evb): a small register file answering at once.
  logic [31:0] reg_file [16];
  always @(posedge clk_evb) begin
    reg_rd_wr <= '0;
    if (reg_wa_valid[0]) reg_file[reg_wa[0][3:0]] <= reg_wd[0];
    if (reg_ra_valid[0]) begin reg_rd_wr[0] <= 1; reg_rdata[0] <= {4'h0, reg_file[reg_ra[0][3:0]]}; end
  end

  int checks = 0, failures = 0;
  function automatic void check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endfunction

  // ---------------- real-path frames on FEMB 0 ----------------
  logic [15:0] gen_ts;
  int          gen_pos;            // -1: idle
  logic        trig_s, trig_q;
  bit          corrupt_next;       // corrupt one payload symbol of link 0
  logic [LINK_COUNT-1:0][8:0] din;
  logic [LINK_COUNT-1:0]      rd_tx, rd_tx_n;
  logic [LINK_COUNT-1:0][9:0] code;
  logic [9:0]                 corrupt_sym;

  function automatic logic [7:0] pattern(logic [15:0] ts, int i, int s);
    return 8'(ts[7:0] + 8'(i) + 8'(64 * s));
  endfunction

  function automatic logic [8:0] frame_word(int l, int pos, logic [15:0] ts);
    logic [15:0] sum = 16'(ts[15:8]) + 16'(ts[7:0]);
    for (int i = 0; i < 64; i++) sum = sum + 16'(pattern(ts, i, l % 2));
    if (pos == 0)  return K_SOF;
    if (pos == 3)  return {1'b0, ts[15:8]};
    if (pos == 4)  return {1'b0, ts[7:0]};
    if (pos >= 11 && pos < 75) return {1'b0, pattern(ts, pos - 11, l % 2)};
    if (pos == 75) return {1'b0, sum[15:8]};
    if (pos == 76) return {1'b0, sum[7:0]};
    if (pos == 77) return K_EOF;
    return 9'h000;
  endfunction

  always @(posedge clk_cd) begin
    trig_s <= convert.trigger; trig_q <= trig_s;
    if (reset_cd) gen_pos <= -1;
    else if (trig_s && !trig_q && gen_pos < 0) begin gen_pos <= 0; gen_ts <= convert.convert_count; end
    else if (gen_pos >= 0) gen_pos <= (gen_pos == 77) ? -1 : gen_pos + 1;
  end

  for (genvar l = 0; l < LINK_COUNT; l++) begin : g_tx
    assign din[l] = (l < LINKS_PER_FEMB && gen_pos >= 0) ? frame_word(l, gen_pos, gen_ts) : K_IDLE;
    enc8b10b u_enc (.data(din[l][7:0]), .k(din[l][8]), .rd_in(rd_tx[l]), .code(code[l]),
                    .rd_out(rd_tx_n[l]), .k_err());
    assign femb_sym[l / LINKS_PER_FEMB][l % LINKS_PER_FEMB] =
      (l == 0 && corrupt_next && gen_pos == 30) ? corrupt_sym : code[l];
  end
  assign corrupt_sym = 10'h3FF;     // not an 8b10b code
  always @(posedge clk_cd) begin
    if (reset_cd) rd_tx <= '0;
    else          rd_tx <= rd_tx_n;
    if (corrupt_next && gen_pos == 30) begin corrupt_next <= 0; n_corrupt++; end
  end

  // ---------------- DAQ link decoding and event checks ----------------
  logic [ND-1:0][7:0] rx_byte [8];
  logic [ND-1:0][7:0] rx_k, rx_cerr, rx_derr;
  logic [ND-1:0][8:0] rx_rd;
  logic [ND-1:0]      link_rd;
  for (genvar d = 0; d < ND; d++) begin : g_rx
    assign rx_rd[d][0] = link_rd[d];
    for (genvar j = 0; j < 8; j++) begin : g_b
      dec8b10b u_dec (.code(tx[d][10*j +: 10]), .rd_in(rx_rd[d][j]), .data(rx_byte[j][d]),
                      .k(rx_k[d][j]), .code_err(rx_cerr[d][j]), .disp_err(rx_derr[d][j]),
                      .rd_out(rx_rd[d][j+1]));
    end
  end

  logic [35:0] ev [ND][$];
  bit in_ev [ND];
  int last_evc [ND];
  int events [ND];
  bit bad_crc_armed;
  // mechanism counters
  int n_fake, n_real, n_cde, n_bad_crc, n_sync, n_oos, n_corrupt, n_spy, n_bufull, n_i2c_wr, n_i2c_rd, n_reg;
  int n_inj [5];
  logic [7:0] ce_seen;

  function automatic logic [31:0] crc_bytes(logic [31:0] c, logic [31:0] w);
    for (int b = 0; b < 4; b++) begin
      c = c ^ 32'(w[8*b +: 8]);
      for (int i = 0; i < 8; i++) c = c[0] ? (c >> 1) ^ 32'hEDB88320 : c >> 1;
    end
    return c;
  endfunction

  function automatic void check_event(int d);
    int n = ev[d].size();
    logic [31:0] c = 32'hFFFFFFFF;
    int base = 5;
    events[d]++;
    check(n == 1 + 4 + 18 * NS + 2, $sformatf("link %0d event length %0d", d, n));
    if (n != 1 + 4 + 18 * NS + 2) return;
    check(ev[d][0] == {4'b0001, id.crate, id.slot, 8'(d), 8'h00, EB_K_SOF}, $sformatf("link %0d SOF %h", d, ev[d][0]));
    for (int i = 1; i < n - 2; i++) c = crc_bytes(c, ev[d][i][31:0]);
    if (ev[d][n-2][31:0] != ~c) begin
      check(bad_crc_armed && d == 3 && (ev[d][n-2][31:0] ^ ~c) == 32'h000000F0,
            $sformatf("link %0d CRC %h expected %h", d, ev[d][n-2][31:0], ~c));
      n_bad_crc++;
    end
    if (last_evc[d] >= 0 && ev[d][4][15:0] != 0)
      check(ev[d][4][15:0] == 16'(last_evc[d] + 1), $sformatf("link %0d event count %0d after %0d", d, ev[d][4][15:0], last_evc[d]));
    last_evc[d] = int'(ev[d][4][15:0]);
    if (ev[d][3][23:0] != 0) n_sync++;
    if (ev[d][3][31]) n_oos++;
    for (int k = 0; k < NS; k++) begin
      logic [35:0] h = ev[d][base], t = ev[d][base + 1];
      check(h[23:16] == 8'(k) && h[35:32] == 0, $sformatf("link %0d stream %0d header %h", d, k, h));
      check(t[35:16] == 0, "stream time stamp word");
      ce_seen |= h[31:24];
      if (h[15:0] == 16'hBEEF) n_cde++;
      if (h[31:24] == 0) begin
        for (int w = 0; w < 16; w++) begin
          logic [31:0] e;
          for (int b = 0; b < 4; b++) e[8*b +: 8] = pattern(t[15:0], 4 * w + b, k % 2);
          check(ev[d][base + 2 + w] == {4'h0, e}, $sformatf("link %0d stream %0d word %0d %h expected %h", d, k, w, ev[d][base + 2 + w], e));
        end
        if (d == 0) n_real++; else n_fake++;
      end
      base += 18;
    end
  endfunction

  function automatic void take_word(int d, logic [35:0] w);
    if (w[35:32] == 4'b0001 && w[7:0] == EB_K_SOF) begin
      check(!in_ev[d], "SOF inside an event");
      ev[d].delete(); in_ev[d] = 1; ev[d].push_back(w);
    end else if (!in_ev[d]) begin
      if (w != {4'b0001, 24'h0, EB_K_IDLE}) check(0, $sformatf("link %0d word %h between events", d, w));
    end else begin
      ev[d].push_back(w);
      if (w[35:32] == 4'b0001 && w[7:0] == EB_K_EOF) begin in_ev[d] = 0; check_event(d); end
      else if (ev[d].size() > 200) begin check(0, "event without EOF"); in_ev[d] = 0; end
    end
  endfunction

  always @(posedge clk_evb) begin
    for (int d = 0; d < ND; d++) begin
      if (reset_evb) link_rd[d] <= 1'b0;
      else begin
        link_rd[d] <= rx_rd[d][8];
        if (rx_cerr[d] != 0 || rx_derr[d] != 0) check(0, $sformatf("DAQ link %0d 8b10b error", d));
        if (tx_kerr[d]) check(0, "encoder K error");
        if (!(rx_k[d] == 8'hFF && rx_byte[0][d] == 8'hBC && rx_byte[7][d] == 8'hBC)) begin
          take_word(d, {rx_k[d][3:0], rx_byte[3][d], rx_byte[2][d], rx_byte[1][d], rx_byte[0][d]});
          take_word(d, {rx_k[d][7:4], rx_byte[7][d], rx_byte[6][d], rx_byte[5][d], rx_byte[4][d]});
        end
      end
    end
  end

  // Cold side of the I2C lines: the chip always acknowledges and reads as zero.
  assign i2c_sda_c2w = '0;

  // ---------------- sequence ----------------
  task automatic converts(int n);
    repeat (n) begin
      @(posedge clk_sys);
      while (!convert.trigger) @(posedge clk_sys);
    end
  endtask

  task automatic inject(int which, cd_counter_e counter, string name);
    logic [31:0] cnt0 = cd_mon[4].counters[counter];
    @(posedge clk_cd);
    fake_ctrl[2].inject_errors = 1;
    case (which)
      0: fake_ctrl[2].inject_BAD_checksum = 2'b01;
      1: fake_ctrl[2].inject_BAD_SOF      = 2'b01;
      2: fake_ctrl[2].inject_LARGE_FRAME  = 2'b01;
      3: fake_ctrl[2].inject_K_CHAR       = 2'b01;
      default: fake_ctrl[2].inject_SHORT_FRAME = 2'b01;
    endcase
    converts(2);
    @(posedge clk_cd);
    fake_ctrl[2].inject_errors = 0;
    fake_ctrl[2].inject_BAD_checksum = 0; fake_ctrl[2].inject_BAD_SOF = 0;
    fake_ctrl[2].inject_LARGE_FRAME = 0; fake_ctrl[2].inject_K_CHAR = 0;
    fake_ctrl[2].inject_SHORT_FRAME = 0;
    converts(3);
    n_inj[which] = cd_mon[4].counters[counter] - cnt0;
    check(n_inj[which] > 0, $sformatf("%s counted on link 4", name));
    check(cd_mon[5].counters[counter] == 0, $sformatf("%s not on link 5", name));
  endtask

  initial begin
    repeat (400000) @(posedge clk_sys);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    id.crate = 4'h6; id.slot = 4'h2;
    sync_cmd = 0; ts_valid = 0; ts_in = '0;
    rx_ctrl = '0; fake_ctrl = '0; cd_ctrl = '0; eb_ctrl = '0; tx_ar = '0; tx_dr = '0;
    i2c_start = '0; i2c_rw = '0; i2c_chip = '0; i2c_page = '0; i2c_reg = '0; i2c_wdata = '0;
    corrupt_next = 0; bad_crc_armed = 0; ce_seen = '0;
    n_fake = 0; n_real = 0; n_cde = 0; n_bad_crc = 0; n_sync = 0; n_oos = 0; n_corrupt = 0;
    n_spy = 0; n_bufull = 0; n_i2c_wr = 0; n_i2c_rd = 0; n_reg = 0;
    reg_wr = 0; reg_rd = 0; reg_din = 0; reg_addr = 0; reg_rdata = '0; reg_rd_wr = '0;
    for (int i = 0; i < 16; i++) reg_file[i] = 32'h0;
    for (int i = 0; i < 5; i++) n_inj[i] = 0;
    for (int d = 0; d < ND; d++) begin in_ev[d] = 0; last_evc[d] = -1; events[d] = 0; end
    for (int a = CDAS_PER_FEMB; a < CDA_COUNT; a++) fake_ctrl[a].fake_stream_type = 2'b11;
    for (int l = 0; l < LINK_COUNT; l++) begin cd_ctrl[l].enable = 1; cd_ctrl[l].convert_delay = 16'd4; end
    for (int d = 0; d < ND; d++) begin eb_ctrl[d].enable = 1; eb_ctrl[d].COLDATA_en = 8'h0F; end
    repeat (4) @(posedge clk_sys);
    reset_sys = 0; reset_evb = 0; reset_cd = 0;

    fork
      begin   // I2C on FEMB 0 (write) and FEMB 1 (read), running alongside
        @(posedge clk_sys);
        i2c_start = 4'b0011; i2c_rw = 4'b0010; i2c_chip = {4{4'h2}}; i2c_page = {4{3'd1}};
        i2c_reg = {4{8'h10}}; i2c_wdata = {4{8'h5A}};
        @(posedge clk_sys); i2c_start = '0;
        check(i2c_busy[1:0] == 2'b11, "I2C busy");
        while (!i2c_done[0]) @(posedge clk_sys);
        check(!i2c_ack_error[0], "I2C write acknowledged");
        n_i2c_wr++;
        while (!i2c_done[1] && i2c_busy[1]) @(posedge clk_sys);
        check(!i2c_ack_error[1] && i2c_rdata[1] == 8'h00, "I2C read");
        n_i2c_rd++;
      end
      begin
        converts(8);
        for (int d = 0; d < ND; d++) check(events[d] >= 4, $sformatf("link %0d sends events (%0d)", d, events[d]));

        // Fake-frame error injections on CDA 2 stream 1 (link 4, DAQ link 1).
        inject(0, CNT_BAD_CHSUM, "bad checksum");
        inject(1, CNT_BAD_SOF, "bad SOF");
        inject(2, CNT_MISSING_EOF, "large frame");
        inject(3, CNT_KCHAR_IN_DATA, "K character");
        inject(4, CNT_UNEXPECTED_EOF, "short frame");
        @(posedge clk_cd);
        fake_ctrl[3].inject_errors = 1; fake_ctrl[3].inject_CD_errors = 16'hBEEF;
        converts(3);
        @(posedge clk_cd); fake_ctrl[3].inject_errors = 0;
        converts(6);
        check(ce_seen[CE_BAD_CHSUM] && ce_seen[CE_MISSING_EOF] && ce_seen[CE_KCHAR_IN_DATA] &&
              ce_seen[CE_UNEXPECTED_EOF], $sformatf("capture_errors reach the events (%b)", ce_seen));

        // Stall DAQ link 2: its stream buffers fill up.
        @(posedge clk_evb); eb_ctrl[2].enable = 0;
        converts(10);
        n_bufull = cd_mon[8].counters[CNT_BUFFER_FULL];
        check(n_bufull > 0, "buffer full while the builder is stopped");
        @(posedge clk_evb); eb_ctrl[2].enable = 1;
        begin
          int e0;
          e0 = events[2];
          converts(8);
          check(events[2] > e0 + 4, "builder resumes");
        end

        // Deliberate CRC error on DAQ link 3.
        @(posedge clk_evb); bad_crc_armed = 1; eb_ctrl[3].enable_bad_crc = 1; eb_ctrl[3].bad_crc_bits = 16'h00F0;
        converts(3);
        @(posedge clk_evb); eb_ctrl[3].enable_bad_crc = 0;
        converts(3);

        // Spy buffer on DAQ link 1.
        @(posedge clk_evb); eb_ctrl[1].spy_buffer_wait_for_trigger = 1; eb_ctrl[1].spy_buffer_start = 1;
        @(posedge clk_evb); eb_ctrl[1].spy_buffer_start = 0;
        converts(3);
        if (!eb_mon[1].spy_buffer_empty &&
            eb_mon[1].spy_buffer_data == {4'b0001, id.crate, id.slot, 8'd1, 8'h00, EB_K_SOF}) n_spy++;
        check(n_spy == 1, $sformatf("spy buffer starts at a SOF (%h)", eb_mon[1].spy_buffer_data));

        // Corrupted symbol on FEMB 0 link 0.
        begin
          logic [31:0] k0;
          k0 = cd_mon[0].counters[CNT_KCHAR_IN_DATA];
          corrupt_next = 1;
          converts(4);
          check(n_corrupt == 1 && cd_mon[0].counters[CNT_KCHAR_IN_DATA] > k0, "corrupted FEMB symbol caught");
        end

        // Register write and read-back through the bridge (domain 0).
        @(posedge clk_sys); reg_wr = 1; reg_addr = 16'h0005; reg_din = 32'hCAFE0123;
        @(posedge clk_sys); reg_wr = 0;
        while (!reg_done) @(posedge clk_sys);
        check(!reg_error, "register write");
        @(posedge clk_sys); reg_rd = 1;
        @(posedge clk_sys); reg_rd = 0;
        while (!reg_done) @(posedge clk_sys);
        #1 check(!reg_error && reg_dout == 32'hCAFE0123, $sformatf("register read back %h", reg_dout));
        if (!reg_error && reg_dout == 32'hCAFE0123) n_reg++;

        // Sync command, then a time stamp from the timing system that disagrees.
        @(posedge clk_sys); sync_cmd = 1; @(posedge clk_sys); sync_cmd = 0;
        converts(4);
        @(posedge clk_sys); ts_valid = 1; ts_in = 64'h0000_1000_0000_0000; @(posedge clk_sys); ts_valid = 0;
        converts(4);
      end
    join

    for (int d = 0; d < ND; d++) check(events[d] >= 20, $sformatf("link %0d events %0d", d, events[d]));
    check(n_fake > 0, "fake COLDATA frames");
    check(n_real > 0, "real-path frames");
    check(n_cde > 0, "CD_errors override");
    check(n_bad_crc > 0, "bad CRC");
    check(n_sync > 0, "sync command");
    check(n_oos > 0, "out of sync");
    check(n_reg > 0, "register access");
    $display("mechanisms: fake=%0d real=%0d inj=%0d/%0d/%0d/%0d/%0d cde=%0d full=%0d badcrc=%0d spy=%0d corrupt=%0d sync=%0d oos=%0d i2c=%0d/%0d reg=%0d",
             n_fake, n_real, n_inj[0], n_inj[1], n_inj[2], n_inj[3], n_inj[4], n_cde, n_bufull, n_bad_crc,
             n_spy, n_corrupt, n_sync, n_oos, n_i2c_wr, n_i2c_rd, n_reg);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
