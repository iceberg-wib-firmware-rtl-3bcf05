// tb_wib_top_felix: end-to-end test of the WIB data path in the FELIX
// arrangement (CDAS_PER_DAQ_LINK = 4): 16 links feed 2 DAQ links of 8 streams
// each, so every event carries 8 frames (151 words).
//
// All eight CDAs run their fake COLDATA generators. Both DAQ link outputs are
// decoded here with 8b10b decoders and every event is checked: SOF fields,
// length, CRC-32 (computed here), consecutive event numbers, the eight stream
// headers (stream index, no capture errors) and all 64 payload bytes of every
// frame against the generators' pattern (byte i of stream s = time stamp + i
// + 64*(s mod 2)). The event builder clock runs 5.2 times the system clock,
// above the 151/32 = 4.7 an 8-stream event needs at one convert per 32 system
// clocks, so no link may report BUFFER_FULL or a missed convert. The DUNE I2C
// and register ports are left idle here; tb_wib_top covers them.
// The 8-streams-per-link FELIX arrangement is the firmware's; the event
// format and clock ratio are this design's choices.
module tb_wib_top_felix;
  import wib_pkg::*;
  localparam int ND = 2;     // DAQ links at CDAS_PER_DAQ_LINK = 4
  localparam int NS = 8;     // streams per DAQ link
  localparam int EV_WORDS = 1 + 4 + 18 * NS + 2;

  logic clk_sys = 0, clk_evb = 0, clk_cd = 0;
  logic reset_sys = 1, reset_evb = 1, reset_cd = 1;
  always #78 clk_sys = ~clk_sys;
  always #15 clk_evb = ~clk_evb;
  always #23 clk_cd  = ~clk_cd;

  WIB_ID_t id;
  convert_t convert;
  logic [FEMB_COUNT-1:0][LINKS_PER_FEMB-1:0][9:0] femb_sym;
  FEMB_Rx_Control_t [FEMB_COUNT-1:0] rx_ctrl;
  Fake_CD_Control_t [CDA_COUNT-1:0] fake_ctrl;
  CD_Stream_Control_t [LINK_COUNT-1:0] cd_ctrl;
  CD_Stream_Monitor_t [LINK_COUNT-1:0] cd_mon;
  DAQ_Link_EB_Control_t [ND-1:0] eb_ctrl;
  DAQ_Link_EB_Monitor_t [ND-1:0] eb_mon;
  logic [ND-1:0] tx_kerr;
  logic [ND-1:0][79:0] tx;

  wib_top #(.CDAS_PER_DAQ_LINK(4)) dut (
    .clk_sys, .reset_sys, .clk_evb, .reset_evb, .clk_cd, .reset_cd, .WIB_ID(id),
    .sync_cmd(1'b0), .ts_valid(1'b0), .ts_in(64'h0), .convert,
    .FEMB_RX(femb_sym), .femb_rx_control(rx_ctrl), .femb_rx_monitor(),
    .fake_cd_control(fake_ctrl), .fake_cd_monitor(),
    .cd_stream_control(cd_ctrl), .cd_stream_monitor(cd_mon),
    .eb_control(eb_ctrl), .eb_monitor(eb_mon),
    .tx_analog_reset('0), .tx_digital_reset('0), .tx_parallel(tx), .tx_k_error(tx_kerr),
    .i2c_start('0), .i2c_rw('0), .i2c_chip_addr('0), .i2c_page('0), .i2c_reg_addr('0),
    .i2c_wdata('0), .i2c_busy(), .i2c_done(), .i2c_rdata(), .i2c_ack_error(), .i2c_scl(),
    .i2c_sda_w2c(), .i2c_sda_c2w('0),
    .reg_wr_strobe(1'b0), .reg_rd_strobe(1'b0), .reg_data_in('0),
    .reg_wr_address('0), .reg_rd_address('0), .reg_data_out(),
    .reg_busy(), .reg_done(), .reg_error(),
    .reg_clk_domain({7{clk_evb}}), .reg_clk_domain_locked('0),
    .reg_read_address_ack('0), .reg_read_data_wr('0), .reg_read_data('0),
    .reg_write_addr_data_ack('0), .reg_read_address_valid(),
    .reg_read_address(), .reg_write_addr_data_valid(),
    .reg_write_addr(), .reg_write_data());

  // The FEMB inputs carry K28.5 (RD-) only; every link is switched to its
  // fake source.
  assign femb_sym = {LINK_COUNT{10'b0011111010}};

  int checks = 0, failures = 0;
  function automatic void check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endfunction

  function automatic logic [7:0] pattern(logic [15:0] ts, int i, int s);
    return 8'(ts[7:0] + 8'(i) + 8'(64 * s));
  endfunction

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
  int frames_checked;

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
    check(n == EV_WORDS, $sformatf("link %0d event length %0d", d, n));
    if (n != EV_WORDS) return;
    check(ev[d][0] == {4'b0001, id.crate, id.slot, 8'(d), 8'h00, EB_K_SOF}, $sformatf("link %0d SOF %h", d, ev[d][0]));
    for (int i = 1; i < n - 2; i++) c = crc_bytes(c, ev[d][i][31:0]);
    check(ev[d][n-2] == {4'h0, ~c}, $sformatf("link %0d CRC %h expected %h", d, ev[d][n-2][31:0], ~c));
    if (last_evc[d] >= 0)
      check(ev[d][4][15:0] == 16'(last_evc[d] + 1), $sformatf("link %0d event count %0d after %0d", d, ev[d][4][15:0], last_evc[d]));
    last_evc[d] = int'(ev[d][4][15:0]);
    for (int k = 0; k < NS; k++) begin
      logic [35:0] h = ev[d][base], t = ev[d][base + 1];
      check(h == {4'h0, 8'h00, 8'(k), 16'h0000}, $sformatf("link %0d stream %0d header %h", d, k, h));
      check(t[35:16] == 0, "stream time stamp word");
      for (int w = 0; w < 16; w++) begin
        logic [31:0] e;
        for (int b = 0; b < 4; b++) e[8*b +: 8] = pattern(t[15:0], 4 * w + b, k % 2);
        check(ev[d][base + 2 + w] == {4'h0, e}, $sformatf("link %0d stream %0d word %0d %h expected %h", d, k, w, ev[d][base + 2 + w], e));
      end
      frames_checked++;
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
      else if (ev[d].size() > EV_WORDS + 10) begin check(0, "event without EOF"); in_ev[d] = 0; end
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

  task automatic converts(int n);
    repeat (n) begin
      @(posedge clk_sys);
      while (!convert.trigger) @(posedge clk_sys);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk_sys);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    id.slot = 4'(1 + $urandom_range(0, 13)); id.crate = 4'($urandom_range(0, 15));
    rx_ctrl = '0; fake_ctrl = '0; cd_ctrl = '0; eb_ctrl = '0;
    for (int a = 0; a < CDA_COUNT; a++) fake_ctrl[a].fake_stream_type = 2'b11;
    for (int d = 0; d < ND; d++) begin in_ev[d] = 0; last_evc[d] = -1; events[d] = 0; end
    frames_checked = 0;
    repeat (4) @(posedge clk_sys);
    reset_sys = 0; reset_evb = 0; reset_cd = 0;
    for (int l = 0; l < LINK_COUNT; l++) begin cd_ctrl[l].enable = 1; cd_ctrl[l].convert_delay = 16'd4; end
    for (int d = 0; d < ND; d++) begin eb_ctrl[d].enable = 1; eb_ctrl[d].COLDATA_en = 8'hFF; end
    converts(40);
    repeat (200) @(posedge clk_sys);
    for (int d = 0; d < ND; d++) begin
      check(events[d] >= 30, $sformatf("link %0d events %0d", d, events[d]));
      check(eb_mon[d].COLDATA_en == 8'hFF && eb_mon[d].enable, "event builder monitor echoes its control");
      check(eb_mon[d].event_count == 32'(events[d]), $sformatf("link %0d event_count %0d sent %0d", d, eb_mon[d].event_count, events[d]));
    end
    for (int l = 0; l < LINK_COUNT; l++) begin
      check(cd_mon[l].counters[CNT_BUFFER_FULL] == 0, $sformatf("link %0d buffer full", l));
      check(cd_mon[l].counters[CNT_BAD_CHSUM] == 0 && cd_mon[l].counters[CNT_BAD_SOF] == 0,
            $sformatf("link %0d frame errors", l));
      check(cd_mon[l].counters[CNT_PACKETS] >= 30, $sformatf("link %0d packets %0d", l, cd_mon[l].counters[CNT_PACKETS]));
    end
    $display("events: link0=%0d link1=%0d frames checked=%0d", events[0], events[1], frames_checked);
    check(frames_checked >= 60 * NS, "eight-stream events seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
