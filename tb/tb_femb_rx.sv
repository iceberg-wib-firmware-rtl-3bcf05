// tb_femb_rx: encodes random bytes and commas for all 16 links with one
// 8b10b encoder per link, feeds the symbols to the receiver and checks the
// decoded 9-bit words one clock later, then corrupts symbols on chosen links
// and checks stripping, the error flags, loss and recovery of sync, and the
// per-link digital reset.
// The link counts and status names follow the firmware; the stripping
// and sync rules checked here are this design's choice.
module tb_femb_rx;
  import wib_pkg::*;
  localparam int NL = FEMB_COUNT * LINKS_PER_FEMB;

  logic clk = 0, reset = 1;
  logic [FEMB_COUNT-1:0][LINKS_PER_FEMB-1:0][9:0] sym;
  FEMB_Rx_Control_t [FEMB_COUNT-1:0] ctrl;
  logic [FEMB_COUNT-1:0][LINKS_PER_FEMB-1:0][8:0] rxd;
  FEMB_Rx_Monitor_t [FEMB_COUNT-1:0] mon;
  int checks = 0, failures = 0;

  logic [NL-1:0][8:0] din, din_q;
  logic [NL-1:0] rd_tx, rd_tx_n, corrupt;
  logic [NL-1:0][9:0] code;

  always #5 clk = ~clk;

  for (genvar i = 0; i < NL; i++) begin : g_enc
    enc8b10b u_enc (.data(din[i][7:0]), .k(din[i][8]), .rd_in(rd_tx[i]), .code(code[i]),
                    .rd_out(rd_tx_n[i]), .k_err());
    assign sym[i / LINKS_PER_FEMB][i % LINKS_PER_FEMB] = corrupt[i] ? 10'b1111111111 : code[i];
  end

  femb_rx dut (.clk_in(clk), .reset, .FEMB_RX(sym), .control(ctrl), .rx_data(rxd), .monitor(mon));

  function automatic void check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endfunction

  always_ff @(posedge clk) begin
    if (reset) rd_tx <= '0;
    else       rd_tx <= rd_tx_n;
    din_q <= din;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ctrl = '0; corrupt = '0;
    for (int i = 0; i < NL; i++) din[i] = K_IDLE;
    repeat (3) @(posedge clk); reset <= 0;
    repeat (3) @(posedge clk);
    // Random traffic.
    for (int n = 0; n < 500; n++) begin
      for (int i = 0; i < NL; i++) din[i] = ($urandom_range(0, 7) == 0) ? K_IDLE : {1'b0, 8'($urandom)};
      @(posedge clk); #1;
      if (n > 0)
        for (int i = 0; i < NL; i++)
          check(rxd[i / 4][i % 4] == din_q[i], $sformatf("link %0d got %h expected %h", i, rxd[i / 4][i % 4], din_q[i]));
    end
    for (int i = 0; i < NL; i++) din[i] = K_IDLE;
    repeat (2) @(posedge clk); #1;
    for (int f = 0; f < FEMB_COUNT; f++)
      check(mon[f].rx_syncstatus == 4'hF && mon[f].rx_patterndetect == 4'hF && mon[f].rx_errdetect == 0,
            "all links in sync on commas");

    // Corrupt link 5 (FEMB 1 link 1) with a data byte on it.
    din[5] = 9'h0A5; corrupt[5] = 1; @(posedge clk); #1;
    corrupt[5] = 0; din[5] = K_IDLE;
    check(rxd[1][1] == K_IDLE, "bad symbol stripped");
    check(mon[1].rx_errdetect[1] || mon[1].rx_disperr[1], "error flagged");
    check(mon[1].rx_syncstatus[1] == 0 && mon[1].rx_syncstatus[0] == 1, "sync lost on that link only");
    repeat (4) @(posedge clk); #1;
    check(mon[1].rx_syncstatus[1] == 1, "sync regained on comma");

    // Digital reset of FEMB 3 link 2.
    ctrl[3].rx_digitalreset[2] = 1; @(posedge clk); #1;
    check(mon[3].rx_syncstatus[2] == 0 && mon[3].rx_syncstatus[1] == 1, "digital reset clears sync");
    check(mon[3].rx_digitalreset == 4'b0100 && mon[3].rx_analogreset == 4'b0000, "monitor echoes the resets");
    ctrl[3].rx_digitalreset[2] = 0;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
