// tb_cd_stream_processor: drives one link of a stream processor with frames
// built here (good ones and each kind of damaged one), reads the frames back
// through the event builder port in a second clock domain, and checks the
// payload words, the header fields, capture_errors and all eight counters.
// The counters it checks are the firmware's; the frame format it builds
// and the expected error policy are this design's own.
module tb_cd_stream_processor;
  import wib_pkg::*;

  logic clk_CD = 0, clk_EVB = 0, reset_CD = 1, reset_EVB = 1;
  logic [8:0] stream = K_IDLE;
  convert_t convert = '0;
  logic EB_rd = 0;
  CD_Stream_Control_t ctrl;
  CD_Stream_Monitor_t mon;
  CD_stream_t eb;
  int checks = 0, failures = 0;

  always #4 clk_CD  = ~clk_CD;
  always #5 clk_EVB = ~clk_EVB;

  cd_stream_processor dut (.clk_CD, .reset_CD, .COLDATA_stream(stream), .convert,
                           .clk_EVB, .reset_EVB, .EB_rd, .FEMB_DAQ_control(ctrl),
                           .monitor(mon), .CD_to_EB_stream(eb));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  typedef enum {GOOD, BADSUM, SHORT, LONG, KCHAR} kind_e;

  task automatic word(logic [8:0] w);
    stream <= w; @(posedge clk_CD);
  endtask

  // One frame; payload byte i = seed + i.
  task automatic send_frame(logic [15:0] cde, logic [15:0] ts, logic [7:0] seed, kind_e kind);
    logic [15:0] sum = 0;
    logic [7:0] b;
    int n = (kind == SHORT) ? 63 : (kind == LONG) ? 65 : 64;
    word(K_SOF);
    for (int i = 0; i < 10; i++) begin
      b = (i == 0) ? cde[15:8] : (i == 1) ? cde[7:0] : (i == 2) ? ts[15:8] : (i == 3) ? ts[7:0] : 8'(i);
      sum += 16'(b); word({1'b0, b});
    end
    for (int i = 0; i < n; i++) begin
      b = seed + 8'(i); sum += 16'(b);
      if (kind == KCHAR && i == 7) word(9'h1FC); else word({1'b0, b});
    end
    if (kind == KCHAR) sum = sum - 16'(seed + 8'd7) + 16'hFC;
    if (kind == BADSUM) sum = ~sum;
    word({1'b0, sum[15:8]}); word({1'b0, sum[7:0]});
    word(K_EOF);
    repeat (4) word(K_IDLE);
  endtask

  task automatic pulse_convert();
    @(posedge clk_EVB); convert.trigger <= 1; @(posedge clk_EVB); convert.trigger <= 0;
    repeat (6) @(posedge clk_CD);
  endtask

  // Read one frame through the event builder port and compare.
  task automatic read_frame(logic [15:0] cde, logic [15:0] ts, logic [7:0] seed, logic [7:0] ce, int nbytes);
    int t = 0;
    while (!eb.valid && t < 1000) begin @(posedge clk_EVB); t++; end
    check(eb.valid, "frame available");
    check(eb.CD_errors == cde && eb.CD_timestamp == ts, $sformatf("header %h %h", eb.CD_errors, eb.CD_timestamp));
    check(eb.capture_errors == ce, $sformatf("capture_errors %h expected %h", eb.capture_errors, ce));
    for (int w = 0; w < 16; w++) begin
      logic [31:0] exp;
      for (int j = 0; j < 4; j++) exp[8*j +: 8] = seed + 8'(4*w + j);
      if (ce == 0 || 4*w + 3 < nbytes)
        check(eb.data_out == exp, $sformatf("word %0d %h expected %h", w, eb.data_out, exp));
      EB_rd <= 1; @(posedge clk_EVB); EB_rd <= 0; @(posedge clk_EVB);
    end
  endtask

  function automatic logic [31:0] cnt(cd_counter_e c);
    return mon.counters[c];
  endfunction

  initial begin
    repeat (200000) @(posedge clk_EVB);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ctrl = '0; ctrl.enable = 1;
    repeat (5) @(posedge clk_EVB);
    reset_CD = 0; reset_EVB = 0;
    repeat (5) @(posedge clk_CD);

    // Good frame, with a measured wait window.
    pulse_convert();
    repeat (10) word(K_IDLE);
    send_frame(16'hA5C3, 16'h1234, 8'h10, GOOD);
    check(cnt(CNT_PACKETS) == 1, "one packet");
    check(mon.wait_window >= 16'd12 && mon.wait_window <= 16'd20, $sformatf("wait window %0d", mon.wait_window));
    read_frame(16'hA5C3, 16'h1234, 8'h10, 8'h00, 64);

    // Each damaged kind.
    pulse_convert(); send_frame(16'h0001, 16'h0002, 8'h20, BADSUM);
    check(cnt(CNT_BAD_CHSUM) == 1, "bad checksum counted");
    read_frame(16'h0001, 16'h0002, 8'h20, 8'(1 << CE_BAD_CHSUM), 64);
    pulse_convert(); send_frame(16'h0003, 16'h0004, 8'h30, SHORT);
    check(cnt(CNT_UNEXPECTED_EOF) == 1, "unexpected EOF counted");
    read_frame(16'h0003, 16'h0004, 8'h30, 8'(1 << CE_UNEXPECTED_EOF), 63);
    pulse_convert(); send_frame(16'h0005, 16'h0006, 8'h40, LONG);
    check(cnt(CNT_MISSING_EOF) == 1, "missing EOF counted");
    check(cnt(CNT_BAD_SOF) == 0, "no BAD_SOF after a long frame");
    read_frame(16'h0005, 16'h0006, 8'h40, 8'(1 << CE_MISSING_EOF), 64);
    pulse_convert(); send_frame(16'h0007, 16'h0008, 8'h50, KCHAR);
    check(cnt(CNT_KCHAR_IN_DATA) == 1, "K char counted");
    read_frame(16'h0007, 16'h0008, 8'h50, 8'(1 << CE_KCHAR_IN_DATA), 7);

    // Data where a SOF is due, then a good frame carries the flag.
    word(9'h055); word(9'h056); word(K_IDLE);
    check(cnt(CNT_BAD_SOF) == 1, "bad SOF counted once");
    pulse_convert(); send_frame(16'h0009, 16'h000A, 8'h60, GOOD);
    read_frame(16'h0009, 16'h000A, 8'h60, 8'(1 << CE_BAD_SOF), 64);
    check(cnt(CNT_PACKETS) == 2, "second good packet");

    // Two converts with no frame in between.
    pulse_convert(); pulse_convert();
    check(cnt(CNT_CONVERT_IN_WAIT_WINDOW) == 1, "convert in wait window counted");
    send_frame(16'h000B, 16'h000C, 8'h70, GOOD);
    read_frame(16'h000B, 16'h000C, 8'h70, 8'(1 << CE_CONVERT_IN_WW), 64);

    // Fill the four slots, the fifth frame is dropped.
    for (int f = 0; f < 5; f++) begin pulse_convert(); send_frame(16'(f), 16'(100 + f), 8'(f * 3), GOOD); end
    check(cnt(CNT_BUFFER_FULL) == 1, "buffer full counted");
    for (int f = 0; f < 4; f++) read_frame(16'(f), 16'(100 + f), 8'(f * 3), 8'h00, 64);
    repeat (20) @(posedge clk_EVB);
    check(!eb.valid, "dropped frame not delivered");
    check(cnt(CNT_PACKETS) == 7, $sformatf("packets %0d", cnt(CNT_PACKETS)));
    check(cnt(CNT_BAD_SOF) == 1, "dropped frame bytes not counted as bad SOF");

    // Convert delay: the window opens later, so it is shorter.
    ctrl.convert_delay = 16'd8;
    pulse_convert(); repeat (10) word(K_IDLE);
    send_frame(16'h0, 16'h0, 8'h0, GOOD);
    check(mon.wait_window >= 16'd4 && mon.wait_window <= 16'd12, $sformatf("delayed wait window %0d", mon.wait_window));
    read_frame(16'h0, 16'h0, 8'h0, 8'(1 << CE_BUFFER_FULL), 64);

    // Counter reset.
    ctrl.counter_reset = '1; @(posedge clk_CD); @(posedge clk_CD); ctrl.counter_reset = '0;
    @(posedge clk_CD);
    check(mon.counters == '0, "counters cleared");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
