// tb_daq_link_eventbuilder: feeds an event builder with four modelled CD
// streams, unpacks the 64-bit output back into 32-bit words and checks each
// event word by word: SOF with slot/crate/fiber, time stamp and counts, the
// per-stream headers and payload, the CRC (computed here byte by byte) and
// EOF. Also checks waiting while a stream has no frame, a partial COLDATA_en
// mask, CRC corruption on request, the event counter and the spy buffer.
// The control and monitor fields are the firmware's; the event layout
// checked here is this design's own.
module tb_daq_link_eventbuilder;
  import wib_pkg::*;
  localparam int N = 4;

  logic clk = 0, reset = 1;
  WIB_ID_t id;
  CD_stream_t [N-1:0] cds;
  convert_t convert;
  DAQ_Link_EB_Control_t ctrl;
  logic [N-1:0] rd;
  logic wr;
  logic [63:0] dout;
  logic [7:0] kout;
  DAQ_Link_EB_Monitor_t mon;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  daq_link_eventbuilder #(.FIBER_NUMBER(8'h2A), .SPY_DEPTH(256)) dut (
    .clk, .reset, .WIB_ID(id), .CD_stream(cds), .convert, .control(ctrl),
    .CD_read(rd), .data_wr(wr), .data_out(dout), .data_k_out(kout), .monitor(mon));

  function automatic void check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endfunction

  // Stream models: frame f of stream s has payload word w = {s, f, w} pattern.
  int frames_avail [N];
  int frame_no [N];
  int word_no [N];
  always_comb
    for (int s = 0; s < N; s++) begin
      cds[s].valid          = frames_avail[s] > 0;
      cds[s].capture_errors = 8'(s * 3);
      cds[s].CD_errors      = 16'(16'h1000 * s + frame_no[s]);
      cds[s].CD_timestamp   = 16'(16'h0100 + frame_no[s]);
      cds[s].data_out       = {8'(s), 8'(frame_no[s]), 8'h00, 8'(word_no[s])};
    end
  always_ff @(posedge clk)
    for (int s = 0; s < N; s++)
      if (rd[s]) begin
        if (word_no[s] == 15) begin word_no[s] <= 0; frame_no[s] <= frame_no[s] + 1; frames_avail[s] <= frames_avail[s] - 1; end
        else word_no[s] <= word_no[s] + 1;
      end

  // Output words, in order.
  logic [35:0] q [$];
  always_ff @(posedge clk)
    if (wr) begin q.push_back({kout[3:0], dout[31:0]}); q.push_back({kout[7:4], dout[63:32]}); end

  function automatic logic [31:0] crc_bytes(logic [31:0] c, logic [31:0] w);
    for (int b = 0; b < 4; b++) begin
      logic [7:0] by = w[8*b +: 8];
      c = c ^ 32'(by);
      for (int i = 0; i < 8; i++) c = c[0] ? (c >> 1) ^ 32'hEDB88320 : c >> 1;
    end
    return c;
  endfunction

  // Pull the next event out of q and check it.
  task automatic check_event(logic [N-1:0] mask, logic [15:0] evcount, bit bad_crc);
    logic [35:0] w;
    logic [31:0] c = 32'hFFFFFFFF;
    int t = 0;
    // skip idles
    forever begin
      while (q.size() == 0 && t < 5000) begin @(posedge clk); t++; end
      if (q.size() == 0) begin check(0, "no event"); return; end
      w = q.pop_front();
      if (w != {4'b0001, 24'h0, EB_K_IDLE}) break;
    end
    check(w == {4'b0001, 4'h5, 4'h3, 8'h2A, 8'h00, EB_K_SOF}, $sformatf("SOF word %h", w));
    while (q.size() < 4 + 18 * $countones(mask) + 2) @(posedge clk);
    w = q.pop_front(); c = crc_bytes(c, w[31:0]); check(w == {4'h0, 32'h89ABCDEF}, "time stamp low");
    w = q.pop_front(); c = crc_bytes(c, w[31:0]); check(w == {4'h0, 32'h01234567}, "time stamp high");
    w = q.pop_front(); c = crc_bytes(c, w[31:0]); check(w == {4'h0, 1'b1, 7'h0, 24'h000077}, "convert info");
    w = q.pop_front(); c = crc_bytes(c, w[31:0]); check(w == {4'h0, 16'h0055, evcount}, $sformatf("counts %h", w));
    for (int s = 0; s < N; s++) if (mask[s]) begin
      int f = frame_no_seen[s]++;
      w = q.pop_front(); c = crc_bytes(c, w[31:0]);
      check(w == {4'h0, 8'(s * 3), 8'(s), 16'(16'h1000 * s + f)}, $sformatf("stream %0d header %h", s, w));
      w = q.pop_front(); c = crc_bytes(c, w[31:0]);
      check(w == {4'h0, 16'h0, 16'(16'h0100 + f)}, "stream time stamp");
      for (int i = 0; i < 16; i++) begin
        w = q.pop_front(); c = crc_bytes(c, w[31:0]);
        check(w == {4'h0, 8'(s), 8'(f), 8'h00, 8'(i)}, $sformatf("stream %0d word %0d %h", s, i, w));
      end
    end
    w = q.pop_front();
    check(w[35:32] == 0 && ((w[31:0] == ~c) != bad_crc), $sformatf("CRC %h expected %h", w[31:0], ~c));
    w = q.pop_front();
    check(w == {4'b0001, 24'h0, EB_K_EOF}, "EOF word");
  endtask
  int frame_no_seen [N];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    id.slot = 4'h3; id.crate = 4'h5;
    convert = '0; ctrl = '0;
    for (int s = 0; s < N; s++) begin frames_avail[s] = 0; frame_no[s] = 0; word_no[s] = 0; frame_no_seen[s] = 0; end
    repeat (3) @(posedge clk); reset <= 0; @(posedge clk);
    convert.time_stamp <= 64'h0123456789ABCDEF; convert.reset_count <= 24'h77;
    convert.convert_count <= 16'h55; convert.out_of_sync <= 1;
    convert.trigger <= 1; @(posedge clk); convert.trigger <= 0;
    ctrl.enable = 1; ctrl.COLDATA_en = 8'h0F;
    ctrl.spy_buffer_wait_for_trigger = 1; ctrl.spy_buffer_start = 1; @(posedge clk); ctrl.spy_buffer_start = 0;

    // Three streams ready, one not: the builder must wait.
    frames_avail[0] = 2; frames_avail[1] = 2; frames_avail[2] = 2;
    repeat (50) @(posedge clk);
    check(rd == 0 && mon.event_count == 0, "waits for all enabled streams");
    check(mon.spy_buffer_wait_for_trigger && mon.spy_buffer_empty, "spy waiting");
    frames_avail[3] = 2;
    check_event(4'hF, 16'd0, 0);
    check(!mon.spy_buffer_empty, "spy captured");
    check(mon.spy_buffer_data == {4'b0001, 4'h5, 4'h3, 8'h2A, 8'h00, EB_K_SOF}, "spy first word is SOF");
    ctrl.spy_buffer_read = 1; @(posedge clk); ctrl.spy_buffer_read = 0; @(posedge clk);
    check(mon.spy_buffer_data == {4'h0, 32'h89ABCDEF}, "spy second word");
    check_event(4'hF, 16'd1, 0);
    repeat (5) @(posedge clk);
    check(mon.event_count == 2, "event count 2");

    // Only streams 1 and 3, with a corrupted CRC.
    ctrl.COLDATA_en = 8'h0A; ctrl.enable_bad_crc = 1; ctrl.bad_crc_bits = 16'h0001;
    frames_avail[1] = 1; frames_avail[3] = 1;
    check_event(4'hA, 16'd2, 1);
    ctrl.enable_bad_crc = 0;
    ctrl.event_count_reset = 1; @(posedge clk); ctrl.event_count_reset = 0; @(posedge clk);
    check(mon.event_count == 0, "event count reset");
    check(mon.enable && !mon.enable_bad_crc && mon.bad_crc_bits == 16'h0001, "monitor echoes the control");
    check(frames_avail[0] == 0 && frames_avail[2] == 0 && frames_avail[1] == 0, "frames consumed");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
