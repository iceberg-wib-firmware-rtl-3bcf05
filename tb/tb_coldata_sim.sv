// tb_coldata_sim: triggers the fake COLDATA generator, captures both streams
// and checks frame layout, header fields, payload pattern, checksum and the
// packet counters, then turns on each error injection in turn and checks that
// the frame is damaged in the intended way on the selected stream only.
// The control fields are the firmware's; the frame layout and data
// pattern checked here are this design's own.
module tb_coldata_sim;
  import wib_pkg::*;

  logic clk = 0, reset = 1;
  Fake_CD_Control_t ctrl;
  convert_t convert;
  Fake_CD_Monitor_t mon;
  logic [8:0] s1, s2;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  coldata_sim dut (.clk, .reset_sync(reset), .control(ctrl), .convert, .monitor(mon),
                   .data_out_stream1(s1), .data_out_stream2(s2));

  function automatic void check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endfunction

  // Capture one frame from each stream after a trigger: words up to EOF (or a
  // run of idles), SOF included.
  logic [8:0] cap [2][$];
  task automatic capture(logic [15:0] cc);
    int idle_run [2];
    bit done [2];
    cap[0].delete(); cap[1].delete();
    idle_run = '{0, 0}; done = '{0, 0};
    convert.convert_count <= cc;
    convert.trigger <= 1; @(posedge clk); convert.trigger <= 0;
    for (int t = 0; t < 200 && !(done[0] && done[1]); t++) begin
      @(posedge clk); #1;
      for (int s = 0; s < 2; s++) begin
        logic [8:0] w = (s != 0) ? s2 : s1;
        if (!done[s]) begin
          if (w == K_IDLE && cap[s].size() == 0) continue;
          cap[s].push_back(w);
          if (w == K_EOF) done[s] = 1;
        end
      end
    end
  endtask

  // Reference frame built here from the same rules.
  function automatic void expect_frame(int s, logic [15:0] cc, logic [15:0] cde,
      bit badsum, bit badsof, bit lng, bit kch, bit short_f);
    logic [8:0] e [$];
    logic [15:0] sum = 0;
    logic [7:0] hb [10];
    int n = 64 + (lng ? 1 : 0) - (short_f ? 1 : 0);
    hb = '{cde[15:8], cde[7:0], cc[15:8], cc[7:0], 8'hBE, 8'hEF,
           8'hDE, 8'hAD, 8'hC0, 8'hDE};
    e.push_back(badsof ? 9'h03C : K_SOF);
    for (int i = 0; i < 10; i++) begin e.push_back({1'b0, hb[i]}); sum += 16'(hb[i]); end
    for (int i = 0; i < n; i++) begin
      logic [7:0] b = cc[7:0] + 8'(i) + 8'(64 * s);
      if (kch && i == 5) begin e.push_back(9'h1FC); sum += 16'hFC; end
      else begin e.push_back({1'b0, b}); sum += 16'(b); end
    end
    if (badsum) sum = ~sum;
    e.push_back({1'b0, sum[15:8]}); e.push_back({1'b0, sum[7:0]});
    e.push_back(K_EOF);
    check(cap[s].size() == e.size(), $sformatf("stream %0d length %0d expected %0d", s, cap[s].size(), e.size()));
    for (int i = 0; i < e.size() && i < cap[s].size(); i++)
      if (cap[s][i] != e[i]) begin
        check(0, $sformatf("stream %0d word %0d %h expected %h", s, i, cap[s][i], e[i]));
        return;
      end
    check(1, "frame matches");
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ctrl = '0; convert = '0;
    ctrl.set_reserved = 16'hBEEF; ctrl.set_header = 32'hDEADC0DE;
    repeat (3) @(posedge clk); reset <= 0; @(posedge clk);

    capture(16'h0102);
    expect_frame(0, 16'h0102, 16'h0, 0, 0, 0, 0, 0);
    expect_frame(1, 16'h0102, 16'h0, 0, 0, 0, 0, 0);
    repeat (3) @(posedge clk);
    check(mon.counter_packets_A == 1 && mon.counter_packets_B == 1, "packet counters");

    ctrl.inject_errors = 1; ctrl.inject_CD_errors = 16'h8001;
    ctrl.inject_BAD_checksum = 2'b01;
    #1 check(mon.inject_CD_errors == 16'h8001 && mon.inject_BAD_checksum == 2'b01 &&
             mon.set_header == 32'hDEADC0DE && mon.set_reserved == 16'hBEEF, "monitor echoes the settings");
    capture(16'h0203);
    expect_frame(0, 16'h0203, 16'h8001, 1, 0, 0, 0, 0);
    expect_frame(1, 16'h0203, 16'h8001, 0, 0, 0, 0, 0);
    ctrl.inject_BAD_checksum = 0; ctrl.inject_BAD_SOF = 2'b10;
    capture(16'h0304);
    expect_frame(0, 16'h0304, 16'h8001, 0, 0, 0, 0, 0);
    expect_frame(1, 16'h0304, 16'h8001, 0, 1, 0, 0, 0);
    ctrl.inject_BAD_SOF = 0; ctrl.inject_LARGE_FRAME = 2'b01; ctrl.inject_SHORT_FRAME = 2'b10;
    capture(16'h0405);
    expect_frame(0, 16'h0405, 16'h8001, 0, 0, 1, 0, 0);
    expect_frame(1, 16'h0405, 16'h8001, 0, 0, 0, 0, 1);
    ctrl.inject_LARGE_FRAME = 0; ctrl.inject_SHORT_FRAME = 0; ctrl.inject_K_CHAR = 2'b11;
    capture(16'h0506);
    expect_frame(0, 16'h0506, 16'h8001, 0, 0, 0, 1, 0);
    expect_frame(1, 16'h0506, 16'h8001, 0, 0, 0, 1, 0);
    repeat (3) @(posedge clk);
    check(mon.counter_packets_A == 5 && mon.counter_packets_B == 5, "packet counters after five");
    ctrl.reset_counter_packets_1_A = 1; @(posedge clk); ctrl.reset_counter_packets_1_A = 0; @(posedge clk);
    check(mon.counter_packets_A == 0 && mon.counter_packets_B == 5, "packet counter A reset");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
