// tb_convert_gen: checks the convert period, the counts carried by each
// trigger, restart on sync, the free-running time stamp and the out_of_sync
// flag when the timing system's time stamp agrees and when it does not.
// The convert_t fields and the 2 MHz rate from a 64 MHz clock follow the
// firmware; the counting rules checked here are this design's choice.
module tb_convert_gen;
  import wib_pkg::*;
  logic clk = 0, reset = 1, sync_cmd = 0, ts_valid = 0;
  logic [63:0] ts_in = '0;
  convert_t cv;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  convert_gen dut (.clk, .reset, .sync_cmd, .ts_valid, .ts_in, .convert(cv));

  function automatic void check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    static int last = -1, n = 0, cyc = 0;
    logic [63:0] ts0;
    repeat (3) @(posedge clk); reset <= 0;
    @(posedge clk); #1; ts0 = cv.time_stamp;
    for (cyc = 0; cyc < 32 * 6; cyc++) begin
      @(posedge clk); #1;
      check(cv.time_stamp == ts0 + 64'(cyc + 1), "time stamp counts clocks");
      if (cv.trigger) begin
        if (last >= 0) check(cyc - last == 32, $sformatf("period %0d", cyc - last));
        last = cyc; n++;
        check(cv.convert_count == 16'(n), $sformatf("convert_count %0d", cv.convert_count));
      end
    end
    check(n >= 5, "triggers seen");
    // Sync restarts the count.
    sync_cmd <= 1; @(posedge clk); sync_cmd <= 0; #1;
    check(cv.reset_count == 1 && cv.convert_count == 0, "sync");
    n = 0;
    for (int c = 1; c <= 32; c++) begin
      @(posedge clk); #1;
      if (cv.trigger) begin n++; check(c == 32 && cv.convert_count == 1, $sformatf("first trigger after sync at %0d", c)); end
    end
    check(n == 1, "one trigger after sync");
    // Matching time stamp keeps sync, a wrong one sets out_of_sync.
    ts_in <= cv.time_stamp; ts_valid <= 1; @(posedge clk); ts_valid <= 0; #1;
    check(!cv.out_of_sync, "matching time stamp");
    ts_in <= 64'h1000; ts_valid <= 1; @(posedge clk); ts_valid <= 0; #1;
    check(cv.out_of_sync && cv.time_stamp == 64'h1001, "mismatch flagged and reloaded");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
