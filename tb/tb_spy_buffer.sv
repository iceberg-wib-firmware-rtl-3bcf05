// tb_spy_buffer: drives random 36-bit words (with random valid gaps and
// occasional start-of-event marks) into a 64-word spy buffer and checks,
// against a queue model: capture at once when wait_for_trigger is low;
// capture from the first start-of-event when it is high (waiting shown until
// then); that capture stops when the buffer is full (running drops) and the
// words read back are exactly the first DEPTH captured, in order; that a
// read of an empty buffer does nothing; and that start empties the buffer.
module tb_spy_buffer;
  localparam int DEPTH = 64;
  logic clk = 0, reset = 1;
  logic start, wft, read, in_valid, in_sof;
  logic [35:0] in_word, data;
  logic empty, running, waiting;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  spy_buffer #(.DEPTH(DEPTH)) dut (.clk, .reset, .start, .wait_for_trigger(wft), .read,
    .in_valid, .in_word, .in_sof, .data, .empty, .running, .waiting);

  function automatic void check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endfunction

  logic [35:0] model [$];
  bit m_run, m_wait;

  // Random input stream; the model captures alongside.
  bit feed;
  always @(posedge clk) begin
    if (feed) begin
      if (in_valid && (m_run || (m_wait && in_sof)) && model.size() < DEPTH) begin
        model.push_back(in_word); m_run = 1; m_wait = 0;
        if (model.size() == DEPTH) m_run = 0;
      end
      in_valid <= $urandom_range(0, 3) != 0;
      in_word  <= {$urandom, 4'($urandom)};
      in_sof   <= $urandom_range(0, 15) == 0;
    end else begin
      in_valid <= 0; in_sof <= 0;
    end
  end

  task automatic arm(bit w);
    @(posedge clk); start <= 1; wft <= w;
    @(posedge clk); start <= 0;
    model.delete(); m_run = !w; m_wait = w;
  endtask

  task automatic drain_and_check(string what);
    int n = 0;
    @(posedge clk); #1;
    while (!empty) begin
      check(n < model.size() && data == model[n], $sformatf("%s word %0d %h", what, n, data));
      n++;
      @(posedge clk); read <= 1; @(posedge clk); read <= 0; #1;
    end
    check(n == model.size(), $sformatf("%s read %0d of %0d words", what, n, model.size()));
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start = 0; wft = 0; read = 0; in_valid = 0; in_sof = 0; in_word = '0; feed = 0;
    m_run = 0; m_wait = 0;
    repeat (3) @(posedge clk); reset <= 0; @(posedge clk); #1;
    check(empty && !running && !waiting, "idle after reset");
    @(posedge clk); read <= 1; @(posedge clk); read <= 0; #1;
    check(empty, "read of empty buffer");

    for (int round = 0; round < 6; round++) begin
      bit w;
      w = 1'(round % 2);
      arm(w);
      #1 check(empty && (w ? (waiting && !running) : (running && !waiting)), "armed");
      feed = 1;
      repeat (40) @(posedge clk);
      if (w && model.size() == 0) check(waiting, "still waiting for start of event");
      repeat (200) @(posedge clk);
      feed = 0; repeat (2) @(posedge clk); #1;
      check(model.size() == DEPTH && !running, $sformatf("filled and stopped (%0d)", model.size()));
      drain_and_check(w ? "triggered" : "immediate");
    end
    // start empties a part-filled buffer
    arm(0); feed = 1; repeat (10) @(posedge clk); feed = 0;
    arm(1); #1;
    check(empty && waiting, "start empties the buffer");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
