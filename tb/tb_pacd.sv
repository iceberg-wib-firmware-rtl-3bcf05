// tb_pacd: sends single-cycle pulses through the pulse crosser between two
// unrelated clocks, first from a fast to a slow clock and then the other way
// round, with random gaps that respect the minimum spacing (three
// destination cycles). Checks that every pulse arrives exactly once, as a
// one-cycle pulse, two to three destination cycles after the source edge
// that flips the toggle (the monitor, sampling on the next destination edge,
// sees it as a count of 2 to 4).
// The firmware uses pulse crossers between its clocks; the toggle
// construction and the latency window checked here are this design's.
module tb_pacd;
  logic clk_a = 0, clk_b = 0, reset = 1;
  logic p_ab, p_ba, q_ab, q_ba;
  int checks = 0, failures = 0;

  always #7  clk_a = ~clk_a;     // fast
  always #23 clk_b = ~clk_b;     // slow

  pacd u_ab (.clk_in(clk_a), .reset_in(reset), .pulse_in(p_ab), .clk_out(clk_b), .reset_out(reset), .pulse_out(q_ab));
  pacd u_ba (.clk_in(clk_b), .reset_in(reset), .pulse_in(p_ba), .clk_out(clk_a), .reset_out(reset), .pulse_out(q_ba));

  function automatic void check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endfunction

  // Count output pulses and their widths; remember destination-cycle latency.
  int n_ab = 0, n_ba = 0, cyc_b = 0, cyc_a = 0, sent_b_cyc, sent_a_cyc;
  logic q_ab_q = 0, q_ba_q = 0;
  always @(posedge clk_b) begin
    cyc_b++;
    if (!reset) begin
      if (q_ab) begin
        n_ab++;
        check(cyc_b - sent_b_cyc >= 2 && cyc_b - sent_b_cyc <= 4, $sformatf("a->b latency %0d", cyc_b - sent_b_cyc));
      end
      check(!(q_ab && q_ab_q), "a->b pulse one cycle wide");
      q_ab_q <= q_ab;
    end
  end
  always @(posedge clk_a) begin
    cyc_a++;
    if (!reset) begin
      if (q_ba) begin
        n_ba++;
        check(cyc_a - sent_a_cyc >= 2 && cyc_a - sent_a_cyc <= 4, $sformatf("b->a latency %0d", cyc_a - sent_a_cyc));
      end
      check(!(q_ba && q_ba_q), "b->a pulse one cycle wide");
      q_ba_q <= q_ba;
    end
  end

  initial begin
    repeat (20000) @(posedge clk_b);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    p_ab = 0; p_ba = 0;
    repeat (3) @(posedge clk_b); reset = 0; repeat (2) @(posedge clk_b);
    // fast -> slow: spacing of at least 3 slow cycles (10 fast cycles)
    for (int i = 0; i < 100; i++) begin
      @(posedge clk_a); p_ab <= 1;
      @(posedge clk_a); p_ab <= 0; sent_b_cyc = cyc_b;   // the toggle flips here
      repeat (3 + $urandom_range(0, 3)) @(posedge clk_b);
    end
    repeat (5) @(posedge clk_b);
    check(n_ab == 100, $sformatf("a->b pulses %0d", n_ab));
    // slow -> fast
    for (int i = 0; i < 100; i++) begin
      @(posedge clk_b); p_ba <= 1;
      @(posedge clk_b); p_ba <= 0; sent_a_cyc = cyc_a;
      repeat ($urandom_range(0, 2)) @(posedge clk_b);
    end
    repeat (5) @(posedge clk_b);
    check(n_ba == 100, $sformatf("b->a pulses %0d", n_ba));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
