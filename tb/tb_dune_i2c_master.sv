// tb_dune_i2c_master: runs writes and reads through the three-word I2C master
// against a model of the chip side written here. The model watches scl and
// sda_w2c, finds START and STOP, shifts in the chip/page, register and data
// bytes, acknowledges on sda_c2w when the chip address matches and holds a
// small register file per page; on a read it drives the register's value.
// Checks: written values land in the right page/register, reads return them,
// a wrong chip address raises ack_error, the bit time (4 x CLK_DIV per bit,
// 29 bit periods per transfer, plus two clocks from start to done) and the START/STOP line conditions.
// The three-byte transfer and the split data lines follow the DUNE I2C
// scheme; the bit layout and timing checked here are this design's choice.
module tb_dune_i2c_master;
  localparam int DIV = 4;
  localparam logic [3:0] CHIP = 4'h3;

  logic clk = 0, reset = 1;
  logic start, rw, busy, done, ack_error, scl, sda_w2c, sda_c2w;
  logic [3:0] chip;
  logic [2:0] page;
  logic [7:0] ra, wd, rdata;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  dune_i2c_master #(.CLK_DIV(DIV)) dut (
    .clk, .reset, .start, .rw, .chip_addr(chip), .page, .reg_addr(ra), .wdata(wd),
    .busy, .done, .rdata, .ack_error, .scl, .sda_w2c, .sda_c2w);

  function automatic void check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endfunction

  // Chip-side model.
  logic [7:0] regs [8][256];
  int starts = 0, stops = 0;
  logic scl_q = 1, sda_q = 1;
  int nbit = 0;
  logic [26:0] bits;
  bit active = 0, match = 0, is_rd = 0;
  logic [7:0] out_byte;

  initial sda_c2w = 1;
  always @(posedge clk) begin
    scl_q <= scl; sda_q <= sda_w2c;
    if (scl && scl_q && sda_q && !sda_w2c) begin starts++; active = 1; nbit = 0; end
    else if (scl && scl_q && !sda_q && sda_w2c) begin
      stops++; active = 0;
      if (match && !is_rd && nbit >= 27) regs[bits[22:20]][bits[17:10]] = bits[8:1];
    end
    else if (active && scl && !scl_q) begin      // rising edge: sample
      if (nbit < 27) bits[26 - nbit] = sda_w2c;
      nbit++;
      if (nbit == 8) begin
        match = (bits[26:23] == CHIP); is_rd = bits[19];
      end
    end
    else if (active && !scl && scl_q) begin      // falling edge: drive next bit
      sda_c2w <= 1;
      if (match && (nbit == 8 || nbit == 17 || (nbit == 26 && !is_rd))) sda_c2w <= 0;
      if (match && is_rd && nbit >= 18 && nbit < 26) begin
        if (nbit == 18) out_byte = regs[bits[22:20]][bits[17:10]];
        sda_c2w <= out_byte[25 - nbit];
      end
    end
  end

  // Bus rule: sda_w2c changes only while scl is low, except at START/STOP.
  int sda_changes_high = 0;
  always @(posedge clk)
    if (scl && scl_q && sda_w2c != sda_q) sda_changes_high++;

  task automatic xfer(bit r, logic [3:0] c, logic [2:0] p, logic [7:0] a, logic [7:0] d, output int cycles);
    @(posedge clk);
    start <= 1; rw <= r; chip <= c; page <= p; ra <= a; wd <= d;
    @(posedge clk); start <= 0;
    cycles = 1;
    while (!done) begin @(posedge clk); cycles++; end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc, s0, p0;
    logic [7:0] h0;
    logic [7:0] ref_regs [8][4];
    for (int p = 0; p < 8; p++) for (int a = 0; a < 256; a++) regs[p][a] = 8'h00;
    start = 0; rw = 0; chip = 0; page = 0; ra = 0; wd = 0;
    repeat (3) @(posedge clk); reset <= 0; repeat (3) @(posedge clk);
    check(scl && sda_w2c && !busy, "bus idle high");

    for (int p = 0; p < 8; p++) for (int a = 0; a < 4; a++) begin
      ref_regs[p][a] = 8'($urandom);
      s0 = starts; p0 = stops;
      xfer(0, CHIP, 3'(p), 8'(a * 17), ref_regs[p][a], cyc);
      check(!ack_error, "write acknowledged");
      check(starts == s0 + 1 && stops == p0 + 1, "one START and one STOP per write");
      check(cyc == 29 * 4 * DIV + 2, $sformatf("write takes %0d cycles", cyc));
      check(regs[p][a * 17] == ref_regs[p][a], $sformatf("page %0d reg %0d written", p, a * 17));
    end
    for (int n = 0; n < 16; n++) begin
      int p, a;
      p = $urandom_range(0, 7); a = $urandom_range(0, 3);
      xfer(1, CHIP, 3'(p), 8'(a * 17), 8'h00, cyc);
      check(!ack_error, "read acknowledged");
      check(rdata == ref_regs[p][a], $sformatf("read page %0d reg %0d got %h expected %h", p, a * 17, rdata, ref_regs[p][a]));
    end
    // Wrong chip address: no acknowledge, nothing written.
    h0 = regs[2][0];
    xfer(0, 4'hC, 3'd2, 8'd0, ~ref_regs[2][0], cyc);
    check(ack_error, "missing acknowledge flagged");
    check(regs[2][0] == h0, "other chip not written");
    check(sda_changes_high == starts + stops, $sformatf("sda moved with scl high %0d times", sda_changes_high));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
