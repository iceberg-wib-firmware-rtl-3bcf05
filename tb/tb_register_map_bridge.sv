// tb_register_map_bridge: seven register domains, each on its own clock
// (periods 6 to 23 time units), answer the bridge like simple register
// files: they acknowledge a write after a random delay and store it, and
// acknowledge a read address and then return the stored word with
// read_data_wr after random delays. Random writes and reads go through the
// bridge and are checked against a model of all seven files. Also checked:
// valid stays high until the ack, one write per access (no duplicates),
// error and 32'hDEADBEEF for an address outside the seven domains, for an
// unlocked domain and, via the timeout, for a domain that does not answer.
module tb_register_map_bridge;
  localparam int ND = 7;
  localparam int TMO = 200;
  logic clk = 0, reset = 1;
  logic [ND-1:0] dclk = '0;
  logic wr, rd, busy, done, error;
  logic [31:0] din, dout;
  logic [15:0] waddr_in, raddr_in;
  logic [ND-1:0] locked, ra_valid, wad_valid;
  logic [ND-1:0] ra_ack, rd_wr, wad_ack;
  logic [ND-1:0][35:0] rdata;
  logic [ND-1:0][15:0] ra, wa;
  logic [ND-1:0][31:0] wd;
  int checks = 0, failures = 0;
  bit mute [ND];             // domain that never answers

  always #5 clk = ~clk;
  for (genvar d = 0; d < ND; d++) begin : g_clk
    always #(3 + 3 * d) dclk[d] = ~dclk[d];
  end

  register_map_bridge #(.TIMEOUT(TMO)) dut (
    .clk_reg_map(clk), .reset, .WR_strobe(wr), .RD_strobe(rd), .data_in(din),
    .WR_address(waddr_in), .RD_address(raddr_in), .clk_domain(dclk), .clk_domain_locked(locked),
    .read_address_ack(ra_ack), .read_data_wr(rd_wr), .read_data(rdata),
    .write_addr_data_ack(wad_ack), .data_out(dout), .read_address_valid(ra_valid),
    .read_address(ra), .write_addr_data_valid(wad_valid), .write_addr(wa), .write_data(wd),
    .busy, .done, .error);

  function automatic void check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endfunction

  // Register files of the domains (index: low 8 address bits).
  logic [31:0] regs [ND][256];
  int writes_seen [ND];
  for (genvar d = 0; d < ND; d++) begin : g_dom
    int wcnt = -1, rcnt = -1, dcnt = -1;
    logic [15:0] raddr_l;
    logic wad_ack_l = 0, ra_ack_l = 0, rd_wr_l = 0;
    logic [35:0] rdata_l = 0;
    assign wad_ack[d] = wad_ack_l;
    assign ra_ack[d] = ra_ack_l;
    assign rd_wr[d] = rd_wr_l;
    assign rdata[d] = rdata_l;
    always @(posedge dclk[d]) begin
      wad_ack_l <= 0; ra_ack_l <= 0; rd_wr_l <= 0;
      if (!mute[d]) begin
        if (wad_valid[d] && !wad_ack_l) begin
          if (wcnt < 0) wcnt = $urandom_range(0, 4);
          else if (wcnt == 0) begin
            wad_ack_l <= 1; regs[d][wa[d][7:0]] = wd[d]; writes_seen[d]++;
            check(wa[d][15:12] == 4'(d), "write routed to its domain");
            wcnt = -1;
          end else wcnt--;
        end
        if (ra_valid[d] && !ra_ack_l) begin
          if (rcnt < 0) rcnt = $urandom_range(0, 4);
          else if (rcnt == 0) begin
            ra_ack_l <= 1; raddr_l = ra[d]; dcnt = $urandom_range(1, 5); rcnt = -1;
          end else rcnt--;
        end
        if (dcnt > 0) begin
          dcnt--;
          if (dcnt == 0) begin rd_wr_l <= 1; rdata_l <= {4'hA, regs[d][raddr_l[7:0]]}; end
        end
      end
    end
  end

  logic [31:0] model [ND][256];
  int n_burst = 0;

  task automatic access(bit is_rd, logic [15:0] a, logic [31:0] v, output logic [31:0] r, output bit err);
    @(posedge clk);
    wr <= !is_rd; rd <= is_rd; waddr_in <= a; raddr_in <= a; din <= v;
    @(posedge clk); wr <= 0; rd <= 0;
    while (!done) @(posedge clk);
    #1 r = dout; err = error;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] r;
    bit e;
    wr = 0; rd = 0; din = 0; waddr_in = 0; raddr_in = 0;
    locked = 7'b1011111;                   // domain 5 not locked
    for (int d = 0; d < ND; d++) begin
      mute[d] = 0; writes_seen[d] = 0;
      for (int i = 0; i < 256; i++) begin regs[d][i] = 32'h0; model[d][i] = 32'h0; end
    end
    repeat (10) @(posedge clk); reset <= 0; repeat (30) @(posedge clk);

    for (int n = 0; n < 300; n++) begin
      int d, i;
      logic [31:0] v;
      d = $urandom_range(0, ND - 1); i = $urandom_range(0, 15);
      if (d == 5) continue;
      v = $urandom;
      if ($urandom_range(0, 1) != 0) begin
        access(0, {4'(d), 4'h0, 8'(i)}, v, r, e);
        model[d][i] = v;
        check(!e, "write without error");
      end else begin
        access(1, {4'(d), 4'h0, 8'(i)}, 0, r, e);
        check(!e && r == model[d][i], $sformatf("domain %0d reg %0d read %h expected %h", d, i, r, model[d][i]));
      end
    end
    begin
      int total;
      total = 0;
      for (int d = 0; d < ND; d++) total += writes_seen[d];
      check(writes_seen[5] == 0, "nothing written to the unlocked domain");
      for (int d = 0; d < ND; d++) for (int i = 0; i < 16; i++)
        check(regs[d][i] == model[d][i], "register file contents");
    end
    // Read-address FIFO: back-to-back read strobes (one per clock, also
    // while busy) are queued and answered in order.
    repeat (10) begin
      int nb, got, dd [4], ii [4];
      nb = $urandom_range(2, 4);
      for (int k = 0; k < nb; k++) begin
        do dd[k] = $urandom_range(0, ND - 1); while (dd[k] == 5);
        ii[k] = $urandom_range(0, 15);
      end
      @(posedge clk);
      for (int k = 0; k < nb; k++) begin
        rd <= 1; raddr_in <= {4'(dd[k]), 4'h0, 8'(ii[k])}; @(posedge clk);
      end
      rd <= 0;
      got = 0;
      while (got < nb) begin
        @(posedge clk); #1;
        if (done) begin
          check(!error && dout == model[dd[got]][ii[got]],
                $sformatf("queued read %0d: domain %0d reg %0d got %h expected %h", got, dd[got], ii[got], dout, model[dd[got]][ii[got]]));
          got++;
        end
      end
      n_burst++;
    end
    check(n_burst == 10, "queued read bursts done");
    access(1, 16'h9000, 0, r, e);
    check(e && r == 32'hDEADBEEF, "address outside the domains");
    access(0, 16'h5003, 32'h1234, r, e);
    check(e && writes_seen[5] == 0, "write to an unlocked domain refused");
    access(1, 16'h5003, 0, r, e);
    check(e && r == 32'hDEADBEEF, "read of an unlocked domain");
    mute[2] = 1;
    access(1, 16'h2001, 0, r, e);
    check(e && r == 32'hDEADBEEF, "timeout on a silent domain");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
