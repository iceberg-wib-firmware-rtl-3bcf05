// tb_daq_link_pcs: sends random 64-bit words with random K bytes (K28.x
// only) through the four-link PCS, decodes the symbols here with a chain of
// decoders that tracks running disparity across clocks, and checks data,
// K flags, the absence of code and disparity errors, idles while data_wr is
// low, and the one-clock latency.
// The 8b10b coding is the standard one; the 64-bit word width and the
// symbol order are this design's choice.
module tb_daq_link_pcs;
  localparam int L = 4;
  logic clk = 0, reset = 1;
  logic [L-1:0] wr, ares, dres, kerr;
  logic [L-1:0][63:0] data;
  logic [L-1:0][7:0] dk;
  logic [L-1:0][79:0] tx;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  daq_link_pcs #(.LINKS(L)) dut (.clk, .reset, .data_wr(wr), .data, .data_k(dk),
    .tx_analog_reset(ares), .tx_digital_reset(dres), .tx_parallel(tx), .k_error(kerr));

  function automatic void check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endfunction

  // Reference decoders, chained as on the wire.
  logic [L-1:0] rd_rx;
  logic [L-1:0][8:0] rd_c;
  logic [L-1:0][7:0][7:0] dd;
  logic [L-1:0][7:0] kk, ce, de;
  for (genvar l = 0; l < L; l++) begin : g_l
    assign rd_c[l][0] = rd_rx[l];
    for (genvar j = 0; j < 8; j++) begin : g_j
      dec8b10b u_dec (.code(tx[l][10*j +: 10]), .rd_in(rd_c[l][j]), .data(dd[l][j]), .k(kk[l][j]),
                      .code_err(ce[l][j]), .disp_err(de[l][j]), .rd_out(rd_c[l][j+1]));
    end
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [L-1:0][63:0] pd;  logic [L-1:0][7:0] pk;  logic [L-1:0] pw;
    wr = '0; ares = '0; dres = '0; data = '0; dk = '0; rd_rx = '0;
    repeat (3) @(posedge clk); reset <= 0;
    @(posedge clk); #1;
    for (int l = 0; l < L; l++) rd_rx[l] = rd_c[l][8];
    for (int n = 0; n < 400; n++) begin
      for (int l = 0; l < L; l++) begin
        wr[l] = ($urandom_range(0, 4) != 0);
        for (int j = 0; j < 8; j++) begin
          dk[l][j] = ($urandom_range(0, 7) == 0);
          data[l][8*j +: 8] = dk[l][j] ? {3'($urandom), 5'd28} : 8'($urandom);
        end
      end
      pd = data; pk = dk; pw = wr;
      @(posedge clk); #1;
      for (int l = 0; l < L; l++) begin
        check(ce[l] == 0 && de[l] == 0 && !kerr[l], $sformatf("link %0d symbol errors ce=%h de=%h", l, ce[l], de[l]));
        if (pw[l]) check(dd[l] == pd[l] && kk[l] == pk[l], $sformatf("link %0d data %h expected %h", l, dd[l], pd[l]));
        else       check(dd[l] == {8{8'hBC}} && kk[l] == 8'hFF, "idle when not written");
        rd_rx[l] = rd_c[l][8];
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
