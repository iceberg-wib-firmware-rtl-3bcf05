// tb_enc_dec8b10b: checks the 8b10b encoder against published code words,
// then loops every data byte and control character through encoder and
// decoder under both running disparities, checks DC balance and run length
// on a long random stream, and checks that the decoder flags corrupted and
// wrong-disparity symbols.
// The code tables are the standard 8b10b ones; the flag behaviour on
// errors is this design's choice.
module tb_enc_dec8b10b;
  logic [7:0] e_data;  logic e_k, e_rd, e_rdo, e_kerr;  logic [9:0] e_code;
  logic [9:0] d_code;  logic d_rd, d_k, d_cerr, d_derr, d_rdo;  logic [7:0] d_data;
  int checks = 0, failures = 0;

  enc8b10b u_enc (.data(e_data), .k(e_k), .rd_in(e_rd), .code(e_code), .rd_out(e_rdo), .k_err(e_kerr));
  dec8b10b u_dec (.code(d_code), .rd_in(d_rd), .data(d_data), .k(d_k), .code_err(d_cerr),
                  .disp_err(d_derr), .rd_out(d_rdo));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic enc(input logic [7:0] d, input logic k, input logic rd);
    e_data = d; e_k = k; e_rd = rd; #1;
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ones, run, maxrun, rd_sum;
    logic last_bit, rd;
    logic [7:0] kc [12];
    kc = '{8'h1C, 8'h3C, 8'h5C, 8'h7C, 8'h9C, 8'hBC, 8'hDC, 8'hFC, 8'hF7, 8'hFB, 8'hFD, 8'hFE};

    // Published code words (abcdei fghj).
    enc(8'hBC, 1, 0); check(e_code == 10'b001111_1010, "K28.5 RD-");
    enc(8'hBC, 1, 1); check(e_code == 10'b110000_0101, "K28.5 RD+");
    enc(8'h3C, 1, 0); check(e_code == 10'b001111_1001, "K28.1 RD-");
    enc(8'h00, 0, 0); check(e_code == 10'b100111_0100, "D0.0 RD-");
    enc(8'h00, 0, 1); check(e_code == 10'b011000_1011, "D0.0 RD+");
    enc(8'hB5, 0, 0); check(e_code == 10'b101010_1010, "D21.5");
    enc(8'hF1, 0, 0); check(e_code == 10'b100011_0111, "D17.7 RD- alternate");
    enc(8'hF1, 0, 1); check(e_code == 10'b100011_0001, "D17.7 RD+ primary");
    enc(8'hFB, 1, 0); check(e_code == 10'b110110_1000, "K27.7 RD-");
    enc(8'h07, 0, 1); check(e_code == 10'b000111_0100, "D7.0 RD+");
    enc(8'h55, 1, 0); check(e_kerr, "invalid K flagged");

    // Round trip of every data byte and K code under both disparities.
    for (int r = 0; r < 2; r++) begin
      for (int i = 0; i < 256 + 12; i++) begin
        logic kk; logic [7:0] dd;
        kk = (i >= 256); dd = kk ? kc[i-256] : 8'(i);
        enc(dd, kk, 1'(r));
        ones = $countones(e_code);
        d_code = e_code; d_rd = 1'(r); #1;
        check(d_data == dd && d_k == kk && !d_cerr && !d_derr && !e_kerr,
              $sformatf("round trip %h k=%0d rd=%0d code=%b got %h k=%0d ce=%0d de=%0d", dd, kk, r, e_code, d_data, d_k, d_cerr, d_derr));
        check(ones >= 4 && ones <= 6 && d_rdo == e_rdo &&
              (ones == 5 ? e_rdo == 1'(r) : e_rdo == (ones > 5)) &&
              !(ones == 6 && r == 1) && !(ones == 4 && r == 0),
              $sformatf("disparity %h rd=%0d", dd, r));
      end
    end

    // Long random stream: bounded running digital sum and run length <= 5.
    rd = 0; rd_sum = 0; run = 0; maxrun = 0; last_bit = 0;
    for (int n = 0; n < 4000; n++) begin
      logic kk; logic [7:0] dd;
      kk = ($urandom_range(0, 9) == 0);
      dd = kk ? kc[$urandom_range(0, 11)] : 8'($urandom);
      enc(dd, kk, rd);
      for (int b = 9; b >= 0; b--) begin
        rd_sum += e_code[b] ? 1 : -1;
        if (e_code[b] == last_bit) run++; else run = 1;
        last_bit = e_code[b];
        if (run > maxrun && !(kk && dd[4:0] == 5'd28 && b > 3)) maxrun = run;
      end
      rd = e_rdo;
      if (rd_sum > 3 || rd_sum < -3) begin check(0, "running sum"); break; end
    end
    check(maxrun <= 5, $sformatf("run length %0d", maxrun));

    // Error detection.
    d_code = 10'b0000000000; d_rd = 0; #1; check(d_cerr, "all-zero symbol");
    d_code = 10'b1111110000; d_rd = 0; #1; check(d_cerr, "invalid 6b");
    d_code = 10'b100111_0100; d_rd = 1; #1; check(d_derr && !d_cerr, "D0.0 RD- form under RD+");
    d_code = 10'b001111_1010; d_rd = 1; #1; check(d_derr, "K28.5 RD- form under RD+");
    d_code = 10'b001111_1110; d_rd = 0; #1; check(d_cerr, "invalid K28 tail");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
