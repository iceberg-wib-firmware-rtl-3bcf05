// tb_ethernet_crc32: checks the CRC block against two known CRC-32 values
// ("12345678" -> 9AE0DAAF, bytes 00..0F -> CECEE288) and against a
// table-driven byte-wise model (table built here from the reflected
// polynomial) for random messages of random length, with idle clocks
// (en low) in between and a restart with init.
module tb_ethernet_crc32;
  logic clk = 0, init, en;
  logic [31:0] data, crc;
  logic [31:0] table_ [256];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  ethernet_crc32 dut (.clk, .init, .en, .data, .crc);

  function automatic void check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endfunction

  function automatic logic [31:0] model_word(logic [31:0] c, logic [31:0] w);
    for (int b = 0; b < 4; b++) c = (c >> 8) ^ table_[8'(c) ^ w[8*b +: 8]];
    return c;
  endfunction

  task automatic run(logic [31:0] words [], output logic [31:0] result);
    @(posedge clk); init <= 1; en <= 0;
    @(posedge clk); init <= 0;
    foreach (words[i]) begin
      while ($urandom_range(0, 3) == 0) begin en <= 0; data <= 32'($urandom); @(posedge clk); end
      en <= 1; data <= words[i]; @(posedge clk);
    end
    en <= 0; @(posedge clk); #1;
    result = crc;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] r, m;
    logic [31:0] msg [];
    for (int i = 0; i < 256; i++) begin
      logic [31:0] c;
      c = 32'(i);
      for (int k = 0; k < 8; k++) c = c[0] ? (c >> 1) ^ 32'hEDB88320 : c >> 1;
      table_[i] = c;
    end
    init = 0; en = 0; data = 0;
    msg = new[2]; msg[0] = 32'h34333231; msg[1] = 32'h38373635;     // "12345678"
    run(msg, r); check(r == 32'h9AE0DAAF, $sformatf("CRC of 12345678 = %h", r));
    msg = new[4]; msg[0] = 32'h03020100; msg[1] = 32'h07060504; msg[2] = 32'h0B0A0908; msg[3] = 32'h0F0E0D0C;
    run(msg, r); check(r == 32'hCECEE288, $sformatf("CRC of 00..0F = %h", r));
    for (int n = 0; n < 200; n++) begin
      msg = new[$urandom_range(1, 80)];
      m = 32'hFFFFFFFF;
      foreach (msg[i]) begin msg[i] = $urandom; m = model_word(m, msg[i]); end
      run(msg, r);
      check(r == ~m, $sformatf("random message %0d: %h expected %h", n, r, ~m));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
