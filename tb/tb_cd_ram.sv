// tb_cd_ram: writes random bytes at random addresses through the 8-bit port
// on one clock and reads 32-bit words through the other port on an unrelated
// clock, comparing with a byte-array model: byte a must appear in bits
// [8*(a%4)+7 : 8*(a%4)] of word a/4, one read-clock edge after the address.
// The 256-byte size and the 8-bit write / 32-bit read widths are the
// firmware's; the byte order checked here is this design's choice.
module tb_cd_ram;
  logic clk_a = 0, clk_b = 0;
  logic we;
  logic [7:0] addr_a, din;
  logic [5:0] addr_b;
  logic [31:0] q;
  logic [7:0] model [256];
  int checks = 0, failures = 0;

  always #5 clk_a = ~clk_a;
  always #8 clk_b = ~clk_b;

  cd_ram dut (.clock_a(clk_a), .wren_a(we), .address_a(addr_a), .data_a(din),
              .clock_b(clk_b), .address_b(addr_b), .q_b(q));

  function automatic void check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endfunction

  initial begin
    repeat (100000) @(posedge clk_a);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; addr_a = 0; din = 0; addr_b = 0;
    // fill everything once
    for (int a = 0; a < 256; a++) begin
      @(posedge clk_a); #1; we = 1; addr_a = 8'(a); din = 8'($urandom); model[a] = din;
    end
    @(posedge clk_a); #1; we = 0;
    for (int round = 0; round < 20; round++) begin
      // random writes, some with write enable low
      for (int n = 0; n < 50; n++) begin
        @(posedge clk_a); #1;
        we = $urandom_range(0, 3) != 0; addr_a = 8'($urandom); din = 8'($urandom);
        if (we) model[addr_a] = din;
      end
      @(posedge clk_a); #1; we = 0;
      // read every word
      for (int w = 0; w < 64; w++) begin
        @(posedge clk_b); #1; addr_b = 6'(w);
        @(posedge clk_b); #1;
        check(q == {model[4*w+3], model[4*w+2], model[4*w+1], model[4*w]},
              $sformatf("word %0d = %h", w, q));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
