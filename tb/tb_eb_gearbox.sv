// tb_eb_gearbox: feeds random 32-bit words and k flags with random valid
// gaps and checks that each pair comes out as one 64-bit word, earlier word
// in the low half, with data_wr high for exactly one clock, one clock after
// the second word of the pair, and never otherwise.
// The firmware names the gearbox; the 32-to-64-bit packing checked here
// is this design's choice.
module tb_eb_gearbox;
  logic clk = 0, reset = 1;
  logic in_valid, wr;
  logic [31:0] in_data;
  logic [3:0] in_k;
  logic [63:0] dout;
  logic [7:0] kout;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  eb_gearbox dut (.clk, .reset, .in_valid, .in_data, .in_k, .data_wr(wr), .data_out(dout), .data_k_out(kout));

  function automatic void check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endfunction

  logic [35:0] held;
  bit have_half, expect_wr;
  logic [71:0] expected;

  always @(posedge clk) begin
    if (!reset) begin
      check(wr == expect_wr, $sformatf("data_wr %b expected %b", wr, expect_wr));
      if (wr && expect_wr) check({kout, dout} == expected, $sformatf("pair %h expected %h", {kout, dout}, expected));
      expect_wr = 0;
      if (in_valid) begin
        if (!have_half) begin held = {in_k, in_data}; have_half = 1; end
        else begin
          expected = {in_k, held[35:32], in_data, held[31:0]};
          expect_wr = 1; have_half = 0;
        end
      end
    end
    in_valid <= $urandom_range(0, 2) != 0;
    in_data  <= $urandom;
    in_k     <= 4'($urandom);
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    have_half = 0; expect_wr = 0; held = '0; expected = '0;
    in_valid = 0; in_data = 0; in_k = 0;
    repeat (3) @(posedge clk); reset <= 0;
    repeat (5000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
