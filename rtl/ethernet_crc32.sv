// ethernet_crc32: the Ethernet CRC-32 (IEEE 802.3) over a stream of 32-bit
// words, byte 0 (bits 7:0) first and each byte least significant bit first,
// so that the result equals the CRC-32 of the same bytes sent in that order.
// Polynomial 0x04C11DB7 (reflected 0xEDB88320), preset all ones, result
// inverted. init restarts the sum; en with data adds one word per clock.
// crc is the finished CRC of every word added since init, available the
// clock after the last word. The event builder uses it to protect each
// event; the byte order is this design's choice.
module ethernet_crc32 (
  input  logic        clk,
  input  logic        init,
  input  logic        en,
  input  logic [31:0] data,
  output logic [31:0] crc
);
  logic [31:0] state, nxt;

  always_comb begin
    nxt = state;
    for (int i = 0; i < 32; i++)
      nxt = (nxt[0] ^ data[i]) ? ((nxt >> 1) ^ 32'hEDB88320) : (nxt >> 1);
  end

  always_ff @(posedge clk) begin
    if (init)    state <= 32'hFFFFFFFF;
    else if (en) state <= nxt;
  end

  assign crc = ~state;
endmodule
