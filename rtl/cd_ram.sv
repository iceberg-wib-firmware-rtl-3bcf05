// cd_ram: the per-link frame buffer of a COLDATA stream processor.
//
// 256 bytes, written a byte at a time on port A (the link clock) and read a
// 32-bit word at a time on port B (the event builder clock), as the firmware's
// CD_RAM: 8-bit input, 32-bit output q_b. Byte address a maps to bits
// [8*(a%4)+7 : 8*(a%4)] of word a/4 (first byte lowest). The read is
// registered: q_b shows the word at address_b one clock_b edge after it is
// presented. Written as an array so that synthesis can infer block RAM.
module cd_ram #(
  parameter int unsigned BYTES = 256
) (
  input  logic                         clock_a,
  input  logic                         wren_a,
  input  logic [$clog2(BYTES)-1:0]     address_a,
  input  logic [7:0]                   data_a,
  input  logic                         clock_b,
  input  logic [$clog2(BYTES/4)-1:0]   address_b,
  output logic [31:0]                  q_b
);
  logic [3:0][7:0] mem [BYTES/4];

  always_ff @(posedge clock_a) begin
    if (wren_a) mem[address_a[$clog2(BYTES)-1:2]][address_a[1:0]] <= data_a;
  end

  always_ff @(posedge clock_b) begin
    q_b <= mem[address_b];
  end
endmodule
