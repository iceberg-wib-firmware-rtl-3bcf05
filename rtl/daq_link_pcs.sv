// daq_link_pcs: the 8b10b encoding stage of the DAQ links (the RCE_PCS and
// FELIX_PCS of the firmware, without the vendor serialiser).
//
// Each link takes a 64-bit word and 8 K flags from its event builder and
// encodes the eight bytes in one clock with a chain of eight 8b10b encoders,
// byte 0 first, the running disparity passing from one to the next and, in a
// register, on to the next clock. Symbol j (byte j) is in bits [10*j+9:10*j]
// of tx_parallel; byte 0 goes on the wire first. When data_wr is low the link
// sends K28.5 idles. tx_digital_reset or tx_analog_reset of a link sends idles
// and restarts its disparity at RD-. Output is registered: one clock of
// latency. LINKS is 4 for the RCE arrangement (2 CDAs per DAQ link) and 2 for
// the FELIX one (4 CDAs per link); the firmware chooses between them with
// CDAS_PER_DAQ_LINK. The serialiser, its PLL and the output buffers are the
// FPGA vendor's and are not modelled.
module daq_link_pcs #(
  parameter int unsigned LINKS = 4
) (
  input  logic                    clk,
  input  logic                    reset,
  input  logic [LINKS-1:0]        data_wr,
  input  logic [LINKS-1:0][63:0]  data,
  input  logic [LINKS-1:0][7:0]   data_k,
  input  logic [LINKS-1:0]        tx_analog_reset,
  input  logic [LINKS-1:0]        tx_digital_reset,
  output logic [LINKS-1:0][79:0]  tx_parallel,
  output logic [LINKS-1:0]        k_error
);
  for (genvar l = 0; l < LINKS; l++) begin : g_link
    logic       rd_q;
    logic [8:0] rd_chain;
    logic [7:0] kerr;
    logic [79:0] sym;
    logic [63:0] d;
    logic [7:0]  k;

    assign d = data_wr[l] ? data[l]   : {8{8'hBC}};
    assign k = data_wr[l] ? data_k[l] : 8'hFF;
    assign rd_chain[0] = rd_q;

    for (genvar j = 0; j < 8; j++) begin : g_encoder_chain
      enc8b10b u_enc (.data(d[8*j +: 8]), .k(k[j]), .rd_in(rd_chain[j]),
                      .code(sym[10*j +: 10]), .rd_out(rd_chain[j+1]), .k_err(kerr[j]));
    end

    always_ff @(posedge clk) begin
      if (reset || tx_analog_reset[l] || tx_digital_reset[l]) begin
        rd_q <= 1'b0;
        tx_parallel[l] <= {4{10'b110000_0101, 10'b001111_1010}};  // K28.5, alternating RD
        k_error[l] <= 1'b0;
      end else begin
        rd_q <= rd_chain[8];
        tx_parallel[l] <= sym;
        k_error[l] <= |kerr;
      end
    end
  end
endmodule
