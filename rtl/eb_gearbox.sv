// eb_gearbox: packs the event builder's 32-bit word stream into the 64-bit
// words of a DAQ link. Words arrive one per clock with valid; each pair goes
// out as one 64-bit word, the earlier word in bits 31:0 (k flags 3:0) and the
// later in bits 63:32 (k flags 7:4), with data_wr high for one clock, one
// clock after the second word arrives. The firmware names a gearbox here; the
// pairing order is this design's choice.
module eb_gearbox (
  input  logic        clk,
  input  logic        reset,
  input  logic        in_valid,
  input  logic [31:0] in_data,
  input  logic [3:0]  in_k,
  output logic        data_wr,
  output logic [63:0] data_out,
  output logic [7:0]  data_k_out
);
  logic        half;
  logic [31:0] lo_d;
  logic [3:0]  lo_k;

  always_ff @(posedge clk) begin
    if (reset) begin
      half <= 1'b0; data_wr <= 1'b0; lo_d <= '0; lo_k <= '0;
      data_out <= '0; data_k_out <= '0;
    end else begin
      data_wr <= 1'b0;
      if (in_valid) begin
        if (!half) begin
          lo_d <= in_data; lo_k <= in_k; half <= 1'b1;
        end else begin
          data_out   <= {in_data, lo_d};
          data_k_out <= {in_k, lo_k};
          data_wr    <= 1'b1;
          half       <= 1'b0;
        end
      end
    end
  end
endmodule
