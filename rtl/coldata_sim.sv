// coldata_sim: fake COLDATA ASIC (one CDA, two link streams) for testing the
// WIB receive chain without front-end boards.
//
// Each convert trigger makes both streams send one frame of 9-bit link words
// (bit 8 set = K character), in the same format the stream processor checks:
//
//   SOF | CD_errors[15:8] [7:0] | time stamp[15:8] [7:0] | reserved[15:8] [7:0]
//       | header[31:24] .. [7:0] | 64 payload bytes | checksum[15:8] [7:0] | EOF
//
// then K28.5 idles. The time stamp is convert_count[15:0]; payload byte i of
// stream s is convert_count[7:0] + i + 64*s; the checksum is the 16-bit sum
// of the 74 bytes between SOF and checksum. While control.inject_errors is set,
// the per-stream inject bits corrupt every frame: CD_errors replaced by
// inject_CD_errors, checksum inverted (BAD_checksum), SOF sent as a data byte
// (BAD_SOF), one extra payload byte (LARGE_FRAME), payload byte 5 sent as
// K28.7 (K_CHAR), last payload byte dropped (SHORT_FRAME). A trigger that
// arrives while a frame is still going out is ignored. The firmware gives the
// control and monitor fields and that one simulator stands in for one CDA with
// two links; the frame layout and data pattern are this design's own.
// Of the convert record only trigger and convert_count are used; lint reports
// the rest as unused.
// Timing: the first word (SOF) appears two clocks after convert.trigger;
// a normal frame is 78 words. Everything runs on clk; reset_sync is
// synchronous and active high.
module coldata_sim
  import wib_pkg::*;
(
  input  logic             clk,
  input  logic             reset_sync,
  input  Fake_CD_Control_t control,
  input  convert_t         convert,
  output Fake_CD_Monitor_t monitor,
  output logic [8:0]       data_out_stream1,
  output logic [8:0]       data_out_stream2
);
  localparam int unsigned HDR_BYTES = 10;

  logic [1:0][8:0]  dout;
  logic [1:0][31:0] packets;
  logic [1:0]       pkt_reset;

  assign pkt_reset = {control.reset_counter_packets_1_B, control.reset_counter_packets_1_A};

  for (genvar s = 0; s < 2; s++) begin : g_stream
    logic        busy;
    logic [6:0]  idx;        // word index within the frame, 0 = SOF
    logic [15:0] csum;
    logic [15:0] cde, ts, rsv;
    logic [31:0] hdr;
    logic        inj_csum, inj_sof, inj_large, inj_k, inj_short;
    logic [6:0]  pay_len, csum_idx, eof_idx;
    logic [7:0]  byte_v;
    logic [8:0]  word_v;

    assign pay_len  = 7'(PAYLOAD_BYTES) + (inj_large ? 7'd1 : 7'd0) - (inj_short ? 7'd1 : 7'd0);
    assign csum_idx = 7'(1 + HDR_BYTES) + pay_len;
    assign eof_idx  = csum_idx + 7'd2;

    // Data byte for index idx (1 .. csum_idx-1), and the word actually sent.
    always_comb begin
      unique case (idx)
        7'd1:    byte_v = cde[15:8];
        7'd2:    byte_v = cde[7:0];
        7'd3:    byte_v = ts[15:8];
        7'd4:    byte_v = ts[7:0];
        7'd5:    byte_v = rsv[15:8];
        7'd6:    byte_v = rsv[7:0];
        7'd7:    byte_v = hdr[31:24];
        7'd8:    byte_v = hdr[23:16];
        7'd9:    byte_v = hdr[15:8];
        7'd10:   byte_v = hdr[7:0];
        default: byte_v = ts[7:0] + 8'(idx - 7'(1 + HDR_BYTES)) + 8'(64 * s);
      endcase
      if (idx == 7'd0)
        word_v = inj_sof ? {1'b0, K_SOF[7:0]} : K_SOF;
      else if (idx == csum_idx)
        word_v = {1'b0, inj_csum ? ~csum[15:8] : csum[15:8]};
      else if (idx == csum_idx + 7'd1)
        word_v = {1'b0, inj_csum ? ~csum[7:0] : csum[7:0]};
      else if (idx == eof_idx)
        word_v = K_EOF;
      else if (inj_k && idx == 7'(1 + HDR_BYTES + 5))
        word_v = 9'h1FC;  // K28.7 inside the payload
      else
        word_v = {1'b0, byte_v};
    end

    always_ff @(posedge clk) begin
      if (reset_sync) begin
        busy <= 1'b0; idx <= '0; csum <= '0; dout[s] <= K_IDLE; packets[s] <= '0;
        cde <= '0; ts <= '0; rsv <= '0; hdr <= '0;
        {inj_csum, inj_sof, inj_large, inj_k, inj_short} <= '0;
      end else begin
        if (pkt_reset[s]) packets[s] <= '0;
        if (!busy) begin
          dout[s] <= K_IDLE;
          if (convert.trigger) begin
            busy      <= 1'b1;
            idx       <= '0;
            csum      <= '0;
            cde       <= control.inject_errors ? control.inject_CD_errors : 16'h0000;
            ts        <= convert.convert_count;
            rsv       <= control.set_reserved;
            hdr       <= control.set_header;
            inj_csum  <= control.inject_errors & control.inject_BAD_checksum[s];
            inj_sof   <= control.inject_errors & control.inject_BAD_SOF[s];
            inj_large <= control.inject_errors & control.inject_LARGE_FRAME[s];
            inj_k     <= control.inject_errors & control.inject_K_CHAR[s];
            inj_short <= control.inject_errors & control.inject_SHORT_FRAME[s];
          end
        end else begin
          dout[s] <= word_v;
          if (idx != 7'd0 && idx < csum_idx) csum <= csum_add(csum, word_v[7:0]);
          if (idx == eof_idx) begin
            busy <= 1'b0;
            if (!pkt_reset[s]) packets[s] <= packets[s] + 32'd1;
          end
          idx <= idx + 7'd1;
        end
      end
    end
  end

  assign data_out_stream1 = dout[0];
  assign data_out_stream2 = dout[1];

  assign monitor.counter_packets_A = packets[0];
  assign monitor.counter_packets_B = packets[1];
  assign monitor.data_A            = dout[0];
  assign monitor.data_B            = dout[1];
  assign monitor.inject_CD_errors    = control.inject_CD_errors;
  assign monitor.inject_BAD_checksum = control.inject_BAD_checksum;
  assign monitor.inject_BAD_SOF      = control.inject_BAD_SOF;
  assign monitor.inject_LARGE_FRAME  = control.inject_LARGE_FRAME;
  assign monitor.inject_K_CHAR       = control.inject_K_CHAR;
  assign monitor.inject_SHORT_FRAME  = control.inject_SHORT_FRAME;
  assign monitor.set_reserved        = control.set_reserved;
  assign monitor.set_header          = control.set_header;
  assign monitor.fake_stream_type    = control.fake_stream_type;
endmodule
