// daq_link_eventbuilder: builds the events of one DAQ link from the frames of
// the COLDATA streams assigned to it and sends them as 64-bit words with
// per-byte K flags towards the link encoder.
//
// N_STREAMS = CDAS_PER_DAQ_LINK x LINKS_PER_CDA streams feed one builder: 4
// in the RCE arrangement (2 CDAs per link), 8 in the FELIX one (4 CDAs per
// link). When enable is set and every stream selected in COLDATA_en holds a
// frame, one event is sent as 32-bit words, one per clock:
//
//   SOF word     {crate, slot, fiber_number, 8'h00, K28.1}, k = 0001
//   time stamp   bits 31:0, then bits 63:32 of the last convert
//   convert info {out_of_sync, 7'h0, reset_count[23:0]}
//   counts       {convert_count[15:0], event_count[15:0]}
//   per enabled stream, in index order:
//                {capture_errors, stream index, CD_errors}
//                {16'h0000, CD_timestamp}
//                16 payload words, read with CD_read
//   CRC          Ethernet CRC-32 of every word after SOF (XOR bad_crc_bits
//                into the low half when enable_bad_crc is set, for testing)
//   EOF word     {24'h0, K28.6}, k = 0001
//
// Between events K28.5 idle words {24'h0, K28.5} go out. The word stream
// passes the gearbox (two words per 64-bit output, data_wr marks them) and is
// offered to the spy buffer. event_count counts events sent and clears on
// event_count_reset. The convert record is latched on each convert.trigger
// (the latched copy's own trigger bit is not read; lint reports it unused).
// The firmware gives the ports, the sub-blocks (Gearbox, spy_buffer_state,
// EthernetCRCD32, counter) and the control and monitor fields; the event
// layout is this design's own.
module daq_link_eventbuilder
  import wib_pkg::*;
#(
  parameter int unsigned CDAS_PER_DAQ_LINK = 2,
  parameter int unsigned N_STREAMS = CDAS_PER_DAQ_LINK * LINKS_PER_CDA,
  parameter logic [7:0]  FIBER_NUMBER = 8'd0,
  parameter int unsigned SPY_DEPTH = 1024
) (
  input  logic                       clk,
  input  logic                       reset,
  input  WIB_ID_t                    WIB_ID,
  input  CD_stream_t [N_STREAMS-1:0] CD_stream,
  input  convert_t                   convert,
  input  DAQ_Link_EB_Control_t       control,
  output logic [N_STREAMS-1:0]       CD_read,
  output logic                       data_wr,
  output logic [63:0]                data_out,
  output logic [7:0]                 data_k_out,
  output DAQ_Link_EB_Monitor_t       monitor
);
  localparam int unsigned SW = (N_STREAMS > 1) ? $clog2(N_STREAMS) : 1;

  typedef enum logic [2:0] {
    S_IDLE, S_HDR, S_SHDR0, S_SHDR1, S_DATA, S_CRC, S_EOF
  } state_e;

  state_e         state;
  logic [1:0]     hdr_idx;
  logic [SW-1:0]  sidx;
  logic [3:0]     widx;
  logic [31:0]    event_count;
  convert_t       conv_q;
  logic [N_STREAMS-1:0] en_mask, ready_mask, left;

  logic [31:0] w_data;
  logic [3:0]  w_k;
  logic        crc_init, crc_en;
  logic [31:0] crc;
  logic        all_ready;

  assign en_mask = control.COLDATA_en[N_STREAMS-1:0];
  always_comb begin
    for (int i = 0; i < N_STREAMS; i++) ready_mask[i] = CD_stream[i].valid;
  end
  assign all_ready = control.enable && (en_mask != '0) && ((ready_mask & en_mask) == en_mask);

  // Lowest stream index still to send.
  function automatic logic [SW-1:0] first_set(logic [N_STREAMS-1:0] m);
    for (int i = N_STREAMS - 1; i >= 0; i--) if (m[i]) first_set = SW'(i);
    if (m == '0) first_set = '0;
  endfunction

  always_ff @(posedge clk) begin
    if (reset) conv_q <= '0;
    else if (convert.trigger) conv_q <= convert;
  end

  // Word being sent this clock.
  always_comb begin
    w_k = 4'b0000;
    CD_read = '0;
    crc_en = 1'b0;
    crc_init = 1'b0;
    unique case (state)
      S_IDLE: begin
        if (all_ready) begin
          w_data = {WIB_ID.crate, WIB_ID.slot, FIBER_NUMBER, 8'h00, EB_K_SOF};
          crc_init = 1'b1;
        end else begin
          w_data = {24'h000000, EB_K_IDLE};
        end
        w_k = 4'b0001;
      end
      S_HDR: begin
        unique case (hdr_idx)
          2'd0:    w_data = conv_q.time_stamp[31:0];
          2'd1:    w_data = conv_q.time_stamp[63:32];
          2'd2:    w_data = {conv_q.out_of_sync, 7'h00, conv_q.reset_count};
          default: w_data = {conv_q.convert_count, event_count[15:0]};
        endcase
        crc_en = 1'b1;
      end
      S_SHDR0: begin
        w_data = {CD_stream[sidx].capture_errors, 8'(sidx), CD_stream[sidx].CD_errors};
        crc_en = 1'b1;
      end
      S_SHDR1: begin
        w_data = {16'h0000, CD_stream[sidx].CD_timestamp};
        crc_en = 1'b1;
      end
      S_DATA: begin
        w_data = CD_stream[sidx].data_out;
        CD_read[sidx] = 1'b1;
        crc_en = 1'b1;
      end
      S_CRC: begin
        w_data = crc ^ (control.enable_bad_crc ? {16'h0000, control.bad_crc_bits} : 32'h0);
      end
      default: begin
        w_data = {24'h000000, EB_K_EOF};
        w_k = 4'b0001;
      end
    endcase
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      state <= S_IDLE; hdr_idx <= '0; sidx <= '0; widx <= '0; left <= '0; event_count <= '0;
    end else begin
      if (control.event_count_reset) event_count <= '0;
      unique case (state)
        S_IDLE: if (all_ready) begin
          state <= S_HDR; hdr_idx <= '0; left <= en_mask;
        end
        S_HDR: begin
          hdr_idx <= hdr_idx + 2'd1;
          if (hdr_idx == 2'd3) begin state <= S_SHDR0; sidx <= first_set(left); end
        end
        S_SHDR0: state <= S_SHDR1;
        S_SHDR1: begin state <= S_DATA; widx <= '0; end
        S_DATA: begin
          widx <= widx + 4'd1;
          if (widx == 4'(PAYLOAD_WORDS - 1)) begin
            left[sidx] <= 1'b0;
            if ((left & ~(N_STREAMS'(1) << sidx)) == '0) state <= S_CRC;
            else begin
              state <= S_SHDR0;
              sidx  <= first_set(left & ~(N_STREAMS'(1) << sidx));
            end
          end
        end
        S_CRC: state <= S_EOF;
        default: begin
          state <= S_IDLE;
          if (!control.event_count_reset) event_count <= event_count + 32'd1;
        end
      endcase
    end
  end

  ethernet_crc32 u_crc (.clk, .init(crc_init), .en(crc_en), .data(w_data), .crc);

  eb_gearbox u_gearbox (.clk, .reset, .in_valid(1'b1), .in_data(w_data), .in_k(w_k),
                        .data_wr, .data_out, .data_k_out);

  logic [35:0] spy_data;
  logic        spy_empty, spy_running, spy_waiting;
  spy_buffer #(.DEPTH(SPY_DEPTH)) u_spy (
    .clk, .reset, .start(control.spy_buffer_start),
    .wait_for_trigger(control.spy_buffer_wait_for_trigger), .read(control.spy_buffer_read),
    .in_valid(1'b1), .in_word({w_k, w_data}), .in_sof(state == S_IDLE && all_ready),
    .data(spy_data), .empty(spy_empty), .running(spy_running), .waiting(spy_waiting));

  assign monitor.enable                      = control.enable;
  assign monitor.COLDATA_en                  = control.COLDATA_en;
  assign monitor.enable_bad_crc              = control.enable_bad_crc;
  assign monitor.bad_crc_bits                = control.bad_crc_bits;
  assign monitor.fiber_number                = FIBER_NUMBER;
  assign monitor.slot_id                     = WIB_ID.slot;
  assign monitor.crate_id                    = WIB_ID.crate;
  assign monitor.event_count                 = event_count;
  assign monitor.spy_buffer_data             = spy_data;
  assign monitor.spy_buffer_empty            = spy_empty;
  assign monitor.spy_buffer_running          = spy_running;
  assign monitor.spy_buffer_wait_for_trigger = spy_waiting;

  // A stream must keep its frame while it is being read.
  a_stream_valid: assert property (@(posedge clk) disable iff (reset)
                                   (state == S_DATA) |-> CD_stream[sidx].valid);
endmodule
