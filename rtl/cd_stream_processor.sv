// cd_stream_processor: receives one COLDATA link, checks its frames, tallies
// the errors and buffers the frames for the event builder.
//
// Link side (clk_CD): COLDATA_stream carries 9-bit words, bit 8 marking a
// command (K) character. A frame is SOF, 10 header bytes (CD_errors,
// time stamp, reserved, header), 64 payload bytes, a 16-bit checksum (sum of
// the 74 bytes before it) and EOF; K28.5 fills the gaps. The 64 payload bytes
// go into CD_RAM, 256 bytes organised as four 64-byte frame slots. Every frame
// that reaches the RAM is handed on, good or bad, with capture_errors telling
// what went wrong, so the event builder stays aligned. The eight 32-bit
// counters of the firmware are kept here:
//   BAD_CHSUM          checksum mismatch at EOF
//   BAD_SOF            data word while a SOF is expected (once per run)
//   BUFFER_FULL        SOF while all four slots are taken (frame dropped)
//   CONVERT_IN_WAIT_WINDOW  convert while the previous one still waits for SOF
//   KCHAR_IN_DATA      K character other than EOF inside a frame
//   MISSING_EOF        data word where EOF is due
//   UNEXPECTED_EOF     EOF before the frame is complete
//   packets            frames received intact (flags from before the SOF aside)
// Each counter clears on its FEMB_DAQ_control.counter_reset bit.
// convert.trigger (clk_EVB) crosses to the link clock, is delayed by
// convert_delay link clocks and then opens the wait window, closed by the next
// SOF; monitor.wait_window is the length of the last window in link clocks.
// Either reset input resets both halves: it is passed to each clock through
// a two-flop reset synchroniser, as the firmware's reseter_1 (clk_CD) and
// reseter_2 (clk_EVB) do. With enable low the link is ignored. Only
// convert.trigger is used here (the rest of the convert record goes to the
// event builder directly), so lint reports the other convert bits as unused.
//
// Event builder side (clk_EVB): CD_to_EB_stream.valid says a frame is ready;
// data_out is its current 32-bit payload word (first byte in bits 7:0) and the
// header fields belong to that frame. EB_rd while valid consumes a word; after
// the 16th the slot is freed and the next frame, if any, is shown on the next
// clock. Frame-ready and slot-free events cross between the clocks with pacd
// pulse synchronisers; the header registers of a slot are written before its
// ready pulse and are stable while it is read. The monitor is in the clk_CD
// domain, for register readout.
//
// The firmware names the counters, the RAM size and widths, the two clock
// domains with their pulse crossers and the record fields. The frame layout,
// the slot organisation and the error policy are this design's own.
module cd_stream_processor
  import wib_pkg::*;
(
  input  logic               clk_CD,
  input  logic               reset_CD,
  input  logic [8:0]         COLDATA_stream,
  input  convert_t           convert,
  input  logic               clk_EVB,
  input  logic               reset_EVB,
  input  logic               EB_rd,
  input  CD_Stream_Control_t FEMB_DAQ_control,
  output CD_Stream_Monitor_t monitor,
  output CD_stream_t         CD_to_EB_stream
);
  localparam int unsigned SLOTS      = 4;
  localparam int unsigned HDR_BYTES  = 10;
  localparam int unsigned BODY_BYTES = HDR_BYTES + PAYLOAD_BYTES + 2;  // up to EOF

  typedef enum logic [1:0] {S_IDLE, S_FRAME} state_e;

  // ---------------------------------------------------------------- link side
  state_e      state;
  logic [6:0]  idx;                 // bytes received since SOF
  logic [15:0] csum, rx_csum;
  logic [15:0] cde_w, ts_w;
  logic [7:0]  ce_w;                // capture errors of the frame being received
  logic        junk;
  logic [1:0]  wr_slot;
  logic [2:0]  used;                // slots holding a frame not yet freed
  logic        conv_cd, conv_go, free_cd, commit;
  logic [15:0] delay_cnt;
  logic        delay_run, window_open;
  logic [7:0]  pend_ce;             // errors seen between frames, reported with the next one
  logic [15:0] wait_cnt, wait_window;
  logic [CD_COUNTERS-1:0] inc;
  logic [CD_COUNTERS-1:0][31:0] counters;
  logic [8:0]  last_word;

  logic [SLOTS-1:0][15:0] slot_cde, slot_ts;
  logic [SLOTS-1:0][7:0]  slot_ce;

  logic        ram_we;
  logic [7:0]  ram_addr;

  logic        is_k, is_sof, is_eof;
  logic        en;
  assign en     = FEMB_DAQ_control.enable;
  assign is_k   = COLDATA_stream[8];
  assign is_sof = COLDATA_stream == K_SOF;
  assign is_eof = COLDATA_stream == K_EOF;

  // Reset synchronisers (reseter_1 on clk_CD, reseter_2 on clk_EVB): either
  // reset input resets both halves, so the slot bookkeeping on the two sides
  // always starts together. Each output is held two clocks after the inputs
  // go low.
  logic [1:0] rst_cd_q;
  logic [1:0] rst_evb_q;
  logic       rst_cd, rst_evb;
  always_ff @(posedge clk_CD)  rst_cd_q  <= {rst_cd_q[0], reset_CD || reset_EVB};
  always_ff @(posedge clk_EVB) rst_evb_q <= {rst_evb_q[0], reset_CD || reset_EVB};
  assign rst_cd  = rst_cd_q[1] || reset_CD;
  assign rst_evb = rst_evb_q[1] || reset_EVB;

  pacd u_pacd_1 (.clk_in(clk_EVB), .reset_in(rst_evb), .pulse_in(convert.trigger),
                 .clk_out(clk_CD), .reset_out(rst_cd), .pulse_out(conv_cd));

  // Convert delay and wait window.
  always_ff @(posedge clk_CD) begin
    if (rst_cd) begin
      delay_run <= 1'b0; delay_cnt <= '0;
    end else if (conv_cd && en) begin
      delay_run <= (FEMB_DAQ_control.convert_delay != 16'd0);
      delay_cnt <= FEMB_DAQ_control.convert_delay;
    end else if (delay_run) begin
      delay_cnt <= delay_cnt - 16'd1;
      if (delay_cnt == 16'd1) delay_run <= 1'b0;
    end
  end
  assign conv_go = en && ((conv_cd && FEMB_DAQ_control.convert_delay == 16'd0) ||
                          (delay_run && delay_cnt == 16'd1));

  // Frame reception.
  always_comb begin
    inc    = '0;
    commit = 1'b0;
    ram_we = 1'b0;
    ram_addr = {wr_slot, 6'(idx - 7'(HDR_BYTES))};
    if (conv_go && window_open) inc[CNT_CONVERT_IN_WAIT_WINDOW] = 1'b1;
    if (en) begin
      unique case (state)
        S_IDLE: begin
          if (is_sof && used == 3'(SLOTS)) inc[CNT_BUFFER_FULL] = 1'b1;
          else if (!is_k && !junk)          inc[CNT_BAD_SOF]     = 1'b1;
        end
        S_FRAME: begin
          if (is_eof) begin
            commit = 1'b1;
            if (idx != 7'(BODY_BYTES))  inc[CNT_UNEXPECTED_EOF] = 1'b1;
            else if (rx_csum != csum)   inc[CNT_BAD_CHSUM]      = 1'b1;
            else if (!ce_w[CE_KCHAR_IN_DATA]) inc[CNT_PACKETS]  = 1'b1;
          end else if (idx == 7'(BODY_BYTES)) begin
            inc[CNT_MISSING_EOF] = 1'b1;
            commit = 1'b1;
          end else begin
            if (is_k) inc[CNT_KCHAR_IN_DATA] = 1'b1;
            ram_we = (idx >= 7'(HDR_BYTES)) && (idx < 7'(HDR_BYTES + PAYLOAD_BYTES));
          end
        end
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk_CD) begin
    if (rst_cd) begin
      state <= S_IDLE; idx <= '0; csum <= '0; rx_csum <= '0; cde_w <= '0; ts_w <= '0;
      ce_w <= '0; junk <= 1'b0; wr_slot <= '0; window_open <= 1'b0; pend_ce <= '0;
      wait_cnt <= '0; wait_window <= '0; last_word <= K_IDLE;
      slot_cde <= '0; slot_ts <= '0; slot_ce <= '0;
    end else begin
      last_word <= COLDATA_stream;
      // Wait window: opened by the delayed convert, closed by SOF.
      if (conv_go) begin
        window_open <= 1'b1;
        wait_cnt    <= '0;
      end else if (window_open) begin
        wait_cnt <= wait_cnt + 16'd1;
      end
      if (en) begin
        if (is_k) junk <= 1'b0;
        unique case (state)
          S_IDLE: begin
            if (is_sof) begin
              if (window_open && !conv_go) begin
                window_open <= 1'b0;
                wait_window <= wait_cnt;
              end
              if (used != 3'(SLOTS)) begin
                state <= S_FRAME; idx <= '0; csum <= '0; rx_csum <= '0;
              end else begin
                junk <= 1'b1;   // dropped frame: its bytes are not SOF errors
              end
            end else if (!is_k) begin
              junk <= 1'b1;
            end
          end
          S_FRAME: begin
            if (is_eof) begin
              state <= S_IDLE;
            end else if (idx == 7'(BODY_BYTES)) begin
              state <= S_IDLE;
              junk  <= !is_k;
            end else begin
              idx <= idx + 7'd1;
              if (is_k) ce_w[CE_KCHAR_IN_DATA] <= 1'b1;
              if (idx < 7'(HDR_BYTES + PAYLOAD_BYTES))
                csum <= csum_add(csum, COLDATA_stream[7:0]);
              unique case (idx)
                7'd0: cde_w[15:8] <= COLDATA_stream[7:0];
                7'd1: cde_w[7:0]  <= COLDATA_stream[7:0];
                7'd2: ts_w[15:8]  <= COLDATA_stream[7:0];
                7'd3: ts_w[7:0]   <= COLDATA_stream[7:0];
                7'(BODY_BYTES - 2): rx_csum[15:8] <= COLDATA_stream[7:0];
                7'(BODY_BYTES - 1): rx_csum[7:0]  <= COLDATA_stream[7:0];
                default: ;
              endcase
            end
          end
          default: state <= S_IDLE;
        endcase
        if (state == S_IDLE && is_sof && used != 3'(SLOTS)) begin
          ce_w    <= pend_ce;
          pend_ce <= '0;
        end else begin
          pend_ce <= pend_ce
                   | (inc[CNT_BAD_SOF]     ? 8'(1 << CE_BAD_SOF)     : 8'h00)
                   | (inc[CNT_BUFFER_FULL] ? 8'(1 << CE_BUFFER_FULL) : 8'h00)
                   | (inc[CNT_CONVERT_IN_WAIT_WINDOW] ? 8'(1 << CE_CONVERT_IN_WW) : 8'h00);
        end
        if (commit) begin
          slot_cde[wr_slot] <= cde_w;
          slot_ts[wr_slot]  <= ts_w;
          slot_ce[wr_slot]  <= ce_w
                             | (inc[CNT_BAD_CHSUM]      ? 8'(1 << CE_BAD_CHSUM)      : 8'h00)
                             | (inc[CNT_MISSING_EOF]    ? 8'(1 << CE_MISSING_EOF)    : 8'h00)
                             | (inc[CNT_UNEXPECTED_EOF] ? 8'(1 << CE_UNEXPECTED_EOF) : 8'h00);
          wr_slot <= wr_slot + 2'd1;
        end
      end else begin
        state <= S_IDLE;
      end
    end
  end

  // Slot occupancy seen from the link side.
  always_ff @(posedge clk_CD) begin
    if (rst_cd) used <= '0;
    else          used <= used + (commit ? 3'd1 : 3'd0) - (free_cd ? 3'd1 : 3'd0);
  end

  // Error and packet counters.
  always_ff @(posedge clk_CD) begin
    for (int i = 0; i < CD_COUNTERS; i++) begin
      if (rst_cd || FEMB_DAQ_control.counter_reset[i]) counters[i] <= '0;
      else if (inc[i])                                   counters[i] <= counters[i] + 32'd1;
    end
  end

  assign monitor.convert_delay = FEMB_DAQ_control.convert_delay;
  assign monitor.wait_window   = wait_window;
  assign monitor.counters      = counters;
  assign monitor.data          = last_word;

  // -------------------------------------------------------- event builder side
  logic        ready_evb, free_evb;
  logic [2:0]  avail;
  logic [1:0]  rd_slot, rd_slot_n;
  logic [3:0]  rd_word, rd_word_n;
  logic        take;
  logic [31:0] q_b;

  pacd u_pacd_2 (.clk_in(clk_CD), .reset_in(rst_cd), .pulse_in(commit),
                 .clk_out(clk_EVB), .reset_out(rst_evb), .pulse_out(ready_evb));
  pacd u_pacd_free (.clk_in(clk_EVB), .reset_in(rst_evb), .pulse_in(free_evb),
                    .clk_out(clk_CD), .reset_out(rst_cd), .pulse_out(free_cd));

  assign take      = EB_rd && (avail != 3'd0);
  assign free_evb  = take && (rd_word == 4'(PAYLOAD_WORDS - 1));
  assign rd_word_n = take ? rd_word + 4'd1 : rd_word;
  assign rd_slot_n = free_evb ? rd_slot + 2'd1 : rd_slot;

  always_ff @(posedge clk_EVB) begin
    if (rst_evb) begin
      avail <= '0; rd_slot <= '0; rd_word <= '0;
    end else begin
      avail   <= avail + (ready_evb ? 3'd1 : 3'd0) - (free_evb ? 3'd1 : 3'd0);
      rd_slot <= rd_slot_n;
      rd_word <= rd_word_n;
    end
  end

  cd_ram #(.BYTES(SLOTS * PAYLOAD_BYTES)) u_cd_ram (
    .clock_a(clk_CD), .wren_a(ram_we), .address_a(ram_addr), .data_a(COLDATA_stream[7:0]),
    .clock_b(clk_EVB), .address_b({rd_slot_n, rd_word_n}), .q_b(q_b));

  assign CD_to_EB_stream.valid          = (avail != 3'd0);
  assign CD_to_EB_stream.capture_errors = slot_ce[rd_slot];
  assign CD_to_EB_stream.CD_errors      = slot_cde[rd_slot];
  assign CD_to_EB_stream.CD_timestamp   = slot_ts[rd_slot];
  assign CD_to_EB_stream.data_out       = q_b;

  a_no_overrun: assert property (@(posedge clk_CD) disable iff (rst_cd) used <= 3'(SLOTS));
endmodule
