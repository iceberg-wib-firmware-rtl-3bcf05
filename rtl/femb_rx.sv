// femb_rx: receive side of the FEMB links.
//
// The WIB takes four FEMBs with four 1.28 Gb/s 8b10b links each (16 links).
// Serialisation, clock recovery and word alignment belong to the FPGA's
// transceivers and are outside this module: it receives each link as aligned
// 10-bit symbols (abcdei fghj, "a" in bit 9), one per clk_in cycle, decodes
// them and hands 9-bit words to the stream processors: bits 7:0 the byte and
// bit 8 set for a command (K) character. Symbols with a code or disparity
// error are stripped: they are replaced by K28.5 idle, flagged in the monitor
// record for that clock, and seen downstream as a K character where data was
// due. Per link the monitor reports, like the transceiver status it stands in
// for: errdetect (code error), disperr (disparity error), runningdisp, and
// patterndetect (K28.5 comma seen), and syncstatus (set by an error-free
// comma, cleared by any error). rx_analogreset or rx_digitalreset holds the
// link's decoder in reset. Latency: one clk_in cycle. All links are assumed to
// share clk_in. Sizes follow the firmware (FEMB_COUNT x LINKS_PER_FEMB); the
// error-stripping and sync rules are this design's choice.
module femb_rx
  import wib_pkg::*;
#(
  parameter int unsigned N_FEMB = FEMB_COUNT
) (
  input  logic                                       clk_in,
  input  logic                                       reset,
  input  logic [N_FEMB-1:0][LINKS_PER_FEMB-1:0][9:0] FEMB_RX,
  input  FEMB_Rx_Control_t [N_FEMB-1:0]              control,
  output logic [N_FEMB-1:0][LINKS_PER_FEMB-1:0][8:0] rx_data,
  output FEMB_Rx_Monitor_t [N_FEMB-1:0]              monitor
);
  for (genvar f = 0; f < N_FEMB; f++) begin : g_femb
    assign monitor[f].rx_analogreset  = control[f].rx_analogreset;
    assign monitor[f].rx_digitalreset = control[f].rx_digitalreset;
    for (genvar l = 0; l < LINKS_PER_FEMB; l++) begin : g_link
      logic       rd, rd_n, k, cerr, derr, lrst;
      logic [7:0] d;

      dec8b10b u_dec (.code(FEMB_RX[f][l]), .rd_in(rd), .data(d), .k(k),
                      .code_err(cerr), .disp_err(derr), .rd_out(rd_n));

      assign lrst = reset || control[f].rx_analogreset[l] || control[f].rx_digitalreset[l];

      logic [8:0] word_q;
      logic       errd_q, disp_q, pat_q, sync_q;

      always_ff @(posedge clk_in) begin
        if (lrst) begin
          rd <= 1'b0; word_q <= K_IDLE;
          errd_q <= 1'b0; disp_q <= 1'b0; pat_q <= 1'b0; sync_q <= 1'b0;
        end else begin
          rd     <= rd_n;
          word_q <= (cerr || derr) ? K_IDLE : {k, d};
          errd_q <= cerr;
          disp_q <= derr;
          pat_q  <= !cerr && ({k, d} == K_IDLE);
          if (cerr || derr)          sync_q <= 1'b0;
          else if ({k, d} == K_IDLE) sync_q <= 1'b1;
        end
      end

      assign rx_data[f][l]                 = word_q;
      assign monitor[f].rx_errdetect[l]     = errd_q;
      assign monitor[f].rx_disperr[l]       = disp_q;
      assign monitor[f].rx_patterndetect[l] = pat_q;
      assign monitor[f].rx_syncstatus[l]    = sync_q;
      assign monitor[f].rx_runningdisp[l] = rd;
    end
  end
endmodule
