// wib_top: data path of the WIB (warm interface board). It takes the 16
// 8b10b links of four front-end boards (FEMBs), checks and buffers the
// COLDATA frames on each link, and builds from them the events sent on the
// DAQ links, with a convert/time-stamp generator and one three-word I2C master
// per FEMB for configuring the cold electronics.
//
// Chain, per link l (l = 4*FEMB + 2*CDA-in-FEMB + stream):
//   FEMB_RX[l] -> femb_rx (8b10b decode) --+
//                                          +--> cd_stream_processor[l]
//   coldata_sim[CDA] stream 1/2 -----------+     (fake_stream_type selects)
// and per DAQ link d:
//   cd_stream_processor[N*d .. N*d+N-1] -> daq_link_eventbuilder[d]
//                                        -> daq_link_pcs (8b10b encode)
// where N = CDAS_PER_DAQ_LINK * LINKS_PER_CDA streams feed one builder: 2 CDAs
// (4 streams, 4 DAQ links) in the RCE arrangement, the default, or 4 CDAs
// (8 streams, 2 DAQ links) in the FELIX one.
//
// Clocks: clk_sys (64 MHz system clock) runs convert_gen and the I2C
// masters; clk_evb runs the event-builder side of the stream processors, the
// event builders and the DAQ link encoders; clk_cd is the recovered FEMB link
// word clock (one 9-bit word per clock per link, all links assumed to share
// it) and runs femb_rx, the fake COLDATA generators and the link side of the
// stream processors. Each reset is synchronous to its clock. An event builder
// sends one 32-bit word per clk_evb cycle and an RCE event with four streams
// is 79 words, so at 2 MS/s clk_evb must be at least 158 MHz; the link frame
// is 78 words, so clk_cd must be at least 156 MHz for a frame per convert.
// The convert record reaches clk_evb and clk_cd through pacd pulse crossers
// for its trigger; its other fields change only on a trigger and are stable
// by the time the crossed pulse arrives.
//
// The register map bridge takes register reads and writes from clk_sys into
// seven clock domains; the register files in those domains (which would
// drive the control records) are outside this module, so both its sides are
// ports, as are the timing endpoint (sync command and time stamp), the FEMB
// transceivers, the DAQ link serialisers and the Ethernet register path. The
// block list and the array sizes follow the firmware's top level; the split
// into three clocks and the link-to-builder assignment (consecutive links)
// are this design's choice.
module wib_top
  import wib_pkg::*;
#(
  parameter int unsigned CDAS_PER_DAQ_LINK = 2,
  parameter int unsigned CONVERT_PERIOD    = 32,
  parameter int unsigned SPY_DEPTH         = 1024,
  parameter int unsigned I2C_CLK_DIV       = 160,
  parameter int unsigned REG_DOMAINS       = 7,
  localparam int unsigned N_STREAMS   = CDAS_PER_DAQ_LINK * LINKS_PER_CDA,
  localparam int unsigned N_DAQ_LINKS = CDA_COUNT / CDAS_PER_DAQ_LINK
) (
  input  logic                                           clk_sys,
  input  logic                                           reset_sys,
  input  logic                                           clk_evb,
  input  logic                                           reset_evb,
  input  logic                                           clk_cd,
  input  logic                                           reset_cd,
  input  WIB_ID_t                                        WIB_ID,
  // timing endpoint
  input  logic                                           sync_cmd,
  input  logic                                           ts_valid,
  input  logic [63:0]                                    ts_in,
  output convert_t                                       convert,
  // FEMB links (aligned 10-bit symbols from the transceivers)
  input  logic [FEMB_COUNT-1:0][LINKS_PER_FEMB-1:0][9:0] FEMB_RX,
  input  FEMB_Rx_Control_t [FEMB_COUNT-1:0]              femb_rx_control,
  output FEMB_Rx_Monitor_t [FEMB_COUNT-1:0]              femb_rx_monitor,
  // fake COLDATA, one generator per CDA
  input  Fake_CD_Control_t [CDA_COUNT-1:0]               fake_cd_control,
  output Fake_CD_Monitor_t [CDA_COUNT-1:0]               fake_cd_monitor,
  // stream processors, one per link
  input  CD_Stream_Control_t [LINK_COUNT-1:0]            cd_stream_control,
  output CD_Stream_Monitor_t [LINK_COUNT-1:0]            cd_stream_monitor,
  // event builders and DAQ links
  input  DAQ_Link_EB_Control_t [N_DAQ_LINKS-1:0]         eb_control,
  output DAQ_Link_EB_Monitor_t [N_DAQ_LINKS-1:0]         eb_monitor,
  input  logic [N_DAQ_LINKS-1:0]                         tx_analog_reset,
  input  logic [N_DAQ_LINKS-1:0]                         tx_digital_reset,
  output logic [N_DAQ_LINKS-1:0][79:0]                   tx_parallel,
  output logic [N_DAQ_LINKS-1:0]                         tx_k_error,
  // DUNE I2C, one master per FEMB
  input  logic [FEMB_COUNT-1:0]                          i2c_start,
  input  logic [FEMB_COUNT-1:0]                          i2c_rw,
  input  logic [FEMB_COUNT-1:0][3:0]                     i2c_chip_addr,
  input  logic [FEMB_COUNT-1:0][2:0]                     i2c_page,
  input  logic [FEMB_COUNT-1:0][7:0]                     i2c_reg_addr,
  input  logic [FEMB_COUNT-1:0][7:0]                     i2c_wdata,
  output logic [FEMB_COUNT-1:0]                          i2c_busy,
  output logic [FEMB_COUNT-1:0]                          i2c_done,
  output logic [FEMB_COUNT-1:0][7:0]                     i2c_rdata,
  output logic [FEMB_COUNT-1:0]                          i2c_ack_error,
  output logic [FEMB_COUNT-1:0]                          i2c_scl,
  output logic [FEMB_COUNT-1:0]                          i2c_sda_w2c,
  input  logic [FEMB_COUNT-1:0]                          i2c_sda_c2w,
  // register access (register map side on clk_sys, seven clock domains)
  input  logic                                           reg_wr_strobe,
  input  logic                                           reg_rd_strobe,
  input  logic [31:0]                                    reg_data_in,
  input  logic [15:0]                                    reg_wr_address,
  input  logic [15:0]                                    reg_rd_address,
  output logic [31:0]                                    reg_data_out,
  output logic                                           reg_busy,
  output logic                                           reg_done,
  output logic                                           reg_error,
  input  logic [REG_DOMAINS-1:0]                         reg_clk_domain,
  input  logic [REG_DOMAINS-1:0]                         reg_clk_domain_locked,
  input  logic [REG_DOMAINS-1:0]                         reg_read_address_ack,
  input  logic [REG_DOMAINS-1:0]                         reg_read_data_wr,
  input  logic [REG_DOMAINS-1:0][35:0]                   reg_read_data,
  input  logic [REG_DOMAINS-1:0]                         reg_write_addr_data_ack,
  output logic [REG_DOMAINS-1:0]                         reg_read_address_valid,
  output logic [REG_DOMAINS-1:0][15:0]                   reg_read_address,
  output logic [REG_DOMAINS-1:0]                         reg_write_addr_data_valid,
  output logic [REG_DOMAINS-1:0][15:0]                   reg_write_addr,
  output logic [REG_DOMAINS-1:0][31:0]                   reg_write_data
);
  // ---- convert and time stamp (clk_sys) ----
  convert_gen #(.CONVERT_PERIOD(CONVERT_PERIOD)) u_convert (
    .clk(clk_sys), .reset(reset_sys), .sync_cmd, .ts_valid, .ts_in, .convert);

  // Convert record as seen on clk_evb and on clk_cd (fake generators).
  logic     conv_trig_evb, conv_trig_cd;
  convert_t convert_evb, convert_cd;
  pacd u_pacd_evb (.clk_in(clk_sys), .reset_in(reset_sys), .pulse_in(convert.trigger),
                   .clk_out(clk_evb), .reset_out(reset_evb), .pulse_out(conv_trig_evb));
  pacd u_pacd_cd (.clk_in(clk_sys), .reset_in(reset_sys), .pulse_in(convert.trigger),
                  .clk_out(clk_cd), .reset_out(reset_cd), .pulse_out(conv_trig_cd));
  always_comb begin
    convert_evb         = convert;
    convert_evb.trigger = conv_trig_evb;
    convert_cd          = convert;
    convert_cd.trigger  = conv_trig_cd;
  end

  // ---- FEMB receivers (clk_cd) ----
  logic [FEMB_COUNT-1:0][LINKS_PER_FEMB-1:0][8:0] rx_data;
  femb_rx u_femb_rx (.clk_in(clk_cd), .reset(reset_cd), .FEMB_RX, .control(femb_rx_control),
                     .rx_data, .monitor(femb_rx_monitor));

  // ---- fake COLDATA and per-link stream selection ----
  logic [LINK_COUNT-1:0][8:0] link_word;
  for (genvar a = 0; a < CDA_COUNT; a++) begin : g_cda
    logic [8:0] fake1, fake2;
    coldata_sim u_sim (.clk(clk_cd), .reset_sync(reset_cd), .control(fake_cd_control[a]),
                       .convert(convert_cd), .monitor(fake_cd_monitor[a]),
                       .data_out_stream1(fake1), .data_out_stream2(fake2));
    localparam int unsigned F = a / CDAS_PER_FEMB;
    localparam int unsigned L = (a % CDAS_PER_FEMB) * LINKS_PER_CDA;
    assign link_word[LINKS_PER_CDA*a]     = fake_cd_control[a].fake_stream_type[1] ? fake1 : rx_data[F][L];
    assign link_word[LINKS_PER_CDA*a + 1] = fake_cd_control[a].fake_stream_type[2] ? fake2 : rx_data[F][L + 1];
  end

  // ---- stream processors ----
  CD_stream_t [LINK_COUNT-1:0] cd_stream;
  logic [LINK_COUNT-1:0]       cd_read;
  for (genvar l = 0; l < LINK_COUNT; l++) begin : g_link
    cd_stream_processor u_proc (
      .clk_CD(clk_cd), .reset_CD(reset_cd), .COLDATA_stream(link_word[l]), .convert(convert_evb),
      .clk_EVB(clk_evb), .reset_EVB(reset_evb), .EB_rd(cd_read[l]),
      .FEMB_DAQ_control(cd_stream_control[l]), .monitor(cd_stream_monitor[l]),
      .CD_to_EB_stream(cd_stream[l]));
  end

  // ---- event builders and link encoders (clk_evb) ----
  logic [N_DAQ_LINKS-1:0]       eb_wr;
  logic [N_DAQ_LINKS-1:0][63:0] eb_data;
  logic [N_DAQ_LINKS-1:0][7:0]  eb_k;
  for (genvar d = 0; d < N_DAQ_LINKS; d++) begin : g_daq
    daq_link_eventbuilder #(
      .CDAS_PER_DAQ_LINK(CDAS_PER_DAQ_LINK), .FIBER_NUMBER(8'(d)), .SPY_DEPTH(SPY_DEPTH)
    ) u_eb (
      .clk(clk_evb), .reset(reset_evb), .WIB_ID,
      .CD_stream(cd_stream[N_STREAMS*d +: N_STREAMS]), .convert(convert_evb), .control(eb_control[d]),
      .CD_read(cd_read[N_STREAMS*d +: N_STREAMS]), .data_wr(eb_wr[d]), .data_out(eb_data[d]),
      .data_k_out(eb_k[d]), .monitor(eb_monitor[d]));
  end

  daq_link_pcs #(.LINKS(N_DAQ_LINKS)) u_pcs (
    .clk(clk_evb), .reset(reset_evb), .data_wr(eb_wr), .data(eb_data), .data_k(eb_k),
    .tx_analog_reset, .tx_digital_reset, .tx_parallel, .k_error(tx_k_error));

  // ---- DUNE I2C masters (clk_sys) ----
  for (genvar f = 0; f < FEMB_COUNT; f++) begin : g_i2c
    dune_i2c_master #(.CLK_DIV(I2C_CLK_DIV)) u_i2c (
      .clk(clk_sys), .reset(reset_sys), .start(i2c_start[f]), .rw(i2c_rw[f]),
      .chip_addr(i2c_chip_addr[f]), .page(i2c_page[f]), .reg_addr(i2c_reg_addr[f]),
      .wdata(i2c_wdata[f]), .busy(i2c_busy[f]), .done(i2c_done[f]), .rdata(i2c_rdata[f]),
      .ack_error(i2c_ack_error[f]), .scl(i2c_scl[f]), .sda_w2c(i2c_sda_w2c[f]),
      .sda_c2w(i2c_sda_c2w[f]));
  end

  // ---- register access bridge (clk_sys to the register domains) ----
  register_map_bridge #(.DOMAINS(REG_DOMAINS)) u_reg_bridge (
    .clk_reg_map(clk_sys), .reset(reset_sys), .WR_strobe(reg_wr_strobe), .RD_strobe(reg_rd_strobe),
    .data_in(reg_data_in), .WR_address(reg_wr_address), .RD_address(reg_rd_address),
    .clk_domain(reg_clk_domain), .clk_domain_locked(reg_clk_domain_locked),
    .read_address_ack(reg_read_address_ack), .read_data_wr(reg_read_data_wr),
    .read_data(reg_read_data), .write_addr_data_ack(reg_write_addr_data_ack),
    .data_out(reg_data_out), .read_address_valid(reg_read_address_valid),
    .read_address(reg_read_address), .write_addr_data_valid(reg_write_addr_data_valid),
    .write_addr(reg_write_addr), .write_data(reg_write_data),
    .busy(reg_busy), .done(reg_done), .error(reg_error));
endmodule
