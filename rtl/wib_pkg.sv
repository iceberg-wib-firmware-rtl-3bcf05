// wib_pkg: types and constants shared by the WIB data path.
//
// The records mirror the firmware's records: CD_Stream_t (one COLDATA link as
// seen by an event builder), convert_t (the ADC convert strobe with its
// counters and time stamp), WIB_ID_t (slot and crate) and Fake_CD_Control_t /
// Fake_CD_Monitor_t (the fake COLDATA generator). Field names and widths follow
// the firmware's definitions. The link-level frame format (SOF/EOF/idle
// characters, header layout, 16-bit checksum) is this design's own choice; the
// firmware names the checks (bad checksum, bad SOF, K character in data, short
// and long frames) but its frame layout is not reproduced here.
// Each module uses only some of these constants, so lint lists the others
// as unused in that module.
package wib_pkg;

  // Array sizes, as in the firmware's constants.
  localparam int unsigned FEMB_COUNT     = 4;
  localparam int unsigned CDAS_PER_FEMB  = 2;
  localparam int unsigned LINKS_PER_CDA  = 2;
  localparam int unsigned LINKS_PER_FEMB = CDAS_PER_FEMB * LINKS_PER_CDA;  // 4
  localparam int unsigned LINK_COUNT     = FEMB_COUNT * LINKS_PER_FEMB;     // 16
  localparam int unsigned LINK_GROUPS    = 4;
  localparam int unsigned CDA_COUNT      = FEMB_COUNT * CDAS_PER_FEMB;      // 8

  // Samples per link per convert: 8 ADC/FEMB x 16 ch x 2 B / 4 links = 64 B.
  localparam int unsigned PAYLOAD_BYTES  = 64;
  localparam int unsigned PAYLOAD_WORDS  = PAYLOAD_BYTES / 4;              // 16

  // 9-bit link words: bit 8 set marks a command (K) character.
  localparam logic [8:0] K_IDLE = 9'h1BC;  // K28.5, also the comma
  localparam logic [8:0] K_SOF  = 9'h13C;  // K28.1
  localparam logic [8:0] K_EOF  = 9'h1DC;  // K28.6

  // Event builder (32-bit words, k flags per byte, byte 0 carries the K code).
  localparam logic [7:0] EB_K_IDLE = 8'hBC;  // K28.5
  localparam logic [7:0] EB_K_SOF  = 8'h3C;  // K28.1
  localparam logic [7:0] EB_K_EOF  = 8'hDC;  // K28.6

  // capture_errors bit positions (one per counted frame error).
  localparam int unsigned CE_BAD_CHSUM      = 0;
  localparam int unsigned CE_BAD_SOF        = 1;
  localparam int unsigned CE_BUFFER_FULL    = 2;
  localparam int unsigned CE_CONVERT_IN_WW  = 3;
  localparam int unsigned CE_KCHAR_IN_DATA  = 4;
  localparam int unsigned CE_MISSING_EOF    = 5;
  localparam int unsigned CE_UNEXPECTED_EOF = 6;
  localparam int unsigned CE_TIMEOUT        = 7;

  // Counter indices of the stream processor (counters[8:1] in the firmware).
  typedef enum logic [2:0] {
    CNT_BAD_CHSUM, CNT_BAD_SOF, CNT_BUFFER_FULL, CNT_CONVERT_IN_WAIT_WINDOW,
    CNT_KCHAR_IN_DATA, CNT_MISSING_EOF, CNT_UNEXPECTED_EOF, CNT_PACKETS
  } cd_counter_e;
  localparam int unsigned CD_COUNTERS = 8;

  typedef struct packed {
    logic        valid;
    logic [7:0]  capture_errors;
    logic [15:0] CD_errors;
    logic [15:0] CD_timestamp;
    logic [31:0] data_out;
  } CD_stream_t;

  typedef struct packed {
    logic        trigger;
    logic [23:0] reset_count;
    logic [15:0] convert_count;
    logic [63:0] time_stamp;
    logic        out_of_sync;
  } convert_t;

  typedef struct packed {
    logic [3:0] slot;
    logic [3:0] crate;
  } WIB_ID_t;

  typedef struct packed {
    logic        enable;
    logic [15:0] convert_delay;
    logic [CD_COUNTERS-1:0] counter_reset;
  } CD_Stream_Control_t;

  typedef struct packed {
    logic [15:0] convert_delay;
    logic [15:0] wait_window;
    logic [CD_COUNTERS-1:0][31:0] counters;
    logic [8:0]  data;
  } CD_Stream_Monitor_t;

  typedef struct packed {
    logic        reset_counter_packets_1_A;
    logic        reset_counter_packets_1_B;
    logic        inject_errors;
    logic [15:0] inject_CD_errors;
    logic [1:0]  inject_BAD_checksum;
    logic [1:0]  inject_BAD_SOF;
    logic [1:0]  inject_LARGE_FRAME;
    logic [1:0]  inject_K_CHAR;
    logic [1:0]  inject_SHORT_FRAME;
    logic [15:0] set_reserved;
    logic [31:0] set_header;
    logic [LINKS_PER_CDA:1] fake_stream_type;
  } Fake_CD_Control_t;

  typedef struct packed {
    logic [31:0] counter_packets_A;
    logic [31:0] counter_packets_B;
    logic [8:0]  data_A;
    logic [8:0]  data_B;
    // settings in use, read back from the control record
    logic [15:0] inject_CD_errors;
    logic [1:0]  inject_BAD_checksum;
    logic [1:0]  inject_BAD_SOF;
    logic [1:0]  inject_LARGE_FRAME;
    logic [1:0]  inject_K_CHAR;
    logic [1:0]  inject_SHORT_FRAME;
    logic [15:0] set_reserved;
    logic [31:0] set_header;
    logic [LINKS_PER_CDA:1] fake_stream_type;
  } Fake_CD_Monitor_t;

  typedef struct packed {
    logic [LINKS_PER_FEMB-1:0] rx_analogreset;
    logic [LINKS_PER_FEMB-1:0] rx_digitalreset;
  } FEMB_Rx_Control_t;

  typedef struct packed {
    logic [LINKS_PER_FEMB-1:0] rx_analogreset;   // read back from control
    logic [LINKS_PER_FEMB-1:0] rx_digitalreset;  // read back from control
    logic [LINKS_PER_FEMB-1:0] rx_errdetect;
    logic [LINKS_PER_FEMB-1:0] rx_disperr;
    logic [LINKS_PER_FEMB-1:0] rx_runningdisp;
    logic [LINKS_PER_FEMB-1:0] rx_patterndetect;
    logic [LINKS_PER_FEMB-1:0] rx_syncstatus;
  } FEMB_Rx_Monitor_t;

  // Event builder control and monitor records. COLDATA_en has one bit per CD
  // stream: 4 used in the RCE arrangement, 8 in the FELIX one.
  typedef struct packed {
    logic        enable;
    logic [7:0]  COLDATA_en;
    logic        event_count_reset;
    logic        spy_buffer_wait_for_trigger;
    logic        spy_buffer_start;
    logic        spy_buffer_read;
    logic        enable_bad_crc;
    logic [15:0] bad_crc_bits;
  } DAQ_Link_EB_Control_t;

  typedef struct packed {
    logic        enable;
    logic [7:0]  COLDATA_en;
    logic [7:0]  fiber_number;
    logic [3:0]  slot_id;
    logic [3:0]  crate_id;
    logic [31:0] event_count;
    logic [35:0] spy_buffer_data;
    logic        spy_buffer_empty;
    logic        spy_buffer_running;
    logic        spy_buffer_wait_for_trigger;
    logic        enable_bad_crc;
    logic [15:0] bad_crc_bits;
  } DAQ_Link_EB_Monitor_t;

  // Two-byte additive frame checksum used on the COLDATA links.
  function automatic logic [15:0] csum_add(logic [15:0] s, logic [7:0] b);
    return s + 16'(b);
  endfunction

endpackage
