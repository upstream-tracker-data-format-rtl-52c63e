// Upstream Tracker front-end data format: shared widths, codes and types.
//
// The SALT front-end ASIC of the Upstream Tracker sends one packet per bunch
// crossing (BX), most significant bit first. The packet kinds are:
//
//   header-only   BXID[4] NoData=1 IsTrunc=0                        6 bits
//   idle          0000    NoData=1 IsTrunc=1                        6 bits
//   normal        BXID[4] NoData=0 IsTrunc=0 Length[6] + Length hits of 12 bits
//   truncated     BXID[4] NoData=0 IsTrunc=1 Length=NumHits/4       12 bits
//   NZS           BXID[4] NoData=0 IsTrunc=1 Length=6'h3F + 804 data bits
//   synch         a preset 12-bit pattern
//
// A hit is a 7-bit channel ID followed by a 5-bit ADC value. The NZS data is
// a 4-bit ASIC count, four 8-bit DSP parameters (NumChanCM, NumChanSignal,
// NumChanRecover, CMValue) and 128 raw 6-bit ADC values in channel order.
// All of this follows the format definition. The synch pattern itself was
// never fixed, so SYNC_PATTERN is this design's own placeholder; it is chosen
// so that its first six bits differ from the idle packet.
package ut_pkg;

  localparam int unsigned BXID_W      = 4;
  localparam int unsigned LEN_W       = 6;
  localparam int unsigned CHAN_W      = 7;
  localparam int unsigned ADC_W       = 5;   // ADC bits of a zero-suppressed hit
  localparam int unsigned RAW_ADC_W   = 6;   // ADC bits of an NZS sample
  localparam int unsigned NCHAN       = 128; // strips per ASIC
  localparam int unsigned NHITS_W     = 8;   // holds 0..128 hits
  localparam int unsigned SHORT_HDR_W = 6;
  localparam int unsigned LONG_HDR_W  = 12;
  localparam int unsigned HIT_W       = CHAN_W + ADC_W;  // 12
  localparam int unsigned EPORT_W     = 8;   // bits per e-port per BX (320 Mbps / 40 MHz)
  localparam int unsigned ITEM_W      = 16;  // widest item written to the packet buffer

  localparam logic [LEN_W-1:0]       NZS_LENGTH   = 6'h3F;
  localparam logic [SHORT_HDR_W-1:0] IDLE_PACKET  = 6'b0000_1_1;
  localparam logic [LONG_HDR_W-1:0]  SYNC_PATTERN = 12'hA5C;
  localparam int unsigned            NZS_DATA_W   = 4 + 4 * 8 + NCHAN * RAW_ADC_W; // 804
  localparam int unsigned            NZS_PACKET_W = LONG_HDR_W + NZS_DATA_W;       // 816

  // Run mode. Zero-suppressed and NZS data are never mixed within a run.
  typedef enum logic [1:0] {
    MODE_ZS   = 2'd0,
    MODE_NZS  = 2'd1,
    MODE_SYNC = 2'd2
  } ut_mode_e;

  // One event (one BX) as handed to the formatter.
  typedef struct packed {
    logic [BXID_W-1:0]  bxid;
    logic               nodata;  // BX veto or header-only request
    logic [NHITS_W-1:0] nhits;   // hits that follow on the sample stream (ZS)
  } ut_event_t;

  // One entry of the sample stream: a hit in ZS mode (adc[4:0] used), or a raw
  // ADC value in NZS mode (chan ignored, channel order implied).
  typedef struct packed {
    logic [CHAN_W-1:0]    chan;
    logic [RAW_ADC_W-1:0] adc;
  } ut_sample_t;

  // DSP parameters carried at the start of an NZS packet.
  typedef struct packed {
    logic [3:0] num_asics;
    logic [7:0] num_chan_cm;
    logic [7:0] num_chan_signal;
    logic [7:0] num_chan_recover;
    logic [7:0] cm_value;
  } ut_nzs_info_t;

  localparam int unsigned NZS_INFO_W = $bits(ut_nzs_info_t); // 36

  // Packet kinds as the decoder reports them.
  typedef enum logic [2:0] {
    PKT_HEADER_ONLY = 3'd0,
    PKT_NORMAL      = 3'd1,
    PKT_TRUNC       = 3'd2,
    PKT_NZS         = 3'd3,
    PKT_SYNC        = 3'd4
  } ut_pkt_e;

  typedef struct packed {
    ut_pkt_e           kind;
    logic [BXID_W-1:0] bxid;
    logic [LEN_W-1:0]  length;
  } ut_header_t;

endpackage
