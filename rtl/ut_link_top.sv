// One Upstream Tracker readout link with a passive data concentrator board.
//
// NASIC SALT front-end ASICs each format their events (ut_salt_formatter)
// and send them on NPORTS[a] e-ports (ut_eport_tx), each e-port serialised
// onto its own e-link at 8 bits per crossing (ut_eport_ser). The passive data
// concentrator board places every e-port byte at a fixed position of the GBT
// frame, so each ASIC owns a fixed sub-frame of 8*NPORTS[a] bits: ASIC 0 in
// the most significant bits, its e-port 0 first, then ASIC 1, and so on;
// frame bits no e-port uses stay zero. The sub-frames are independent: each
// ASIC's stream has its own packet boundaries and idle packets. At the back
// end each sub-frame is cut out of the received frame again and parsed by its
// own ut_subframe_decoder.
// The concentrator's GBT transceiver, which deserialises the e-links, and the
// optical fibre are not part of this RTL: gbt_tx_frame is the frame the
// concentrator forms, taken from the e-port bytes before serialisation (the
// same bits the e-links carry), and gbt_rx_* is where the fibre delivers it;
// connect the two directly for a loss-free link.
// That each ASIC owns a fixed sub-frame of an 80-bit GBT frame, and that one
// ASIC uses up to five e-ports, follows the readout description; the default
// split of 4+2+2+2 e-ports is this design's own example and adds up to the
// ten e-links an 80-bit frame holds.
//
// Timing: one clock domain. bx_stb marks each bunch crossing; gbt_tx_valid
// follows it by one clock, and each e-link sends its byte, MSB first, in the
// 8 clocks after that (bx_stb must then come every 8 clocks). The formatters and decoders handle one item per
// clock, so the clock should run at least 8 times the crossing rate
// (320 MHz for 40 MHz crossings, the e-link bit rate).
module ut_link_top
  import ut_pkg::*;
#(
  parameter int unsigned NASIC          = 4,
  parameter int unsigned NPORTS [NASIC] = '{4, 2, 2, 2},
  parameter int unsigned GBT_W          = 80,
  parameter int unsigned DEPTH          = 2048,
  localparam int unsigned TOTAL_PORTS   = NPORTS.sum()
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                bx_stb,
  input  ut_mode_e            cfg_mode,
  input  logic [LEN_W-1:0]    cfg_trunc_thr,

  // front end: events and samples per ASIC
  input  logic                ev_valid  [NASIC],
  output logic                ev_ready  [NASIC],
  input  ut_event_t           ev        [NASIC],
  input  ut_nzs_info_t        nzs_info  [NASIC],
  input  logic                smp_valid [NASIC],
  output logic                smp_ready [NASIC],
  input  ut_sample_t          smp       [NASIC],

  // serial e-links of all ASICs (ASIC 0 e-port 0 first), and the GBT frame the
  // passive concentrator board forms from them, and the frame arriving at the
  // back end
  output logic                elink [TOTAL_PORTS],
  output logic [GBT_W-1:0]    gbt_tx_frame,
  output logic                gbt_tx_valid,
  input  logic [GBT_W-1:0]    gbt_rx_frame,
  input  logic                gbt_rx_valid,

  // back end: decoded records per ASIC
  output logic                hdr_valid  [NASIC],
  output ut_header_t          hdr        [NASIC],
  output logic                hit_valid  [NASIC],
  output ut_sample_t          hit        [NASIC],
  output logic                info_valid [NASIC],
  output ut_nzs_info_t        info       [NASIC],

  // monitoring pulses and flags per ASIC
  output logic                stat_trunc      [NASIC],
  output logic                stat_trunc_full [NASIC],
  output logic                stat_tx_idle    [NASIC],
  output logic                stat_rx_idle    [NASIC],
  output logic                bxid_err        [NASIC],
  output logic                fmt_err         [NASIC],
  output logic                sync_err        [NASIC],
  output logic                overflow        [NASIC]
);

  // first e-port (counted from the frame's MSB) of ASIC a
  function automatic int unsigned port_offset(int unsigned a);
    int unsigned s = 0;
    for (int unsigned i = 0; i < a; i++) s += NPORTS[i];
    return s;
  endfunction

  initial begin
    assert (TOTAL_PORTS * EPORT_W <= GBT_W)
      else $error("e-ports of all ASICs do not fit into the GBT frame");
  end

  logic [NASIC-1:0] frame_valid;

  for (genvar a = 0; a < NASIC; a++) begin : g_asic
    localparam int unsigned NP  = NPORTS[a];
    localparam int unsigned FW  = EPORT_W * NP;
    localparam int unsigned MSB = GBT_W - 1 - EPORT_W * port_offset(a);

    logic                        wr_valid, wr_commit;
    logic [ITEM_W-1:0]           wr_data;
    logic [4:0]                  wr_len;
    logic [15:0]                 buf_free;
    logic [NP-1:0][EPORT_W-1:0]  eport;

    ut_salt_formatter u_fmt (
      .clk, .rst_n, .cfg_mode, .cfg_trunc_thr,
      .ev_valid  (ev_valid[a]),  .ev_ready (ev_ready[a]),
      .ev        (ev[a]),        .nzs_info (nzs_info[a]),
      .smp_valid (smp_valid[a]), .smp_ready(smp_ready[a]), .smp(smp[a]),
      .buf_free, .wr_valid, .wr_data, .wr_len, .wr_commit,
      .stat_trunc     (stat_trunc[a]),
      .stat_trunc_full(stat_trunc_full[a])
    );

    ut_eport_tx #(.NPORTS(NP), .DEPTH(DEPTH)) u_tx (
      .clk, .rst_n, .bx_stb,
      .wr_valid, .wr_data, .wr_len, .wr_commit, .buf_free,
      .eport,
      .frame_valid(frame_valid[a]),
      .stat_idle  (stat_tx_idle[a])
    );

    // passive concentrator: fixed placement in the GBT frame
    for (genvar k = 0; k < NP; k++) begin : g_port
      assign gbt_tx_frame[MSB - EPORT_W * k -: EPORT_W] = eport[k];

      ut_eport_ser u_ser (
        .clk, .rst_n,
        .load      (frame_valid[a]),
        .data      (eport[k]),
        .serial_out(elink[port_offset(a) + k])
      );
    end

    ut_subframe_decoder #(.NPORTS(NP)) u_dec (
      .clk, .rst_n, .cfg_mode,
      .in_valid  (gbt_rx_valid),
      .in_frame  (gbt_rx_frame[MSB -: FW]),
      .hdr_valid (hdr_valid[a]),  .hdr (hdr[a]),
      .hit_valid (hit_valid[a]),  .hit (hit[a]),
      .info_valid(info_valid[a]), .info(info[a]),
      .stat_idle (stat_rx_idle[a]),
      .bxid_err  (bxid_err[a]),
      .fmt_err   (fmt_err[a]),
      .sync_err  (sync_err[a]),
      .overflow  (overflow[a])
    );
  end

  if (TOTAL_PORTS * EPORT_W < GBT_W) begin : g_unused
    assign gbt_tx_frame[GBT_W - 1 - TOTAL_PORTS * EPORT_W : 0] = '0;
  end

  assign gbt_tx_valid = &frame_valid;  // all framers share bx_stb

endmodule
