// Back-end decoder for one ASIC's sub-frame of the GBT frame.
//
// Each valid input is the ASIC's 8*NPORTS-bit sub-frame of one bunch
// crossing, most significant bit first. The bits go into a left-aligned
// accumulator; a parser takes one item per clock from its top:
//   * a 6-bit idle packet (000011) is dropped (stat_idle pulses);
//   * {BXID, 1, 0} is a header-only event;
//   * {BXID, 0, IsTrunc, Length} is a normal event followed by Length
//     12-bit hits, a truncated event (no hits, Length = NumHits/4), or, with
//     Length = 6'h3F, an NZS packet: 36 bits of ASIC count and DSP
//     parameters, then 128 raw 6-bit ADC values;
//   * in synch mode, any 12 bits that are not an idle packet are a synch
//     packet, checked against SYNC_PATTERN.
// Event headers must carry consecutive BXIDs (modulo 16), since every BX is
// sent and in order; a break pulses bxid_err. A 6-bit prefix with NoData and
// IsTrunc both set but a non-zero BXID is no legal packet and pulses fmt_err.
// The packet grammar, the idle rule and the BXID order follow the format
// definition; the output records, the one-item-per-clock parser and the
// accumulator size are this design's own. The parser consumes at least 6 bits
// per clock, so it keeps up when sub-frames come no more often than every
// ceil(8*NPORTS/6)+1 clocks; overflow reports a sub-frame that did not fit.
//
// Interface: in_valid/in_frame carry the sub-frame. Outputs are registered
// one-cycle records: hdr (packet kind, BXID, Length field), hit (chan and ADC;
// for NZS samples chan is the channel index and adc the 6-bit raw value) and
// info (NZS parameters). Latency from the sub-frame holding the last bit of an
// item to its record is one to a few clocks, depending on the items queued.
module ut_subframe_decoder
  import ut_pkg::*;
#(
  parameter int unsigned NPORTS = 4,
  localparam int unsigned FW    = EPORT_W * NPORTS,
  localparam int unsigned BUF   = 2 * FW + 48,
  localparam int unsigned CW    = $clog2(BUF + 1)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  ut_mode_e             cfg_mode,

  input  logic                 in_valid,
  input  logic [FW-1:0]        in_frame,

  output logic                 hdr_valid,
  output ut_header_t           hdr,
  output logic                 hit_valid,
  output ut_sample_t           hit,
  output logic                 info_valid,
  output ut_nzs_info_t         info,

  output logic                 stat_idle,
  output logic                 bxid_err,
  output logic                 fmt_err,
  output logic                 sync_err,
  output logic                 overflow    // sticky
);

  typedef enum logic [1:0] {
    S_HDR,
    S_HIT,
    S_NZS_INFO,
    S_NZS_ADC
  } state_e;

  state_e             state_q, state_d;
  logic [BUF-1:0]     acc_q, acc_d;
  logic [CW-1:0]      cnt_q, cnt_d;     // valid bits in acc_q, from the top
  logic [NHITS_W-1:0] left_q, left_d;   // hits or samples still to come
  logic [BXID_W-1:0]  last_bx_q, last_bx_d;
  logic               have_bx_q, have_bx_d;

  logic [CW-1:0]      take;             // bits consumed this clock
  logic [CW-1:0]      kept;

  logic               hdr_v_d, hit_v_d, info_v_d, idle_d, bxe_d, fmt_d, syn_d;
  ut_header_t         hdr_d;
  ut_sample_t         hit_d;

  logic [5:0]         top6, len6;
  logic [11:0]        top12;
  logic [NZS_INFO_W-1:0] top36;

  assign top6  = acc_q[BUF-1 -: 6];
  assign len6  = acc_q[BUF-7 -: 6];
  assign top12 = acc_q[BUF-1 -: 12];
  assign top36 = acc_q[BUF-1 -: NZS_INFO_W];

  always_comb begin
    state_d   = state_q;
    left_d    = left_q;
    last_bx_d = last_bx_q;
    have_bx_d = have_bx_q;
    take      = '0;
    hdr_v_d   = 1'b0;
    hit_v_d   = 1'b0;
    info_v_d  = 1'b0;
    idle_d    = 1'b0;
    bxe_d     = 1'b0;
    fmt_d     = 1'b0;
    syn_d     = 1'b0;
    hdr_d     = '{kind: PKT_HEADER_ONLY, bxid: top6[5:2], length: '0};
    hit_d     = '0;

    unique case (state_q)
      S_HDR: begin
        if (cnt_q >= CW'(SHORT_HDR_W)) begin
          if (top6 == IDLE_PACKET) begin
            take   = CW'(SHORT_HDR_W);
            idle_d = 1'b1;
          end else if (cfg_mode == MODE_SYNC) begin
            if (cnt_q >= CW'(LONG_HDR_W)) begin
              take       = CW'(LONG_HDR_W);
              hdr_v_d    = 1'b1;
              hdr_d.kind = PKT_SYNC;
              hdr_d.bxid = '0;
              syn_d      = (top12 != SYNC_PATTERN);
            end
          end else if (top6[1:0] == 2'b11) begin
            take  = CW'(SHORT_HDR_W);
            fmt_d = 1'b1;
          end else if (top6[1]) begin
            take    = CW'(SHORT_HDR_W);
            hdr_v_d = 1'b1;
          end else if (cnt_q >= CW'(LONG_HDR_W)) begin
            take         = CW'(LONG_HDR_W);
            hdr_v_d      = 1'b1;
            hdr_d.length = len6;
            if (!top6[0]) begin
              hdr_d.kind = PKT_NORMAL;
              left_d     = NHITS_W'(len6);
              if (len6 != '0) state_d = S_HIT;
            end else if (len6 == NZS_LENGTH) begin
              hdr_d.kind = PKT_NZS;
              state_d    = S_NZS_INFO;
            end else begin
              hdr_d.kind = PKT_TRUNC;
            end
          end
          // BXID continuity over all event packets
          if (hdr_v_d && hdr_d.kind != PKT_SYNC) begin
            bxe_d     = have_bx_q && (top6[5:2] != last_bx_q + 1'b1);
            last_bx_d = top6[5:2];
            have_bx_d = 1'b1;
          end
        end
      end

      S_HIT: begin
        if (cnt_q >= CW'(HIT_W)) begin
          take     = CW'(HIT_W);
          hit_v_d  = 1'b1;
          hit_d    = '{chan: top12[11:5], adc: {1'b0, top12[4:0]}};
          left_d   = left_q - 1'b1;
          if (left_q == NHITS_W'(1)) state_d = S_HDR;
        end
      end

      S_NZS_INFO: begin
        if (cnt_q >= CW'(NZS_INFO_W)) begin
          take     = CW'(NZS_INFO_W);
          info_v_d = 1'b1;
          left_d   = '0;
          state_d  = S_NZS_ADC;
        end
      end

      S_NZS_ADC: begin
        if (cnt_q >= CW'(RAW_ADC_W)) begin
          take    = CW'(RAW_ADC_W);
          hit_v_d = 1'b1;
          hit_d   = '{chan: left_q[CHAN_W-1:0], adc: top6};
          left_d  = left_q + 1'b1;
          if (left_q == NHITS_W'(NCHAN - 1)) state_d = S_HDR;
        end
      end

      default: state_d = S_HDR;
    endcase

    // shift out what was consumed, append the new sub-frame behind the rest
    kept  = cnt_q - take;
    acc_d = acc_q << take;
    cnt_d = kept;
    if (in_valid && (32'(kept) + FW <= BUF)) begin
      acc_d = acc_d | ({in_frame, {(BUF - FW){1'b0}}} >> kept);
      cnt_d = kept + CW'(FW);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q    <= S_HDR;
      acc_q      <= '0;
      cnt_q      <= '0;
      left_q     <= '0;
      last_bx_q  <= '0;
      have_bx_q  <= 1'b0;
      hdr_valid  <= 1'b0;
      hdr        <= '0;
      hit_valid  <= 1'b0;
      hit        <= '0;
      info_valid <= 1'b0;
      info       <= '0;
      stat_idle  <= 1'b0;
      bxid_err   <= 1'b0;
      fmt_err    <= 1'b0;
      sync_err   <= 1'b0;
      overflow   <= 1'b0;
    end else begin
      state_q    <= state_d;
      acc_q      <= acc_d;
      cnt_q      <= cnt_d;
      left_q     <= left_d;
      last_bx_q  <= last_bx_d;
      have_bx_q  <= have_bx_d;
      hdr_valid  <= hdr_v_d;
      hdr        <= hdr_d;
      hit_valid  <= hit_v_d;
      hit        <= hit_d;
      info_valid <= info_v_d;
      info       <= top36;
      stat_idle  <= idle_d;
      bxid_err   <= bxe_d;
      fmt_err    <= fmt_d;
      sync_err   <= syn_d;
      if (in_valid && (32'(kept) + FW > BUF)) overflow <= 1'b1;
    end
  end

endmodule
