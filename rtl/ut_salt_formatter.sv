// SALT event formatter: builds one Upstream Tracker packet per event.
//
// Each accepted event becomes exactly one packet, written into the e-port
// transmit buffer (ut_eport_tx) one item per clock, most significant bit
// first. In zero-suppressed (ZS) mode:
//   * an event with NoData set or without hits gives the 6-bit header
//     {BXID, 1, 0};
//   * an event with 1..threshold hits gives the 12-bit header
//     {BXID, 0, 0, NumHits} followed by one 12-bit {chan, adc} item per hit;
//   * an event with more hits than cfg_trunc_thr (default 63), or whose full
//     packet would not fit in the free buffer space, gives the truncated
//     header {BXID, 0, 1, NumHits/4}; its hits are read and dropped.
// In NZS mode each event gives {BXID, 0, 1, 6'h3F}, the ASIC count and four
// 8-bit DSP parameters from nzs_info, then 128 raw 6-bit ADC values taken from
// the sample stream in channel order (816 bits in all). In synch mode each
// event gives the 12-bit SYNC_PATTERN and any samples are dropped.
// The packet layouts, the truncation rule and the NumHits/4 length follow the
// format definition. The valid/ready handshakes, the one-item-per-clock
// pacing and the choice to wait (ev_ready low) when even a short packet does
// not fit are this design's own.
//
// Interface: ev_* is the event handshake (ev and nzs_info are sampled when
// ev_valid && ev_ready); smp_* streams the hits (ZS, exactly ev.nhits of
// them) or the 128 raw samples (NZS). buf_free is the free space of the
// transmit buffer in bits. wr_* writes wr_len bits (right-aligned in wr_data)
// and wr_commit marks the last item of a packet.
//
// Timing: the header is written in the cycle the event is accepted; each hit
// or NZS field takes one further cycle, so a normal event of N hits occupies
// the formatter for N+1 cycles and an NZS event for 1+5+128 cycles.
module ut_salt_formatter
  import ut_pkg::*;
#(
  parameter int unsigned FREE_W = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  ut_mode_e             cfg_mode,
  input  logic [LEN_W-1:0]     cfg_trunc_thr,

  input  logic                 ev_valid,
  output logic                 ev_ready,
  input  ut_event_t            ev,
  input  ut_nzs_info_t         nzs_info,

  input  logic                 smp_valid,
  output logic                 smp_ready,
  input  ut_sample_t           smp,

  input  logic [FREE_W-1:0]    buf_free,
  output logic                 wr_valid,
  output logic [ITEM_W-1:0]    wr_data,
  output logic [4:0]           wr_len,
  output logic                 wr_commit,

  // one-cycle event markers, for monitoring
  output logic                 stat_trunc,       // a truncated packet was written
  output logic                 stat_trunc_full   // ... because the buffer was full
);

  typedef enum logic [2:0] {
    S_IDLE,
    S_HITS,
    S_DRAIN,
    S_NZS_INFO,
    S_NZS_ADC
  } state_e;

  state_e             state_q, state_d;
  logic [NHITS_W-1:0] cnt_q, cnt_d;         // items still to come in this packet
  ut_nzs_info_t       info_q, info_d;

  // bits the whole ZS packet of the offered event would need
  logic [FREE_W-1:0]  zs_need;
  logic               too_many, no_room, short_fits, long_fits, nzs_fits;

  always_comb begin
    zs_need    = FREE_W'(LONG_HDR_W) + FREE_W'(ev.nhits) * FREE_W'(HIT_W);
    too_many   = ev.nhits > NHITS_W'(cfg_trunc_thr);
    no_room    = buf_free < zs_need;
    short_fits = buf_free >= FREE_W'(SHORT_HDR_W);
    long_fits  = buf_free >= FREE_W'(LONG_HDR_W);
    nzs_fits   = buf_free >= FREE_W'(NZS_PACKET_W);
  end

  always_comb begin
    state_d         = state_q;
    cnt_d           = cnt_q;
    info_d          = info_q;
    ev_ready        = 1'b0;
    smp_ready       = 1'b0;
    wr_valid        = 1'b0;
    wr_data         = '0;
    wr_len          = '0;
    wr_commit       = 1'b0;
    stat_trunc      = 1'b0;
    stat_trunc_full = 1'b0;

    unique case (state_q)
      S_IDLE: begin
        unique case (cfg_mode)
          MODE_NZS: begin
            ev_ready = nzs_fits;
            if (ev_valid && nzs_fits) begin
              wr_valid = 1'b1;
              wr_len   = 5'(LONG_HDR_W);
              wr_data  = ITEM_W'({ev.bxid, 1'b0, 1'b1, NZS_LENGTH});
              info_d   = nzs_info;
              cnt_d    = '0;
              state_d  = S_NZS_INFO;
            end
          end
          MODE_SYNC: begin
            ev_ready = long_fits;
            if (ev_valid && long_fits) begin
              wr_valid  = 1'b1;
              wr_len    = 5'(LONG_HDR_W);
              wr_data   = ITEM_W'(SYNC_PATTERN);
              wr_commit = 1'b1;
              cnt_d     = ev.nhits;
              if (ev.nhits != '0) state_d = S_DRAIN;
            end
          end
          default: begin // MODE_ZS
            if (ev.nodata || ev.nhits == '0) begin
              ev_ready = short_fits;
              if (ev_valid && short_fits) begin
                wr_valid  = 1'b1;
                wr_len    = 5'(SHORT_HDR_W);
                wr_data   = ITEM_W'({ev.bxid, 1'b1, 1'b0});
                wr_commit = 1'b1;
                cnt_d     = ev.nhits;
                if (ev.nhits != '0) state_d = S_DRAIN;
              end
            end else if (too_many || no_room) begin
              ev_ready = long_fits;
              if (ev_valid && long_fits) begin
                wr_valid        = 1'b1;
                wr_len          = 5'(LONG_HDR_W);
                wr_data         = ITEM_W'({ev.bxid, 1'b0, 1'b1, ev.nhits[NHITS_W-1:2]});
                wr_commit       = 1'b1;
                stat_trunc      = 1'b1;
                stat_trunc_full = !too_many;
                cnt_d           = ev.nhits;
                state_d         = S_DRAIN;
              end
            end else begin
              ev_ready = 1'b1;   // no_room is false, so the whole packet fits
              if (ev_valid) begin
                wr_valid = 1'b1;
                wr_len   = 5'(LONG_HDR_W);
                wr_data  = ITEM_W'({ev.bxid, 1'b0, 1'b0, ev.nhits[LEN_W-1:0]});
                cnt_d    = ev.nhits;
                state_d  = S_HITS;
              end
            end
          end
        endcase
      end

      S_HITS: begin
        smp_ready = 1'b1;
        if (smp_valid) begin
          wr_valid  = 1'b1;
          wr_len    = 5'(HIT_W);
          wr_data   = ITEM_W'({smp.chan, smp.adc[ADC_W-1:0]});
          cnt_d     = cnt_q - 1'b1;
          wr_commit = (cnt_q == NHITS_W'(1));
          if (cnt_q == NHITS_W'(1)) state_d = S_IDLE;
        end
      end

      S_DRAIN: begin
        smp_ready = 1'b1;
        if (smp_valid) begin
          cnt_d = cnt_q - 1'b1;
          if (cnt_q == NHITS_W'(1)) state_d = S_IDLE;
        end
      end

      S_NZS_INFO: begin
        wr_valid = 1'b1;
        unique case (cnt_q[2:0])
          3'd0:    begin wr_len = 5'd4; wr_data = ITEM_W'(info_q.num_asics);        end
          3'd1:    begin wr_len = 5'd8; wr_data = ITEM_W'(info_q.num_chan_cm);      end
          3'd2:    begin wr_len = 5'd8; wr_data = ITEM_W'(info_q.num_chan_signal);  end
          3'd3:    begin wr_len = 5'd8; wr_data = ITEM_W'(info_q.num_chan_recover); end
          default: begin wr_len = 5'd8; wr_data = ITEM_W'(info_q.cm_value);         end
        endcase
        if (cnt_q == NHITS_W'(4)) begin
          cnt_d   = NHITS_W'(NCHAN);
          state_d = S_NZS_ADC;
        end else begin
          cnt_d = cnt_q + 1'b1;
        end
      end

      S_NZS_ADC: begin
        smp_ready = 1'b1;
        if (smp_valid) begin
          wr_valid  = 1'b1;
          wr_len    = 5'(RAW_ADC_W);
          wr_data   = ITEM_W'(smp.adc);
          cnt_d     = cnt_q - 1'b1;
          wr_commit = (cnt_q == NHITS_W'(1));
          if (cnt_q == NHITS_W'(1)) state_d = S_IDLE;
        end
      end

      default: state_d = S_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      cnt_q   <= '0;
      info_q  <= '0;
    end else begin
      state_q <= state_d;
      cnt_q   <= cnt_d;
      info_q  <= info_d;
    end
  end

  // A packet is only started when it fits, so no single write may overflow.
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    wr_valid |-> FREE_W'(wr_len) <= buf_free);

endmodule
