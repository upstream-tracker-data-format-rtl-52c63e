// End-to-end testbench of ut_link_top at its default size: four ASICs on
// 4+2+2+2 e-ports sharing one 80-bit GBT frame, 2048-bit packet buffers.
//
// The GBT frame is looped back from gbt_tx_* to gbt_rx_* through one register
// stage, standing in for the optical link. A bunch crossing is every 8 clocks,
// and the ten serial e-links are compared bit by bit with the GBT frame.
// Every ASIC gets one event per crossing, with sequential BXIDs, in three runs:
//   1. ZS: mostly empty or header-only events, some with a few hits, some
//      with more hits than the threshold; a burst of large events on a
//      two-port ASIC fills its buffer so events are truncated for lack of
//      room; halfway through, the threshold is tightened from 63 to 30;
//   2. NZS: a few 816-bit packets per ASIC;
//   3. synch: synch packets only.
// Each decoded header, hit, ADC value and NZS parameter block is compared
// with what was sent, per ASIC and in order. An event with at most threshold
// hits may arrive truncated only if its formatter reported a buffer-full
// truncation. The testbench counts how often each mechanism happened (header
// only, normal, threshold truncation, buffer-full truncation, idle insertion
// and removal, NZS, synch, threshold change, mode switch) and fails any that
// never did; BXID, format and synch errors and overflow must stay at zero.
module tb_ut_link_top;
  import ut_pkg::*;
  import ut_tb_pkg::*;

  localparam int NASIC = 4;
  localparam int GBT_W = 80;
  localparam int BX_PERIOD = 8;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic          bx_stb = 0;
  ut_mode_e      cfg_mode = MODE_ZS;
  logic [5:0]    cfg_trunc_thr = 6'd63;
  logic          ev_valid [NASIC];
  logic          ev_ready [NASIC];
  ut_event_t     ev [NASIC];
  ut_nzs_info_t  nzs_info [NASIC];
  logic          smp_valid [NASIC];
  logic          smp_ready [NASIC];
  ut_sample_t    smp [NASIC];
  localparam int NLINKS = 10;
  logic          elink [NLINKS];
  logic [GBT_W-1:0] gbt_tx_frame, gbt_rx_frame = '0;
  logic          gbt_tx_valid, gbt_rx_valid = 0;
  logic          hdr_valid [NASIC], hit_valid [NASIC], info_valid [NASIC];
  ut_header_t    hdr [NASIC];
  ut_sample_t    hit [NASIC];
  ut_nzs_info_t  info [NASIC];
  logic          stat_trunc [NASIC], stat_trunc_full [NASIC];
  logic          stat_tx_idle [NASIC], stat_rx_idle [NASIC];
  logic          bxid_err [NASIC], fmt_err [NASIC], sync_err [NASIC], overflow [NASIC];

  ut_link_top dut (.*);

  // optical link stand-in
  always_ff @(posedge clk) begin
    gbt_rx_frame <= gbt_tx_frame;
    gbt_rx_valid <= gbt_tx_valid;
  end

  int checks = 0, failures = 0;
  int bx_count = 0;

  // each serial e-link must carry, MSB first in the 8 clocks after a frame,
  // the byte the concentrator placed for it in the GBT frame
  int n_elink_bytes = 0, n_elink_bad = 0;
  initial begin
    logic [GBT_W-1:0] f;
    logic [7:0]       got [NLINKS];
    @(posedge rst_n);
    forever begin
      @(posedge clk);
      if (gbt_tx_valid) begin
        f = gbt_tx_frame;
        for (int b = 0; b < 8; b++) begin
          @(negedge clk);
          for (int l = 0; l < NLINKS; l++) got[l] = {got[l][6:0], elink[l]};
          if (b < 7) @(posedge clk);
        end
        for (int l = 0; l < NLINKS; l++) begin
          n_elink_bytes++;
          if (got[l] != f[GBT_W - 1 - 8 * l -: 8]) n_elink_bad++;
        end
      end
    end
  end
  bit stop_bx = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // bunch crossings
  initial begin
    @(posedge rst_n);
    forever begin
      repeat (BX_PERIOD - 1) @(negedge clk);
      @(negedge clk) bx_stb = 1;
      bx_count++;
      @(negedge clk) bx_stb = 0;
    end
  end

  typedef struct {
    ut_mode_e   mode;
    logic [3:0] bxid;
    bit         nodata;
    int         nhits;
    int         thr;
  } sent_t;

  // mechanism counters, summed over ASICs
  int m_hdr_only = 0, m_normal = 0, m_trunc_thr = 0, m_trunc_full = 0;
  int m_nzs = 0, m_sync = 0, m_tx_idle = 0, m_rx_idle = 0;
  int n_full_reported = 0, n_errors = 0;
  int phase = 0;            // 0 ZS, 1 NZS, 2 synch
  int busy [NASIC];         // events sent but not yet decoded

  for (genvar a = 0; a < NASIC; a++) begin : g_a
    sent_t        sent[$];
    ut_sample_t   exp_smp[$];
    ut_nzs_info_t exp_inf[$];
    int           hits_left = 0;

    initial begin
      ev_valid[a]  = 0;
      smp_valid[a] = 0;
      ev[a]        = '0;
      smp[a]       = '0;
      nzs_info[a]  = '0;
      busy[a]      = 0;
    end

    // checker
    always @(posedge clk) if (rst_n) begin
      if (stat_tx_idle[a]) m_tx_idle++;
      if (stat_rx_idle[a]) m_rx_idle++;
      if (stat_trunc_full[a]) n_full_reported++;
      if (bxid_err[a] || fmt_err[a] || sync_err[a] || overflow[a]) n_errors++;
      if (hdr_valid[a]) begin
        sent_t s;
        if (sent.size() == 0) begin
          check(0, $sformatf("ASIC %0d: header without an event", a));
        end else begin
          s = sent.pop_front();
          busy[a]--;
          if (s.mode == MODE_SYNC) begin
            check(hdr[a].kind == PKT_SYNC, $sformatf("ASIC %0d: synch packet expected", a));
            m_sync++;
          end else if (s.mode == MODE_NZS) begin
            check(hdr[a].kind == PKT_NZS && hdr[a].bxid == s.bxid,
                  $sformatf("ASIC %0d: NZS header expected", a));
            m_nzs++;
            hits_left = 128;
          end else begin
            check(hdr[a].bxid == s.bxid, $sformatf("ASIC %0d: BXID %0d, expected %0d", a, hdr[a].bxid, s.bxid));
            if (s.nodata || s.nhits == 0) begin
              check(hdr[a].kind == PKT_HEADER_ONLY, $sformatf("ASIC %0d: header-only expected", a));
              m_hdr_only++;
            end else if (s.nhits > s.thr) begin
              check(hdr[a].kind == PKT_TRUNC && hdr[a].length == 6'(s.nhits / 4),
                    $sformatf("ASIC %0d: truncated packet expected", a));
              m_trunc_thr++;
            end else if (hdr[a].kind == PKT_TRUNC) begin
              check(hdr[a].length == 6'(s.nhits / 4), $sformatf("ASIC %0d: truncated length", a));
              m_trunc_full++;
              for (int i = 0; i < s.nhits; i++) void'(exp_smp.pop_front());
            end else begin
              check(hdr[a].kind == PKT_NORMAL && hdr[a].length == 6'(s.nhits),
                    $sformatf("ASIC %0d: normal packet of %0d hits expected", a, s.nhits));
              m_normal++;
            end
          end
        end
      end
      if (hit_valid[a]) begin
        ut_sample_t e;
        e = exp_smp.pop_front();
        check(hit[a] == e, $sformatf("ASIC %0d: hit %h, expected %h", a, hit[a], e));
      end
      if (info_valid[a]) begin
        check(exp_inf.size() > 0 && info[a] == exp_inf[0], $sformatf("ASIC %0d: NZS parameters", a));
        void'(exp_inf.pop_front());
      end
    end

    // driver: one event per bunch crossing, in order
    task automatic send_event(input ut_mode_e mode, input logic [3:0] bxid, input bit nodata,
                              input int nhits, input ut_nzs_info_t inf, input ut_sample_t s[$]);
      sent_t rec;
      @(negedge clk);
      ev_valid[a] = 1;
      ev[a] = '{bxid: bxid, nodata: nodata, nhits: 8'(s.size())};
      nzs_info[a] = inf;
      @(posedge clk);
      while (!ev_ready[a]) @(posedge clk);
      // accepted: record what the decoder should see, with the threshold now in force
      rec = '{mode: mode, bxid: bxid, nodata: nodata, nhits: nhits, thr: int'(cfg_trunc_thr)};
      sent.push_back(rec);
      busy[a]++;
      if (mode == MODE_NZS) begin
        exp_inf.push_back(inf);
        foreach (s[i]) exp_smp.push_back('{chan: 7'(i), adc: s[i].adc});
      end else if (mode == MODE_ZS && !nodata && nhits > 0 && nhits <= rec.thr) begin
        foreach (s[i]) exp_smp.push_back('{chan: s[i].chan, adc: {1'b0, s[i].adc[4:0]}});
      end
      @(negedge clk);
      ev_valid[a] = 0;
      foreach (s[i]) begin
        smp_valid[a] = 1;
        smp[a] = s[i];
        @(posedge clk);
        while (!smp_ready[a]) @(posedge clk);
        @(negedge clk);
      end
      smp_valid[a] = 0;
    endtask
  end

  // per-ASIC stimulus of one run; waits for a crossing before each event
  task automatic run_asic(input int a, input ut_mode_e mode, input int nev, input int first_bx);
    for (int e = 0; e < nev; e++) begin
      int         kind, nh, seen;
      bit         nd;
      ut_sample_t s[$];
      ut_nzs_info_t inf;
      seen = bx_count;
      while (bx_count == seen) @(negedge clk);
      s.delete();
      nd = 0;
      nh = 0;
      inf = '0;
      if (mode == MODE_NZS) begin
        inf = ut_nzs_info_t'({$urandom, $urandom});
        inf.num_asics = 4'd1;
        for (int i = 0; i < 128; i++) s.push_back('{chan: 7'(i), adc: 6'($urandom)});
      end else if (mode == MODE_ZS) begin
        kind = $urandom_range(0, 99);
        if (a == 1 && e >= 300 && e < 310) nh = $urandom_range(40, 60);   // burst
        else if (kind < 45) nd = 1;
        else if (kind < 88) nh = 0;
        else if (kind < 99) nh = $urandom_range(1, 5);
        else nh = $urandom_range(64, 128);
        if (kind == 98 && a == 0) nh = $urandom_range(31, 50);  // above a tightened threshold
        for (int i = 0; i < nh; i++) s.push_back('{chan: 7'($urandom), adc: 6'($urandom)});
      end
      case (a)
        0: g_a[0].send_event(mode, 4'(first_bx + e), nd, nh, inf, s);
        1: g_a[1].send_event(mode, 4'(first_bx + e), nd, nh, inf, s);
        2: g_a[2].send_event(mode, 4'(first_bx + e), nd, nh, inf, s);
        default: g_a[3].send_event(mode, 4'(first_bx + e), nd, nh, inf, s);
      endcase
    end
  endtask

  task automatic run_all(input ut_mode_e mode, input int nev, input int first_bx);
    fork
      run_asic(0, mode, nev, first_bx);
      run_asic(1, mode, nev, first_bx);
      run_asic(2, mode, nev, first_bx);
      run_asic(3, mode, nev, first_bx);
    join
  endtask

  task automatic drain();
    int guard = 0;
    while ((busy[0] + busy[1] + busy[2] + busy[3]) != 0 && guard < 200000) begin
      @(posedge clk);
      guard++;
    end
    repeat (20 * BX_PERIOD) @(posedge clk);
  endtask

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_mode_switch = 0, n_thr_change = 0;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;

    // run 1: ZS, the threshold tightened halfway
    fork
      run_all(MODE_ZS, 800, 0);
      begin
        while (bx_count < 450) @(negedge clk);
        cfg_trunc_thr = 6'd30;
        n_thr_change++;
      end
    join
    drain();

    // run 2: NZS
    cfg_mode = MODE_NZS;
    n_mode_switch++;
    run_all(MODE_NZS, 3, 0);
    drain();

    // run 3: synch
    cfg_mode = MODE_SYNC;
    n_mode_switch++;
    run_all(MODE_SYNC, 10, 3);
    drain();

    check(g_a[0].sent.size() == 0 && g_a[1].sent.size() == 0 &&
          g_a[2].sent.size() == 0 && g_a[3].sent.size() == 0, "every event decoded");
    check(g_a[0].exp_smp.size() == 0 && g_a[1].exp_smp.size() == 0 &&
          g_a[2].exp_smp.size() == 0 && g_a[3].exp_smp.size() == 0, "every hit decoded");
    check(m_trunc_full == n_full_reported,
          $sformatf("%0d buffer-full truncations decoded, %0d reported", m_trunc_full, n_full_reported));
    check(n_errors == 0, $sformatf("%0d error flags raised", n_errors));
    check(n_elink_bytes > 0 && n_elink_bad == 0,
          $sformatf("%0d of %0d e-link bytes differ from the GBT frame", n_elink_bad, n_elink_bytes));

    $display("mechanisms: header-only=%0d normal=%0d trunc(threshold)=%0d trunc(buffer full)=%0d",
             m_hdr_only, m_normal, m_trunc_thr, m_trunc_full);
    $display("            NZS=%0d synch=%0d tx idle frames=%0d rx idle packets=%0d threshold changes=%0d mode switches=%0d",
             m_nzs, m_sync, m_tx_idle, m_rx_idle, n_thr_change, n_mode_switch);
    check(m_hdr_only > 0, "header-only events happened");
    check(m_normal > 0, "normal events happened");
    check(m_trunc_thr > 0, "threshold truncations happened");
    check(m_trunc_full > 0, "buffer-full truncations happened");
    check(m_nzs > 0, "NZS packets happened");
    check(m_sync > 0, "synch packets happened");
    check(m_tx_idle > 0 && m_rx_idle > 0, "idle packets inserted and removed");
    check(n_thr_change > 0 && n_mode_switch == 2, "threshold change and mode switches happened");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
