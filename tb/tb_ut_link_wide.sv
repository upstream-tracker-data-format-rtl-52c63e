// Wide-link configuration of ut_link_top: four ASICs on 5+4+3+2 e-ports fill
// the 14 e-links of a 112-bit GBT frame (the upper limit of e-ports per ASIC
// and of e-links per frame), at the busier event mix of the inner region.
//
// Every ASIC gets one event per bunch crossing for 4000 crossings: 60%
// header-only and 40% with 1 to MAXH[a] hits, plus rare events above 63 hits.
// These numbers are this testbench's own choice: they load every ASIC to
// about 85% of its e-port capacity, and the five-e-port ASIC keeps its
// decoder at the fastest sub-frame rate (one 40-bit sub-frame every 8
// clocks). It checks that every event and hit is decoded, that no event is
// truncated for lack of buffer space, that no error flag rises and that the
// buffers drain, and prints the bits per crossing and peak buffer fill per
// ASIC.
module tb_ut_link_wide;
  import ut_pkg::*;

  localparam int NASIC  = 4;
  localparam int GBT_W  = 112;
  localparam int NBX    = 4000;
  localparam int NLINKS = 14;
  localparam int CAP [NASIC] = '{40, 32, 24, 16};  // bits per crossing
  localparam int MAXH [NASIC] = '{9, 7, 4, 1};  // most hits per event

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

  ut_link_top #(.NPORTS('{5, 4, 3, 2}), .GBT_W(112)) dut (.*);

  always_ff @(posedge clk) begin
    gbt_rx_frame <= gbt_tx_frame;
    gbt_rx_valid <= gbt_tx_valid;
  end

  int checks = 0, failures = 0;
  int bx_count = 0, drivers_done = 0;
  int sent_ev [NASIC], sent_hits [NASIC], sent_bits [NASIC];
  int got_ev [NASIC], got_hits [NASIC], n_full [NASIC], n_err [NASIC];
  int peak_used [NASIC];
  logic [15:0] free_now [NASIC];

  assign free_now[0] = dut.g_asic[0].buf_free;
  assign free_now[1] = dut.g_asic[1].buf_free;
  assign free_now[2] = dut.g_asic[2].buf_free;
  assign free_now[3] = dut.g_asic[3].buf_free;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    @(posedge rst_n);
    forever begin
      repeat (7) @(negedge clk);
      @(negedge clk) bx_stb = 1;
      bx_count++;
      @(negedge clk) bx_stb = 0;
    end
  end

  for (genvar a = 0; a < NASIC; a++) begin : g_a
    initial begin
      ev_valid[a] = 0; smp_valid[a] = 0; ev[a] = '0; smp[a] = '0; nzs_info[a] = '0;
      sent_ev[a] = 0; sent_hits[a] = 0; sent_bits[a] = 0;
      got_ev[a] = 0; got_hits[a] = 0; n_full[a] = 0; n_err[a] = 0; peak_used[a] = 0;
    end

    always @(posedge clk) if (rst_n) begin
      if (hdr_valid[a]) begin
        got_ev[a]++;
        if (hdr[a].kind == PKT_NORMAL) sent_hits[a] += int'(hdr[a].length);
      end
      if (hit_valid[a]) got_hits[a]++;
      if (stat_trunc_full[a]) n_full[a]++;
      if (bxid_err[a] || fmt_err[a] || overflow[a]) n_err[a]++;
      if (2048 - int'(free_now[a]) > peak_used[a]) peak_used[a] = 2048 - int'(free_now[a]);
    end

    initial begin
      @(posedge rst_n);
      for (int e = 0; e < NBX; e++) begin
        int nh, r;
        bit nd;
        while (bx_count <= e) @(negedge clk);   // one event per crossing, queued if late
        r  = $urandom_range(0, 999999);
        nd = 0;
        nh = 0;
        if (r < 300000) nd = 1;
        else if (r < 600000) nh = 0;
        else if (r < 999000) nh = $urandom_range(1, MAXH[a]);
        else nh = $urandom_range(64, 128);
        sent_ev[a]++;
        if (nd || nh == 0) sent_bits[a] += 6;
        else if (nh > 63) sent_bits[a] += 12;
        else sent_bits[a] += 12 + 12 * nh;
        @(negedge clk);
        ev_valid[a] = 1;
        ev[a] = '{bxid: 4'(e), nodata: nd, nhits: 8'(nh)};
        @(posedge clk);
        while (!ev_ready[a]) @(posedge clk);
        @(negedge clk);
        ev_valid[a] = 0;
        for (int i = 0; i < nh; i++) begin
          smp_valid[a] = 1;
          smp[a] = '{chan: 7'($urandom), adc: 6'($urandom)};
          @(posedge clk);
          while (!smp_ready[a]) @(posedge clk);
          @(negedge clk);
        end
        smp_valid[a] = 0;
      end
      drivers_done++;
    end
  end

  initial begin : watchdog
    repeat (NBX * 8 + 40000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    while (bx_count < NBX + 200 || drivers_done < NASIC) @(posedge clk);
    // let any backlog drain
    for (int t = 0; t < 4000 && !(free_now[0] == 16'd2048 && free_now[1] == 16'd2048 &&
                                  free_now[2] == 16'd2048 && free_now[3] == 16'd2048); t++)
      @(posedge clk);
    repeat (200) @(posedge clk);
    for (int a = 0; a < NASIC; a++) begin
      $display("ASIC %0d: %0d events, %.2f bits per crossing against %0d, peak buffer fill %0d of 2048 bits",
               a, sent_ev[a], real'(sent_bits[a]) / NBX, CAP[a], peak_used[a]);
      check(got_ev[a] == sent_ev[a], $sformatf("ASIC %0d: %0d of %0d events decoded", a, got_ev[a], sent_ev[a]));
      check(got_hits[a] == sent_hits[a] && got_hits[a] > 0, $sformatf("ASIC %0d: %0d hits decoded, headers announced %0d", a, got_hits[a], sent_hits[a]));
      check(n_full[a] == 0, $sformatf("ASIC %0d: %0d buffer-full truncations", a, n_full[a]));
      check(n_err[a] == 0, $sformatf("ASIC %0d: %0d error flags", a, n_err[a]));
      check(free_now[a] == 16'd2048, $sformatf("ASIC %0d: buffer not drained", a));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
