// Self-checking testbench of ut_salt_formatter.
//
// Random events in ZS mode (header-only, normal, truncated by the threshold
// and truncated because the offered buffer space is too small), then NZS and
// synch events. Every bit the formatter writes is collected, with the packet
// boundaries (wr_commit), and compared with the reference packets of
// ut_tb_pkg. It also checks that a normal event of N hits is committed N
// cycles after it is accepted, that an NZS packet takes 1+5+128 cycles, and
// that no event is accepted while even a short packet would not fit.
module tb_ut_salt_formatter;
  import ut_pkg::*;
  import ut_tb_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  ut_mode_e      cfg_mode = MODE_ZS;
  logic [5:0]    cfg_trunc_thr = 6'd63;
  logic          ev_valid = 0, ev_ready;
  ut_event_t     ev = '0;
  ut_nzs_info_t  nzs_info = '0;
  logic          smp_valid = 0, smp_ready;
  ut_sample_t    smp = '0;
  logic [15:0]   buf_free = 16'd2048;
  logic          wr_valid, wr_commit;
  logic [15:0]   wr_data;
  logic [4:0]    wr_len;
  logic          stat_trunc, stat_trunc_full;

  ut_salt_formatter dut (.*);

  int checks = 0, failures = 0;
  bitq_t got, exp;
  int    got_ends[$], exp_ends[$];
  int    n_trunc = 0, n_trunc_full = 0;
  int    cyc = 0, last_commit_cyc = 0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && wr_valid) begin
      for (int i = int'(wr_len) - 1; i >= 0; i--) got.push_back(wr_data[i]);
      if (wr_commit) begin
        got_ends.push_back(got.size());
        last_commit_cyc = cyc;
      end
    end
    if (rst_n && stat_trunc) n_trunc++;
    if (rst_n && stat_trunc_full) n_trunc_full++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Offer one event, wait for acceptance, then stream its samples.
  task automatic send(input logic [3:0] bxid, input bit nodata, input int nhits,
                      input logic [6:0] ch[$], input logic [5:0] ad[$],
                      output int accept_cyc);
    @(negedge clk);
    ev_valid = 1;
    ev = '{bxid: bxid, nodata: nodata, nhits: 8'(nhits)};
    @(posedge clk);
    while (!ev_ready) @(posedge clk);
    accept_cyc = cyc;
    @(negedge clk);
    ev_valid = 0;
    for (int i = 0; i < ch.size(); i++) begin
      smp_valid = 1;
      smp = '{chan: ch[i], adc: ad[i]};
      @(posedge clk);
      while (!smp_ready) @(posedge clk);
      @(negedge clk);
    end
    smp_valid = 0;
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int acc;
    logic [6:0] ch[$];
    logic [5:0] ad[$];
    logic [4:0] ad5[$];
    bit full;
    int exp_trunc = 0, exp_full = 0;

    repeat (3) @(posedge clk);
    rst_n = 1;

    // ---- ZS events ----
    for (int e = 0; e < 300; e++) begin
      int nh, kind;
      bit nd;
      kind = $urandom_range(0, 9);
      nd   = (kind == 0);
      nh   = (kind <= 2) ? 0 : (kind == 3) ? $urandom_range(64, 128) : $urandom_range(1, 63);
      if (kind == 9) nh = $urandom_range(1, 10) + 30;
      cfg_trunc_thr = (e >= 150) ? 6'd20 : 6'd63;  // tightened threshold later
      full = (kind == 8) && nh > 0 && !nd;
      buf_free = full ? 16'(12 + 12 * nh - 1) : 16'd2048;
      ch.delete(); ad.delete(); ad5.delete();
      for (int i = 0; i < nh; i++) begin
        ch.push_back(7'($urandom));
        ad5.push_back(5'($urandom));
        ad.push_back({1'($urandom), ad5[i]});
      end
      exp = {exp, zs_packet(4'(e), nd, nh, int'(cfg_trunc_thr), full, ch, ad5)};
      exp_ends.push_back(exp.size());
      if (!nd && nh > 0 && (nh > int'(cfg_trunc_thr) || full)) begin
        exp_trunc++;
        if (nh <= int'(cfg_trunc_thr)) exp_full++;
      end
      send(4'(e), nd, nh, ch, ad, acc);
      repeat (2) @(posedge clk);
      if (!nd && nh > 0 && nh <= int'(cfg_trunc_thr) && !full)
        check(last_commit_cyc - acc == nh, $sformatf("event %0d: %0d hits committed after %0d cycles",
                                                      e, nh, last_commit_cyc - acc));
    end

    // ---- no room at all: the event must wait ----
    @(negedge clk);
    buf_free = 16'd5;
    ev_valid = 1;
    ev = '{bxid: 4'd7, nodata: 1'b1, nhits: 8'd0};
    repeat (5) begin
      @(posedge clk);
      check(!ev_ready, "event accepted with only 5 free bits");
    end
    @(negedge clk);
    buf_free = 16'd6;
    ev_valid = 0;
    ch.delete(); ad.delete(); ad5.delete();
    exp = {exp, zs_packet(4'd7, 1'b1, 0, 63, 1'b0, ch, ad5)};
    exp_ends.push_back(exp.size());
    send(4'd7, 1'b1, 0, ch, ad, acc);
    buf_free = 16'd2048;

    // ---- NZS events ----
    cfg_mode = MODE_NZS;
    for (int e = 0; e < 3; e++) begin
      ut_nzs_info_t inf;
      inf = ut_nzs_info_t'({$urandom, $urandom});
      nzs_info = inf;
      ch.delete(); ad.delete();
      for (int i = 0; i < 128; i++) begin
        ch.push_back(7'(i));
        ad.push_back(6'($urandom));
      end
      exp = {exp, nzs_packet(4'(e + 8), inf, ad)};
      exp_ends.push_back(exp.size());
      send(4'(e + 8), 1'b0, 0, ch, ad, acc);
      repeat (2) @(posedge clk);
      check(last_commit_cyc - acc == 5 + 128,
            $sformatf("NZS packet committed after %0d cycles", last_commit_cyc - acc));
    end

    // ---- synch events ----
    cfg_mode = MODE_SYNC;
    for (int e = 0; e < 4; e++) begin
      ch.delete(); ad.delete();
      exp = {exp, sync_packet()};
      exp_ends.push_back(exp.size());
      send(4'(e), 1'b0, 0, ch, ad, acc);
    end
    repeat (5) @(posedge clk);

    // ---- compare ----
    check(got.size() == exp.size(), $sformatf("stream length %0d, expected %0d", got.size(), exp.size()));
    begin
      int bad = 0;
      for (int i = 0; i < exp.size() && i < got.size(); i++) if (got[i] != exp[i]) bad++;
      check(bad == 0, $sformatf("%0d stream bits differ", bad));
    end
    check(got_ends == exp_ends, "packet boundaries differ");
    check(n_trunc == exp_trunc, $sformatf("truncations %0d, expected %0d", n_trunc, exp_trunc));
    check(n_trunc_full == exp_full, $sformatf("buffer-full truncations %0d, expected %0d", n_trunc_full, exp_full));
    check(exp_full > 0 && exp_trunc > exp_full, "both truncation causes exercised");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
