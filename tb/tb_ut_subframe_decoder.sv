// Self-checking testbench of ut_subframe_decoder.
//
// The reference model builds a sub-frame stream of ZS packets (header-only,
// normal, truncated), NZS packets and finally synch packets, with random runs
// of idle packets between them, one deliberate BXID jump, one illegal 6-bit
// prefix and one corrupted synch pattern. The stream is cut into 32-bit
// sub-frames (four e-ports) that arrive every 6 to 9 clocks, the fastest rate
// the decoder is specified to sustain at this width. The decoded headers,
// hits, NZS parameters and ADC values are compared with the expected ones,
// as are the counts of idle packets, BXID errors, format errors and synch
// errors; the accumulator must never overflow.
module tb_ut_subframe_decoder;
  import ut_pkg::*;
  import ut_tb_pkg::*;

  localparam int unsigned NPORTS = 4;
  localparam int unsigned FW     = 8 * NPORTS;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  ut_mode_e     cfg_mode = MODE_ZS;
  logic         in_valid = 0;
  logic [FW-1:0] in_frame = '0;
  logic         hdr_valid, hit_valid, info_valid;
  ut_header_t   hdr;
  ut_sample_t   hit;
  ut_nzs_info_t info;
  logic         stat_idle, bxid_err, fmt_err, sync_err, overflow;

  ut_subframe_decoder #(.NPORTS(NPORTS)) dut (.*);

  int checks = 0, failures = 0;
  bitq_t      stream;
  ut_header_t exp_hdr[$], got_hdr[$];
  ut_sample_t exp_hit[$], got_hit[$];
  ut_nzs_info_t exp_info[$], got_info[$];
  int exp_idle = 0, got_idle = 0, got_bxe = 0, got_fmt = 0, got_syn = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (hdr_valid)  got_hdr.push_back(hdr);
    if (hit_valid)  got_hit.push_back(hit);
    if (info_valid) got_info.push_back(info);
    if (stat_idle)  got_idle++;
    if (bxid_err)   got_bxe++;
    if (fmt_err)    got_fmt++;
    if (sync_err)   got_syn++;
  end

  function automatic void add_idles(int n);
    for (int i = 0; i < n; i++) push_bits(stream, 32'b000011, 6);
    exp_idle += n;
  endfunction

  // pad with idles to a whole number of sub-frames
  function automatic void pad();
    while (stream.size() % FW != 0) add_idles(1);
  endfunction

  task automatic send_stream();
    while (stream.size() >= FW) begin
      @(negedge clk);
      in_valid = 1;
      for (int i = 0; i < FW; i++) in_frame[FW - 1 - i] = stream.pop_front();
      @(negedge clk);
      in_valid = 0;
      repeat ($urandom_range(4, 7)) @(negedge clk);
    end
  endtask

  initial begin : watchdog
    repeat (300000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [6:0] ch[$];
    logic [4:0] ad[$];
    logic [5:0] raw[$];
    logic [3:0] bx = 4'd3;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // ---- ZS and NZS packets ----
    for (int e = 0; e < 250; e++) begin
      int kind, nh;
      add_idles($urandom_range(0, 3));
      if (e == 100) bx = bx + 4'd5;          // deliberate BXID jump
      if (e == 150) push_bits(stream, {4'd9, 2'b11}, 6);  // illegal prefix
      kind = $urandom_range(0, 9);
      ch.delete(); ad.delete(); raw.delete();
      if (kind <= 3) begin
        stream = {stream, zs_packet(bx, 1'b1, 0, 63, 1'b0, ch, ad)};
        exp_hdr.push_back('{kind: PKT_HEADER_ONLY, bxid: bx, length: '0});
      end else if (kind <= 7) begin
        nh = $urandom_range(1, (kind == 7) ? 63 : 8);
        for (int i = 0; i < nh; i++) begin
          ch.push_back(7'($urandom)); ad.push_back(5'($urandom));
          exp_hit.push_back('{chan: ch[i], adc: {1'b0, ad[i]}});
        end
        stream = {stream, zs_packet(bx, 1'b0, nh, 63, 1'b0, ch, ad)};
        exp_hdr.push_back('{kind: PKT_NORMAL, bxid: bx, length: 6'(nh)});
      end else if (kind == 8) begin
        nh = $urandom_range(64, 128);
        stream = {stream, zs_packet(bx, 1'b0, nh, 63, 1'b0, ch, ad)};
        exp_hdr.push_back('{kind: PKT_TRUNC, bxid: bx, length: 6'(nh / 4)});
      end else begin
        ut_nzs_info_t inf;
        inf = ut_nzs_info_t'({$urandom, $urandom});
        for (int i = 0; i < 128; i++) begin
          raw.push_back(6'($urandom));
          exp_hit.push_back('{chan: 7'(i), adc: raw[i]});
        end
        stream = {stream, nzs_packet(bx, inf, raw)};
        exp_hdr.push_back('{kind: PKT_NZS, bxid: bx, length: 6'h3F});
        exp_info.push_back(inf);
      end
      bx = bx + 1'b1;
      send_stream();
    end
    pad();
    send_stream();
    repeat (200) @(posedge clk);

    // ---- synch packets ----
    cfg_mode = MODE_SYNC;
    for (int e = 0; e < 20; e++) begin
      add_idles($urandom_range(0, 2));
      if (e == 7) push_bits(stream, 32'hA5D, 12);   // corrupted pattern
      else        stream = {stream, sync_packet()};
      exp_hdr.push_back('{kind: PKT_SYNC, bxid: '0, length: '0});
    end
    pad();
    send_stream();
    repeat (200) @(posedge clk);

    // ---- compare ----
    check(got_hdr.size() == exp_hdr.size(), $sformatf("%0d headers, expected %0d", got_hdr.size(), exp_hdr.size()));
    begin
      int bad = 0;
      foreach (exp_hdr[i]) if (i >= got_hdr.size() || got_hdr[i] != exp_hdr[i]) bad++;
      check(bad == 0, $sformatf("%0d headers differ", bad));
      bad = 0;
      foreach (exp_hit[i]) if (i >= got_hit.size() || got_hit[i] != exp_hit[i]) bad++;
      check(got_hit.size() == exp_hit.size() && bad == 0,
            $sformatf("hits: %0d got, %0d expected, %0d differ", got_hit.size(), exp_hit.size(), bad));
      check(got_info == exp_info, "NZS parameter blocks differ");
    end
    check(exp_info.size() > 0, "NZS packets exercised");
    check(got_idle == exp_idle, $sformatf("%0d idle packets dropped, expected %0d", got_idle, exp_idle));
    check(got_bxe == 1, $sformatf("%0d BXID errors, expected 1", got_bxe));
    check(got_fmt == 1, $sformatf("%0d format errors, expected 1", got_fmt));
    check(got_syn == 1, $sformatf("%0d synch errors, expected 1", got_syn));
    check(!overflow, "accumulator overflow");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
