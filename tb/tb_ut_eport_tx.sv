// Self-checking testbench of ut_eport_tx.
//
// Real ZS packets from the reference model are written in items of random
// size (1..16 bits) with random gaps, so bunch crossings often fall in the
// middle of a packet that is still being written. The testbench concatenates
// the e-port bytes of every frame (e-port 0 first) and parses the result:
// it must be the written packets, in order and intact, separated only by
// whole 6-bit idle packets. It also checks one frame of 8*NPORTS bits per
// bx_stb, one clock later, that idle packets are inserted when data runs
// short, and that the buffer is empty and buf_free back at DEPTH at the end.
module tb_ut_eport_tx;
  import ut_pkg::*;
  import ut_tb_pkg::*;

  localparam int unsigned NPORTS = 4;
  localparam int unsigned DEPTH  = 2048;
  localparam int unsigned FW     = 8 * NPORTS;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        bx_stb = 0;
  logic        wr_valid = 0, wr_commit = 0;
  logic [15:0] wr_data = '0;
  logic [4:0]  wr_len = '0;
  logic [15:0] buf_free;
  logic [NPORTS-1:0][7:0] eport;
  logic        frame_valid, stat_idle;

  ut_eport_tx #(.NPORTS(NPORTS), .DEPTH(DEPTH)) dut (.*);

  int checks = 0, failures = 0;
  bitq_t stream;
  bitq_t pkts[$];
  int    n_frames = 0, n_strobes = 0, n_idle_frames = 0;
  logic  stb_d = 0;
  bit    writing_done = 0, stop_stb = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic bit is_idle(ref bitq_t q, input int pos);
    for (int i = 0; i < 6; i++) if (q[pos + i] != IDLE_PACKET[5 - i]) return 0;
    return 1;
  endfunction

  // collect frames; frame_valid must follow bx_stb by one clock
  always @(posedge clk) begin
    stb_d <= bx_stb;
    if (rst_n) begin
      if (bx_stb) n_strobes++;
      if (buf_free > DEPTH) begin
        checks++; failures++;
        $display("FAIL: buf_free %0d above DEPTH", buf_free);
      end
      if (frame_valid != stb_d) begin
        checks++; failures++;
        $display("FAIL: frame_valid not one clock after bx_stb");
      end
      if (frame_valid) begin
        n_frames++;
        if (stat_idle) n_idle_frames++;
        for (int p = 0; p < NPORTS; p++)
          for (int b = 7; b >= 0; b--) stream.push_back(eport[p][b]);
      end
    end
  end

  // bunch crossings every 1..12 clocks
  initial begin
    @(posedge rst_n);
    while (!stop_stb) begin
      repeat ($urandom_range(0, 11)) @(negedge clk);
      @(negedge clk) bx_stb = 1;
      @(negedge clk) bx_stb = 0;
    end
  end

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [6:0] ch[$];
    logic [4:0] ad[$];
    repeat (3) @(posedge clk);
    rst_n = 1;
    check(buf_free == DEPTH, "buf_free after reset");

    for (int e = 0; e < 400; e++) begin
      bitq_t p;
      int nh, pos;
      nh = ($urandom_range(0, 3) == 0) ? 0 : $urandom_range(1, (e % 100 < 20) ? 63 : 6);
      ch.delete(); ad.delete();
      for (int i = 0; i < nh; i++) begin
        ch.push_back(7'($urandom));
        ad.push_back(5'($urandom));
      end
      p = zs_packet(4'(e), 1'b0, nh, 63, 1'b0, ch, ad);
      pkts.push_back(p);
      // wait for room, as the formatter would
      @(negedge clk);
      while (int'(buf_free) < p.size()) @(negedge clk);
      pos = 0;
      while (pos < p.size()) begin
        int n;
        n = $urandom_range(1, 16);
        if (n > p.size() - pos) n = p.size() - pos;
        wr_valid  = 1;
        wr_len    = 5'(n);
        wr_data   = '0;
        for (int i = 0; i < n; i++) wr_data[n - 1 - i] = p[pos + i];
        pos += n;
        wr_commit = (pos == p.size());
        @(negedge clk);
        wr_valid  = 0;
        wr_commit = 0;
        repeat ($urandom_range(0, 2)) @(negedge clk);
      end
      // occasionally pause so the framer runs dry
      if ($urandom_range(0, 9) == 0) repeat (40) @(negedge clk);
    end
    writing_done = 1;
    // drain
    repeat (3000) @(posedge clk);
    stop_stb = 1;
    repeat (30) @(posedge clk);
    check(buf_free == DEPTH, $sformatf("buf_free %0d at the end", buf_free));

    // ---- parse the received stream ----
    begin
      int pos = 0, idles = 0, bad_pkts = 0;
      bit tail_ok = 1;
      check(n_frames == n_strobes, "one frame per bunch crossing");
      check(stream.size() == n_frames * FW, "8 bits per e-port per frame");
      foreach (pkts[k]) begin
        bit ok = 1;
        while (pos + 6 <= stream.size() && is_idle(stream, pos)) begin
          pos += 6; idles++;
        end
        if (pos + pkts[k].size() > stream.size()) ok = 0;
        else for (int i = 0; i < pkts[k].size(); i++) if (stream[pos + i] != pkts[k][i]) ok = 0;
        if (!ok) bad_pkts++;
        pos += pkts[k].size();
      end
      for (int i = pos; i < stream.size(); i++)
        if (stream[i] != IDLE_PACKET[5 - ((i - pos) % 6)]) tail_ok = 0;
      check(bad_pkts == 0, $sformatf("%0d of %0d packets corrupted or out of order", bad_pkts, pkts.size()));
      check(tail_ok, "only idle packets after the last packet");
      check(idles > 0 && n_idle_frames > 0, "idle packets were inserted");
      $display("frames=%0d idle packets=%0d frames with idle=%0d", n_frames, idles, n_idle_frames);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
