// SALT packet buffer and e-port framer.
//
// The formatter writes packets into a circular bit buffer, most significant
// bit first, up to 16 bits per clock. Once per bunch crossing (bx_stb) the
// framer takes the next 8*NPORTS bits of the stream and puts them on the
// ASIC's e-ports: e-port 0 carries the first 8 bits, e-port 1 the next 8 and
// so on, so all ports of one ASIC together carry one continuous stream, as if
// they were a single wide port. Only committed bits, that is bits of packets
// the formatter has finished, are sent. When fewer than 8*NPORTS committed
// bits are waiting, the rest of the frame is filled with 6-bit idle packets
// (000011). An idle packet may straddle two frames; the framer then completes
// it at the start of the next frame before any further packet data, so idle
// packets always sit between whole packets.
// 8 bits per e-port per crossing (320 Mbps at 40 MHz), the coherent use of
// several e-ports, MSB-first order and idle filling follow the format
// definition. The buffer size (DEPTH, 2048 bits) and the commit mechanism are
// this design's own choices.
//
// Interface: wr_* from ut_salt_formatter; buf_free is DEPTH minus all bits
// written and not yet sent (committed or not). eport[k] is e-port k's byte of
// the current frame, valid from the cycle after bx_stb until the next frame.
// frame_valid pulses for one cycle with each new frame; stat_idle pulses when
// the frame started at least one idle packet.
module ut_eport_tx
  import ut_pkg::*;
#(
  parameter int unsigned NPORTS = 4,     // e-ports of this ASIC, 1..5
  parameter int unsigned DEPTH  = 2048,  // packet buffer, bits (power of two)
  parameter int unsigned FREE_W = 16,
  localparam int unsigned FW    = EPORT_W * NPORTS,
  localparam int unsigned AW    = $clog2(DEPTH),
  localparam int unsigned PW    = AW + 1
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       bx_stb,

  input  logic                       wr_valid,
  input  logic [ITEM_W-1:0]          wr_data,
  input  logic [4:0]                 wr_len,
  input  logic                       wr_commit,
  output logic [FREE_W-1:0]          buf_free,

  output logic [NPORTS-1:0][EPORT_W-1:0] eport,
  output logic                       frame_valid,
  output logic                       stat_idle
);

  logic           mem [DEPTH];
  logic [PW-1:0]  wr_ptr_q, cm_ptr_q, rd_ptr_q;
  logic [2:0]     idle_ph_q, idle_ph_d;  // bits of an unfinished idle packet already sent
  logic [PW-1:0]  avail, taken, used;
  logic [FW-1:0]  frame_d;
  logic           started_idle;

  assign avail    = cm_ptr_q - rd_ptr_q;
  assign used     = wr_ptr_q - rd_ptr_q;
  assign buf_free = FREE_W'(DEPTH) - FREE_W'(used);

  // Assemble the next frame: finish an open idle packet, then committed data,
  // then as many idle packets as it takes.
  always_comb begin
    logic [2:0] ph;
    ph           = idle_ph_q;
    taken        = '0;
    started_idle = 1'b0;
    frame_d      = '0;
    for (int j = 0; j < FW; j++) begin
      if (ph != 3'd0) begin
        frame_d[FW-1-j] = IDLE_PACKET[3'(SHORT_HDR_W-1) - ph];
        ph = (ph == 3'(SHORT_HDR_W-1)) ? 3'd0 : ph + 3'd1;
      end else if (taken < avail) begin
        frame_d[FW-1-j] = mem[AW'(rd_ptr_q + taken)];
        taken = taken + 1'b1;
      end else begin
        frame_d[FW-1-j] = IDLE_PACKET[SHORT_HDR_W-1];
        ph           = 3'd1;
        started_idle = 1'b1;
      end
    end
    idle_ph_d = ph;
  end

  always_ff @(posedge clk) begin
    if (wr_valid) begin
      for (int i = 0; i < ITEM_W; i++) begin
        if (i < int'(wr_len)) mem[AW'(wr_ptr_q + PW'(i))] <= wr_data[int'(wr_len) - 1 - i];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr_q    <= '0;
      cm_ptr_q    <= '0;
      rd_ptr_q    <= '0;
      idle_ph_q   <= '0;
      eport       <= '0;
      frame_valid <= 1'b0;
      stat_idle   <= 1'b0;
    end else begin
      frame_valid <= bx_stb;
      stat_idle   <= bx_stb && started_idle;
      if (wr_valid) begin
        wr_ptr_q <= wr_ptr_q + PW'(wr_len);
        if (wr_commit) cm_ptr_q <= wr_ptr_q + PW'(wr_len);
      end
      if (bx_stb) begin
        for (int k = 0; k < int'(NPORTS); k++) eport[k] <= frame_d[FW - 1 - EPORT_W * k -: EPORT_W];
        rd_ptr_q  <= rd_ptr_q + taken;
        idle_ph_q <= idle_ph_d;
      end
    end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    wr_valid |-> FREE_W'(wr_len) <= buf_free);

  a_occupancy: assert property (@(posedge clk) disable iff (!rst_n)
    used <= PW'(DEPTH) && avail <= used);

  initial begin
    assert (NPORTS >= 1 && NPORTS <= 5) else $error("NPORTS must be 1..5");
    assert ((DEPTH & (DEPTH - 1)) == 0) else $error("DEPTH must be a power of two");
  end

endmodule
