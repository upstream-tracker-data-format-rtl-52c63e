// E-port serializer: one SALT e-link at 8 bits per bunch crossing.
//
// An e-port sends 8 bits per bunch crossing, 320 Mbps at the 40 MHz crossing
// rate, most significant bit first. This serializer loads the e-port's byte
// when the framer presents a new frame (load, one clock after bx_stb) and
// shifts it out on serial_out over the next 8 clocks, so the clock must run
// at the e-link bit rate, 8 clocks per crossing. The 8-bit width per crossing,
// the 320 Mbps rate and MSB-first order follow the e-link description; the
// load/shift structure is this design's own. The SLVS line driver is not
// modelled.
//
// Interface: load and data from ut_eport_tx (frame_valid and one eport byte);
// serial_out is the e-link bit of the current clock. Between loads it sends
// zeros once the byte is out. Timing: the MSB appears on serial_out in the
// clock after load, the LSB 7 clocks later.
module ut_eport_ser
  import ut_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               load,
  input  logic [EPORT_W-1:0] data,
  output logic               serial_out
);

  logic [EPORT_W-1:0] shreg_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    shreg_q <= '0;
    else if (load) shreg_q <= data;
    else           shreg_q <= shreg_q << 1;
  end

  assign serial_out = shreg_q[EPORT_W-1];

endmodule
