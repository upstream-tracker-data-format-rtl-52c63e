// Self-checking testbench of ut_eport_ser.
//
// Loads 500 random bytes, one every 8 clocks as at 320 Mbps with 40 MHz
// crossings, and checks that each byte appears on the serial line MSB first,
// one bit per clock, starting in the clock after the load. Then it leaves a
// gap and checks that the line goes to zero once the last byte is out.
module tb_ut_eport_ser;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic       load = 0;
  logic [7:0] data = '0;
  logic       serial_out;

  ut_eport_ser dut (.*);

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] b, got;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 500; n++) begin
      b = 8'($urandom);
      load = 1;
      data = b;
      @(negedge clk);
      load = 0;
      data = 8'($urandom);   // must be ignored while shifting
      got = '0;
      for (int i = 0; i < 8; i++) begin
        got = {got[6:0], serial_out};
        if (i < 7) @(negedge clk);
      end
      check(got == b, $sformatf("byte %0d: sent %02h, line carried %02h", n, b, got));
    end
    // gap: after the last bit the line idles at zero
    @(negedge clk);
    repeat (8) begin
      check(serial_out == 1'b0, "line not zero after the byte");
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
