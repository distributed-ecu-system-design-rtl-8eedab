// tb_io_buffer: self-checking test of the MCU bus interface.
// The testbench acts as the MCU: it holds CS# low for four clock cycles per
// access with R/W# and the data steady, and releases the bus for two cycles
// between accesses. It checks that the output enable follows CS# low and R/W#
// high at once, that every access makes exactly one read or write strobe, in
// the third cycle after CS# falls, that a write stores the byte in the buffer
// register and a read loads the offered byte and shows it on the output from
// the next cycle on, in time for the MCU to sample it in the last cycle.
module tb_io_buffer;
  import ecu_pkg::*;
  timeunit 1ns; timeprecision 1ns;

  logic clk = 0, rst_n = 0, cs_n = 1, rw = 1;
  logic [7:0] din = 0, dout, rd_data = 0, wr_data;
  logic doe, rd_stb, wr_stb;
  int checks = 0, failures = 0;
  int n_rd = 0, n_wr = 0;

  io_buffer dut (.clk, .rst_n, .cs_n, .rw, .din, .dout, .doe, .rd_data, .rd_stb, .wr_stb, .wr_data);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one access; returns the byte sampled in the last cycle
  task automatic access(input bit is_read, input logic [7:0] wbyte, input logic [7:0] offer,
                        output logic [7:0] got);
    int strobes;
    strobes = 0;
    @(negedge clk);
    cs_n = 0; rw = is_read; din = wbyte; rd_data = offer;
    for (int c = 1; c <= 4; c++) begin
      #1;
      check(doe == is_read, "output enable during access");
      check(rd_stb == (is_read && c == 3), $sformatf("rd_stb in cycle %0d", c));
      check(wr_stb == (!is_read && c == 3), $sformatf("wr_stb in cycle %0d", c));
      if (wr_stb) check(wr_data == wbyte, "wr_data");
      if (rd_stb || wr_stb) strobes++;
      if (c == 4) got = dout;
      @(negedge clk);
    end
    cs_n = 1; rw = 1; rd_data = ~offer;
    #1;
    check(doe == 0, "bus released");
    check(strobes == 1, "one strobe per access");
    if (is_read) n_rd++; else n_wr++;
    repeat (2) begin
      @(negedge clk); #1;
      check(!rd_stb && !wr_stb, "no strobe while idle");
      check(doe == 0, "bus released while idle");
    end
  endtask

  initial begin
    logic [7:0] got, b;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    #1 check(dout == 0 && doe == 0, "reset state");
    for (int t = 0; t < 40; t++) begin
      b = 8'($urandom);
      if (t % 2 == 0) begin
        access(0, b, 8'h00, got);
        check(dout == b, $sformatf("buffer holds written byte %02x got %02x", b, dout));
      end else begin
        access(1, 8'h00, b, got);
        check(got == b, $sformatf("read byte %02x exp %02x", got, b));
      end
    end
    check(n_rd == 20 && n_wr == 20, "access counts");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
