// tb_data_register: self-checking test of the 14-bit byte-accessed register.
// Drives one-cycle read and write strobes the way the bus interface does and
// checks: a word written as low byte then high byte appears whole on q with a
// one-cycle wr_done; a read pair returns the low byte then bits 13:8; an
// internal load while no transfer is half done takes effect at once; a load
// between the two halves of a read is held, the pair still returns the old
// word, and the new word is there afterwards. Random pairs follow the
// directed cases, with loads dropped in at random points.
module tb_data_register;
  import ecu_pkg::*;
  timeunit 1ns; timeprecision 1ns;

  logic clk = 0, rst_n = 0, rd_stb = 0, wr_stb = 0, load = 0;
  logic [7:0] wr_data = 0, rd_data;
  logic [13:0] load_word = 0, q;
  logic wr_done, toggle;
  int checks = 0, failures = 0;
  int n_deferred = 0, n_direct = 0;

  data_register dut (.clk, .rst_n, .rd_stb, .wr_stb, .wr_data, .rd_data, .load, .load_word, .q, .wr_done, .toggle);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic idle(input int n);
    repeat (n) begin
      @(negedge clk);
      rd_stb = 0; wr_stb = 0; load = 0;
      #1 check(!wr_done, "no wr_done while idle");
    end
  endtask

  // one strobe cycle; optional load in the same cycle
  task automatic strobe(input bit is_read, input logic [7:0] b, input bit ld, input logic [13:0] lw,
                        output logic [7:0] got);
    @(negedge clk);
    rd_stb = is_read; wr_stb = !is_read; wr_data = b; load = ld; load_word = lw;
    #1 got = rd_data;
    @(negedge clk);
    rd_stb = 0; wr_stb = 0; load = 0;
  endtask

  task automatic write_word(input logic [13:0] w);
    logic [7:0] dummy;
    strobe(0, w[7:0], 0, 0, dummy);
    check(toggle == 1, "pointer at high byte");
    strobe(0, {2'b00, w[13:8]}, 0, 0, dummy);
    // wr_done was raised in the cycle after the second strobe, which is now
    #1 check(wr_done, "wr_done raised");
    check(q == w, $sformatf("written word %04x exp %04x", q, w));
    check(toggle == 0, "pointer back at low byte");
  endtask

  task automatic read_word(output logic [13:0] w, input bit ld_mid, input logic [13:0] lw);
    logic [7:0] lo, hi;
    strobe(1, 0, 0, 0, lo);
    if (ld_mid) begin
      @(negedge clk); load = 1; load_word = lw;
      @(negedge clk); load = 0;
      n_deferred++;
    end
    strobe(1, 0, 0, 0, hi);
    check(hi[7:6] == 2'b00, "unused high bits read as 0");
    w = {hi[5:0], lo};
  endtask

  logic [13:0] model, w, nw;

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    #1 check(q == 0 && toggle == 0, "reset state");
    // directed
    write_word(14'h2A5C); model = 14'h2A5C;
    read_word(w, 0, 0); check(w == model, $sformatf("read %04x exp %04x", w, model));
    @(negedge clk); load = 1; load_word = 14'h1234;
    @(negedge clk); load = 0; model = 14'h1234; n_direct++;
    #1 check(q == model, "direct load");
    read_word(w, 1, 14'h0BEE);
    check(w == 14'h1234, "pair not torn by a load");
    idle(2);
    check(q == 14'h0BEE, "held load applied after the pair");
    model = 14'h0BEE;
    // random
    for (int t = 0; t < 300; t++) begin
      int kind;
      kind = $urandom_range(0, 3);
      case (kind)
        0: begin nw = 14'($urandom); write_word(nw); model = nw; end
        1: begin read_word(w, 0, 0); check(w == model, $sformatf("read %04x exp %04x", w, model)); end
        2: begin
             nw = 14'($urandom);
             read_word(w, 1, nw);
             check(w == model, "read during deferred load");
             model = nw;
             idle(1);
           end
        default: begin
             nw = 14'($urandom);
             @(negedge clk); load = 1; load_word = nw;
             @(negedge clk); load = 0; model = nw; n_direct++;
             #1 check(q == nw, "direct load");
           end
      endcase
      idle($urandom_range(0, 2));
    end
    check(n_deferred > 0 && n_direct > 0, "both load paths used");
    $display("deferred loads %0d, direct loads %0d", n_deferred, n_direct);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
