// tb_ecu_cpld_top: end-to-end test of the engine-speed peripheral at its
// default size (32.768 kHz clock, 1638-cycle frames, 8-bit counters).
//
// The testbench plays both pick-up sensors and the microcontroller. Pulse
// generators make engine and turbo-charger trains at chosen frequencies.
// The MCU side watches Engtc: each change means a new count on CntDat. It
// checks each count against the number of pulses of that frequency in a 50 ms
// window (floor or ceiling of f * 1638 / 32768), checks that engine and
// turbo-charger counts alternate every 25 ms, reads the 14-bit data register
// over the byte bus after each turbo-charger count and checks it holds both
// counts, and sends a meter level back on MeterDat with Color, checking the
// LED bar. Speed sets: the published test points (engine 0, 300, 600, 900,
// 1200 Hz; turbo charger 0, 250, 500, 750, 1000 Hz), and an overspeed
// engine train that saturates the counter.
//
// Mechanisms counted, each must happen at least once: whole-window
// suppression after reset (Engtc = 00 through the first frame), engine and
// turbo-charger presentation, data-register read, a read pair that straddles
// the data-register load (held load), an MCU write that changes the LED
// brightness, bus release, counter saturation and the meter bar.
module tb_ecu_cpld_top;
  import ecu_pkg::*;
  timeunit 1ns; timeprecision 1ns;

  logic clk = 0, rst_n = 0;
  logic eng_pulse = 0, tc_pulse = 0;
  logic cs_n = 1, rw = 1;
  logic [7:0] bus_din = 0, bus_dout;
  logic bus_oe;
  logic [7:0] cnt_dat;
  logic [1:0] engtc;
  logic [4:0] meter_dat = 0;
  logic color = 0, sel_color;
  logic [30:0] led_meter;

  ecu_cpld_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_suppress = 0, n_eng = 0, n_tc = 0, n_read = 0, n_held = 0, n_duty = 0,
      n_release = 0, n_sat = 0, n_bar = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 30) $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #50_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- sensors ----------------
  int eng_f = 0, tc_f = 0, eng_acc = 0, tc_acc = 0;
  always @(negedge clk) begin
    eng_acc += 2 * eng_f;
    if (eng_acc >= 32768) begin eng_acc -= 32768; eng_pulse = !eng_pulse; end
    tc_acc += 2 * tc_f;
    if (tc_acc >= 32768) begin tc_acc -= 32768; tc_pulse = !tc_pulse; end
  end

  // ---------------- cycle counter ----------------
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // ---------------- MCU bus ----------------
  task automatic bus_access(input bit is_read, input logic [7:0] b, output logic [7:0] got);
    @(negedge clk);
    cs_n = 0; rw = is_read; bus_din = b;
    repeat (3) @(negedge clk);
    #1;
    check(bus_oe == is_read, "bus drive during access");
    got = bus_dout;
    @(negedge clk);
    cs_n = 1; rw = 1;
    #1;
    check(!bus_oe, "bus released");
    n_release++;
    @(negedge clk);
  endtask

  task automatic read_word(output logic [13:0] w);
    logic [7:0] lo, hi;
    bus_access(1, 0, lo);
    bus_access(1, 0, hi);
    w = {hi[5:0], lo};
  endtask

  task automatic write_word(input logic [13:0] w);
    logic [7:0] dummy;
    bus_access(0, w[7:0], dummy);
    bus_access(0, {2'b0, w[13:8]}, dummy);
  endtask

  // ---------------- checks on each presented count ----------------
  int settle_eng = 0, settle_tc = 0;     // outputs still to ignore after a speed change
  int last_change = -1;
  int last_eng = 0, last_tc = 0;
  logic [13:0] word_now = 0, word_prev = 0;
  logic [1:0] engtc_q = 0;

  function automatic bit count_ok(input int f, input int n);
    int lo, hi;
    lo = (f * 1638) / 32768;
    hi = (f * 1638 + 32767) / 32768;
    if (lo > 255) return n == 255;
    if (hi > 255) hi = 255;
    return n >= lo && n <= hi;
  endfunction

  function automatic int clip7(input int v);
    return v > 127 ? 127 : v;
  endfunction

  function automatic logic [30:0] bar_of(input int n);
    logic [30:0] b;
    b = '0;
    for (int i = 0; i < 31; i++) if (i < n) b[i] = 1'b1;
    return b;
  endfunction

  event eng_ev, tc_ev;
  always @(negedge clk) if (rst_n) begin
    if (engtc != engtc_q) begin
      if (last_change >= 0) check(cyc - last_change == 820 || cyc - last_change == 818,
                                  $sformatf("25 ms alternation, gap %0d", cyc - last_change));
      last_change = cyc;
      if (engtc == 2'b01) begin
        n_eng++;
        last_eng = cnt_dat;
        if (settle_eng > 0) settle_eng--;
        else check(count_ok(eng_f, cnt_dat), $sformatf("engine %0d Hz count %0d", eng_f, cnt_dat));
        if (cnt_dat == 255) n_sat++;
        -> eng_ev;
      end else if (engtc == 2'b10) begin
        n_tc++;
        last_tc = cnt_dat;
        if (settle_tc > 0) settle_tc--;
        else check(count_ok(tc_f, cnt_dat), $sformatf("turbo %0d Hz count %0d", tc_f, cnt_dat));
        word_prev = word_now;
        word_now = {7'(clip7(last_tc)), 7'(clip7(last_eng))};
        -> tc_ev;
      end else check(0, "Engtc returned to 00");
    end
    engtc_q = engtc;
  end

  task automatic set_speeds(input int fe, input int ft);
    eng_f = fe; tc_f = ft;
    settle_eng = 1; settle_tc = 1;
  endtask

  // level the MCU sends back: count scaled so 60 pulses (1.2 kHz) is full scale
  function automatic int level_of(input int n, input int full);
    int l;
    l = (n * 31) / full;
    return l > 31 ? 31 : l;
  endfunction

  task automatic show_meter(input int n, input int full, input bit c);
    int lv;
    lv = level_of(n, full);
    @(negedge clk);
    meter_dat = 5'(lv); color = c;
    repeat (2) @(negedge clk);
    check(sel_color == c, "colour echoed to the MCU");
    repeat (16) begin
      @(negedge clk);
      check(led_meter == '0 || led_meter == bar_of(lv), $sformatf("bar for level %0d", lv));
      if (led_meter == bar_of(lv) && lv > 0) n_bar++;
    end
  endtask

  // ---------------- scenario ----------------
  initial begin
    logic [13:0] w;
    int fe [6] = '{900, 0, 300, 600, 1200, 6000};
    int ft [6] = '{750, 0, 250, 500, 1000, 750};
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    eng_f = 900; tc_f = 750;
    // first frame: nothing presented
    repeat (1638) begin
      @(negedge clk);
      check(engtc == 2'b00, "no count before a whole window");
    end
    n_suppress++;
    for (int s = 0; s < 6; s++) begin
      if (s > 0) set_speeds(fe[s], ft[s]);
      repeat (3) begin
        @(eng_ev);
        show_meter(last_eng, 60, 0);
        @(tc_ev);
        show_meter(last_tc, 50, 1);
        read_word(w);
        n_read++;
        check(w == word_now, $sformatf("data register %04x exp %04x", w, word_now));
      end
      // a read pair straddling the load at 45 ms: must return the old word
      @(eng_ev);
      repeat (811) @(negedge clk);
      read_word(w);
      @(negedge clk);
      check(w == word_prev, $sformatf("straddling read %04x exp old word %04x", w, word_prev));
      if (word_prev != word_now) n_held++;
      read_word(w);
      check(w == word_now, $sformatf("read after held load %04x exp %04x", w, word_now));
    end
    // brightness written by the MCU: duty 4 of 16
    write_word(14'h0004);
    n_duty++;
    begin
      int lit;
      meter_dat = 5'd31;
      repeat (2) @(negedge clk);
      lit = 0;
      repeat (32) begin @(negedge clk); if (led_meter != '0) lit++; end
      check(lit == 8, $sformatf("duty 4/16 lit %0d of 32", lit));
    end
    $display("suppress %0d eng %0d tc %0d reads %0d held %0d duty %0d release %0d sat %0d bar %0d",
             n_suppress, n_eng, n_tc, n_read, n_held, n_duty, n_release, n_sat, n_bar);
    check(n_suppress > 0, "whole-window suppression happened");
    check(n_eng > 0 && n_tc > 0, "both counts presented");
    check(n_read > 0, "data register read");
    check(n_held > 0, "held load happened");
    check(n_duty > 0, "brightness written");
    check(n_release > 0, "bus released");
    check(n_sat > 0, "counter saturated");
    check(n_bar > 0, "meter bar shown");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
