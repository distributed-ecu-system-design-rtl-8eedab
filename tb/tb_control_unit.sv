// tb_control_unit: self-checking test of the control unit.
// The testbench plays the frame timer (events at 328, 655, 1147, 1475 and
// 1637 of a 1638-cycle frame) and changes both count buffers at every frame
// end, some above 127. It checks over five frames that the counters are
// enabled at their first capture point, that nothing is presented before a
// whole window was counted (Engtc = 00), that CntDat carries the engine buffer
// with Engtc = 01 from the cycle after 20 ms and the turbo-charger buffer with
// Engtc = 10 from the cycle after 45 ms, that the two alternate every 820 and
// 818 cycles (25 ms), and that the data register load carries both counts
// clipped to seven bits.
module tb_control_unit;
  import ecu_pkg::*;
  timeunit 1ns; timeprecision 1ns;

  logic clk = 0, rst_n = 0;
  frame_ev_t ev = '0;
  logic [7:0] eng_buf = 0, tc_buf = 0;
  logic timer_en, eng_en, tc_en, eng_capture, tc_capture, data_load;
  logic [7:0] cnt_dat;
  engtc_e engtc;
  logic [13:0] data_word;
  int checks = 0, failures = 0;
  int n_eng_out = 0, n_tc_out = 0, n_load = 0;

  control_unit dut (.clk, .rst_n, .ev, .eng_buf, .tc_buf, .timer_en, .eng_en, .tc_en,
                    .eng_capture, .tc_capture, .cnt_dat, .engtc, .data_load, .data_word);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic int clip7(input int v);
    return v > 127 ? 127 : v;
  endfunction

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_dat, exp_src, last_change, frame;
    bit eng_seen_cap, tc_seen_cap;
    int gaps [$];
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    exp_dat = 0; exp_src = 0; last_change = -1;
    eng_seen_cap = 0; tc_seen_cap = 0;
    for (int i = 0; i < 5 * 1638; i++) begin
      int pos;
      pos = i % 1638;
      frame = i / 1638;
      // drive this cycle's event
      ev = '0;
      ev.eng_capture = (pos == 328);
      ev.eng_output  = (pos == 655);
      ev.tc_capture  = (pos == 1147);
      ev.tc_output   = (pos == 1475);
      ev.frame_end   = (pos == 1637);
      #1;
      check(eng_capture == (pos == 328) && tc_capture == (pos == 1147), "capture strobes");
      check(eng_en == eng_seen_cap && tc_en == tc_seen_cap, "counter enables");
      check(timer_en == (i > 0), "timer enabled");
      check(data_load == (pos == 1475 && frame >= 1), "data_load timing");
      if (data_load) begin
        n_load++;
        check(data_word == {7'(clip7(tc_buf)), 7'(clip7(eng_buf))}, "data word");
      end
      @(posedge clk);
      if (pos == 328) eng_seen_cap = 1;
      if (pos == 1147) tc_seen_cap = 1;
      if (frame >= 1 && pos == 655)  begin exp_dat = eng_buf; exp_src = 1; end
      if (frame >= 1 && pos == 1475) begin exp_dat = tc_buf;  exp_src = 2; end
      @(negedge clk);
      check(cnt_dat == 8'(exp_dat), $sformatf("cnt_dat %0d exp %0d", cnt_dat, exp_dat));
      check(int'(engtc) == exp_src, $sformatf("engtc %0d exp %0d", engtc, exp_src));
      if (frame >= 1 && pos == 655)  n_eng_out++;
      if (frame >= 1 && pos == 1475) n_tc_out++;
      if ((frame >= 1) && (pos == 655 || pos == 1475)) begin
        if (last_change >= 0) gaps.push_back(i - last_change);
        last_change = i;
      end
      // new buffer contents at frame end (the counters' captures)
      if (pos == 1637) begin
        eng_buf = 8'($urandom_range(0, 200));
        tc_buf  = 8'($urandom_range(0, 200));
        if (frame == 1) begin eng_buf = 45; tc_buf = 38; end
        if (frame == 2) begin eng_buf = 200; tc_buf = 130; end
      end
    end
    foreach (gaps[g]) check(gaps[g] == 820 || gaps[g] == 818, $sformatf("alternation gap %0d", gaps[g]));
    check(gaps.size() >= 6, "alternations seen");
    check(n_eng_out == 4 && n_tc_out == 4 && n_load == 4, "outputs per frame");
    $display("engine outputs %0d, turbo outputs %0d, loads %0d", n_eng_out, n_tc_out, n_load);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
