// tb_ecu_timer: self-checking test of the 50 ms frame timer.
// Runs three frames plus a hold with the enable low and compares the count and
// every event with a cycle index kept by the testbench: count = index mod 1638,
// events exactly at 328, 655, 1147, 1475 and 1637, frame length 1638 cycles.
module tb_ecu_timer;
  import ecu_pkg::*;
  timeunit 1ns; timeprecision 1ns;

  logic clk = 0, rst_n = 0, en = 0;
  logic [TIMER_W-1:0] count;
  frame_ev_t ev;
  int checks = 0, failures = 0;
  int nev[5];

  ecu_timer dut (.clk, .rst_n, .en, .count, .ev);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int idx, last_end, frames;
    repeat (3) @(posedge clk);
    rst_n <= 1; en <= 1;
    idx = 0; last_end = -1; frames = 0;
    for (int k = 0; k < 3 * 1638 + 100; k++) begin
      @(negedge clk);
      begin
        int pos;
        pos = idx % 1638;
        check(count == TIMER_W'(pos), $sformatf("count %0d exp %0d", count, pos));
        check(ev.eng_capture == (pos == 328),  "eng_capture");
        check(ev.eng_output  == (pos == 655),  "eng_output");
        check(ev.tc_capture  == (pos == 1147), "tc_capture");
        check(ev.tc_output   == (pos == 1475), "tc_output");
        check(ev.frame_end   == (pos == 1637), "frame_end");
        if (ev.frame_end) begin
          if (last_end >= 0) check(idx - last_end == 1638, "frame length");
          last_end = idx; frames++;
        end
        if (ev.eng_capture) nev[0]++;
        if (ev.eng_output)  nev[1]++;
        if (ev.tc_capture)  nev[2]++;
        if (ev.tc_output)   nev[3]++;
      end
      idx++;
    end
    check(frames == 3, "three frame ends");
    foreach (nev[i]) if (i < 4) check(nev[i] == 3 || nev[i] == 4, "event counts");
    // hold with enable low
    en <= 0;
    @(negedge clk);
    begin
      logic [TIMER_W-1:0] held;
      held = count;
      repeat (50) begin
        @(negedge clk);
        check(count == held, "held while disabled");
        check(ev == '0, "no events while disabled");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
