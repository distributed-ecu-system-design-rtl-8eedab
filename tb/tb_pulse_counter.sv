// tb_pulse_counter: self-checking test of the speed counter.
// A phase accumulator makes pick-up pulses of a chosen frequency at a
// 32.768 kHz clock; capture strobes come every 1638 cycles (50 ms). A cycle
// model kept by the testbench (an edge driven after clock edge k is counted at
// clock edge k+3; capture takes effect at the next edge) gives the expected
// running count and buffer after every cycle. Runs 900 Hz, 750 Hz, 1200 Hz and
// 1000 Hz (the published 45/38/60/50 pulses per window, checked with one pulse
// of tolerance for the phase of the window), a stretch with the enable low,
// and a 16 kHz train that must saturate the 8-bit count at 255.
module tb_pulse_counter;
  import ecu_pkg::*;
  timeunit 1ns; timeprecision 1ns;

  localparam int MAXK = 40000;

  logic clk = 0, rst_n = 0, en = 0, pulse_in = 0, capture = 0;
  logic [7:0] count, cnt_buf;
  int checks = 0, failures = 0;
  int n_sat = 0, n_capt = 0;

  pulse_counter dut (.clk, .rst_n, .en, .pulse_in, .capture, .count, .cnt_buf);

  always #5 clk = ~clk;

  bit p_d [MAXK];
  bit c_d [MAXK];
  bit e_d [MAXK];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #5_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one segment: freq Hz for frames*1638 cycles, capture at the end of each frame
  int k = 0;
  int m_count = 0, m_buf = 0;
  int acc = 0;

  task automatic run(input int freq, input int frames, input bit enable, input int lo, input int hi);
    for (int c = 0; c < frames * 1638; c++) begin
      bit rise;
      @(posedge clk);
      k++;
      @(negedge clk);
      // model of clock edge k
      rise = (k >= 4) && p_d[k-3] && !p_d[k-4];
      if (!e_d[k-1]) rise = 0;
      if (c_d[k-1]) begin
        m_buf = (rise && m_count < 255) ? m_count + 1 : m_count;
        m_count = 0;
        n_capt++;
        if (lo >= 0 && n_capt > 1)
          check(m_buf >= lo && m_buf <= hi, $sformatf("published count %0d not in %0d..%0d", m_buf, lo, hi));
      end else if (rise && m_count < 255) m_count++;
      if (m_buf == 255) n_sat++;
      check(count == 8'(m_count), $sformatf("count %0d exp %0d", count, m_count));
      check(cnt_buf == 8'(m_buf), $sformatf("buf %0d exp %0d", cnt_buf, m_buf));
      // drive the inputs for the next edge
      acc += 2 * freq;
      if (acc >= 32768) begin acc -= 32768; pulse_in = !pulse_in; end
      capture = (c % 1638 == 1637);
      en = enable;
      p_d[k] = pulse_in; c_d[k] = capture; e_d[k] = en;
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1; en = 1;
    e_d[0] = 1;
    run(900, 3, 1, 44, 45);
    n_capt = 0; run(750, 3, 1, 37, 38);
    n_capt = 0; run(1200, 3, 1, 59, 60);
    n_capt = 0; run(1000, 3, 1, 49, 50);
    run(900, 2, 0, -1, 0);
    check(cnt_buf == 0, "nothing counted while disabled");
    run(16000, 2, 1, -1, 0);
    check(n_sat > 0, "saturation reached");
    check(cnt_buf == 255, "saturated buffer");
    $display("saturated cycles %0d", n_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
