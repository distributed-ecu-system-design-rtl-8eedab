// tb_meter_display: self-checking test of the LED meter display.
// For every level 0..31 and both colours it checks that the 5-bit register
// and the colour follow the inputs one cycle later and that, in every cycle,
// the LEDs are either all dark (PWM off) or exactly LEDs 0..level-1 lit. For
// several duty values it counts the lit cycles over a 16-cycle PWM period,
// which must equal the duty. It also checks the published point MeterDat =
// 10110 (22 LEDs).
module tb_meter_display;
  import ecu_pkg::*;
  timeunit 1ns; timeprecision 1ns;

  logic clk = 0, rst_n = 0, color = 0, duty_load = 0;
  logic [4:0] meter_dat = 0, meter_q;
  logic [3:0] duty_in = 0;
  logic [30:0] led_meter;
  logic led_color;
  int checks = 0, failures = 0;

  meter_display dut (.clk, .rst_n, .meter_dat, .color, .duty_load, .duty_in, .led_meter, .led_color, .meter_q);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic logic [30:0] bar_of(input int n);
    logic [30:0] b;
    b = '0;
    for (int i = 0; i < 31; i++) if (i < n) b[i] = 1'b1;
    return b;
  endfunction

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic set_duty(input int d);
    @(negedge clk); duty_load = 1; duty_in = 4'(d);
    @(negedge clk); duty_load = 0;
  endtask

  // returns lit cycles over 16 cycles; checks the pattern each cycle
  task automatic observe(input int level, output int lit);
    lit = 0;
    repeat (16) begin
      @(negedge clk);
      check(led_meter == '0 || led_meter == bar_of(level), $sformatf("pattern %b level %0d", led_meter, level));
      if (led_meter != '0 || level == 0) lit++;
    end
  endtask

  initial begin
    int lit;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int lv = 0; lv < 32; lv++) begin
      @(negedge clk);
      meter_dat = 5'(lv); color = lv[0];
      @(negedge clk);
      check(meter_q == 5'(lv), "meter register");
      check(led_color == lv[0], "colour register");
      observe(lv, lit);
      if (lv != 0) check(lit == 15, $sformatf("reset brightness lit %0d", lit));
    end
    // the published level 10110
    @(negedge clk); meter_dat = 5'b10110;
    @(negedge clk);
    observe(22, lit);
    check($countones(bar_of(22)) == 22, "22 LEDs for 10110");
    // brightness
    @(negedge clk); meter_dat = 5'd31;
    for (int d = 0; d < 16; d += 3) begin
      set_duty(d);
      observe(31, lit);
      check(lit == d, $sformatf("duty %0d lit %0d", d, lit));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
