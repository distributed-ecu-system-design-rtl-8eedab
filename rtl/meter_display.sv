// meter_display: display block driving the 31-LED circular speed meter.
//
// The MCU averages the counts it receives and sends the result as a 5-bit
// level on MeterDat, together with Color, which says whether the level is the
// engine speed (0) or the turbo-charger speed (1). Both are stored in
// registers every clock cycle (meter_q, ocolor). The level is turned into a
// bar graph by a barrel shift: an all-ones word shifted left by the level and
// inverted lights LEDs 0 .. level-1, so 0 lights none and 31 lights all 31.
// Brightness is set by pulse-width modulation: a free-running DUTY_W-bit
// counter gates the LEDs on while it is below the duty value (duty 0 = dark,
// 2**DUTY_W - 1 = brightest, on 15 of every 16 cycles). The duty register is
// loaded by duty_load.
//
// Published: the 31 LEDs, the 5-bit register feeding a barrel shift, and
// brightness by duty ratio. This design's: the bar-graph reading of the
// shift, the PWM counter and its width, the duty reset value (brightest) and
// the Color meaning.
//
// Timing: led_meter and led_color follow MeterDat and Color one cycle later.
module meter_display
  import ecu_pkg::*;
#(
  parameter int unsigned N     = LEDS,
  parameter int unsigned LW    = METER_W,
  parameter int unsigned DW    = DUTY_W
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [LW-1:0] meter_dat,
  input  logic          color,
  input  logic          duty_load,
  input  logic [DW-1:0] duty_in,
  output logic [N-1:0]  led_meter,
  output logic          led_color,
  output logic [LW-1:0] meter_q
);

  logic          ocolor;
  logic [DW-1:0] duty, pwm_cnt;
  logic [N-1:0]  bar;
  logic          pwm_on;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      meter_q <= '0;
      ocolor  <= 1'b0;
      duty    <= '1;
      pwm_cnt <= '0;
    end else begin
      meter_q <= meter_dat;
      ocolor  <= color;
      pwm_cnt <= pwm_cnt + 1'b1;
      if (duty_load) duty <= duty_in;
    end
  end

  assign bar       = ~({N{1'b1}} << meter_q);
  assign pwm_on    = pwm_cnt < duty;
  assign led_meter = pwm_on ? bar : '0;
  assign led_color = ocolor;

endmodule
