// ecu_cpld_top: engine-speed peripheral of a marine engine control unit.
//
// The engine control unit shares its work between a small microcontroller
// (MCU) and this programmable-logic peripheral. The peripheral does the fast,
// regular part: it counts the engine pick-up pulses (up to 1.2 kHz) and the
// turbo-charger pick-up pulses (up to 1.0 kHz) over 50 ms windows and hands
// both counts to the MCU, and it drives the 31-LED circular speed meter from
// the level the MCU sends back. The MCU does the averaging and the 4-20 mA
// analogue outputs.
//
// Blocks and connections:
//   ecu_timer     50 ms frame, events at 10/20/35/45/50 ms
//   pulse_counter u_eng, u_tc: synchronise, count, capture into a buffer
//   control_unit  enables the counters, captures at 10 ms (engine) and
//                 35 ms (turbo charger), puts the engine count on CntDat with
//                 Engtc = 01 at 20 ms and the turbo-charger count with Engtc =
//                 10 at 45 ms, loads the data register at 45 ms
//   io_buffer     byte-wide MCU bus with CS# and R/W#, split into din/dout/oe
//   data_register 14-bit register behind the bus, two byte accesses per word;
//                 holds both counts (7 bits each) for the MCU to read, and a
//                 word the MCU writes sets the LED brightness (bits 3:0)
//   meter_display MeterDat -> barrel shift -> 31-LED bar, PWM brightness
//
// Clock: 32.768 kHz, the rate at which one frame is 1638 cycles. Reset:
// synchronous, active low. The pick-up inputs and CS#, R/W# are synchronised
// inside. meter_dat and color are sampled every cycle without synchronisers;
// while they change, the meter can show a mixed level for one cycle.
//
// The block set, the frame timing, the port names and widths follow the
// published design; how the data register and the brightness are used is this
// design's reading.
module ecu_cpld_top
  import ecu_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  // pick-up sensors
  input  logic                eng_pulse,
  input  logic                tc_pulse,
  // MCU data bus
  input  logic                cs_n,
  input  logic                rw,
  input  logic [BUS_W-1:0]    bus_din,
  output logic [BUS_W-1:0]    bus_dout,
  output logic                bus_oe,
  // MCU count port
  output logic [CNTDAT_W-1:0] cnt_dat,
  output logic [1:0]          engtc,
  // meter
  input  logic [METER_W-1:0]  meter_dat,
  input  logic                color,
  output logic                sel_color,
  output logic [LEDS-1:0]     led_meter
);

  frame_ev_t            ev;
  logic                 timer_en, eng_en, tc_en, eng_capture, tc_capture;
  logic [COUNT_W-1:0]   eng_buf, tc_buf;
  engtc_e               engtc_q;
  logic                 data_load, wr_done;
  logic [DATA_W-1:0]    data_word, data_q;
  logic [BUS_W-1:0]     rd_data, wr_data;
  logic                 rd_stb, wr_stb;

  ecu_timer u_timer (
    .clk, .rst_n, .en(timer_en), .count(), .ev
  );

  pulse_counter u_eng (
    .clk, .rst_n, .en(eng_en), .pulse_in(eng_pulse), .capture(eng_capture),
    .count(), .cnt_buf(eng_buf)
  );

  pulse_counter u_tc (
    .clk, .rst_n, .en(tc_en), .pulse_in(tc_pulse), .capture(tc_capture),
    .count(), .cnt_buf(tc_buf)
  );

  control_unit u_ctrl (
    .clk, .rst_n, .ev, .eng_buf, .tc_buf,
    .timer_en, .eng_en, .tc_en, .eng_capture, .tc_capture,
    .cnt_dat, .engtc(engtc_q), .data_load, .data_word
  );

  io_buffer u_io (
    .clk, .rst_n, .cs_n, .rw, .din(bus_din), .dout(bus_dout), .doe(bus_oe),
    .rd_data, .rd_stb, .wr_stb, .wr_data
  );

  data_register u_data (
    .clk, .rst_n, .rd_stb, .wr_stb, .wr_data, .rd_data,
    .load(data_load), .load_word(data_word), .q(data_q), .wr_done, .toggle()
  );

  meter_display u_meter (
    .clk, .rst_n, .meter_dat, .color,
    .duty_load(wr_done), .duty_in(data_q[DUTY_W-1:0]),
    .led_meter, .led_color(sel_color), .meter_q()
  );

  assign engtc = engtc_q;

endmodule
