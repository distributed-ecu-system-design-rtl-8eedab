// ecu_pkg: constants and types shared by the engine-speed CPLD.
//
// The CPLD samples two pulse trains from a marine engine (crankshaft pick-up
// and turbo-charger pick-up) over a repeating 50 ms frame and hands the counts
// to a host microcontroller one after the other on an 8-bit port, tagged by a
// two-bit source code. The frame timer runs from a 32.768 kHz clock, so one
// frame is 1638 clock cycles and the five frame events fall on counts 328
// (10 ms), 655 (20 ms), 1147 (35 ms), 1475 (45 ms) and 1638 (50 ms, wrap to 0).
// These event counts are the design's published timing; the 32.768 kHz clock
// is the rate they imply (1638 / 50 ms).
//
// The source tag values 01 = engine and 10 = turbo charger follow the published
// waveforms; 00 (nothing presented yet) is this design's choice.
package ecu_pkg;

  // Frame timer
  localparam int unsigned CLK_HZ        = 32768;  // rate implied by the event counts
  localparam int unsigned TIMER_W       = 11;     // holds 0..1637
  localparam int unsigned FRAME_TICKS   = 1638;   // 50 ms
  localparam int unsigned T_ENG_CAPTURE = 328;    // 10 ms: engine count -> engine buffer
  localparam int unsigned T_ENG_OUTPUT  = 655;    // 20 ms: engine buffer -> CntDat
  localparam int unsigned T_TC_CAPTURE  = 1147;   // 35 ms: T/C count -> T/C buffer
  localparam int unsigned T_TC_OUTPUT   = 1475;   // 45 ms: T/C buffer -> CntDat

  // Speed counters and ports
  localparam int unsigned COUNT_W   = 8;    // 8-bit count registers
  localparam int unsigned CNTDAT_W  = 8;    // CntDat[7:0]
  localparam int unsigned BUS_W     = 8;    // MCU data bus, one byte
  localparam int unsigned DATA_W    = 14;   // data register width
  localparam int unsigned METER_W   = 5;    // MeterDat[4:0]
  localparam int unsigned LEDS      = 31;   // LedMeter[30:0]
  localparam int unsigned DUTY_W    = 4;    // LED brightness duty (design choice)

  // Which count is on CntDat
  typedef enum logic [1:0] {
    SRC_NONE   = 2'b00,
    SRC_ENGINE = 2'b01,
    SRC_TC     = 2'b10
  } engtc_e;

  // One-cycle frame events from the timer
  typedef struct packed {
    logic eng_capture;  // 10 ms
    logic eng_output;   // 20 ms
    logic tc_capture;   // 35 ms
    logic tc_output;    // 45 ms
    logic frame_end;    // 50 ms, timer returns to 0
  } frame_ev_t;

endpackage
