# Engine-speed peripheral for a marine engine control unit

A marine engine control unit has to measure two fast pulse trains, the
engine speed pick-up (up to 1.2 kHz) and the turbo-charger speed pick-up (up
to 1.0 kHz). It also has to drive a speed display and produce 4-20 mA analogue
outputs. Doing all of that in one small microcontroller overloads it. This design splits the work. A
small programmable-logic device does the counting on a fixed time grid and
drives the LED meter. The microcontroller (MCU) reads finished counts,
averages them, computes the analogue outputs and tells the logic what level
to show.

This repository holds the SystemVerilog for the logic side. The MCU, the
4-20 mA converter, the LEDs and the sensors are outside it.

```
 engine pick-up ──► pulse_counter (u_eng) ─┐
                                           ├─► control_unit ──► CntDat[7:0], Engtc[1:0] ──► MCU
 T/C pick-up ─────► pulse_counter (u_tc) ──┘        ▲   │
                          ▲                         │   └──► data_register ◄──► io_buffer ◄──► MCU byte bus
                          └──── ecu_timer (50 ms frame events)      │
                                                            (MCU write sets brightness)
 MCU MeterDat[4:0], Color ──► meter_display (barrel shift, PWM) ──► LedMeter[30:0], SelColor
```

## The 50 ms frame

Everything hangs on one frame timer. It runs from a 32.768 kHz clock, so
50 ms is 1638 cycles. The design uses these cycle counts directly. At another
clock rate the frame still lasts 1638 cycles.

| timer count | time  | what happens                                                     |
|-------------|-------|------------------------------------------------------------------|
| 328         | 10 ms | engine count copied to the engine buffer, count restarts         |
| 655         | 20 ms | engine buffer put on CntDat, Engtc = 01                          |
| 1147        | 35 ms | turbo-charger count copied to its buffer, count restarts         |
| 1475        | 45 ms | turbo-charger buffer put on CntDat, Engtc = 10; data register loaded |
| 1637        | 50 ms | last cycle of the frame; the timer returns to 0                  |

Each counter's window runs from one of its capture points to the next, so
each is exactly one frame (1638 cycles, 49.99 ms) long. The two windows are
offset by 25 ms. The MCU sees CntDat change every 25 ms, alternating between
the two speeds: 820 cycles from engine to turbo charger, then 818 back. Engtc
says which speed is on the port. CntDat and Engtc change one cycle after the
event, at counts 656 and 1476.

After reset, the control unit enables each counter only at that counter's
first capture point. The first capture therefore holds 0 and is not shown.
Engtc stays 00 until the first whole window has been counted, which is
about one frame after reset. From then on, Engtc is never 00 again.

Expected counts for one window are f × 1638 / 32768, rounded up or down
depending on the pulse phase. For example:

| input            | count per window |
|------------------|------------------|
| engine 900 Hz    | 44-45            |
| T/C 750 Hz       | 37-38            |
| engine 1.2 kHz   | 59-60            |
| T/C 1.0 kHz      | 49-50            |

## Counting a pick-up pulse (`pulse_counter`)

The pick-up signal is asynchronous. It passes through three flip-flops
(`x0`, `x1`, `x2`). A rising edge is seen when `x1` is 1 and `x2` is 0, and it
is counted at the third clock edge after the input rises. At 32.768 kHz, a
1.2 kHz square wave stays high and low for about 13 cycles each, well above
the two cycles the synchroniser needs. The fastest input that can still be
counted is a square wave with a period of 4 cycles, that is 8 kHz.

The count register and the buffer are 8 bits wide, which allows 255 pulses
per window (5.1 kHz). Above that, the count stays at 255 and does not wrap.
If an edge arrives in the capture cycle, it goes into the buffer that is
being captured.

## Talking to the microcontroller

There are two paths.

**Count port.** `cnt_dat[7:0]` and `engtc[1:0]` are plain registered
outputs. The MCU polls Engtc, or uses it to raise an interrupt, and reads
CntDat when Engtc changes. The value then stays steady for 25 ms.

**Byte bus** (`io_buffer` and `data_register`). The logic device has no
three-state pins, so the bus is split into three signals:

- `bus_din`, data from the MCU;
- `bus_dout`, data to the MCU;
- `bus_oe`, which the board uses to drive its bus transceiver.

`bus_oe` is high exactly while CS# is low and R/W# is high. It is
combinational, so it follows the pins without delay.

An access goes like this:

1. The MCU pulls CS# low.
2. It holds R/W# and the data steady for at least four clock cycles.
3. CS# and R/W# are synchronised. In the third cycle, the interface raises a
   one-cycle read or write strobe.
4. For a read, the byte is in the I/O buffer register from the fourth cycle
   on. The MCU samples it there and then releases CS#.

The data register behind the bus is 14 bits wide, so a word takes two
accesses: low byte first, then the high byte. The high byte carries bits 13:8
in its low six bits. A pointer flip-flop tracks which half comes next, and
reads and writes share it.

- **Reading.** At 45 ms the control unit loads the register with both
  counts, seven bits each: turbo charger in bits 13:7, engine in bits 6:0,
  each clipped at 127. If the load arrives between the two halves of a read,
  it is held back until the high byte has been read. A read pair therefore
  never mixes two frames.
- **Writing.** When the MCU writes a word, the completed word is announced
  with a one-cycle `wr_done`. Bits 3:0 become the LED brightness.

## LED meter (`meter_display`)

The MCU averages the counts and sends back a 5-bit level on MeterDat. It
also sends Color: 0 means the level is the engine speed, 1 means the turbo
charger. Both are registered every cycle. A barrel shift turns the level into
a bar: `~(all-ones << level)` lights LEDs 0 to level-1. Level 0 is dark and
level 31 lights the whole ring of 31 LEDs.

Brightness is set by a 16-step PWM. The LEDs are on while a free-running
4-bit counter is below the duty value. The duty resets to 15 (on 15 of 16
cycles) and is changed by an MCU word write. The registered Color is echoed
to the MCU on SelColor.

## What is given and what is chosen

These points follow the source design:

- the block structure (timer, two speed counters, control unit, I/O buffer,
  data register, display with barrel shift);
- the frame event counts 328/655/1147/1475/1638;
- the 8-bit counters;
- the Engtc codes 01 (engine) and 10 (turbo charger), and the 25 ms
  alternation;
- the split bus with CS# and R/W#;
- the 14-bit data register read as low byte then high byte;
- the 5-bit meter register, the 31 LEDs and brightness set by duty ratio;
- the port names and widths (Reset#, R/W#, Clk In, MeterDat[4:0], Color,
  SelColor, Engtc[1:0], CntDat[7:0], TcPulse, EngPulse, LedMeter[30:0]).

These are choices made here:

- the 32.768 kHz clock, which is the rate the event counts imply;
- the three-flop synchroniser and the saturation at 255;
- suppressing the first, partial window;
- the bus access timing and strobes;
- what the data register carries: both counts for reading, the brightness
  for writing;
- the deferred load;
- the bar-graph reading of the barrel shift;
- the PWM width;
- the meaning of Color and SelColor;
- synchronous active-low reset everywhere.

CntDat is 8 bits wide here. Some descriptions of the original show it as
7 bits, CntDat[6:0]. The 7-bit values in those descriptions fit in the
8-bit port.

These parts are not included:

- the tact-switch inputs TactSw[5:0], the Status[2:0] lines and the relay
  outputs Relay[4:0], because their function is not defined;
- the MCU software: moving average, 13-bit PWM for the two 4-20 mA channels,
  serial EEPROM.

Size after synthesis: about 130 flip-flops, which fits a 288-macrocell CPLD
such as the XC95288XL. Product-term fitting has not been checked.

## Files

| file | contents |
|------|----------|
| `rtl/ecu_pkg.sv` | frame constants, widths, `engtc_e`, `frame_ev_t` |
| `rtl/ecu_timer.sv` | frame timer |
| `rtl/pulse_counter.sv` | synchroniser, 8-bit counter, capture buffer |
| `rtl/control_unit.sv` | enables, capture strobes, CntDat/Engtc, data-register load |
| `rtl/io_buffer.sv` | CS#/R/W# bus interface and I/O buffer register |
| `rtl/data_register.sv` | 14-bit register behind the byte bus |
| `rtl/meter_display.sv` | MeterDat register, barrel shift, PWM |
| `rtl/ecu_cpld_top.sv` | top level |
| `tb/tb_<module>.sv` | self-checking testbench of each module |

All parameters default to the design's own numbers. The top has no
parameters.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops on its own.
Each also has a watchdog that stops it if it hangs. For example, with
Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/ecu_pkg.sv tb/tb_ecu_cpld_top.sv --top-module tb_ecu_cpld_top -o sim
./obj_dir/sim
```

Replace `tb_ecu_cpld_top` with `tb_pulse_counter`, `tb_ecu_timer`,
`tb_control_unit`, `tb_io_buffer`, `tb_data_register` or `tb_meter_display`
to run one block.

`tb_ecu_cpld_top` runs the whole device at full size. It plays both sensors
and the MCU, and runs these speed pairs:

- engine 900 Hz with turbo charger 750 Hz;
- engine 0, 300, 600 and 1200 Hz;
- turbo charger 0, 250, 500, 750 and 1000 Hz;
- an engine overspeed of 6 kHz, which saturates the counter.

For every count, it checks the value against the pulse frequency and checks
the 25 ms spacing. It checks the data-register words, including a read that
straddles the 45 ms load, as well as the LED bar and a brightness change.
It also counts each mechanism and fails if one never happened. The whole run
takes well under a second.

The module testbenches compare against cycle-exact reference models. One
example is the counter testbench, which assumes the three-cycle edge latency.
If you change the synchroniser depth or the event counts, update the
matching testbench.
