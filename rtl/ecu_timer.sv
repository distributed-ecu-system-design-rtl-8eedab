// ecu_timer: 50 ms frame timer of the engine-speed CPLD.
//
// A free-running counter of clock cycles that restarts every FRAME_TICKS
// cycles (50 ms at 32.768 kHz). It raises one-cycle events at four points of
// the frame: engine capture (count 328, 10 ms), engine output (655, 20 ms),
// turbo-charger capture (1147, 35 ms) and turbo-charger output (1475, 45 ms),
// and frame_end in the last cycle (1637), after which the count is 0 again.
// The event counts and the 50 ms period are the published ones; the counter
// width, the active-low synchronous reset and the enable are this design's.
//
// Interface: clk, rst_n (synchronous, active low), en (hold the count when
// low, no events), count (current position in the frame), ev (events, valid in
// the cycle in which count equals the event point).
module ecu_timer
  import ecu_pkg::*;
#(
  parameter int unsigned PERIOD    = FRAME_TICKS,
  parameter int unsigned T_ENG_CAP = T_ENG_CAPTURE,
  parameter int unsigned T_ENG_OUT = T_ENG_OUTPUT,
  parameter int unsigned T_TC_CAP  = T_TC_CAPTURE,
  parameter int unsigned T_TC_OUT  = T_TC_OUTPUT,
  parameter int unsigned W         = TIMER_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  output logic [W-1:0] count,
  output frame_ev_t    ev
);

  localparam logic [W-1:0] LAST = W'(PERIOD - 1);

  always_ff @(posedge clk) begin
    if (!rst_n)              count <= '0;
    else if (en) begin
      if (count == LAST)     count <= '0;
      else                   count <= count + 1'b1;
    end
  end

  always_comb begin
    ev.eng_capture = en && (count == W'(T_ENG_CAP));
    ev.eng_output  = en && (count == W'(T_ENG_OUT));
    ev.tc_capture  = en && (count == W'(T_TC_CAP));
    ev.tc_output   = en && (count == W'(T_TC_OUT));
    ev.frame_end   = en && (count == LAST);
  end

  initial begin
    assert (PERIOD <= (1 << W)) else $error("ecu_timer: PERIOD does not fit in W bits");
    assert (T_ENG_CAP < T_ENG_OUT && T_ENG_OUT < T_TC_CAP && T_TC_CAP < T_TC_OUT && T_TC_OUT < PERIOD)
      else $error("ecu_timer: event points out of order");
  end

endmodule
