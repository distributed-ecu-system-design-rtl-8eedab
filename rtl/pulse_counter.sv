// pulse_counter: speed counter for one pick-up pulse train (engine or turbo charger).
//
// The pick-up input is asynchronous to the clock. It passes through a
// three-flop chain (x0, x1, x2); a rising edge is seen when x1 is high and x2
// is low, two clock edges after the input rises. Each rising edge adds one to
// an 8-bit count register. A one-cycle `capture` copies the count into the
// buffer register and restarts the count, so that the buffer holds the number
// of pulses in the last capture-to-capture window (one 50 ms frame). An edge
// seen in the capture cycle is counted in the buffer and not in the next
// window. At 1.2 kHz a 50 ms window holds 60 pulses; the 8-bit register
// reaches 255 (5.1 kHz), and this design saturates there instead of wrapping.
//
// The 8-bit registers, the 50 ms window and the buffer are the published
// design; the synchroniser depth, edge polarity and saturation are this
// design's choices.
//
// Interface: pulse_in (raw pick-up), en (count only while high), capture (one
// cycle), count (running count), cnt_buf (last captured count).
module pulse_counter
  import ecu_pkg::*;
#(
  parameter int unsigned W = COUNT_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic         pulse_in,
  input  logic         capture,
  output logic [W-1:0] count,
  output logic [W-1:0] cnt_buf
);

  logic x0, x1, x2;
  logic edge_seen;
  logic [W-1:0] next_count;

  always_ff @(posedge clk) begin
    if (!rst_n) {x0, x1, x2} <= '0;
    else        {x0, x1, x2} <= {pulse_in, x0, x1};
  end

  assign edge_seen = en && x1 && !x2;

  // count plus this cycle's edge, held at all-ones
  always_comb begin
    next_count = count;
    if (edge_seen && count != '1) next_count = count + 1'b1;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      count   <= '0;
      cnt_buf <= '0;
    end else if (capture) begin
      cnt_buf <= next_count;
      count   <= '0;
    end else begin
      count   <= next_count;
    end
  end

endmodule
