// control_unit: sequencing of the engine-speed CPLD.
//
// Driven by the frame events of the timer, it
//  * enables each speed counter at its first capture point after reset, so
//    that every later capture covers a whole 50 ms window;
//  * issues the capture strobes (engine at 10 ms, turbo charger at 35 ms);
//  * presents the engine buffer on CntDat with Engtc = 01 at 20 ms and the
//    turbo-charger buffer with Engtc = 10 at 45 ms, so the port alternates
//    between the two counts every 25 ms and each is refreshed every 50 ms;
//  * at 45 ms loads the 14-bit data register with both counts, seven bits each
//    (turbo charger in bits 13:7, engine in bits 6:0, each held at 127).
// A count is presented only once its window was whole; until then Engtc stays
// 00. CntDat and Engtc are registered, so they change one cycle after the
// output event.
//
// The capture and output points, the Engtc codes and the 25 ms alternation are
// published. The first-window suppression, the 00 code and the contents of the
// data-register word are this design's choices.
module control_unit
  import ecu_pkg::*;
#(
  parameter int unsigned CW = COUNT_W
) (
  input  logic                clk,
  input  logic                rst_n,
  input  frame_ev_t           ev,
  input  logic [CW-1:0]       eng_buf,
  input  logic [CW-1:0]       tc_buf,
  output logic                timer_en,
  output logic                eng_en,
  output logic                tc_en,
  output logic                eng_capture,
  output logic                tc_capture,
  output logic [CNTDAT_W-1:0] cnt_dat,
  output engtc_e              engtc,
  output logic                data_load,
  output logic [DATA_W-1:0]   data_word
);

  logic eng_valid, tc_valid;  // buffer holds a whole window

  function automatic logic [6:0] sat7(input logic [CW-1:0] v);
    return (v > CW'(127)) ? 7'd127 : v[6:0];
  endfunction

  assign eng_capture = ev.eng_capture;
  assign tc_capture  = ev.tc_capture;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      timer_en  <= 1'b0;
      eng_en    <= 1'b0;
      tc_en     <= 1'b0;
      eng_valid <= 1'b0;
      tc_valid  <= 1'b0;
      cnt_dat   <= '0;
      engtc     <= SRC_NONE;
    end else begin
      timer_en <= 1'b1;
      if (ev.eng_capture) begin
        eng_en    <= 1'b1;
        eng_valid <= eng_en;
      end
      if (ev.tc_capture) begin
        tc_en    <= 1'b1;
        tc_valid <= tc_en;
      end
      if (ev.eng_output && eng_valid) begin
        cnt_dat <= CNTDAT_W'(eng_buf);
        engtc   <= SRC_ENGINE;
      end else if (ev.tc_output && tc_valid) begin
        cnt_dat <= CNTDAT_W'(tc_buf);
        engtc   <= SRC_TC;
      end
    end
  end

  assign data_load = ev.tc_output && tc_valid && eng_valid;
  assign data_word = {sat7(tc_buf), sat7(eng_buf)};

  // The timer never raises two events in one cycle.
  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(ev));

endmodule
