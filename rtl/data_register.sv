// data_register: 14-bit data register read and written a byte at a time.
//
// The register is wider than the byte-wide MCU bus, so every transfer takes
// two bus accesses, low byte first, then high byte (bits 13:8 in the low six
// bits of the byte, the top two bits read as 0). A pointer flip-flop (toggle)
// says which byte comes next; each read or write strobe advances it.
//  * Write: the first byte is held in a staging register; the second byte
//    completes the word, which is stored and announced by a one-cycle wr_done
//    with the word on q, for the unit that takes it over.
//  * Read: rd_data offers the byte the pointer selects.
//  * Internal load: `load` replaces the word with `load_word`. If it arrives
//    between the two halves of a transfer it is held and applied when the
//    pair is complete, so a read never mixes two words.
// The 14-bit width, the byte-wide bus and the low-then-high order are
// published; the pointer, staging and deferred load are this design's.
module data_register
  import ecu_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              rd_stb,
  input  logic              wr_stb,
  input  logic [BUS_W-1:0]  wr_data,
  output logic [BUS_W-1:0]  rd_data,
  input  logic              load,
  input  logic [DATA_W-1:0] load_word,
  output logic [DATA_W-1:0] q,
  output logic              wr_done,
  output logic              toggle
);

  localparam int unsigned HI_W = DATA_W - BUS_W;

  logic [BUS_W-1:0]  low_stage;
  logic              pend;
  logic [DATA_W-1:0] pend_word;

  assign rd_data = toggle ? BUS_W'(q[DATA_W-1:BUS_W]) : q[BUS_W-1:0];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      q         <= '0;
      toggle    <= 1'b0;
      low_stage <= '0;
      pend      <= 1'b0;
      pend_word <= '0;
      wr_done   <= 1'b0;
    end else begin
      wr_done <= 1'b0;
      if (wr_stb || rd_stb) toggle <= !toggle;
      if (wr_stb && !toggle) low_stage <= wr_data;
      if (wr_stb && toggle) begin
        q       <= {wr_data[HI_W-1:0], low_stage};
        wr_done <= 1'b1;
      end else begin
        // a load (new or held) takes effect when no transfer is half done
        if (load && !toggle && !(wr_stb || rd_stb)) begin
          q    <= load_word;
          pend <= 1'b0;
        end else if (load) begin
          pend      <= 1'b1;
          pend_word <= load_word;
        end else if (pend && (toggle ? rd_stb : !(wr_stb || rd_stb))) begin
          q    <= pend_word;
          pend <= 1'b0;
        end
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) !(rd_stb && wr_stb));

endmodule
