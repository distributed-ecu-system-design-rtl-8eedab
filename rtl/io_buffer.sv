// io_buffer: MCU data-bus interface with its I/O buffer register.
//
// The programmable device has no three-state pins, so the byte-wide bus is
// split into an input (din) and an output (dout) with an output enable (doe)
// that the board uses to drive the shared lines. CS# high: doe low, the bus is
// released. CS# low with R/W# high: a read, doe high and dout carries the I/O
// buffer register. CS# low with R/W# low: a write, the byte on din is stored
// in the I/O buffer register.
//
// CS# and R/W# come from port pins of the MCU and are asynchronous to the
// clock, so both pass through two flip-flops. An access starts when the
// synchronised CS# falls; in that cycle the block pulses wr_stb (write, din
// is stored) or rd_stb (read, the buffer takes rd_data and dout shows it from
// the next cycle). The MCU must hold CS# low, R/W# and din steady for at least
// four clock cycles and read dout in the last of them.
//
// The split bus, the CS#/R/W# decoding and the buffer register are the
// published behaviour; synchronisers, strobes and access timing are this
// design's.
module io_buffer
  import ecu_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             cs_n,
  input  logic             rw,        // 1 = read, 0 = write
  input  logic [BUS_W-1:0] din,
  output logic [BUS_W-1:0] dout,
  output logic             doe,
  input  logic [BUS_W-1:0] rd_data,   // byte offered for the next read
  output logic             rd_stb,
  output logic             wr_stb,
  output logic [BUS_W-1:0] wr_data    // byte being written, valid with wr_stb
);

  logic [1:0] cs_sync, rw_sync;
  logic       cs_q;                   // synchronised CS#, one cycle later
  logic [BUS_W-1:0] buffer;
  logic       start;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cs_sync <= 2'b11;
      rw_sync <= 2'b11;
      cs_q    <= 1'b1;
    end else begin
      cs_sync <= {cs_sync[0], cs_n};
      rw_sync <= {rw_sync[0], rw};
      cs_q    <= cs_sync[1];
    end
  end

  assign start  = cs_q && !cs_sync[1];
  assign rd_stb = start &&  rw_sync[1];
  assign wr_stb = start && !rw_sync[1];

  always_ff @(posedge clk) begin
    if (!rst_n)      buffer <= '0;
    else if (wr_stb) buffer <= din;
    else if (rd_stb) buffer <= rd_data;
  end

  assign wr_data = din;
  assign dout    = buffer;
  assign doe     = !cs_n && rw;

endmodule
