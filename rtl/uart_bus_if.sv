// Host side of the UART: data bus buffer and read/write control logic.
//
// The host sees an 8-bit data bus (split here into d_in, d_out and the
// output enable d_oe) and active-low chip select, read and write strobes,
// sampled on clk. The first clock of a write access (cs_n = 0, wr_n = 0)
// copies d_in into the data bus buffer, and in the next clock wr is high
// for one clock with that byte on db; the transmitter takes it if its
// buffer is empty (txrdy, a pin the host watches). The first
// clock of a read access (cs_n = 0, rd_n = 0) copies the receiver buffer
// into the data bus buffer and, if the receiver holds a byte, raises
// peri_rqt for one clock so the receiver frees its buffer. d_out shows the
// data bus buffer and d_oe is high for the whole read access, so the byte is
// on the bus from the second clock of the access on. There is no address
// input: status is given by the TxRDY, TxE and RxRDY pins, not a register.
// The blocks and the CS/RD/WR pins come from the document's UART block
// diagram; the strobe timing is this design's.
module uart_bus_if
  import uart_bist_pkg::*;
(
  input  logic  clk,
  input  logic  rst,       // synchronous, active high
  input  logic  cs_n,
  input  logic  rd_n,
  input  logic  wr_n,
  input  byte_t d_in,
  output byte_t d_out,
  output logic  d_oe,
  // internal data bus
  output byte_t db,        // to the transmit buffer
  output logic  wr,        // transmitter write
  input  byte_t rdata,     // from the receiver buffer
  input  logic  rx_full,
  output logic  peri_rqt   // receiver read
);

  logic  rd_acc, wr_acc;
  logic  rd_q, wr_q;
  byte_t dbuf;     // data bus buffer, read direction
  byte_t wbuf;     // data bus buffer, write direction

  assign rd_acc   = !cs_n && !rd_n;
  assign wr_acc   = !cs_n && !wr_n;
  assign db       = wbuf;
  assign peri_rqt = rd_acc && !rd_q && rx_full;
  assign d_out    = dbuf;
  assign d_oe     = rd_acc;

  always_ff @(posedge clk) begin
    if (rst) begin
      rd_q <= 1'b0;
      wr_q <= 1'b0;
      wr   <= 1'b0;
      dbuf <= '0;
      wbuf <= '0;
    end else begin
      rd_q <= rd_acc;
      wr_q <= wr_acc;
      wr   <= wr_acc && !wr_q;
      if (rd_acc && !rd_q) dbuf <= rdata;
      if (wr_acc && !wr_q) wbuf <= d_in;
    end
  end

endmodule
