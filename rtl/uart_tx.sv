// UART transmitter: transmit buffer register, output register and
// transmitter control logic.
//
// Data moves through two 8-bit registers as in the document's transmitter:
//   1. A write (wr, one clock) loads db in parallel into the transmit buffer,
//      a PISO, when the buffer is empty (txrdy = 1).
//   2. When the output register is empty (txe = 1), the buffer is shifted
//      serially into the output register, a serial-in serial-out register,
//      one bit per bit-clock tick (txc), 8 ticks. The buffer is then empty
//      again and can take the next byte while the output register sends.
//   3. While ack is high, each txc tick sends one bit of the output register
//      on txd, least significant first, 8 ticks per byte. ack low pauses the
//      transmission. After the eighth bit txe goes back to 1.
// txd_valid is high in the cycle in which txd holds a bit and that bit is
// taken (ack & txc); between bytes txd idles at 1. There are no start, stop
// or parity bits: the document's transmitter sends the 8 data bits only.
// The two counters, the buffer-to-output transfer and the ACK handshake
// follow the document; bit order, idle level, one clock with tick enables,
// and txd_valid are this design's choices. Latency from wr to the first bit
// on txd is 1 clock plus 8 ticks plus the wait for the next tick with ack.
module uart_tx #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst,        // synchronous, active high
  input  logic [W-1:0] db,         // parallel data from the data bus
  input  logic         wr,         // write strobe, taken when txrdy = 1
  input  logic         txc,        // bit-clock tick
  input  logic         ack,        // receiving side ready: send bits
  output logic         txd,        // serial data
  output logic         txd_valid,  // txd holds a bit that is taken this cycle
  output logic         txrdy,      // transmit buffer empty
  output logic         txe         // output register empty
);

  localparam int unsigned CW = $clog2(W);

  logic          buf_full;     // transmit buffer holds a byte
  logic          out_full;     // output register holds a byte being sent
  logic          xfer;         // buffer -> output transfer in progress
  logic [CW-1:0] xfer_cnt;     // buffer counter
  logic [CW-1:0] send_cnt;     // output register counter
  logic [W-1:0]  out_reg;
  logic          buf_so;
  logic          xfer_shift;   // one bit moves from buffer to output register
  logic          send_shift;   // one bit leaves on txd

  assign txrdy      = !buf_full;
  assign txe        = !out_full;
  assign xfer_shift = xfer && txc;
  assign send_shift = out_full && ack && txc;
  assign txd        = out_full ? out_reg[0] : 1'b1;
  assign txd_valid  = send_shift;

  piso8 #(.W(W)) u_buf (
    .clk      (clk),
    .rst      (rst),
    .reg_load (wr && !buf_full),
    .sel      (!xfer),          // hold unless transferring
    .shift_en (txc),
    .d        (db),
    .so       (buf_so)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      buf_full <= 1'b0;
      out_full <= 1'b0;
      xfer     <= 1'b0;
      xfer_cnt <= '0;
      send_cnt <= '0;
      out_reg  <= '0;
    end else begin
      if (wr && !buf_full) buf_full <= 1'b1;

      // Transfer starts when a byte waits and the output register is empty.
      if (!xfer && buf_full && !out_full) begin
        xfer     <= 1'b1;
        xfer_cnt <= '0;
      end

      if (xfer_shift) begin
        out_reg  <= {buf_so, out_reg[W-1:1]};
        xfer_cnt <= xfer_cnt + 1'b1;
        if (xfer_cnt == CW'(W-1)) begin
          xfer     <= 1'b0;
          buf_full <= 1'b0;
          out_full <= 1'b1;
          send_cnt <= '0;
        end
      end

      if (send_shift) begin
        out_reg  <= {1'b1, out_reg[W-1:1]};
        send_cnt <= send_cnt + 1'b1;
        if (send_cnt == CW'(W-1)) out_full <= 1'b0;
      end
    end
  end

  // The transfer only runs into an empty output register, so the two shift
  // paths never act in the same cycle.
  a_no_overlap: assert property (@(posedge clk) disable iff (rst) !(xfer_shift && send_shift));
  a_xfer_needs_byte: assert property (@(posedge clk) disable iff (rst) xfer |-> buf_full);

endmodule
