// UART receiver: input register, receiver buffer register and receiver
// control logic.
//
// The serial line feeds an 8-bit input register (a shift register), and
// the input register feeds the 8-bit receiver buffer register serially, so
// together they form a 16-bit chain. While the receiver is enabled (en),
// each bit-clock tick (rxc) takes one bit from rxd, least significant bit
// first:
//   - while the input register holds fewer than 8 bits, the bit only enters
//     the input register;
//   - once the input register is full and the buffer is not, each new bit
//     also pushes the oldest bit of the input register into the buffer;
//   - when both are full the receiver is not ready (rxrdy = 0) and the bit
//     on rxd is lost (overrun pulses), unless the peripheral reads the
//     buffer in the same clock, which makes room for it.
// The first byte is therefore in the buffer (rx_full = 1, rdata valid)
// 16 ticks after its first bit, and, if the peripheral empties the buffer
// in time (at the latest in the clock after rx_full rises), every following
// byte 8 ticks after the previous one. The
// peripheral takes the byte by raising peri_rqt while rx_full is 1; rdata is
// valid in that cycle and the buffer counts as empty from the next one.
// The chain, the serial transfer, the 16/8-tick timing and the loss of bits
// arriving while full follow the document; bit order, the overrun pulse and
// the exact handshake are this design's choices.
module uart_rx #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst,       // synchronous, active high
  input  logic         en,        // receiver enable
  input  logic         rxc,       // bit-clock tick
  input  logic         rxd,       // serial data
  input  logic         peri_rqt,  // peripheral takes the buffered byte
  output logic [W-1:0] rdata,     // receiver buffer register (R0-R7)
  output logic         rx_full,   // receiver buffer holds a byte
  output logic         rxrdy,     // receiver can take a bit
  output logic         overrun    // a bit arrived while not ready and was lost
);

  localparam int unsigned CW = $clog2(W + 1);

  logic [W-1:0]  in_reg;
  logic [W-1:0]  rx_buf;
  logic [CW-1:0] in_cnt;   // bits held in the input register
  logic [CW-1:0] buf_cnt;  // bits held in the buffer
  logic          in_full;
  logic          take;
  logic          read;

  assign in_full = (in_cnt == CW'(W));
  assign rx_full = (buf_cnt == CW'(W));
  assign rxrdy   = !(in_full && rx_full) || peri_rqt;
  assign take    = en && rxc && rxrdy;
  assign read    = peri_rqt && rx_full;
  assign rdata   = rx_buf;

  always_ff @(posedge clk) begin
    if (rst) begin
      in_reg  <= '0;
      rx_buf  <= '0;
      in_cnt  <= '0;
      buf_cnt <= '0;
      overrun <= 1'b0;
    end else begin
      overrun <= en && rxc && !rxrdy;
      if (read) buf_cnt <= '0;
      if (take) begin
        in_reg <= {rxd, in_reg[W-1:1]};
        if (!in_full) begin
          in_cnt <= in_cnt + 1'b1;
        end else begin
          // in_full and buffer not full, or being read in this clock
          rx_buf  <= {in_reg[0], rx_buf[W-1:1]};
          buf_cnt <= (read ? CW'(0) : buf_cnt) + 1'b1;
        end
      end
    end
  end

  a_counts_in_range: assert property (@(posedge clk) disable iff (rst)
    (in_cnt <= CW'(W)) && (buf_cnt <= CW'(W)));

endmodule
