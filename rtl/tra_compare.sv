// Test response analyser: compares the UART's outputs with the ROM.
//
// Transmitter side: the transmitter's serial output is collected by a SIPO
// (a shift register taking tx_bit on each tx_bit_valid, least significant
// bit first); after eight bits the word is compared with ROM entry tx_idx
// and tx_idx moves on. Receiver side: the receiver's parallel output needs
// no SIPO; on rx_strobe, the cycle in which the receiver buffer is read,
// rx_data is compared with ROM entry rx_idx and rx_idx moves on. The ROM is
// outside this block; tx_idx and rx_idx are its two read addresses and
// romd_tx and romd_rx the words read back.
// Each comparison gives, one clock later, a cmp_valid pulse with rslt = 1
// for a match and data_out = the word checked (transmitter wins if both
// compare in the same cycle; both are still counted). Mismatches are
// counted in n_fail and comparisons in n_tx / n_rx. clear restarts the
// session. Comparing both the transmitter and the receiver output with a
// ROM of expected patterns, and the SIPO on the transmitter side, are the
// document's; counters and flags are this design's.
module tra_compare
  import uart_bist_pkg::*;
#(
  parameter int unsigned AW = 8
) (
  input  logic          clk,
  input  logic          rst,          // synchronous, active high
  input  logic          clear,        // start a new test session
  input  logic          tx_bit,       // transmitter serial output
  input  logic          tx_bit_valid,
  input  byte_t         rx_data,      // receiver parallel output
  input  logic          rx_strobe,    // rx_data is read now
  output logic [AW-1:0] tx_idx,       // ROM address, transmitter check
  input  byte_t         romd_tx,
  output logic [AW-1:0] rx_idx,       // ROM address, receiver check
  input  byte_t         romd_rx,
  output logic          cmp_valid,    // a comparison finished
  output logic          rslt,         // 1: last comparison matched
  output byte_t         data_out,     // word of the last comparison
  output logic [AW:0]   n_tx,         // transmitter words checked
  output logic [AW:0]   n_rx,         // receiver words checked
  output logic [AW:0]   n_fail        // mismatches
);

  logic [DATA_W-2:0] sipo; // the first seven bits of a word
  logic [2:0] bit_cnt;
  logic       tx_word;    // eighth bit arrives this cycle
  byte_t      tx_w;       // the completed word
  logic       tx_ok, rx_ok;

  assign tx_word = tx_bit_valid && (bit_cnt == 3'd7);
  assign tx_w    = {tx_bit, sipo};
  assign tx_ok   = (tx_w == romd_tx);
  assign rx_ok   = (rx_data == romd_rx);

  always_ff @(posedge clk) begin
    if (rst || clear) begin
      sipo      <= '0;
      bit_cnt   <= '0;
      tx_idx    <= '0;
      rx_idx    <= '0;
      cmp_valid <= 1'b0;
      rslt      <= 1'b0;
      data_out  <= '0;
      n_tx      <= '0;
      n_rx      <= '0;
      n_fail    <= '0;
    end else begin
      cmp_valid <= tx_word || rx_strobe;
      if (tx_bit_valid) begin
        sipo    <= tx_w[DATA_W-1:1];
        bit_cnt <= bit_cnt + 1'b1;
      end
      if (rx_strobe) begin
        rslt     <= rx_ok;
        data_out <= rx_data;
        rx_idx   <= rx_idx + 1'b1;
        n_rx     <= n_rx + 1'b1;
      end
      if (tx_word) begin
        rslt     <= tx_ok;
        data_out <= tx_w;
        tx_idx   <= tx_idx + 1'b1;
        n_tx     <= n_tx + 1'b1;
      end
      n_fail <= n_fail + (AW+1)'(tx_word && !tx_ok) + (AW+1)'(rx_strobe && !rx_ok);
    end
  end

endmodule
