// UART with built-in self test.
//
// The UART (host bus interface, transmitter, receiver and a bit-clock
// generator) is the circuit under test. The self-test hardware around it is
//   - lfsr_tpg:    8-bit LFSR pattern generator; each pattern goes in
//                  parallel to the transmitter and, through a PISO, serially
//                  to the receiver;
//   - pattern_rom: the expected patterns, in order;
//   - tra_compare: the response analyser: collects the transmitter's serial
//                  output in a SIPO, compares it and the receiver's parallel
//                  output with the ROM;
//   - bist_ctrl:   the BIST controller unit, which starts the session,
//                  switches the test multiplexer, paces the patterns and
//                  reports bist_done with correct or wrong.
// The test multiplexer in this module selects, while test_mode is high, the
// generator and controller in place of the host bus and the rxd/ack/rx_en
// pins; txd is held at its idle level 1 during a session. A session checks
// N_PATTERNS patterns on each side and ends with correct = 1 if every word
// matched. One session at the defaults takes about 16 bit times per pattern,
// i.e. roughly N_PATTERNS * 16 * (BAUD_DIV + 1) clocks.
// Beside the UART stands the document's low-power test pattern generator
// (two interleaved 3-stage LFSRs, lp_tpg) with its own ports; the document
// describes it but does not connect it to the UART.
// Structure and parts follow the document; the multiplexer placement, the
// restart pulse and all handshakes are this design's.
module bist_uart
  import uart_bist_pkg::*;
#(
  parameter int unsigned BAUD_DIV   = 15,
  parameter byte_t       SEED       = LFSR_SEED,
  parameter int unsigned N_PATTERNS = 255
) (
  input  logic        clk,
  input  logic        rst,         // synchronous, active high
  // host bus
  input  logic        cs_n,
  input  logic        rd_n,
  input  logic        wr_n,
  input  byte_t       d_in,
  output byte_t       d_out,
  output logic        d_oe,
  // transmitter pins
  input  logic        ack,
  output logic        txd,
  output logic        txd_valid,
  output logic        txrdy,
  output logic        txe,
  // receiver pins
  input  logic        rx_en,
  input  logic        rxd,
  output logic        rxrdy,
  output logic        rx_full,
  output logic        overrun,
  // self test
  input  logic        bist_start,
  output logic        test_mode,
  output bist_state_e bist_state,  // controller state
  output logic        bist_done,
  output logic        correct,
  output logic        wrong,
  output logic        rslt,        // last comparison matched
  output logic        cmp_valid,
  output byte_t       data_out,    // last word compared
  output byte_t       y,           // current LFSR pattern
  // low-power pattern generator, stand-alone
  input  logic        lp_en,
  output logic [5:0]  lp_q,
  output logic        lp_phase
);

  localparam int unsigned AW = $clog2(N_PATTERNS);

  logic tick;
  logic restart, cut_rst;

  // host interface
  byte_t bus_db;
  logic  bus_wr, bus_rqt;
  // transmitter
  byte_t tx_db;
  logic  tx_wr, tx_ack, tx_d, tx_dv;
  // receiver
  byte_t rx_data;
  logic  rx_en_m, rx_d, rx_rqt;
  // BIST
  byte_t          pp;
  logic           ps, ps_valid, ser_done, trigger;
  logic           ctl_wr, ctl_rqt;
  logic [AW-1:0]  tx_idx, rx_idx;
  byte_t          romd_tx, romd_rx;
  logic [AW:0]    n_tx, n_rx, n_fail;

  assign cut_rst = rst || restart;

  baud_gen #(.DIV_W(16)) u_baud (
    .clk (clk), .rst (rst), .div (16'(BAUD_DIV)), .tick (tick)
  );

  uart_bus_if u_bus (
    .clk (clk), .rst (cut_rst),
    .cs_n (cs_n), .rd_n (rd_n), .wr_n (wr_n),
    .d_in (d_in), .d_out (d_out), .d_oe (d_oe),
    .db (bus_db), .wr (bus_wr), .rdata (rx_data), .rx_full (rx_full),
    .peri_rqt (bus_rqt)
  );

  // Test multiplexer
  always_comb begin
    if (test_mode) begin
      tx_db   = pp;
      tx_wr   = ctl_wr;
      tx_ack  = 1'b1;
      rx_en_m = ps_valid;
      rx_d    = ps;
      rx_rqt  = ctl_rqt;
    end else begin
      tx_db   = bus_db;
      tx_wr   = bus_wr;
      tx_ack  = ack;
      rx_en_m = rx_en;
      rx_d    = rxd;
      rx_rqt  = bus_rqt;
    end
  end

  uart_tx #(.W(DATA_W)) u_tx (
    .clk (clk), .rst (cut_rst),
    .db (tx_db), .wr (tx_wr), .txc (tick), .ack (tx_ack),
    .txd (tx_d), .txd_valid (tx_dv), .txrdy (txrdy), .txe (txe)
  );

  assign txd       = test_mode ? 1'b1 : tx_d;
  assign txd_valid = test_mode ? 1'b0 : tx_dv;

  uart_rx #(.W(DATA_W)) u_rx (
    .clk (clk), .rst (cut_rst),
    .en (rx_en_m), .rxc (tick), .rxd (rx_d), .peri_rqt (rx_rqt),
    .rdata (rx_data), .rx_full (rx_full), .rxrdy (rxrdy), .overrun (overrun)
  );

  lfsr_tpg #(.SEED(SEED)) u_tpg (
    .clk (clk), .rst (cut_rst),
    .trigger (trigger), .bit_en (tick),
    .pp (pp), .ps (ps), .ps_valid (ps_valid), .ser_done (ser_done)
  );

  assign y = pp;

  pattern_rom #(.DEPTH(N_PATTERNS), .SEED(SEED)) u_rom (
    .addr_a (tx_idx), .data_a (romd_tx),
    .addr_b (rx_idx), .data_b (romd_rx)
  );

  tra_compare #(.AW(AW)) u_tra (
    .clk (clk), .rst (rst), .clear (restart),
    .tx_bit (tx_d), .tx_bit_valid (tx_dv && test_mode),
    .rx_data (rx_data), .rx_strobe (ctl_rqt),
    .tx_idx (tx_idx), .romd_tx (romd_tx),
    .rx_idx (rx_idx), .romd_rx (romd_rx),
    .cmp_valid (cmp_valid), .rslt (rslt), .data_out (data_out),
    .n_tx (n_tx), .n_rx (n_rx), .n_fail (n_fail)
  );

  bist_ctrl #(.N_PATTERNS(N_PATTERNS), .AW(AW)) u_ctrl (
    .clk (clk), .rst (rst), .bist_start (bist_start),
    .ser_done (ser_done), .trigger (trigger),
    .txrdy (txrdy), .rx_full (rx_full), .wr (ctl_wr), .peri_rqt (ctl_rqt),
    .n_tx (n_tx), .n_rx (n_rx), .n_fail (n_fail),
    .restart (restart), .test_mode (test_mode), .state (bist_state),
    .bist_done (bist_done), .correct (correct), .wrong (wrong)
  );

  lp_tpg u_lp (
    .clk (clk), .rst (rst), .en (lp_en), .q (lp_q), .phase (lp_phase)
  );

endmodule
