// End-to-end testbench of the self-testing UART at its default parameters
// (bit tick every 16 clocks, 255 patterns per self-test session).
//   1. Normal mode, transmit: the host writes bytes over the bus (among
//      them the example words 10101010 and 10010101); the bits
//      on txd (txd_valid) must rebuild them. ack is dropped in the middle of
//      a byte, which must pause the transmission.
//   2. Normal mode, receive: bytes are shifted into rxd, one bit per bit
//      tick, and read over the bus; then bits are sent without reading
//      until the receiver is full and drops them (overrun).
//   3. Self test: bist_start runs a session, which must end with
//      bist_done and correct, with 2 x 255 comparisons all matching, within
//      the expected number of clocks.
//   4. A second session with the receiver's serial input stuck at 0 (a
//      forced fault) must end with wrong.
//   5. Back in normal mode the UART must transmit again.
//   6. The stand-alone low-power generator must give 100001 then 110000.
// Every mechanism is counted and must happen at least once.
module tb_bist_uart;
  import uart_bist_pkg::*;
  logic clk = 0, rst = 1;
  logic cs_n = 1, rd_n = 1, wr_n = 1;
  byte_t d_in = '0, d_out;
  logic d_oe, ack = 1, txd, txd_valid, txrdy, txe;
  logic rx_en = 0, rxd = 0, rxrdy, rx_full, overrun;
  logic bist_start = 0, test_mode, bist_done, correct, wrong, rslt, cmp_valid;
  bist_state_e bist_state;
  byte_t data_out, y;
  logic lp_en = 0, lp_phase;
  logic [5:0] lp_q;
  int checks = 0, failures = 0;

  bist_uart dut (.*);

  always #5 clk = ~clk;

  localparam int N = 255;
  localparam int TICK = 16;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  // mechanism counters
  int m_tx_byte, m_ack_pause, m_rx_byte, m_overrun, m_bist_pass, m_bist_fail;
  int m_mode_on, m_mode_off, m_cmp, m_cmp_bad, m_lp;

  // serial monitor on txd
  byte_t tx_sent [$];
  byte_t cur;
  int nbits = 0;
  logic tm_q = 0;
  always @(posedge clk) if (!rst) begin
    tm_q <= test_mode;
    if (test_mode && !tm_q) m_mode_on++;
    if (!test_mode && tm_q) m_mode_off++;
    if (overrun) m_overrun++;
    if (cmp_valid) begin m_cmp++; if (!rslt) m_cmp_bad++; end
    if (txd_valid) begin
      cur = {txd, cur[7:1]};
      nbits++;
      if (nbits == 8) begin
        check(tx_sent.size() > 0 && cur == tx_sent[0], $sformatf("txd byte %02h", cur));
        if (tx_sent.size() > 0) void'(tx_sent.pop_front());
        m_tx_byte++; nbits = 0;
      end
    end
  end

  task automatic clk1();
    @(posedge clk); #1;
  endtask

  task automatic bus_write(byte_t v);
    while (!txrdy) clk1();
    cs_n = 0; wr_n = 0; d_in = v;
    tx_sent.push_back(v);
    clk1();
    cs_n = 1; wr_n = 1;
    clk1();
  endtask

  task automatic bus_read(output byte_t v);
    cs_n = 0; rd_n = 0;
    clk1();
    check(d_oe, "bus driven on read");
    v = d_out;
    cs_n = 1; rd_n = 1;
    clk1();
  endtask

  // one bit into rxd, taken at the next bit tick
  task automatic rx_bit(logic b);
    rxd = b; rx_en = 1;
    @(posedge clk iff dut.tick);
    #1;
  endtask

  initial begin
    byte_t v, rv;
    longint t0, t1;
    byte_t rx_bytes[4] = '{8'h55, 8'hA7, 8'h01, 8'hFE};
    repeat (3) clk1();
    rst = 0;
    clk1();

    // 1. transmit, with an ack pause in the second byte
    bus_write(8'hAA);   // 10101010
    bus_write(8'h95);   // 10010101
    while (nbits != 3 || m_tx_byte != 1) clk1();
    ack = 0; m_ack_pause++;
    t0 = nbits;
    repeat (10 * TICK) clk1();
    check(nbits == t0, "no bits while ack is low");
    ack = 1;
    bus_write(8'h0F);
    while (!(txe && txrdy && tx_sent.size() == 0)) clk1();
    check(m_tx_byte == 3, $sformatf("%0d bytes transmitted", m_tx_byte));

    // 2. receive four bytes; the first is readable after 16 bits
    foreach (rx_bytes[i]) begin
      for (int b = 0; b < 8; b++) rx_bit(rx_bytes[i][b]);
      if (i >= 1) begin
        rx_en = 0;
        check(rx_full, "receiver buffer full");
        bus_read(rv);
        check(rv == rx_bytes[i-1], $sformatf("received %02h, expected %02h", rv, rx_bytes[i-1]));
        m_rx_byte++;
      end
    end
    // input register holds FE; 8 more bits fill the buffer, then 4 are lost
    for (int b = 0; b < 12; b++) rx_bit(1'b1);
    rx_en = 0;
    clk1();
    check(m_overrun == 4, $sformatf("%0d bits lost while full", m_overrun));
    bus_read(rv);
    check(rv == 8'hFE, "byte before the overrun kept");

    // 3. self-test session
    t0 = $time;
    m_cmp = 0;
    bist_start = 1;
    clk1();
    while (!bist_done) clk1();
    t1 = $time;
    check(correct && !wrong, "self test passes");
    check(m_cmp == 2 * N && m_cmp_bad == 0, $sformatf("%0d comparisons, %0d mismatches", m_cmp, m_cmp_bad));
    check((t1 - t0) / 10 <= (N + 2) * 17 * TICK, $sformatf("session took %0d clocks", (t1 - t0) / 10));
    if (correct) m_bist_pass++;
    $display("self-test session: %0d clocks", (t1 - t0) / 10);
    bist_start = 0;
    repeat (3) clk1();

    // 4. session with a stuck-at-0 receiver input
    force dut.rx_d = 1'b0;
    bist_start = 1;
    clk1();
    while (!bist_done) clk1();
    release dut.rx_d;
    check(wrong && !correct, "stuck-at fault detected");
    if (wrong) m_bist_fail++;
    bist_start = 0;
    repeat (3) clk1();

    // 5. normal mode again
    t0 = m_tx_byte;
    bus_write(8'h96);
    while (!(txe && txrdy && tx_sent.size() == 0)) clk1();
    check(m_tx_byte == t0 + 1, "transmits after the self test");

    // 6. low-power generator
    lp_en = 1;
    clk1();
    check(lp_q == 6'b100001, "lp_tpg first vector");   // Q5..Q0 printed: 100001 is symmetric
    clk1();
    check({lp_q[0], lp_q[1], lp_q[2], lp_q[3], lp_q[4], lp_q[5]} == 6'b110000, "lp_tpg second vector");
    m_lp++;
    lp_en = 0;

    check(m_tx_byte > 0, "mechanism: transmit");
    check(m_ack_pause > 0, "mechanism: ack pause");
    check(m_rx_byte > 0, "mechanism: receive");
    check(m_overrun > 0, "mechanism: receiver overrun");
    check(m_bist_pass > 0, "mechanism: self test pass");
    check(m_bist_fail > 0, "mechanism: self test detects a fault");
    check(m_mode_on == 2 && m_mode_off == 2, "mechanism: mode switch");
    check(m_lp > 0, "mechanism: low-power generator");
    $display("mechanisms: tx=%0d ack_pause=%0d rx=%0d overrun=%0d pass=%0d fail=%0d mode=%0d/%0d cmp=%0d lp=%0d",
             m_tx_byte, m_ack_pause, m_rx_byte, m_overrun, m_bist_pass, m_bist_fail, m_mode_on, m_mode_off, m_cmp, m_lp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
