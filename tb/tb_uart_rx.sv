// Testbench for uart_rx: a random serial stream is offered on every bit tick
// (tick on every clock in the first part, random later), with the receiver
// enable toggled at random, and a peripheral that reads the buffer at random
// times. A model of the 16-bit input-register + buffer chain decides which
// bits are taken: a bit is taken while fewer than 16 are held, otherwise it
// is lost and overrun pulses. Checked: rxrdy and rx_full every clock, every
// byte read equals the next eight taken bits (least significant first), the
// first byte appears exactly 16 ticks after its first bit, the next one
// 8 ticks later when read at once, and bits sent while full are lost.
module tb_uart_rx;
  logic clk = 0, rst = 1, en = 0, rxc = 0, rxd = 0, peri_rqt = 0;
  logic [7:0] rdata;
  logic rx_full, rxrdy, overrun;
  int checks = 0, failures = 0;

  uart_rx #(.W(8)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  bit taken_q [$];   // bits held in the chain
  int held = 0, reads = 0, lost = 0, lost_seen = 0;
  bit exp_overrun = 0;

  // model, evaluated with the DUT's inputs of this clock
  always @(posedge clk) begin
    if (rst) begin
      taken_q.delete(); held = 0; exp_overrun = 0;
    end else begin
      check(rxrdy == (held < 16 || peri_rqt), $sformatf("rxrdy %0d with %0d held", rxrdy, held));
      check(rx_full == (held == 16), $sformatf("rx_full %0d with %0d held", rx_full, held));
      check(overrun == exp_overrun, "overrun pulse");
      if (overrun) lost_seen++;
      exp_overrun = 0;
      if (peri_rqt && rx_full) begin
        logic [7:0] w;
        for (int b = 0; b < 8; b++) w[b] = taken_q[b];
        check(rdata == w, $sformatf("read %0d: %02h, expected %02h", reads, rdata, w));
        repeat (8) void'(taken_q.pop_front());
        held -= 8; reads++;
      end
      if (en && rxc) begin
        if (held < 16) begin
          taken_q.push_back(rxd); held++;
        end else begin
          lost++; exp_overrun = 1;
        end
      end
    end
  end

  int t_first = -1, t_full1 = -1, t_full2 = -1, tick = 0;

  initial begin
    repeat (2) @(posedge clk);
    rst <= 0;
    // Part 1: one bit per clock, peripheral reads at once: 16 then 8 ticks
    en <= 1; rxc <= 1;
    for (int c = 0; c < 40; c++) begin
      rxd <= 1'($urandom);
      peri_rqt <= rx_full && !peri_rqt;
      @(posedge clk); #1;
      tick++;
      if (rx_full && t_full1 < 0) t_full1 = tick;
      else if (rx_full && t_full2 < 0 && t_full1 >= 0 && tick > t_full1 + 1) t_full2 = tick;
    end
    check(t_full1 == 16, $sformatf("first byte after %0d ticks", t_full1));
    check(t_full2 == 24, $sformatf("second byte after %0d ticks", t_full2));
    // Part 2: no reads: the chain fills and the 17th bit onwards are lost
    peri_rqt <= 0; en <= 0;
    rst <= 1; @(posedge clk); rst <= 0;
    @(posedge clk); #1;
    lost = 0;
    en <= 1;
    for (int c = 0; c < 20; c++) begin
      rxd <= 1'($urandom);
      @(posedge clk); #1;
    end
    en <= 0;
    @(posedge clk);
    #1 check(lost == 4 && !rxrdy, $sformatf("%0d bits lost while full", lost));
    // Part 3: random ticks, enable and reads
    for (int c = 0; c < 20000; c++) begin
      rxd <= 1'($urandom);
      rxc <= ($urandom_range(0, 1) == 0);
      en  <= ($urandom_range(0, 7) != 0);
      peri_rqt <= ($urandom_range(0, 9) == 0);
      @(posedge clk);
    end
    check(reads > 100, $sformatf("%0d reads", reads));
    check(lost_seen > 10, $sformatf("%0d overruns", lost_seen));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
