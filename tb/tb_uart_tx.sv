// Testbench for uart_tx: the host writes random bytes whenever txrdy allows,
// the bit clock ticks every third clock, and ack is dropped at random to
// pause the transmission. Bits taken from txd on txd_valid must rebuild the
// written bytes in order, least significant bit first. Also checked:
// writes while the buffer is full are ignored, txd idles at 1, the
// buffer-to-output transfer takes exactly 8 ticks, a byte takes exactly
// 8 ticks with ack high, and txrdy/txe return to 1 at the end.
module tb_uart_tx;
  logic clk = 0, rst = 1, wr = 0, txc = 0, ack = 0;
  logic [7:0] db = '0;
  logic txd, txd_valid, txrdy, txe;
  int checks = 0, failures = 0;
  int tick_no = 0;
  int pauses = 0, ignored_writes = 0;

  uart_tx #(.W(8)) dut (.*);

  always #5 clk = ~clk;

  // bit clock: one tick every third clock
  int div = 0;
  always @(posedge clk) begin
    div <= (div == 2) ? 0 : div + 1;
    txc <= (div == 2);
    if (txc) tick_no <= tick_no + 1;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  logic [7:0] sent_q [$];
  logic [7:0] cur;
  int nbits = 0, nbytes = 0;
  int first_tick, txe_fall_tick, wr_tick;
  bit measuring = 0;

  // receiver model on the serial side
  always @(posedge clk) if (!rst) begin
    if (txd_valid) begin
      cur = {txd, cur[7:1]};
      if (nbits == 0) first_tick = tick_no;
      nbits++;
      if (nbits == 8) begin
        check(sent_q.size() > 0 && cur == sent_q[0],
              $sformatf("byte %0d: got %02h", nbytes, cur));
        if (sent_q.size() > 0) void'(sent_q.pop_front());
        // with ack held high the byte spans eight consecutive ticks
        if (ack_steady) check(tick_no - first_tick == 7, $sformatf("byte took %0d ticks", tick_no - first_tick + 1));
        nbits = 0; nbytes++;
      end
    end else if (txe) begin
      checks++;
      if (txd !== 1'b1) begin failures++; $display("FAIL txd not idle"); end
    end
  end

  bit ack_steady = 1;
  int n_to_send = 150;

  initial begin
    repeat (3) @(posedge clk); #1;
    rst <= 0;
    @(posedge clk); #1;
    check(txrdy && txe, "empty after reset");
    // First byte with ack low: measure the transfer time
    ack <= 0;
    @(posedge clk); #1;
    db <= 8'hA5; wr <= 1;
    sent_q.push_back(8'hA5);
    @(posedge clk); #1;
    wr <= 0; wr_tick = tick_no;
    #1 check(!txrdy, "buffer full after write");
    // write while full is ignored
    db <= 8'h3C; wr <= 1;
    @(posedge clk); #1;
    wr <= 0; ignored_writes++;
    wait (!txe);
    @(posedge clk); #1;
    // the transfer starts in the clock after the write, so a tick in that
    // clock is not yet used: 8 ticks of transfer, 8 or 9 ticks elapsed
    check(tick_no - wr_tick inside {8, 9}, $sformatf("transfer took %0d ticks", tick_no - wr_tick));
    #1 check(txrdy, "buffer empty after transfer");
    repeat (20) @(posedge clk); #1;
    check(nbits == 0 && !txe, "no bits while ack is low");
    ack <= 1;
    // stream of random bytes
    for (int i = 0; i < n_to_send; i++) begin
      logic [7:0] v = 8'($urandom);
      while (!txrdy) begin @(posedge clk); #1; end
      db <= v; wr <= 1; sent_q.push_back(v);
      @(posedge clk); #1;
      wr <= 0;
      // second half: random ack pauses
      if (i > n_to_send / 2) begin
        ack_steady = 0;
        if ($urandom_range(0, 3) == 0) begin
          ack <= 0; pauses++;
          repeat ($urandom_range(1, 30)) @(posedge clk);
          #1;
          ack <= 1;
        end
      end
    end
    ack <= 1;
    while (!(txe && txrdy)) begin @(posedge clk); #1; end
    repeat (10) @(posedge clk); #1;
    check(nbytes == n_to_send + 1, $sformatf("%0d bytes sent", nbytes));
    check(sent_q.size() == 0, "every byte sent");
    check(pauses > 0, "ack pauses exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
