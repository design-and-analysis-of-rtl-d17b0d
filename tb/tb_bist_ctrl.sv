// Testbench for bist_ctrl with a small N_PATTERNS and simple models of its
// surroundings: a pattern generator that finishes serialising a pattern a
// random time after each trigger (sometimes before the transmitter is free),
// a transmitter whose buffer frees a random time after each write, a
// receiver that fills once per pattern after the second, and an analyser
// that counts words (with a chosen number of mismatches). Checked: the
// restart pulse, test_mode only during the session, N writes and N
// triggers, N+1 serialised patterns, receiver reads whenever it is full, and
// bist_done with correct or wrong as the mismatch count says, for a passing
// and a failing session.
module tb_bist_ctrl;
  import uart_bist_pkg::*;
  localparam int N = 12;
  logic clk = 0, rst = 1, bist_start = 0;
  logic ser_done = 0, trigger, txrdy = 1, rx_full = 0, wr, peri_rqt;
  logic [8:0] n_tx = '0, n_rx = '0, n_fail = '0;
  logic restart, test_mode, bist_done, correct, wrong;
  bist_state_e state;
  int checks = 0, failures = 0;

  bist_ctrl #(.N_PATTERNS(N), .AW(8)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  int n_wr, n_trig, n_ser, n_restart, n_read, inject;
  int ser_timer, tx_timer, rx_timer;

  // models, all updated at the clock edge
  always @(posedge clk) begin
    if (restart) begin
      n_tx <= '0; n_rx <= '0; n_fail <= '0;
      ser_timer = $urandom_range(3, 30); tx_timer = 0; rx_timer = 0;
      rx_full <= 0; txrdy <= 1; n_restart++;
    end else begin
      ser_done <= 0;
      if (ser_timer > 0) begin
        ser_timer--;
        if (ser_timer == 0) begin
          ser_done <= 1; n_ser++;
          if (n_ser >= 2 && n_ser <= N + 1) rx_timer = $urandom_range(1, 5);
        end
      end
      if (trigger) begin n_trig++; ser_timer = $urandom_range(3, 30); end
      if (wr) begin
        check(txrdy, "write only when ready");
        n_wr++; txrdy <= 0; tx_timer = $urandom_range(5, 40);
      end
      if (tx_timer > 0) begin
        tx_timer--;
        if (tx_timer == 0) begin
          txrdy <= 1; n_tx <= n_tx + 1;
          if (inject > 0) begin n_fail <= n_fail + 1; inject--; end
        end
      end
      if (rx_timer > 0) begin
        rx_timer--;
        if (rx_timer == 0) rx_full <= 1;
      end
      if (peri_rqt) begin
        check(rx_full && test_mode, "read only when full, in test mode");
        rx_full <= 0; n_rx <= n_rx + 1; n_read++;
      end
    end
  end

  task automatic session(int fails_to_inject);
    n_wr = 0; n_trig = 0; n_ser = 0; n_restart = 0; n_read = 0;
    inject = fails_to_inject;
    bist_start <= 1;
    @(posedge clk); #1;
    while (!bist_done) begin
      @(posedge clk); #1;
      if (n_read > 0) check(test_mode || bist_done, "test_mode during session");
    end
    check(!test_mode, "normal mode after the session");
    check(n_restart == 1, "one restart pulse");
    check(n_wr == N, $sformatf("%0d writes", n_wr));
    check(n_trig == N, $sformatf("%0d triggers", n_trig));
    check(n_ser == N + 1, $sformatf("%0d patterns serialised", n_ser));
    check(n_read == N, $sformatf("%0d receiver reads", n_read));
    check(correct == (fails_to_inject == 0) && wrong == (fails_to_inject != 0), "result flags");
    repeat (5) @(posedge clk); #1;
    check(bist_done && correct == (fails_to_inject == 0), "result holds");
    bist_start <= 0;
    repeat (3) @(posedge clk); #1;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst <= 0;
    repeat (3) @(posedge clk); #1;
    check(!test_mode && !bist_done, "idle after reset");
    session(0);
    session(2);
    session(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
