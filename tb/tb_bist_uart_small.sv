// Testbench of the self-testing UART at reduced, non-default parameters:
// a bit tick on every clock (BAUD_DIV = 0), another LFSR seed (8'hA5) and
// 20 patterns per session. This checks that seed and pattern count reach
// the generator, the ROM and the controller consistently. Three sessions:
// a clean one (correct, 40 matching comparisons, no overrun), one with the
// transmitter's serial output stuck at 1 (wrong, mismatches only on the
// transmitter side), and a clean one again. The clean session must take
// 16 bit times per pattern plus a short start and end.
module tb_bist_uart_small;
  import uart_bist_pkg::*;
  localparam int N = 20;
  logic clk = 0, rst = 1;
  logic cs_n = 1, rd_n = 1, wr_n = 1;
  byte_t d_in = '0, d_out;
  logic d_oe, ack = 0, txd, txd_valid, txrdy, txe;
  logic rx_en = 0, rxd = 0, rxrdy, rx_full, overrun;
  logic bist_start = 0, test_mode, bist_done, correct, wrong, rslt, cmp_valid;
  bist_state_e bist_state;
  byte_t data_out, y;
  logic lp_en = 0, lp_phase;
  logic [5:0] lp_q;
  int checks = 0, failures = 0;

  bist_uart #(.BAUD_DIV(0), .SEED(8'hA5), .N_PATTERNS(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  int n_cmp, n_bad, n_ovr;
  always @(posedge clk) if (!rst) begin
    if (cmp_valid) begin n_cmp++; if (!rslt) n_bad++; end
    if (overrun) n_ovr++;
  end

  task automatic session(output int clocks);
    n_cmp = 0; n_bad = 0; n_ovr = 0;
    bist_start = 1;
    repeat (2) begin @(posedge clk); #1; end
    check(test_mode && y == 8'hA5, $sformatf("session starts from the seed, y = %02h", y));
    clocks = 1;
    while (!bist_done) begin @(posedge clk); #1; clocks++; end
    bist_start = 0;
    repeat (3) begin @(posedge clk); #1; end
  endtask

  initial begin
    int c;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    @(posedge clk); #1;

    session(c);
    check(correct && !wrong, "clean session passes");
    check(n_cmp == 2 * N && n_bad == 0 && n_ovr == 0, $sformatf("%0d comparisons, %0d bad, %0d overruns", n_cmp, n_bad, n_ovr));
    check(c >= 16 * N && c <= 16 * N + 40, $sformatf("session took %0d clocks", c));
    $display("session at BAUD_DIV 0, %0d patterns: %0d clocks", N, c);

    force dut.tx_d = 1'b1;
    session(c);
    release dut.tx_d;
    check(wrong && !correct, "stuck-at-1 transmitter output detected");
    check(n_bad > 0 && n_bad <= N, $sformatf("%0d mismatches, all on the transmitter side", n_bad));

    session(c);
    check(correct && !wrong, "passes again after the fault is removed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
