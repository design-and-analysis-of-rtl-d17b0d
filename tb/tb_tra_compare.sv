// Testbench for tra_compare with a model ROM in the testbench (independent
// LFSR formula). The transmitter side gets serial words, least significant
// bit first, the receiver side parallel words; some words are corrupted on
// purpose. Checked: the ROM addresses advance once per word on each side,
// rslt and data_out after each comparison, the word and mismatch counters,
// a transmitter and a receiver comparison in the same clock, and clear.
module tb_tra_compare;
  import uart_bist_pkg::*;
  logic clk = 0, rst = 1, clear = 0;
  logic tx_bit = 0, tx_bit_valid = 0, rx_strobe = 0;
  byte_t rx_data = '0, romd_tx, romd_rx;
  logic [7:0] tx_idx, rx_idx;
  logic cmp_valid, rslt;
  byte_t data_out;
  logic [8:0] n_tx, n_rx, n_fail;
  int checks = 0, failures = 0;

  tra_compare #(.AW(8)) dut (.*);

  always #5 clk = ~clk;

  function automatic byte_t ref_next(byte_t q);
    return {q[6:0], 1'b0} ^ (q[7] ? 8'h63 : 8'h00);
  endfunction
  function automatic byte_t rom(int k);
    byte_t q = 8'h02;
    for (int i = 0; i < k; i++) q = ref_next(q);
    return q;
  endfunction
  assign romd_tx = rom(int'(tx_idx));
  assign romd_rx = rom(int'(rx_idx));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  int exp_fail = 0, ntx = 0, nrx = 0;
  logic [7:0] gaps;  // idle clocks between serial bits

  task automatic send_tx(byte_t w, bit also_rx, byte_t rw);
    int bi;
    bi = 0;
    while (bi < 8) begin
      tx_bit = w[bi]; tx_bit_valid = 1;
      if (bi == 7 && also_rx) begin rx_data = rw; rx_strobe = 1; end
      @(posedge clk);
      #1;
      tx_bit_valid = 0; rx_strobe = 0;
      if (bi < 7 && gaps[bi]) begin
        @(posedge clk);
        #1;
      end
      bi++;
    end
  endtask

  initial begin
    byte_t w, rw;
    bit bad, rbad;
    repeat (2) @(posedge clk);
    rst <= 0;
    @(posedge clk); #1;
    for (int k = 0; k < 60; k++) begin
      // transmitter word
      bad = ($urandom_range(0, 4) == 0);
      w = rom(ntx) ^ (bad ? 8'(1 << $urandom_range(0, 7)) : 8'h00);
      rbad = ($urandom_range(0, 4) == 0);
      rw = rom(nrx) ^ (rbad ? 8'h80 : 8'h00);
      gaps = 8'($urandom);
      if (k % 3 == 0) begin
        // both sides compare in the same clock
        send_tx(w, 1, rw);
        ntx++; nrx++;
        exp_fail += int'(bad) + int'(rbad);
        check(cmp_valid && rslt == !bad && data_out == w, $sformatf("simultaneous: cv=%0d rslt=%0d d=%02h w=%02h ntx=%0d idx=%0d", cmp_valid, rslt, data_out, w, n_tx, tx_idx));
      end else begin
        send_tx(w, 0, '0);
        ntx++; exp_fail += int'(bad);
        // result is visible from the clock after the eighth bit until the next comparison
        check(rslt == !bad && data_out == w, $sformatf("tx word %0d result", ntx - 1));
        rx_data = rw; rx_strobe = 1;
        @(posedge clk); #1;
        rx_strobe = 0;
        nrx++; exp_fail += int'(rbad);
        check(cmp_valid && rslt == !rbad && data_out == rw, $sformatf("rx word %0d result", nrx - 1));
      end
      check(int'(tx_idx) == ntx && int'(rx_idx) == nrx, "addresses advance");
      check(int'(n_tx) == ntx && int'(n_rx) == nrx, "word counters");
      check(int'(n_fail) == exp_fail, $sformatf("mismatches %0d, expected %0d", n_fail, exp_fail));
    end
    check(exp_fail > 0, "some mismatches injected");
    clear <= 1; @(posedge clk); #1; clear <= 0;
    check(n_tx == 0 && n_rx == 0 && n_fail == 0 && tx_idx == 0 && rx_idx == 0, "clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
