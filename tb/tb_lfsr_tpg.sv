// Testbench for lfsr_tpg: checks the parallel pattern sequence against an
// independent model of the LFSR (shift left, XOR 8'h63 when the top bit
// falls out) and a table of its first values from the seed 8'h02, checks
// that the sequence has period 255, and that after every trigger the same
// pattern comes out serially on ps, least significant bit first, in exactly
// eight bit ticks with ser_done on the last one. Bit ticks come at random.
module tb_lfsr_tpg;
  import uart_bist_pkg::*;
  logic clk = 0, rst = 1, trigger = 0, bit_en = 0;
  byte_t pp;
  logic ps, ps_valid, ser_done;
  int checks = 0, failures = 0;

  lfsr_tpg dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic byte_t ref_next(byte_t q);
    return {q[6:0], 1'b0} ^ (q[7] ? 8'h63 : 8'h00);
  endfunction

  // collects the serial pattern, ticking bit_en at random
  task automatic collect(output byte_t w, output int ticks);
    int got = 0;
    bit done_seen = 0;
    ticks = 0;
    w = '0;
    while (!done_seen) begin
      bit_en <= ($urandom_range(0, 2) != 0);
      @(posedge clk);
      if (ps_valid) begin
        w[got] = ps; got++; ticks++;
      end
      #1;
      if (ser_done) done_seen = 1;
      if (ticks > 9) break;
    end
    bit_en <= 0;
  endtask

  initial begin
    byte_t exp, w;
    int ticks;
    byte_t first[12] = '{8'h02, 8'h04, 8'h08, 8'h10, 8'h20, 8'h40, 8'h80,
                         8'h63, 8'hC6, 8'hEF, 8'hBD, 8'h19};
    repeat (2) @(posedge clk);
    rst <= 0;
    exp = 8'h02;
    for (int k = 0; k < 256; k++) begin
      #1;
      check(pp == exp, $sformatf("pattern %0d: %02h, expected %02h", k, pp, exp));
      if (k < 12) check(pp == first[k], $sformatf("pattern %0d table", k));
      if (k > 0 && k < 255) check(pp != 8'h02, "no early return to the seed");
      if (k == 255) check(pp == 8'h02, "period 255");
      if (k < 40 || k > 250) begin
        collect(w, ticks);
        check(w == exp, $sformatf("serial pattern %0d: %02h, expected %02h", k, w, exp));
        check(ticks == 8, $sformatf("serial pattern %0d took %0d ticks", k, ticks));
      end
      trigger <= 1;
      @(posedge clk);
      trigger <= 0;
      @(posedge clk);
      exp = ref_next(exp);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
