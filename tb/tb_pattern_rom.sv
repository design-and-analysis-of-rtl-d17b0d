// Testbench for pattern_rom: every entry of both read ports is checked
// against an independent LFSR model (shift left, XOR 8'h63 when the top bit
// falls out) from the seed 8'h02, plus a table of the first entries, the
// 255 entries must all differ, and a second instance with another seed and a
// smaller depth is checked the same way.
module tb_pattern_rom;
  import uart_bist_pkg::*;
  logic [7:0] addr_a = '0, addr_b = '0;
  byte_t data_a, data_b;
  logic [3:0] a2 = '0, b2 = '0;
  byte_t d2a, d2b;
  int checks = 0, failures = 0;

  pattern_rom dut (.addr_a(addr_a), .data_a(data_a), .addr_b(addr_b), .data_b(data_b));
  pattern_rom #(.DEPTH(10), .SEED(8'hA5)) dut2 (.addr_a(a2), .data_a(d2a), .addr_b(b2), .data_b(d2b));

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic byte_t ref_next(byte_t q);
    return {q[6:0], 1'b0} ^ (q[7] ? 8'h63 : 8'h00);
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    byte_t exp, exp2;
    bit seen[256];
    byte_t first[8] = '{8'h02, 8'h04, 8'h08, 8'h10, 8'h20, 8'h40, 8'h80, 8'h63};
    exp = 8'h02;
    for (int k = 0; k < 255; k++) begin
      addr_a = 8'(k); addr_b = 8'(254 - k);
      #1;
      check(data_a == exp, $sformatf("entry %0d: %02h, expected %02h", k, data_a, exp));
      if (k < 8) check(data_a == first[k], $sformatf("entry %0d table", k));
      check(!seen[data_a], "entries differ");
      seen[data_a] = 1;
      exp = ref_next(exp);
    end
    // port b, read in reverse order, against port a
    exp = 8'h02;
    for (int k = 0; k < 255; k++) begin
      addr_b = 8'(k);
      #1 check(data_b == exp, $sformatf("port b entry %0d", k));
      exp = ref_next(exp);
    end
    exp2 = 8'hA5;
    for (int k = 0; k < 10; k++) begin
      a2 = 4'(k); b2 = 4'(k);
      #1 check(d2a == exp2 && d2b == exp2, $sformatf("seed A5 entry %0d", k));
      exp2 = ref_next(exp2);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
