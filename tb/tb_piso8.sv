// Testbench for piso8: loads random bytes, shifts them out with random hold
// (sel = 1) and idle (shift_en = 0) cycles in between, and checks that the
// serial output gives the byte least significant bit first and does not
// move while held.
module tb_piso8;
  logic clk = 0, rst = 1, reg_load = 0, sel = 0, shift_en = 0;
  logic [7:0] d = '0;
  logic so;
  int checks = 0, failures = 0;

  piso8 #(.W(8)) dut (.*);

  always #5 clk = ~clk;

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

  initial begin
    logic [7:0] v;
    repeat (2) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    check(so == 1'b0, "cleared by reset");
    for (int t = 0; t < 200; t++) begin
      v = 8'($urandom);
      d <= v; reg_load <= 1;
      @(posedge clk);
      reg_load <= 0;
      for (int b = 0; b < 8; b++) begin
        // random hold cycles: output must not change
        while ($urandom_range(0, 2) == 0) begin
          // either held by sel or not enabled
          if ($urandom_range(0, 1) == 1) begin sel <= 1; shift_en <= 1; end
          else                           begin sel <= 0; shift_en <= 0; end
          @(posedge clk);
          #1 check(so == v[b], "held bit unchanged");
        end
        #1 check(so == v[b], $sformatf("bit %0d of %02h", b, v));
        sel <= 0; shift_en <= 1;
        @(posedge clk);
        sel <= 0; shift_en <= 0;
      end
      #1 check(so == 1'b0, "zero fill after eight shifts");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
