// Testbench for baud_gen: for several divisors, including the default 15,
// checks that tick is one clock wide and comes exactly every div+1 clocks.
module tb_baud_gen;
  logic clk = 0, rst = 1, tick;
  logic [15:0] div = 16'd15;
  int checks = 0, failures = 0;

  baud_gen #(.DIV_W(16)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int last, n;
    int divs[4] = '{15, 0, 3, 100};
    foreach (divs[i]) begin
      rst <= 1; div <= 16'(divs[i]);
      repeat (2) @(posedge clk);
      rst <= 0;
      last = -1; n = 0;
      for (int c = 0; c < 20 * (divs[i] + 1) + 5; c++) begin
        @(posedge clk); #1;
        if (tick) begin
          if (last >= 0) begin
            checks++;
            if (c - last != divs[i] + 1) begin
              failures++;
              $display("FAIL div=%0d spacing %0d", divs[i], c - last);
            end
          end
          last = c; n++;
        end
      end
      checks++;
      if (n < 19) begin failures++; $display("FAIL div=%0d only %0d ticks", divs[i], n); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
