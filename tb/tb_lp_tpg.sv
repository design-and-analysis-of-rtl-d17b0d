// Testbench for lp_tpg: checks the first vectors against the worked example
// (seed 001 in both LFSRs gives 100001 and then 110000, written Q0..Q5),
// that only the cells of one LFSR change per clock, that the LFSRs take
// turns, and that the pair of 3-stage LFSRs repeats after 14 clocks with
// 7 different states each.
module tb_lp_tpg;
  logic clk = 0, rst = 1, en = 0;
  logic [5:0] q;
  logic phase;
  int checks = 0, failures = 0;

  lp_tpg dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  // vector written Q0..Q5, left to right
  function automatic string vec(logic [5:0] v);
    return $sformatf("%b%b%b%b%b%b", v[0], v[1], v[2], v[3], v[4], v[5]);
  endfunction

  initial begin
    logic [5:0] prev, start;
    logic [5:0] seen1 [$];
    repeat (2) @(posedge clk);
    rst <= 0;
    @(posedge clk); #1;
    check(vec(q) == "000011", $sformatf("after reset %s", vec(q)));
    en <= 1;
    @(posedge clk); #1;
    check(vec(q) == "100001", $sformatf("first vector %s", vec(q)));
    @(posedge clk); #1;
    check(vec(q) == "110000", $sformatf("second vector %s", vec(q)));
    start = q;
    for (int i = 0; i < 14; i++) begin
      prev = q;
      @(posedge clk); #1;
      // odd cells (LFSR-2) are constant on an LFSR-1 step and vice versa
      if (i % 2 == 0) check((q & 6'b101010) == (prev & 6'b101010), "LFSR-1 step changed LFSR-2");
      else            check((q & 6'b010101) == (prev & 6'b010101), "LFSR-2 step changed LFSR-1");
      check($countones(q ^ prev) <= 3, "at most three inputs change");
      if (i < 13) check(q != start, "no early repeat");
    end
    check(q == start, "period of 14 clocks");
    // hold when en is low
    en <= 0; prev = q;
    repeat (3) @(posedge clk); #1;
    check(q == prev, "holds while disabled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
