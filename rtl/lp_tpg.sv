// Low-power test pattern generator: two interleaved 3-stage LFSRs.
//
// Six D cells Q0..Q5 drive the circuit under test. The even cells
// (Q0, Q2, Q4) form LFSR-1 and the odd cells (Q1, Q3, Q5) form LFSR-2. Each
// is a 3-stage primitive LFSR (x^3 + x^2 + 1): its first cell takes the
// XOR of its first and last cells and the other two shift. The two LFSRs
// advance on alternate clocks, which replaces the two complementary
// half-rate clocks CLK/2 and CLK/2' of the original circuit by one clock
// and a phase bit: LFSR-1 moves on the first enabled clock after reset,
// LFSR-2 on the next, and so on. At most three of the six inputs of the
// circuit under test change per clock, half of what one 6-stage LFSR could
// change. Each LFSR is seeded with 001 (first cell 0, last cell 1); from
// there the vectors, written Q0..Q5, are 100001 and then 110000, the
// example the document gives. The interleaving, the alternate clocking and
// the seeds are the document's; the tap choice is this design's (either
// primitive 3-stage polynomial fits the document's example).
module lp_tpg #(
  parameter logic [2:0] SEED1 = 3'b001,  // LFSR-1 seed, written Q0 Q2 Q4
  parameter logic [2:0] SEED2 = 3'b001   // LFSR-2 seed, written Q1 Q3 Q5
) (
  input  logic       clk,
  input  logic       rst,   // synchronous, active high
  input  logic       en,    // advance
  output logic [5:0] q,     // q[i] is cell Qi
  output logic       phase  // 0: LFSR-1 moves next, 1: LFSR-2 moves next
);

  // l1[0] = Q0, l1[1] = Q2, l1[2] = Q4; l2[0] = Q1, l2[1] = Q3, l2[2] = Q5
  logic [2:0] l1, l2;

  function automatic logic [2:0] step3(logic [2:0] s);
    return {s[1], s[0], s[0] ^ s[2]};
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      l1    <= {SEED1[0], SEED1[1], SEED1[2]};
      l2    <= {SEED2[0], SEED2[1], SEED2[2]};
      phase <= 1'b0;
    end else if (en) begin
      if (!phase) l1 <= step3(l1);
      else        l2 <= step3(l2);
      phase <= !phase;
    end
  end

  assign q = {l2[2], l1[2], l2[1], l1[1], l2[0], l1[0]};

endmodule
