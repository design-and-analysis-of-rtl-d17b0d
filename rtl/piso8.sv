// Parallel-in serial-out register with hold (the "PISO" of the transmit
// buffer and of the test pattern generator).
//
// reg_load loads d in parallel. Otherwise, when sel is 0 and shift_en is 1,
// the register shifts one place towards bit 0 and so presents the next bit
// at so; when sel is 1 it holds, which stands in for the clock gating the
// original block uses to freeze its contents while the downstream register
// is not ready. Bits leave least significant first and zeros fill in from
// the top. so is bit 0 of the register, so the first bit is on so in the
// cycle after the load. The load/shift/hold roles of reg_load and sel are
// the document's; the bit order, the zero fill and using an enable in place
// of a gated clock are this design's choices.
module piso8 #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst,       // synchronous, active high: clears the register
  input  logic         reg_load,  // parallel load of d
  input  logic         sel,       // 1: hold
  input  logic         shift_en,  // shift one bit when not holding
  input  logic [W-1:0] d,
  output logic         so         // serial output
);

  logic [W-1:0] r;

  always_ff @(posedge clk) begin
    if (rst)                     r <= '0;
    else if (reg_load)           r <= d;
    else if (!sel && shift_en)   r <= {1'b0, r[W-1:1]};
  end

  assign so = r[0];

endmodule
