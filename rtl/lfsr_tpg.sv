// 8-bit LFSR test pattern generator with serialiser.
//
// The LFSR is a right-shifting Galois register for x^8 + x^6 + x^5 + x + 1
// (feedback from stage 7 into stages 0, 1, 5 and 6), loaded with SEED at
// reset, and it advances by one state on each trigger pulse from the
// comparator side, so it walks through all 255 non-zero values. Its stages
// drive pp, the parallel pattern for the transmitter, directly.
// A PISO serialises the same pattern for the receiver: a 1-clock delay
// stage turns each trigger (and the end of reset) into Reg_load, which loads
// the new LFSR value into the PISO and sets a 3-bit down counter to 7. With
// sel held at 0, each bit-clock tick (bit_en) then puts one bit on ps, least
// significant first, with ps_valid high, and decrements the counter; the
// tick on which the counter is at zero sends the eighth bit and raises
// ser_done for one cycle. A trigger before ser_done restarts the
// serialisation with the next pattern.
// LFSR, PISO, 3-bit down counter and 1-clock delay are the document's parts;
// the tap positions follow its LFSR drawing, the seed its LFSR simulation.
module lfsr_tpg
  import uart_bist_pkg::*;
#(
  parameter byte_t SEED = LFSR_SEED
) (
  input  logic  clk,
  input  logic  rst,       // synchronous, active high
  input  logic  trigger,   // advance to the next pattern
  input  logic  bit_en,    // bit-clock tick for the serial output
  output byte_t pp,        // parallel pattern (to the transmitter)
  output logic  ps,        // serial pattern bit (to the receiver)
  output logic  ps_valid,  // ps holds a bit that is taken this cycle
  output logic  ser_done   // eighth bit of the pattern sent
);

  byte_t      q;
  logic       reg_load;    // trigger delayed by one clock
  logic [2:0] cnt;         // 3-bit down counter
  logic       sending;

  always_ff @(posedge clk) begin
    if (rst)          q <= SEED;
    else if (trigger) q <= lfsr8_next(q);
  end

  // 1-clock delay: the PISO loads the value the LFSR has after the trigger;
  // after reset the first load serialises the seed.
  always_ff @(posedge clk) begin
    if (rst) reg_load <= 1'b1;
    else     reg_load <= trigger;
  end

  piso8 #(.W(DATA_W)) u_piso (
    .clk      (clk),
    .rst      (rst),
    .reg_load (reg_load),
    .sel      (1'b0),
    .shift_en (bit_en && sending),
    .d        (q),
    .so       (ps)
  );

  assign ps_valid = bit_en && sending && !reg_load;

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt      <= '0;
      sending  <= 1'b0;
      ser_done <= 1'b0;
    end else begin
      ser_done <= 1'b0;
      if (reg_load) begin
        cnt     <= 3'd7;
        sending <= 1'b1;
      end else if (ps_valid) begin
        if (cnt == 3'd0) begin
          sending  <= 1'b0;
          ser_done <= 1'b1;
        end else begin
          cnt <= cnt - 1'b1;
        end
      end
    end
  end

  assign pp = q;

endmodule
