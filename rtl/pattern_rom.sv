// ROM of expected test patterns, read by the test response analyser.
//
// Entry k holds the k-th pattern the LFSR test pattern generator gives
// after reset: the seed advanced k times by the generator's polynomial
// (x^8 + x^6 + x^5 + x + 1), ROM[k] = lfsr8_next^k(SEED). The table is
// computed at elaboration from that formula, so it stays correct when the
// seed is changed. Two asynchronous read ports let the transmitter check and
// the receiver check look up their own pattern numbers independently.
// Storing the expected patterns in order in a ROM is the document's scheme;
// the depth of 255 (one full LFSR period) and the two read ports are this
// design's choices.
module pattern_rom
  import uart_bist_pkg::*;
#(
  parameter int unsigned DEPTH = 255,
  parameter byte_t       SEED  = LFSR_SEED,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic [AW-1:0] addr_a,
  output byte_t         data_a,
  input  logic [AW-1:0] addr_b,
  output byte_t         data_b
);

  typedef byte_t rom_t [DEPTH];

  function automatic rom_t build_rom();
    rom_t  t;
    byte_t q = SEED;
    for (int unsigned k = 0; k < DEPTH; k++) begin
      t[k] = q;
      q    = lfsr8_next(q);
    end
    return t;
  endfunction

  localparam rom_t ROM = build_rom();

  assign data_a = (32'(addr_a) < DEPTH) ? ROM[addr_a] : '0;
  assign data_b = (32'(addr_b) < DEPTH) ? ROM[addr_b] : '0;

endmodule
