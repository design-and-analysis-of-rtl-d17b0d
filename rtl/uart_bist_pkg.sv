// Shared constants and functions of the self-testing UART.
//
// The 8-bit test pattern generator is a right-shifting Galois LFSR with
// feedback from stage 7 into stages 0, 1, 5 and 6, which is the polynomial
// x^8 + x^6 + x^5 + x + 1. It is primitive, so the register steps through
// all 2^8 - 1 non-zero states. The expected-pattern ROM and the generator
// both use lfsr8_next(), so the ROM contents are the generator's sequence
// starting from the seed (8'b00000010 after reset).
package uart_bist_pkg;

  localparam int unsigned DATA_W = 8;

  typedef logic [DATA_W-1:0] byte_t;

  localparam byte_t LFSR_SEED = 8'h02;

  // One step of the 8-bit LFSR: q0 <- q7, q1 <- q0^q7, q5 <- q4^q7,
  // q6 <- q5^q7, every other stage takes its left neighbour.
  function automatic byte_t lfsr8_next(byte_t q);
    byte_t n;
    n[0] = q[7];
    n[1] = q[0] ^ q[7];
    n[2] = q[1];
    n[3] = q[2];
    n[4] = q[3];
    n[5] = q[4] ^ q[7];
    n[6] = q[5] ^ q[7];
    n[7] = q[6];
    return n;
  endfunction

  // Pattern number k of a test: the seed advanced k times.
  function automatic byte_t lfsr8_pattern(byte_t seed, int unsigned k);
    byte_t q = seed;
    for (int unsigned i = 0; i < k; i++) q = lfsr8_next(q);
    return q;
  endfunction

  // States of the BIST controller unit.
  typedef enum logic [2:0] {
    BIST_IDLE,   // normal UART operation
    BIST_SEND,   // pattern is serialised to the receiver
    BIST_LOAD,   // wait for the transmit buffer, then write the pattern
    BIST_NEXT,   // advance the generator to the next pattern
    BIST_DRAIN,  // all patterns sent, wait for the last checks
    BIST_DONE    // result valid
  } bist_state_e;

endpackage
