# A UART that tests itself

This is a small 8-bit UART with built-in self test (BIST). On request, the
chip disconnects the UART from its host and its serial line. It then drives
a stream of pseudo-random bytes from an on-chip LFSR through both halves of
the UART:

- each byte goes in parallel into the transmitter, and the transmitter's
  serial output is collected and checked;
- the same byte goes in serially into the receiver, and the receiver's
  parallel output is checked.

Every result is compared with a ROM of the bytes the LFSR is known to
produce. At the end the chip raises `bist_done` and either `correct` or
`wrong`. No external tester or test vectors are needed.

The design follows the paper "Design and analysis of UART based on BIST".
That paper describes the blocks, the LFSR, the transmitter and receiver
structure and their timing, but leaves most handshakes open. The comment
at the top of each file in `rtl/` says which parts follow the paper and
which are this implementation's own choices. The section "Departures and
open points" below collects them.

## Structure

```
              host bus (cs_n, rd_n, wr_n, d_in/d_out)      rxd, rx_en, ack
                         |                                       |
                    uart_bus_if                                  |
                         |                                       |
   +---------------- test multiplexer (inside bist_uart) ---------+
   |   normal: host bus / pins        test_mode: generator + controller
   |                     |                          |
   |                 uart_tx  --txd-->  (SIPO in)   uart_rx --rdata-->
   |                     ^                  |          ^          |
   |            pp (parallel)               |   ps (serial)       |
   |                     +---- lfsr_tpg ----+----------+          |
   |                              ^ trigger             v         v
   |                          bist_ctrl  <----------  tra_compare <-- pattern_rom
   |                                                                (2 read ports)
   +-- baud_gen: one bit tick for transmitter, receiver and generator

   lp_tpg: low-power 6-bit pattern generator, stand-alone, own ports
```

Everything runs on one clock, `clk`, with a synchronous active-high reset,
`rst`. The UART's "transmit clock" and "receive clock" are one-cycle
enables (`tick`) from `baud_gen`. `tick` comes every `BAUD_DIV + 1` clocks,
which is every 16 clocks by default. Below, a "tick" means one bit time.

## The UART datapath

This is not the usual start-bit/stop-bit UART. Like the 8251-style design it
is based on, it moves **only the 8 data bits**, least significant bit first,
and uses handshake pins instead of framing. The line carries no start,
stop or parity bits. A receiver therefore needs to be told when bits are
valid (`rx_en`), and a transmitter sends only while `ack` is high.

### Transmitter (`uart_tx`)

The transmitter has two 8-bit registers in series:

1. **Transmit buffer.** This is a parallel-in serial-out register (`piso8`).
   A write (`wr`) loads it when it is empty. `txrdy` = buffer empty.
2. **Output register.** This is a serial-in serial-out register. When it is
   empty (`txe` = 1), the buffer shifts into it serially, one bit per tick,
   for 8 ticks. After that the buffer is free for the next byte.
3. While `ack` is high, each tick sends one bit of the output register on
   `txd`. `txd_valid` marks the clock in which that bit is taken. Dropping
   `ack` pauses the transmission between bits. After the eighth bit, `txe`
   returns to 1 and the next transfer can start.

The transfer and the transmission share the output register, so they never
overlap. In steady state a byte therefore takes 16 ticks: 8 to transfer and
8 to send. Between bytes `txd` idles at 1.

### Receiver (`uart_rx`): a 16-bit chain

This is the least obvious part of the design. The receiver is an 8-bit
**input register** followed by an 8-bit **receiver buffer register**. The
input register feeds the buffer *serially*, so the two form a single 16-bit
shift chain. On every tick while `rx_en` is high:

- while the input register holds fewer than 8 bits, the new bit only enters
  the input register;
- once the input register is full, each new bit also pushes the input
  register's oldest bit into the buffer;
- when both registers are full, the receiver is not ready (`rxrdy` = 0), the
  bit on `rxd` is **lost**, and `overrun` pulses.

This produces the timing the paper reports:

- the first byte appears in the buffer (`rx_full`, `rdata`) **16 ticks**
  after its first bit;
- each later byte appears **8 ticks** after the previous one, provided the
  buffer is read in time;
- a 17th bit that arrives while nothing has been read is dropped.

The peripheral (the host bus in normal mode, the controller during self
test) takes the byte by raising `peri_rqt` while `rx_full` is 1. If a read
and a new bit fall in the same clock, the read makes room for the bit. A
reader that answers within one clock of `rx_full` therefore keeps the
8-tick rate.

One consequence matters for the self test. The last byte sent stays in the
input register until 8 more bits arrive. A stream of N bytes needs one more
byte behind it before the receiver shows all N.

### Host interface (`uart_bus_if`)

`uart_bus_if` connects the host to the UART:

- The host has an 8-bit data bus (split into `d_in`, `d_out` and `d_oe`) and
  active-low `cs_n`, `rd_n` and `wr_n`.
- The first clock of a write access captures `d_in` in a bus write register.
  On the next clock that byte is written into the transmit buffer, so a
  write takes effect once per access, one clock after the access starts.
- The first clock of a read access copies the receiver buffer into the data
  bus buffer. If a byte was waiting, the same clock also frees the receiver
  buffer.
- `d_out` is driven (`d_oe`) for the whole read access, from its second
  clock on.
- There is no address line and no status register. The host watches the
  `txrdy`, `txe`, `rxrdy` and `rx_full` pins.

## The self-test session

### Pattern generator (`lfsr_tpg`)

The generator is an 8-bit Galois LFSR for x^8 + x^6 + x^5 + x + 1.
Stage 7 feeds back into stages 0, 1, 5 and 6. The LFSR starts from
`8'h02` after reset and steps through all 255 non-zero values, one step per
`trigger`. Its stages drive `pp`, the parallel pattern.

A PISO serialises the same pattern for the receiver:

- a one-clock delay turns each trigger into `Reg_load`;
- `Reg_load` loads the new LFSR value and sets a 3-bit down counter to 7;
- each tick then sends one bit on `ps`;
- the eighth bit raises `ser_done`.

### ROM (`pattern_rom`)

The ROM holds the expected patterns in order:
ROM[k] = (LFSR stepped k times from the seed). It is computed at
elaboration from the same step function, so changing the seed keeps it
consistent. The ROM has two asynchronous read ports, one for each side of
the check.

### Comparator / response analyser (`tra_compare`)

- **Transmitter side:** a SIPO collects 8 bits from `txd`. The word is then
  compared with ROM[`tx_idx`], and `tx_idx` advances.
- **Receiver side:** the receiver output is already parallel. On each read
  it is compared with ROM[`rx_idx`], and `rx_idx` advances.
- **Outputs:** each comparison gives `cmp_valid`, `rslt` (1 = match) and
  `data_out` (the word checked). Counters `n_tx`, `n_rx` and `n_fail`
  (mismatches) feed the controller.

### Controller (`bist_ctrl`)

A rising edge on `bist_start` starts a session:

1. A one-clock `restart` resets the UART, the generator and the analyser.
   `test_mode` switches the multiplexer.
2. For each pattern:
   - **SEND:** wait until the generator has shifted the pattern into the
     receiver;
   - **LOAD:** wait for `txrdy`, then write the same pattern into the
     transmitter;
   - **NEXT:** trigger the generator.
3. Whenever the receiver is full, the controller reads it. The receiver
   therefore never overflows during a session.
4. `N_PATTERNS` + 1 patterns are serialised. The last one only pushes
   pattern `N_PATTERNS` − 1 out of the receiver's input register, and it is
   not written to the transmitter.
5. **DRAIN:** wait until both sides have checked `N_PATTERNS` words.
6. **DONE:** `bist_done` = 1, with `correct` = 1 if there were no
   mismatches and `wrong` = 1 otherwise. The UART returns to normal mode.
   The flags hold until the next session. `bist_start` must fall and rise
   again to start one.

The transmitter's 16 ticks per byte set the pace. At the defaults (255
patterns, tick every 16 clocks) a session takes 65,406 clocks in
simulation, about 255 × 16 × 16.

### Low-power pattern generator (`lp_tpg`)

The paper also describes a low-power test pattern generator that it does not
attach to the UART. It is built here at the paper's example size (6 outputs)
and sits beside the UART in the top level with its own ports (`lp_en`,
`lp_q`, `lp_phase`):

- Even cells Q0, Q2, Q4 form one 3-stage LFSR, and odd cells Q1, Q3, Q5
  form another. Both use x^3 + x^2 + 1.
- The two LFSRs advance on alternate clocks. At most three of the six
  outputs change per clock, half as many as one 6-stage LFSR could change.
- With both seeded 001, the outputs (written Q0..Q5) go 000011 → 100001 →
  110000 → …, and repeat every 14 clocks.

## Top level `bist_uart`

| Parameter | Default | Meaning |
|---|---|---|
| `BAUD_DIV` | 15 | tick every `BAUD_DIV + 1` clocks |
| `SEED` | `8'h02` | LFSR reset value; the ROM follows it |
| `N_PATTERNS` | 255 | patterns per session (one full LFSR period), ROM depth |

| Port group | Signals |
|---|---|
| clock, reset | `clk`, `rst` (synchronous, active high) |
| host bus | `cs_n`, `rd_n`, `wr_n`, `d_in[7:0]`, `d_out[7:0]`, `d_oe` |
| transmitter | `ack` in; `txd`, `txd_valid`, `txrdy`, `txe` out |
| receiver | `rx_en`, `rxd` in; `rxrdy`, `rx_full`, `overrun` out |
| self test | `bist_start` in; `test_mode`, `bist_state`, `bist_done`, `correct`, `wrong`, `rslt`, `cmp_valid`, `data_out[7:0]`, `y[7:0]` (current LFSR pattern) out |
| low-power generator | `lp_en` in; `lp_q[5:0]`, `lp_phase` out |

During a session `txd` is held at 1 and `txd_valid` at 0. The host bus,
`rxd`, `rx_en` and `ack` are ignored.

## Departures and open points

- **LFSR polynomial.** The paper states the polynomial as
  x^8 + x^6 + x^5 + 1 but also says the LFSR produces 2^8 − 1 different
  values. That polynomial is divisible by x + 1 and cannot give 255 states.
  The paper's LFSR drawing has feedback into stages 1, 5 and 6, which gives
  x^8 + x^6 + x^5 + x + 1 (primitive). That is what is built. The LFSR
  values printed in the paper's simulation waveforms could not be matched
  to any 255-state 8-bit LFSR, so only the reset value `00000010` is taken
  from them.
- **No framing.** There are no start, stop or parity bits and no
  oversampling. This follows the paper's shift-register transmitter and
  receiver. The signal names in the paper's simulations (a 16-bit baud
  divisor of 15) suggest the authors' own UART may have used a
  conventional framed design. The divisor is kept only as the bit-tick
  rate.
- **Clocks.** The separate transmit/receive clocks, the two half-rate
  clocks of the low-power generator and the clock gating inside the PISO
  ("hold") are all replaced by clock enables on one clock.
- **Response analysis uses a ROM, not a MISR.** The paper's generic BIST
  diagram shows a MISR, but its design compares against a ROM and names a
  MISR only as a possible improvement. No MISR is built.
- **Who triggers the generator.** The paper says the next pattern is
  triggered by the comparator. Here the controller triggers it, once the
  current pattern has gone to both halves of the UART. The receiver's
  result for a pattern only arrives one pattern later, so it cannot pace
  the generator.
- **Own choices, not specified in the paper:** the test multiplexer's
  position, the restart pulse, all handshakes (`wr`, `ack`, `peri_rqt`,
  `txd_valid`), the bus timing, bit order (LSB first), the ROM depth (one
  LFSR period) and its two read ports.
- **Not built.** The vendor UART component the paper reviews also offers
  half duplex, transmit-only and receive-only operation, RTS/CTS flow
  control, address matching and fixed baud rates up to 57.6 kbps. The
  paper's design does not use these, so they are not part of this model.

## Simulation

Each block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=<n> failures=<m>`:

| Testbench | What it checks |
|---|---|
| `tb_piso8` | load, shift order, hold |
| `tb_baud_gen` | tick spacing for several divisors |
| `tb_lfsr_tpg` | LFSR sequence against an independent model and table; period 255; serial output equals the pattern, in 8 ticks |
| `tb_pattern_rom` | all 255 entries on both ports; a second seed and depth |
| `tb_uart_tx` | random bytes with random `ack` pauses; transfer and byte times of 8 ticks; ignored writes; idle level |
| `tb_uart_rx` | chain model: `rxrdy`/`rx_full` every clock, data, 16-then-8-tick timing, lost bits |
| `tb_uart_bus_if` | one write/read action per access, bus drive, chip select |
| `tb_tra_compare` | addresses, results and counters, with injected mismatches |
| `tb_bist_ctrl` | session sequencing against models of its surroundings; pass and fail |
| `tb_lp_tpg` | example vectors 100001, 110000; alternate stepping; period 14 |
| `tb_bist_uart_small` | top level with a tick on every clock, another seed and 20 patterns: sessions pass, a stuck transmitter output fails them, the session length is about 16 clocks per pattern |
| `tb_bist_uart` | whole design at default parameters: host transmit with an `ack` pause, receive and overrun, a full 255-pattern session ending in `correct`, a session with a stuck-at-0 receiver input ending in `wrong`, normal operation afterwards, the low-power generator; each mechanism is counted |

To run one, with the package first:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl -y tb \
    rtl/uart_bist_pkg.sv tb/tb_bist_uart.sv --top-module tb_bist_uart -o sim
./obj_dir/sim
```

`tb_bist_uart` simulates about 150,000 clocks and finishes in well under a
second.
