# Dual-standard 5 GHz WLAN system-on-chip: OFDM modem, MAC accelerator and low-power buses

HIPERLAN/2 and IEEE 802.11a share a physical layer. Both use 64-point OFDM with
48 data and 4 pilot subcarriers, 80-sample symbols (4 µs at 20 Msample/s),
BPSK to 64-QAM, and a K=7 convolutional code punctured to several rates. Their
upper layers are very different. This design places one baseband modem and
the time-critical part of the 802.11a MAC in hardware, and splits the software
between two processors:

- A **protocol processor** runs the DLC/MAC stack on an AMBA AHB system bus.
- A **modem controller** drives the modem and the lower MAC in real time over
  a separate, lighter **local bus**.

The two sides share a dual-port SRAM. Two low-power techniques from the
reference architecture ("Low-power system-on-chip architecture for wireless
LANs") are built into the memories and buses:

- Each on-chip SRAM is split into a small "hot" bank and a large bank, with a
  selection block that enables only the bank being accessed.
- The local bus carries Gray-coded addresses and bus-invert-coded data.

This repository is synthesizable SystemVerilog for that architecture. The top
module is `wlan_soc`. Each block has a self-checking testbench, and
`tb_wlan_soc` runs the whole chip end to end.

```
                 AHB master ports (protocol processor, bridge)
                                   |
   +------------------------ AMBA AHB --------------------------+
   | arbiter (DMA highest) | decoder | default slave (ERROR)     |
   | DMA | timers/WDT/INTC | UART | MAC MIB | dual-port SRAM A   |
   +-----------------------------------------|-------------------+
                                  120 KB = 1 KB + 119 KB banks
                                             | port B
   local-bus master port  --Gray addr / bus-invert data-->  slaves:
   (modem controller)                                      16 KB SRAM (3.4 + 12.6 KB)
                                                           dual-port SRAM port B
   MPDU octets -> tx FIFO -> MAC tx_data (FCS, timestamp) -> OFDM TX -> samples out
   samples in  -> OFDM RX -> octets -> MAC rx_data (CRC, length) -> rx_filter -> rx_ctrl
                                                 |                    (ACK/CTS bodies out)
                                                 +-> receive FIFO -> payload octets out
                               chan_state (CCA, NAV, DIFS/EIFS, slots) -> tx_bkoff
```

## The OFDM modem

### Transmit path (`ofdm_tx`)

The transmit path turns a bit train into 80-sample symbols. It is a chain of
valid/ready stages:

1. `scrambler`: x^7 + x^4 + 1, with a 7-bit seed loaded at `start`.
2. `conv_encoder`: generators 133/171 (octal). It appends six zero tail bits
   after the bit marked `last`.
3. `puncturer`: rate 1/2, 2/3, 3/4 or 9/16.
4. `interleaver`: one symbol of N_CBPS coded bits.
5. `symbol_mapper`: Gray QAM and four pilots.
6. `fft64` with `INVERSE=1`.
7. `cp_insert`.

When the tail bits have left the encoder, `ofdm_tx` adds zero coded bits until
the last symbol is full. The `pad_active` output marks this padding.

### Receive path (`ofdm_rx`)

The receive path reverses the chain:

1. `cp_remove`
2. `fft64`
3. `qam_demapper` (hard decisions)
4. `interleaver` with `DEINT=1`
5. `depuncturer` (erasure flags)
6. `viterbi_decoder`
7. `scrambler` used as the descrambler

The receiver is told the train length (`n_bits`, which comes from the PHY
header in a real system). It drops the coded pairs that belong to padding, and
it starts flushing the Viterbi decoder right after the tail.

### Modes

| Modulation | Rates | Coded bits/symbol | Data bits/symbol |
|---|---|---|---|
| BPSK | 1/2, 3/4 | 48 | 24, 36 |
| QPSK | 1/2, 3/4 | 96 | 48, 72 |
| 16-QAM | 1/2 (802.11a), 9/16 (HIPERLAN/2), 3/4 | 192 | 96, 108, 144 |
| 64-QAM | 2/3 (802.11a), 3/4 | 288 | 192, 216 |

The puncturing patterns keep these bits in each period:

- **2/3:** A1 B1 A2.
- **3/4:** A1 B1 A2 B3.
- **9/16:** A1–A4 and A6–A9 of the A stream, and B1–B8 of the B stream, over 9
  input bits.

HIPERLAN/2 also has a first puncturing stage on the first 156 bits of a PDU
train. Its pattern is not part of this design, so the HIPERLAN/2 mode here has
only the rate-dependent stage.

### Number formats

- **Constellation:** one step between adjacent levels is 2·LVL, with LVL = 256.
  For example, 64-QAM uses levels ±1, ±3, ±5, ±7 × 256. There is no
  normalisation factor.
- **Frequency bins:** 64 bins in natural order. Negative frequencies are in
  bins 32..63; DC and the 11 edge bins are zero.
- **Pilots:** at −21, −7, +7, +21 with values +1, +1, +1, −1. The per-symbol
  polarity sequence is not applied.
- **IFFT:** scales by 1/2 per stage, so the time samples fit in 16 bits
  (`cplx16_t`).
- **FFT:** unscaled, with 24-bit outputs (`cplx24_t`). A loop-back therefore
  returns points at 1× the transmit constellation.
- **Twiddles:** Q1.14, from a 32-entry table of cos/sin(2πk/64).

### Timing

`fft64` is a memory-based radix-2 DIT engine with one butterfly per cycle.
One transform takes 320 cycles:

- 64 cycles to load, in bit-reversed order;
- 6 stages of 32 butterflies;
- 64 cycles to unload.

At the design clock of 80 MHz this is exactly one 4 µs symbol, which is why the
whole chip runs on one 80 MHz clock (`CYC_PER_US = 80` in the MAC timers).
Around the FFT:

- The interleaver buffers a whole symbol: it fills for N_CBPS cycles, then
  drains for N_CBPS cycles.
- The Viterbi decoder takes one coded pair per cycle and has a latency of
  `D` pairs.

### Viterbi decoder

`viterbi_decoder` is built for throughput:

- All 64 add-compare-select units run in the same cycle.
- Branch metrics are hard-decision Hamming distances. An erased bit (from
  depuncturing) contributes nothing.
- Path metrics are 8-bit and saturating.
- Survivors use register exchange: each state holds its last `D = 64`
  decisions, so decoding needs no traceback memory or traceback pass. In
  steady state the output bit is the oldest decision of the best state.
- At the end of a block the encoder is in state 0 because of the tail bits.
  The decoder then flushes the rest of state 0's survivor, min(N, D) bits, one
  per cycle, while its input is held off.

This costs 64 × 64 flip-flops of survivor registers. The alternative would be
a traceback RAM with a slower, multi-pass readout.

### Not in the modem

The receiver expects symbol-aligned, frequency-corrected samples at the
transmit scale, with a `sym_start` strobe. The following blocks are not
included, and their signals are ports of the top instead:

- synchronisation;
- channel estimation;
- the frequency-domain equaliser;
- pilot phase correction;
- preamble generation and PHY burst formation;
- the digital IF stages.

## MAC hardware accelerator (802.11a lower MAC)

| Module | What it does |
|---|---|
| `mha_tx_data` | Passes MPDU octets to the PHY. When `ts_insert` is set, it writes the TSF into octets 24..31 (beacon layout). It appends the CRC-32 FCS, complemented and least significant octet first. |
| `mha_rx_data` | Checks the CRC by its residue (0xDEBB20E3) and the length (14..2346 octets). Header octets go to the filter; payload octets go out of the block. |
| `mha_rx_filter` | Decodes frame control, duration, addresses 1/2 and sequence control. Frames addressed to this station raise an ACK request, or a CTS request for an RTS. It keeps a one-entry duplicate cache (address 2 + sequence number, checked on retries). A good frame for another station loads the NAV from its duration field; the NAV counts down in µs. |
| `mha_rx_ctrl` | Answers an ACK or CTS request one SIFS (16 µs) later with the 10-octet frame body: frame control (D4 00 or C4 00), duration, and the receiver address. `tx_data` would add the FCS. An ACK carries duration 0. A CTS carries the RTS duration minus SIFS and the 44 µs CTS air time. |
| `mha_fifo` | The FIFOs, 64 deep, valid/ready on both sides. The transmit FIFO holds host MPDU octets with their last flag in front of `tx_data`. The receive FIFO holds payload octets from `rx_data`. `rx_data` cannot stall the modem, so a write into a full FIFO is dropped and sets a sticky `overflow` flag. `clear` empties the FIFO. |
| `mha_chan_state` | Medium busy = CCA, NAV or own transmission. `ifs_done` rises after DIFS (34 µs), or after EIFS (94 µs) when the previous frame was received in error. A slot pulse follows every 9 µs. |
| `mha_tx_bkoff` | Loads a random count (16-bit LFSR AND contention window). It decrements on slot pulses while the medium is idle and pulses `done` at zero. |

In the top, host MPDU octets enter through the transmit FIFO. `tx_data`
feeds the modem through an octet-to-bit serialiser (LSB first). A
bit-to-octet packer feeds `rx_data` from the modem. `rx_filter`'s
NAV and the receive status feed `chan_state`.

The MIB counters are built as an AHB slave (`mha_mib_csr`; see the register
maps below). The other parts of the accelerator are not built:
- DCF/RTS/beacon control (tx_ctrl);
- fragmentation, defragmentation and encryption;
- the configuration registers.

The signals those parts would drive or use (`bkoff_start`, `cca_busy`,
`my_addr`, `ack_req`, `cts_req`, …) are top-level ports. So are the FIFO
ends (`mpdu_*`, `rxf_*`). Without tx_ctrl nothing decides when a response
may go out ahead of a host frame. So `rx_ctrl`'s octets leave the top on the
`ctl_*` ports instead of entering `tx_data`.

## Low-power memories and buses

### Partitioned SRAMs

Both memories are built at full size, as plain arrays split into two banks.
For each access, the selection logic compares the word address with the bank
boundary and enables exactly one bank. The `*_bank_en` outputs show this, and
a memory compiler would turn them into the macro enables.

| Memory | Words | Bank 1 (hot) | Bank 2 |
|---|---|---|---|
| `sp_sram_banked`, local bus | 4096 (16 KB) | 870 words (3.4 KB) | 3226 words (12.6 KB) |
| `dp_sram_banked`, AHB + local bus | 30720 (120 KB) | 256 words (1 KB) | 30464 words (119 KB) |

Bank 1 sits at the lowest addresses. The boundary is a parameter, so a
profile-driven placement only needs a different `BANK1_WORDS`.

The dual-port SRAM's ports work as follows:

- **Port A** is a zero-wait-state AHB slave. It reads in the address phase,
  writes in the data phase, and forwards data when a read directly follows a
  write to the same word.
- **Port B** is the local-bus port, with one-cycle read latency.
- Simultaneous writes to one word from both ports are not arbitrated. Port B
  wins.

### Local bus codes

- **Address lines: Gray code** (`gray_codec`). Only the word address [31:2] is
  coded. A run of consecutive word accesses then toggles one line per access.
  In the end-to-end test, 220 such steps cost 220 address-line toggles against
  427 for plain binary.
- **Data lines: bus-invert code** (`bus_invert_codec`). The encoder remembers
  the last word on the lines. If more than 16 of the 32 lines would toggle, it
  sends the complement and raises the `inv` line, so at most 17 lines change.
  Write data is coded from master to slave; read data is coded from slave to
  master.

## AHB system

- **`ahb_arbiter`:** fixed priority. The highest-numbered requesting master
  wins: master 2 is the DMA, master 1 the bridge port, master 0 the protocol
  processor and default owner. The grant moves only when HREADY is high, and
  an assertion checks this.
- **`ahb_decoder` and the top's default slave:**

  | Address | Slave |
  |---|---|
  | 0x2000_0000 | dual-port SRAM (128 KB window) |
  | 0x4000_0000 | timers / watchdog / interrupt controller |
  | 0x4000_1000 | DMA registers |
  | 0x4000_2000 | UART |
  | 0x4000_3000 | MAC accelerator MIB/CSR |
  | anything else | two-cycle ERROR response |

- **`dma_controller`:** one channel and an AHB master. It copies LEN words,
  each as a single read followed by a single write, and keeps its bus request
  up for the whole block. It has static address translation: an address whose
  top nibble equals XLT_FROM goes out with XLT_TO instead.

  | Offset | Register |
  |---|---|
  | 0x00 | SRC |
  | 0x04 | DST |
  | 0x08 | LEN |
  | 0x0C | CTRL: start, interrupt enable, translate enable |
  | 0x10 | STATUS: busy, done (write 1 to clear) |
  | 0x14 | XLT |

- **`timer_wdt_intc`:**

  | Offset | Register |
  |---|---|
  | 0x00 | timer LOAD |
  | 0x04 | timer VALUE |
  | 0x08 | timer CTRL: enable, periodic |
  | 0x10 | watchdog LOAD |
  | 0x14 | KICK |
  | 0x18 | watchdog CTRL |
  | 0x1C | watchdog VALUE |
  | 0x20 | RAW |
  | 0x24 | ENABLE |
  | 0x28 | STATUS |
  | 0x2C | CLEAR (timer) |

  Interrupt lines are: 0 timer, 1 DMA, 2 UART, 3..7 external.
- **`uart`:** 8N1 with a one-byte receive register and an overrun flag.

  | Offset | Register |
  |---|---|
  | 0x0 | DATA |
  | 0x4 | STATUS: tx busy, rx valid, overrun |
  | 0x8 | DIV: bit = DIV+1 clocks; resets to 15 |

- **`mha_mib_csr`:** the MAC accelerator's MIB counters and command/status
  word. The counters count event pulses and saturate.

  | Offset | Register |
  |---|---|
  | 0x00 | RX_OK: frames with a good FCS |
  | 0x04 | FCS_ERR: frames with a bad FCS or length |
  | 0x08 | ACK_REQ |
  | 0x0C | CTS_REQ |
  | 0x10 | DUP: duplicates detected |
  | 0x14 | ACCEPT: frames accepted for this station |
  | 0x18 | STATUS: medium busy, NAV busy, receive FIFO overflow |
  | 0x1C | CTRL: write bit 0 = 1 to clear the counters |

  The configuration values (own address, contention window, backoff start)
  are top-level ports rather than registers here.

The local-bus master port and the AHB master ports are top-level ports. The
two ARM7 processors, the bridge, the SDRAM/Flash controller, PCI and Ethernet
are outside this RTL.

## Where this design makes its own choices

The reference architecture names most of these blocks and says what they do.
It does not give their internals, so the following are this design's choices:

- **OFDM details:** scrambler polynomial, code generators, puncturing and
  interleaving patterns, constellations and pilot values. They follow the two
  standards.
- **Modem structure:**
  - FFT architecture, fixed-point formats and the 80 MHz clock;
  - Viterbi structure and depth;
  - the zero padding of the last symbol.
- **MAC:**
  - IEEE 802.11 frame layout, CRC and IFS/slot times;
  - the one-entry duplicate cache;
  - ACK/CTS sent one SIFS after the request, and the CTS duration rule;
  - 64-octet transmit and receive FIFOs; the receive FIFO drops on overflow;
  - the LFSR random generator.
- **System:**
  - memory map, register maps, the local-bus protocol and the MAC/modem bit
    order;
  - bank 1 placed at the lowest addresses;
  - 3.4 KB rounded to 870 words.
- **DMA scope:** the DMA has one channel. Priority between several channels
  and dynamic bandwidth assignment are not built.
- **Scope of the two standards:** HIPERLAN/2's first puncturing stage and
  DLC-specific hardware are not built.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and calls `$finish`. A
watchdog fails a testbench that hangs. For example:

```
verilator --binary --timing --assert -I. rtl/wlan_pkg.sv rtl/scrambler.sv \
          tb/tb_scrambler.sv --top-module tb_scrambler -o sim -Mdir obj && obj/sim
```

`tb_wlan_soc` needs every file in `rtl/`, with `rtl/wlan_pkg.sv` first. It
runs at the default (full) sizes:

- 120 KB and 16 KB SRAMs;
- Viterbi depth 64;
- `CYC_PER_US = 80`.

It acts as the protocol processor and the modem controller, and loops the
transmit samples back into the receiver. Then it does the following:

- It fills the dual-port SRAM over AHB.
- It provokes ERROR responses from unmapped addresses.
- It runs a DMA copy while the CPU competes for the bus. The DMA holds the CPU
  off.
- It reads the copy over the coded local bus, and exercises both banks of
  both memories.
- It fires the timer, starves the watchdog and loops bytes through the UART.
- It sends ten MPDUs through MAC + modem in nine modes:
  - a data frame, which raises an ACK request (and an ACK frame body on the
    `ctl_*` ports);
  - its retry, detected as a duplicate;
  - an RTS, which raises a CTS request;
  - a beacon with timestamp insertion;
  - a frame for another station, which sets the NAV;
  - a frame corrupted on the air, which fails the CRC and switches to EIFS;
  - four more data frames.
- It ends with a backoff. The protocol processor then reads the MIB counters
  over the AHB and compares them with the events it saw.

At the end it prints how often each mechanism happened, and it counts a
failure for any mechanism that did not happen. The block testbenches compare
against models written independently inside them. Examples: a reference
convolutional encoder, an O(N²) DFT, and bit-level CRC and interleaver
formulas.

`tb/tb_util.svh` holds the check macros. `tb/tb_ahb_tasks.svh` holds the AHB
master tasks shared by the slave testbenches.

## Notes on tool warnings

- `bus_invert_codec` has one module for both ends. The encoder leaves `in_inv`
  unused, and the decoder leaves `clk`, `rst_n` and `valid` unused.
- The top ties the decoders' unused outputs to named `*_unused` nets.
- The remaining unused-signal warnings (bus fields a slave does not need,
  observation points in the top, package constants) are explained in a
  "Lint note" in the header of each module concerned.
- The arbiter's HREADY assertion uses the asynchronous reset in its
  `disable iff`. Some synthesis front ends report this as a mixed
  synchronous/asynchronous use of the reset net. It is a simulation-only
  check.
