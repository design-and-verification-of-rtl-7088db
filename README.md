# A layered PCIe-style serial link in SystemVerilog

This design sends 32-bit words from one end of a serial link to the other.
It uses the three-layer structure of PCI Express: transaction, data link and
physical. Each layer adds its own protection on the way out and checks it on
the way in:

* The **transaction layer** wraps the word in a packet (a TLP) with a header,
  a trailer and a 32-bit end-to-end CRC (the ECRC).
* The **data link layer** adds a 32-bit link CRC (the LCRC).
* The **physical layer** scrambles each byte and codes it 8b/10b. It then adds
  a parity bit and sends the result one bit per clock.

The receiver runs the same chain backwards. A failed check is answered with
a NACK, and the transmitter then sends the same packet again. A word reaches
`data_out` only after every check has passed.

The design is a compact model of the PCIe layering. It runs at 100 MHz on a
small FPGA. It is **not** a standards-compliant PCIe 3.0 controller. It has
no 128b/130b coding, no DLLPs or sequence numbers, no link training, no
flow-control credits and no real TLP header format. The header byte (FA for a
request, AF for a completion) and the trailer byte (77) are only
illustrative markers. Treat this design as a readable reference for how the
layers protect data, not as an interoperable IP.

## What travels on the link

A user word `D` sent with header `H` becomes a 14-byte frame. The bytes leave
in this order:

| byte | 0 | 1 | 2 | 3 | 4 | 5 | 6 | 7 | 8 | 9 | 10..13 |
|---|---|---|---|---|---|---|---|---|---|---|---|
| content | H (FA/AF) | D[7:0] | D[15:8] | D[23:16] | D[31:24] | ECRC[31:24] | ECRC[23:16] | ECRC[15:8] | ECRC[7:0] | 77 | LCRC, MSB byte first |
| added by | TL | TL | TL | TL | TL | TL | TL | TL | TL | TL | DLL |

Bytes 0 to 9 are the TLP. The ECRC covers only the four data bytes. The LCRC
covers all ten TLP bytes. The receiver finds frame boundaries by counting
bytes from reset, because there are no framing symbols.

On the wire, each byte goes through three steps:

1. It is scrambled.
2. It is coded into a 10-bit symbol.
3. An even-parity bit is added, giving 11 bits.

The 11 bits sit in the low end of a 16-bit word, with the upper 5 bits zero.
The word is sent most significant bit first, one bit per clock, under a
`ser_valid` strobe. So a byte costs 16 link clocks. The transmitter also
idles for 3 clocks per byte while the next byte moves down its pipeline.

## Transmit and receive chains

```
data_in ─► tl_tx ───────────────► dl_tx ──────────► phy_tx ───────────────────────────────┐
           hdr_trl_fifo (6x8)     lcrc32 (serial)   scrambler ► enc8b10b ► parity_gen ►    │ serial
           ecrc32 (ECRC_TX)                                     serializer (PISO, 16 bit)  │ link
                                                                                           │ (^ link_flip)
data_out ◄─ tl_rx ◄────────────── dl_rx ◄────────── phy_rx ◄──────────────────────────────┘
           ecrc32 (ECRC_RX)       lcrc32 (serial)   deserializer (SIPO) ► parity_chk ►
           ECRC compare           LCRC compare      dec10b8b ► descrambler
              │ ack_tl/nack_tl       │ ack_dl/nack_dl        │ phy_err
              └──────────────────────┴──► back to tl_tx: ack_tl releases, any NACK replays
```

Every stage handles one byte at a time. Between layers, bytes pass over
valid/ready handshakes. Inside the physical layer, a valid pulse moves each
byte from one register stage to the next.

## Error detection and retransmission

This is the part of the design that needs the most care.

**Three checks, three outputs.**

* `phy_err` pulses when an 11-bit word arrives with odd parity.
* `ack_dl` or `nack_dl` pulses once per frame, after its last byte. NACK is
  given when the LCRC computed over the received TLP bytes differs from the
  received LCRC, or when any byte of the frame was flagged by the physical
  layer.
* `ack_tl` or `nack_tl` pulses only for frames that passed the link check. It
  compares the ECRC recomputed over the received data with the ECRC in the
  packet.

**Flagged bytes are not dropped.** A byte with a parity, code or disparity
error is still decoded and descrambled, and is passed up with an error flag.
Dropping it would have two bad effects:

* The receiver's byte count would lose its alignment with the frame.
* The descrambler's LFSR would fall behind the scrambler's.

Both depend on every byte being handled on both sides. Instead, the data link
layer rejects the whole frame.

**Disparity after a damaged symbol.** The decoder keeps its running disparity
from the bits it actually receives. After a corrupted symbol it may
therefore report a disparity error on one of the next few symbols. That can
also NACK the following frame once. The retransmission repairs it, and the
disparity recovers at the next unbalanced symbol.

**Stop-and-wait.** `tl_tx` keeps the header, data and trailer in its 6-entry
FIFO. The ECRC stays in its register until the packet is released by
`ack_tl`. A NACK from either layer rewinds the FIFO and sends the same TLP
again, scrambled under the current LFSR state. `tx_ready` is low from the
moment a word is accepted until its `ack_tl`. So exactly one packet is in
flight, and every word reaches `data_out` exactly once and in order.

**Why the ECRC can fail at all.** On this link, the LCRC catches every damage
done on the wire. The ECRC protects against damage between the two CRC
stages inside a device. The `tl_corrupt` test input produces exactly that: it
flips bit 0 of the first data byte after the ECRC was computed, and only in
the first transmission. That packet passes the LCRC, fails the ECRC (`nack_tl`)
and is then replayed cleanly. The `link_flip` input inverts the serial line
while it is high, which models a bit error on the wire.

## Bit-level conventions

| item | convention | reference value |
|---|---|---|
| ECRC (`ecrc32`) | CRC-32, polynomial 04C11DB7, MSB first, seed FFFFFFFF, no final inversion, 32 bits per clock | seed → `f0f0f0f0` → 6b6ec559 → `0f0f0f0f` → 8088083a |
| LCRC (`lcrc32`) | same polynomial and seed by default (parameters `POLY`, `SEED`), 1 bit per clock, bytes fed MSB first | `lcrc_out` is `c` with each byte's bits reversed (c = 00000003 → 000000c0) |
| scrambler | Galois LFSR x^16+x^5+x^4+x^3+1, seed FFFF, 8 steps per byte, byte bit 0 meets the first output | masks FF, 17, C0, 14, B2, E7 …; 55 as the 5th byte → E7 |
| 8b/10b | standard Widmer-Franaszek tables, RD negative after reset; symbol held as `{j,h,g,f,i,e,d,c,b,a}` | D0.0 at RD- → 0B9; 0B9 → 000 |
| parity | even, over 11 bits; the parity bit is bit 0, under the symbol | 11100101 → odd → rejected |
| serializer | 16-bit PISO, MSB first, `ser_valid` per bit | — |

All CRC and LFSR arithmetic lives as functions in `rtl/pcie_pkg.sv`. The
8b/10b tables and the encoder function live in `rtl/code8b10b_pkg.sv`.

## Timing

* A byte occupies 19 clocks: 16 link bits plus 3 pipeline clocks.
  `dl_tx` spends 8 clocks feeding each byte into its serial LCRC, which is
  hidden behind the link time.
* An error-free packet takes **283 clocks** from the clock in which `data_in`
  is accepted to `data_out_valid`: 14 × 19 + 17. At 100 MHz that is 2.83 µs.
  `tb_pcie_v3` checks this number for every clean packet.
* A NACKed packet costs another ~283 clocks per retransmission.
* `ack_dl`/`nack_dl` come one clock after a frame's last byte.
  `ack_tl`/`nack_tl` and `data_out_valid` come two clocks after that.

The original FPGA version reported an input-to-output delay of 165 ns
(16.5 clocks). It moved each byte through its "serializer" in parallel. This
design follows the written architecture instead, a real parallel-in
serial-out converter, which is why it is slower by a factor of about 17.

## Top-level ports (`pcie_v3`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock (100 MHz target); active-low reset, both ends together |
| `data_in`, `data_valid`, `tx_ready` | in/in/out | 32/1/1 | user word, accepted when `data_valid && tx_ready` |
| `is_cpl` | in | 1 | 0: request header FA, 1: completion header AF |
| `data_out`, `data_out_valid`, `rx_is_cpl` | out | 32/1/1 | delivered word and its header type |
| `ack_tl`, `nack_tl` | out | 1 | end-to-end (ECRC) verdict, one-clock pulses |
| `ack_dl`, `nack_dl` | out | 1 | link (LCRC) verdict, one-clock pulses |
| `phy_err` | out | 1 | parity error on a received word, one-clock pulse |
| `link_flip`, `tl_corrupt` | in | 1 | test inputs (tie to 0 in use) |

Parameter `SER_W` (default 16) is the serializer word width. It must be at
least 11.

## Files

| file | block |
|---|---|
| `rtl/pcie_pkg.sv` | shared constants, CRC and scrambler functions |
| `rtl/code8b10b_pkg.sv` | 8b/10b tables and encode function |
| `rtl/pcie_v3.sv` | top: transmitter, receiver, link, ACK/NACK feedback |
| `rtl/tl_tx.sv`, `rtl/hdr_trl_fifo.sv`, `rtl/ecrc32.sv` | transaction layer transmitter, its 6 × 8 FIFO and the ECRC |
| `rtl/tl_rx.sv` | transaction layer receiver (ECRC check) |
| `rtl/dl_tx.sv`, `rtl/dl_rx.sv`, `rtl/lcrc32.sv` | data link transmitter/receiver and the serial LCRC |
| `rtl/phy_tx.sv`, `rtl/phy_rx.sv` | physical layer chains |
| `rtl/scrambler.sv`, `rtl/descrambler.sv` | LFSR scrambling |
| `rtl/enc8b10b.sv`, `rtl/dec10b8b.sv` | 8b/10b coding, with code and disparity errors |
| `rtl/parity_gen.sv`, `rtl/parity_chk.sv` | even parity |
| `rtl/serializer.sv`, `rtl/deserializer.sv` | 16-bit PISO / SIPO |

Each file opens with a description of its function, interface and timing.
It also says which parts follow the original design and which are choices
made here.

## What follows the original design, and what is added

Taken from the original design:

* the three layers and the order of blocks in each;
* 32-bit user data;
* the 6 × 8 header/trailer FIFO and the byte order in it;
* the FA/AF/77 markers;
* the active-low reset;
* ECRC and LCRC with ACK/NACK at both layers;
* the LFSR scrambler;
* 8b/10b coding;
* appended even parity with `phy_err`;
* 16-bit serializer and deserializer;
* the top-level port names.

The ECRC form and the scrambler polynomial are not stated outright. They are
fixed here by reproducing the original reference values (table above).

Choices made here, because the original leaves them open:

* the TLP layout with ECRC before the trailer;
* the LCRC polynomial and seed (the standard PCIe ones);
* the per-byte bit reversal at the LCRC output, taken from its reference values;
* all handshakes and valid strobes;
* framing by byte count;
* stop-and-wait retransmission from the FIFO;
* folding physical-layer errors into a link NACK;
* zero-extension of the 11-bit word to the 16-bit serializer;
* MSB-first serial order;
* the `ecrc_init` input of `ecrc32`;
* the test inputs.

Known differences from the original's reported behaviour:

* The 165 ns delay is not met (see Timing).
* The LCRC register sequence in the original's waveform (c = 80000000,
  00000001, 00000003 for input bits 0 then 1) comes from a register with
  feedback x^32 + 1 and seed 80000000. That is not a real CRC-32: it only
  folds the bits onto 32 positions. So the default stays the PCIe
  polynomial. `lcrc32` takes `POLY` and `SEED` parameters, and `tb_lcrc32`
  checks the original sequence on a second instance with `POLY = 32'h1`,
  `SEED = 32'h80000000`.
* The original encoder showed a `disp_err` output. An encoder has no
  disparity error to report, so this design's encoder has none.
* The synthesized original used 8-bit `data_in`/`pcie_out` ports. This design
  uses the 32-bit ports of the block diagram.

The analog part of a real PCIe link, the differential transmit/receive pairs
and their drivers, is not modelled. The link here is one digital bit plus a
valid strobe.

## Simulating

Every module and testbench compiles with plain Verilator 5. The packages go
first. Modules are found by name in `rtl/` (`-y rtl`). For example, the
end-to-end test:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl \
  rtl/pcie_pkg.sv rtl/code8b10b_pkg.sv tb/tb_pcie_v3.sv \
  --top-module tb_pcie_v3 -o sim && ./obj_dir/sim
```

Any other testbench runs the same way with its own name. They take seconds.

Every testbench prints one line, `TB_RESULT checks=N failures=M`, and stops
itself with a watchdog if the design hangs. The testbenches are:

* `tb_ecrc32`, `tb_lcrc32`: compare with a CRC computed by polynomial long
  division in `tb/tb_crc_ref.svh`, plus the reference values.
* `tb_scrambler`, `tb_descrambler`: the reference byte sequence and a
  bit-by-bit LFSR model.
* `tb_enc8b10b`: hand-worked symbols, then line-code rules over a random
  stream (weight, bounded running sum, run length ≤ 5, no shared symbols).
* `tb_dec10b8b`: reference symbols, a round trip of all 256 data and 12
  control bytes, and code and disparity errors.
* `tb_parity_gen`, `tb_parity_chk`, `tb_serializer`, `tb_deserializer`,
  `tb_hdr_trl_fifo`: function and timing of the small blocks.
* `tb_tl_tx`, `tb_tl_rx`, `tb_dl_tx`, `tb_dl_rx`, `tb_phy_tx`, `tb_phy_rx`:
  each layer alone against models.
  * `tb_phy_tx`/`tb_phy_rx` use the shared transmit model in
    `tb/tb_phy_model.svh`.
  * `tb_phy_rx` injects bit errors.
* `tb_pcie_v3`: the whole design at default parameters. It sends 40 words
  with random link errors and end-to-end errors. It checks in-order,
  exactly-once delivery and the 283-clock latency. It also checks that every
  mechanism occurred: ACK and NACK at both layers, parity error, replay and
  both header types.

## Size

Coarse synthesis of `pcie_v3` gives about 800 word-level cells, 541
flip-flop bits and 256 memory bits. Most of the flip-flops are the two
`ecrc32`/`lcrc32` pairs, the TLP buffer in `dl_rx` and the FIFO. That is a
small fraction of a Spartan-6 XC6SLX16 (about 18k flip-flops). Timing at
100 MHz has not been checked. The deepest logic is the 32-bit-per-clock
ECRC, an XOR tree about 32 levels deep before optimisation.
