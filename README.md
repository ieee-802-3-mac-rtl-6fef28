# IEEE 802.3 CSMA/CD MAC transmitter

This is the transmit half of an Ethernet (IEEE 802.3) medium access controller, in
synthesizable SystemVerilog. A 32-bit buffer holds a destination address, a length
and the data. From it the design sends a complete frame to the PHY as 4-bit nibbles:
preamble, start frame delimiter, addresses, length, data, padding and CRC. It does
so under the CSMA/CD rules:

- it waits for an idle line and a 96-bit inter-frame gap;
- it jams the line when a collision is reported;
- it retries after a truncated binary exponential backoff;
- it gives up after 16 attempts.

The transmitter sends one nibble per clock, so a 25 MHz clock gives 100 Mb/s.

The design has five cooperating blocks and a frame buffer. Each block has a small
one-hot state machine, and the blocks talk through single-clock pulses:

```
            strt_xmit                 crs                        col
 LLC ───────────┐                      │                          │
                ▼                      ▼                          ▼
           ┌─────────┐ xmit_frame ┌────────────┐  txd[3:0], tx_en
           │  defer  │───────────▶│transmitter │──────────────────▶ PHY
           │ (gap)   │◀───────────│ (one-hot)  │
           └─────────┘ xmit_over  └────────────┘
             ▲     ▲              │ strt  │fa_next  ▲ fcs
    strt_def │     │ bo_err       ▼       ▼         │
           ┌─────────┐ strt_bo  ┌──────────────┐ ┌──────┐
           │ backoff │◀─────────│frame assembler│─▶│ CRC  │
           │ + LFSR  │          └──────────────┘ └──────┘
           └─────────┘              ▲ 32-bit read
                              ┌──────────────┐
 LLC ── buf_we/waddr/wdata ──▶│ frame buffer │
                              └──────────────┘
```

## Files

| file | module | role |
|---|---|---|
| `rtl/mac_pkg.sv` | package | frame constants, CRC polynomial, one-hot state types |
| `rtl/mac_tx_top.sv` | `mac_tx_top` | top level: wires the blocks together |
| `rtl/mac_defer.sv` | `mac_defer` | inter-frame gap and carrier deferral |
| `rtl/mac_transmitter.sv` | `mac_transmitter` | nibble sequencer: preamble, SFD, frame, FCS, jam |
| `rtl/mac_frame_assembler.sv` | `mac_frame_assembler` | builds DA, SA, length, data and pad bytes |
| `rtl/mac_frame_buffer.sv` | `mac_frame_buffer` | 512 × 32-bit buffer, asynchronous read |
| `rtl/mac_crc32.sv` | `mac_crc32` | byte-wide CRC-32 |
| `rtl/mac_backoff.sv` | `mac_backoff` | truncated binary exponential backoff |
| `rtl/mac_lfsr.sv` | `mac_lfsr` | 16-bit LFSR, the backoff's random source |
| `tb/tb_*.sv` | | one self-checking testbench per module, plus `tb_mac_tx_top` |

## The frame and the buffer

The line carries these fields. Every byte goes out low nibble first.

| field | bytes | source |
|---|---|---|
| preamble | 7 × `0x55` | transmitter |
| SFD | `0xD5` | transmitter |
| destination address | 6 | buffer word 0, upper half of word 1 |
| source address | 6 | `SRC_ADDR` parameter (hard-wired) |
| length | 2 | lower half of buffer word 1, high byte first |
| data | *length* | buffer words 2 onward |
| pad | `max(0, 46 − length)` × `0x00` | frame assembler |
| FCS | 4 | CRC block |

Bytes are big-endian inside a buffer word: byte 0 of a word is bits 31:24. So word
0 is `{DA0, DA1, DA2, DA3}`, word 1 is `{DA4, DA5, LEN[15:8], LEN[7:0]}`, and data
byte *j* is in word `2 + j/4`. The largest frame (1500 data bytes) needs 377 of the
512 words. A length above 1500 is an error: the frame is stopped after the SFD, and
`len_err` is raised.

## How one frame goes out

The chain of events from a `strt_xmit` pulse on a quiet line is shown below. Clock
numbers count from the clock in which `strt_xmit` is high.

| clock | event |
|---|---|
| 0 | `strt_xmit` seen; `x_busy` rises from clock 1 |
| 1–15 | defer: first part of the gap, 60 bit times, with carrier sense watched |
| 16–24 | defer: second part of the gap, 36 bit times, with carrier sense ignored |
| 25 | `xmit_frame` pulse |
| 26–39 | 14 preamble nibbles |
| 40–41 | SFD nibbles `5`, `D`; `strt` rises at 40 |
| 42 … | frame bytes, two clocks each, then 8 FCS nibbles |
| last + 1 | `tx_en` and `strt` low, `xmit_over` pulse, `x_busy` low |

Carrier sense seen in clocks 1–15 restarts the 15-clock count. The MAC therefore
keeps deferring for as long as the line is busy. The first preamble nibble then
comes 26 clocks after the last clock of carrier.

### Transmitter, frame assembler and CRC handshake

This part of the timing is the hardest to follow. `strt` is a level signal that is
high from the first SFD nibble to the last FCS nibble. It tells the frame assembler
and the CRC block that a frame is under way. When it falls, both return to idle,
and the CRC register is preset back to all ones.

The two SFD clocks give the frame assembler just enough time to start:

- **SFD clock 1:** while the assembler is idle, its buffer read address points at
  word 1, so it latches the length in this clock.
- **SFD clock 2:** it reads word 0 and registers byte 0 of the frame.

Byte 0 is then ready on `dout` when the transmitter needs it. From then on:

- Each frame byte is on the line for two clocks.
- In the second of those clocks the transmitter pulses `fa_next`.
- That single pulse consumes the byte at the assembler and clocks the same byte into
  the CRC (it is the CRC's `en_crc`). The CRC therefore covers exactly the bytes that
  were sent.
- The assembler loads the next byte in the same clock edge. It can do this because
  its buffer read address always points at the word that holds the *next* byte, and
  the buffer is read asynchronously.

After the byte flagged `dlast`, the CRC register already holds the last byte, and
the transmitter sends `fcs = ~crc` for 8 clocks.

### CRC bit order

The CRC-32 generator polynomial is
G(x) = x³²+x²⁶+x²³+x²²+x¹⁶+x¹²+x¹¹+x¹⁰+x⁸+x⁷+x⁵+x⁴+x²+x+1. The frame check sequence
is defined on the frame's bits in line order:

1. Complement the first 32 bits.
2. Multiply by x³².
3. Divide by G(x).
4. Complement the remainder. Its x³¹ coefficient goes on the line first.

Each byte goes out least significant bit first. For that reason `mac_crc32` keeps
the remainder bit-reversed: register bit 0 is the x³¹ term. The register shifts
right against the reversed polynomial `0xEDB88320`, eight steps per enabled clock.
Presetting the register to all ones does the same as complementing the first 32
bits. As a result, `fcs[3:0]` is the first FCS nibble on the line, and `fcs[31:28]`
is the last. For the ASCII string `123456789`, `fcs` is the familiar check value
`0xCBF43926`.

### Collisions, jam and backoff

If `col` is high while the preamble, SFD, frame or FCS is on the line:

1. The nibble of that clock is still sent.
2. The next 8 clocks carry the jam: 32 ones.
3. `strt` falls at once, so the assembler and CRC reset.
4. After the jam, `tx_en` falls and `strt_bo` pulses.

The backoff block then counts the collision as attempt *n* and handles it as
follows:

- **At the 16th collision** (the first try plus 15 retries) it gives up. `col_err`
  pulses, and the defer block returns to idle.
- **Otherwise** it takes k = min(n, 10) low bits of a free-running 16-bit LFSR as r,
  so 0 ≤ r < 2ᵏ. It waits r slot times of 512 bit times (128 clocks) each, then
  pulses `strt_def`. That pulse sends the defer block back to the start of the gap.

Counted from the last jam nibble, the retry's first preamble nibble comes
`r·128 + 28` clocks later. A successful frame (`xmit_over`) clears the collision
count.

## Top-level interface (`mac_tx_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock (one nibble per clock), asynchronous active-low reset |
| `strt_xmit` | in | 1 | request to send the frame in the buffer (ignored while `x_busy`) |
| `buf_we`, `buf_waddr`, `buf_wdata` | in | 1, 9, 32 | buffer write port |
| `crs`, `col` | in | 1 | PHY carrier sense, collision detect |
| `txd`, `tx_en` | out | 4, 1 | transmit nibble and TXDV to the PHY |
| `x_busy` | out | 1 | a frame is in progress |
| `xmit_over` | out | 1 | pulse: the frame has ended (sent, or cut short by a length error) |
| `col_err` | out | 1 | pulse: 16 attempts all collided, frame dropped |
| `len_err` | out | 1 | length field above 1500 |
| `attempts` | out | 5 | collisions so far for the current frame |

The buffer must not be rewritten while `x_busy` is high.

Parameters of the top, with their defaults:

- `BUF_DEPTH = 512`
- `SRC_ADDR = 48'h02_00_00_00_00_01`
- `IFG1_BITS = 60`, `IFG2_BITS = 36`
- `SLOT_BITS = 512`
- `MAX_ATTEMPTS = 16`
- `BACKOFF_LIMIT = 10`

The frame constants (preamble length, jam length, 46/1500 limits) are in `mac_pkg`.

## Design choices and departures

Taken from the 802.3 description this design is built on:

- the five-block structure and the signal names (`STRT_XMIT`, `X_BUSY`, `XMIT_FRAME`,
  `XMIT_OVER`, `STRT_DEF`, `STRT_BO`, `STRT`, `TXDV`);
- the 60 + 36 bit gap;
- the 4-byte all-ones jam;
- the 16-attempt limit and k = min(n, 10);
- the field order and buffer layout, the padding rule and the length error;
- the CRC polynomial and definition;
- one byte every two clocks;
- one-hot state coding;
- an LFSR as the random source.

Choices made here:

- **Backoff range.** r is drawn from 0 ≤ r < 2ᵏ, the 802.3 rule, not 0 ≤ r ≤ 2ᵏ.
- **Slot time.** 512 bit times, the standard value.
- **Collisions.** They are handled in every field, not only in the preamble. The jam
  starts at once, without first finishing the preamble.
- **Length errors.** The frame is cut after the SFD, and the error ends it like
  `xmit_over`. Length values of 1536 and above (Ethernet II type codes) count as
  length errors, because this MAC supports only length fields.
- **Ending a frame.** `xmit_over` returns the defer block to idle. The backoff error
  does the same.
- **Nibble and byte order.** The nibble order inside a byte is low nibble first, and
  the byte order inside a buffer word is big-endian.
- **Buffer.** It is 512 words deep with asynchronous read, so it maps to distributed
  RAM on an FPGA. A block-RAM version would need one more clock of prefetch in the
  assembler.
- **LFSR.** Polynomial x¹⁶+x¹⁴+x¹³+x¹¹+1 with seed `0xACE1`. It shifts every clock,
  so r also depends on when the collision happens.
- **Source address.** `02:00:00:00:00:01` is a placeholder; set `SRC_ADDR`.

Not included:

- the LLC and the PHY, which are represented only by the top-level ports;
- a built-in self-test, which is only named, never specified;
- the receive side of the MAC.

## Verification

Each testbench checks its module against values it works out itself, and ends with
a `TB_RESULT checks=… failures=…` line.

- **`tb_mac_crc32`:** random frames against a bit-serial model of the polynomial
  definition above, plus the `123456789` check value.
- **`tb_mac_defer`:** random carrier patterns. Checks the exact `xmit_frame` clock
  against a "first 15 quiet clocks, then 9" rule, and the `strt_def`, `xmit_over`
  and `bo_err` exits.
- **`tb_mac_backoff`:** 150 frames of collisions with a 32-bit slot, to keep the run
  short.
  - Every delay must be a whole number of slots plus one clock, with r < 2ᵏ.
  - For n ≤ 4, every r value must appear.
  - The 16th collision must give `err`.
- **`tb_mac_transmitter`:** compares a clock-by-clock trace against one built from
  the frame format, with collisions in every field and the length abort.
- **`tb_mac_frame_assembler`:** lengths 0, 1, 17, 45, 46, 47, 64, 100, 777, 1499 and
  1500 plus random ones, and the error lengths 1501, 1536 and 65535.
- **`tb_mac_frame_buffer`:** random writes and reads against a model array.
- **`tb_mac_tx_top`:** end to end, at the default parameters. The testbench acts as
  both the LLC and the PHY.
  - Each line burst is checked against the frame and its FCS.
  - It checks the 26-clock start, deferral behind carrier, one nibble per clock, and
    the backoff spacing of each retry.
  - It requires each mechanism at least once: deferral restart, padding, a 1500-byte
    frame, collision and jam, backoff retry, the 16-attempt error, and the length
    error.

With the default 128-clock slot, the 16-attempt case takes a few hundred thousand
clocks. The whole run still finishes in under a second of simulation time.

To run a testbench with plain Verilator (5.x):

```
verilator --binary --timing --assert -Irtl -y rtl rtl/mac_pkg.sv tb/tb_mac_tx_top.sv \
          --top-module tb_mac_tx_top -Mdir obj_tb
./obj_tb/Vtb_mac_tx_top
```

Replace `tb_mac_tx_top` with any other testbench name. For lint, use
`verilator --lint-only -Wall -Irtl -y rtl rtl/mac_pkg.sv rtl/mac_tx_top.sv`.

The remaining lint warnings are harmless:

- package constants that a given module does not use;
- the upper LFSR bits that the backoff does not read;
- `rst_n` used both as the flip-flops' asynchronous reset and in the assertions'
  `disable iff`.
