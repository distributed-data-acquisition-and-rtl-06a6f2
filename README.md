# Slice FPGA for a distributed focal-plane data acquisition and storage system

A large space telescope camera cannot afford one central computer that
receives, compresses and stores every pixel. Instead, each group of detector
readout channels (a *slice*) has its own FPGA, its own NAND flash and, for
infrared channels, its own SDRAM. The instrument control unit (ICU) only sends
commands and block lists; the slice receives the detector data, compresses it
losslessly in real time (CCD channels) or averages several readouts first
(NIR channels), packs it into CCSDS source packets and writes it page by page
into flash. Later the ICU asks the slice to play a file back over a serial
downlink.

This repository holds synthesizable SystemVerilog for that slice FPGA and
self-checking test benches for each part and for the whole.

## Data flow

```
 ICU link ──► cmd_proc ──► slice_regs ──► (enables, block list, counts)
                 └──────► front-end command link (forwarded commands)

 CCD link ─► fe_rx ───────────────────────────┐
                                              ▼
 NIR links ─► fe_rx ─► nir_acc ◄─► sdram_ctrl ─► compressor ─► page_buf ─► flash_ctrl ─► NAND banks
                                                                    ▲           │
                                              downlink_ctrl ◄───────┘ (playback)◄┘
                                                   └─► serial downlink
```

* **CCD exposure**: pixels arrive in 66-bit frames (start bit, four
  interleaved 16-bit pixels, one parity bit over all 64 data bits, stop bit)
  and go straight into compression.
* **NIR exposure**: four synchronous lanes deliver one word each per frame.
  Each readout cycle adds to (or subtracts from) a 32-bit running sum per
  pixel kept in SDRAM. After the last readout the sums are shifted right and
  clamped to 16 bits. A separate transfer then streams them into compression.
* **Storage**: compressed packets fill 2048-byte page buffers. The flash
  controller programs each full page into the next page of the current block
  from the ICU's block list.
* **Downlink**: the flash controller reads pages of the listed blocks back
  into the page buffers. The downlink controller sends exactly the file byte
  count the ICU programmed.

## Compression chain (`compressor`)

The compressor is a hardware version of the CCSDS 121 adaptive Rice coder.
Its stages are:

1. **Pre-scaler** (optional, `prescaler`). A 4096-entry table holds
   increasing thresholds. A 12-step binary search finds the largest index
   whose threshold is at or below the pixel. With thresholds `c*c/256` this
   is a square-root companding that shortens code words for photon-noise
   limited data. The ICU loads the table, so the law is a software choice.
   The search takes one step per clock, and latency is 13 clocks.
2. **Prediction error mapper** (`pem`). This uses a unit-delay predictor per
   channel (the four interleaved channels are independent). It applies the
   CCSDS mapping with `theta = min(pred, 65535 - pred)`, so the output is a
   non-negative number that is small when the prediction is good.
3. **Input FIFOs** (`blkbuf`, two copies). Each holds two groups of four
   interleaved 16-sample blocks. A group is read back one channel's block at
   a time. One copy feeds length evaluation. The other copy holds the same
   samples until the option is known.
4. **Sequence length evaluation** (`seq_eval`). Fourteen accumulators run in
   parallel. Option `k` (k = 0 is the fundamental sequence) costs
   `(d >> k) + 1 + k` bits per sample.
5. **Option voting tree** (`option_vote`). A binary tree of comparators
   picks the shortest option. If none beats 256 raw bits, or if the ICU
   forces it, it picks "no compression" (ID 15).
6. **Sequence construction** (`seq_construct`). This writes the 4-bit option
   ID, then the 16 unary code words, then the 16 k-bit remainders, one bit
   per clock. Bits are packed MSB first into bytes. Each packet of
   `PKT_BLOCKS` = 60 blocks (960 pixels) ends on a byte boundary.
7. **Packet formation** (`packet_former`). Two 2048-byte buffers
   alternate. The 14-byte header is produced while a buffer is read out, so
   the data length is known by then. The header has two parts:
   * the CCSDS primary header: APID, sequence count and length;
   * a secondary header: packet number, exposure ID, compression mode, slice
     ID and pixels per packet.

   Mode codes are 0 for uncompressed, 1 for lossless with pre-scaler and 2
   for lossless.

The worst case packet is 60 × (4 + 256) bits + 14 bytes = 1964 bytes. So one
packet always fits one page buffer and one flash page.

The predictor state starts at zero at each exposure (`clear`). No reference
sample is inserted. An exposure must be a whole number of packets (960 pixels
at the defaults); the design does not emit a short last packet.

## Flash storage (`flash_ctrl`, `page_buf`, `block_id_ram`)

Each slice has two NAND banks of four chips with shared control lines per
bank and eight chip enables. The ICU writes the list of blocks into the
block ID RAM as 16-bit entries `{chip[2:0], block[12:0]}`; chip bit 2 selects
the bank. The controller supports three commands:

| command  | what happens |
|----------|--------------|
| readout  | Waits for a full page buffer and issues 80h, five address cycles, 2048 data bytes, then 10h. It waits for R/B#, reads status (70h), and moves to the next page. After `PAGES_PER_BLOCK` (64) pages it moves to the next listed block. A failing status records the block in a 16-entry bad block list, once per block. If a page arrives when the list is used up, it sets error code 1 (block overflow) and raises `suspend`, which stops the compressor and accumulator inputs. |
| downlink | Issues 00h, five address cycles and 30h, waits, and reads the page into the page buffer. It reads as many pages as the file byte count needs. |
| erase    | Issues 60h, three row cycles and D0h for each listed block, then reads status. |

Bus cycles are two system clocks (WE#/RE# low one clock, high one clock).
The page buffers count the bytes written. A `flush` pads the last partial
page with 0xFF, but the byte count excludes the padding. That count is the
file size that the ICU reads back and later programs into the downlink.

## Downlink (`downlink_ctrl`)

Each byte goes out as a start bit (0), eight data bits LSB first, even
parity, and a stop bit, at `BIT_CLKS` clocks per bit (25 Mbps at 100 MHz).
After the last byte of the file, the rest of a page buffer is released
unread. If the ICU disables the block before the count is reached, the
controller sets error code 2 (early termination).

## NIR accumulation (`nir_acc`, `sdram_ctrl`, `refresh_counter`)

Two 256-word buffers of 32-bit sums alternate between the accumulator and
the SDRAM controller:

1. The SDRAM controller pre-loads chunk c into buffer c mod 2.
2. The accumulator adds each arriving pixel to the sum in the buffer, or
   subtracts it for a negative readout.
3. When a buffer is full, the SDRAM controller writes it back and pre-loads
   chunk c+2 into it.

Per readout the accumulator has three flags:

* `first` ignores the stored value.
* `sub` subtracts instead of adding.
* `last` applies the arithmetic right shift and clamps to 0..65535.

Each SDRAM transfer is one ACTIVE, one READ or WRITE per clock for 256
words, and a PRECHARGE. The device is assumed to be an x32 SDR part (4
banks × 4096 rows × 512 columns = 256 Mbit) at CAS latency 2.

A free-running refresh counter ticks every 780 clocks (7.8 µs). Between
transfers, and whenever it is idle, the controller reads the counter and
issues that many AUTO REFRESH commands. After the last readout, a transfer
command streams the averages to the compressor with a word strobe.

Timing rule: start the NIR readout only after both buffers are pre-loaded,
about 2 × 256 + 100 clocks after the accumulate command. The front-end
receiver holds one frame only.

## Commands (`cmd_proc`, `slice_regs`)

The ICU link is SPI-like: chip select, clock and data, 32-bit frames
`{asic_id[7:0], write, reg[6:0], data[15:0]}`, MSB first. The link runs at
most at a quarter of the system clock, because the slice samples it with the
system clock.

* A frame whose ID equals the slice's FPGA ID is executed locally.
* Any other ID, including broadcast 0xFF, is re-sent to the front end ASICs.
  That link runs at `FE_DIV` clocks per half period.
* The answer to a local read comes back in the next frame, as
  `{slice_channel, 0, reg, value}`.

Registers (7-bit addresses, 16-bit data):

| addr | name | use |
|------|------|-----|
| 00 | enable | bit 0 front end, 1 compression, 2 flash, 3 downlink, 4 accumulator, 5 SDRAM, 6 pre-scaler, 7 force no compression, 8 NIR mode |
| 01 | flash command | 0 none, 1 readout, 2 downlink, 3 erase |
| 02 | number of listed blocks | |
| 03/04 | block list address / data | data writes auto-increment |
| 05/06 | pre-scaler table address / data | data writes auto-increment |
| 07/08 | file byte count low/high | |
| 09 | exposure ID | |
| 0A | APID | |
| 0B | accumulator control | bit 0 first, bit 1 subtract, bit 2 last, bits 7:4 shift |
| 0C/0D | NIR pixels per readout, low/high | |
| 0E | start strobes | bit 0 flash, 1 downlink, 2 flush, 3 accumulate, 4 SDRAM transfer, 5 clear data path |
| 10/11 | bytes written, low/high | read |
| 12 | flash error code | read |
| 13 | downlink error code | read |
| 14 | number of bad blocks | read |
| 15 | status | read |
| 16 | blocks used | read |
| 17 | receive error count | read |
| 20–2F | bad block list | read |

## Where the design goes beyond its source

The source describes the architecture, the link formats, the memory sizes
and the algorithms only in outline. The following are choices of this
design:

* system clock of 100 MHz;
* even parity on all links;
* the command frame layout and the register map;
* the NAND command set and addressing (ONFI style), 64 pages per block;
* CCSDS block size 16 and the mapping of option IDs;
* packet length and secondary header contents;
* SDRAM organisation and timing;
* the buffer pre-load rule above.

Broadcast commands are forwarded but not executed in the slice.

Not built:

* error detection and correction on the memories;
* the ICU and its routing interface;
* the downlink concentrator;
* the detector front ends;
* the flash and SDRAM devices (behavioural models in `tb/`).

## Parameters of the top (`slice_fpga`)

| parameter | default | meaning |
|-----------|---------|---------|
| J | 16 | samples per compression block |
| PKT_BLOCKS | 60 | blocks per packet |
| PAGE_BYTES | 2048 | flash page and page buffer size |
| PAGES_PER_BLOCK | 64 | pages per flash block |
| BIT_CLKS | 4 | system clocks per bit on the data links and downlink |
| FE_DIV | 2 | clocks per half period of the front-end command link |
| BUF_WORDS | 256 | words per accumulation buffer |
| INIT_CLKS | 20000 | SDRAM power-up wait |
| REF_INTERVAL | 780 | clocks per refresh tick |

## Simulation

Every module in `rtl/` has a test bench `tb/tb_<module>.sv`. Each prints
`TB_RESULT checks=N failures=M`. To run one:

```
verilator --binary --timing --assert -Irtl -Itb rtl/snap_pkg.sv tb/tb_pem.sv --top-module tb_pem
obj_dir/Vtb_pem +verilator+rand+reset+2
```

There are two whole-design benches, with the flash, SDRAM, front-end and
ICU models in `tb/`:

* `tb_slice_fpga` runs at reduced sizes: 256-byte pages, 4-page blocks,
  64-pixel packets and 64-word buffers.
* `tb_slice_fpga_full` runs at the default sizes.

Both benches do the following:

* forward commands;
* read out a CCD exposure into flash, with a failing block and a block
  change;
* downlink the file, decode every packet and compare it with the expected
  mapped pixel values;
* read out the same exposure through the pre-scaler (reduced run only,
  because loading the table over the link takes long);
* force a block overflow;
* erase;
* count a parity error;
* accumulate three NIR readouts (with subtract, shift and clamp), then
  compress, store, downlink and check them;
* end a downlink early.

Each of these mechanisms is counted, and any one that never happens counts
as a failure.
