# Two-level buffered NAND recorder for a high-g data logger

This is the FPGA logic of a small crash-proof data recorder. A master unit
streams 10-bit words over a serial LVDS link at a fixed 60 MHz word rate;
some of the words carry data and some are filler. The recorder must keep
every data byte, in order, and write it into NAND flash, which accepts data
in 4096-byte pages at 30 MByte/s per package and then goes busy for a
page-program time of a few hundred microseconds. The design closes the gap
between a continuous input and a bursty, stalling output with two levels of
on-chip buffering and two flash packages used in turn:

```
 rclk 60 MHz                    |  clk 120 MHz
                                |
 lvds_d[9:0] -> lvds_controller -> primary buffer -> buffer_controller -+-> secondary A -> flash_controller A -> NAND package A
                ^               |   8 KByte           4160 / 4096       |   4 KByte         30 MByte/s
 start/stop -> storing_trigger  |                     120 MByte/s       +-> secondary B -> flash_controller B -> NAND package B
```

The architecture follows a published recorder design (Spartan-3 FPGA, two
4 GByte NAND packages, 8 GByte in all). The buffer sizes, the 4160/4096
thresholds, the 10-byte start level, the three transfer rates and the
valid-flag convention come from that design. Everything the original leaves
open — clocking, clock-domain crossing, reset, overflow, the NAND command
sequence and address layout — is this implementation's choice, listed in
"Departures and own choices" below.

## The input word

Each word from the deserializer has a data byte in `d[9:2]` and a flag in
`d[1:0]`:

| d[1:0]      | meaning                         |
|-------------|---------------------------------|
| 00          | valid: store `d[9:2]`           |
| 01, 10, 11  | filler: discard                 |

The LVDS controller writes the byte of *every* word into the primary buffer
at the current write address, and advances the address only for a valid
word. A filler byte is therefore written and then overwritten by the next
word; no separate write-enable decision sits in the path. The word and its
flag are captured in a register on one rising edge of `rclk`, and written
(with the address update) on the next, so a word is stored one `rclk`
cycle after it is presented. The registered flag is visible as
`word_valid`.

## The two-level buffer

**Primary buffer (8 KByte, dual clock).** Written at up to 60 MByte/s in the
`rclk` domain and read at 120 MByte/s in the `clk` domain. Its write and
read pointers are one bit wider than the address (so full and empty differ)
and cross to the other domain in Gray code through two flip-flops
(`gray_ptr_sync`). Each side therefore sees the other's pointer two to
three of its own cycles late, which only makes it conservative: the writer
may think the buffer fuller than it is, the reader emptier.

**Buffer controller.** In the `clk` domain it watches the number of unread
bytes in the primary buffer. When that number exceeds 4160 it copies exactly
4096 bytes — one flash page — into a secondary buffer at one byte per clock,
then switches to the other secondary buffer and waits for the threshold
again. Blocks thus go A, B, A, B, …: block *k* of the valid stream (bytes
4096·k … 4096·k+4095) ends up in package A for even *k* and package B for
odd *k*. Bytes that have not yet made up a block stay in the primary buffer
when recording stops (up to 4160 of them).

An uninterrupted block move takes 4097 clocks from the first read to the
last write (the primary RAM has one clock of read latency). If the selected
secondary buffer has no room, because its flash controller has not yet
drained the previous block, the move pauses byte by byte (`xfer_stall`)
and resumes as room appears; it never skips to the other buffer.

**Secondary buffers (4 KByte each).** Plain single-clock FIFOs with a byte
count. The flash controller starts a page as soon as its buffer holds more
than 10 bytes; since the buffer fills four times faster than the flash
drains it, the page is normally never starved, but if it is, the flash
controller simply holds WE# high until a byte arrives.

## The flash side

Each flash controller drives one package of two dies (separate CE#, separate
R/B#), each die with two planes. One programming round writes four pages:

```
die 0: 80h, addr(plane 0), 4096 bytes, 11h   -- short busy (plane 0 latched)
die 0: 81h, addr(plane 1), 4096 bytes, 10h   -- die 0 programs both planes
die 1: 80h, addr(plane 0), 4096 bytes, 11h   -- loaded while die 0 programs
die 1: 81h, addr(plane 1), 4096 bytes, 10h   -- die 1 programs
```

Before each page the controller waits for the target die's R/B# to be high
(`flash_wait`); after each closing command it first waits `TWB_CLKS` clocks
(the NAND's tWB) so that it does not read a stale ready. It never reads
status. Address cycles are two zero column bytes and three row bytes, the
row being `{block pair, plane, page}`: page in bits [6:0], plane in bit 7,
block pair above. After each round the page advances; after 128 pages the
block pair advances; after the last block pair the controller raises
`full` and stops. When both packages are full, recording stops.

A bus cycle takes `BYTE_CLKS` = 4 clocks of the 120 MHz clock (30 MByte/s):
clock 0 fetches the byte from the secondary buffer, WE# is low in clocks 1
and 2 and rises at the start of clock 3; CLE, ALE, CE# and I/O are set in
clock 1 and held until the next cycle's clock 1. All NAND outputs are
registered. `re_n` and `wp_n` are held high: the recorder never reads the
flash.

## Throughput budget

This is the part of the design that decides whether data is lost.

* **Input.** At most one valid byte per `rclk` cycle: 60 MByte/s.
* **Output.** Two packages at 30 MByte/s of data-cycle rate each, 60 MByte/s
  in total, less the overhead of every page: one command, five address and
  one closing command cycle (28 clocks), tWB (12 clocks) and two clocks
  of state changes. A page therefore takes at least 16,426 clocks,
  while at 60 MByte/s of valid data each package receives a page every
  16,384 clocks. The output side is 0.26 % slower than a stream with no
  filler words at all.
* **Consequence.** With every word valid, the backlog grows by roughly
  10 bytes per page per package and the primary buffer overflows after
  about 2 MByte (33 ms). With 1 % filler words (59.4 MByte/s) nothing is
  ever lost. Both cases are simulated in `tb_storage_rate`. In the original
  system the link always runs at 60 MHz but part of its words are filler,
  so the usable data rate is below 60 MByte/s.
* **Program time.** A die programs while the other die of its package is
  loaded with two pages, which takes 2 × 4096 × 4 clocks = 273 µs. Program
  times up to that (the chips typically need 150–250 µs) cost nothing; a
  longer one (up to 700 µs is allowed by the chips) makes the controller
  wait on R/B#, the secondary buffer fills, the block move stalls and the
  primary buffer absorbs the rest until it overflows.
* **Overflow.** When the primary buffer is full the LVDS controller stops
  writing and sets the sticky `overflow` output; bytes arriving then are
  lost, and the stream in flash has a gap. Recording otherwise goes on.

## Top-level interface (`storage_top`)

| port | dir | width | clock | meaning |
|------|-----|-------|-------|---------|
| `rclk` | in | 1 | — | deserializer recovered clock, 60 MHz |
| `lvds_d` | in | 10 | rclk | deserialized word |
| `clk` | in | 1 | — | system clock, 120 MHz |
| `rst_n` | in | 1 | async | reset, active low; released into each domain through two flip-flops |
| `start_in` | in | 1 | async | start recording on a rising edge |
| `stop_in` | in | 1 | async | stop recording while high (wins over start) |
| `nand_a`, `nand_b` | out | `nand_out_t` | clk | CLE, ALE, WE#, RE#, WP#, CE#[1:0], I/O[7:0], I/O enable |
| `rb_a_n`, `rb_b_n` | in | 2 | async | R/B# of the two dies of each package |
| `recording` | out | 1 | rclk | record enable |
| `overflow` | out | 1 | rclk | a valid byte was lost (sticky until reset) |
| `flash_full` | out | 1 | clk | both packages full |
| `bytes_stored` | out | 32 | rclk | valid bytes written into the primary buffer |
| `pages_a`, `pages_b` | out | 32 | clk | pages loaded into each package |
| `word_valid` | out | 1 | rclk | last captured word had flag 00 |
| `xfer_busy`, `xfer_to_b`, `xfer_stall`, `block_moved` | out | 1 | clk | buffer controller state |
| `flash_wait`, `page_loaded` | out | 2 | clk | per package: waiting on R/B#, page loaded pulse |

`start_in`/`stop_in` take effect three `rclk` edges after they change.
`nand_out_t` is a packed struct in `storage_pkg`; the I/O bus is split
into `io` and `io_oe` so that the pad tristate stays outside this logic.

## Parameters

| where | parameter | default | origin |
|-------|-----------|---------|--------|
| `storage_pkg` | `PRIMARY_BYTES` | 8192 | original design |
| `storage_pkg` | `SECONDARY_BYTES` | 4096 | original design |
| `storage_pkg` | `THRESHOLD_BYTES` / `BLOCK_BYTES` | 4160 / 4096 | original design |
| `storage_pkg` | `FLASH_BYTE_CLKS` | 4 | 30 MByte/s at 120 MHz |
| `flash_controller` | `START_LEVEL` | 10 | original design |
| `storage_top`, `flash_controller` | `PAGES_PER_BLOCK` | 128 | own choice |
| `storage_top`, `flash_controller` | `BLOCK_PAIRS` | 2048 (4096 blocks per die) | own choice, gives 4 GByte per package |
| `flash_controller` | `ADDR_CYCLES`, `TWB_CLKS` | 5, 12 | common large-page NAND values |

Flash capacity: 2 packages × 2 dies × 4096 blocks × 128 pages × 4096 bytes
= 8 GiB.

## Departures and own choices

* The original advances the write address on the falling edge of the
  recovered clock; here all logic uses rising edges and the store happens
  one cycle later, with the same bytes at the same addresses.
* The original names a "storing trigger" without describing it. Here it is
  a synchronized start edge and stop level.
* System clock (120 MHz), Gray-code pointer crossing, reset synchronizers,
  overflow handling and the stall on a full secondary buffer are not given
  by the original and are chosen here.
* The two-plane interleaved program is described in the original only as
  "four 4096-byte pages per programming cycle on two chips"; the exact
  split — one controller per package, two dies × two planes per round —
  the command codes and the row layout are this implementation's reading.
* No status read after programming, no bad-block handling and no read-back
  path: none is described.
* Not part of this RTL: the LVDS deserializer and its cable equalizer
  (bought-in chips; the logic takes their parallel output), the NAND chips
  themselves, the configuration PROM, power supply, connector protection
  and the mechanical shell.

## Files

| file | contents |
|------|----------|
| `rtl/storage_pkg.sv` | sizes, NAND command codes, `nand_out_t` |
| `rtl/storage_top.sv` | top level, reset synchronizers |
| `rtl/storing_trigger.sv` | start/stop of recording |
| `rtl/lvds_controller.sv` | valid-flag filter and primary-buffer writer |
| `rtl/primary_buffer.sv` | 8 KByte dual-clock RAM with pointer crossing |
| `rtl/gray_ptr_sync.sv` | Gray-code pointer synchronizer |
| `rtl/dp_ram.sv` | simple dual-port RAM (block RAM) |
| `rtl/buffer_controller.sv` | primary-to-secondary block mover |
| `rtl/secondary_buffer.sv` | 4 KByte FIFO |
| `rtl/flash_controller.sv` | NAND two-plane interleaved page program |
| `tb/nand_flash_model.sv` | behavioural NAND package (write side, protocol checks) |
| `tb/tb_*.sv` | one self-checking testbench per module, plus end-to-end ones |
| `tb/storage_top_bench.svh` | shared body of the two end-to-end testbenches |

## Simulation

Every testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`; each has a watchdog. They need Verilator 5 with timing support,
for example:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
  -y rtl -y tb +libext+.sv -Irtl -Itb rtl/storage_pkg.sv \
  --top-module tb_storage_top tb/tb_storage_top.sv -o sim
./obj_dir/sim
```

| testbench | what it shows |
|-----------|---------------|
| `tb_storing_trigger` | start edge, stop level, stop priority, three-edge latency |
| `tb_lvds_controller` | only flag-00 bytes kept, in order; full buffer stops writes and sets overflow |
| `tb_primary_buffer` | bytes cross 60 → 120 MHz in order; pointer lag bounded |
| `tb_secondary_buffer` | FIFO order, count, full and empty against a reference queue |
| `tb_buffer_controller` | no move at 4160 waiting bytes, move at 4161; 4097 clocks per block; A/B alternation; stall on a full buffer |
| `tb_flash_controller` | start level, 4 clocks per byte, legal two-plane sequence, row order, die interleave, full (small geometry) |
| `tb_storage_top` | end to end with a small flash: byte-exact storage A/B, stop, overflow, record to full |
| `tb_storage_top_full` | end to end at default sizes: 24 blocks stored byte-exact, overflow |
| `tb_storage_rate` | sustained 59.4 MByte/s without loss; 60 MByte/s overflows after about 2 MByte |

The end-to-end benches count every mechanism (filler words, blocks to A and
B, stalls, R/B# waits, loading one die while the other programs, two-plane
programs, start, stop, overflow, full) and fail if one never happens.

The NAND model checks the command order, byte counts, plane bits, column
address and that no die is strobed while busy; it is not a model of the
chip's timing beyond a fixed busy time, and it has no read side.
