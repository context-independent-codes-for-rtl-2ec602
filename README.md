# Context-independent bus coding in an SDRAM memory controller

Much of an embedded system's power goes into the off-chip data bus between the
SoC and its SDRAM. Every wire that toggles charges a large pad and board
capacitance. Classic low-power bus codes such as bus-invert use the previous
bus value to pick the next codeword. A context-dependent code like that needs
a matching decoder in the memory, which commodity SDRAM does not have.

This design uses a **context-independent** code instead. Each data byte maps
to one fixed codeword, whatever came before it. The memory controller can
therefore encode data on its way to memory, store the codewords in an
ordinary SDRAM, and decode them when they are read back. The memory never
takes part.

The code does two things:

* **Limited weight.** Each 8-bit byte becomes a 9-bit codeword with at most
  four ones. There are exactly 256 such words (1 + 9 + 36 + 84 + 126), so
  this is a "perfect 4-limited-weight code" (4-LWC).
* **Frequency-ranked assignment.** The byte values that occur most often get
  the lightest codewords. The most frequent byte gets `000000000`, the next
  nine get the one-hot words, and so on. Frequent values tend to follow each
  other on the bus, and light codewords are close to each other in Hamming
  distance, so this cuts transitions further.

The code lives in per-byte lookup tables. Any one-to-one byte code can be
loaded, including a plain frequency-based permutation with 8-bit codewords
(the ninth wire then stays at 0).

## Datapath

```
 system bus                         memory controller                              SDRAM (x18)
 ----------   +-------------+   +-------------+   +-----------+   +--------------+
 req_* ------>| ci_encoder  |-->|  mem_queue  |-->|           |-->| cmd/addr pins |
              | 4 x 256x9   |   |  8 entries  |   |sdram_ctrl |   +--------------+
              +-------------+   +-------------+   |           |<->| DQ (2 x 9 bit)|
 resp_* <-----| ci_decoder  |<--------------------|           |   +--------------+
              | 4 x 256x8   |    encoded read data +-----------+
              +-------------+
 cfg_* ------>| code_table_loader |--> writes into all eight tables
```

* **`ci_encoder`** encodes the four bytes of a 32-bit write word in parallel,
  one table per byte lane, all four tables identical. It is a single
  register stage with a valid/ready handshake. The table read is that
  register, and the address, write enable and byte strobes ride alongside.
* **`mem_queue`** is an in-order FIFO of requests, eight entries by default.
  Write data goes in already encoded. Reads queue up behind writes, so
  read-after-write ordering holds without any checks.
* **`sdram_ctrl`** turns one request at a time into SDRAM commands. It never
  looks inside the data.
* **`ci_decoder`** turns each 9-bit codeword back into its byte. It adds
  exactly one cycle between the last read beat and `resp_valid`.
* **`code_table_loader`** fills all tables with a default code after reset.
  After that it passes software table writes through.
* **`cic_mem_ctrl`** is the top. It wires these blocks together and brings
  the SDRAM pins out. The bidirectional DQ bus appears as
  `sd_dq_out` / `sd_dq_oe` / `sd_dq_in`.

## The code tables

### Building a frequency-ranked table

The tables are computed off-line from a trace of the data an application
writes. The result is either one table per application ("self") or one
shared table ("global").

1. Count how often each byte value occurs.
2. Sort the 256 byte values by falling count.
3. List the 9-bit words of weight ≤ 4, by rising weight and, within a
   weight, by rising value: `0, 1, 2, 4, …, 256, 3, 5, 6, …`.
4. The byte with rank *r* gets codeword number *r*.

For an 8-bit permutation code, use all 256 8-bit words in step 3 instead.
`tb/cic_tb_pkg.sv` (`build_code`) does exactly this.

Here is a 4-bit example with five-wire codewords of weight ≤ 2. Suppose the
symbols rank 1101, 1001, 0111, 0100, 1111, 0101, 0011, … by frequency. They
get 00000, 00001, 00010, 00100, 01000, 10000, 00011, … in that order. The
testbenches load the full 16-entry form of this example, and its 4-bit
permutation counterpart, at `SYM_W = 4`. They check every codeword.

### The default code

The 4-LWC has a simple closed form, implemented in `lwc_enc`. If a byte has
more than four ones, send its complement with the ninth bit set. Otherwise
send the byte with the ninth bit clear.

After reset, `code_table_loader` writes this code into every table, one
symbol per cycle. This takes 256 cycles, well inside the SDRAM's 7500-cycle
power-up wait. `cfg_ready` then rises, and the controller works before
software has loaded anything.

To switch to a frequency-ranked code, write all 256 pairs through
`cfg_we` / `cfg_sym` / `cfg_cw`. The pairs may go in any order, one per
cycle. Data already in memory is only readable under the code it was
written with. Either switch codes before the memory holds live data, or
rewrite that data afterwards.

### Why the decode table still has 256 entries

A decoder indexed directly by a 9-bit codeword would need 512 entries, half
of them unused. Instead, `ci_decoder` first folds the codeword to 8 bits
with the inverse of the fixed LWC (`lwc_dec`): if bit 8 is set, invert
bits 7:0. This fold is one-to-one on every 9-bit word of weight ≤ 4:

* A weight-≤4 word with bit 8 set has at most three ones in its low byte, so
  its fold has five or more ones.
* A word with bit 8 clear folds to itself, which has four or fewer ones.

The two groups cannot collide. The fold is also one-to-one on any code whose
ninth bit is always 0. So **any** limited-weight or permutation byte code
fits a 256 × 8 decode table.

A table write stores symbol `cfg_sym` at index `fold(cfg_cw)`. The single
write that fills the encoder therefore fills the decoder too.

The fold is *not* one-to-one for codes that use codewords of weight above
four with the ninth bit set. One example is a "one-hot the eight most
frequent bytes" code that marks them with the ninth bit. Such codes cannot
be decoded by this design.

### Table timing

A `code_lut` table is a simple dual-port SRAM: one write port and one read
port with a registered output. If the same entry is written and read in one
cycle, the read returns the old contents. Tables are not reset; the loader
fills them.

## SDRAM control

The default target is a 512 Mbit single-data-rate SDRAM with 16 data bits
(MT48LC32M16A2 class), widened to 9-bit bytes, so the DQ bus is 18 bits.
It runs at 75 MHz.

| item | default | cycles at 75 MHz |
|---|---|---|
| power-up wait (`INIT_WAIT`) | 100 µs | 7500 |
| tRCD / tRP | 20 ns | 2 / 2 |
| tRAS / tRC | 44 ns / 66 ns | 4 / 5 |
| tWR / tRFC / tMRD | 15 ns / 66 ns / 2 clk | 2 / 5 / 2 |
| CAS latency | | 2 |
| refresh interval (`T_REFI`) | 64 ms / 8192 rows | 585 |

These values come from the part's data sheet and are parameters of
`sdram_ctrl`. Only `T_REFI` and `INIT_WAIT` are brought out to the top.

**Initialisation.** After the power-up wait the controller precharges all
banks. It then issues two auto-refreshes and loads the mode register: burst
length 2, sequential, CAS 2. `init_done` then rises.

**Accesses.** The controller uses a closed-page policy. Each request is:

1. ACTIVATE the row.
2. READ or WRITE with auto-precharge, `T_RCD` cycles later.
3. A hold-off of `T_POST` cycles before the next ACTIVATE.

`T_POST` is the largest of four terms:
`BL + tWR + tRP`, `tRC − tRCD`, `tRAS + tRP − tRCD` and `CAS + BL + 1`.
That is 6 cycles by default. Back-to-back requests therefore take
`T_RCD + T_POST` = 8 cycles each, whatever bank or row they use. One
request moves one 32-bit word.

**Data beats.** Beat 0 carries byte lanes 0 and 1, and beat 1 carries lanes 2
and 3. Write data goes out with the WRITE command and on the next cycle.
Byte strobes drive the two DQM pins.

**Read latency.** Read data is sampled CAS cycles after the READ reaches
the device. From acceptance at the queue head to `resp_valid` is
`T_RCD + CAS + BL + 1` cycles, plus 1 for decoding.

**Refresh.** A refresh request is raised every `T_REFI` cycles. It is served
before the next access; no refresh is ever deferred by a full interval.

**Address map.** A 24-bit word address splits as
`{row[12:0], bank[1:0], column[9:1]}`, with column bit 0 = 0. The full
512 Mbit device is addressable.

`sd_cs_n` is always low because the chip is always selected. The output is
kept for a board that needs it.

## Top-level interface and timing (`cic_mem_ctrl`)

| port | meaning |
|---|---|
| `req_valid/req_ready` | request handshake; a request is taken on a cycle where both are high |
| `req_we, req_addr[23:0], req_wdata[31:0], req_strb[3:0]` | write enable, word address, data, byte strobes (bit *i* ↔ `wdata[8i+7:8i]`) |
| `resp_valid, resp_rdata[31:0]` | decoded read data, in request order, no back-pressure |
| `cfg_we, cfg_sym[7:0], cfg_cw[8:0], cfg_ready` | table write port (honoured once `cfg_ready` is high) |
| `init_done, ref_issued, queue_count` | status |
| `sd_*` | SDRAM pins |

`req_ready` drops when the encoder's output register holds a word that the
full queue cannot take. The system bus then stalls. The SDRAM side is far
slower than the bus, so the queue fills quickly under back-to-back traffic.

## How far it is checked

Every module has a self-checking testbench in `tb/`. Each ends by printing
`TB_RESULT checks=N failures=M`.

* `tb_lwc_enc`, `tb_lwc_dec`: the 4-bit fixed code against all 16 entries of
  its published table. For 8 bits: all 256 codewords have weight ≤ 4, are
  distinct, and decode correctly.
* `tb_code_lut`, `tb_mem_queue`: random traffic against reference models,
  including full/empty, stall and read/write collisions.
* `tb_ci_encoder`, `tb_ci_decoder`: the published 4-bit frequency-based LWC
  and permutation examples, entry by entry. Also random 32-bit traffic with
  random stalls on a built 8-bit table, and the one-cycle latencies.
* `tb_code_table_loader`: the 256-step default walk, dropped writes during
  the walk, pass-through afterwards, and the walk repeating on a second
  reset.
* `tb_sdram_ctrl`: the controller against `tb/sdram_model.sv`, with a
  shortened power-up and refresh interval. The model is a behavioural
  SDRAM that checks the init order, the mode word, tRCD/tRC/tRP/tRAS, refresh
  with idle banks, the refresh interval and the write-data timing. The
  testbench also checks read data, the 8-cycle request spacing, the read
  latency, masked writes and refreshes.
* `tb_cic_mem_ctrl`: the whole controller at its default parameters,
  including the full power-up wait, run in two phases.
  * Phase A runs on the default fixed 4-LWC.
  * Phase B loads a frequency-ranked 4-LWC built from a skewed synthetic byte
    source, then replays the same 1200 requests.
  * It checks every read; every codeword on the DQ pins; that no pin byte
    has more than four ones; the SDRAM protocol; the decode latency; and that
    default load, code switch, writes, reads, masked writes, queue-full, bus
    stall and refresh all happen.

* `tb_table2_codes`: the whole controller at default parameters, comparing
  codes. Three synthetic byte sources are used: mostly 0x00/0xFF, text-like
  ASCII, and samples around mid-scale. Each source's request stream runs
  under six loaded codes:
  * uncoded (ninth wire held at 0)
  * fixed 4-LWC
  * self and global frequency-ranked 8-bit permutations
  * self and global frequency-ranked 4-LWCs

  Every read and pin codeword is checked. The testbench also checks that the
  self 4-LWC always beats the uncoded bus. On average it must also beat the
  global 4-LWC and the fixed 4-LWC, and the self permutation must beat the
  global one.

On the `tb_cic_mem_ctrl` stream, bus transitions fall by about 36 % with the fixed
4-LWC and about 38 % with the frequency-ranked 4-LWC, compared with sending
the same data uncoded on 16 wires. The ninth wires are included. The gain
depends entirely on the data; a stream with no dominant values gains
nothing.

Typical reductions against the uncoded bus from `tb_table2_codes`, in percent
(they vary by a point or two with the random seed):

| source | 4-LWC | self 8-bit | self 4-LWC | global 8-bit | global 4-LWC |
|---|---|---|---|---|---|
| 0x00/0xFF heavy | 36 | 32 | 39 | 32 | 38 |
| text-like | −27 | 21 | 23 | 2 | 4 |
| mid-scale samples | 31 | 42 | 43 | 31 | 32 |
| average | 13 | 31 | 35 | 22 | 24 |

The fixed 4-LWC makes text worse, because lower-case ASCII bytes already
have few ones but many transitions. A table ranked by each application's
own byte counts does best on every source, which matches the ordering of
the document's results. These are synthetic sources, not the document's
benchmarks, so only the ordering is comparable, not the numbers.

Running one testbench with plain Verilator, from the directory that holds
`rtl/` and `tb/` (Verilator finds the other modules through `-I`, by file
name):

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
  rtl/cic_pkg.sv tb/cic_tb_pkg.sv tb/tb_cic_mem_ctrl.sv \
  --top-module tb_cic_mem_ctrl -Mdir obj
./obj/Vtb_cic_mem_ctrl
```

Swap in any other `tb/tb_*.sv` and its module name to run that test. The
full-size run finishes in well under a second. `-Wno-fatal` keeps the
testbenches' width and style warnings from stopping the build. The RTL
itself lints clean with `verilator --lint-only -Wall`.

## Design choices and limits

These are choices made for this RTL where the underlying scheme leaves
things open. Keep them in mind when reusing it.

* **Widths.** The system bus is 32 bits, so there are four byte lanes and
  four copies of each table. The SDRAM has two 9-bit bytes. Both are
  parameters (`LANES`, `DQ_BYTES`, `SYM_W`, `CW_W`).
* **Tables are SRAM, loaded through one shared write port.** For a fixed
  code they could be ROMs. For the fixed 4-LWC alone, `lwc_enc` / `lwc_dec`
  could replace the tables outright. This design always uses tables, so the
  code can change.
* **The default code after reset** and the 256-entry decode index by
  folding are this design's own additions.
* **Simple SDRAM scheduling.** One request at a time, closed page,
  auto-precharge, burst length 2, strict order. There is no bank
  interleaving, open-row reuse, request reordering or power-down mode. The
  timing figures are data-sheet values for a 75 MHz part, not derived here.
* **Encode latency** is one cycle in front of the queue. Decode latency is
  exactly one cycle.
* **Not included:** the processor, caches, peripherals, system-bus
  arbitration, the pad drivers and the SDRAM itself (only a behavioural model
  for simulation). Also not included: hardware that measures byte
  frequencies, since tables are built off-line. Context-dependent codes
  (bus-invert, XOR decorrelation) and word-level frequent-value one-hot codes
  are not supported; they need a decoder at the memory or word-level
  matching.
* **No x or z is used anywhere.** Every register that is read is reset, and
  the tables are filled by the loader before use.

## Files

| file | contents |
|---|---|
| `rtl/cic_pkg.sv` | SDRAM command encoding, population count |
| `rtl/lwc_enc.sv`, `rtl/lwc_dec.sv` | fixed limited-weight code and its inverse |
| `rtl/code_lut.sv` | one code table (SRAM) |
| `rtl/code_table_loader.sv` | default-code fill after reset, table write port |
| `rtl/ci_encoder.sv`, `rtl/ci_decoder.sv` | per-lane table encoder / decoder |
| `rtl/mem_queue.sv` | request FIFO |
| `rtl/sdram_ctrl.sv` | SDRAM command, address and data sequencing |
| `rtl/cic_mem_ctrl.sv` | top level |
| `tb/cic_tb_pkg.sv` | frequency-ranked table construction |
| `tb/sdram_model.sv` | behavioural SDRAM with protocol checks and transition counting |
| `tb/tb_*.sv` | one testbench per module |
| `tb/tb_table2_codes.sv` | code comparison on three synthetic byte sources |
