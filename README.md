# Circular-comparison BIST for Virtex-4 block RAMs

An FPGA can test its own embedded memories. It is configured with a test
design, runs it, and reports pass or fail. It is then reconfigured with the
next test design, until every mode of operation of the block RAMs has been
exercised. This repository is synthesizable SystemVerilog for such a test
design, aimed at the 18K-bit block RAMs of the Virtex-4 family. It also holds
a behavioural-level but synthesizable model of the block RAM itself, so that
the whole scheme can be simulated.

The core idea is **circular comparison**. No memory needs to know its expected
answers:

* Every block RAM (the *block under test*, BUT) is configured identically.
* Two identical test pattern generators (TPGs) drive the same sequence into
  all of them. Each TPG copy drives alternating RAMs.
* Every output bit of RAM *j* is compared with the same output bit of RAM
  *j + d*, round a ring. Each comparison is done by its own output response
  analyzer (ORA).
* A fault-free array produces identical outputs everywhere. A faulty RAM
  disagrees with both of its neighbours. So it is caught by two ORAs, and the
  pair of failing ORAs names the RAM.

Because all RAMs are tested at once, the test length depends only on the
algorithm and the RAM shape, not on how many RAMs the device has.

```
          TPG0              TPG1
           |                  |
   +--> [BUT0]-ORA-[BUT1]-ORA-[BUT2]-ORA- ... -[BUT47]-ORA--+
   |                                                         |
   +---------------------------------------------------------+
   every ORA: out_i(BUT_j) == out_i(BUT_j+d) ?  sticky pass flag
   all ORAs:  pass flags -> carry-chain OR -> one `fail` bit
```

## The ORA and the pass/fail chain (`ora`)

Each ORA holds one flip-flop. It starts at 1 (pass) and is ANDed each clock
with "the two inputs are equal", so the first mismatch leaves it at 0 for the
rest of the run. The same flip-flop drives one carry multiplexer: `cout = pass
? cin : 1`. Chained through all ORAs from a 0, the final carry is 1 exactly
when some ORA saw a mismatch. This is the single `fail` bit, and reading it
needs no access to the individual flip-flops.

The flip-flops are still available for diagnosis, as the top-level output
`ora_pass[site][bit]`. In the device they would be read back from the
configuration memory. An ORA also has a clock enable. The TPG uses it to mask
comparisons that would mismatch for a known, harmless reason (see *Cascade*).

With NUM_SITES = 48 and 80 compared bits per RAM, the array has 3,840 ORAs.

## The fifteen BIST configurations

On the FPGA each configuration is a separate bitstream. Most are small partial
bitstreams that change only the RAMs' mode bits. Here the input `cfg_id`
selects one. `bist_pkg::cfg_decode` turns it into the settings of the TPGs,
the RAMs and the ORA ring. Hold `cfg_id` steady, pulse `start`, wait for
`done`, and read `fail` two clocks later.

| cfg | RAM mode | shape | TPG / algorithm | ring distance d | clocks |
|----:|---|---|---|:-:|---:|
| 1 | RAM, port A, WRITE_FIRST | 512x36 | March LR + 7 data backgrounds | 1 | 57,344 |
| 2 | RAM, port B, READ_FIRST | 512x36 | March LR + 7 data backgrounds | 1 | 57,344 |
| 3 | dual-port, READ_FIRST | 512x36 | March s2pf- then March d2pf | 1 | 11,776 |
| 4 | RAM, WRITE_FIRST | 8Kx2 | MATS+ on port A, then port B | 1 | 81,920 |
| 5 | RAM, READ_FIRST | 16Kx1 | MATS+ on port A, then port B | 1 | 163,840 |
| 6 | RAM, NO_CHANGE, output register | 512x36 | MATS+ on port A, then port B | 1 | 5,120 |
| 7 | cascade, even RAMs LOWER | 32Kx1 | cascade MATS+ | 2 | 20 |
| 8 | cascade, even RAMs UPPER | 32Kx1 | cascade MATS+ | 2 | 20 |
| 9 | ECC, Hamming generation bypassed | 512x64 | ECC patterns | 2 | 1,024 |
| 10 | ECC, correction bypassed | 512x64 | ECC patterns | 2 | 5,120 |
| 11 | FIFO, standard | 2Kx9 | FIFO march | 1 | 16,393 |
| 12 | FIFO, first-word-fall-through | 512x36 | FIFO march | 1 | 4,105 |
| 13 | FIFO, standard | 1Kx18 | FIFO march | 1 | 8,201 |
| 14 | FIFO, ALMOST offset 0xAAA | 4Kx4 | FIFO march | 1 | 32,777 |
| 15 | FIFO, ALMOST offset 0x555 | 4Kx4 | FIFO march | 1 | 32,777 |

All fifteen together take 477,781 clocks. The following come from the method:

* the list of configurations, with their modes, shapes and algorithms;
* the ring distance (d = 2 where two RAMs form one);
* the 0xAAA / 0x555 offsets;
* the run lengths of configurations 3-8 and 12-14.

This design chose the write mode, the output register and the FIFO read mode
of each configuration, spreading them so that each is used at least once.

## Test pattern generators

### Block RAM TPG (`tpg_bram`, configurations 1-6)

One state machine plays march tests. It walks elements, then addresses in the
element's direction, then operations. Each clock it issues one operation per
port. A value `0` means the current data background and `1` its inverse.
N is the number of locations of the port shape: 16K / data bits.

* **March LR** (16N): `c(w0) d(r0,w1) u(r1,w0,r0,r0,w1) u(r1,w0) u(r0,w1,r1,r1,w0) u(r0)`.
  This finds realistic linked faults in the cell array.
  * Word-wide cells also need intra-word coupling faults covered. So the test
    is repeated for each **data background**. A b-bit word gets
    1 + ceil(log2 b) backgrounds: all zeros, then background k with bit
    i = bit k-1 of i (0101.., 0011.., 00001111.., ...). That makes 7
    backgrounds for 36 bits.
  * The widest shape is used because it needs the fewest locations.
  * Configurations 1 and 2 apply the test through port A and port B. After
    them the cell array is considered tested, and later configurations only
    check the logic around it.
* **March s2pf-** (14N) and **March d2pf** (9N) test the dual-port paths.
  * s2pf-: port B reads the location that port A is reading or writing.
  * d2pf: port B reads the neighbouring location (a+1 while ascending, a-1
    while descending) while port A writes and reads.
* **MATS+** (5N): `c(w0) u(r0,w1) d(r1,w0)`. This is the shortest test that
  finds all address decoder faults. It is run once per port, for the 16K, 8K
  and 512-location decoders.

The TPG also outputs the value each port-A read should return (`exp`,
`exp_vld`, `exp_on_b`). The ORAs do not need it. Its testbench uses it to
prove that the sequences are real march tests.

### Cascade TPG (`tpg_casc`, configurations 7-8)

Two 16Kx1 RAMs form a 32Kx1 RAM:

* The LOWER RAM stores addresses with bit 14 clear, and always passes its read
  bit up on its cascade output.
* The UPPER RAM stores addresses with bit 14 set. It outputs either its own bit
  or the cascade input, chosen by the registered bit 14.

The cells are already tested, so only the routing needs a functional test.
MATS+ is applied at the two ends of each half (0x0000, 0x3FFF, 0x4000,
0x7FFF), which takes 20 clocks. Port B reads along, so both ports' cascade
paths are exercised.

The ring compares like with like (d = 2: LOWER with LOWER, UPPER with UPPER).
Configuration 8 swaps the roles, so that each RAM is tested in both.

In configuration 8 the bottom RAM (site 0) is an UPPER RAM with nothing below
it. Its cascade input is tied to 0. Whenever its output shows an access to the
LOWER half, it therefore disagrees with every other UPPER RAM. The cascade TPG
drives `ora_ce_bottom` low for exactly those clocks. This freezes the ORAs that
have site 0 as one of their inputs, and without it the ring could not test
cascade mode at all.

### ECC TPG (`tpg_ecc`, configurations 9-10)

Two adjacent RAMs form a 512x64 ECC RAM (`ecc_logic`, `ecc_pkg`):

* There are 7 Hamming bits (single-error correction) plus an overall parity
  bit (double-error detection).
* The 8 check bits sit in the four parity bits of each RAM: check bits 3:0 in
  the lower RAM, 7:4 in the upper.

A circuit that corrects errors hides its own faults. So each half of the ECC
logic is tested with the other half bypassed:

* **cfg 9, generation bypassed:** the TPG writes raw codewords.
  * Locations 0-255 hold data 0 with check bits 0..255. This is every check
    value against a zero data field, so every syndrome reaches the corrector
    and the detector.
  * Locations 256-511 hold a single 1 in each data bit with check bits 0, a
    correctable error in every data bit.
* **cfg 10, correction bypassed:** the TPG writes all 64 words with one 1 and
  all 2,016 words with two 1s, through the generator. It reads back the raw
  check bits. This takes five write/read passes over the 512 locations.

In these configurations the ORAs see the corrected (or raw) output half of each
pair, plus its `sbiterr`/`dbiterr` flags.

### FIFO TPG (`tpg_fifo`, configurations 11-15)

In FIFO mode (`fifo_ctrl`), one port of the RAM writes and the other reads.
The FIFO has these flags:

* FULL and EMPTY;
* ALMOST FULL (at most `almost` locations free) and ALMOST EMPTY (at most
  `almost` words held), both with a 12-bit offset;
* write error and read error (an access the FIFO refused).

It runs in standard mode (data one clock after the read) or first-word-fall-
through mode (the oldest word is waiting on the output).

The TPG starts from an empty FIFO and runs four data backgrounds (0s, 1s,
0101, 1010, each word inverted at odd positions). In each it:

1. writes until full;
2. makes one write that must be refused;
3. reads until empty;
4. makes one read that must be refused.

Every flag therefore rises and falls several times, and the ring compares them
across all RAMs. The TPG counts the accesses itself rather than watching the
flags, because it serves many FIFOs. Configurations 14 and 15 use the 4Kx4
shape, where the ALMOST comparators use all 12 bits, with the alternating
offsets 0xAAA and 0x555.

## The block RAM model (`bram_core`, `bram_site`)

`bram_core` models one 18K-bit dual-port block RAM.

* **Storage:** 512 rows of 36 bits, where bits 31:0 are data and 35:32 parity.
* **Shapes:** 16Kx1, 8Kx2, 4Kx4, 2Kx9, 1Kx18 and 512x36. Only the last three
  reach the parity bits. Location a of a 2^k-bit port is row a >> (5-k),
  starting at bit (a mod 2^(5-k)) * 2^k. On the port, parity sits from bit 32
  up.
* **Timing:** read and write take one clock. The output register adds one
  more.
* **Write modes:** WRITE_FIRST shows the new data on a write, READ_FIRST shows
  the old data, and NO_CHANGE keeps the output.

`bram_site` is one RAM location in the array. It adds the FIFO controller and
selects, by mode, whether the TPG or the FIFO logic drives the RAM ports.

Simplifications against the real block:

* Both ports share one clock, one shape and one write mode.
* Port A wins a write collision on the same row.
* Contents and outputs start at zero.

## Top level (`v4_bram_bist`)

| port | dir | meaning |
|---|---|---|
| `clk`, `rst` | in | clock; synchronous reset of TPGs and ORAs |
| `cfg_id[3:0]` | in | BIST configuration 1..15 |
| `start` | in | one-clock pulse; resets the ORAs and starts the TPG |
| `done` | out | the TPG has issued its last operation |
| `fail` | out | carry-chain result, 1 = a mismatch was seen (valid 2 clocks after `done`) |
| `ora_pass[NUM_SITES][80]` | out | every ORA flip-flop: `{flags[7:0], dob[35:0], doa[35:0]}` of site j compared with site j+d |

Parameters:

* `NUM_SITES` (default 48, the block RAM count of the smallest devices, which
  must be even);
* `NUM_TPG` (default 2).

Diagnosis works as follows. If RAM j is faulty, the flip-flops of ORA j-d and
ORA j fail at the same bit. That bit gives the faulty output, and `cfg_id`
gives the faulty mode. The full-size testbench shows this with a stuck-at-1 on
one output bit.

For larger devices, set `NUM_SITES` to their block RAM count, for example 160
for an LX60 or 336 for an LX200.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M`. Each has a cycle
watchdog. Packages come first on the command line:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/bist_pkg.sv rtl/ecc_pkg.sv rtl/bram_core.sv rtl/fifo_ctrl.sv rtl/bram_site.sv \
  rtl/ecc_logic.sv rtl/ora.sv rtl/tpg_bram.sv rtl/tpg_casc.sv rtl/tpg_ecc.sv \
  rtl/tpg_fifo.sv rtl/v4_bram_bist.sv tb/tb_v4_bram_bist_full.sv \
  --top tb_v4_bram_bist_full -o sim && obj_dir/sim
```

| testbench | what it checks |
|---|---|
| `tb_v4_bram_bist_full` | default size (48 RAMs): all 15 configurations, each run length, fault-free pass, every FIFO flag, ECC correction and detection, cascade gating, both TPG copies identical, then a stuck-at fault detected and located to the two ORAs |
| `tb_v4_bram_bist` | the same with 8 RAMs (body shared in `tb/bist_tb_body.svh`) |
| `tb_bram_core` | all shapes, write modes and output-register settings under random dual-port traffic, against a flat bit model; 32K cascade and an open cascade input |
| `tb_fifo_ctrl` | all four shapes, standard and FWFT, against a queue model, with every flag checked each clock |
| `tb_ecc_logic` | encoding against an independent Hamming model; every single-bit error corrected; double errors flagged; both bypasses |
| `tb_tpg_bram` | every read of every algorithm returns the expected march value from a fault-free RAM; exact run lengths |
| `tb_tpg_casc`, `tb_tpg_ecc`, `tb_tpg_fifo` | run lengths, pattern coverage (all 2,080 ECC patterns exactly once), flag events, ORA gating |

Each testbench was also run against a copy of its module with one deliberate
bug, and each reported failures.

On one core, the full-size run takes about two minutes to compile and
20 seconds to simulate.

## Departures and limits

* **Reconfiguration is a mode input.** Downloading a configuration becomes
  `cfg_id`. Two things carry over from one configuration to the next in this
  model: RAM contents, and outputs of ports a configuration does not use. Run
  configurations in order 1..15 from reset, as the testbenches do. A run in
  another order can show a mismatch that is not a fault.
* **One clock edge.** The real MATS+ 512 and 2Kx9 FIFO configurations also
  test the RAM's clock inversion, which clocks the RAM on the opposite edge.
  That is not modelled.
* **One ring.** All RAMs form one ring. On the device the comparison runs down
  the RAM columns.
* **Borrowed algorithm details.** The element lists of March LR, s2pf-, d2pf
  and MATS+ are the standard published ones; the method only names them.
  These are this design's own choices:
  * the d2pf neighbour scheme;
  * the background formula;
  * the cascade addresses;
  * the ECC location plan;
  * the FIFO backgrounds and the refused accesses.
* **Run lengths.** Where the method gives a run length, most of the run
  lengths above equal it. Three do not follow from the algorithms as
  described here:
  * March LR with backgrounds: 116N in the method, 112N here;
  * both ECC configurations: 5,696 clocks each in the method;
  * the 4Kx4 configuration 15: 4,096 clocks in the method, 32,777 here,
    because it runs the same FIFO march as 14.
* **Large devices.** For the largest parts, the method tests only half of the
  RAM array per configuration, to keep the TPG's fan-out fast enough. The
  equivalent here is to instantiate the top with `NUM_SITES` set to half the
  device's RAM count. There is no half-array mode inside the design.
* **Not modelled:**
  * the configuration memory with its frame writes and readback;
  * the tool flow that generates the bitstreams;
  * the diagnosis algorithm that interprets failing ORAs;
  * the other FPGA resources (CLBs, IOBs, DSPs, PowerPC);
  * the boundary-scan interface.
