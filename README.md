# Scrubbing and TMR test platform for SRAM-based FPGAs

An SRAM-based FPGA keeps its circuit in configuration memory, and in space an
ionising particle can flip a configuration bit and silently change the circuit.
Two defences are usual: triple modular redundancy (TMR), which masks a fault in
one of three copies of a module, and *scrubbing*, which rewrites configuration
memory from a known-good reference before faults pile up. This RTL is a test
platform for measuring how well combinations of the two work. It holds a
payload (an AES-128 encryption block, with or without TMR) and a test framework
around it that

* applies known-answer test vectors to the payload and records every error it
  sees, classified by where in the TMR structure it happened, and
* repairs the payload's configuration frames by one of four scrubbing methods.

Faults themselves are injected, and single-bit errors corrected, by a vendor
soft-error-mitigation core (the *SEU Controller*) that is not part of this
RTL; its signals are ports of the top. A host PC drives the tests over UART and
computes availability and mean time to failure from the logs.

```
            host UART                         SEU Controller (external)
               |                          errors |        | ICAP req/gnt
   +-----------v------------+   busy   +---------v----+   |
   |     fault_monitor      |<---------| reconfig_    |   |
   | vectors, compare, log  |          | manager      |   |
   +--+------------------^--+          +--+-------+---+   |
      | key, pt, start   | results        | ICAP  | reference
   +--v------------------+--+          +--v-------v---+ bitstream
   |      aes_payload       |          | icap_manager |<--+  (EEPROM, external)
   | 1 or 3 x aes128_core   |          +------+-------+
   | + tmr_voter(s)         |                 | to the ICAP primitive (external)
   +------------------------+
```

The top is `scrub_test_platform`. All blocks use one clock, which also clocks
the configuration port.

## The payload and what counts as an error

`aes_payload` wraps `aes128_core` (one round per clock, `done` in the 11th
cycle counting the start cycle) in one of three variants, chosen by the
`VARIANT` parameter:

| VARIANT            | structure                                                    |
|--------------------|--------------------------------------------------------------|
| `TMR_REFERENCE`    | one core, no redundancy                                      |
| `TMR_SINGLE_VOTER` | three cores; one voter drives all three output copies        |
| `TMR_TRIPLE_VOTER` | three cores; one voter per output copy (default)             |

The payload exposes two sets of results: `out_ct[i]`, what output copy *i*
delivers after its voter, and `branch_ct[i]`, what core *i* computed before
voting. With both, the Fault Monitor can tell apart, for every vector:

* **single error**: exactly one branch wrong. TMR should mask it.
* **bridge error**: two or more branches wrong. One upset reached two copies.
* **voter error**: an output copy is wrong although at most one branch is.
  The fault sits in a voter.
* **failure**: two or more output copies wrong, or no answer within
  `TIMEOUT_CYCLES`. This is what a user of the payload would see.

With a single voter, one voter fault corrupts all three copies, so it is a
failure. With three voters it corrupts one copy and is outvoted downstream.
That is why the triple-voter variant is the default. A third variant in the
original comparison, TMR inserted by a synthesis tool, is a netlist
transformation and has no RTL here.

For scale: synthesised, one `aes128_core` has 398 flip-flops. A 128-bit AES
reference payload of this kind was reported at about 408 registers on a
Virtex-5.

## Scrubbing: `reconfig_manager`

The Reconfiguration Manager rewrites the payload's configuration frames from a
reference bitstream stored off-chip. The payload sits in a known interval of
`NUM_FRAMES` frames starting at frame address `FRAME_BASE`. Frame *i* of the
interval is kept at word `i * 41` of the reference memory. A Virtex-5 frame
is 41 32-bit words.

`scrub_mode` selects what starts a repair:

| mode              | trigger                                   | repair                  |
|-------------------|-------------------------------------------|-------------------------|
| `SCRUB_BLIND`     | internal counter reaches `blind_period`   | all frames              |
| `SCRUB_CRC`       | rising edge of `crc_error`                | all frames              |
| `SCRUB_FRAME_ECC` | `ecc_error` pulse with `ecc_frame`        | that one frame only     |
| `SCRUB_SECDED`    | `uncorrectable` pulse                     | all frames              |
| `SCRUB_OFF`       | none                                      |                         |

Blind scrubbing needs no detection at all. It trades repair latency against
the time the payload spends being rewritten: scrub too rarely and errors build
up, too often and the payload is mostly down. The CRC and SECDED methods rely
on the SEU Controller's background readback. In SECDED mode the SEU Controller
corrects a lone flipped bit by itself, and the scrubber acts only on errors it
cannot correct. Frame-ECC scrubbing is the only partial method. While one
frame is rewritten, the other TMR branches and, with triple voters, the other
voters keep working.

A repair is a single ICAP session. Each granted cycle carries one word:

```
FFFFFFFF  AA995566  20000000            dummy, sync, NOOP
30002001  FAR                           write frame address = FRAME_BASE + first frame
30008001  00000001  20000000            CMD = WCFG, NOOP
30004000  5000_0000 | (n+1)*41          FDRI, type-2 word count
n*41 data words                         fetched one by one from the reference memory
41 zero words                           pad frame that pushes the last real frame in
30008001  0000000D  20000000 20000000   CMD = DESYNC, NOOPs
```

Here *n* is 1 for a frame repair and `NUM_FRAMES` for a full one. Each data word
is requested with `bs_rd`/`bs_addr` and written when `bs_rvalid` returns, so
memory latency only slows the repair down. At `NUM_FRAMES = 1024` with a 2-cycle
memory, a full repair takes about 170,000 clocks.

Queueing: one repair may wait behind the running one. If a second, different
frame is flagged while one is already waiting, the manager gives up tracking
frames and queues a full repair instead. `busy` is high while a repair is
waiting or running. The Fault Monitor records it in its status vectors,
because the payload is unavailable then. `full_scrubs` and `frame_scrubs`
count completed repairs.

Frame addresses are linear here. On a real device the frame address register
is a structured field, and the mapping of the payload's frames to addresses
has to come from the floorplanning tool's output. Adapting `far_word` is the
one change needed.

## Sharing the configuration port: `icap_manager`

There is one internal configuration access port (ICAP), and both the SEU
Controller and the scrubber need it. Each raises `req` and drives the port only
while its `gnt` is high. A grant is held until its owner drops `req`, so a
repair or a readback burst is never split. If both ask in the same cycle, the
scrubber wins. Grants are registered, and assertions check that the two are
never granted together and that nobody drives the port without a grant.

## Fault Monitor protocol

`fault_monitor` is commanded over its own UART (8N1, `CLKS_PER_BIT` clocks per
bit; the default 868 is 115200 baud at 100 MHz). Each command is one ASCII
byte:

| byte | action |
|------|--------|
| `T`  | isolation test: one pass over all vectors. The status vector is logged and sent back as 8 bytes, most significant first. |
| `G`  | continuous test: back-to-back passes until `H`. A pass is logged only when its error bits differ from the previous pass. |
| `H`  | stop after the current pass. That pass is logged and its status sent back. |
| `R`  | send the entry count (2 bytes), then every logged entry (8 bytes each). |
| `C`  | clear the log. |

Status vector, one per pass:

| bits   | meaning |
|--------|---------|
| 63:32  | pass number (also the time stamp) |
| 31:24  | vectors that failed (saturating) |
| 23:16  | index of the first failing vector, FF if none |
| 15:13  | branches that were ever wrong |
| 12:10  | output copies that were ever wrong |
| 9      | failure |
| 8      | scrubber busy during the pass |
| 3..0   | timeout, voter error, bridge error, single error |

In an *isolation* test, the host injects one fault and runs `T`. The host then
has the fault corrected before injecting the next. This measures how well a
TMR variant masks faults. In a *continuous* test, faults are not corrected
between injections and the scrubber works on its own. The log records when
the payload went wrong and when it recovered. From these transitions the host
computes availability and mean time to failure. The log holds
`LOG_DEPTH` = 4096 entries, so one 4,000-fault isolation run fits without
clearing.

The 64 vectors in `rtl/aes_kat_vectors.hex` are, per line, key, plaintext and
expected ciphertext as 96 hex digits. They are the two worked examples of
FIPS-197, then 31 variable-plaintext vectors (key 0, plaintext with the top
*i* bits set, *i* = 1..31), then 31 variable-key vectors (plaintext 0, key with
the top *i* bits set). The ciphertexts come from a software AES-128 checked
against FIPS-197. To use other vectors, replace the file or point `VEC_FILE`
elsewhere, and set `NUM_VECTORS` to match.

## What is outside this RTL

| part | why not RTL | stands in for it |
|------|-------------|-------------------------|
| SEU Controller | vendor soft-error-mitigation core | ports `seu_*`. Testbench model in `tb_scrub_test_platform`. |
| ICAP primitive and configuration frames | device silicon | port `icap`. `tb/icap_config_model.sv` parses the words and keeps the frames. |
| reference-bitstream EEPROM / platform flash | off-chip device | ports `bs_*`. `tb/bitstream_rom_model.sv`. |
| bus master and memory controller (flash, DDR2) | only named; no function given | `scrub_mode` and `blind_period` are plain inputs, and the log is on-chip. |
| synthesis-tool TMR variant | netlist transformation | none |
| host test software | software | testbench tasks that send commands |

## Parameters

| parameter | default | origin |
|-----------|---------|--------|
| `VARIANT` | `TMR_TRIPLE_VOTER` | the best-masking RTL variant |
| `CLKS_PER_BIT` | 868 | assumed 100 MHz clock, 115200 baud |
| `NUM_VECTORS` | 64 | size of the vector table |
| `LOG_DEPTH` | 4096 | one 4,000-fault isolation run |
| `TIMEOUT_CYCLES` | 64 | well above the 11-cycle payload latency |
| `NUM_FRAMES` | 1024 | assumed size of the payload's frame interval |
| `FRAME_BASE` | 0 | first frame address of that interval |
| `FRAME_WORDS` | 41 | Virtex-5 frame length (`scrub_pkg`) |

`blind_period` is 48 bits wide: 2^48 clocks is about 32 days at 100 MHz.

## How far to trust it

Independently checked:

* AES results, against FIPS-197 and the vector table.
* Voter logic, exhaustively on 3 bits and randomly at 128 bits.
* Masking by both TMR variants, with one branch forced wrong.
* Every status field and command of the Fault Monitor.
* Every scrubbing method, against a frame model that parses the ICAP stream.
  This covers word counts, frame addresses, partial versus full repair, the
  held-CRC single trigger, escalation and waiting for the grant.

The parts that a real device would judge differently are these:

* The packet sequence has not been run on hardware.
* Frame addressing is linear.
* A full repair here rewrites only the payload's interval. Reloading the
  whole device, which takes on the order of half a second, is outside this
  RTL.

## Simulating

Each testbench is self-checking and ends by printing
`TB_RESULT checks=N failures=M`. Run from the directory that holds `rtl/` and
`tb/`, because the vector file is read as `rtl/aes_kat_vectors.hex`:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  --top-module tb_scrub_test_platform \
  -y rtl -y tb -Irtl rtl/scrub_pkg.sv tb/tb_scrub_test_platform.sv
./obj_dir/Vtb_scrub_test_platform
```

The RTL files carry no `timescale`, so `--timescale` gives them the same one
as the testbenches. `-Wno-fatal` keeps Verilator's width warnings on
testbench arithmetic from stopping the build.

| testbench | covers |
|-----------|--------|
| `tb_aes128_core` | 66 vectors, latency |
| `tb_tmr_voter` | exhaustive and random voting, mismatch flags |
| `tb_aes_payload` | all three variants side by side, forced branch fault |
| `tb_fault_monitor` | UART commands, error classes, log, continuous mode |
| `tb_icap_manager` | grant rules |
| `tb_reconfig_manager` | four scrubbing methods on an 8-frame model |
| `tb_scrub_test_platform` | whole platform at default parameters |
| `tb_isolation_campaign` | 4,000 emulated upsets on each of the three variants |
| `tb_continuous_scrubbing` | continuous testing under an upset stream, every scrubbing mode |

The whole-platform testbench runs at the default sizes. In about 2 million
clocks (a few seconds) it goes through:

* isolation tests;
* a masked branch fault and its frame-ECC repair;
* CRC, SECDED-correction, SECDED-fallback and blind scrubs;
* ICAP contention;
* a continuous test across a scrub, and read-back of the log.

It counts each mechanism and fails if any of them never happened.

## Campaigns in simulation

Two testbenches run the platform the way a fault-injection campaign would.
In simulation an upset cannot change the circuit. So each testbench forces a
wrong value where the upset would show: on a branch result, on two branch
results, or on a voter output. The testbench releases the force when the
configuration is repaired. The percentages below come from this emulation,
not from upsets of real configuration bits.

`tb_isolation_campaign` runs 4,000 isolation tests per variant, side by side,
and takes about 2 minutes. It checks every status vector against the class the
upset must produce. With upsets split 70 % single-branch, 10 % two-branch and
20 % voter, a typical run ends:

| variant | single | bridge | voter | failures |
|---------|--------|--------|-------|----------|
| reference | - | - | - | 4000 (100 %) |
| single voter | 2809 | 389 | 802 | 1191 (29.8 %) |
| triple voter | 2756 | 420 | 824 | 420 (10.5 %) |

For the reference variant, the three "branches" are one core. Every upset
therefore shows as wrong in all of them, and only the failure column means
anything.

`tb_continuous_scrubbing` runs the triple-voter payload with a 16-frame
interval. It uses a fast UART, an upset about every 20,000 clocks, and
1.2 million clocks per setting. It computes availability from the logged
transitions and takes about a minute:

| scrubbing | availability |
|-----------|--------------|
| none | 2.8 % |
| blind, one scrub per 20 upsets | 14.3 % |
| blind, one scrub per upset | 81.7 % |
| blind, eight scrubs per upset | 0.1 % |
| CRC triggered | 82.7 % |
| frame ECC triggered | 100 % |
| SECDED | 100 % |

Blind scrubbing has a best rate. Scrub too rarely and errors accumulate in
two branches. Scrub too often and the payload is always being rewritten. The
detection-based methods act only when needed. The two that repair without a
full reconfiguration never take the payload down. The testbench checks the
blind-scrubbing optimum and that every detection method beats no scrubbing.
