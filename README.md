# HCC interface for a FELIX readout of ITk strip hybrid modules

A strip hybrid module of the ATLAS ITk strip tracker carries ten ABC130 readout
chips and one Hybrid Controller Chip (HCC). The HCC talks to the outside world
over a GBTx link, and in the readout chain described here the far end of that
link is a FELIX card: an FPGA board that moves front-end Elinks to and from a
server over PCIe. FELIX's firmware knows two kinds of Elink: *direct mode*, in
which the line is all zeros when idle, and *8b10b mode*, a plain 8b10b-coded
stream. The HCC fits neither:

* its two command inputs, L0_CMD and R3_L1, each carry two time-multiplexed
  40 Mb/s streams and expect a 40 MHz clock train (`1010...`) when idle;
* its data output is *two* 8b10b streams interleaved bit by bit on one 4-bit
  Elink, with the HCC's own control characters framing its packets.

This RTL is the translation module that sits inside the FELIX firmware between
the GBT wrapper and the Central Router and makes the HCC look like ordinary
FELIX Elinks in both directions.

```
               +-------------------- hcc_interface ---------------------+
 Central       |                                                         |       GBT
 Router  dn_in |  hcc_bit_reverse (invert bit [1] of each 2-bit Elink)   | dn_out wrapper
 ------------->|-------------------------------------------------------->|------------->
               |                                                         |
        up_out |   elink_generator <- kcomma_replace <- elink_align  <-+ | up_in
 <-------------|   (stream A)         (stream A)        (stream A)     | |<-------------
 <-------------|   elink_generator <- kcomma_replace <- elink_align  <-+-| hcc_splitter
               |   (stream B)         (stream B)        (stream B)       |  (4-bit Elink)
               +---------------------------------------------------------+
```

Everything runs on one 40 MHz clock. A 2-bit Elink is 80 Mb/s, the HCC's 4-bit
Elink 160 Mb/s, and one 10-bit 8b10b word takes five clocks on a 2-bit Elink.

## Downstream: turning zero idle into a clock train

Each downstream Elink carries two bits per clock, one for each of the two
time-multiplexed streams on an HCC line. On L0_CMD one slot is the level-0
trigger (active high) and the other the command stream (active low). FELIX in
direct mode idles at `00`; the HCC wants `10`. `hcc_bit_reverse` simply XORs
every 2-bit Elink with `INV_MASK = 2'b10`. The idle becomes the clock train,
the trigger slot is untouched, and the command slot arrives at the HCC in the
active-low sense it expects. Both lines, L0_CMD and R3_L1, get the same
treatment (`N_ELINKS = 2`), since both show a clock train at the HCC when idle.
The output register holds `10` during reset, so the HCC sees a clean clock
train from the first cycle.

## Upstream: separating the two interleaved streams

In every clock the 4-bit Elink holds `A(n) B(n) A(n+1) B(n+1)`, earliest bit
in bit [3]. `hcc_splitter` swaps the middle two bits, which yields
`A(n) A(n+1) | B(n) B(n+1)`. The upper pair is now a 2-bit Elink holding only
stream A, and the lower pair one holding only stream B. Each is a valid 8b10b
stream, but its word boundary is unknown, and the two streams are independent
(own boundary, own running disparity).

## Word alignment: where the design has to make real choices

`elink_align` recovers the 10-bit word boundary of one 2-bit stream. This is
the least obvious part of the design.

* Two bits arrive per clock, so a code word ends either on the newest bit or
  on the one before it. The aligner keeps the last 11 bits and examines both
  10-bit windows.
* A window is a comma if its first seven bits are `0011111` or `1100000`, the
  comma of K28.1, K28.5 and K28.7. In a valid 8b10b stream this pattern never
  straddles two words, *except* around K28.7. For that reason K28.7 is not
  used as an HCC delimiter here (see below). With K28.7 as a delimiter, the
  end-to-end test saw repeated false realignments.
* A counter of bits since the last boundary emits a word whenever ten bits
  have accumulated, so in steady state `word_valid` pulses every five clocks.
* A comma at the expected boundary counts as a confirmation. `LOCK_COUNT`
  (default 3) consecutive confirmations raise `locked`.
* A comma anywhere else moves the boundary at once, drops `locked`, and pulses
  `realign`. In that clock the aligner may emit one word sooner than five
  clocks after the previous one. That is the reason for the FIFO in the
  Elink generator.
* After a bit slip, the old boundary stays in use until the next comma arrives.
  The words in between are misframed. They usually decode as errors and turn
  into commas, but they can decode as valid characters. The HCC's idle commas
  between packets limit how long this lasts.

## Control-character translation

`kcomma_replace` decodes each aligned word (`dec8b10b`), keeping the stream's
running disparity, and passes on one character per word:

| input word                          | output character |
|-------------------------------------|------------------|
| anything while the aligner is unlocked | K28.5 (inserted) |
| code or disparity error             | K28.5 (inserted), `err_count`++ |
| HCC start of packet, `HCC_SOP`      | `FELIX_SOP`      |
| HCC end of packet, `HCC_EOP`        | `FELIX_EOP`      |
| any other K-character               | K28.5            |
| data character                      | unchanged        |

Which K-characters each side uses is set by parameters. The defaults are a
choice of this design: HCC K28.0 / K28.3, FELIX K28.1 / K28.6, and K28.5 as idle
on both sides. Set the parameters to the real codes if they differ.

## Elink regeneration

`elink_generator` queues characters in a FIFO (`DEPTH` = 4), re-encodes them with
its own running disparity (`enc8b10b`), and shifts each 10-bit code out two bits
per clock, bit `a` first in bit [1]. A word slot opens every five clocks. If
the FIFO is empty at that moment, K28.5 is sent (`idle_fill`). The Central
Router therefore sees a word-regular, disparity-correct 8b10b Elink with
FELIX framing. A character that arrives at a full FIFO is dropped and counted
in `drop_count`. This cannot happen at the HCC's rate. A test drives the
generator alone in a burst to exercise it.

## 8b10b codec

`enc8b10b` and `dec8b10b` are combinational. They implement the standard
5b/6b and 3b/4b tables, including the alternate D.x.A7 form and the control
characters K28.0–7, K23.7, K27.7, K29.7 and K30.7. In this design, bit `a` of
a code word (the first on the wire) is `code[9]`. The decoder flags invalid
sub-blocks and disparity violations. It does not flag run-length violations
that span the 6-bit/4-bit boundary.

## Timing

| path | latency |
|------|---------|
| `dn_in` → `dn_out` | 1 clock |
| last bit of a word at `up_in` → character at `up_char` | 3 clocks (splitter, aligner, K-comma) |
| character → first bit on `up_out` | ≤ 6 clocks (wait for the next word slot) |

Throughput is one word every five clocks per stream, in and out.

## Parameters of `hcc_interface`

| parameter | default | meaning |
|-----------|---------|---------|
| `N_DN_ELINKS` | 2 | downstream Elinks (L0_CMD, R3_L1) |
| `DN_INV_MASK` | `2'b10` | bits inverted on each downstream Elink |
| `LOCK_COUNT` | 3 | confirming commas before `locked` |
| `FIFO_DEPTH` | 4 | Elink generator FIFO depth |
| `HCC_SOP`, `HCC_EOP` | K28.0, K28.3 | HCC packet delimiters |
| `FELIX_SOP`, `FELIX_EOP` | K28.1, K28.6 | FELIX chunk delimiters |

Reset (`rst`) is synchronous and active high.

## What is taken as given and what is chosen

Taken from the published description of this readout chain:

* the chain of stages and their names;
* the one-bit inversion downstream, with bit [1] as the inverted bit;
* the swap of the middle two bits of the 4-bit Elink;
* alignment and comma replacement of each resulting stream;
* the use of 8b10b.

Choices made in this design:

* the comma-detect alignment rule and `LOCK_COUNT`;
* the choice of K-characters;
* inserting a comma for every unusable word;
* re-encoding into a word-regular Elink with a FIFO;
* bit order within an Elink clock (earlier bit in the higher index);
* register stages, reset style and status outputs.

Not included, because they are existing FELIX firmware or board parts rather
than part of this interface:

* the GBT wrapper (4.8 Gb/s GBT frames with forward error correction);
* the Central Router;
* the PCIe DMA engine;
* the front-end ASICs (HCC, ABC130, GBTx).

The ports facing the GBT wrapper and the Central Router are the top's ports.

## Testbenches

Each testbench in `tb/` is self-checking. It prints
`TB_RESULT checks=N failures=M` and has a cycle watchdog.

* `tb_enc8b10b`: checks standard code words and, for every valid character, the
  disparity and running-disparity rules and where commas may occur. A 20 000-character
  random stream must have no run longer than five and a bounded running digital
  sum.
* `tb_dec8b10b`: checks standard code words, a round trip of every character in
  both disparities, disparity errors for every unbalanced word, and code errors
  for impossible sub-blocks.
* `tb_hcc_bit_reverse`, `tb_hcc_splitter`: check the bit mapping on random
  traffic, with one-clock latency.
* `tb_elink_align`: junk bits, then commas and data, then a one-bit slip. It
  checks that lock comes after exactly `LOCK_COUNT` commas, that the words match
  those sent, that words are five clocks apart, and that the aligner realigns
  and relocks.
* `tb_kcomma_replace`: checks the translation table above on random traffic
  with injected code and disparity errors, and the error count.
* `tb_elink_generator`: checks order, comma filling, word period and running
  disparity across words, plus overflow accounting in a burst.
* `tb_hcc_interface`: the end-to-end test at default parameters. It models the
  HCC's two streams with random offsets, framed packets, one invalid word on
  stream A and a one-bit slip on stream B. It checks that every packet reaches
  the Central Router side intact and in order, with FELIX framing, and that the
  downstream path is correct. It also counts that lock, realignment, delimiter
  replacement, comma insertion and idle filling each occur.

Delays in the testbenches use the simulator's default time unit.

To run one with Verilator, for example the end-to-end test:

```
verilator --binary --timing --assert -y rtl rtl/hcc_if_pkg.sv \
          tb/tb_hcc_interface.sv --top-module tb_hcc_interface -o sim
./obj_dir/sim
```

The testbenches that build on the codec (`tb_dec8b10b`, `tb_elink_align`,
`tb_kcomma_replace`, `tb_elink_generator`, `tb_hcc_interface`) use `enc8b10b`
or `dec8b10b` as a stimulus source or receiver. Those two modules are verified
first, against standard code words and code properties.

## Limits

* The aligner does not drop lock on decode errors. Only a comma at a new
  position moves the boundary, so misframed words between a slip and the next
  comma can pass as data.
* The HCC's packet delimiters and the FELIX chunk delimiters are assumptions.
  Check them against the real chips and firmware before use.
* One HCC per instance. A FELIX link with several hybrids would instantiate
  one module per 4-bit Elink.
