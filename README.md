# SVT Hit Finder board in SystemVerilog

The Hit Finder sits at the front of the CDF Silicon Vertex Tracker trigger. One board takes the
raw readout of one wedge of the SVX-II silicon detector, two barrels of five layers each, and turns
it into a short list of cluster positions. The input arrives on four G-links at 53 MHz. Each word
is either a chip ID or a strip number with its pulse height. The output is one 23-bit word per
cluster, plus one end-of-event word. That word carries the bunch crossing, the error flags and a
parity bit. Each layer is clustered by its own engine: ten engines work in parallel and are then
merged into one output stream.

This RTL models the whole board datapath and its control:

```
 4 G-links (53 MHz) ──► 2 × hf_dad ──► 10 × hit_squad ──────────► hf_merger ──► hf_mop ──► front panel
   20 bits each         alignment      (HitMan + ISPY + CRAM       (30 MHz)     (map,      23-bit words,
                        byte→word       + 4K FIFO, one per layer)                errors,    Valid, LEDs,
                        26.5 MHz                                                 OSPY)      P2 errors
                          ▲                      ▲                    ▲            ▲
                          └──────── hf_boot: HF_Init, modes, test clock, internal VME bus ─┘
```

`hit_finder` is the top. It has no parameter that needs changing: all sizes are the board's.

## Data formats

| where | bits | meaning |
|---|---|---|
| raw word (from the alignment chip) | 15:8 / 7:0 | high byte `100xxxxx` = axial chip ID, `101xxxxx` = stereo chip ID, `0sssssss` = strip number with the pulse height in the low byte, `11xxxxxx` = end of readout. The first two words of an event are the HDI ID and the bunch crossing (high byte). |
| engine FIFO word (18 bits) | 15 EE, 14 LC, 13:11 chip, 10:4 strip, 3:0 substrip | one cluster; the position is in 1/16 of a strip |
| engine end-of-event word | 15 EE, 14 TD, 12 ID, 11:8 diagnostic (final chip count), 7:0 bunch crossing | TD = truncated data, ID = invalid data |
| merged word (24 bits) | 17:0 FIFO word, 22:18 one-hot stream mod 5, 23 streams 5–9 | all-zero label = no word |
| output word (23 bits) | 22 EE, 21 EP, 20:18 layer, 17:15 barrel, 14 LC, 13:0 position | EP (end packet) is always set |
| output end-of-event word | 22 EE, 21 EP, 20:9 error flags, 8 parity, 7:0 bunch crossing | flags: bit 9 parity, 10 lost sync, 11 FIFO overflow, 12 invalid data, 13 internal overflow, 14 truncated, 15 lost lock, 16–20 spare |

All shared widths, bit positions, chip-ID tags and VME device numbers are in `rtl/hf_pkg.sv`.

Chip-ID convention: this RTL uses `100xxxxx` for axial and `101xxxxx` for stereo chips, the
convention in use after May 1999. Older material that uses the opposite convention will not
parse. To follow it, change `AXIAL_ID_TAG`/`STEREO_ID_TAG` in the package.

## Alignment (`hf_dad`)

Each alignment chip serves one pair of G-links. A link carries two layers as whole bytes and
half of a fifth layer as a nibble. Layers 0 and 1 ride on bits 7:0 and 15:8. Layer 4 is split:
bits 19:16 of the first link carry its low nibble and those of the second link its high nibble.
Each link is written into a 10-word circular buffer from its first word with DAV* low. Reading
starts on a 26.5 MHz phase boundary, once one buffer holds three words (or the event has ended).
From then on both buffers are read in step, so the links may be misaligned by several 53 MHz
cycles. Two consecutive bytes form one 16-bit word, the first byte in the high half. A word's
valid bit is the AND of the DAV* of the 53 MHz words it came from (four-way for layer 4). Its
error bit is the OR of their ERROR bits. The 26.5 MHz clock is an enable in the 53 MHz domain
(`ce26_o`). A pin copy (`clk26_o`) has its rising edge in the middle of each word.

## Clustering engine (`hit_squad` = `hitman` + memories + FIFO)

This is the heart of the board and the part most worth reading in the code. The HitMan runs at
the 26.5 MHz word rate (an enable on the 53 MHz clock) in three stages.

**Ready** (`hm_ready`) parses the event. The first valid word is dropped and the second supplies
the bunch crossing. After that, each axial chip ID is compared with the next programmed chip ID
(eight registers, default `100` followed by the chip number). A match increments the chip count.
A mismatch, or more chips than programmed, sets the count to 15, which is illegal. A strip word
becomes a hit `{chip, strip, pulse height}`. A strip is in error, and ends the event with the ID
flag set, in three cases: its 10-bit chip+strip number is below the previous one, the chip count
is 15, or its ERROR bit is set. A stereo chip ID ends the event normally, since stereo data are
not clustered. After the event ends, Ready sends 21 invalid words to flush the later stages. It
then raises the end-of-event flag and waits for the input valid bit to drop before the next event.

**Aim** (`hm_aim`, 5 stages) forces negative pulse heights (bit 7 set) to zero. It then subtracts
a 7-bit pedestal, held per chip+strip in a 1024-entry memory, and clamps the result at zero.
Hits below the chip's 7-bit threshold are dropped.

**Fire** (`hm_fire`, 14 stages) forms clusters of adjacent strips. Its enable is only high when
Aim delivers a valid hit, or during Ready's flush. A chip-ID word therefore never reaches Fire,
and a cluster that spans two chips stays whole. Fire keeps a strip count and a charge sum. It
closes a cluster when the next strip is not adjacent or the cluster reaches six strips. The
cluster's position depends on its length:

* 1–3 strips: a charge-weighted centroid. Bits 6:2 of the pulse heights of the previous, current
  and next strip form a 15-bit Cluster RAM address (`{prev, centre, next}`). Neighbours that are
  not adjacent count as zero. The RAM returns a signed 6-bit offset in 1/16 strip. For three
  strips the middle strip's centroid is used.
* 4–6 strips: the median, last strip minus (length >> 1), with the long-cluster flag set.

A cluster is kept only if its charge sum is strictly greater than the programmable charge cut.
The offset table is not fixed in hardware: it is loaded over VME, so any weighting can be used.
The testbenches load `round(16·(next − prev)/(prev + centre + next))`.

The HitMan writes every kept cluster into the FIFO, and after it the end-of-event word. A cluster
limit (0 = none) stops further cluster writes in an event and sets TD in the end-of-event word.

**Input SPY buffer.** In normal running, each input word is stored as `{valid, error, data}` at
an incrementing address, together with the first word after valid drops. The buffer then holds
the most recent 64K words. In ISPY test mode the buffer is the data source. Bit 17 is the valid
bit and bit 16 the error bit. `0x10000` halts the replay and `0x1ffff` restarts it from address 0.
The whole Ready/Aim/Fire pipeline then advances only on test-clock steps, as if the test clock
drove it.

One known limit: during Ready's 21-word flush, Fire is enabled on every word. If a chip ID falls
among the last five words before the flush, a cluster that crosses that chip boundary can be
split. Only a cluster that crosses into one of the last chips of the event, close to its end, is
at risk. The testbench event generator does not start the last two chips at strip 0, so this
case is not exercised.

## FIFO, Merger and output processor

Each engine's `hf_fifo` (4K × 18) is the only crossing between the two clock domains. It uses
Gray-coded pointers and two-flop synchronisers. Its flags are active low, as on the board.

`hf_merger` runs at 30 MHz. It serves streams 0–4 on even cycles and 5–9 on odd cycles, each
group through its own data path. In each cycle it reads the lowest-numbered stream of the group
that is not empty, not masked, and has not yet delivered its end-of-event word. Only when all
ten have finished an event does it start on the next, so events never interleave. Hold (from
either front-panel connector) stops new reads. In deterministic mode the streams are read one
after another, each to its end of event. The streams are not numbered in link order: alignment
chip 0 feeds streams 0, 6, 2, 8, 4 and chip 1 feeds 5, 1, 7, 3, 9. Each Merger data path thus
carries layers of both barrels.

`hf_mop` labels each cluster with layer and barrel, from a 10-entry map programmable over VME
(default: layers 1–5 of barrel 1 for chip 0's streams, barrel 2 for chip 1's). It drops the
engines' end-of-event words and collects what they report:

* truncated and invalid data;
* bunch crossings that disagree (lost sync);
* any LNKRDY* high (lost lock);
* any FIFO full* low (overflow).

When the last enabled stream has ended, the MOP writes its own end-of-event word. The parity bit
is the XOR of bits 21:0 of all cluster words of the event. Flags set in the end-of-event mask
are removed from that word. All flags also collect in a sticky error register, which drives the
CDF and SVT error outputs through two masks.

The MOP registers the output word on the rising clock edge. Valid goes out on the falling edge
half a cycle earlier. An external 10 ns delay and a 74AS00 NAND with the clock then form the data
strobe, whose rising edge falls in the middle of the word (`hf_strobe_gate` models this). The
LED outputs are low for each cycle that carries a word. Every output word is also stored in the
64K × 36 Output SPY buffer. In OSPY test mode the stored words are replayed to the front panel
at the test-clock rate.

## Clocks, control and VME (`hf_boot`, `hf_vme_strobe`)

| domain | clock | logic |
|---|---|---|
| front end | 53 MHz, with a 26.5 MHz enable | alignment chips, HitMans, FIFO write side |
| back end | 30 MHz | Merger, MOP, Boot chip, FIFO read side |
| VME strobes | 25 MHz (stands for the 40 ns taps of a delay line) | `hf_vme_strobe` |

The Boot chip divides 30 MHz into enables at 15, 7.5, 3.75 and 1.875 MHz. It holds the brain
register and issues HF_Init: 8 cycles after power-up, after a VME write, or after P2 SVT_INIT*.
It produces the test clock (30 MHz, 15 MHz, 7.5 MHz or one step per VME write). The test clock
reaches the 53 MHz domain as a toggling level through `hf_step_sync`. The Boot chip also drives
the internal VME bus: address `{device[24:20], stream[19:16], subaddress[15:0]}` taken from VME
A26..A2, the data, a write line, and AS/DS. AS rises 2 taps after the VME strobe and DS at 4. A
write's DS falls at 6 and the acknowledge rises at 7. Every chip latches a write on the
synchronised rising edge of DS.

| device | stream | subaddress | contents |
|---|---|---|---|
| 0 | 0 | 0x0000 | brain register: 8 backup-port enable, 7 HF_Freeze, 6:5 test clock (30/15/7.5 MHz/VME), 4:2 HF_Test (ISPY source, OSPY source, deterministic merge), 1:0 mode (boot, test, run, load) |
| 0 | 0 | 0x0001 / 0x0002 / 0x0003 | configuration base address / one test-clock step / HF_Init |
| 1 | 0–9, 15 = all | 0x0000–0x03FF, 0x100N, 0x101N, 0x1020 | pedestals, chip IDs, thresholds, charge cut |
| 1 | 0–9, 15 | 0x1100 / 0x1101 / 0x1102 / 0x1103 / 0x1104 | ISPY counter (write resets) / default chip IDs / cluster limit / chips − 1 / disable |
| 2, 3, 4 | 0–9, 15 | address | ISPY, Cluster RAM low and high 64K |
| 5 | 0–9 | any | FIFO: write through the HitMan, read through the Merger |
| 6 | any | 0x0000 / 0x8000 | Merger stream mask / empty* flags |
| 7 | 0 | 0x0000, 0x100N, 0x1100, 0x1200, 0x1201, 0x1210, 0x1212–0x1214 | MOP mask, barrel/layer map, OSPY counter, clear flags, clear register, masks, error register |
| 8 | 0 | address | OSPY |

## Where this RTL is its own design

These choices fill gaps in the original board description:

* stage-by-stage contents of the Aim and Fire pipelines;
* the `{prev, centre, next}` order of the Cluster RAM address;
* the lowest-number rule in the Merger;
* the ISPY capture rule;
* the pacing of replay by test steps;
* which HF_Test bit selects which mode;
* the HF_Init length;
* the default barrel/layer map;
* the parity rule;
* the HitMan disable register at 0x1104.

The following are not built:

* Configuration of the FPGAs and memories from the flash memory. It is not described; only the
  base-address register is kept.
* The VME slave interface, taken over from an earlier board. `hf_boot` starts from an
  already-derived data strobe.
* The MOP's full 44-bit error registers. Only the seven named conditions exist, in 12-bit
  registers. The parity and internal-overflow flags are never raised.
* Steering words to only one of the two front-panel connectors.
* The DIP switch bank.
* LVDS parts, LED one-shots and connectors.

All four G-links share one 53 MHz clock here; on the board each link brings its own.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and stops itself through a watchdog. The shared reference model
is `tb/hf_tb_ref_pkg.sv`. It builds random SVX events and computes, independently of the RTL,
the FIFO words an engine must produce, including truncation and the Cluster RAM addresses read.

`tb_hit_finder` runs the full-size board. It programs the board over VME through the Boot chip's
strobe sequencer and drives the four links, and it checks every front-panel word: cluster
contents and order per stream, end-of-event flags, parity and bunch crossing, and the
Valid-to-data timing. It counts each mechanism and fails if any never occurred:

* Hold stalls and deterministic merging;
* cluster-limit truncation, lost lock, lost sync and invalid data;
* ISPY and OSPY replay;
* FIFO overflow, with the SVT error output;
* HF_Init recovery.

It takes about 20 s. It also reports the latency from the first link word to the first output
word: about 66 cycles of 53 MHz (≈1.24 µs) for its first event.

To run a testbench with Verilator 5:

```
verilator --binary --timing -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/hf_pkg.sv tb/hf_tb_ref_pkg.sv tb/tb_hit_finder.sv --top-module tb_hit_finder -Mdir obj -o sim
./obj/sim
```

Replace `tb_hit_finder` with any other testbench. `tb_hit_squad` reduces the FIFO to 256 words
so that its overflow test stays short. `tb_hf_strobe_gate` is the only one that needs the
delay-based gate model, which declares its own time unit.
