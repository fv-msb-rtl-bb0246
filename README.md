# FV-MSB coded data bus

Every wire that toggles on an off-chip bus charges tens of picofarads, so the
switching activity of a data bus costs a large share of a chip's I/O energy.
This RTL implements FV-MSB, a bus code that reduces that activity by exploiting
*value locality*:

* **Frequent values (FV).** Data words recur. Both ends of the bus keep an
  identical 32-entry codebook of recently sent words. If a word is in the
  codebook, only its index is sent, as a one-hot code: a single 1 on one of the
  32 wires.
* **Frequent upper bits (MSB).** Many words that are not themselves recent
  share their upper bits with a recent word: pointers into the same heap
  region, or small integers near recent ones. A second codebook holds the upper
  M = 20 bits of recent words in 20 entries. On a hit, the upper 20 wires carry
  a one-hot index into it and the lower 12 wires carry the word's own low bits.
* **Transition coding.** The code word is XORed into the previous bus state
  (`bus = bus_prev ^ code`). A wire therefore toggles only where the code has a
  1, and an FV code costs exactly one toggle.

Both kinds of code share **one** control wire. Keeping it to one wire is the
central trick of the scheme, and the next section explains it.

With the synthetic traffic in the testbenches (recurring values, small
integers, pointers, random words), the link saves about 55% of data-wire
toggles compared with sending the words uncoded. Real program traffic will
give other numbers.

## One control wire for two codebooks

The receiver sees a 32-bit word plus a control bit `ctrl`, and must tell three
things apart:

| sender's case | bus word (before XOR) | `ctrl` |
|---|---|---|
| FV hit | exactly one bit set: bit `31-i` for FV entry `i` | 1 |
| FV miss, MSB hit, low 12 bits not all zero | upper 20 bits: one bit set, bit `31-j` for MSB entry `j`; low 12 bits: the word's low bits (at least one 1) | 1 |
| anything else | the word itself | 0 |

When `ctrl` = 1, the receiver tells the two codes apart by counting ones. An
FV code has exactly one 1. An MSB code has one 1 in its upper field and at
least one more in its low field. This works only because of one rule:

> An MSB hit whose low 12 bits are all zero is **not** MSB-coded. It is sent
> raw with `ctrl` = 0.

Without this rule, such a word would encode as a pure one-hot word, which
could not be told apart from an FV code. The rule costs a few MSB hits (region
base addresses, for example). In return, the MSB codebook needs no second
control wire.

When a word hits both codebooks, the FV code wins, because it toggles fewer
wires. Both codebooks are searched in parallel, and the encoder's output is an
AND-OR selection of three candidate words:

```
code = use_fv  ? onehot(fv_index)                      :
       use_msb ? {onehot(msb_index), value[11:0]}      :
                 value
use_fv  = fv_hit
use_msb = !fv_hit && msb_hit && (value[11:0] != 0)
ctrl    = use_fv || use_msb
```

`ctrl` itself is neither XOR-coded nor held between transfers. Every coded word
drives it to 1 and every raw word to 0.

## Keeping the two ends identical

There is no channel for codebook updates. The receiver stays in step with the
sender because both apply the same update to the same sequence of words:

* On every transfer, the sender looks up the full word in the FV CAM and its
  upper 20 bits in the MSB CAM. It updates **both** CAMs, whatever code it
  chose, including the MSB CAM on an FV hit.
* The receiver first rebuilds the word: from its FV CAM (FV code), from its
  MSB CAM plus the low bits (MSB code), or directly (raw). It then searches
  both of its own CAMs with that word and applies the same update.

Each CAM (`lru_cam`) is least-recently-used. Every entry has a valid bit, a
data word and a 5-bit age (0 = most recently used). On a hit, the entry goes
to age 0 and every younger entry ages by one. On a miss, the entry of the
highest age is overwritten and all others age by one. Reset clears the valid
bits and gives entry `i` the age `i`. Empty entries are therefore always the
oldest and are filled first, and both ends start in the same state. Idle
cycles (`in_valid` = 0) update nothing on either side. The bus holds its value
during them.

## Blocks and timing

```
in_data ─► fv_msb_encoder ─code/ctrl─► bus_correlator ─► bus_data/bus_ctrl/bus_valid ─►
              (FV CAM, MSB CAM)          (XOR + reg)          (the off-chip wires)

        ─► bus_decorrelator ─dcode─► fv_msb_decoder ─► out_data/out_valid
              (XOR with reg)            (FV CAM, MSB CAM)
```

| file | role |
|---|---|
| `rtl/fv_msb_pkg.sv` | bus width (32), MSB width (20), `enc_kind_e` (RAW, MSB, FV) |
| `rtl/lru_cam.sv` | LRU CAM: combinational search, one-hot read port, age-counter update |
| `rtl/fv_msb_encoder.sv` | parallel search, code selection, control bit |
| `rtl/bus_correlator.sv` | `send <= send ^ code`; registers `ctrl` and a transfer strobe beside it |
| `rtl/bus_decorrelator.sv` | `dcode = send ^ send_prev` |
| `rtl/fv_msb_decoder.sv` | classification, rebuild, mirrored CAM update |
| `rtl/fv_msb_link.sv` | top: both ends wired through the bus ports |

Parameters: `W` (bus width, 32) and `M` (MSB bits = MSB CAM entries, 20). The
FV CAM always has `W` entries, because its index must fit the bus as a one-hot
code. `M` must stay below `W` so that at least one low bit remains.

Timing of `fv_msb_link`:

* The encoder is combinational from `in_data`.
* The bus register captures the code at the clock edge where `in_valid` is
  high.
* The decoded word appears on `out_data`, with `out_valid`, in the following
  cycle. The latency is one cycle.
* The link accepts one word every cycle. There is no back-pressure.
* Both ends update their CAMs at the edge that ends a word's cycle.
* The sender's critical path is CAM search → selection → XOR → register.
* The receiver's path is XOR → one-hot test → CAM read → CAM search.

`enc_kind` and `dec_kind` report how each word was coded, for activity
counting. The decoder carries an assertion for the bus rule: a word marked
coded that is not a single 1 must have exactly one 1 in its upper field.

Size after generic synthesis of the whole link (both ends): about 4,100
word-level cells, 170 flip-flops and 2 × (32×32 + 20×20) CAM data bits, plus
valid and age bits.

## Where this RTL follows the scheme and where it chooses

These points follow the published FV-MSB scheme:

* the two CAMs and their sizes (32×32 and 20×20)
* the parallel search with FV priority
* the MSB code layout
* the zero-low-bits rule and the single control wire
* LRU replacement on every lookup
* the XOR correlator and decorrelator

These points are this implementation's own choices:

* **Bit order of the one-hot codes.** The first entry is on the most
  significant wire, following the scheme's "1000 = first of four entries"
  example.
* **LRU bookkeeping.** Valid bits and per-entry age counters. The scheme only
  speaks of timestamps.
* **Reset state.** Everything zero or invalid, on both ends.
* **Transfer strobe.** A valid signal with idle cycles that hold the bus.
* **Register stage and latency.** A one-cycle register stage.
* **Receiver update.** The receiver updates its CAMs by searching with the
  rebuilt word.
* **Control wire.** It is driven for every word. For the plain FV code, the
  original scheme suggests raising the control wire only when a raw word could
  be mistaken for a code. This design does not do that.

These parts are not built:

* **Transistor-level CAM cell.** A 6T SRAM cell with a dynamic XOR match line
  and separate search bit lines. Its logic function is the per-entry equality
  compare in `lru_cam`.
* **Off-chip wires and pads.** They are represented by the `bus_*` ports.
* **Energy, delay and area.** The scheme's figures come from a 0.18 µm layout
  and cannot be reproduced in RTL.
* **Comparison schemes.** Bus-invert, a 64-entry FV code and FV combined with
  bus-invert are not part of this design.

## Verification

Each block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`, and each has a watchdog.

* **Reference model.** `tb/fv_msb_ref_pkg.sv` holds a reference encoder
  written independently of the RTL. Its LRU is a recency list, not age
  counters. The package also holds the synthetic stream generator.
* **`tb_fv_cam`, `tb_msb_cam`.** `lru_cam` at 32×32 and 20×20: hit flag, hit
  index, read data, fill order from reset and evictions.
* **`tb_fv_msb_encoder`.** Code, `ctrl` and case against the model. Every case
  is required to occur, including an FV hit that also hits the MSB CAM, an MSB
  hit with zero low bits, and a raw word that looks one-hot.
* **`tb_fv_msb_decoder`.** Model-encoded words must decode to the original,
  with garbage driven on idle cycles.
* **`tb_bus_correlator`, `tb_bus_decorrelator`.** XOR coding, toggle count
  equal to the code's ones, and idle hold.
* **`tb_fv_msb_link`.** The top at default size, end to end:
  * two short traces: list pointers `10005098`, `100050d8`, `100050f8`
    interleaved with small values, and a small-integer loop;
  * checks that later pointers go as MSB codes and repeated values as FV codes;
  * then 50,000 random transfers checked word by word and for latency;
  * each FV code must toggle exactly one wire;
  * every mechanism (FV, MSB, MSB-with-zero-low, raw one-hot, evictions in
    both CAMs, idle) must occur.
* **`tb_fv_msb_sweep`.** The same stream through twelve links with M = 8, 10,
  …, 30. Every link is checked for correct round trips, and the MSB-to-FV code
  ratio and toggle saving are printed per width. On this synthetic stream, the
  saving has peaked around M = 18 to 20 in the runs made. Its pointers are built around a 12-bit offset, so
  treat the table as a demonstration of the experiment, not as evidence.

To run one with Verilator (package files first):

```
verilator --binary --timing --assert -Wno-fatal \
  rtl/fv_msb_pkg.sv rtl/lru_cam.sv rtl/fv_msb_encoder.sv rtl/fv_msb_decoder.sv \
  rtl/bus_correlator.sv rtl/bus_decorrelator.sv rtl/fv_msb_link.sv \
  tb/fv_msb_ref_pkg.sv tb/tb_fv_msb_link.sv --top-module tb_fv_msb_link
./obj_dir/Vtb_fv_msb_link
```

Every testbench runs in well under a second.

**What is not covered.** The design has not been exercised with real program
traces. Nothing is checked about timing closure or power.
