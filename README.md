# Frequent-value encoding for an off-chip data bus

An off-chip data bus is expensive to drive. Each wire has a large load
capacitance, so the energy spent goes with the number of wire transitions.
Data words are not random. The same words come back again and again (zero,
small constants, pointers into a few heap regions). Parts of words repeat even
more often than whole words do. For example, the upper 20 bits of pointers
into one region are shared by thousands of distinct pointers.

This RTL puts a small codec at each end of the bus. Both codecs keep identical
tables of recently seen words and word parts. When a word, or part of one, is
in the table, the sender puts a *one-hot index* on the bus instead of the
data. The index goes through an XOR transition coder, so it costs a single
wire transition. One extra wire, the encode line, tells the receiver whether
the word is encoded. Three schemes are built. They differ in what the tables
hold and in how an index is laid out on the 32 data lines:

| scheme | tables (default) | what one encoded word costs |
|---|---|---|
| **FV-i** (`fv_i_codec`) | one FV table of (32-m)·2^m words (m = 2: 120 words) | ≤ m+1 transitions |
| **FV-i-MSB-j** (`fv_i_msb_j_codec`) | FV table ×I, table of R-bit high parts ×J (FV-2-MSB-2, R = 19: 62 + 36 entries) | FV hit ≤ 2; MSB hit ≤ 2 plus the raw low bits |
| **FV-MSB-LSB** (`fv_msb_lsb_codec`) | 32 words, 20 high parts of 20 bits, 12 low parts of 12 bits | 1 (FV), 2 (both parts), 1 + raw part |

FV-MSB-LSB is the strongest of the three on the evaluations this design
follows: about 53 % fewer transitions than an unencoded bus, against about
42 % for plain frequent-value encoding (FVE, a single 32-entry table). The
top level, `fv_bus_top`, instantiates one link of each scheme side by side.

## How both ends stay in step

The two codecs never exchange table contents. Each transferred word is seen
by both ends: the sender has it before encoding, and the receiver has it after
decoding. Both ends apply the same update to every table:

* a hit moves the entry to most-recently-used;
* a miss overwrites the least-recently-used entry.

Both ends start from the same reset state. The tables are therefore identical
before every word, and an index means the same entry on both sides.

The bus is half duplex. The processor-side codec encodes write data, and the
memory-side codec encodes read data. Either way, both ends update the same
tables. One codec module therefore holds an encoder and a decoder around a
single set of tables. The update key is the outgoing word when this end
sends, and the decoded word when it receives.

### Timing

```
cycle      t            t+1                    t+2
sender     tx_valid,    bus_dq/bus_enc driven,
           tx_data      bus_drive_o = 1
receiver                bus_strobe_i = 1       rx_valid, rx_data
```

Each end adds one register stage, so a word takes two cycles from `tx_data`
to `rx_data`. Back-to-back words stream at one per cycle, as in a cache-block
burst. An end must not send in the cycle in which a word from the other end
is on the wires. This leaves one idle cycle whenever the direction turns.
Assertions check this rule, and also that the two ends never send together.

## Transition coding (`xor_correlator`)

The sender does not put a code on the wires as a level. It XORs the code
into the current wire values: `bus <= bus ^ code`. The receiver recovers the
code as `bus ^ previous_bus`. A one-hot code therefore flips exactly one
wire. Every word goes through this XOR, encoded or not, so a raw word costs
as many transitions as it has ones. Both directions of one end share the
register that holds the last bus value. The encode line is a separate wire
that carries a plain level.

This choice has a visible cost on some data. A run of words that are close
but not equal, such as packed pixels, is cheap on a plain bus but costs its
popcount here when it misses the tables. `tb_fv_workloads` shows this on its
"media" stream: the configurations with a 32-entry FV table lose there, and
those with a 62- or 120-entry table win because they keep more words.

## The value tables (`fv_lru_table`)

All FV, MSB and LSB tables are instances of one module: N entries of W bits,
each with a valid bit and an age rank. The ranks are 0 to N-1, always a
permutation, with 0 for the most recently used entry.

* **Lookup** is combinational. The key is compared with every valid entry,
  and the result is `hit` and `hit_idx`.
* **Read by index** is combinational. The decoder uses it.
* **Update** happens on `upd_en`, at the clock edge:
  * hit: the entry takes rank 0, and every younger entry ages by one;
  * miss: the entry of rank N-1 takes the key and rank 0, and every other
    entry ages by one.

After reset the ranks are N-1-i. An empty table therefore fills in index
order, and empty entries are always the oldest.

## FV-i: tables larger than the bus

A one-hot index on k lines can address only k entries. FV-i gives up the
lowest m lines as *internal control lines* and uses them to name one of 2^m
portions of the table. The upper k-m lines carry the one-hot position within
the portion:

```
hit at index h:   line m + (h mod (k-m))  = 1      (one-hot, upper k-m lines)
                  lines m-1..0            = (2^m - 1) - (h div (k-m))
```

The first portion is sent with all control lines high. For FV-1 this means
"line 0 = 1 means the first half". With k = 32 the table holds 62 words for
m = 1 and 120 words for m = 2 (the default). A miss is sent as-is with the
encode line low. In that case line 0 is an ordinary data line. With m = 0 the
module is plain FVE, which is the baseline the other schemes are measured
against.

## FV-MSB-LSB: encoding parts of a word

The word is split into an R-bit high part (MSB, R = 20) and an L = 32-R bit
low part (LSB). The codec has three tables:

* the FV table: 32 entries of 32 bits;
* the MSB table: R entries of R bits;
* the LSB table: L entries of L bits.

Each table has as many entries as its field has lines, so each index is
one-hot on its own field. The encoder takes the first rule that applies:

| condition | lines 31..12 (MSB field) | lines 11..0 (LSB field) | encode |
|---|---|---|---|
| whole word in FV table | one-hot FV index across all 32 lines | | 1 |
| MSB hit and LSB hit | one-hot MSB index | one-hot LSB index | 1 |
| MSB hit, LSB part has ≥ 2 ones | one-hot MSB index | LSB part as-is | 1 |
| LSB hit, MSB part has ≥ 2 ones | MSB part as-is | one-hot LSB index | 1 |
| otherwise | word as-is | | 0 |

There is only one encode line, so the receiver has to work out which rule was
used. It does this by counting the ones in the two fields of the decoded code:

| ones in MSB field | ones in LSB field | meaning |
|---|---|---|
| 1 | 0 | FV index (a single one anywhere) |
| 0 | 1 | FV index (a single one anywhere) |
| 1 | 1 | both parts from the tables |
| 1 | ≥ 2 | MSB from the table, LSB as sent |
| ≥ 2 | 1 | LSB from the table, MSB as sent |
| anything else | | not a valid code: `rx_error` |

The "≥ 2 ones" rule is what keeps these cases apart. A raw part with no ones
would make the word look like an FV index. A raw part with one 1 would make
it look like a second index. Such words go unencoded even though one part
hit. All three tables are updated with every word, whichever rule was used.

## FV-i-MSB-j: enlarged FV and MSB tables

This scheme has two tables: an FV table enlarged by a factor I and an R-bit
MSB table enlarged by a factor J. Both use the control-line method of FV-i
(I and J are powers of two).

* **FV-1-MSB-2** (I = 1, R = 20): a 32-entry FV table and a 38-entry MSB
  table.
* **FV-2-MSB-2** (I = 2, R = 19, the default): a 62-entry FV table and a
  36-entry MSB table.

An MSB hit is sent as follows. The upper R-1 lines of the MSB field carry the
one-hot index. The lowest line of the field (line 32-R) carries the half, with
1 meaning the first half. The low 32-R bits go as-is. The receiver reads the
word as an FV index when the FV one-hot lines (31..log2 I) hold exactly one 1.
Otherwise it reads an MSB index.

One case needs care. An MSB code whose lines between the MSB index and the FV
control lines are all zero would read as an FV index. The encoder sends such
a word raw instead.

## Top level (`fv_bus_top`)

The top has three independent links, indexed 0 to 2 in every port array:

* link 0: FV-i (`FVI_M`, default 2);
* link 1: FV-i-MSB-j (`FVIJ_I`, `FVIJ_J`, `FVIJ_R`, default FV-2-MSB-2 with
  19 MSBs);
* link 2: FV-MSB-LSB (`MSBLSB_R`, default 20).

Elaboration stops with an error for parameter values a scheme cannot use:
an FV-i control field that leaves fewer than two one-hot lines, MSB or LSB
parts narrower than 2 bits, an MSB width of 32 or more, or growth factors
that are not powers of two.

Each link has a processor side (`cpu_tx_*`, `cpu_rx_*`) and a memory side
(`mem_tx_*`, `mem_rx_*`). The wires are brought out for observation:

* `bus_dq`, `bus_enc`: the value of the driving end, or the held value when
  no end drives;
* `bus_strobe`: the cycle carries a new word;
* `bus_kind`: the code kind, from `fvbus_pkg::code_kind_e`.

The processor, the memory and the analog pads and drivers are not part of
the RTL. Their interfaces are the ports.

After coarse synthesis the whole top is about 11.7 k word-level cells and
20.6 k flip-flops. Almost all of the flip-flops are table storage. Per codec:

| codec | flip-flop bits |
|---|---|
| FV-120 | 4.9 k |
| FV-2-MSB-2 | 3.4 k |
| FV-MSB-LSB | 2.0 k |

The tables are flip-flop arrays with a full comparator per entry, which is
what an associative lookup in one cycle needs.

## Verifying it

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|---|---|
| `tb_fv_lru_table` | hit, index, replacement choice and final contents against an LRU model that uses timestamps |
| `tb_xor_correlator` | two ends: wire changes, recovered codes, idle cycles |
| `tb_fv_i_codec` | FV-62 and FV-120 links, both directions with turns; every word's wire change against a reference encoder, the ≤ m+1 transition bound, the two-cycle latency, hits in every table portion |
| `tb_fv_i_msb_j_codec` | FV-1-MSB-2 and FV-2-MSB-2, the same way, including the FV-lookalike rule |
| `tb_fv_msb_lsb_codec` | every code kind and the ≥ 2-ones rule |
| `tb_fv_bus_top` | all three links at default parameters: cache-block bursts both ways, delivery, strobe and latency; counts every mechanism and fails if one never occurred |
| `tb_fv_workloads` | FV-32, FV-62, FV-120, FV-1-MSB-2, FV-2-MSB-2 and FV-MSB-LSB on the same generated pointer-heavy, media-like and integer streams; checks delivery and latency and prints each configuration's transition count against the unencoded bus |
| `tb_fv_msb_sweep` | the three MSB-based schemes at MSB widths 2, 5, ..., 29 plus 19 and 20 (33 links) on one generated stream; checks delivery on every link and prints the transition reduction per width |

The reference models are in `tb/fv_ref_pkg.sv`. They use last-use timestamps
rather than ranks, and integer arithmetic rather than the RTL's bit slicing.
The streams are synthetic, so the reduction figures printed by
`tb_fv_workloads` and `tb_fv_msb_sweep` show trends only. They are not a reproduction of benchmark
results.

To run a testbench with Verilator 5, from the directory that holds `rtl/` and
`tb/`:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/fvbus_pkg.sv tb/fv_ref_pkg.sv tb/tb_fv_bus_top.sv \
    --top-module tb_fv_bus_top -o sim
./obj_dir/sim
```

Every simulation takes well under a second. Compiling takes seconds to a
minute, except `tb_fv_msb_sweep`, which has 66 codecs and takes a few
minutes. Lint a module with
`verilator --lint-only -Wall -y rtl +libext+.sv rtl/fvbus_pkg.sv rtl/<module>.sv`.

Two lint warnings are expected:

* `SYNCASYNCNET`: the assertions sample the asynchronous reset.
* `UNUSEDPARAM`: each module uses only one of the per-scheme width constants
  of `fvbus_pkg`.

## Choices made here beyond the scheme descriptions

The schemes fix the table sizes, the one-hot and control-line layout, the
order of precedence, the "≥ 2 ones" rule, LRU replacement and a delay of one
cycle per end. The following points are this design's own choices:

* **Correlator on every word.** The XOR correlator is applied to raw words
  too. The encode line is a level.
* **Reset state.** Reset empties all tables at both ends and clears the bus
  value to zero. Tables fill in index order.
* **LRU timestamps.** They are age ranks.
* **Portion numbering.** The portion number on the control lines is inverted
  (first portion = all ones). This extends the "line 0 = 1 for the first
  half" convention to m = 2.
* **Table updates.** Every table is updated with every word.
* **Partial hits that fail the ≥ 2-ones rule.** In FV-MSB-LSB such a word is
  sent raw with the encode line low.
* **FV-lookalike MSB codes.** In FV-i-MSB-j they are sent raw. The line that
  selects the MSB half is the lowest line of the MSB field.
* **Naming of i and j.** In FV-i-MSB-j, i and j are table growth factors: I =
  1 means a 32-entry FV table, and I = 2 means 62 entries. In FV-i, by
  contrast, i counts control lines.
* **Bus protocol.** The transfer strobe, the half-duplex turnaround cycle and
  `rx_error` are additions needed for a complete bus interface.
