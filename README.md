# Evolved low-power codes for a 32-bit address bus

Every time a line of a long on-chip or off-chip bus toggles, its capacitance is
charged or discharged, and on address buses this switching is a large share of
the power. When the program a system runs is known in advance (an embedded
system), its address trace is known too, and one can search for a recoding of
the bus that makes that particular trace toggle fewer lines.

This RTL implements the hardware side of that idea: encoders and decoders
whose code is a **bijection chosen offline for one application**. Because the
code is a permutation of the words of the bus, it needs no extra lines and
the receiver can always undo it. Three codecs are provided:

| codec | bus | how a word is recoded |
|---|---|---|
| **GEG8** | multiplexed (fetch + load/store) | four 8-bit clusters, each through its own 256-entry truth table |
| **GNEG4** | multiplexed | eight 4-bit clusters, each through a small evolved gate netlist (3 columns x 5 gates) |
| **GEG8+T0** | instruction fetch only | sequential addresses freeze the bus and raise one extra line (`in-seq`); all other addresses are sent GEG8-coded |

The search that produces the truth tables and netlists is a genetic algorithm
run in software on the application's trace. It is not part of this RTL. The
tables and netlists enter the RTL as parameters and become fixed logic in
synthesis. **The defaults shipped here are placeholders** (simple bijections,
described below). They exercise the hardware but save nothing in particular:
for real savings, replace them with the result of a search on your own trace.

## Why clusters

A code for the whole 32-bit bus would be a table of 2^32 rows, so the bus is cut
into clusters of adjacent lines and every cluster is coded on its own:
cluster `c` of width `w` holds lines `c*w .. c*w+w-1`. With 8-bit clusters a
code can exploit more of the correlation between consecutive addresses than
with 4-bit ones; the published results for this method put GEG8 near 48 %
fewer transitions on multiplexed buses against about 36 % for 4-bit clusters.
Which lines go into which cluster is not optimised; they are simply taken in
order.

## GEG: truth-table codec (`geg_encoder`, `geg_decoder`)

The encoder is a pure lookup: `code[c] = ENC_TABLE[c][addr[c]]` for every
cluster. `ENC_TABLE` is a packed array `[clusters][2^W][W]`, where
`ENC_TABLE[c][i]` is the code sent for value `i` in cluster `c`.

The decoder takes the same `ENC_TABLE` parameter and inverts it during
elaboration: it swaps the input and output columns of each table,
`DEC[c][ENC[c][i]] = i`. One parameter thus configures both ends of a link,
and they cannot drift apart. If a table is not a permutation, elaboration
stops with an error, because such a bus could not be decoded.

Example of a 3-bit code, the one used in the testbenches:

| word | 0 | 1 | 2 | 3 | 4 | 5 | 6 | 7 |
|---|---|---|---|---|---|---|---|---|
| encode | 5 | 1 | 3 | 6 | 0 | 7 | 4 | 2 |
| decode | 4 | 1 | 7 | 2 | 6 | 0 | 3 | 5 |

Passed as `ENC_TABLE = {3'd2, 3'd4, 3'd7, 3'd0, 3'd6, 3'd3, 3'd1, 3'd5}`
(the last element of the concatenation is row 0).

The cluster width is the parameter `W` (8 by default). `W = 4` gives the GEG4
variant, with eight 16-entry tables, which the block testbenches also check.

The default table is `enc_c(i) = ((2c + 3) * i + 16c + 1) mod 2^W`. An odd
multiplier makes it a permutation. It is computed by
`bus_codec_pkg::geg_default_table`.

### What the offline search optimises

Because only the number of toggles matters, a trace can be reduced to the
counts `n_ij` of how often the words `r_i` and `r_j` follow each other, with
each unordered pair counted once. For a candidate code `E`, the transitions are
`sum n_ij * popcount(E(r_i) xor E(r_j))`, and the fitness is the fraction
saved against the uncoded bus. Example: the stream `12 3 12 12 5 7 12 5 7 5`
reduces to `<3,12,2> <5,7,3> <5,12,2> <7,12,1>`. The top-level testbench checks
this reduction against the transitions it measures on the GEG bus.

## GNEG: gate-netlist codec (`gneg_gate_matrix`, `gneg_encoder`, `gneg_decoder`)

Four 256-row truth tables are not small: reported syntheses of GEG8 encoders
in a 0.13 um library take roughly 9,000-11,000 um^2, against under 300 um^2
for GNEG4 encoders. GNEG searches directly for a small circuit. The circuit is a
fixed template (`gneg_gate_matrix`):

```
 inputs x0..x3 ─┬─► column 0 (5 gates) ─► column 1 (5 gates) ─► column 2 (5 gates) ─┐
                └──────────────── any earlier node ────────────────────────────────┴─► 4 output taps
```

* **Nodes.** Nodes `0..N-1` are the cluster inputs. Gate `(col, row)` is
  node `N + col*ROWS + row`.
* **Genes.** Each gate has one gene, `gene_t {a, b, op}` in `bus_codec_pkg`.
  Fields `a` and `b` are node indices: any input or any gate of an *earlier*
  column. `op` is `G_AND`, `G_OR`, `G_NOT`, `G_XOR` or `G_WIRE`. NOT and WIRE
  use only `a`. `GENES[col*ROWS + row]` is the gene of gate `(col, row)`.
* **Outputs.** `OUT_SEL[o]` names the node that drives output bit `o`. It may be
  an input or any gate.
* **Checks at elaboration.** A gene that reads its own or a later column is an
  error, and so is a tap to a node that does not exist.

Synthesis removes the WIREs and the gates nothing reads, so a good chromosome
is one with many WIREs. The search rewards exactly that once the circuit is a
bijection.

`gneg_encoder` places one matrix on each 4-bit cluster, each with its own
chromosome (`GENES[c]`, `OUT_SEL[c]`). `gneg_decoder` builds the inverse of
each cluster's function during elaboration. It simulates the chromosome on all
16 inputs and inverts the resulting table. It rejects a chromosome that maps
two inputs onto one output. The inverse is therefore a table, not an evolved
netlist.

The default chromosome computes `y0 = x0, y1 = x1^x0, y2 = ~x2,
y3 = x3^~x2`, using 3 real gates (two XORs and a NOT). `bus_codec_pkg`
lists it gene by gene, which makes it a template for writing your own.

## GEG8+T0: hybrid codec for instruction fetch (`geg_t0_encoder`, `geg_t0_decoder`)

On a fetch-only bus, 55-65 % of the addresses are the previous address plus
one instruction. The T0 code sends nothing for those: the bus keeps its word
and an extra line, `in-seq`, tells the receiver to add the stride itself. The
hybrid codec pairs this with GEG for all other addresses:

```
encoder:  in_seq = (addr == prev_addr + STRIDE) and a previous transfer exists
          bus    = in_seq ? bus (unchanged) : GEG(addr)
decoder:  addr   = in_seq ? last_addr + STRIDE : GEG^-1(bus)
```

Published figures for this method: about 70 % fewer transitions for T0 alone
and about 80 % for GEG8+T0. The cost is the extra line, plus GEG and T0 logic
that are both always active.

The T0 parts are separate blocks. `t0_encoder` detects a sequence and selects
the frozen word; it takes the word currently on the bus as an input, since in
the hybrid that word is a GEG code. `t0_decoder` remembers the address last
delivered, fed back from the hybrid decoder, and offers it plus `STRIDE`.

**Timing.**

* The encoder registers its outputs. An address presented with `valid_i` in
  cycle *n* is on `bus_o`/`in_seq_o` from cycle *n+1*, with `bus_valid_o`
  high for that one cycle.
* Between transfers, the bus and `in-seq` hold their values, so idle cycles
  toggle nothing.
* The decoder is combinational from `bus_i`/`in_seq_i`. It updates its stored
  address at the clock edge ending a cycle with `bus_valid_i` high.
* Reset is synchronous and active-low. It clears the bus word to 0, clears
  the decoder's stored address, and makes the next address a GEG transfer.

`STRIDE` defaults to 4, which suits 32-bit instructions on a byte-addressed
bus.

## Top level (`bus_codec_top`)

The three links stand side by side, each with its own ports. The bus itself
is wires and pads, not logic, so each encoder drives `*_bus_o` and each
decoder reads `*_bus_i`. The surrounding design, or a testbench, connects
them. The GEG8 and GNEG4 links need no clock; `clk` and `rst_n` serve only the
GEG8+T0 link. Parameters: `GEG_TABLE`, `FETCH_TABLE` (the GEG tables of the
two GEG links, separate because the two buses see different traces),
`GNEG_GENES`, `GNEG_OUT_SEL`.

## Files

| file | contents |
|---|---|
| `rtl/bus_codec_pkg.sv` | sizes, `gene_t`/`gate_e`, default chromosome, default GEG table function |
| `rtl/geg_encoder.sv`, `rtl/geg_decoder.sv` | truth-table codec |
| `rtl/gneg_gate_matrix.sv`, `rtl/gneg_encoder.sv`, `rtl/gneg_decoder.sv` | gate-netlist codec |
| `rtl/t0_encoder.sv`, `rtl/t0_decoder.sv` | T0 sequence detector and predictor |
| `rtl/geg_t0_encoder.sv`, `rtl/geg_t0_decoder.sv` | hybrid fetch-bus codec |
| `rtl/bus_codec_top.sv` | the three links side by side |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_fetch_workloads.sv` | GEG8+T0 link on four synthetic fetch workloads |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself.
With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    --top-module tb_bus_codec_top rtl/bus_codec_pkg.sv tb/tb_bus_codec_top.sv
./obj_dir/Vtb_bus_codec_top
```

Use the same command with another `tb_*` module for the block tests.
`tb_bus_codec_top` runs the top at its default sizes. It drives 5,000
multiplexed-bus addresses through the GEG8 and GNEG4 links and 5,000 fetch
addresses, with idle cycles and a reset, through the GEG8+T0 link. It checks
every delivered address and counts each mechanism. It also prints the
transition counts of every link. With the placeholder tables these counts
show only that the hardware works; they say nothing about how good the
method is.

`tb_fetch_workloads` runs the GEG8+T0 link on four synthetic fetch streams.
Their in-sequence shares are 55.9 %, 60.3 %, 59.9 % and 63.6 %, the shares
reported for a dashboard controller, a DCT, an FFT and a matrix multiply.
Non-sequential fetches jump uniformly within 256 KiB. The testbench checks
delivery and the in-sequence share. It prints transitions for the raw stream,
for plain T0 (computed by a model in the testbench) and for GEG8+T0. Real
code jumps much more locally than these streams do, so the savings printed
here are far below those of real traces.

## How far to trust it, and where it is this design's own

Verified in simulation:

* the lookup and inversion logic, including the 3-bit example table;
* the gate-matrix evaluation for every gate type;
* per-cluster separation;
* the T0 and hybrid behaviour, including idle cycles, reset, wrap-around and
  the one-cycle encoder latency.

Not verified: timing, area and power in a real library, and transition savings
on real application traces, because no evolved tables or traces are included.

Choices made here rather than taken from the method:

* Tables and chromosomes are synthesis-time parameters, not run-time writable
  memories.
* The defaults are placeholders.
* The GNEG decoder is an inverted table, not an evolved netlist.
* "3x5" is read as 3 columns of 5 gates.
* A gate may read any earlier column, not only the one just before it.
* Output taps may pick any node.
* Gene fields are 8-bit node indices and a 3-bit gate code.
* Clusters are taken in line order.
* The T0 stride is 4.
* The GEG8+T0 encoder has a registered output and a valid strobe.
* Reset is synchronous and active-low.
* The first transfer after reset never counts as in sequence.
