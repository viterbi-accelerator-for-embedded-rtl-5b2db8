# A lightweight Viterbi accelerator for a processor datapath

Viterbi decoding of convolutional codes spends almost all of its time in two
steps: computing branch metrics (how far the received soft symbol is from each
possible encoder output) and add-compare-select (ACS) over the trellis. A
stand-alone decoder also needs a large decision memory for traceback, and it
is fixed to the constraint length it was built for. This design takes a
middle path. It is a small execution unit that sits in an embedded processor's
datapath next to the ALU and does only the metric work:

* **Hardware:** branch metrics and ACS. Only the newest column of path metrics
  is kept locally; every new column is streamed out to main memory.
* **Software:** builds the output table once, computes the first few trellis
  columns, and does the traceback from the metric columns stored in memory.

The unit is built for one accelerator constraint length `K` (default 6, which
gives 32 states), but it can decode codes of any length `k`:

* **Full mode** (`k <= K`): the whole column is computed inside the unit, four
  states per cycle.
* **Sub-state mode** (`k > K`): the unit behaves like an ALU operation. Each
  operation turns two predecessor metrics, read from the register file, into
  one new metric. The output table is paged in `2^K` entries at a time.

The processor is an exposed-control ("no instruction set") machine. The
compiler drives every unit's control bits and every interconnect multiplexer
directly each cycle. The accelerator therefore has no sequencer of its own
beyond pointers and counters. It executes one 3-bit opcode per cycle, and the
program schedules the loads, the column steps and the stores.

## Trellis conventions

These conventions are the part that hardware and software must agree on
exactly. They are also the part you are most likely to need when you write a
driver.

**State.** An encoder of constraint length `k` has `k-1` memory bits. The state
is an integer `s` in `[0, 2^(k-1))` whose **most significant bit is the newest
input bit**. On input `u` the next state is `s' = (u << (k-2)) | (s >> 1)`.

**Outputs.** For a code of rate `1/n` there are `n` generator polynomials `g_i`,
each `k` bits wide. Output bit `i` is the parity of `g_i & {u, s}`, with the
input bit `u` at the top (bit `k-1`). In the examples the generators are
written in octal, e.g. (65, 57) for `k = 6`.

**Output table.** The table holds `2^k` entries. Entry index = `{u, s}`, i.e.
`u * 2^(k-1) + s`, so the first half is for input 0 and the second half for
input 1. Each entry holds the `n` expected output bits, with output `i` in
bit `i`.

**Predecessors.** A new state `j` has input bit `u = j >> (k-2)`. Its two
predecessors are `2j'` and `2j'+1`, where `j' = j mod 2^(k-2)`. Because
`{u, 2j'} = 2j` and `{u, 2j'+1} = 2j+1`, the two branches into state `j` use
output-table entries `2j` and `2j+1`. The same holds in sub-state mode: if new
states are computed in portions of `2^(K-1)`, portion `q` needs exactly
entries `[q * 2^K, (q+1) * 2^K)`. That is one accelerator-sized slice of the
table, which is what makes paging possible.

**Decision.** The new metric is the smaller of `pm[2j'] + d(entry 2j)` and
`pm[2j'+1] + d(entry 2j+1)`. On a tie the first (even) predecessor wins. The
accelerator does not output decisions. Traceback recomputes each decision from
the two stored predecessor metrics and the symbol, which gives the same
result.

**Start.** Software computes columns `0 .. k-2` itself, starting from state 0,
where every other state's metric is large. By then every state is reachable,
and the accelerator takes over from column `k-1`.

## Inside the accelerator (`viterbi_accel`)

```
 DATA_IN[63:0] ──┬─> configuration register {n, k}
                 ├─> symbol buffer (N_MAX soft values)
                 ├─> output table  (2^K entries, 8 per load)
                 ├─> MUX1 ─> metric table, 2 banks x 2^(K-1) x B
                 │            ▲ new metrics          │ 2P metrics
                 └────────────┼──────────> MUX2 <─────┘
                              │              │ 2 metrics per lane
                  computational unit: P lanes, each = 2 distance units + 1 ACS
                              │
                  DATA_OUT reg (P x B = 32 bits)   ADDRESS_OUT reg (address pointer)
```

* **Computational unit** (`vit_comp_unit`): `P = 4` lanes. Each lane has two
  distance units (`vit_distance`) and one ACS (`vit_acs`). In a column step,
  lane `i` computes new state `j0 + i`.
* **Metric table** (`vit_metric_table`): two banks of one column each. A column
  step reads the current bank and writes the other. After the last group of a
  column the banks swap. A single in-place column would not work, because
  later groups still need the old metrics that earlier groups would have
  overwritten.
* **MUX1** selects the metric-table write data: `DATA_IN` when software loads
  a column, or the new metrics when computing. The new metrics are taken
  before the output register, so they are written in the cycle they are
  computed.
* **MUX2** selects the lane operands: pairs from the metric table (full mode)
  or the two metrics on `DATA_IN[15:0]` (sub-state mode, lane 0).
* **Output table** (`vit_output_table`): `2^K` entries of `N_MAX` bits. It is
  loaded 8 entries per cycle, one entry per byte of `DATA_IN` (the low `N_MAX`
  bits of each byte are used). The write pointer wraps at `2^k`.
* **Address pointer incrementer** (`vit_addr_incr`): loaded with a byte
  address. It steps by 4 for each full-mode output word (4 metrics) and by 1
  for each sub-state metric, so the stored columns are packed one byte per
  state.
* **Control unit** (`vit_control_unit`): decodes the opcode and holds the
  load pointers, the column position, the current bank and the sub-state
  entry counter.
* **Configuration register** (`vit_config_reg`): holds `k` (3..K) and `n`
  (1..N_MAX). Reset value: `k = K`, `n = 2`. An assertion flags illegal
  values.

`DATA_OUT` and `ADDRESS_OUT` are registered. They change only in compute cycles
and hold the result of the `COL`/`ENTRY` issued in the previous cycle.
`DATA_OUT[8i +: 8]` is lane `i`'s new metric, i.e. state `j0+i`. Store
`DATA_OUT` at `ADDRESS_OUT` in the next cycle. `HALT` freezes every register
in the unit for as long as it is high; the opcode is ignored.

## Operations

| Opcode | Name     | Effect (one cycle) | `DATA_IN` use |
|-------:|----------|--------------------|---------------|
| 0 | `NOP`    | nothing | – |
| 1 | `CFG`    | write configuration; clear all pointers, bank and counters | `[6:4]` = n, `[3:0]` = k |
| 2 | `ADDR`   | load the address pointer | `[31:0]` = byte address |
| 3 | `LD_OT`  | write the next 8 output-table entries | byte `e` = entry `ptr+e` |
| 4 | `LD_MT`  | write the next P metrics of the current column | `[8e +: 8]` = metric `ptr+e` |
| 5 | `LD_SYM` | load the received symbol | `[2i +: 2]` = soft value of output `i` |
| 6 | `COL`    | full mode: compute states `j0 .. j0+3` of the next column | – |
| 7 | `ENTRY`  | sub-state: compute one state from two given metrics | `[7:0]` = pm(2j'), `[15:8]` = pm(2j'+1) |

Soft values are unsigned 2-bit levels: 0 is a confident "0", 3 a confident "1".

## Running a decode

### Full mode (`k <= K`)

```
CFG {n, k}                  (not needed for k = 6, n = 2: that is the reset value)
ADDR base
LD_OT   x 2^k / 8           8 cycles for k = 6
LD_MT   x 2^(k-1) / 4       the last column computed by software
per symbol:
    LD_SYM                  1 cycle
    COL x 2^(k-1) / 4       8 cycles for k = 6; store DATA_OUT each following cycle
traceback in software from the stored columns
```

For `k = 6` this takes `1 + 8 = 9` cycles per symbol. For the 326-symbol
`K = 6`, `R = 1/2` benchmark, 321 symbols go through the accelerator, which
gives 2,889 cycles. The stores go out through the load/store unit in the
shadow of the following `COL`s.

### Sub-state mode (`k > K`)

The unit is configured with `k = K`. For each symbol:

```
LD_SYM                                          1 cycle
for each portion q of the 2^(k-1) new states, 2^(K-1) at a time:
    LD_OT x 2^K / 8                             the table entries [q*2^K, (q+1)*2^K)
    for L = 0 .. 2^(K-1)-1  (state j = q*2^(K-1) + L):
        2 cycles  read pm(2j'), pm(2j'+1) into the register file
        ENTRY     DATA_IN[15:0] = {pm(2j'+1), pm(2j')}
        2 cycles  route DATA_OUT to the register file, then store it
```

`LD_OT` resets the local entry counter `L`. The unit uses `L` only to pick
output-table entries `2L` and `2L+1` of the current portion. The schedule above
costs `1 + (2^(k-1) / 2^(K-1)) * (2^K/8 + 5 * 2^(K-1))` cycles per symbol:

| Accelerator K | Code k | R | per symbol | 321 symbols | published figure |
|---|---|---|---|---|---|
| 6 | 6 | 1/2 | 9 (full) | 2,889 | 2,889 |
| 6 | 8 | 1/4 | 673 | 216,033 | 216,033 |
| 6 | 9 | 1/4 | 1,345 | 431,745 | 431,424 (per symbol: 1,345) |
| 7 | 8 | 1/4 | 673 | 216,033 | 216,033 |
| 7 | 9 | 1/4 | 1,345 | 431,745 | 431,424 |
| 7 | 7 | 1/2 | 17 (full) | 5,457 | – |

The count does not depend on the accelerator's `K`, because the lanes are the
same and only the memories grow. The published per-symbol figure for `k = 9` is
1,345, but the published total, 431,424, equals 321 × 1,344. This design counts
the symbol load as a cycle, so its total is 321 cycles higher.

At 370 MHz, these sub-state counts give 0.275, 0.55 and 1.10 Mbit/s for
`k = 9, 8, 7`.

## Metric arithmetic

* **Distance.** The distance unit computes `sum_i |r_i - ideal_i|` over the `n`
  outputs, where `ideal` is 0 or 3. The architecture calls for a Euclidean
  distance. For antipodal ideal points, the squared Euclidean distances of all
  branches differ from this sum only by a common offset and a common positive
  scale, so the ACS decisions are identical and the adder tree is smaller.
  With `SOFT_W = 1` it reduces to the Hamming distance.
* **No normalisation.** Metrics are `B = 8`-bit unsigned numbers that wrap
  modulo 256. The ACS compares two candidates by the sign of their 8-bit
  difference. This is correct as long as all metrics in a column lie within
  128 of each other. The spread of a column is at most
  `(k-1) * n * (2^SOFT_W - 1)`, which is 96 for `k = 9`, `R = 1/4`. That is the
  largest case supported, and the reason `SOFT_W` is 2.
* **Software.** Software must make the same modulo comparison when it traces
  back. It must also keep the metrics of its initial columns within that
  window (the testbenches use 0 for state 0 and a large value for the others,
  taken modulo 256).

## In the processor datapath (`viterbi_datapath_slice`)

The baseline datapath has nine unit output registers:

* multiplier LSB and MSB;
* PC buffer and register;
* ALU buffer and register;
* register-file read ports A and B;
* load/store.

Each unit input is fed by a 9-input switchbox with a 4-bit address. Adding the
accelerator changes only a few things, and this module contains exactly those:

* `DATA_IN[63:32]` comes straight from register-file port A.
* `DATA_IN[31:0]` comes through a 2-way multiplexer (`in_sel`, one new
  interconnect control bit). Its inputs are register-file port B (In A) and the
  load/store output (In B). Data loaded from memory can therefore go straight
  into the unit.
* The switchboxes in front of the register-file write port and the load/store
  data input gain `DATA_OUT` as input 9.
* The switchbox in front of the load/store address input gains `ADDRESS_OUT`
  as input 9.
* Ten inputs still fit the 4-bit switchbox addresses. The opcode is three new
  unit control bits.

The register file, load/store unit, ALU, multiplier, PC and the other seven
switchboxes are not part of this RTL. Their outputs are the `dp_out` ports,
ordered as in `vit_pkg::dp_src_e`. The routed unit inputs leave as `rf_wdata`,
`ls_data` and `ls_addr`. A switchbox address beyond the last input gives 0.

## Parameters

| Parameter | Default | Meaning |
|---|---|---|
| `K` | 6 | accelerator constraint length: `2^(K-1)` local states, `2^K` table entries |
| `P` | 4 | lanes (computational units); 32-bit `DATA_OUT` = P × B |
| `B` | 8 | metric width |
| `SOFT_W` | 2 | bits per received soft value |
| `N_MAX` | 4 | largest `1/R` (rates 1/1 .. 1/4) |

The bus widths (64-bit in, 32-bit out and address), the 8-entry table load and
the 3-bit opcode are fixed in `vit_pkg`. `K = 7` is the other configuration
that has been exercised. Larger `K` only enlarges the two tables.

## Files

| File | Contents |
|---|---|
| `rtl/vit_pkg.sv` | opcodes, configuration and control structs, bus widths, switchbox input order |
| `rtl/viterbi_datapath_slice.sv` | top: accelerator plus its input mux and the three extended switchboxes |
| `rtl/viterbi_accel.sv` | the accelerator |
| `rtl/vit_control_unit.sv`, `vit_config_reg.sv`, `vit_symbol_buffer.sv` | control and configuration |
| `rtl/vit_output_table.sv`, `vit_metric_table.sv` | the two local memories |
| `rtl/vit_comp_unit.sv`, `vit_distance.sv`, `vit_acs.sv` | lanes, distance units, ACS |
| `rtl/vit_mux2.sv`, `flex_switchbox.sv`, `vit_addr_incr.sv` | MUX1/MUX2/In A-B mux, switchbox, address pointer |
| `tb/vit_ref_pkg.sv` | integer reference: encoder, output table, distance, ACS step |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_viterbi_ka7_workloads.sv` | the end-to-end runs on a `K = 7` build |

## Verification

Every testbench compares against values computed independently in the
testbench or in `vit_ref_pkg`. Each one prints
`TB_RESULT checks=<n> failures=<m>` and has a cycle watchdog.

* **Unit tests** cover each block with random and directed stimulus. They
  include a hand-worked 4-state example: the branch metrics of one received
  symbol against all eight table entries, and the next metric column.
* **`tb_vit_control_unit`** runs 4,000 random opcodes with random `HALT`
  against a model of the pointers.
* **`tb_viterbi_accel`** drives the unit alone in full mode (`k = 6`, `n = 2`
  and `k = 4`, `n = 3`) and in sub-state mode (`k = 8`), with `HALT` stalls.
* **`tb_viterbi_datapath_slice`** runs the whole datapath slice at default
  parameters. The testbench acts as the processor: it runs the software parts,
  keeps a byte-addressed memory written through the routed `ls_data`/`ls_addr`,
  and inserts random `HALT` stalls. It decodes:
  * `k = 6`, `R = 1/2`, 326 symbols, full mode;
  * `k = 9`, `R = 1/4`, 329 symbols, sub-state mode;
  * `k = 8`, `R = 1/4`, 328 symbols, sub-state mode;
  * `k = 7`, `R = 1/2`, sub-state mode.

  For each run it checks:
  * every stored metric against the reference, modulo 256;
  * that traceback from memory gives the reference decoder's bits and recovers
    the transmitted message;
  * the cycle counts in the table above;
  * that every mechanism occurred: bank swaps, sub-state entries, table paging,
    stalls, In A and In B inputs, all three extended switchboxes, and the
    change between modes.
* **`tb_viterbi_ka7_workloads`** repeats the end-to-end runs on a `K = 7`
  build, with `k = 7` and `k = 6` in full mode and `k = 9` and `k = 8` in
  sub-state mode.

Run any testbench with Verilator 5, from the repository root:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/vit_pkg.sv tb/vit_ref_pkg.sv tb/tb_viterbi_datapath_slice.sv \
    --top-module tb_viterbi_datapath_slice -Mdir obj_dp
./obj_dp/Vtb_viterbi_datapath_slice
```

Replace the testbench name to run another one. The end-to-end run takes about
a second.

## Departures and omissions

* **Left open by the architecture, chosen here:**
  * the opcode encoding;
  * the configuration word;
  * the packing of `DATA_IN` and `DATA_OUT`;
  * `B = 8` and 2-bit soft values;
  * the two-bank metric table;
  * byte-per-state storage addresses;
  * what `HALT` does;
  * the order of the switchbox inputs and which register-file port feeds which
    half of `DATA_IN`.
* **Distance:** a sum of absolute differences instead of a literal Euclidean
  distance (equivalent decisions, see above).
* **Metric wrap-around:** no metric normalisation. Correctness relies on the
  modulo comparison and the spread bound, so codes beyond `k = 9` at `R = 1/4`
  would need a larger `B`.
* **Symbol-load cycle:** the `k = 9` total counts the symbol load, which puts it
  321 cycles above the published total (see the table).
* **Not included:**
  * the processor's own units;
  * the software (output-table generation, initial columns, traceback), which
    exists only in the testbenches;
  * the stand-alone decoder the architecture is compared with;
  * any area, power or timing results.
