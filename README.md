# 8×8-bit RSFQ modulo-256 multiplier — a pulse-level RTL model

This design computes the eight low bits of the product of two unsigned 8-bit
numbers the way a Rapid Single-Flux-Quantum (RSFQ) superconducting circuit
does it. In RSFQ logic a bit is a picosecond voltage pulse rather than a
level, and many gates count the pulses they receive. The multiplier uses
this. Each group of partial products is sent as a pulse train, one pulse every
12.5 ps, down a single line. Pulse-counting [4:2] compressors built from toggle
flip-flops (T1 cells) reduce each column. A new multiplication can start every
50 ps, which is 20 GHz. Internally, partial products move at 80 GHz.

The RTL here is a cycle-accurate *pulse-level* model of that circuit in
synthesizable SystemVerilog:

* one clock cycle = one 12.5-ps micro-step;
* a 1 on a wire for one cycle = an SFQ pulse, and a 0 = no pulse;
* every cell (T1, DFF, clocked XOR, clocked AND, delay line) is a small
  module that behaves the way its RSFQ counterpart does at micro-step
  resolution.

Next to it, and unrelated to it, is a small combinational N×M multiplier
(4×4 by default). It adds its partial products with carry-select adders that
use binary-to-excess-1 converters (BEC). See the last section.

## Top level

`multiplier_top` places the two multipliers side by side:

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | micro-step clock (one cycle = 12.5 ps of the RSFQ circuit) |
| `rst_n` | in | 1 | synchronous, active-low reset |
| `in_valid` | in | 1 | operand pulse of the RSFQ multiplier; at most one every 4 cycles |
| `a`, `b` | in | 8 | operands, sampled in the `in_valid` cycle |
| `p_valid` | out | 1 | one-cycle pulse, 18 cycles after `in_valid` |
| `p` | out | 8 | `a*b mod 256`, valid with `p_valid` |
| `nm_a`, `nm_b` | in | `NM_N`, `NM_M` (4, 4) | operands of the carry-select multiplier |
| `nm_p` | out | `NM_N+NM_M` | full product, combinational |

The real chip has DC-to-SFQ converters on its inputs and SFQ-to-DC converters
on its outputs. These are analog circuits and are not modelled. The plain
ports above stand in for them.

## The RSFQ multiplier (`rsfq_mult8x8`)

Only the 36 partial products `a[j]&b[i]` with `i+j ≤ 7` matter modulo 256.
Column `k` holds `k+1` of them. There are three stages:

```
 a,b,in_valid ─► rsfq_ppg ──12 serial PP lines──► rsfq_reduction_tree ─┬─ sum[4:0] ──(delay 5)──► p[4:0]
                 (12 MG modules)                 (12 + 8 [4:2])        └─ sum[7:5], carry[6:4] ─► rsfq_rca3 ─► p[7:5]
```

### Timing of one operation (cycles after `in_valid`)

| cycle | what happens |
|---|---|
| 0 | `in_valid`; all 12 MG modules load their AND products |
| 1–4 | PP slots 0–3 on every PP line (`start` of the tree in cycle 1) |
| 1–4 | level-1 (4,3) counters count; inter-column carries ripple sideways |
| 5 | level-1 (4,3) counters read; their parities go into the (3,2) counters |
| 6 | level-1 (3,2) counters and carry DFFs read |
| 7 | level-1 sums and carries come out as pulses |
| 7–10 | one merged line per column into level 2, four slots |
| 13 | level-2 sums and carries; `sum[4:0]` are product bits p0..p4 |
| 13–17 | ripple-carry adder for p5..p7 |
| 18 | `p` and `p_valid` |

The next operation may start 4 cycles after the last one, or any time later.
Each stage then works on two operations at once. While one operation's sums
are being added (cycles 5–6 of a compressor), the next one's partial products
are already being counted. An assertion in `rsfq_mult8x8` flags any
`in_valid` pulse that comes fewer than 4 cycles after the one before.

In this model the latency is 18 micro-steps, or 225 ps at 12.5 ps per step.
The fabricated circuit is reported at about 447 ps at 2.5 mV bias. That
figure includes transmission-line and junction delays, which a micro-step
model does not represent. The model keeps the *schedule*: 4 slots per
operation and 6 micro-steps per compressor. It does not claim the physical
delay.

### The cells

* **T1** (`rsfq_t1`): stores the parity of the pulses it receives. On every
  second pulse it sends a carry pulse at once, in the same cycle and
  combinationally. A read pulse `rd` outputs the parity as a sum pulse in the
  same cycle and clears the cell. A pulse that arrives in the read cycle
  counts for the *next* operation. This read-then-toggle order lets a cell
  finish one operation while the next one starts.
* **DFF** (`rsfq_dff`): set by a pulse; a read pulse outputs the stored bit
  and clears it.
* **Clocked XOR** (`rsfq_xor`): remembers which inputs received a pulse. On
  the read pulse it outputs a pulse if exactly one of them did.
* **Delay line** (`rsfq_delay`): a shift register of `DELAY` micro-steps. It
  stands in for Josephson transmission lines and delay cells.
* **Confluence buffer**: a plain OR of pulse wires. It is correct only when
  the pulses never coincide. The slot plan below ensures they don't, and
  assertions check it where a collision could happen.

### Partial-product generation (`rsfq_ppg`, `rsfq_mg`)

An MG*n* module (`rsfq_mg #(.N(n))`, n = 1..4) holds n clocked AND gates. It
sends their products one per cycle on one line: product i appears i+1 cycles
after `rdy`. The twelve MG modules are arranged in three groups:

| group | columns | modules | multiplier bits | PPs |
|---|---|---|---|---|
| upper left | 7..4 | MG4 ×4 | b[3:0] | 16 |
| upper right | 3..0 | MG4, MG3, MG2, MG1 | b[3:0] | 10 |
| lower | 7..4 | MG4, MG3, MG2, MG1 | b[7:4] | 10 |

`u_line[k]` is the upper line of column k. `l_line[k-4]` is the lower line of
column k. In slot i, a line carries the product that uses multiplier bit
b[i] (upper) or b[4+i] (lower). In the physical circuit, tuned distribution
networks give the MG modules different arrival times. In this model every MG
fires in the same cycle.

### The [4:2] compressor (`rsfq_compressor42`)

This is the core of the design. The compressor is a (4,3) counter followed by
a (3,2) counter, each a single T1 cell, plus a DFF for the output carry. It
reduces a column's pulses by counting them. Slot s is s cycles after its
`start`:

| slot | (4,3) T1 | (3,2) T1 | outputs |
|---|---|---|---|
| 0–3 | counts the PPs on `din`; the 2nd and 4th pulse leave on `c_int_out` | counts `c_int_in` pulses (slots 1–3) from the column below | — |
| 4 | read: parity → (3,2) T1; next op's slot 0 | counts the parity pulse | — |
| 5 | next op's slot 1 | read: sum; its carry was set in the DFF | DFF read |
| 6 | | | `sum`, `carry`, `done` |

For one operation, with `n` PPs and `ci` incoming inter-column carries:

* `c_int_out` = floor(n/2) pulses, each of weight 2 (they go to the next column);
* `m` = (n mod 2) + ci;
* `sum` = m mod 2;
* `carry` = floor(m/2), weight 2.

This adds up to `n + ci = 2·c_int_out + 2·carry + sum`.

Why the schedule is free of collisions:

* A (4,3) counter can carry only on the 2nd or 4th pulse, that is in slots
  1–3. The neighbour's parity pulse comes in slot 4. So the (3,2) counter's
  merged input never sees two pulses in the same cycle.
* In slot 4 of the next operation, the first pulse of a freshly read T1 cannot
  produce a carry.
* The next operation's inter-column carries can arrive in slot 5 at the
  earliest. The (3,2) counter reads in slot 5, and the read-then-toggle rule
  covers that case.

Because of this, inter-column carries are only valid between compressors that
start in the same cycle. The tree is built that way.

### The reduction tree (`rsfq_reduction_tree`)

* **Level 1** has twelve compressors:
  * an upper row for columns 0..7, fed by `u_line`;
  * a lower row for columns 4..7, fed by `l_line`.
  Each row chains its inter-column carries from low to high columns.
* **Between the levels**, confluence buffers merge the level-1 results of
  weight 2^k into one line per column, one micro-step apart:

  | slot | source |
  |---|---|
  | 0 | upper sum of column k |
  | 1 | upper carry of column k−1 |
  | 2 | lower carry of column k−1 |
  | 3 | lower sum of column k |

* **Level 2** has eight compressors, also chained sideways, and gives
  `sum[k]` and `carry[k]`. `carry[k]` has weight 2^(k+1).

Columns 0–3 never have more than two level-2 inputs. Because of that, their
level-2 carry can never be set (an assertion checks this), and `sum[4:0]` are
already product bits p0..p4. The column-4 carry, together with `sum[7:5]` and
`carry[6:5]`, forms the carry-save pairs (S5,C5), (S6,C6) and (S7,C7). All
carries of weight 256 are dropped.

### Final 3-bit ripple-carry adder (`rsfq_rca3`)

The S pulses arrive in slot 0 and the C pulses are delayed to slot 1. Then:

1. Column 5: a T1 counts S5 and C5. Its carry is delayed to slot 2 and joins
   column 6.
2. Column 6: a T1 counts S6, C6 and that carry. Its carry goes to a clocked
   XOR.
3. Column 7: a T1 counts S7 and C7. Its own carry is dropped (weight 256). Its
   parity, read in slot 3, is the XOR's other input.
4. The XOR is read in slot 4.
5. A register outputs all three bits together in slot 5.

In the full multiplier, p0..p4 are delayed by the same 5 cycles so that all
eight bits leave with `p_valid`. The RSFQ circuit itself puts them out early.

## The N×M carry-select multiplier (`mcsa_multiplier`, `mcsa_adder`, `mcsa_bec`)

`mcsa_adder` splits its operands into 2-bit groups:

* The lowest group is a ripple-carry adder that takes the carry-in.
* Every other group adds with carry-in 0. A 3-bit BEC turns that 3-bit result
  (sum and carry) into the result plus one. A multiplexer driven by the carry
  from the group below picks one of the two.

`GROUP` and `WIDTH` are parameters, and the top group may be narrower.
`mcsa_multiplier` forms the rows `(a & b[i]) << i`, N+M bits wide, and adds
them one after another with M−1 such adders. The default is 4×4. Adding the
rows one by one is this implementation's choice. The source only says that
carry-select adders with BEC add the partial products. The source's FPGA
results (gate count, I/O count, 13.7-ns delay) are device-specific and are
not reproduced here.

## Where the model departs from the circuit

* Micro-step time base: every pulse is aligned to a 12.5-ps grid. Physical
  jitter, bias margins and the 11–12-ps minimum pulse spacing are outside the
  model.
* The operands reach all twelve MG modules with zero skew. The physical
  circuit uses tuned delay lines in the operand and clock distribution
  instead.
* The slot order on the merged level-2 lines, the cycles in which each T1 is
  read, and the output alignment register are this model's own choices. They
  keep the published schedule: 4-slot issue and 6-step compressor.
* Reset is not part of the RSFQ circuit. Here a synchronous reset clears every
  cell.
* `rsfq_mult8x8` has a parameter `W` that must be 8: the tree is built for 8
  bits.

## Verification

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`:

* `tb_rsfq_t1`, `tb_rsfq_mg`, `tb_rsfq_ppg`, `tb_rsfq_compressor42`,
  `tb_rsfq_reduction_tree`, `tb_rsfq_rca3` test the cells and stages.
  Operations run back to back at the 4-cycle rate and also with random gaps.
  Each cycle is checked against a scoreboard: slot positions, pulse counts,
  the carry-save value and the latencies.
* `tb_rsfq_mult8x8` checks all 65536 operand pairs at full rate, then random
  pairs with gaps. It checks the value, the 18-cycle latency and the 4-cycle
  throughput.
* `tb_mcsa_adder` checks all 2^17 cases of the 8-bit adder.
  `tb_mcsa_multiplier` checks all products of the 4×4 multiplier and of a 5×3
  one.
* `tb_multiplier_top` runs the whole top at its default parameters. It checks
  both multipliers, then counts and requires each mechanism at least once:
  * back-to-back issue;
  * issue after a gap;
  * two inter-column carries from one counter;
  * a column-4 carry into the adder;
  * a dropped carry of weight 256;
  * a ripple carry into the p7 XOR;
  * the BEC branch selected in a carry-select group.

Simulate with Verilator, for example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/rsfq_pkg.sv tb/tb_multiplier_top.sv \
          --top-module tb_multiplier_top -o sim && ./obj_dir/sim
```

Use the same command for any other testbench, changing only its name. The
package `rtl/rsfq_pkg.sv` holds the latency constants and must be read first.
The full top-level test takes well under a second.
