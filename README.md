# A 16-bit Kogge-Stone adder in adiabatic quantum-flux-parametron style

This is a 16-bit parallel-prefix adder. Its structure matches how an
adiabatic quantum-flux-parametron (AQFP) superconducting circuit computes.
AQFP logic has two properties that a CMOS designer would not expect:

* **Every gate is a clocked latch.** An AQFP gate is excited by an AC
  "power-clock" current. It settles to its output while its phase of the
  excitation is high, and it hands that value to the next gate as the next
  phase rises. There is no combinational logic between latches: a path of
  *n* gates takes *n* clock phases. The power-clock also acts as the reset.
* **The native gate is a three-input majority.** AND and OR are majority
  gates with one input tied to a constant. Inverting any input costs
  nothing, because it only reverses how the input transformer is wound.

The adder is a Kogge-Stone carry-lookahead adder built only from
three-input majority gates. The AC excitation has four phases, so data
passes through four gate rows per excitation cycle. A re-driving buffer row
follows every logic row. It takes two 16-bit operands and gives a 17-bit
result. A new addition can start every excitation cycle, and the result
comes out 14 phases (3.5 cycles) later.

The RTL is ordinary synthesizable SystemVerilog. One edge of `clk` is one
excitation phase. Each gate row is a register that is enabled on its own
phase.

## Phases, rows and positions

This is the part of the design that is least like a CMOS pipeline.

`aqfp_phase_gen` turns `clk` into a one-hot vector `phase[3:0]`. Bit *k* is
high during the cycle whose closing edge excites phase *k*. After reset,
phase 0 comes first.

Every clocked row in the adder has a **position** *n*, counted from the
operand inputs. The row at position *n* latches on the edges where
`phase[n mod 4]` is set. Between those edges it holds its value. As a
result:

* A value moves forward exactly one position per edge. The row at *n* + 1
  latches one edge after the row at *n*.
* Each row latches only once every four edges, so a new operand pair can
  enter once per excitation cycle (every four edges). About three and a
  half additions are in flight at any time.
* Every signal must pass through every position. If a net skips a logic
  row, it still needs a buffer in that row. Otherwise its value would belong
  to a different addition by the time it is read. This is why the design
  has whole rows of buffers: pass-through buffers in the prefix tree, and a
  six-row delay line for the half sum.

## Majority-gate arithmetic

With CMOS gates you would write generate `g = a&b` and propagate
`p = a^b`. Here propagate uses the OR form, `p = a|b`. This means a
generate always implies its propagate (g=1 ⇒ p=1). Under that implication,
one majority gate does the job of the prefix operator's AND-OR:

    maj(gh, ph, gl) = gh | (ph & gl)        whenever gh implies ph

Prefix cell combining a high group (gh, ph) with the low group next to it
(gl, pl):

| cell | outputs | gates |
|---|---|---|
| black (`ksa_black_cell`) | `g = maj(gh, ph, gl)`, `p = maj(gh, ph, pl)` | 2 |
| gray (`ksa_gray_cell`) | `g = maj(gh, ph, gl)` | 1 |

The group propagate is **not** the usual `ph & pl`. It is the
"carry-alive" term `gh | ph&pl`: the group outputs a carry if a carry comes
in. Only this form keeps "generate implies propagate" true for merged
groups. With `ph & pl`, a group that generates a carry but has a
non-propagating low half would have g=1 and p=0. The majority gate in the
next level would then drop that carry. As a bonus, neither prefix gate
needs a constant input.

The remaining gates, with `~` meaning an inverted input:

| signal | formula | gate |
|---|---|---|
| generate | `a&b` | `maj(a, b, 0)` |
| propagate | `a\|b` | `maj(a, b, 1)` |
| half sum | `a^b = p & ~g` | `maj(p, ~g, 0)`, one row after g/p |
| sum, row 1 | `t1 = h & ~c`, `t2 = ~h & c` | `maj(h, ~c, 0)`, `maj(~h, c, 0)` |
| sum, row 2 | `s = t1 \| t2` | `maj(t1, t2, 1)` |

Here `c` is the carry into a bit: the tree output of the bit below it. Bit
0 has no carry input, so `s[0] = h[0]`.

## The pipeline

For the default width W = 16, a driver buffer follows every gate row, so
each logic row uses two positions:

| positions | rows | block |
|---|---|---|
| 0–1 | g = a&b, p = a\|b, driver buffers | `ksa_pg` |
| 2–3 | h = a^b (next to prefix level 0) | `ksa_pg` |
| 2–9 | prefix levels with spans 1, 2, 4, 8 | `ksa_prefix_tree` |
| 4–9 | delay buffers that carry h to the sum rows | `aqfp_buffer` |
| 10–13 | two XOR rows; bit 0 and the carry out are buffered alongside | `ksa_sum` |

In general there are `(log2(W) + 3) × 2` positions (`aqfp_pkg::adder_stages`).

At prefix level *k* (span d = 2^k), bit *i* holds the following cell:

* i ≥ 2d: a black cell.
* d ≤ i < 2d: a gray cell. The merged group now reaches bit 0, so only its
  generate is needed later.
* i < d: a buffer.

Propagate bits that no later cell reads are not carried forward and read as
0. In the last level, each wire spans half the word.

Gate count of the default build:
* 176 majority gates.
* 310 buffers: 191 driver buffers, 96 for the half-sum delay, 15 pass-through
  buffers in the tree, and 8 beside the XOR rows.
* 486 clocked cells in all, plus the 2-bit phase counter.

## Interface and timing of `ksa16_aqfp`

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | one edge per excitation phase, i.e. four times the excitation frequency |
| `rst_n` | in | 1 | synchronous, active low; clears every row and restarts at phase 0 |
| `a`, `b` | in | W | operands |
| `phase` | out | 4 | one-hot: the phase excited at the next edge |
| `sum` | out | W | sum bits |
| `cout` | out | 1 | carry out (result bit W) |

Parameters:
* `W`: word width. Default 16. Must be at least 2.
* `DRIVER_BUF`: buffer row after every gate row. Default 1.

Protocol:
1. Present the operands in the cycle where `phase[0]` is high.
2. Hold them through the edge that closes that cycle. That edge samples
   them.
3. The result appears 13 edges after the sampling edge, once the 14th
   clocked row has latched. For W = 16 that row is on phase 1.
4. The result stays on the outputs for four edges, until the next
   addition's result replaces it.

Operands may change every four edges. The adder has no valid strobe. The
environment keeps count of the latency, as the real circuit's surroundings
would.

## Modules

    ksa16_aqfp            top: operands in, 17-bit result out
      aqfp_phase_gen      four-phase clock stand-in (counter, one-hot phase)
      ksa_pg              generate, propagate, half sum
      ksa_prefix_tree     Kogge-Stone levels
        ksa_black_cell
        ksa_gray_cell
        aqfp_buffer
      aqfp_buffer         half-sum delay line
      ksa_sum             two-row XOR, carry out
    aqfp_maj3             row of clocked majority gates with per-input inversion
    aqfp_buffer           DEPTH rows of clocked buffers (DEPTH = 0: a wire)
    aqfp_pkg              NUM_PHASES, phase_t, maj3(), prefix_levels(), adder_stages()

Each block takes a `POS` parameter for its first position. Each block
derives its phase enables from `POS`, so the blocks can be moved in the
pipeline without rewiring.

## Simulating

Run from the directory that holds `rtl/` and `tb/`. The top-level
testbench reads `tb/ksa_table2_vectors.hex` by that relative path.

    verilator --binary --timing --assert -Irtl -Itb rtl/aqfp_pkg.sv \
        tb/tb_ksa16_aqfp.sv --top-module tb_ksa16_aqfp -Mdir obj && obj/Vtb_ksa16_aqfp

Every testbench ends by printing `TB_RESULT checks=N failures=M`. Each one
also has a watchdog that ends the run with a failure if it hangs.

| testbench | what it shows |
|---|---|
| `tb_ksa16_aqfp` | The whole adder at its defaults. It runs 196 back-to-back additions, one per excitation cycle: 5 corner vectors (carry ripple through all 16 bits in both operand orders, each operand passed through alone, carry generated at every bit), 77 recorded test vectors from `ksa_table2_vectors.hex` (each line holds A, B and the expected 17-bit result, and the expected result is itself checked against A+B), 110 `$urandom` vectors and 4 further corner cases. Outputs are compared on every edge, so a result that is early or late fails. It counts how often each mechanism occurs and fails if one never does: full ripple, generate everywhere, pass-through, carry out 0 and 1, three or more additions in flight, new result on exactly the due edge. |
| `tb_ksa_scaling` | W = 32, 64 and 128 with driver buffers, and W = 64 without. Shows the sums and the latency of 16, 18, 20 and 9 positions. |
| `tb_ksa_pg`, `tb_ksa_prefix_tree`, `tb_ksa_sum` | Each block alone, with and without driver buffers. The tree is checked against integer carries of the low bits. |
| `tb_ksa_black_cell`, `tb_ksa_gray_cell` | All legal inputs (generate implies propagate), and the cell updates only on its own phase. |
| `tb_aqfp_maj3`, `tb_aqfp_buffer`, `tb_aqfp_phase_gen` | Majority with inversions, buffer delay per phase, phase order and reset. |

## What this RTL models and what it leaves out

From the AQFP circuit it takes:
* 16-bit operands and a 17-bit result.
* Majority-3 gates only.
* A Kogge-Stone prefix tree with black and gray cells.
* Four-phase clocking.
* A driver buffer after every logic row, which doubles the latency.

These are choices of this model:

* **Gate mapping.** The OR-form propagate, the carry-alive group
  propagate, the half sum taken from g and p, and the two-row XOR are one
  consistent majority-gate mapping. The fabricated circuit's exact
  netlist may differ row by row. Its row count, and so its latency, may
  differ too.
* **The excitation is digital.** The real power-clock is two AC currents
  90° apart plus a DC offset, carried on meandering lines. Here it is a
  2-bit counter on a clock four times faster. The model has no absolute
  time: the 5 GHz design target and the slow bench clock are equally valid
  readings of `clk`.
* **Reset.** Every row clears to 0 on `rst_n`. In the circuit, the
  power-clock itself returns every gate to its neutral state.
* **Fan-out.** A physical AQFP netlist needs splitter cells where a signal
  drives more than one gate. They are not drawn here: wires fan out freely.
  The driver rows are where a layout would put them.
* **Long wires.** A layout of 32 bits or more needs extra repeater rows on
  the longest prefix wires, and they add latency. `W` scales the logic and
  the levels only. It adds no repeater rows, so latency at large `W` is
  optimistic.
* **No carry input.**
* **Not modelled: analog parts at the edges.** The operand inputs and the
  per-bit dc-SQUID readout amplifiers, which turn each result bit into a
  return-to-zero voltage pulse, are analog. The operands and the 17
  result bits are plain ports instead.
