# Sequential radix-2 Booth multiplier (4 × 4 → 8 bits, signed)

This is a small, low-area multiplier for two's complement numbers. It has one
adder and takes one add-or-skip step and one shift step per multiplier bit. It
uses Booth recoding: the multiplier is scanned one bit pair at a time. A run of
equal bits costs nothing, the start of a run of ones subtracts the
multiplicand, and the end of a run adds it back. So the design handles signed
operands with no separate sign correction. The default operands are 4 bits and
the product is 8 bits. The width is a parameter `N` of the top module.

The design is meant as an arithmetic unit for a small control processor, such
as an altitude or distance computation on a drone, where area and power
matter more than throughput.

## The Booth step

The datapath keeps three values:

| register | width | content |
|---|---|---|
| `M` | N | multiplicand, captured at start |
| `Q`, `Q-1` | N + 1 | multiplier plus one extra flip-flop, `Q-1`, cleared at start |
| `A` | 2N + 1 | accumulator, cleared at start; holds the product at the end |

One iteration, repeated N times:

1. **CHECK**: look at the pair `{Q0, Q-1}`.
   * `01`: `A = A + M·2^N`
   * `10`: `A = A − M·2^N`
   * `00` and `11`: `A` unchanged
2. **SHIFT**: shift `A` right arithmetically by one place, copying its sign
   bit. Rotate `Q` right by one place through `Q-1`: `Q0` goes into `Q-1` and
   also wraps around into the top bit of `Q`.

`M` is added into the *upper* half of `A` (`{±M, N zeros}`). So after N
shifts, `A` itself holds the whole 2N-bit product. Nothing is shifted from
`A` into `Q`, the classic layout. `Q` is only rotated to present the next bit
pair, and after N rotations it holds the multiplier again.

Worked example, 7 × (−4), with `M = 1100` and `Q = 0111`:

| step | `{Q0,Q-1}` | action | `A` after the shift (decimal) | `Q`, `Q-1` after the rotation |
|---|---|---|---|---|
| 1 | 10 | A = A − M·16 = 64 | 32 | 1011, 1 |
| 2 | 11 | none | 16 | 1101, 1 |
| 3 | 11 | none | 8 | 1110, 1 |
| 4 | 01 | A = A + M·16 = −56 | −28 | 0111, 0 |

### The guard bit

`A`, the adder and the select multiplexer are **2N + 1** bits wide (9 for
N = 4), one bit more than the product. This is needed for the most negative
multiplicand. With N = 4, −(−8) = +8 does not fit in the upper half of an
8-bit accumulator. The partial sum then takes the wrong sign, and the next
arithmetic shift spreads the error: a plain 8-bit `A` computes (−8) × 1 = +8.
With the guard bit, all 256 operand pairs are exact. `prod` is the low 2N bits
of `A`. When `done` is high, an assertion checks that the guard bit equals
bit 2N − 1. A purely 8-bit accumulator would be correct for every
multiplicand except −8, if that restriction is acceptable.

## Datapath blocks

| instance | module | role |
|---|---|---|
| `Controller_uut` | `booth_controller` | three-state FSM, below |
| `Count_uut` | `booth_counter` | sequence counter `COUNT` and its last-iteration flag `T` |
| `Mcand_uut` | `booth_mcand_reg` | `M` register |
| `Q_uut` | `booth_q_reg` | `Q` and `Q-1`, with the circular shift |
| `Cmpl_uut` | `booth_complementer` | forms ±M: XOR row plus add-1, sign-extended to N+1 bits |
| `Adder_uut` | `booth_adder` | (2N+1)-bit adder `A + {±M, N zeros}` |
| `Mux_uut` | `booth_mux` | 4:1 select on `{Q0, Q-1}`: `A` for 00/11, the sum for 01/10 |
| `Accumulator_uut` | `booth_accumulator` | `A`: clear, load, arithmetic shift |

`booth_pkg` defines the state type and the names of the four Booth pair codes.

Subtraction reuses the adder. The complementer inverts `M` through XOR gates
when the pair is `10` and adds that same control bit as the +1 of the two's
complement. So only one carry chain sits on the `A` path. The multiplexer
then decides whether `A` takes the sum or keeps its old value.

## Control: RESET, CHECK, SHIFT

```
RESET --START=1 / INIT--> CHECK --/--> SHIFT --T=0 / ENABLE--> CHECK
  ^ START=0 (stay)                       |
  +-------------- T=1 / DONE ------------+
```

| state | raised in the state | raised on the way out |
|---|---|---|
| RESET (code 0) | nothing | `INIT` if `START` = 1: load `M` and `Q`, clear `A` and `Q-1`, `COUNT = N` |
| CHECK (code 1) | `LOAD_ACC`: `A` takes the multiplexer output | none |
| SHIFT (code 2) | `SHIFT`: shift `A`, rotate `Q`/`Q-1` | `ENABLE` (`COUNT − 1`) if `T` = 0; DONE if `T` = 1 |

`ENABLE` is raised only when SHIFT goes back to CHECK. So N iterations take
N − 1 decrements, and `T` is defined as `COUNT == 1`: "this is the last
iteration". The controller never raises `INIT`, `LOAD_ACC` and `SHIFT` in the
same cycle, and an assertion checks this.

## Interface and timing

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock, rising edge |
| `rst` | in | 1 | synchronous reset, active high; aborts an operation in progress |
| `start` | in | 1 | sampled in RESET; starts a multiplication |
| `mcand`, `mplier` | in | N | signed operands, captured in the start cycle |
| `prod` | out | 2N | signed product |
| `done` | out | 1 | one-cycle pulse: `prod` is valid |
| `state` | out | 2 | controller state, for observation |

* If `start` is sampled high at edge 0, `done` is high after edge 2N + 1
  (9 edges for N = 4). That is one RESET cycle, then N CHECK/SHIFT pairs.
* The operands may change after the start cycle.
* `prod` keeps the result until a new `start` is accepted. The accumulator
  is cleared one edge after that.
* If `start` stays high, a new multiplication begins in the cycle `done` is
  high. This gives one product every 2N + 1 cycles.
* The FSM's DONE is raised in the last SHIFT cycle, before `A` has shifted.
  The top registers it, so `done` appears one cycle later, together with the
  finished product.

## Departures and choices

* **Accumulator width.** `A`, the adder and the multiplexer are 2N + 1 bits,
  not 2N: this is the guard bit described above.
* **`done` and `prod`.** `done` is a one-cycle pulse. A level that stays high
  after the operation would also be reasonable. `prod` reads 0 after reset
  and is never left undriven.
* **`Q` shift.** `Q` rotates (a circular shift), so it ends as it started. An
  arithmetic shift of `Q` would give the same product, because the product
  is read from `A` only.
* **Counter.** The counter width is `$clog2(N+1)`, and `T` means
  `COUNT == 1`, as explained under Control.
* **Reset.** Reset is synchronous and active high.
* **Adder.** The adder is a plain `+`, and synthesis picks its structure.

## Verification

Every module has a self-checking testbench in `tb/` that compares against
values it computes itself:

| testbench | what it checks |
|---|---|
| `tb_booth_multiplier` | at the default N = 4: the 7 × (−4) example; all 256 operand pairs, each checked for product, latency of exactly 9 edges, a one-cycle `done` and `prod` holding its value; back-to-back operation with `start` held high; a reset in the middle of an operation. It counts add, subtract, skip-on-00 and skip-on-11 steps, back-to-back restarts and reset aborts, and fails if any count is zero. |
| `tb_booth_multiplier_n8` | N = 8: every combination of 0, 1, −1, 127 and −128, plus 3000 random pairs, with a latency of 17 edges |
| `tb_booth_complementer` | exhaustive for N = 4 |
| `tb_booth_adder` | exhaustive for N = 4 |
| other unit benches | random commands against a reference model |

Every testbench ends with a `TB_RESULT checks=… failures=…` line and has a
watchdog that ends the run.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/booth_pkg.sv tb/tb_booth_multiplier.sv --top-module tb_booth_multiplier
./obj_dir/Vtb_booth_multiplier
```

Replace the testbench name to run the others. The RTL also passes
`verilator --lint-only -Wall`. Two warnings remain in the top module, and both
are intended. The counter's count output is left open. Only bit 0 of `Q` is
read, because the Booth pair is `{Q0, Q-1}`.

## Changing the width

`N` sets everything. The counter, the accumulator with its guard bit and the
adder all size themselves from it. The latency is 2N + 1 cycles. The adder's
carry chain is 2N + 1 bits long and is the critical path.
