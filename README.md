# Reconfigurable NULL Convention Logic element

NULL Convention Logic (NCL) is a delay-insensitive asynchronous logic style.
Each bit travels on two wires (dual-rail: `D^0`, `D^1`), and data wavefronts
alternate with all-zero NULL wavefronts. Its gates are *threshold gates with
hysteresis*. A `THmn` gate has `n` inputs and sets its output once at least
`m` of them are asserted. Weighted variants (`THmnWw1w2..`) count some inputs
more than once. Once set, the output stays set until **every** input has
returned to 0.

A conventional LUT-based FPGA cannot hold that state safely. Building the
hysteresis from Boolean feedback spreads one gate across several cells and
brings back the races NCL is meant to avoid. This RTL describes the other
approach: a logic element (LE) that is itself a complete NCL gate. One LE
can be programmed as any of the 27 fundamental NCL gates (every threshold
function of up to four inputs). It can also reset to a programmed value and
invert its output. Many of these elements, plus routing, would form an NCL
FPGA. That array, its logic blocks and its interconnect are not defined
here. Only the element is.

## The core idea: a LUT holds the set condition, a keeper holds the state

Every NCL gate follows the same state equation. Only its *set condition*
changes:

```
gate value  <=  1           if set(A,B,C,D)
                0           if A = B = C = D = 0
                unchanged   otherwise
```

The element splits this equation into three parts:

1. **A 16-address lookup table** holds `set(A,B,C,D)`. It is addressed by
   `{A,B,C,D}`, with A as the most significant bit. For example, TH23
   (`AB + AC + BC`) has 1s at addresses 6, 10, 12 and 14 among the patterns
   with D = 0.
2. **A pull-up/pull-down stage** turns the LUT output `F` into a drive on
   the gate node:
   - it pulls the node to "set" when `F = 1`;
   - it pulls the node to "clear" when all four inputs are 0, through a
     series PMOS stack in the circuit;
   - otherwise it drives nothing.
3. **A weak keeper loop** (the hysteresis logic) holds the last value while
   nothing drives the node.

Two LUT entries are the same for every NCL gate:
- With no input asserted, no gate sets. Address 0 is therefore always 0.
- With all inputs asserted, every gate sets. Address 15 is therefore always 1.

So only addresses 14..1 are programmable. They are loaded from the 14-bit
word `Dp(14:1)`, where `Dp[i]` is the entry for address `i`. Because address
0 is constant, the set and clear paths can never be active together.
`ncl_le` asserts this.

Gates with fewer than four inputs use the leading inputs, A and B (and C for
three-input gates). The unused inputs must be tied to 0. For weighted gates,
the weights belong to A, then B, then C, in the order of the gate name. For
example, in TH54w32 A has weight 3 and B has weight 2.

### Programming words

`ncl_le_pkg::gate_dp(g)` computes the word for each gate from its set
equation. It evaluates the equation at every address `i = {A,B,C,D}` and
keeps bits 14..1. The words, written as `Dp14 .. Dp1`:

| gate | Dp(14:1) | gate | Dp(14:1) | gate | Dp(14:1) |
|---|---|---|---|---|---|
| TH12 | `11111111111000` | TH24 | `11111101110100` | TH24w22 | `11111111111100` |
| TH22 | `11100000000000` | TH34 | `11010001000000` | TH34w22 | `11111101110000` |
| TH13 | `11111111111110` | TH44 | `00000000000000` | TH44w22 | `11110001000000` |
| TH23 | `11111001100000` | TH24w2 | `11111111110100` | TH54w22 | `11000000000000` |
| TH33 | `10000000000000` | TH34w2 | `11111101000000` | TH34w32 | `11111111110000` |
| TH23w2 | `11111111100000` | TH44w2 | `11010000000000` | TH54w32 | `11110000000000` |
| TH33w2 | `11111000000000` | TH34w3 | `11111111000000` | TH44w322 | `11111101100000` |
| TH14 | `11111111111111` | TH44w3 | `11111100000000` | TH54w322 | `11111001000000` |
| THxor0 | `11110001000100` | THand0 | `11110101100000` | TH24comp | `11011101110000` |

THxor0 (`AB + CD`), THand0 (`AB + BC + AD`) and TH24comp
(`AC + BC + AD + BD`) are not threshold functions. Their set equations are
used directly. For two- and three-input gates, the bits at addresses where an
unused input is 1 are never read.

## Programming, reset and inversion

The element has two modes, selected by `P`:

- **Programming (`P = 1`).** `Rv`, `Inv` and `Dp(14:1)` pass into 16
  level-sensitive latches.
- **Operation (`P = 0`).** The latches hold, and the programming inputs are
  ignored.

Load a configuration by holding `P` high while those inputs are stable, then
lowering it. The element has no clock. The gate value also reacts to the
inputs while `P = 1`, so ignore `Z` until `P` is low. Keep `A..D` at 0 when
leaving programming mode: this clears the gate.

- **Reset.** While `rst = 1`, the gate node is driven to the stored `Rv`,
  whatever the inputs are. When `rst` falls, the keeper holds that value. It
  keeps it until the normal rules change it: a set condition, or all inputs
  at 0. NCL registers need a THnn gate that resets to 1 (a "d" gate) or to 0
  (an "n" gate); `Rv` gives both.
- **Inversion.** `Inv = 1` makes `Z` the complement of the gate value. This
  gives the inverting TH1n gates used as completion detectors in NCL
  registers.

Reset acts on the gate value, *before* the output inversion, because that is
where the reset multiplexer sits in the circuit. An element programmed with
both `Inv = 1` and reset therefore resets `Z` to `~Rv`. NCL uses resettable
THnn gates and inverting TH1n gates, so the two options rarely meet. For
non-inverting gates, `Z` resets to `Rv`.

Behaviour of one element (`Z = gate value ^ Inv`):

| rst | set(A,B,C,D) | A..D all 0 | next gate value |
|---|---|---|---|
| 1 | x | x | Rv |
| 0 | 1 | - | 1 |
| 0 | 0 | yes | 0 |
| 0 | 0 | no | unchanged |

## How the circuit maps to RTL

The element is a transistor-level circuit. This RTL models its logical
behaviour, block for block:

| circuit part | module | modelled as |
|---|---|---|
| programmable latch (transmission gate + inverter loop, `P`/`nP`) | `ncl_prog_latch` | `always_latch`, transparent while `P = 1`, outputs `Z`, `nZ` |
| 16-address LUT: 14 latches + pass-transistor tree + output inverter | `ncl_lut16` | 14 `ncl_prog_latch`, selection of their `nZ` outputs, final inversion; addresses 0/15 constant |
| pull-up/pull-down function | `ncl_pupd` | two signals, `pull_dn = F` and `pull_up = ~(A|B|C|D)`; both 0 means the node floats |
| reset logic: `Rv` latch + rst multiplexer | `ncl_reset_logic` | `drv` (node is driven) and `drv_val` (value after the node inverter) |
| hysteresis logic (weak inverter loop) | `ncl_hysteresis` | `always_latch` enabled by `drv`; outputs the value and its complement |
| output inversion: `Inv` latch + multiplexer | `ncl_output_inv` | selects value or complement |
| whole element | `ncl_le` | the five parts wired as above |

Shared types and constants are in `ncl_le_pkg`:
- `dp_t`, the programming word;
- `ncl_gate_e`, the 27 gates;
- `gate_set`, `lut_table`, `gate_dp` and `gate_inputs`.

A two-state simulator has no high-impedance node. The "floating" gate node
is therefore represented as `drv = 0`, and the keeper is a latch enabled by
`drv`. The contest between the strong drivers and the weak keeper is not
modelled. Neither is any delay: the model is zero-delay. The transistor
implementation has propagation delays of roughly 0.2 to 0.37 ns per input
transition, about 0.28 ns on average, and these are not reproduced.

Latches are the intended storage everywhere. There are 17 latch bits per
element: 14 for the LUT, one each for `Rv` and `Inv`, and the keeper. There
are no flip-flops. Power-up contents of the latches are undefined until the
element is programmed and either reset or cleared by all-zero inputs.

### Ports of `ncl_le`

| port | dir | width | meaning |
|---|---|---|---|
| `P` | in | 1 | 1 = programming mode |
| `Rv` | in | 1 | reset value, stored while `P = 1` |
| `Inv` | in | 1 | 1 = inverting output, stored while `P = 1` |
| `Dp` | in | 14 (`dp_t`, `[14:1]`) | LUT entries for addresses 14..1, stored while `P = 1` |
| `A`, `B`, `C`, `D` | in | 1 each | gate inputs; A is the LUT's most significant address bit and the first weighted input |
| `rst` | in | 1 | 1 = force the gate value to `Rv` |
| `Z` | out | 1 | gate output |

## Building NCL circuits from elements

Each element is one gate, so an NCL netlist maps onto elements gate by gate.
A single element can also absorb a register stage into a gate with three or
fewer inputs ("embedded registration"). The gate's function is ANDed with the
request line `Ki` from the next stage, using the fourth input. Two examples
are included as testbenches.

**Registered dual-rail full adder, 8 elements** (`tb_ncl_full_adder`):

```
Co^0 = TH44w2n(Ki2; X^0, Y^0, Ci^0)   carry: TH23 majority merged with a TH22 register
Co^1 = TH44w2n(Ki2; X^1, Y^1, Ci^1)   (Ki2 has weight 2, gate resets to 0)
s^0  = TH34w2 (Co^1; X^0, Y^0, Ci^0)
s^1  = TH34w2 (Co^0; X^1, Y^1, Ci^1)
S^0  = TH22n  (s^0, Ki1)              sum register
S^1  = TH22n  (s^1, Ki1)
Ko1  = inverting TH12(S^0, S^1)       completion for the sum
Ko2  = inverting TH12(Co^0, Co^1)     completion for the carry
```

The TH44w2 gate sets only when `Ki2` (weight 2) and two of the three data
inputs of its rail are asserted. That is a TH23 gate and a TH22 register
stage in one element. This puts the carry output one gate from the inputs.

The same merge works for every gate with three or fewer inputs, with `Ki` as
the heaviest input of a fundamental gate:

| gate + TH22 register | merged element (inputs `Ki, a, b, c`) |
|---|---|
| buffer (TH12 with B = 0) | TH22 |
| TH12 | TH33w2 |
| TH22 | TH33 |
| TH13 | TH44w3 |
| TH23 | TH44w2 |
| TH33 | TH44 |
| TH23w2 | TH54w32 |
| TH33w2 | TH54w22 |

Four-input gates have no input left for `Ki` and cannot be merged.
`tb_ncl_embedded_reg` checks each pair: the merged element must follow the
gate-plus-register version through the four-phase handshake.

**Input-complete dual-rail AND, 2 elements** (`tb_ncl_and`):
`F^1 = TH22(A^1, B^1)` and `F^0 = THand0(B^0, A^0, B^1, A^1)`. The second
expands to `A^0B^0 + A^0B^1 + A^1B^0`. The output waits until both operands
are DATA.

Larger NCL datapaths, such as multipliers and ALUs, need from about 140 to
over 1100 elements. They would also need the array and routing that are not
defined here.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_ncl_le_pkg` | the LUT contents of all 27 gates, against a second description of each gate by threshold and weights (`tb/ncl_ref_pkg.sv`); fixed addresses 0/15; worked example words (TH44 = all 0, TH54w32 = `11110000000000`) |
| `tb_ncl_prog_latch` | transparent while `P = 1`, holding while `P = 0` |
| `tb_ncl_lut16` | every address of every gate word and of random words; contents unchanged after programming |
| `tb_ncl_pupd` | all 32 input combinations |
| `tb_ncl_reset_logic` | every combination of `rst` and the two drive paths, for both `Rv` values |
| `tb_ncl_hysteresis` | random drive sequences; holds while undriven |
| `tb_ncl_output_inv` | both `Inv` settings |
| `tb_ncl_le` | a non-inverting TH44 resettable to 1 (a 4-input C-element) and a TH54w32 resettable to 0, stepped in 5 ns intervals with `Z` checked at each step; then all 27 gates x {`Rv`, `Inv`} under 300 random input/reset steps each, against the threshold reference; TH12 with B = 0 and `Inv = 1` used as an inverter. It counts programming, set, hold at 1, release, hold at 0, reset, inverted output and inverter use, and fails if any never happens. |
| `tb_ncl_full_adder` | the 8-element adder above under the four-phase handshake: all input combinations in random arrival orders, DATA held while `Ki` stays high, new DATA blocked while `Ki` is low, never both rails of an output high, reset |
| `tb_ncl_embedded_reg` | for the buffer and the seven 2- and 3-input gates: merged element against gate + TH22n register, including register hold and blocking |
| `tb_ncl_and` | the 2-element AND: output stays NULL until both operands arrive, and DATA stays until every rail is back at 0 |

To run one with Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
    rtl/ncl_le_pkg.sv tb/ncl_ref_pkg.sv tb/tb_ncl_le.sv \
    --top-module tb_ncl_le -Mdir obj_tb_ncl_le -o sim
./obj_tb_ncl_le/sim
```

Replace `tb_ncl_le` with any other testbench name. `tb/ncl_ref_pkg.sv` is
only needed by `tb_ncl_le_pkg` and `tb_ncl_le`. Every module lints cleanly
with `verilator --lint-only -Wall`, apart from an unused-constant note for
`NUM_GATES`, which only the testbenches use.

## Where this model departs from the circuit, and what to watch

- **Abstraction.** The pass-transistor multiplexer, the PMOS stack, and the
  weak/strong node contest become ordinary logic and latches. Analogue
  effects, delays and the programming-time waveform are not represented.
- **Select pin wiring.** The LUT select pins are wired so that A is the most
  significant address bit. The worked address examples for TH23 and the
  programming words for TH44 and TH54w32 fix that order; all three are
  reproduced by the tests.
- **Reset with inversion.** Reset is applied before inversion, as explained
  above.
- **Programming mode.** The gate logic is not gated off while `P = 1`.
- **Combinational loops.** When elements are connected in feedback, as NCL
  registers and completion logic are, the loop closes through the keeper
  latches. Verilator then evaluates the loop iteratively. Keep each
  element's inputs as separate nets, not elements of one unpacked array
  assigned in a single `always_comb`. Otherwise the simulator can see a
  half-updated loop at time 0, and the pull-path assertion in `ncl_le` can
  fire spuriously.
- **Not included.** There is no routing, logic-block grouping or arbiter
  (MUTEX) element. Those belong to an FPGA built from these elements and
  are not specified.
