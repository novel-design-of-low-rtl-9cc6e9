# 8-bit barrel rotator built from R-gate multiplexers

A barrel shifter moves a word by any distance in one pass through a network
of 2:1 multiplexers: a column per bit of the distance, each column either
passing the word through or moving it by a fixed power of two. This design is
an 8-bit **right rotator** of that kind, with a twist at the cell level: every
2:1 multiplexer is an **R gate**, a 3-input/3-output gate from the
reversible-logic literature, wired so that one of its outputs is the mux
output. The low-power claim for this style concerns a transistor-level
implementation; at the RTL level the circuit is an ordinary logarithmic
rotator, and this code captures its structure and function exactly.

The whole design is combinational: 24 R gates, no clock, no reset, no state.

## The R gate

Three inputs A, B, C and three outputs:

| output | function        |
|--------|-----------------|
| P      | A               |
| Q      | A·B             |
| R      | A'·B + A·C      |

`rtl/r_gate.sv` implements these equations. The two product terms of R are
never 1 together, so the RTL merges them with an XOR, which gives the same
function as the OR and matches the AND/AND/XOR structure FPGA synthesis
shows for this gate.

One property worth knowing before relying on the "reversible" label: with
these output functions, A = 0 gives (P, Q, R) = (0, 0, B), so C cannot be
recovered from the outputs in that case. The gate is implemented as
defined; nothing in this RTL depends on reversibility.

## The Rg Mux

`rtl/rg_mux.sv` wires one R gate as a 2:1 multiplexer:

| R gate pin | connected to |
|------------|--------------|
| A          | select `s`   |
| B          | `i0`         |
| C          | `i1`         |
| R          | output `y`   |
| P, Q       | open (garbage outputs) |

so `y = s ? i1 : i0`. The two unused outputs are why the linter reports
`garbage_p` and `garbage_q` as unused; they are left open on purpose.

## The rotator network

`rtl/rg_barrel_rotator.sv` chains `$clog2(DATA_W)` columns of `DATA_W` Rg
Muxes. Column k looks at bit k of the binary distance `amt`:

* `amt[k] = 0`: mux input 0 is selected, the word passes unchanged;
* `amt[k] = 1`: mux input 1 is selected, which carries the bit 2^k places
  higher (modulo the width), i.e. the word is rotated right by 2^k.

For the default eight bits this is three columns of eight muxes (24 in all,
U1–U24 on the schematic), rotating by 1, 2 and 4. The composed function is

    q[i] = d[(i + amt) mod 8]

so bit 0 of the result is the data bit `amt` places above it, and the low
bits wrap around into the top.

### Select-line naming: S0 is the most significant

The published circuit has three select pins named S0, S1, S2. Its
transient simulation shows that **S2 has weight 1, S1 weight 2 and S0 weight
4**: the rotate distance is `4*S0 + 2*S1 + S2`. The RTL port `amt` is
therefore `{S0, S1, S2}` with `amt[0] = S2`. This is the easiest thing to get
wrong when connecting the block to a schematic that uses the S-names.

The reference stimulus of that simulation, with the data held at
D7..D0 = 1111_0000 and the distance counting up every 20 ns, gives:

| S0 S1 S2 | distance | Q7..Q0 (hex) |
|----------|----------|--------------|
| 000 | 0 | F0 |
| 001 | 1 | 78 |
| 010 | 2 | 3C |
| 011 | 3 | 1E |
| 100 | 4 | 0F |
| 101 | 5 | 87 |
| 110 | 6 | C3 |
| 111 | 7 | E1 |

Both rotator testbenches replay this sequence.

### Column order

The first column rotates by one (each of its muxes sees its own input row and
the neighbouring one); the second and third rotate by two and four. Since
rotations commute, the column order does not change the function, only which
select line drives which column.

### Width

`DATA_W` (default 8, from `rg_barrel_pkg`) may be set to any power of two of
at least 2; the number of columns follows as `$clog2(DATA_W)`. An initial
assertion reports other widths. Widths other than 8 are a generalisation of
the published circuit, exercised in the testbench at 4 and 16 bits.

## Board-level top

`rtl/rg_barrel_basys3.sv` is the top, shaped for an FPGA board with slide
switches and LEDs:

| port        | meaning |
|-------------|---------|
| `sw[7:0]`   | data byte, `sw[i]` = Di |
| `sw[10:8]`  | rotate distance `{S0, S1, S2}`, `sw[8]` has weight 1 |
| `led[7:0]`  | rotated byte, `led[i]` = Qi |

The port names and widths are those of the board design; the assignment of
particular switches to data and select bits is this implementation's choice.
Pin constraints for a particular board are not included.

## Timing

There are no registers. Outputs are valid one combinational delay after the
data or distance changes; the critical path is three mux levels (one R gate
per level) from any input to any output. If the rotator is used inside a
clocked datapath, register its inputs or outputs in the surrounding logic.

## What is not here

* Logical and arithmetic shifts and left rotation. A general barrel shifter
  offers them; this circuit is a right rotator only. A left rotate by n is a
  right rotate by `DATA_W - n`.
* Power figures. The low power of the R-gate style is a property of its
  transistor-level realisation (reported at about 18 µW for this rotator in
  a 45 nm process, against several mW for dynamic-logic mux barrel
  shifters); RTL synthesis maps the gate to ordinary logic and does not
  reproduce it.
* The dynamic-logic (TSPC, PDB) barrel shifters the design is compared
  with.

## Files

| file | contents |
|------|----------|
| `rtl/rg_barrel_pkg.sv` | `DATA_W = 8`, `SHIFT_W = 3` |
| `rtl/r_gate.sv` | the R gate |
| `rtl/rg_mux.sv` | 2:1 mux made of one R gate |
| `rtl/rg_barrel_rotator.sv` | parameterised log rotator of Rg Muxes |
| `rtl/rg_barrel_basys3.sv` | top level, switches in, LEDs out |
| `tb/tb_r_gate.sv` | all 8 input combinations against a hand-written truth table |
| `tb/tb_rg_mux.sv` | all 8 input combinations against the mux truth table |
| `tb/tb_rg_barrel_rotator.sv` | reference sequence above, all 256 bytes × 8 distances, random words at 4 and 16 bits |
| `tb/tb_rg_barrel_basys3.sv` | end-to-end test of the top at its default size; also counts that every column both passes and rotates, every distance occurs and wrap-around happens |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself; a
watchdog ends a run that hangs. With Verilator 5, for example:

    verilator --binary --timing --assert -Wno-fatal --top-module tb_rg_barrel_basys3 \
        -y rtl -y tb +libext+.sv rtl/rg_barrel_pkg.sv tb/tb_rg_barrel_basys3.sv
    ./obj_dir/Vtb_rg_barrel_basys3

Replace the top module and file name to run another testbench. All
testbenches finish in well under a second.

Lint, with the package read first:

    verilator --lint-only -Wall -y rtl +libext+.sv rtl/rg_barrel_pkg.sv rtl/rg_barrel_basys3.sv

The only warnings are the two open garbage outputs of each Rg Mux. Linting
`rg_barrel_rotator` on its own also reports the package constant `SHIFT_W`
as unused: the rotator derives its column count from its own `DATA_W`
parameter.
