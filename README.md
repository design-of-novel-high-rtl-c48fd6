# A multiplexer-based 4:2 compressor

A 4:2 compressor is the basic cell of the partial-product reduction tree in a
fast multiplier. It takes four bits of the same weight, `x1`..`x4`, plus a
carry-in `cin` from the cell one column to its right, and returns three bits:

    x1 + x2 + x3 + x4 + cin  =  sum + 2 * (carry + cout)

`cout` is sent to the cell one column to the left, where it arrives as that
cell's `cin`. `cout` must not depend on `cin`. That is what lets a whole row of
compressors settle in constant time instead of rippling a carry across the row.

The textbook cell is two full adders in series: `x1 + x2 + x3` gives `cout` and
an intermediate sum, and `intermediate + x4 + cin` gives `sum` and `carry`.
That puts four XOR delays on the path to `sum`. This design reorganises the
same function around two exclusive-ORs, `x1 ^ x3` and `x4 ^ cin`. It lets
each of them steer 2:1 multiplexers, so each output sits one multiplexer
behind an XOR/XNOR stage. The published transistor circuit takes 34
transistors in a 45 nm process. The RTL here gives its logic structure, cell
by cell.

## The four selections

Form `p = x1 ^ x3` and `q = x4 ^ cin`. Everything else is a choice between
two signals that are already available:

| signal | when the select is 0 | when the select is 1 | select |
|--------|----------------------|----------------------|--------|
| `M`    | `x2`                 | `~x2`                | `p`    |
| `cout` | `x1`                 | `x2`                 | `p`    |
| `sum`  | `M`                  | `~M`                 | `q`    |
| `carry`| `x4`                 | `M`                  | `q`    |

Why this is correct:

- **`M`** is `x1 ^ x2 ^ x3`. When `x1 == x3` the two cancel and `M = x2`.
  Otherwise `M = ~x2`.
- **`cout`** is the majority of `x1, x2, x3`. If `x1 == x3`, those two already
  form the majority, so `cout = x1`. If they differ, `x2` decides.
- **`sum`** is `M ^ x4 ^ cin`, which is `M` when `x4 == cin` and `~M` otherwise.
- **`carry`** is the majority of `M, x4, cin`. If `x4 == cin` they decide and
  `carry = x4`. Otherwise `M` decides.

So `cout` is the carry of the upper full adder and `carry` the carry of the
lower one. The split between the two weight-2 outputs is the same as in the
two-full-adder cell. The new cell can therefore replace that one in an
existing reduction tree without changing anything else.

The same equations in sum-of-products form, as they would be drawn with gates:

    cout  = p·x2 + ~p·x1
    M     = ~p·x2 + p·~x2
    sum   = q·~M + ~q·M
    carry = ~q·x4 + q·M

## Circuit structure and how the RTL mirrors it

In the transistor circuit, every multiplexer is a pair of transmission gates.
A transmission gate needs its control in both polarities. The XOR stages
therefore deliver both `p` and `~p`, and both `q` and `~q`. The RTL keeps
this organisation:

- `xor_xnor_cell` gives `a ^ b` and its complement. It is used twice, on
  `(x1, x3)` and on `(x4, cin)`.
- `tg_mux2` is one transmission-gate pair. It takes the select as `sel` and
  `sel_n` and computes `y = (d1 & sel) | (d0 & sel_n)`. An assertion reports
  any settled input in which `sel_n` is not `~sel`. In silicon that case
  means two gates fighting or a floating node.
- `compressor_4_2` is the cell itself. It has two `xor_xnor_cell`s and four
  `tg_mux2`s (`M`, `cout`, `sum`, carry).

The carry multiplexer is built as in the circuit. It passes the inverted
candidates `~x4` and `~M`, and an output inverter restores `carry`. In the
transistor design, that inverter gives the `carry` output full logic swing
after the pass-gate stages. In RTL it is logically transparent. It is kept so
that the netlist shape matches.

Everything is combinational: there is no clock, reset or state. Ports:

| port | dir | meaning |
|------|-----|---------|
| `x1`..`x4` | in | the four bits to be compressed |
| `cin`  | in  | carry from the next-lower column's `cout` |
| `sum`  | out | weight-1 result bit |
| `carry`| out | weight-2 result bit, stays in this column's output row |
| `cout` | out | weight-2 bit to the next-higher column's `cin`; independent of `cin` |

## What this RTL does and does not capture

It captures the logic function and the circuit's partitioning into
XOR/XNOR stages, transmission-gate multiplexers and the carry output inverter.
Where the published description leaves a detail open, this model chooses:

- The select polarities are an assumption. The `0`/`1` labels of the
  multiplexers match the table above: the XOR output is the true select.
- The carry multiplexer's second data input, `~M`, is an assumption. It is the
  only choice that makes the inverted output equal the carry equation.
- The `~x2`, `~x4` and `~M` inverters are written as logic operators. Where
  they sit in the circuit is not specified.
- The XOR/XNOR cell is written by its function. Its five-transistor
  pass-logic topology is not reproduced.

It does not capture anything electrical. The reported figures for the 45 nm
cell at 1 V and 27 °C are not modelled:

- propagation delay of about 20.2 ns
- power of about 38.7 µW
- area of 5.684 × 6.075 µm²
- behaviour across process corners, supply and temperature

No delay is annotated in the RTL. Synthesised, the cell maps to a handful of
gates, and the timing then depends on the target library.

## Files

| file | contents |
|------|----------|
| `rtl/compressor_4_2.sv` | the compressor (top) |
| `rtl/xor_xnor_cell.sv`  | XOR with complementary output |
| `rtl/tg_mux2.sv`        | 2:1 multiplexer with complementary select and select check |
| `tb/tb_compressor_4_2.sv` | end-to-end test of the compressor |
| `tb/tb_xor_xnor_cell.sv`  | exhaustive test of the XOR/XNOR cell |
| `tb/tb_tg_mux2.sv`        | exhaustive test of the multiplexer |

## Verification

`tb_compressor_4_2` checks the cell against a reference built only from
integer sums:

- `cout = (x1+x2+x3 >= 2)`
- `s = (x1+x2+x3) mod 2`
- `carry = (s+x4+cin >= 2)`
- `sum = (s+x4+cin) mod 2`

It also checks the compressor identity above, and that `cout` is unchanged
when only `cin` changes. It applies three worked vectors, then all 32 input
combinations, then 4000 random vectors back to back. The three worked vectors
are written as `x1 x2 x3 x4 cin`:

| input | sum | carry | cout |
|-------|-----|-------|------|
| `01101` | 1 | 0 | 1 |
| `11111` | 1 | 1 | 1 |
| `01111` | 0 | 1 | 1 |

It counts how often each multiplexer passed each of its two inputs. If any of
the eight paths is never taken, it fails. The two cell testbenches are
exhaustive against hand-written truth tables. Every testbench ends by printing
`TB_RESULT checks=N failures=M`. A time-based watchdog stops a run that hangs
and reports it as a failure.

The cell has no size parameters, so the end-to-end test already runs the
design exactly as it would be used.

## Simulating

With Verilator 5, from the repository root:

    verilator --binary --timing --assert -y rtl tb/tb_compressor_4_2.sv \
              --top-module tb_compressor_4_2 -Mdir obj
    ./obj/Vtb_compressor_4_2

Replace the testbench name to run a cell test. `verilator --lint-only -Wall
-y rtl rtl/compressor_4_2.sv` lints the design.

## Using and changing it

To build a reduction row, place one `compressor_4_2` per column. Connect each
cell's `cout` to the `cin` of the cell one column to the left. Tie the
rightmost `cin` to 0, or use it for an extra bit. Both `sum` and `carry` go
on to the next reduction level: `sum` in its own column, `carry` one column to
the left. Because `cout` ignores `cin`, the row has no carry chain.

To target a flow with real transmission-gate cells, replace the body of
`tg_mux2`. Likewise, replace `xor_xnor_cell` to target a specific XOR cell.
The compressor only relies on their ports and logic functions. If you change
which polarity drives `sel`, swap `d0` and `d1` in the instances to match;
the testbenches will catch a mismatch.
