# Ripple-chain Gray code counter

A Gray code counter changes exactly one output bit per clock. Written
straight from a truth table, the next-state logic of an n-bit Gray counter
grows quickly with n (on the order of 2^(n-2) product terms), which makes
wide counters awkward in small programmable logic. This design avoids that
by keeping one extra flip-flop, the **auxiliary bit**, and building the rest
of the counter from identical one-bit slices chained together, plus a single
OR gate for the most significant bit. The width is a parameter; every bit
costs one flip-flop and a handful of gates, whatever the width.

## The counting rule

Append the auxiliary bit to the right of the Gray word. The auxiliary bit
toggles on every clock, like bit 0 of a binary counter; it equals 1 exactly
when the Gray word has an even number of ones (it is the word's parity
flag). With that bit in place the rule for advancing the count is:

* Gray bit *i* toggles when the bits below it, auxiliary bit included,
  read `1,0,...,0` (the bit directly below is 1, everything under that is 0).
* The most significant bit also toggles when the bits below it read
  `0,...,0`. That only happens in the last state of the cycle, `100...0`
  with auxiliary bit 0, and it sends the counter back to zero.

For a 3-bit word (`q[3:1]`, auxiliary bit `q[0]`) the sequence after reset is

| clock | q[3:1] | q[0] | bit that toggles next |
|------:|:------:|:----:|:----------------------|
| reset | 000 | 1 | q[1] (q[0] = 1) |
| 1 | 001 | 0 | q[2] (q[1:0] = 10) |
| 2 | 011 | 1 | q[1] |
| 3 | 010 | 0 | q[3] (q[2:0] = 100) |
| 4 | 110 | 1 | q[1] |
| 5 | 111 | 0 | q[2] |
| 6 | 101 | 1 | q[1] |
| 7 | 100 | 0 | q[3] (lower bits all 0: wrap) |
| 8 | 000 | 1 | ... |

## One-bit slice: `gray_1`

Each slice is a T flip-flop with two chain inputs:

* `qin` – the next lower bit of the chain;
* `zin` – 1 when every bit below `qin` is 0.

The flip-flop toggles when `qin & zin`, which is exactly "the lower bits
read 1,0,...,0". The slice hands the zero condition upwards as
`zout = zin & ~qin`. The slice's own bit does not enter `zout`; the next
slice gets this bit through its `qin`.

## Chain and MSB glue: `gray_n`

`gray_n` puts it together:

* `q[0]`, the auxiliary bit, is a D flip-flop fed by its own complement.
  Reset sets it to 1.
* The chain seed is `z[0] = 1`, since nothing lies below the auxiliary bit.
* Slices 1 to `WIDTH-1` get `qin = q[i-1]` and `zin = z[i-1]`.
* The MSB slice gets `qin = q[WIDTH-1] | q[WIDTH]`. While the MSB is 1,
  its own value stands in for the lower bit. So the all-zero pattern below
  it (the last state of the cycle) also satisfies the toggle rule. While
  the MSB is 0, the OR gate changes nothing. This is the only logic that
  differs from a plain slice. Without it the counter would stop at
  `100...0` and never wrap.

Ports of `gray_n`:

| port | dir | width | meaning |
|------|-----|-------|---------|
| `async_rst` | in | 1 | asynchronous reset, active high: Gray word 0, `q[0] = 1` |
| `clock` | in | 1 | rising-edge clock; the counter advances on every edge |
| `q` | out | `WIDTH+1` | `q[WIDTH:1]` Gray word, `q[0]` auxiliary bit |

Parameter `WIDTH` (default 3) is the number of Gray bits. It must be at
least 1, and an elaboration-time assertion checks this.

### Timing

One count per clock. There is no enable, load or direction input. The first
rising edge after reset is released gives Gray word 1. The zero condition
ripples combinationally through every slice, so the worst path grows
linearly with `WIDTH`: from `q[0]`, through `WIDTH-1` AND gates, to the
MSB's toggle input. This is the price paid for the small, regular
structure. No lookahead is provided.

## How closely this follows the reference design

The following match the published VHDL design:

* the slice equations;
* the auxiliary bit and its reset value of 1;
* the MSB OR gate;
* the active-high asynchronous reset;
* the default width of 3.

Choices made here:

* **Output port.** The original declares its outputs bidirectional so that
  the counter can read its own state. Here they are ordinary outputs that
  are read internally.
* **Minimum width.** `WIDTH >= 1` is required and checked here. The
  reference states no lower bound.
* **No reduced-pin variant.** There is a variant without asynchronous reset
  or without the auxiliary bit brought out, used to squeeze the counter
  into a 10-macrocell PLD. It is not provided.

Reported device fits of this structure range from a 9-bit counter in a
22V10 PLD to a 170-bit counter in an 8k-gate FPGA. Small counters were limited by I/O pins,
large ones by the device architecture.

## Files

| file | contents |
|------|----------|
| `rtl/gray_1.sv` | one-bit slice |
| `rtl/gray_n.sv` | parameterized counter (top) |
| `tb/tb_gray_1.sv` | slice: all input combinations, random toggling, reset without a clock edge |
| `tb/tb_gray_n.sv` | counter at default width: five full cycles checked against `b ^ (b >> 1)`, parity of `q[0]`, one-bit change per clock, MSB wrap counted, reset in mid-count |
| `tb/tb_gray_widths.sv` | counters of 9, 27, 34, 72, 103 and 170 bits side by side for 1100 clocks. The 9-bit one wraps twice; the wider ones show only their low bits changing in that time. |

Each testbench prints `TB_RESULT checks=N failures=M` and stops on a
watchdog if it hangs. `tb_gray_n` assumes the counter's default width of 3.
If you change the default, change its `W` to match.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps \
  --top-module tb_gray_n -y rtl +libext+.sv tb/tb_gray_n.sv
./obj_dir/Vtb_gray_n
```

Replace `tb_gray_n` with `tb_gray_1` or `tb_gray_widths` to run the other
testbenches. To lint the RTL on its own:
`verilator --lint-only -Wall -y rtl rtl/gray_n.sv`.
