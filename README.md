# Shared FM0 / Manchester / Miller line encoder

Dedicated short-range communication (DSRC) links, such as those between vehicles or
between a vehicle and a toll gate, send their baseband bits as a DC-balanced line code.
The usual choices are FM0, Manchester and Miller. Built one by one, each code needs its
own encoder, and a transceiver that supports all three leaves two of them idle at any
time. The idea behind this design is *similarity-oriented logic simplification*
(SOLS). The three codes are written so that they differ only in a few select terms.
They can then share one small datapath: two flip-flops, one XOR and one output
multiplexer, all used in every mode.

The RTL has two parts:

* `sols_encoder`: the shared encoder. This is the part that does the work.
* `miller_fsm`: a four-state Miller state machine, taken from a published state
  table. It sits beside the encoder in the top level, `sols_top`.

## Code words and the half-bit clock

Each data bit `X` lasts one cycle of the bit clock `CLK`. Its code word has two halves:

| half | clock level | value |
|------|-------------|-------|
| former half | `CLK` high | `A` |
| later half  | `CLK` low  | `B` |

The line signal is therefore `code = CLK ? A : B`. The clock is used here as data,
which is the standard trick in this kind of encoder: no doubled clock is needed. The two
halves are also brought out as `code_a` and `code_b`. Logic clocked by `CLK` can use
those and never touch the clock-gated output.

## The three codes in one datapath

The encoder keeps two state bits:

* `level_q`: the line value sent in the later half of the previous bit.
* `prev_x_q`: the previous data bit. Only Miller needs it.

| mode (`sols_pkg::code_mode_e`) | `A` (former half) | `B = A ^ m`, with `m` = | line behaviour |
|---|---|---|---|
| `MODE_FM0` (00) | `~level_q` | `~X` | always a transition at the bit boundary; a mid-bit transition for a 0, none for a 1 |
| `MODE_MANCHESTER` (01) | `~X` | `1` | `X xor CLK`: a 0 is sent high-then-low, a 1 low-then-high |
| `MODE_MILLER` (10) | `level_q ^ (~X & ~prev_x_q)` | `X` | a mid-bit transition for a 1; a boundary transition only between two 0s |
| `MODE_RESERVED` (11) | as FM0 | | |

The later half is always the former half XORed with a mode-selected operand. That one
XOR, and the `CLK` multiplexer after it, are what the three codes share. At the rising
edge that ends a bit, `level_q` takes `B` and `prev_x_q` takes `X`. FM0 needs only the
single `level_q` flip-flop: the second flip-flop of a straightforward FM0 encoder is
retimed away.

Worked example: the bits `0 1 1 0 1` straight after reset, shown as `A B` per bit:

| bit | X | FM0 | Manchester | Miller |
|-----|---|-----|------------|--------|
| 1 | 0 | 1 0 | 1 0 | 0 0 |
| 2 | 1 | 1 1 | 0 1 | 0 1 |
| 3 | 1 | 0 0 | 0 1 | 1 0 |
| 4 | 0 | 1 0 | 1 0 | 0 0 |
| 5 | 1 | 1 1 | 0 1 | 0 1 |

### Timing and reset

* `x` and `mode` must be stable for a whole cycle and change just after the rising edge.
* The code word is combinational in the same cycle, so latency is zero.
* Changing `mode` takes effect at the next bit. The line level carries over, so the
  first bit in the new mode follows on from the last one sent.
* `rst_n` is synchronous and active low. It sets `level_q = 0` and `prev_x_q = 1`. A
  Miller stream that starts with a 0 therefore has no transition at its first boundary.
* Because `code` is `CLK`-gated and follows `x` combinationally, an `x` that changes
  after the rising edge appears briefly in the former half. Use `code_a`/`code_b` if
  that matters.

## The Miller state machine

`miller_fsm` is a Moore machine with states `00`–`11` that steps once per clock on its
input bit. A synchronous active-high `rst` takes it to `00`.

| state | input 0 | input 1 |
|-------|---------|---------|
| 00 | 10 | 01 |
| 01 | 10 | 01 |
| 10 | 11 | 00 |
| 11 | 01 | 10 |

No output function was published with this table, so the state is the output
(`miller_state` at the top). Read as a code word, these transitions do **not** give the
Miller code described above. For that reason the machine does not drive the line. It
is kept as a separate, exactly transcribed block that follows the same data bit, and
the line code comes from `sols_encoder`.

## Where this RTL departs from, or goes beyond, the published architecture

The published description gives the three codes' rules and shows the shared
architecture as a synthesis schematic. The internal wiring in that schematic cannot be
read, so the datapath above is a from-the-rules design rather than a copy of it.
Specific points:

* **Manchester polarity** (`X xor CLK`) is not stated as such. It is taken from the
  XOR of data and clock at the input of the published Miller block diagram. This
  sends a 0 high-then-low and a 1 low-then-high, which is the IEEE 802.3 convention.
  For the G. E. Thomas convention, make `MODE_MANCHESTER` use `code_a = x` in
  `sols_encoder`.
* **Miller encoder circuit.** The published block diagram has a D flip-flop on the
  inverted clock, fed by `data xor CLK`, followed by a toggle flip-flop on `CLK`. As
  drawn, it cannot make mid-bit transitions, and its D input changes on the same edge
  that samples it. It was not copied. The encoder keeps its two storage roles (previous
  bit, line level) and uses the textbook Miller rule.
* **State table.** Its prose description disagrees with the table for states 10 and 11.
  The table, which lists every state/input pair once, is followed.
* **Mode encoding, the reserved mode, reset values, synchronous reset and one shared
  reset pin** are this design's choices.
* **Not built.** The rest of a DSRC transceiver is not built: the other baseband
  functions (modulation, error correction, synchronisation), the RF front end, the
  host microprocessor and the antenna. The top's `x`/`mode` inputs and `code` output
  are where it would connect to baseband processing.
* **Not checked in RTL.** Published speed and power figures (2 GHz Manchester and
  900 MHz FM0 in a custom circuit; FPGA LUT and register counts) are implementation
  results. This RTL cannot check them. Synthesised, the encoder is 2 flip-flops plus a
  handful of gates.

## Files

| file | contents |
|------|----------|
| `rtl/sols_pkg.sv` | `code_mode_e` (code select) and `miller_state_e` |
| `rtl/sols_encoder.sv` | shared FM0 / Manchester / Miller encoder |
| `rtl/miller_fsm.sv` | four-state Miller state machine |
| `rtl/sols_top.sv` | top level: encoder and state machine side by side |
| `tb/tb_sols_encoder.sv` | the worked example above in every mode, then a random stream with random mode runs, checked half-bit by half-bit |
| `tb/tb_miller_fsm.sv` | random inputs and resets, checked against the table; every row must be hit |
| `tb/tb_sols_top.sv` | end-to-end: 20,000 bits, mode switches and reset pulses |

## Verification

Every testbench is self-checking. It prints `TB_RESULT checks=N failures=M` and has a
watchdog. The expected line values are not computed from the encoder's equations. They
come from the codes' definitions, kept as a history of line levels:

* FM0: the level changes at every boundary, and also mid-bit for a 0.
* Manchester: the line equals `X xor CLK`.
* Miller: the level changes mid-bit for a 1, and at the boundary between two 0s.

The top-level test counts each mechanism and fails if any count is zero:

* FM0: mid-bit transitions, held levels and boundary transitions.
* Manchester bits.
* Miller: mid-bit transitions, 0-0 boundary transitions and 1-0 boundaries with no
  transition.
* Mode switches and resets.
* All eight state-table rows.

Each testbench was also run against a deliberately broken copy of its module and
reported failures:

* the Miller boundary condition dropped;
* one state-table entry changed;
* the state machine's reset polarity inverted.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Wall -y rtl rtl/sols_pkg.sv tb/tb_sols_top.sv \
          --top-module tb_sols_top -Mdir obj_top && obj_top/Vtb_sols_top
```

Replace `tb_sols_top` with `tb_sols_encoder` or `tb_miller_fsm` to run the block tests.
The package must come first on the command line. The modules have no parameters; the
stream lengths are `localparam NBITS` / `NSTEPS` in the testbenches.
