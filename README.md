# Reconfigurable FIR filter with a shift-and-add coefficient multiplier

In an FIR filter, the coefficient multipliers cost the most area and power.
This design avoids general multipliers. A single *Shift-and-Add unit* computes
the eight even multiples of the input sample, `0x, 2x, 4x, … 14x`, using only
three adders/subtractors. Every coefficient product is then assembled from
those shared multiples: multiplexers pick a multiple, an adder adds `x` when a
nibble is odd, and a final adder sums the results. All shifts are constant
and hardwired. The coefficients sit in a writable table, so loading a new set
of coefficients reconfigures the filter.

The multiplier lives inside a small processing-element (PE) array. Two PEs
share a set of operand and result registers, a routing switch (the *DEMUX*,
steered by select lines S1 and S2) and a RAM. A sequencer runs the array as an
8-tap filter.

The default configuration has 8 taps, 8-bit signed coefficients and 8-bit
signed samples. Outputs are 19 bits wide and never overflow.

## The multiplier: even sub-expressions and nibbles

Take an 8-bit coefficient magnitude `c` and split it into nibbles `c[7:4]`
and `c[3:0]`. Any nibble `n` satisfies `n*x = (n & 1110b)*x + n[0]*x`. The
first term is always one of the eight even multiples, so three bits of the
nibble select it in an 8:1 multiplexer. The second term is one conditional
adder. The Shift-and-Add unit (`shift_add_unit`) forms the even multiples as

| multiple | how it is formed | cost |
|---|---|---|
| 2x, 4x, 8x | x<<1, x<<2, x<<3 | wiring |
| 6x | (x<<1) + (x<<2) | adder |
| 12x | 6x<<1 | wiring |
| 14x | (x<<4) − (x<<1) | subtractor |
| 10x | (x<<1) + (x<<3) | adder |

`csm_multiplier` puts the pieces together. It has one shared Shift-and-Add
unit and, per nibble, one `bcs_mux8` and one odd-bit adder. A final adder
computes `p = lo + (hi << 4)`. The product is exact for a two's-complement
sample and an unsigned coefficient. `CW` may be any multiple of 4: each
extra nibble adds a multiplexer and an adder, weighted by `<<4*i`. That
generalisation is this design's own; 8 bits is the reference case.

Coefficients are signed, but the multiplier sees only their magnitude.
`coef_lut` stores each coefficient in two's complement. It returns `|h|`,
which goes to the multiplier, and the sign, which goes to the sequencer. For a
negative tap the product is negated by the second PE before it is accumulated.
So `-128` works (magnitude 128 fits in 8 unsigned bits), and a negative tap
costs two extra cycles.

## The processing-element array

```
 x_in (IN1) ─► R1.1 ─┐                    ┌─ R2.1 ◄─ |h_k| (coefficient table, IN2)
                      └──► PE1 (multiply) ◄┘
                              │
                              ▼
                             R3.1 ─┐
 RAM ─► R1.2 ─┐                    ├─► DEMUX (S1,S2) ──► R2.2
              └──► PE2 (add/negate) ◄── R2.2           └─► bus ─► RAM
                              │                               └─► y_out
                              ▼
                             R3.2 ─┘
```

* `pe`: one processing element, used for both PE1 and PE2. It performs
  three functions on two operands: `a + b + cin` with a carry out, `-b`
  (computed as `~b + 1` on the same adder) and `a * b[7:0]` (the
  constant-shift multiplier above). It is combinational; the registers
  around it belong to the top.
* `route_demux`: the DEMUX. S1 picks the source (0 = R3.1, 1 = R3.2) and
  S2 the destination (0 = back into R2.2, 1 = the bus to the RAM and the
  output). One route is active per cycle.
* `psum_ram`: 8 words with a synchronous read into R1.2 and a write from the
  bus. It also has a one-cycle clear.
* `coef_lut`: 8 writable coefficients, read combinationally at the
  sequencer's tap index.
* `fir_ctrl`: the sequencer.
* `fir_top`: the registers R1.1, R1.2, R2.1, R2.2, R3.1 and R3.2, plus the
  output register. Everything else is instantiated here.
* `fir_pkg`: the PE operation enum, the S1/S2 struct and the default sizes.

## How a sample is filtered

The array computes the transposed form of the filter. RAM word `k` holds the
partial sum `s_k`:

```
y(n)   = h0*x(n) + s1(n-1)
s_k(n) = h_k*x(n) + s_{k+1}(n-1)        s_8 = 0
```

A sample is accepted into R1.1 when `x_valid` and `x_ready` are both high.
The sequencer then visits taps `k = 0 … 7` in order:

| state | action |
|---|---|
| LOAD | R2.1 ← \|h_k\|; RAM read of word k+1 is issued |
| MUL | PE1: R3.1 ← x·\|h_k\|; R1.2 ← s_{k+1} (0 on the last tap) |
| FWD | DEMUX S1=0,S2=0: R2.2 ← R3.1 |
| NEG | only if h_k < 0. PE2: R3.2 ← −R2.2 |
| NFWD | only if h_k < 0. DEMUX S1=1,S2=0: R2.2 ← R3.2 |
| ADD | PE2: R3.2 ← R1.2 + R2.2 |
| WB | DEMUX S1=1,S2=1: bus ← R3.2. Tap 0 produces the output; any other tap writes RAM word k |

Taps go in ascending order, so the old `s_{k+1}` is always read before tap
`k+1` overwrites it.

**Timing.** A tap takes 5 cycles, or 7 with a negative coefficient.
`y_valid` is high for one cycle. It is set by the 5th clock edge after the
edge that accepted the sample, or the 7th if `h0 < 0`. The next sample can
be accepted `5*TAPS + 2*(negative taps) + 1` cycles after the previous one:
41 to 57 cycles at 8 taps.

**Reconfiguration.** `coef_we`/`coef_addr`/`coef_wdata` write one
coefficient per cycle at any time. The RAM holds partial sums made with the
old coefficients, so after a reload the output moves to the new set gradually.
Output `n` uses, for each past sample `x(n-k)`, the coefficient `h_k` that was
in force when that sample was accepted. To start a new signal cleanly, raise
`clear` while the filter is idle. It zeroes the RAM in one cycle, and no
sample is accepted in that cycle.

**Reset** is asynchronous and active low. It clears the coefficients, the
RAM and all registers.

## What follows the reference architecture and what is this design's own

The following come from the reference:
* the three-adder Shift-and-Add network and its shift amounts;
* the use of even multiples with 8:1 multiplexers driven from a coefficient
  table;
* the two per-nibble adders and the final adder with a `<<4`;
* 8-bit coefficients and 8 taps;
* the PE with add-with-carry, multiply and negate;
* the register names and the two-PE datapath with its DEMUX, S1/S2, RAM and
  feedback paths.

The reference does not specify the following, so they are choices made here:
* the 8-bit sample width and two's-complement samples;
* sign-magnitude handling of coefficients;
* what the RAM stores (transposed-form partial sums);
* the meaning of S1 and S2;
* the whole sequencer schedule and the valid/ready handshake;
* clear and reset behaviour;
* the registered output.

The reference gives FPGA implementation figures for its 8-tap filter: 114
ALUTs, 40 registers and 42 pins. This RTL is not tuned to match them. Its
RAM, coefficient table and 19-bit datapath registers come to roughly 360
flip-flop bits. The reference also describes a seven-adder network that forms
all eleven 4-bit sub-expressions, odd ones included. The filter only needs the
even ones, so that network is not built.

## Simulating

Every testbench in `tb/` checks itself. Each prints
`TB_RESULT checks=N failures=M` and stops. A watchdog ends a hung run.
`fir_top_tb` runs the full filter at its default sizes. It covers impulse
responses with all-positive and all-negative coefficients, extreme values
(`-128`/`127` for both coefficients and samples) and twelve random
coefficient sets, reloaded both with and without `clear`. It compares every
output with a direct-form reference and checks latency and sample period. It
also counts each mechanism: negated taps, all three DEMUX routes, RAM
write-backs, reloads and clears.

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    --top-module fir_top_tb rtl/fir_pkg.sv tb/fir_top_tb.sv -o sim
./obj_dir/sim
```

To run a unit testbench, replace `fir_top_tb` with the name of another file
in `tb/` (`csm_multiplier_tb` checks all 65,536 sample/coefficient pairs).
The package `rtl/fir_pkg.sv` must come first on the command line.
