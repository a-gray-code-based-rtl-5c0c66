# Gray code time-to-digital converter

A time-to-digital converter (TDC) turns the interval between two edges,
START and STOP, into a number of delay-element units (tau). The classic
flash TDC sends START down a line of 2^n buffers and samples every buffer
with its own flip-flop on STOP. That costs 2^n flip-flops and a thermometer
encoder. This design gets the same n-bit result from a few **ring
oscillators whose taps count in Gray code**. It needs only n flip-flops and
2^n - 2 buffers, and no chain is longer than 2^(n-1) cells.

| range 2^n, here n = 6 | flash TDC | Gray code TDC |
|-----------------------|-----------|---------------|
| delay elements        | 2^n = 64  | 2^n - 2 = 62  |
| flip-flops            | 2^n = 64  | n = 6         |
| longest chain         | 2^n = 64  | 2^(n-1) = 32  |

The RTL is parameterised by the number of bits. The default is the 6-bit
converter with 10 ns cells, which covers 0 to 630 ns in 64 codes. An 8-bit
build (0 to 2550 ns) is the same code with `NBITS = 8`.

## How a ring produces one Gray bit

Each ring is a 2:1 MUX, a chain of buffers and an inverter that feeds the end
of the chain back to the MUX:

```
 init_value ─┐
             MUX ─▶ [τ] ─▶ [τ] ─ … ─▶ [τ] ─▶ [τ] ─▶ NOT ─┐
 start ──────┘▲           │ tap after 2^k          │     │
              └───────────┼────────────────────────┼─────┘
                          ▼                        ▼ chain end
```

* While `start` is low the MUX drives `init_value` into the chain. After
  2^(k+1) cell delays every node holds that value.
* When `start` rises the MUX switches to the inverted chain end. A transition
  enters the chain and keeps running round it. The ring's half period is
  2^(k+1)·τ.
* Ring k has 2^(k+1) cells and is tapped after 2^k of them. Its tap first
  toggles at 2^k·τ and then every 2^(k+1)·τ.

Bit k of a Gray-coded counter that counts τ units behaves in exactly that way.
It changes first at count 2^k and then every 2^(k+1) counts. The tap of ring
k is therefore Gray bit G[k]. The MSB of a Gray code toggles every 2^(n-1)
counts, which matches the end of the largest ring (k = n-2).

| Gray bit | ring | cells | tap after | toggles at (× τ)     |
|----------|------|-------|-----------|----------------------|
| G0       | 0    | 2     | 1         | 1, 3, 5, …           |
| G1       | 1    | 4     | 2         | 2, 6, 10, …          |
| G2       | 2    | 8     | 4         | 4, 12, 20, …         |
| G3       | 3    | 16    | 8         | 8, 24, 40, …         |
| G4       | 4    | 32    | 16        | 16, 48, 80, …        |
| G5       | 4    | 32    | 32 (end)  | 32, 64, 96, …        |

No two of these edge times are equal, so the live code
`G[5:0]` changes **one bit per τ**. When STOP samples it, at most one
flip-flop can be caught mid-transition. An unresolved sample costs one code,
never a large jump. A plain binary counter would not behave that way, and a
flash TDC's thermometer code can show bubbles.

The captured Gray code is converted with `B[n-1] = G[n-1]` and
`B[i] = B[i+1] xor G[i]`.

## Making a measurement

1. Hold `start` low and set `init_value = 0`. Wait at least 2^(n-1)·τ
   (320 ns for the default) for the largest ring to settle.
2. Raise `start`. This is the start edge of the measured interval.
3. Raise `stop`. The flip-flops capture the Gray code on this edge. `gray`
   and `bin` hold the result until the next `stop` edge. `bin` is
   combinational from the captured code.
4. Drop `start` to re-arm.

`bin` equals floor(T/τ) for 0 ≤ T < 2^n·τ. Longer intervals wrap to 0,
because at 2^n·τ every ring is back in its starting state. With
`init_value = 1` every tap starts high, and the captured Gray code is the
bitwise complement of the code for `init_value = 0`.

## Delay mismatch

Real cells do not match. Parameter `G0_TAU0_NS` gives the first cell of the
G0 ring its own delay; the mismatch test uses 9.7 ns against 10 ns. That ring
then runs about 1.5 % fast, so the odd codes (set by G0) arrive earlier and
earlier across the range. The output is still **glitch-free**:

* every sample lies within one code of the ideal value;
* as the stop time increases in 1 ns steps the code either stays the same or
  goes up by one. It never falls back or skips a code.

Each bit depends on only one ring, so a slow or fast cell shifts the edges of
that one bit. It cannot make several bits disagree at once.

## Modules

| module              | what it is                                                   | key parameters |
|---------------------|--------------------------------------------------------------|----------------|
| `gray_tdc`          | top: NBITS-1 rings, capture register, decoder                | `NBITS=6`, `TAU_NS=10.0`, `G0_TAU0_NS=TAU_NS` |
| `gray_ring_osc`     | one START-gated ring; outputs `tap` (after 2^K cells) and `chain_end` | `K`, `TAU_NS`, `TAU0_NS` |
| `tdc_delay_cell`    | **behavioural model** of one τ buffer (`assign #DELAY_NS`)    | `DELAY_NS=10.0` |
| `gray_capture_reg`  | N D flip-flops clocked by the rising edge of `stop`, no reset | `N=6` |
| `gray_decoder`      | combinational Gray to binary, `b[i] = ^g[N-1:i]`              | `N=6` |

All modules use `timeunit 1ns; timeprecision 1ps`.

## Synthesis and FPGA use

The delay cell is a timing model and cannot be synthesised as written. On an
FPGA each cell is one LUT configured as a buffer. The cells must be kept
through optimisation (for example with a keep or dont-touch attribute on
the chain nets), and the rings should be placed by hand for a controlled τ.
A synthesis flow that ignores `#` delays turns every ring into a zero-delay
MUX/inverter loop and reports a combinational loop. For the same reason it
merges G5 with G4 and keeps only 5 flip-flops. Those loop warnings are
expected and describe the oscillators.

The MUX and inverter have no delay in this model. On silicon they add to
each ring's period; they can be absorbed into τ or compensated by
calibration.

## Choices not fixed by the architecture

* `start` high runs the rings and low loads `init_value` (select polarity).
* Rise and fall delays of a cell are equal.
* The capture flip-flops have no reset.
* There is no output register after the decoder.
* Re-arm time and over-range (wrap) behaviour follow from the structure
  above; there is no over-range flag.
* The FPGA test setup used to measure a real converter (edge generation,
  read-out) is not included.

## Simulation

Verilator 5 with timing support runs everything. For example:

```
verilator --binary --timing --assert -Irtl -Itb tb/tb_gray_tdc.sv --top-module tb_gray_tdc -o sim
./obj_dir/sim
```

Every testbench ends with `TB_RESULT checks=<n> failures=<m>` and has a
watchdog.

| testbench               | what it shows |
|-------------------------|---------------|
| `tb_tdc_delay_cell`     | both edges delayed by exactly 10 ns and by 9.7 ns |
| `tb_gray_ring_osc`      | settling to `init_value`; every tap and chain-end edge time for 2-cell, 8-cell and mismatched rings; return to rest |
| `tb_gray_capture_reg`   | capture only on the rising `stop` edge |
| `tb_gray_decoder`       | exhaustive 6-bit check, the 4-bit Gray table, 6- and 8-bit examples, random 8-bit |
| `tb_gray_tdc`           | default 6-bit converter, untouched parameters: every code 0..63 near both bin edges and at mid-bin, `init_value = 1`, wrap, re-arm, and a monitor on the live taps showing they never change two bits at once |
| `tb_gray_tdc_mismatch`  | 9.7 ns first cell in G0 ring, 640-point sweep: matches the delay model, within one code of ideal, monotonic without skips |
| `tb_gray_tdc_8bit`      | `NBITS = 8`: all 256 codes over 0..2550 ns |

`tb/tdc_ref_pkg.sv` is the testbenches' reference model. It predicts every
Gray bit from the cell delays alone, by counting the edges at
d_tap + m·L for each tap, where L is the ring's chain delay.

Stop times in the tests are kept off the cells' edge instants. A stop edge
that coincides exactly with a tap edge is a race in any event simulator. In
hardware it is the one-code uncertainty described above.
