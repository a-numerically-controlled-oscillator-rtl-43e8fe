# Sine NCO with an exact fractional increment and noise-shaped phase rounding

A look-up-table numerically controlled oscillator (NCO) adds a phase
increment S to an L-bit accumulator every clock and looks up a sine sample
from the top M bits of the phase. This gives Fout = Fclk * S / 2^L. That
scheme has two weak points, and this design adds one block for each:

* **Frequencies that are not a multiple of Fclk / 2^L.** Many wanted
  frequencies need S = S' + B/A with A not a power of two. An example is the
  cdma2000 3X carriers at a 9.8304 MHz clock with L = 13 (table below). A
  **fine phase tuner** adds a carry-in of 1 to the phase adder on exactly B
  of every A clocks. The average increment is then exactly S' + B/A, with no
  long-term frequency error.
* **Spurs from dropping the low phase bits.** The phase is cut from L to M
  bits to keep the table small. Plain truncation makes a periodic phase
  error, which shows up as spectral lines. A **rounding processor** adds a
  running sum of the discarded bits to the phase before cutting it. This
  shapes and spreads the error, so the largest spurs come out several dB
  lower.

```
            S ──►┌─────────────┐   x_L   ┌────────────┐  y_M  ┌──────────┐  N
                 │ phase adder ├──►REG──►│  rounding  ├──────►│ sine LUT ├───► sine_out
     fine ─Cin──►│  (L bits)   │◄───┘    │ processor  │       │ 1/4 wave │
     phase       └─────────────┘         └────────────┘       └──────────┘
       ▲
 A,B ──┴── fine phase tuner
```

Default sizes: L = 13 phase bits, M = 8 table-address bits, N = 8 sample
bits, and 4-bit A and B. The table holds 64 words of 8 bits for the first
quadrant.

## Setting the frequency

    Fout = Fclk * (S + B/A) / 2^L,   0 <= B < A,   1 <= A <= 15

| carrier (Fclk 9.8304 MHz) | S    | B/A | table-address phase steps per clock |
|---------------------------|------|-----|------------------------------------|
| 0.625 MHz                 | 520  | 5/6 | 520.833… / 32 |
| 1.875 MHz                 | 1562 | 3/6 | 1562.5 / 32 |
| 3.125 MHz                 | 2604 | 1/6 | 2604.166… / 32 |

With A = 6 the whole state repeats after 6 · 8192 = 49152 clocks. Over that
span the three carriers complete exactly 3125, 9375 and 15625 cycles. The
end-to-end testbench checks these counts.

`S`, `den_a` (A) and `num_b` (B) are plain inputs, read every clock. Treat
them as static configuration, and apply a reset after changing them if the
phase must restart from 0. `bad_b` goes high when B cannot be produced for
the given A (B ≥ A).

## The fine phase tuner

This is the least obvious part. It has no divider and no comparator against
B. It is built from four small blocks:

1. **binary-A counter** (`binary_a_counter`): counts 0, 1, …, A-1, 0, … .
2. **rising-edge detector** (`rising_edge_detector`): D[i] = C[i] AND NOT
   (C[i] one clock earlier). D[i] is a one-clock pulse each time counter
   bit i goes from 0 to 1.
3. **bit converter** (`bit_converter`): turns B into a select word E.
4. **sequence selector** (`sequence_selector`):
   fine = D[3]·E[0] + D[2]·E[1] + D[1]·E[2] + D[0]·E[3].

The method rests on one counting fact. Each step k → k+1 of the counter
raises exactly one bit: the lowest 0 bit of k. The wrap A-1 → 0 raises none.
So at most one D line pulses in any clock. An assertion in
`fine_phase_tuner` checks this during simulation. Over one counter period, line
D[i] pulses

    w(i) = floor((A-1) / 2^i) - floor((A-1) / 2^(i+1))

times. For A = 6 this gives w = 3, 1, 1, 0 for D[0..3]. For A = 16 it gives
8, 4, 2, 1, which is ordinary binary weighting.

The bit converter's job is to choose lines whose weights add up to B. The
weights never increase with i. Each weight is also at most one more than the
sum of all the later ones. Under those two conditions a greedy choice reaches
every B from 0 to A-1. The converter visits lines from the largest weight
down and takes a line when its weight still fits into what is left of B.
Among lines of equal weight it visits the more significant counter bit
first. Lines of weight 0 are never taken.

For A = 6 this tie rule gives E[3:1] = `111`, `100` and `001` for
B = 5, 3 and 1. Within each 6-clock window the pulses then fall on:

| B | lines used | clocks after the window start with a carry |
|---|------------|-----------------------------|
| 5 | D0, D1, D2 | 1, 2, 3, 4, 5 |
| 3 | D0         | 1, 3, 5 |
| 1 | D2         | 4 |

The counter, edge detector and selector follow the published structure. The
bit converter's circuit is this design's own. It is specified only by what
it must produce, and it is built here as a small combinational search over
the weights. If A and B are fixed in an application, E can simply be a
constant.

The fine phase is combinational from the counter and edge registers. It is
used as the carry-in of the phase adder in the same clock.

## The rounding processor

With D = L - M discarded bits, x(n) the phase register and x_D(n) its low D
bits:

    R(n)   = (R(n-1) + x_D(n)) mod 2^D          -- D-bit adder + register
    y_M(n) = floor((x(n) + R(n)) / 2^D) mod 2^M

Note that the present sample x_D(n) is already inside R(n). The register
holds R(n-1), and the adder output R(n) feeds both the register and the
final addition.

In practice the final addition only needs the carry out of x_D(n) + R(n),
added to the top M bits. That is how `rounding_processor` builds it.

The carry behaves like error feedback. While the low bits stay constant at c,
the carry appears on exactly c out of every 2^D clocks. The mean of y_M is
therefore the full-precision phase x / 2^D, where truncation would be biased
half a step low. The pattern of carries also spreads the error that
truncation would repeat on every cycle of the output.

A closely related scheme adds the sum up to the previous clock, R(n-1),
instead of R(n). Both testbenches compute that variant, together with plain
truncation, as a comparison. It is not built in RTL.

## The sine table

`sine_lut` stores 2^(M-2) words. Word k holds
round(AMP · sin(2π(k+1)/2^M)), for the phases 0 < θ ≤ π/2, with
AMP = 2^(N-1) - 1. The top two phase bits q choose the quadrant, and a is the
rest of the phase:

| q | sample |
|---|--------|
| 0 | a = 0 ? 0 : word[a-1] |
| 1 | word[~a] |
| 2 | −(quadrant-0 value) |
| 3 | −word[~a] |

Storing θ = π/2 rather than θ = 0 makes the mirrored quadrants exact without
an off-by-one address. The output is N-bit two's complement in −AMP…+AMP.
Because of that, the top bit of every stored word is 0. The table is
computed at elaboration from the formula. There is no data file.

## Interface and timing of `nco`

| port | dir | width | meaning |
|------|-----|-------|---------|
| clk, rst_n | in | 1 | clock; asynchronous active-low reset |
| phase_inc | in | L | S |
| den_a, num_b | in | 4 | A and B |
| sine_out | out | N | signed sample |
| phase | out | L | phase register x_L |
| phase_round | out | M | rounded phase y_M |
| fine_phase | out | 1 | carry-in applied at this clock |
| bad_b | out | 1 | B not reachable for A |

Registers: the L-bit phase, the D-bit running sum, the 4-bit counter and the
4-bit edge register (26 flip-flops at the default sizes). Everything after
the registers is combinational. Sample n is computed from phase(n) and the
running sum of the same clock, with phase(0) = 0 after reset. Add an output register if the table path is too
long for your clock.

## Measured behaviour

`tb_nco_sweep` runs the 3.125 MHz carrier (S = 2604, B/A = 1/6) for one full
49152-clock period. It takes an exact DFT, with no window, and reports the
largest spectral line other than the carrier (dBc). It also reports the
mean square error against the ideal sine (dB relative to full scale).

| M | N | spur: trunc | prev-sum | this design | MSE: trunc | prev-sum | this design |
|---|---|------|------|------|------|------|------|
| 6 | 8 | −36.0 | −41.3 | **−47.8** | −28.0 | −30.9 | −30.9 |
| 7 | 8 | −42.1 | −45.1 | **−50.5** | −34.0 | −36.5 | −37.0 |
| 8 | 8 | −48.1 | −49.1 | **−56.0** | −39.9 | −42.2 | −42.6 |
| 9 | 8 | −54.2 | −54.1 | **−60.4** | −45.4 | −47.3 | −47.6 |
| 10 | 8 | −60.2 | −60.4 | **−65.2** | −49.7 | −50.8 | −50.9 |
| 8 | 4 | −35.9 | −36.0 | −35.9 | −27.8 | −28.0 | −28.0 |
| 8 | 12 | −48.1 | −49.1 | **−56.0** | −40.1 | −42.6 | −43.1 |

At the main point (M = 8, N = 8) the rounding processor lowers the largest
spur by 7.9 dB and the MSE by 2.8 dB, compared with truncation. The
published evaluation of this architecture reports 8.7 dB and 5.5 dB for the
same point. Its reference and normalisation are not known, and it may have
used a different sample format, so only the ordering should be compared. The
rounding processor has the lowest largest spur at every M from 6 to 10 and
at every N from 6 up. Its lead over truncation narrows as M grows. In MSE it
beats truncation everywhere except N = 4, where amplitude quantisation
dominates. It ties with the previous-sum variant at M = 6.

## How far to trust it

* Every block has a self-checking testbench against an independent model.
  Each testbench has been shown to fail on a deliberately broken copy of its
  block.
* `tb_nco` runs the three carriers at the default sizes, with no parameter
  overrides. It checks the following on every clock or every A clocks:
  * the exact phase (n·S + (n/A)·B every A clocks),
  * the cycle counts above,
  * the number of carries (B · 8192),
  * the rounded phase and every sample against models.
* Choices made here where the architecture leaves freedom:
  * reset style and value,
  * no pipeline or output registers,
  * the sample format (two's complement, amplitude 2^(N-1)-1, rounded
    table words),
  * the bit converter's circuit and tie rule,
  * the running sum kept modulo 2^D,
  * the `bad_b` flag and the extra observation outputs.
* Only one NCO channel is built. A receiver that needs the three carriers at
  the same time instantiates `nco` three times.

## Files

`rtl/`: `nco_pkg` (default sizes), `nco` (top),
`phase_accumulator`, `fine_phase_tuner` with `binary_a_counter`,
`rising_edge_detector`, `bit_converter` and `sequence_selector`,
`rounding_processor`, `sine_lut`.

`tb/`: `tb_<block>` for each block, `tb_nco` (end to end at default sizes)
and `tb_nco_sweep` (spectrum and MSE over M and N).

## Simulating and changing it

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/nco_pkg.sv tb/tb_nco.sv --top-module tb_nco -Mdir obj_nco
./obj_nco/Vtb_nco
```

Use the same command with any other `tb_*` file. Each testbench prints
`TB_RESULT checks=… failures=…`. All of them finish in well under a second.

`nco` takes the parameters L, M, N and FW (the width of A and B). M must be
at least 3 and below L. Wider FW allows larger denominators. The bit
converter is generic in FW. It is a combinational search whose size grows
with FW², so for large FW it is better to register E or compute it in
software.
