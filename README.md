# Crosstalk-cancelling transmit equalizer

On a bus with tightly spaced wires, a receiver sees its own wire's bit plus
coupled copies of its neighbours' bits. Losses and reflections blur it further
over time. All of these effects are linear. So the transmitter can cancel most
of them ahead of time. Instead of driving each wire with its own bit, it drives
a weighted sum of the bits on that wire and on the wires around it. The weights
are chosen to undo what the bus will do.

This RTL is the transmitter side of such a scheme. The default configuration
is a 32-wire bus. Each wire's filter looks at its own bit and at the seven
nearest wires on each side, 15 bits in all. Each wire is driven with four
samples per bit period. Each sample comes from its own 8-bit DAC, and the four
DACs take turns (interleaving). Internal arithmetic is 12 bits wide.

The weights are computed off-line from a model or a measurement of the bus's
impulse response. The intended method picks them to maximise the worst-case
eye opening (an l-infinity, linear-programming criterion) rather than to
minimise mean-square error. That optimiser is not part of this RTL. The
hardware only holds the results in a table that can be written at run time.

## How one output sample is formed

Take output wire `i`, bit period `n` and sample phase `k` (0..R-1). The DAC for
phase `k` on wire `i` is driven with

    code_i[n][k] = sat8( sum over t = 0..2*NL of  b_(i+t-NL)[n] * C_i[k][t] )

- `b_j[n]` is the data bit (0 or 1) on wire `j` in bit period `n`. Wires past
  either edge of the bus do not exist. Their bits count as 0.
- `C_i[k][t]` is a 12-bit two's-complement table entry. It is what one bit on
  the wire at offset `t-NL` adds to sample `k` of wire `i`. Tap `t = NL` is
  the wire itself.
- `sat8` limits the 12-bit sum to the signed 8-bit DAC range, -128..127.

The table holds the result of convolving a single bit with the filter, not the
filter coefficients. A data bit is 0 or 1, so each "multiplication" is an AND
gate: the entry is passed on or replaced by zero. The 15 gated entries are
added by a balanced binary adder tree, four adder levels deep. The hardware
has no multipliers.

### Computing the table from filter coefficients

With four filter taps and four samples per bit, a bit's response fits exactly
inside its own bit period. `C_i[k][t]` is therefore tap `k` of the filter from
wire `i+t-NL` to wire `i`, scaled so that one DAC LSB is 1.

The hardware takes 0/1 bits. If the filter was designed for ±1 symbols, a
0 bit stands for -1. That adds a constant term, `-sum_t C_i[k][t]`, which this
hardware does not produce. Either account for the offset in the analog front
end, or fold it into the optimisation.

### Width and overflow

The sum is computed modulo 2^12. The four bits above the DAC's eight are guard
bits. They hold the growth of a 15-term sum, as long as every entry of the
table stays within ±136 (15 × 136 < 2048). Within that bound the result is
exact before saturation. Larger entries can wrap silently.

## Interleaving and timing

`clk` is the sample clock, running at R cycles per bit. A one-hot ring
(`xeq_clock_gen`) produces `phase[R-1:0]`. `bit_strobe` is `phase[R-1]`, the
last sample period of each bit.

| cycle              | phase | what happens                                          |
|--------------------|-------|-------------------------------------------------------|
| end of bit n-1     | 3     | `x` (bits of bit n) must be valid; `bit_strobe` = 1   |
| edge               |       | all four filters of every wire capture their sums     |
| 1st of bit n       | 0     | DAC 0 drives `code[0]`; `v` = sample 0 of bit n       |
| 2nd                | 1     | DAC 1 drives `code[1]`; `v` = sample 1                |
| 3rd                | 2     | DAC 2 ...                                             |
| 4th                | 3     | DAC 3 ...; the next word is taken at its end          |

Latency is one sample period from the capturing edge to the first sample.
After reset, the first cycle is phase 0.

All four filter registers load on the same edge and hold for a whole bit. The
adder trees therefore have one bit period (R sample clocks) to settle from a
change on `x`, not one sample clock. A timing constraint for an
implementation should treat `x → filter register` as an R-cycle multicycle
path.

The DACs are return-to-zero. A DAC sources current only while its phase is
active. The summing node `v` therefore carries the four samples one after
another.

Each DAC has its own filter and its own table entries. Gain or offset
differences between the four DACs of a wire can therefore be corrected by
rewriting that DAC's entries.

## Programming the table

The top-level port `cfg_we / cfg_wire / cfg_phase / cfg_tap / cfg_data`
writes one 12-bit entry per clock. At the default sizes there are
32 × 4 × 15 = 1920 entries. The new entry is used from the next bit strobe on.
Entries may be written while the bus runs. A bit captured after the write
already uses the new value.

Reset clears the table, so the bus is driven with zeros until the table is
loaded.

## Modules

| module            | role                                                                |
|-------------------|---------------------------------------------------------------------|
| `xeq_equalizer`   | top: 32 wire filters, neighbour windows, shared phase ring, config port |
| `xeq_wire_filter` | one wire: table, R phase filters, R DACs, summing node              |
| `xeq_fir_phase`   | one DAC channel: AND gating, adder tree, register, saturation       |
| `xeq_adder_tree`  | balanced tree of two-input adders                                   |
| `xeq_coef_store`  | R × 15 table of 12-bit entries, one write port, all read in parallel |
| `xeq_clock_gen`   | one-hot phase ring and bit strobe                                   |
| `xeq_dac`         | **behavioural model** of an interleaved 8-bit current DAC           |
| `xeq_current_sum` | **behavioural model** of the current-summing node                   |
| `xeq_pkg`         | default sizes                                                       |

Parameters (with their defaults) are `W = 32` wires, `NL = 7` neighbours per
side, `R = 4` samples per bit (equal to the number of interleaved DACs),
`DW = 12` and `DACW = 8`. Every module has a header comment that gives its
interface and timing.

The DAC and the summing node are analog circuits. They are modelled with
integer currents in units of one DAC LSB: no settling, no mismatch and no
real-valued signals. The bus itself and the off-line optimiser are not
modelled.

## Cost

After coarse synthesis at the default sizes, the design has about 24,600
flip-flops:

- 23,040 of them are the 1920 × 12-bit table;
- the rest are the 128 12-bit filter registers and the 4-bit phase ring.

Each DAC channel's tree has 14 two-input 12-bit adders, which is 168 one-bit
adder positions. An implementation that narrows the first tree levels can
get close to the roughly 156 full adders per DAC that were estimated for this
configuration. That estimate also put the filter logic of one output pad
below 5,000 transistors, not counting the table storage. This RTL leaves
width trimming to synthesis.

## Choices made here, and departures

These are not fixed by the scheme. They were chosen for this implementation:

- **One phase generator** is shared by all wires. The original scheme
  draws one per wire filter.
- **The phase generator is digital**: a one-hot ring on one sample-rate
  clock. An analog interleaved DAC would normally use R clock phases at the
  bit rate. Here the enables play that role.
- **The bus edges are handled by zeroing.** Taps that fall outside the bus
  read bit 0.
- **Sums are saturated** to the DAC range before the DAC. The scheme only
  says that the 12-bit path gives guard bits for 8-bit DACs.
- **There is a filter register per DAC channel.** It loads once per bit.
- **The configuration port** (one entry per clock, addressed by wire, phase
  and tap) and reset-to-zero of the table are this design's own.
- **0/1 bits** are used, so no ±1 offset term (see above).
- **The window is 15 wires.** The same filter is described both as "eight
  wide" and as the wire with its seven neighbours on each side, feeding a
  15-input adder tree. The 15-wire reading is implemented. A narrower filter,
  such as a 5-wide least-squares design, runs unchanged with its outer
  entries set to 0.

Whether the circuit reaches the bit rates this configuration targets cannot
be judged from the RTL. About 349 ps per bit, i.e. an ~11.5 GHz sample clock
at four samples per bit, is a question for the circuit implementation.

## Simulating

Every testbench is self-checking. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. For example:

    verilator --binary --timing --assert -y rtl +libext+.sv \
        rtl/xeq_pkg.sv tb/tb_xeq_equalizer.sv --top-module tb_xeq_equalizer
    ./obj_dir/Vtb_xeq_equalizer +verilator+rand+reset+2

| testbench               | what it checks                                                           |
|-------------------------|--------------------------------------------------------------------------|
| `tb_xeq_equalizer`      | full default size, end to end; details below                             |
| `tb_xeq_wire_filter`    | one wire, random table, four samples per bit, per-DAC rewrite            |
| `tb_xeq_fir_phase`      | gated sum modulo 2^12, both saturation limits, hold between loads        |
| `tb_xeq_coef_store`     | random writes against a reference array, reset                           |
| `tb_xeq_clock_gen`      | one-hot sequence, strobe, reset in mid-bit                               |
| `tb_xeq_dac`, `tb_xeq_current_sum` | the two behavioural models                                    |

`tb_xeq_equalizer` runs the whole design at its default sizes, with no
parameter overrides. It:

- loads all 1920 entries;
- checks the one-sample latency;
- drives 600 bit periods of random and patterned words;
- compares every sample of every wire with an independent reference;
- reloads the table as a 5-wide filter;
- rewrites single DACs' entries while the bus runs;
- counts saturation at both limits and edge-wire windows, and fails if any of
  these never happened.

It takes well under a second.
