# Built-in pseudorandom test for pattern-sensitive faults in RAM

This is synthesizable SystemVerilog for a built-in self-test of a bit-oriented RAM. It follows the
scheme published as *"A Built-In Structure for Pseudorandom Testing of RAM"*.

The test targets **static pattern-sensitive faults**, where a cell's content is disturbed by the
values held in its four neighbours: north, west, east and south. The cell under test is called the
base cell. Together with the base cell, the four neighbours give 32 possible patterns. A complete
test must put every base cell into all 32 patterns, and must check the base cell after each one.

The scheme needs neither a pattern table nor a long deterministic march. Every row is filled with
the same 31-bit pseudorandom M-sequence, and each row's copy is delayed by a fixed **lag** `L`
relative to the row above. Only a few lag values work for a given polynomial. With one of those,
the five cells around any base cell take all 31 non-zero patterns over 31 write/read phases. An
initial clear-and-check phase adds the all-zero pattern.

The hard part is knowing which pattern caused a failing read. This design answers it with a
32-bit response register whose top 31 bits rotate in step with the sequence generator. When a
read fails, its error is merged into the bit of the pattern that currently surrounds the cell
being read.

## How the test data is laid out

Let `m[0..30]` be the M-sequence of a fifth-order primitive polynomial (period `n = 31`).
During phase `p` (phases 2 to 32), the cell at row `r`, column `c` holds

    m[i],   i = (p - 2 + c + r*L) mod 31

Its neighbourhood is therefore

                 N = m[i-L]
    W = m[i-1]   B = m[i]     E = m[i+1]
                 S = m[i+L]

with all indices taken mod 31. The pattern depends only on `i`. A lag is **usable** when the 31
values of `i` give 31 different, non-zero 5-bit patterns. Across the 31 phases, `i` for any fixed
cell runs through all 31 values, so every interior cell meets every non-zero pattern exactly once.

This gives a numbering: pattern 1 is all-zero, and pattern `k = i + 2` (for `k` = 2..32) is the
neighbourhood of index `i`. Pattern `k` is also the one around cell (0,0) in phase `k`.

Usable lags for each fifth-order primitive polynomial:

| polynomial (and its reciprocal) | usable lags |
|---|---|
| X^5+X^2+1, X^5+X^3+1 | 2 3 7 9 11 12 15 16 19 20 22 24 28 29 |
| X^5+X^3+X^2+X+1, X^5+X^4+X^3+X^2+1 | 2 3 9 10 13 14 15 16 17 18 21 22 28 29 |
| X^5+X^4+X^2+X+1, X^5+X^4+X^3+X+1 | 2 4 7 8 10 11 14 15 16 17 20 21 23 24 27 29 |

If `L` is usable, so is `31 - L`.

## Test procedure

One RAM access is made per clock, row after row, and the controller adds no idle clocks.

1. **Clear** every cell by writing 0.
2. **Check** every cell reads 0. A failure here sets bit 1 of the response register (the all-zero
   pattern).
3. For each phase `p` = 2..32:
   - **Write** every row with the sequence.
   - **Read** every row back. Each bit read is compared with the bit the generator produces again.

The generator (TSG) and the response ring (TRC) advance once per access. Both are restarted only
at the start of the test. Between phases they are realigned by extra clocks, called **blocking
pulses**. During a blocking pulse the TSG and the ring keep stepping, while the address counters,
the comparator and the RAM strobe are held:

| pulses | when | count | why |
|---|---|---|---|
| T1 | after every row (write and read) | `L - (NC mod 31)` | the next row must start `L` sequence steps after this row started, but `NC` steps have passed |
| T2 | after the last written row's T1 | `31 - L1` | return to the start of the phase, ready to read |
| T3 | after the last read row's T1 | `31 - L1 + 1` | go one step further: the start of the next phase |

Here `L1 = (L * NR) mod 31`. All three values are reduced mod 31 in this implementation, because 31
extra steps change nothing.

Each phase therefore advances the TSG and the ring by exactly one step. After 31 phases both are
back where they began, so bit `k` of the response register ends up holding pattern `k`.

The pulses come from a 5-bit modulo-32 counter that counts up and stops at zero. Presetting it to
`32 - T` gives exactly `T` pulses, and a preset of 0 gives none.

Choosing `L` close to `NC mod 31` (and `>=` it) keeps T1 small. Power-of-two row widths give
`NC mod 31` in {1, 2, 4, 8, 16}. With X^5+X^4+X^2+X+1 or its reciprocal, four of those five need
no row lag pulses at all. These are the suitable lags when `L1 = L`, which holds for
`NR mod 31 = 1` (for example 32, 1024 or 32768 rows):

| polynomial pair | NC mod 31 = 1 | 2 | 4 | 8 | 16 |
|---|---|---|---|---|---|
| X^5+X^2+1 / X^5+X^3+1 | L=2, T1=1 | L=2, T1=0 | L=7, T1=3 | L=9, T1=1 | L=16, T1=0 |
| X^5+X^3+X^2+X+1 / X^5+X^4+X^3+X^2+1 | L=2, T1=1 | L=2, T1=0 | L=9, T1=5 | L=9, T1=1 | L=16, T1=0 |
| X^5+X^4+X^2+X+1 / X^5+X^4+X^3+X+1 | L=2, T1=1 | L=2, T1=0 | L=4, T1=0 | L=8, T1=0 | L=16, T1=0 |

With `L1 = L`, T2 = 31 - L and T3 = 32 - L.

**Test length**, counted from the clock that samples `start_test` to the first clock with
`test_over` high:

    1 + 2*NR*NC + 31 * (2*NR*(NC + T1) + T2 + T3)   clocks

At the default size (1024 × 1024, L = 2, T1 = 1, T2 = 29, T3 = 30) this is 67,174,182 clocks,
about 64 accesses per cell.

## The response collector

`prt_trc` is the part that makes diagnosis possible.

```
   e ──┐
       AND ──► OR ──► [32] ► [31] ► ... ► [3] ► [2] ──┐
 R/W ──┘        ▲                                    │
                └────────────────────────────────────┘
   bit 1: separate flag, set by (e AND read) during the check of the cleared RAM
```

On every TSG step the ring turns: bit `k` takes bit `k+1`, and bit 32 takes `bit2 | (e & read)`.

Along a row, consecutive cells have consecutive indices `i`. The lag pulses keep the ring in step
with the TSG wherever the address jumps. Because of this, the bit leaving position 2 always
belongs to the pattern around the cell being read, and that is where an error is merged.

At the end of the test, `trc[k] = 1` means some read failed while pattern `k` surrounded the
failing cell.

To decode pattern `k` into a neighbourhood, take `i = k - 2` and evaluate the formula above with
the generator's sequence. `m[0..4]` are the bits of `SEED`, with `m[0]` in bit 0.

The result can be read in parallel on `trc`, or flushed out serially. While `trc_flush` is held
high after `test_over`, all 32 bits rotate towards bit 1, and `trc_so` shows pattern 1, 2, …, 32 on
successive clocks. After 32 clocks the register is back as it was.

The collector does not record where the failure happened. For that, the top module pulses `err`
on every failing read, together with the address (`mem_row`, `mem_col`) and `phase`. From these
the index follows: `i = (phase - 2 + col + row*L) mod 31`.

## Blocks and files

| file | block | what it is |
|---|---|---|
| `rtl/prt_pkg.sv` | — | constants, controller state type, T1/T2/T3 formulas |
| `rtl/prt_bist_top.sv` | top | wires the blocks; RAM port brought out |
| `rtl/prt_monitor.sv` | monitor | controller FSM: clear, check, 31 phases, blocking pulses, test over |
| `rtl/prt_tsg.sv` | TSG | 5-stage LFSR, `TAPS` = c4..c0 of the polynomial |
| `rtl/prt_agl.sv` | AGL | column counter and row counter |
| `rtl/prt_comparator.sv` | comparator | read data vs. regenerated bit, blocked when disabled |
| `rtl/prt_trc.sv` | TRC | 32-bit response register with a 31-bit ring |
| `rtl/prt_blk_counter.sv` | blocking counter | modulo-32 counter, preset to `32 - T` |

The RAM is not part of the RTL. `tb/prt_ram_model.sv` is a behavioural model of it, with
stuck-at and static pattern-sensitive fault injection.

### Top-level interface (`prt_bist_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `start_test` | in | 1 | sampled while idle or finished; starts a complete test |
| `test_over` | out | 1 | high from the end of the test until the next start |
| `trc` | out | [32:1] | fault flag per pattern number, valid with `test_over` |
| `trc_flush` | in | 1 | with `test_over` high: rotate the result out serially |
| `trc_so` | out | 1 | serial result, pattern 1 first |
| `phase` | out | 6 | 1 = clear/check, 2..32 = M-sequence phases |
| `err` | out | 1 | a read failed in this clock |
| `blocking` | out | 1 | a blocking pulse is active |
| `ctl_state` | out | enum | controller state, for observation |
| `mem_en`, `mem_we` | out | 1 | access this clock; write (else read) |
| `mem_row`, `mem_col` | out | log2 NR, log2 NC | address |
| `mem_wdata` | out | 1 | write data |
| `mem_rdata` | in | 1 | read data, **combinational in the same clock** |

### Parameters

| parameter | default | meaning |
|---|---|---|
| `NC`, `NR` | 1024, 1024 | RAM columns and rows |
| `LAG` | 2 | lag `L`; must be usable for `TAPS` (see the tables above) |
| `TAPS` | `5'b10111` | X^5+X^4+X^2+X+1 |
| `SEED` | `5'b00001` | generator start state; must be non-zero |

The defaults are one of the configurations in the table: 1024 mod 31 = 1 calls for L = 2, and
(1024·2) mod 31 = 2 = L. Any geometry works as long as `LAG` is usable for `TAPS`. T1, T2 and T3
are derived at elaboration time.

## What follows the published scheme, and what is this design's own

These follow the published scheme:

- The M-sequence row layout with lag.
- The clear/check phase followed by 31 write/read phases.
- The pattern numbering, and the 32-bit collector with its rotating bits 2–32 fed by `e AND R/W`.
- The T1/T2/T3 formulas.
- The modulo-(n+1) counter preset to `n+1-T`.
- The four blocks: monitor, TSG, AGL and TRC.

These are choices made in this implementation:

- **RAM timing:** one access per clock, with read data available combinationally. A RAM with a
  registered read would need the expected bit and the error delayed, and the ring aligned to
  match.
- **Ring wiring:** the rotation direction of the ring, and bit 1 as a separate flag.
- **Readout:** the serial flush order (pattern 1 first, a full 32-bit rotation) and the extra parallel port.
- **T1 after the last row:** lag pulses are also given after the last row, before T2 or T3. This
  is what makes `T2 = 31 - L1` land exactly on the start of the phase.
- **Lag condition:** `L >= NC mod 31` is accepted, with T1 = 0 when the two are equal. The
  published text asks for `L > NC mod 31`, but its own lag table uses equality.
- **Reducing T values mod 31:** T1/T2/T3 are reduced mod 31. No configuration in the tables
  changes.
- **Clocking:** the controller drives enables on a single clock, not separately gated clocks.
- **Holding during phase 1:** the TSG and the ring are held during the clear/check phase.
- **Handshake:** the `start_test`/`test_over` handshake, and the absence of idle clocks.
- **LFSR form and seed:** the Fibonacci LFSR form and the seed. A polynomial and its reciprocal
  have the same usable lags, so the LFSR form does not matter.
- **Defaults:** the default RAM size of 1 Mbit.
- **Diagnosis outputs:** `err`, `phase` and the address outputs are added so a failure can be
  located.

Not covered: the nine-cell neighbourhood and the fourth-order variants are mentioned alongside
the scheme but are not built here. Word-oriented RAMs are not handled either: the comparator
accepts a word, but the controller and the collector assume one bit per cell.

## Verification

Every block has a self-checking testbench in `tb/`. Each compares the block against values
computed independently in `tb/prt_tb_pkg.sv`, which regenerates the M-sequence from its
recurrence and numbers the patterns.

| testbench | what it shows |
|---|---|
| `tb_prt_tsg` | all six polynomials follow their recurrence, period exactly 31, hold and restart |
| `tb_prt_agl` | row-major order, last-column/last-row flags, clear, with random stalls |
| `tb_prt_blk_counter` | presets `32 - T` give exactly `T` pulses for T = 0..31 |
| `tb_prt_comparator` | exhaustive 1-bit, random 8-bit, blocking |
| `tb_prt_trc` | random shifts, reads and errors against a model that tracks only the rotation count |
| `tb_prt_monitor` | full state sequence, phase and control outputs clock by clock, three configurations (T1 = 3, 0, 1; L1 ≠ L) |
| `tb_prt_bist_top` | 32 × 32 RAM (L = 2). Checks: fault-free run; cells stuck at 1 and at 0; seven random pattern-sensitive faults, including the all-zero pattern; restart; serial flush of the result; exact test length; every interior read sees the predicted neighbourhood; one cell sees all 32 patterns; each pulse type occurs |
| `tb_prt_table2` | all 30 polynomial/row-size configurations of the lag table above, side by side. Checks: printed T values against the formulas; exact test length; full pattern coverage; one injected fault flagged at the right pattern |
| `tb_prt_table1` | every lag 1..30 with each of the six polynomials, on an 8 × 4 RAM (180 configurations, most with L1 ≠ L). Checks: the lags that give complete coverage are exactly those listed in the usable-lag table; test length; empty collector |
| `tb_prt_bist_full` | one complete test at the default 1024 × 1024 size with one injected pattern-sensitive fault (about 67 M clocks, under a minute) |

All of them pass. Each block's testbench has also been run against a deliberately broken copy of
its block, and it fails there.

To run one with Verilator (from the directory holding `rtl/` and `tb/`):

    verilator --binary --timing --assert -y rtl -y tb +libext+.sv -Irtl -Itb \
        rtl/prt_pkg.sv tb/prt_tb_pkg.sv tb/tb_prt_bist_top.sv \
        --top-module tb_prt_bist_top -Mdir obj -o sim
    ./obj/sim

Each testbench ends by printing `TB_RESULT checks=N failures=M`.
