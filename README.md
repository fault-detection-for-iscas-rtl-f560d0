# Low-transition scan BIST for the ISCAS'89 s27 circuit

Scan-based built-in self-test spends most of its power while it shifts
pseudo-random bits through the scan chain, because every bit that differs from
its neighbour toggles a row of flip-flops and the logic behind them. This design
tests the ISCAS'89 s27 benchmark circuit with a pattern generator built to keep
those toggles down:

* a **bit-swapping LFSR (BS-LFSR)**: a 4-stage LFSR whose first two cells pass
  through a pair of 2:1 multiplexers that swap them whenever the last cell is 0;
* a **low-transition random test pattern generator (LT-RTPG)**: a K-input AND gate
  over the BS-LFSR outputs drives a toggle flip-flop, and the toggle flip-flop
  is the scan input. The AND output is seldom 1, so the scan input holds its
  value for several clocks and neighbouring scan cells receive equal bits.

Two copies of s27 are tested side by side: one fault-free, one with up to four
stuck-at faults switched in by the inputs `p1..p4`. A response analyser compares
them and raises `fault` when the faulty copy behaves differently.

```
            +---------+  bit_swap[3:0]  (g0..g3 of both s27 copies)
 clk,rst -->| BS-LFSR |-----------------------------+
            +---------+--+                          |
                         | bits 3,1                 v
                      +-----+ tin +-----+ tout  +---------------+   Z, scan_out
                      | AND |---->| T FF|------>| s27 + scan u0 |--------+
                      +-----+     +-----+   |   +---------------+        v
                                            |   +---------------+   +----------+
                         p1..p4 ------------+-->| s27 + scan u1 |-->| response |--> fault
                                                +---------------+   | analyser |
            bist_controller: scan_en, capture, unload, done, count  +----------+
```

## The bit-swapping LFSR

The LFSR cells are named c1..c4 and printed with c1 as the most significant bit.
Each clock every cell takes its neighbour towards c4, and c4 takes c1 XOR c2
(polynomial x^4 + x^3 + 1). From the seed 0001 it steps through all fifteen
non-zero states. The swap multiplexers exchange c1 and c2 while c4 = 0:

| step | LFSR (`dataout`) | c4 | BS-LFSR (`bit_swap`) |
|-----:|:----:|:--:|:----:|
| 0 | 0001 | 1 | 0001 |
| 1 | 0010 | 0 | 0010 |
| 2 | 0100 | 0 | 1000 |
| 3 | 1001 | 1 | 1001 |
| 4 | 0011 | 1 | 0011 |
| 5 | 0110 | 0 | 1010 |
| 6 | 1101 | 1 | 1101 |
| 7 | 1010 | 0 | 0110 |
| 8 | 0101 | 1 | 0101 |
| 9 | 1011 | 1 | 1011 |
| 10 | 0111 | 1 | 0111 |
| 11 | 1111 | 1 | 1111 |
| 12 | 1110 | 0 | 1110 |
| 13 | 1100 | 0 | 1100 |
| 14 | 1000 | 0 | 0100 |

The swap is chosen so that it only changes a pattern when c1 and c2 differ.
This gives three properties, and the testbenches check all three:

* A swap never changes how many ones a pattern has. Over one period each output
  bit is 1 eight times out of fifteen, the same as in a plain LFSR.
* Each plain LFSR cell changes value 2^(n-1) = 8 times per period. The
  swapped c2 output changes only 4 times, so it has half the transitions.
* Summed over all four outputs, the pattern-to-pattern transitions drop from 32
  to 28 per period.

`bs_lfsr` can swap more pairs (c3/c4, c5/c6, ...) through `NUM_PAIRS`. This
is the arrangement for driving a wider set of primary inputs. The select cell
cN is never part of a pair.

## The LT-RTPG

`k_and_gate` ANDs K literals. Each literal is one BS-LFSR output bit, either
true or inverted, chosen by the `SEL` and `INV` parameters. The default is K = 2
on bits 3 and 1 of the swapped pattern, which makes the AND output 1 in 4 of 15
clocks. K = 3 also works. Larger K makes the toggles rarer. The cost is that
more neighbouring scan cells share a value, which in turn needs longer tests to
keep the fault coverage. `t_flipflop` inverts its output on every clock where
the AND output is 1. Over one period the scan input changes 4 times. A scan
chain fed directly from an LFSR cell would see 8 changes.

## The circuit under test

s27 has four inputs g0..g3, one output Z and three flip-flops. The nets
carry the names a0..a11. The gates are those of the published benchmark
netlist. The standard names are in brackets:

| net | function | | net | function |
|---|---|---|---|---|
| a0 [G14] | NOT g0 | | a5 [G15] | a3 OR a2 |
| a3 [G12] | g1 NOR a6 | | a8 [G16] | g3 OR a2 |
| a4 [G13] | g2 NAND a3 | | a9 [G9] | a8 NAND a5 |
| a2 [G8] | a0 AND a11 | | a10 [G11] | a7 NOR a9 |
| a1 [G10] | a0 NOR a10 | | Z [G17] | NOT a10 |

Flip-flops: a7 = DFF(a1) [G5], a11 = DFF(a10) [G6], a6 = DFF(a4) [G7].

The faults are injected at a2, a9, a4 and a10, enabled by p1, p2, p3 and p4
respectively. Each forces its net to the matching bit of `STUCK_VAL`. The
default is stuck-at-0 at all four sites. More than one fault may be on at a time.

The three flip-flops form a mux-D scan chain, in the order scan-in → a7 →
a11 → a6 → scan-out (`scan_chain`, wrapped with the logic in `s27_scan`).

## A test session

`bist_controller` runs a test-per-scan session after a synchronous reset:

1. For each of `NUM_PATTERNS` (default 15) patterns:
   * 3 shift clocks (`scan_en` = 1). These load the next pattern from the
     toggle flip-flop. At the same time they unload the previous response.
   * 1 capture clock. The swapped BS-LFSR pattern drives g0..g3 of both copies,
     and both scan chains load the next state of s27.
2. 3 more shift clocks unload the last response. Then `done` rises and
   everything stops.

A session takes (15 + 1) × 3 + 15 = **63 clocks**. The LFSR advances on every
clock of the session, including shift clocks. The response analyser compares:

* the two Z outputs in every capture clock;
* the two scan-out bits in every unloading shift clock. The first three shifts
  are not compared, because they only unload the reset state.

Any difference sets the sticky `fault` flag and increments `mismatches`. At the
end of the session, `fault` = 1 means the enabled fault(s) were detected.

With the defaults, simulation gives these results:

| fault enabled | detected | mismatching compares |
|---|---|---|
| none | no | 0 |
| p1 (a2 stuck-at-0) | yes | 2 |
| p2 (a9 stuck-at-0) | yes | 19 |
| p3 (a4 stuck-at-0) | yes | 12 |
| p4 (a10 stuck-at-0) | yes | 7 |

The simulation also counts switching during the shift clocks of a fault-free
session, and compares it with a model whose scan input is a plain LFSR cell:

* scan-input transitions: 14 for the LT-RTPG, 24 for the plain LFSR;
* scan-cell transitions: 61 against 64.

These are transition counts, not power figures.

## Top-level interface (`tbist`)

| port | dir | width | meaning |
|---|---|---|---|
| clk, rst | in | 1 | clock; synchronous active-high reset that starts a session |
| p1..p4 | in | 1 | enable the fault at a2, a9, a4, a10 |
| fault | out | 1 | sticky: a difference was seen |
| done | out | 1 | session finished |
| mismatch, mismatches | out | 1, 8 | difference this clock; saturating count |
| dataout | out | 4 | plain LFSR state |
| bit_swap, swap | out | 4, 1 | BS-LFSR pattern; 1 while it is swapped |
| tin, tout | out | 1 | AND output (T input); toggle flip-flop output = scan input |
| scan_en, phase, count | out | 1, 2, 4 | shift clock; controller phase; patterns applied |
| state, state_faulty | out | 3 | flip-flops of the fault-free and the faulty copy |
| z, z_faulty | out | 1 | Z of both copies |

Parameters: `NUM_PATTERNS` (15), `K` (2), `AND_SEL` (one 8-bit index per AND
input, input 0 in the low byte; default bits 3 and 1), `AND_INV` (0),
`STUCK_VAL` (4'b0000; bit 0 = a2, 1 = a9, 2 = a4, 3 = a10). Shared sizes and
types (`LFSR_N` = 4, `S27_FF` = 3, the state and fault-select structs, the phase
enum) are in `lt_rtpg_pkg`.

## What is taken from the reference and what is chosen here

The reference design fixes these points:

* The overall structure: BS-LFSR, K-input AND with K = 2 or 3, toggle
  flip-flop, scan chain, circuit under test, response analyser.
* The BS-LFSR: a swap of c1 and c2 under control of cN, built from two
  multiplexers.
* The 4-bit width, the seed 0001 and the whole swapped output sequence.
* The s27 circuit, its net names and the four fault sites.
* The comparison of a fault-free copy against a faulty copy.
* The top-level signal names.

The following are this design's own choices:

* The LFSR shifts from c4 towards c1, with feedback into c4, and swaps when
  c4 = 0. Only this reading reproduces the reference output sequence. A drawing
  of the same register has the shift running the other way.
* The gate types of s27 come from the public ISCAS'89 netlist. Matching them to
  the a0..a11 names is a judgement call.
* The fault model (stuck-at-0) and the mapping of p1..p4 to the sites.
* The AND-gate taps and the scan-chain order.
* The mux-D scan cells, the controller schedule and the session length of 15
  patterns.
* Comparing scan-out as well as Z, with a direct compare and a sticky flag. No
  signature register is used.
* The synchronous reset, and the reset values (seed 0001, everything else 0).

Not built:

* The grouping of test vectors into two subgroups. The reference mentions it
  but does not describe it.
* Several auxiliary signals of the reference simulation whose purpose is not
  given.
* A mode in which the BS-LFSR feeds the scan chain directly.
* The FPGA power and utilisation figures. They cannot be reproduced in
  simulation.

## Simulating

Every module is one file, named after the module. `lt_rtpg_pkg.sv` must be read
first. The testbenches need no plusargs. Each one prints
`TB_RESULT checks=N failures=M`.

```
verilator --binary --timing --assert rtl/lt_rtpg_pkg.sv tb/s27_ref_pkg.sv \
    tb/tb_tbist.sv -y rtl -y tb --top-module tb_tbist -Mdir obj_tbist
./obj_tbist/Vtb_tbist
```

Testbenches:

* Each block has its own testbench, `tb/tb_<module>.sv`.
* `tb_tbist` runs six complete sessions at the default parameters against a
  cycle-accurate reference model: fault-free, each fault alone, and all four
  together. It checks every output on every clock and the 63-clock session
  length. It also counts that each mechanism happens at least once: swap,
  toggle, shift, capture, unload, mismatch, detection.
* `tb_scan_transitions` produces the transition counts above.
* `tb/s27_ref_pkg.sv` is an independent model of s27 written in the benchmark's
  G-names. Several testbenches use it.

To test a longer session, set `NUM_PATTERNS`. To change the generator, set `K`,
`AND_SEL` and `AND_INV`. The LFSR polynomial and seed are parameters of
`lfsr`/`bs_lfsr` (`TAPS`, `SEED`). `tbist` uses them at the 4-bit width that
`lt_rtpg_pkg::LFSR_N` sets.
