# Single error correction across parallel filters

When several identical linear filters run side by side on different inputs,
they can be protected as a group. You do not need to triplicate each one. Treat
the four filter outputs y1..y4 as the four data symbols of a Hamming (7,4) code.
Then add three redundant copies of the same filter. Their inputs are sums of the
original inputs:

    x5 = x1 + x2 + x3        z1 = H(x5) = y1 + y2 + y3
    x6 = x1 + x2 + x4        z2 = H(x6) = y1 + y2 + y4
    x7 = x1 + x3 + x4        z3 = H(x7) = y1 + y3 + y4

Because a filter is linear, each redundant output z_j must equal the sum of the
original outputs it covers. Checking those three equations gives a 3-bit pattern
of failed checks. That pattern points at the faulty filter in the same way a
Hamming syndrome points at a flipped bit. The correction rebuilds a faulty
original output by subtracting the healthy ones from a redundant output, for
example `y1 = z1 - y2 - y3`. Any one of the seven filters may fail. The cost is
three extra filters for four, against eight for triple modular redundancy. The
overhead shrinks as the group grows: eleven filters need only four extra.

The RTL also has the plain bit-level Hamming (7,4) encoder and decoder that the
scheme comes from. They share the same check matrix.

## The code

Both parts of the design use one check matrix, defined in `rtl/ecc_pkg.sv`:

|         | d1/y1 | d2/y2 | d3/y3 | d4/y4 | p1/z1 | p2/z2 | p3/z3 |
|---------|-------|-------|-------|-------|-------|-------|-------|
| check 1 | 1     | 1     | 1     | 0     | 1     | 0     | 0     |
| check 2 | 1     | 1     | 0     | 1     | 0     | 1     | 0     |
| check 3 | 1     | 0     | 1     | 1     | 0     | 0     | 1     |

An error in an element makes the checks in its column fail. So the syndrome
`{s1,s2,s3}` equals that column. The syndromes are 111 → element 1, 110 → 2,
101 → 3, 011 → 4, 100 → p1/z1, 010 → p2/z2 and 001 → p3/z3. 000 means no error.
`hamming_locator` turns the syndrome into a one-hot position. In all the RTL,
positions 0..3 are the data symbols and positions 4..6 are the check symbols.

## Filter bank datapath

```
DataA..DataD ─┬──────────────► 4 × fir_filter ── y1..y4 ─┐
              └► pfec_coding ► 3 × fir_filter ── z1..z3 ─┤
                                                         ▼
                                   pfec_fault_inject (ES selects a victim)
                                                         ▼
                   pfec_sfc:  pfec_syndrome ► hamming_locator ► pfec_corrector
                                                         ▼
                                                  YC1..YC4
```

* **fir_filter**: one filter copy. It is a direct-form FIR,
  `y[n] = Σ COEFFS[k]·x[n-k]`, with a registered output. The default is four
  taps with coefficients `{1, 2, -1, -1}`. These sum to 1, so a constant input
  reaches the output unchanged after four samples.
* **pfec_coding**: forms x5, x6 and x7.
* **pfec_syndrome**: forms `z_j − Σ y_i` for each check. It reads each difference
  as a signed number and sets a syndrome bit when the magnitude is above
  `THRESH`.
* **pfec_corrector**: rebuilds a faulty original output. Each original output has
  its own rebuild formula:
  - y1 = z1 − y2 − y3
  - y2 = z1 − y1 − y3
  - y3 = z1 − y1 − y2
  - y4 = z2 − y1 − y2

  A fault in a redundant filter changes no output.
* **pfec_fault_inject**: `ES` = 1..4 inverts the output of original filter 1..4.
  `ES` = 5..7 inverts the output of redundant filter 1..3. Inverting means an
  XOR with `FAULT_MASK`. `ES` = 0 injects nothing. With this block the
  correction can be seen working in simulation or on a board.

### Arithmetic

All filter-bank arithmetic is modulo 2^W (W = 8 by default). This covers the
coding sums, the filter products and sums, the checks and the rebuild. Wrap-around
integer arithmetic is exactly linear. So in a fault-free bank every check
difference is exactly zero, and a rebuilt output is bit-identical to the lost
one. Overflow does no harm: the identities hold modulo 2^W.

A filter that rounds or truncates internally (fixed-point coefficients with a
final shift, say) breaks exact linearity. Its checks then show small nonzero
differences. `THRESH` exists for that case: differences of magnitude up to
`THRESH` count as zero. The cost is that errors this small go uncorrected. With
the default integer filter, `THRESH = 0` is right. If you change `fir_filter` to
a rounding structure, choose `THRESH` from its worst-case rounding error.

### Timing

The datapath takes one sample per clock on each of the four channels. The
filter registers (delay lines and outputs) are the only state. The coding stage sits before them
and is combinational. The checks, the locator and the correction sit after them
and are also combinational. `YC1..YC4` therefore show the corrected response to
a sample one clock after the rising edge that samples it. A fault is corrected
in the same cycle it appears. The critical path runs from a filter register
through the check adders, the syndrome decode and the output multiplexer to
`YC`. `Reset` is synchronous and active high. It clears the delay lines and the
outputs.

## Bit-level Hamming (7,4) codec

`hamming74_encoder` is systematic. `cw[3:0]` holds d1..d4 and `cw[6:4]` holds
p1..p3:

    p1 = d1^d2^d3,  p2 = d1^d2^d4,  p3 = d1^d3^d4

`hamming74_decoder` recomputes the parities and XORs them with the received ones
to get the syndrome. It inverts the located bit and returns the corrected data,
the corrected word, the syndrome and the position. It corrects any single-bit
error. Both blocks are combinational. In `ecc_top` the codec has its own ports
(`ham_*`) and is independent of the filter bank.

## Top level: `ecc_top`

| port | dir | width | meaning |
|------|-----|-------|---------|
| Clock, Reset | in | 1 | clock; synchronous reset, active high |
| DataA..DataD | in | W | samples of the four channels |
| ES | in | 3 | fault injection select (0 = none) |
| YC1..YC4 | out | W | corrected filter outputs |
| Syndrome | out | 3 | {s1,s2,s3} of the current cycle |
| ErrorFlag | out | 1 | a faulty filter was found |
| ErrorPos | out | 7 | one-hot faulty filter: y1..y4, z1..z3 |
| ham_data_in / ham_cw_out | in / out | 4 / 7 | encoder |
| ham_cw_in / ham_data_out | in / out | 7 / 4 | decoder |
| ham_cw_fixed, ham_syndrome, ham_err_pos, ham_err | out | 7, 3, 7, 1 | decoder status |

| parameter | default | meaning |
|-----------|---------|---------|
| W | 8 | sample and output width |
| NTAPS | 4 | filter taps (at least 2) |
| COEFFS | '{1, 2, -1, -1} | filter coefficients, COEFFS[0] for the newest sample |
| THRESH | 0 | largest check difference still read as zero |
| FAULT_MASK | all ones | XOR pattern of an injected fault |

## How far to trust it, and what is this design's own

These parts follow the published scheme:

* the structure of four original filters, three redundant filters, input coding
  and one single-fault correction unit;
* the coding sums, the check matrix, the syndrome table and the rebuild rule for
  y1;
* the threshold on the checks;
* the 8-bit width and the port names Clock, Reset, DataA..DataD, ES and
  YC1..YC4.

These are choices of this design:

* **The filter.** The scheme works for any linear filter, and no filter response
  was specified. The FIR and its coefficients are placeholders. Put your own
  filter into `fir_filter`; it only has to be linear, and all seven copies must
  be identical.
* **Modulo-2^W arithmetic everywhere.** This makes the checks exact, hence the
  default `THRESH = 0`.
* **Rebuild formulas for y2..y4.** They follow the y1 rule. Each uses the first
  check that covers the filter.
* **The meaning of ES.** It selects a module to corrupt, and the fault model is
  an output XOR. In the published simulation the outputs drop to 0 while ES is 1, 2 or 4.
  This design does not copy that. It corrects all seven single faults, so the
  outputs stay at the input values for every ES. The monitoring outputs and the
  codec ports are also additions.
* **Group size.** The design is fixed at four original filters with the (7,4)
  code. Eleven filters with four redundant ones would need a (15,11) check
  matrix in `ecc_pkg` and matching widths. That is not built.
* **Not built.** The scheme was motivated by another use: extending a SEC code so
  that a few control bits can be decoded faster. It is described only in
  outline, so there is no RTL for it.

The testbenches and their simulation results are the evidence for all this.

## Simulating

Each module in `rtl/` has a self-checking testbench `tb/tb_<module>.sv`. Each
testbench ends with a `TB_RESULT checks=N failures=M` line. For example, for the
whole design at its default parameters:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl +libext+.sv \
    --top-module tb_ecc_top rtl/ecc_pkg.sv tb/tb_ecc_top.sv -o sim
./obj_dir/sim
```

`tb_ecc_top` does the following:

1. It applies the constant inputs 76, 34, 45, 54 and steps ES through every value.
2. It runs 4100 cycles of random samples with a random fault in every cycle.
   Each output is compared with a reference FIR model one clock after its
   sample.
3. It resets in mid-stream.
4. It passes every codec word through a channel that flips no bit or one bit.

The testbench counts each mechanism it exercises: resets, fault-free cycles,
corrected faults per module and codec corrections per bit. Any mechanism that
never occurs counts as a failure. The block testbenches compare against values
computed in the testbench from literal equations and tables, not from
`ecc_pkg`. `tb_pfec_syndrome` also runs an instance with `THRESH = 3`.
