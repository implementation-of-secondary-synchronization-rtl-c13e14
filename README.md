# LTE secondary synchronization (SSS) detector

A handset that wants to join an LTE cell first finds the primary
synchronization signal (PSS). That gives it the symbol timing and
N_ID_2 (0..2), one part of the physical cell identity. The second step,
implemented here, finds the other part, N_ID_1 (0..167). It also finds
whether the secondary synchronization signal (SSS) just received came from
subframe 0 or subframe 5 of the radio frame, which gives the frame timing.
The cell identity is then `3*N_ID_1 + N_ID_2`.

The SSS occupies the 62 central subcarriers of one OFDM symbol. Each
subcarrier is +1 or -1, with a pattern that depends on N_ID_1, N_ID_2 and the
subframe. Because N_ID_2 is already known, there are 2 x 168 = 336
candidates. For each candidate (s, q) the detector computes

    C(s, q) = sum_{k=0..61} R(k) * T_{s,q}(k)

where R(k) is the complex received subcarrier and T the candidate's +/-1
pattern. The winner is the candidate with the largest |C|. To resist noise,
C is first added coherently across two consecutive SSS before the magnitude
is taken.

The design is small: one sequence generator, one correlator, one 336-entry
buffer, one magnitude estimator and one running-maximum detector. All of its
adders are parallel self-timed adders (PASTA), described below.

## One correlator, 20,832 clocks

The 336 x 62 = 20,832 multiply-accumulate steps could be spread over up to
336 parallel correlators. The SSS repeats every 5 ms, though. Even at the
lowest sensible clock, the 30.72 MHz LTE sample rate, that leaves 153,600
cycles per SSS. So the design is fully serial and does one step per clock:

    for sf in {subframe 0, subframe 5}:
      for N_ID_1 in 0..167:
        for k in 0..61:
          acc += T(sf, N_ID_1, k) ? -R(k) : R(k)

The search takes 20,832 clocks, about 14 % of the budget. The time to get a
result still rests on the 5 ms spacing of the SSS, not on the hardware.

Since T is +/-1, the "multiplication" is a multiplexer that passes R(k) or its
two's complement. The negation is "invert every bit, add one". Here the
"add one" goes in as the carry input of the accumulation adder, so each of
the I and Q rails has one adder and one register.

## Combining two SSS with a single 336-entry buffer

This is the least obvious part of the design. The SSS of subframe 5 uses the
two halves of the subframe-0 sequence in swapped order. So if the current SSS
is really from subframe s, then the previous one, 5 ms earlier, was from
subframe 5-s. The combined statistic for hypothesis (s, q) is therefore

    C_now(s, q) + C_prev(5-s, q)

and it is the complex sum, not the magnitudes, that is added. The detector
needs all 336 outputs of the previous SSS while it computes the current
ones. The direct way is to read entry (5-s, q) of a buffer indexed by
(subframe, q), and to write C_now(s, q) to entry (s, q). That breaks: the
subframe-0 pass would overwrite entries that the subframe-5 pass still
needs.

The fix is to write each new output into the slot that was just read:

* Slot address = `(sf XOR swap) * 168 + N_ID_1`.
* While candidate (sf, q) is correlated, the slot is read. It holds the
  previous SSS's output for (other subframe, q). At the end of the candidate
  the slot is overwritten with the new output for (sf, q).
* After every SSS the `swap` bit toggles. The slot that now holds (sf, q)
  is the one the next SSS reads for its candidate (other sf, q).

So 336 entries are enough. The read of one slot and the write of another
never collide in the same cycle, and an assertion in `sss_detector` checks
this. Each SSS is paired with the one right before it (a sliding pair), so a
new result arrives every 5 ms once the first two SSS have been seen. For the
first SSS after reset there is no previous data. The previous term is then
zero and `det_combined` is 0.

If the cell changes between two SSS, the first result after the change mixes
the two cells. Only the second result is trustworthy.

## Datapath and number formats

```
R(k) store ─► correlation_core ─► (+ buffer entry) ─► magnitude_est ─► peak_detect
 62 x 2 x 8b   14-bit acc, >>6      9-bit I/Q           10-bit           N_ID_1, sf
               8-bit I/Q C          corr_buffer 336x16
        sss_gen ─┘ (chip)
```

| quantity | width | note |
|---|---|---|
| R(k), I and Q | 8 bit signed | input |
| accumulator | 14 bit | 62 x 128 cannot overflow |
| C (per candidate) | 8 bit signed | accumulator >> 6, truncated |
| combined C | 9 bit signed | sum of two C |
| magnitude | 10 bit unsigned | max + 3/8 min of 9-bit values |

The magnitude is not sqrt(I^2 + Q^2). Only the ranking matters, so the
estimate `max(|I|,|Q|) + 3/8 * min(|I|,|Q|)` is used. It needs no
multiplier: the sign bit picks x or -x, a comparator splits max from min,
`3*min = min + 2*min` is one adder, `/8` is a shift, and one more adder adds
the max. The division truncates, so the result is `max + floor(3*min/8)`.

The peak detector compares each magnitude with the best so far as soon as
it appears. It keeps the subframe and N_ID_1 of the larger one, and on ties
keeps the earlier candidate. No second pass over the 336 stored values is
needed.

## The candidate sequence generator

`sss_gen` computes T(k) on the fly from the standard LTE definition
(3GPP TS 36.211, section 6.11.2). There are three length-31 m-sequences s~,
c~ and z~, with recurrences x^5+x^2+1, x^5+x^3+1 and x^5+x^4+x^2+x+1. The
cyclic shifts m0 and m1 come from N_ID_1:

    q' = N1/30,  q = (N1 + q'(q'+1)/2)/30,  m' = N1 + q(q+1)/2
    m0 = m' mod 31,  m1 = (m0 + m'/31 + 1) mod 31

With n = k/2, even subcarriers use s~ shifted by m0 (subframe 0) or m1
(subframe 5), times c~ shifted by N_ID_2. Odd subcarriers use s~ shifted by
m1 (subframe 0) or m0 (subframe 5), times c~ shifted by N_ID_2+3, times z~
shifted by m0 mod 8 (subframe 0) or m1 mod 8 (subframe 5). All shifts are
taken modulo 31.

Each factor is `1 - 2x` for a sequence bit x. So the product is -1 exactly
when the XOR of the selected bits is 1. The hardware therefore needs three
31-bit constants, a few mod-31 adders and an XOR. The constants are
computed by a function in `sss_pkg` at elaboration time.

## The PASTA adder

A PASTA adds without a carry chain of full adders. The first step is one half
adder per bit: `S = a ^ b` and `C(i+1) = a(i) & b(i)`. Each later step
half-adds every position's sum with the carry that arrived from below:

    S'(i)    = S(i) ^ C(i)
    C'(i+1)  = S(i) & C(i)

This repeats until all carries are zero, and S is then the sum. Since
every cell is a half adder, no position ever produces sum = 1 together with
carry out = 1. On random operands the
recursion ends after about log2(width) steps. In the asynchronous circuit a
request signal switches a multiplexer from the operands to a feedback path,
and completion detection ends the loop.

A clocked design has no such handshake. So `pasta_adder` unrolls the loop
into WIDTH+1 rows of half adders, which covers the longest possible carry
chain. It is purely combinational, and its function is ordinary addition.
The step at which the self-timed circuit would have finished is reported
on the `iterations` output. The testbench checks it against a word-level
model of the recursion. A carry input, absent from the self-timed original,
feeds the initial carry into bit 0. The negations in the correlator and in
the magnitude estimator use it.

## Top-level interface and timing (`sss_detector`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `n_id_2` | in | 2 | N_ID_2 from the PSS stage, sampled with subcarrier 0 |
| `r_valid`, `r_i`, `r_q` | in | 1, 8, 8 | received subcarriers R(0)..R(61), one per cycle when valid |
| `r_ready` | out | 1 | high while subcarriers are accepted; low during the search |
| `det_valid` | out | 1 | one-cycle pulse with the result |
| `det_n_id_1` | out | 8 | detected N_ID_1 |
| `det_subframe` | out | 3 | 0 or 5: subframe of the SSS just loaded |
| `det_cell_id` | out | 9 | 3*N_ID_1 + N_ID_2 |
| `det_peak` | out | 10 | magnitude estimate of the winner |
| `det_combined` | out | 1 | result used two consecutive SSS |

* Subcarriers are accepted in order, k = 0 first, in any cycles where
  `r_valid && r_ready`.
* After the 62nd subcarrier, `r_ready` drops and the search runs by itself.
  `r_valid` is ignored while it runs.
* `det_valid` comes exactly 20,835 clocks after the last subcarrier: the
  20,832-clock search plus 3 pipeline stages (correlator output register,
  combining register, magnitude register).
* `r_ready` rises again in the following cycle.
* Results stay on the `det_*` outputs until the next `det_valid`, while the
  next symbol is loaded and searched.

Parameters: `R_W` (8) and `C_W` (8) set the sample and correlation-output
widths. The candidate and subcarrier counts are LTE constants in `sss_pkg`.

## Modules

| file | contents |
|---|---|
| `rtl/sss_pkg.sv` | counts (62, 168, 336), m-sequence constants |
| `rtl/sss_detector.sv` | top: symbol store, sequencer, combining, buffer slot mapping |
| `rtl/sss_gen.sv` | candidate SSS chip generator |
| `rtl/correlation_core.sv` | +/-R(k) accumulator with slicing |
| `rtl/corr_buffer.sv` | 336 x 16 simple dual-port memory, registered read |
| `rtl/magnitude_est.sv` | max + 3/8 min magnitude estimate |
| `rtl/peak_detect.sv` | running maximum with subframe and N_ID_1 |
| `rtl/pasta_adder.sv` | unrolled parallel self-timed adder |
| `tb/sss_ref_pkg.sv` | integer reference model of the LTE SSS for testbenches |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops by itself.
A watchdog counts a failure if it hangs. For example, the end-to-end test:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_sss_detector \
  -Irtl -Itb rtl/sss_pkg.sv tb/sss_ref_pkg.sv \
  rtl/pasta_adder.sv rtl/sss_gen.sv rtl/correlation_core.sv rtl/corr_buffer.sv \
  rtl/magnitude_est.sv rtl/peak_detect.sv rtl/sss_detector.sv tb/tb_sss_detector.sv
./obj_dir/Vtb_sss_detector
```

A block testbench needs only `rtl/sss_pkg.sv`, the block, `pasta_adder.sv`
where it is used, and its `tb_` file (`tb_sss_gen` and `tb_sss_detector` also
need `tb/sss_ref_pkg.sv`). The simulations are two-state, and all state that
is read is reset or written first.

## What the testbenches show

* `tb_sss_detector` runs the detector at full size, with no parameter
  overrides, over at least ten SSS symbols. Each symbol is built from a reference SSS
  with a random phase, uniform noise and clipping to 8 bits.
  * Every result is compared bit-exactly with an integer model of the whole
    datapath: slicing, pairing with the previous SSS's opposite subframe,
    magnitude and tie rule.
  * At high SNR the sent cell and subframe must be found. One case is the
    example cell N_ID_2 = 2, N_ID_1 = 105, subframe 0.
  * The latency must be 20,835 clocks, within the 153,600-clock budget.
  * It counts, and fails if any count is zero: a result without a
    predecessor, a combined result, both `swap` mappings, winners in both
    subframes, a low-SNR symbol that alone would give the wrong cell but
    combined gives the right one, a cell change, and load requests ignored
    during the search.
* `tb_sss_gen` compares all 1,008 sequences (168 x 2 x 3) chip by chip with
  the reference model. It also checks that model's m0/m1 mapping against
  entries of the LTE table.
* The block testbenches compare with integer arithmetic:
  * sums and completion steps of the adder;
  * correlation sums, including full-scale -128 inputs and stalls;
  * the magnitude over all corner values;
  * the arg-max with ties and with winners at the first and last candidate;
  * buffer read/write order.

## Choices made here, and what is not included

Choices made for this implementation:

* The 8-bit widths and the 6-bit truncating slice.
* The valid/ready load interface and the 62-entry symbol store.
* The loop order: k innermost, subframe outermost.
* Sliding pairing of each SSS with its predecessor, and the read-then-write
  slot scheme with the `swap` bit.
* No combining for the first SSS after reset.
* Tie rule: the first maximum wins.
* floor(3*min/8).
* Asynchronous reset of control state only.
* The carry input of the adder.
* The unrolled, synchronous form of the self-timed adder. This is the
  largest departure. The logic function and the iteration count are those
  of the self-timed adder. Its asynchronous timing and completion handshake
  are not reproduced, and as written the adder's delay is that of
  WIDTH+1 rows of half adders.

Not included:

* The OFDM demodulator that delivers R(k).
* The PSS detector that delivers N_ID_2 and the symbol position. Both
  enter as ports.
* A frequency-offset correction. R(k) is assumed to need none.
* The carry-select-adder version of the same detector, which exists only as
  a point of comparison.
* The three more parallel organisations (168, 62 or 2 correlators in
  parallel).

Size after generic synthesis: about 172 flip-flops and 6,464 memory bits.
The memory bits are the 336 x 16 buffer and the 62 x 16 symbol store.
