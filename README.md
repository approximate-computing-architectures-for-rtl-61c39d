# Approximate SAD accelerator for HEVC motion estimation

Motion estimation searches a reference frame for the block that best matches
the block being encoded. The match criterion is the sum of absolute
differences,

    SAD = sum over i, j of |C(i,j) - R(i,j)|

between the current prediction unit (PU) C and a candidate reference PU R.
In HEVC a PU can be anything from 4x8 to 64x64 samples, so one SAD can take
4096 subtractions, 4096 absolute values and 4095 additions, and a search
evaluates thousands of candidates per PU. The accelerator here computes 256
sample pairs per clock cycle. It has two features beyond plain speed:

* **Approximate adders.** Motion estimation tolerates small errors in the
  SAD: a slightly wrong SAD usually still picks a good motion vector. Every
  adder of the datapath can therefore be swapped, by parameter, for one of
  five approximate adders, placed in one of three regions of the datapath.
  The goal is lower power at a small loss of accuracy.
* **Partial distortion elimination (PDE).** A large PU is summed over up to
  16 cycles. Once the running sum of a candidate exceeds the best SAD found
  so far in the search, the candidate cannot win, so it is abandoned early.

## Data path at a glance

```
 writer ──port 1──► sample_sram (2 pages x 128 words x (32 cur + 32 ref) samples)
                        │ port 2, 8 reads per main cycle on clk_mem = 8 x clk
                        ▼
                   sample_fetch ── 256 cur + 256 ref samples per main cycle
                        ▼
 request ───────►  sad_control ── zero-masks lanes past the PU, sequences 1..16 cycles
                        ▼ vector register
            16 x sad_pe  (16 x [subtract, abs], 16-input tree: 8 → 12 bits)
                        ▼
              adder_tree (16 x 12 bits → 16 bits)
                        ▼
             sad_accum_pde (20-bit accumulator, PDE compare, best SAD)
                        ▼
                 done, sad, pruned, sad_min
```

Widths: a PE sums 16 magnitudes of at most 255 into 12 bits, and the tree
adder grows one bit per level to 16 bits. The accumulator is 20 bits wide,
which holds the worst 64x64 SAD (4096 x 255 = 1,044,480). No stage can
overflow with exact adders.

## The approximate adders (`approx_adder`)

Every adder and subtractor of the datapath is an instance of
`approx_adder`. It computes `a + b + cin` on `W` bits and returns `W+1` bits.
It is configured by parameters:

| parameter    | meaning |
|--------------|---------|
| `ADDER`      | family: `ADD_RCA`, `ADD_CLA` (exact), `ADD_LOA`, `ADD_ACA`, `ADD_ACAA`, `ADD_ETAI`, `ADD_SCSA` |
| `APPROX`     | 0 forces an exact adder whatever `ADDER` says |
| `EXACT_LSBS` | bits below this are always added exactly |
| `K`          | the family's window or part size (default 4) |

Bits from `EXACT_LSBS` up form the *approximate section*. The exact low part
hands its carry to the section wherever the family accepts a carry in. The
families, as implemented:

| family | class | rule inside the section |
|--------|-------|-------------------------|
| RCA    | exact | ripple carry |
| CLA    | exact | 4-bit carry-look-ahead groups, rippling between groups |
| LOA (lower-part OR) | approximate full adder | the lowest K bits are `a OR b` and the exact carry from below is dropped; the carry into the upper part is `a AND b` of the top OR'd bit; the upper part is exact |
| ETA-I (error-tolerant I) | approximate full adder | the lowest K bits are summed without carries, scanning downward; at the first position where both bits are 1, that bit and all below it are set to 1; the upper part is exact with carry in 0 |
| ACA (almost correct) | speculative | the carry into each bit is produced by the K bits below it alone, with a zero carry further down |
| ACAA (accuracy-configurable) | segmented | K-bit sub-adders overlapping by K/2; each K/2-bit segment takes its carry from the previous segment alone |
| SCSA (speculative carry select) | carry select | K-bit windows; the carry into a window is the previous window's carry out computed with carry in 0 |

Some consequences are easy to miss:

* SCSA with K = 4 on an 8-bit adder has only two windows and is then exact.
  In the subtractors (substitution 3) it therefore changes nothing.
* A subtractor is `cur + ~ref + 1`. LOA and ETA-I drop that `+1` when the
  section starts at bit 0, so approximate subtractors of those families are
  biased.
* The absolute-value stage is never approximated. It takes the carry out of
  the subtractor as the "no borrow" sign, so an approximate subtractor can
  produce an arbitrary magnitude, never a negative one.

### Where the approximations go (`SUBST`)

| `SUBST`      | approximate | exact |
|--------------|-------------|-------|
| `SUBST_NONE` | nothing | everything |
| `SUBST_1`    | all adders: the PE trees, the tree adder and the accumulator | the subtractors |
| `SUBST_2`    | tree adder and accumulator, bits 12..19 only (`EXACT_LSBS = 12`) | the PEs; bits 0..11 everywhere |
| `SUBST_3`    | the 256 subtractors in the PEs | all adders |

Substitution 2 rests on the observation that partial sums in the tree
usually fit in 12 bits, so only the rarely used upper bits are approximated.
With `EXACT_LSBS = 12`, the first tree level (12-bit inputs) stays exact. The
higher levels approximate their bits from 12 up, and the 20-bit accumulator
approximates bits 12..19.

The default is `SUBST_2` with LOA and K = 4. Any of the 21 approximate
combinations, or the exact baseline, is one parameter change on `sad_top`.

Measured behaviour: the testbenches `tb_sad_configs_sub1/2/3` report the mean
relative error distance (MRED), the average of |SAD' − SAD| / SAD over all
candidates. The data is 64 synthetic candidates: a smooth texture, with
shifted noisy copies of it as references.

| MRED   | RCA | CLA | LOA | ACA | ACAA | ETA-I | SCSA |
|--------|-----|-----|-----|-----|------|-------|------|
| subst. 1 | 0 | 0 | 0.045 | 0.328 | 0.563 | 0.321 | 0.174 |
| subst. 2 | 0 | 0 | 0.560 | 0     | 0.096 | 0.560 | 0     |
| subst. 3 | 0 | 0 | 0.129 | 3.875 | 1.772 | 0.168 | 0     |

These figures depend strongly on K and on the data. For comparison, the
published evaluation measured MRED on motion-estimation results over real
video and found 0.05 to 0.27 for the approximate adders. That work does not
give the window sizes, and K = 4 is clearly too aggressive for some families
here: ACA and ACAA with K = 4 on 8-bit subtractors, and LOA or ETA-I
covering bits 12..15 of the accumulator. Tune K for your data before you
trust a configuration.

## Sample memory and the 8x memory clock

256 current and 256 reference samples per main cycle are 4096 bits. The
sample memory delivers them over eight accesses per main cycle on `clk_mem`,
which must run at exactly 8x `clk` with aligned rising edges.
`sample_sram` has two arrays, current and reference, with 32 samples (256
bits) per word at a shared address. A page of 128 words holds a 64x64 PU.
There are two pages. Port 1 writes both arrays at once, with active-low
`port1_csb` (chip select) and `port1_web` (write enable). The page it writes
is `toggle1`, and the page a request reads is `toggle2`. A writer can
therefore load the next candidate into one page while the datapath works on
the other; the end-to-end testbench does exactly that.

`sample_fetch` needs no reset shared with the main clock domain. The control
unit toggles `tog` every main cycle. On the first memory edge after a main
edge, the fetch unit sees the toggle change and restarts its beat counter,
then reads words `base+0 .. base+7`. Read data arrive one memory cycle after
the address and are shifted into a staging buffer. The eighth word lands on
the first memory edge of the next main cycle, and the full vector then stays
stable for a whole main cycle. This scheme depends on the clock relation. If
`clk_mem` is not an aligned 8x multiple of `clk`, the vectors are garbage.

## Requests, vector packing and timing (`sad_control`)

The writer stores a PU as one flat row-major vector: sample `k = row*columns
+ col` sits in word `k/32`, byte `k%32`, in both arrays. A request is
`valid_in` (taken while `ready` is high) with `rows`, `columns` (1..64, with
rows x columns ≤ 4096), `toggle2`, `first` and `pde`. The request takes
`c = ceil(rows*columns/256)` vector cycles, from 1 for PUs up to 16x16 to 16
for 64x64. Lanes past the last sample of the PU are forced to zero in both
halves of the vector, so they add nothing.

Pipeline, counted in main-clock edges after the edge that accepts the
request:

| edge  | event |
|-------|-------|
| 1     | first base address issued |
| 2     | its eight words have been read (memory clock) |
| 3     | vector registered, lanes masked |
| 4     | first partial SAD accumulated |
| c + 3 | last partial SAD accumulated; `done` is high for one cycle |

`ready` rises again in the cycle after `done`, and a new request can be
accepted on the following edge. A 64x64 PU thus takes 19 cycles once its
samples are in memory. Candidates are processed one at a time, so PDE always
compares against an up-to-date best SAD.

## Partial distortion elimination (`sad_accum_pde`)

`first` on a request clears the best SAD of the search. After each vector the
20-bit running sum is compared, with an exact comparator, against the best
complete SAD of the search. If `pde` is high, the best SAD is valid, this was
not the last vector and the sum is strictly greater, then `abort` goes high.
The control unit cancels the vectors still in flight and the candidate ends
at once, with `pruned = 1` and `sad` holding the partial sum. A complete
candidate with a strictly smaller SAD becomes the new best (`sad_min`,
`sad_min_valid`). Pruned candidates never update it. With an approximate
accumulator, PDE compares approximate sums, as the hardware would.

## Top-level interface (`sad_top`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `clk_mem` | in | 1 | main clock; memory clock = 8 x `clk`, rising edges aligned |
| `rst_n` | in | 1 | synchronous, active low, seen by both clocks |
| `toggle1`, `port1_addr`, `port1_web`, `port1_csb` | in | 1, 7, 1, 1 | write page, word, write enable (low), chip select (low); sampled on `clk_mem` |
| `cur`, `ref_data` | in | 256 | 32 current / 32 reference samples, sample `i` in bits `8i+7:8i` |
| `valid_in`, `rows`, `columns`, `toggle2`, `first`, `pde` | in | 1, 7, 7, 1, 1, 1 | request, sampled on `clk` |
| `ready` | out | 1 | a request can be accepted |
| `done` | out | 1 | result valid for one cycle |
| `sad`, `pruned` | out | 20, 1 | SAD of the candidate; partial sum if pruned |
| `sad_min`, `sad_min_valid` | out | 20, 1 | best complete SAD since the last `first` |

Parameters: `ADDER`, `SUBST`, `K` (above) and `PAGES` (2, at least 2). The
sizes shared by all modules are in `sad_pkg`: 16 PEs of 16 lanes, 8-bit
samples, 12/16/20-bit widths, a clock ratio of 8 and a 64x64 maximum PU.
The sizes, the clock ratio, the approximation regions and the 12-bit
boundary come from the published architecture. The memory organisation, the
handshake, the masking, the PDE rules, the default adder and K are choices
of this implementation.

## How far to trust it, and known departures

* The datapath structure (16 PEs of 16 lanes, the widths, the tree, the 20-bit
  accumulator, the 1..16-cycle schedule) and the three approximation regions
  follow the published design. The insides of the memory, the control unit
  and the PDE logic are not published in detail and are this implementation's
  own.
* The published PDE places extra comparators inside the tree adder. Here a
  single comparator checks the running sum once per cycle, so a candidate is
  abandoned at cycle granularity.
* The published latency for a 64x64 block is 25 cycles (156.25 ns at
  160 MHz). This implementation needs 19 cycles from request to result,
  because the pipeline depth is its own.
* The original datapath drawing has a multiplexer above the tree adder whose
  function is not described. It is not built: every result, including
  single-cycle ones, passes through the accumulator.
* The adder families are implemented from their usual definitions; the
  published work only names them. Their window sizes are not published (see
  the MRED table).
* The memory is a behaviour-level synchronous array, standing in for a memory
  macro clocked at 8x the main clock (1.28 GHz for a 160 MHz main clock). No
  timing or power has been verified. Simulation checks function only.

## Simulating

Every file in `rtl/` is one module or package; `sad_pkg.sv` must be read
first. Testbenches in `tb/` are self-checking and end by printing
`TB_RESULT checks=N failures=M`. Several of them also need
`tb/sad_ref_pkg.sv`, an integer/bit-slice reference model of every adder
family and of the datapath. For example:

```
verilator --binary --timing -Wno-fatal -y rtl -y tb \
    rtl/sad_pkg.sv tb/sad_ref_pkg.sv tb/tb_sad_top.sv --top-module tb_sad_top
./obj_dir/Vtb_sad_top
```

| testbench | what it covers |
|-----------|----------------|
| `tb_approx_adder` | all seven families, 8-bit (near-exhaustive, both carry-ins) and 20-bit with 12 exact bits, against the model |
| `tb_adder_tree` | exact, LOA and ACA 12-bit trees and an ETA-I 8-bit tree |
| `tb_sad_pe` | default PE against the true SAD; substitution 1 and 3 PEs against the model |
| `tb_sad_accum_pde` | accumulation, PDE abort timing, pruning, best-SAD updates |
| `tb_sample_sram` | writes with chip select / write enable, one-cycle reads |
| `tb_sample_fetch` | 8x clock alignment and vector assembly |
| `tb_sad_control` | cycle counts, masking, flags, latency, abort cancellation |
| `tb_sad_top` | the whole design at default parameters: 24 HEVC PU shapes, 180 candidates with ping-pong loading, PDE on and off; checks every SAD, flag, best SAD and latency, and counts that each mechanism occurred |
| `tb_sad_configs_sub1/2/3` | seven `sad_top` instances each (every adder family) in one substitution; checks each against the model and prints MRED, mean error distance and the share of SADs that differ |

The clock generators in the testbenches drive `clk` and `clk_mem` from one
process. This keeps the aligned edges in the same simulation step. Do the
same in your own testbenches, or `sample_fetch` may see the edges in the
wrong order. The configuration sweeps each build seven full accelerators;
expect a few minutes of C++ compilation for each.
