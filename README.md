# Folded bit-plane FIR filter with reassignable folding sets

An FIR filter with `k_c` coefficients of `m_c` bits each can be written bit by bit as a
chain of `L = k_c * m_c` small operations. Each operation adds one coefficient bit
`c_i^j` (weight `2^j`), times an input sample, to a running partial sum. A bit-plane array
gives every operation its own row of AND gates and full adders. This design uses a fixed
ring of `K` such rows instead, each one time-multiplexed over `N = L / K` operations (the
folding factor).

What is new here is how operations are assigned to rows. Operation `p` runs on unit
`p mod K` in time slot `p mod N`, so any unit can execute any operation. Changing the
number of taps or the coefficient length changes nothing in the ring. It only rewrites a
small table in every unit, and a controller computes those tables in hardware. The sample
rate follows the configuration: one sample every `N = k_c*m_c/K` clock cycles.

The assignment scheme and the retiming that makes it work come from Milentijevic and
Ciric's method for folded bit-plane FIR arrays. This RTL covers the interfaces, sizes,
start-up behaviour and the details that method leaves open; the list of this design's own
choices and departures is near the end.

## What the filter computes

With unsigned coefficients `c_0 .. c_{k_c-1}` and signed samples `x(n)`:

    y(n) = sum_{i=0}^{k_c-1} c_i * x(n - (k_c-1-i))

This is a transposed form. The partial sum starts at `c_0` and ends at `c_{k_c-1}`, and
there is one sample of delay between consecutive coefficient groups. `c_{k_c-1}` therefore
multiplies the newest sample. To get the usual `y(n) = sum_t h_t x(n-t)`, load
`c_i = h_{k_c-1-i}`.

The operations are numbered `p = 0 .. L-1`, coefficient by coefficient, most significant
bit first:

    i = p div m_c          (coefficient)
    j = m_c-1 - p mod m_c  (bit weight)

Operation `p` computes `S_out = S_in + c_i^j * (x << j)`. Operation 0 starts from zero, and
the output of operation `L-1` is `y(n)`.

## Folding sets

With `K` units and `N = L/K` slots per unit:

    unit  s(p) = p mod K
    slot  u(p) = p mod N

Each unit's set of operations `{p : p mod K = s}` is its folding set. The assignment has two
consequences:

* **Consecutive operations are one unit and one slot apart.** Operation `p+1` runs on unit
  `s+1` (mod K), one cycle after operation `p`. The partial sum therefore moves round the ring
  through exactly one register per unit, and the interconnect never changes. Operation 0 is
  always on unit 0 in slot 0, and operation `L-1` is always on unit `K-1` in slot `N-1`.
* **The assignment is one-to-one only if gcd(K, N) = 1.** By the Chinese remainder theorem,
  `(p mod K, p mod N)` covers every (unit, slot) pair exactly once only when `K` and `N` are
  coprime. Otherwise two operations would need the same unit in the same slot. `L` must also
  be a multiple of `K`. The controller checks both conditions and rejects configurations that
  fail them.

For the default `K = 5`, `k_c <= 16` and `m_c <= 8`, these configurations fold:

| k_c | m_c values that fold (N in brackets) |
|---|---|
| 1-4, 6-9, 11-14, 16 | 5 (N = k_c) |
| 5 | 1-4, 6, 7, 8 (N = m_c) |
| 10 | 1, 2, 3, 4, 6, 7, 8 (N = 2m_c) |
| 15 | 1, 2, 3, 4, 6, 7, 8 (N = 3m_c) |

Anything else (for example `k_c = 4, m_c = 4`, or `k_c = 5, m_c = 5`) sets `cfg_err`. A
different `K` gives a different set of configurations. A prime `K` accepts every `L` that it
divides, as long as `N` is not itself a multiple of `K`.

Here is an example with `K = 5, k_c = 4, m_c = 5`, so `L = 20` and `N = 4`. Each cell shows
the operation, its coefficient and bit, and its sample delay `d` (explained below):

| unit | slot 0 | slot 1 | slot 2 | slot 3 |
|---|---|---|---|---|
| 0 | p=0 (c0 b4, d0) | p=5 (c1 b4, d0) | p=10 (c2 b4, d0) | p=15 (c3 b4, d0) |
| 1 | p=16 (c3 b3, d1) | p=1 (c0 b3, d0) | p=6 (c1 b3, d0) | p=11 (c2 b3, d0) |
| 2 | p=12 (c2 b2, d1) | p=17 (c3 b2, d1) | p=2 (c0 b2, d0) | p=7 (c1 b2, d0) |
| 3 | p=8 (c1 b1, d1) | p=13 (c2 b1, d1) | p=18 (c3 b1, d1) | p=3 (c0 b1, d0) |
| 4 | p=4 (c0 b0, d1) | p=9 (c1 b0, d1) | p=14 (c2 b0, d1) | p=19 (c3 b0, d1) |

Every unit handles bits of several different coefficients. A different `(k_c, m_c)` gives
every unit a different mix.

## Retiming, and why operations read delayed samples

In the unfolded chain, the edge `p -> p+1` carries one delay when it crosses from one
coefficient to the next, and no delay otherwise. Folding that chain with the assignment
above gives the following folded delays:

* `-(N-1)` where `(p+1) mod N = 0`, because the slot wraps round;
* `N+1` where `(p+1) mod m_c = 0`, because of the coefficient delay;
* `1` everywhere else.

Negative delays cannot be built, so the chain is retimed. The retiming

    r(p) = floor(p/N) - floor(p/m_c)

adds `N*(r(p+1) - r(p))` to each folded delay. That is `+N` exactly at the slot wraps and
`-N` exactly at the coefficient boundaries (where both happen, the two cancel). **Every
folded delay becomes exactly 1**, which is why the ring needs only one register per unit.

The retiming moves delays off the partial-sum path and onto the sample inputs. Operation `p`
does not use the newest sample. It uses the sample

    d(p) = r(p) - min_p r(p)

steps back. `sample_history` keeps the last `K + KC_MAX - 1` samples, and each unit's table
entry stores `d` together with the coefficient bit and `j`.

The same numbers set the start-up offset:

    skip = K - k_c + 1 - min r

After a restart, the first `skip` results to leave the ring belong to samples before `x(0)`.
They are suppressed, so the first `out_valid` carries `y(0)`. In general `y(n)` leaves the
ring in the cycle that takes `x(n+skip)` and appears on `out_data` one cycle later. With an
unstalled input that is `N*skip + 1` cycles after `x(n)`.

## Timing and handshake

* A folding period is `N` cycles: slots `0 .. N-1`. `in_ready` is high in slot `N-1`, and a
  sample offered then (`in_valid`) is taken at the end of that cycle. Slot 0 of the next
  period sees it as the newest sample.
* If no sample is offered in slot `N-1`, the whole array stalls. The slot counter, the ring
  registers and the history all hold until a sample arrives.
* `out_valid` is a one-cycle pulse. `out_data` holds its value until the ring advances again.
* Coefficients (`coef_we`, `coef_addr`, `coef_data`) can be written at any time. They take
  effect at the next configuration, because the tables hold copies of the coefficient bits.
* Configuration: pulse `cfg_start` with `cfg_kc` and `cfg_mc`. The filter stops, and the ring
  and sample history are cleared. `cfg_busy` stays high for `2L + 2` cycles: a one-cycle check,
  one pass over `p` to find `min r`, one pass writing one table entry per cycle, and a
  one-cycle done state. Then `running` rises and `fold_n` shows `N`, or `cfg_err` is set and
  the filter stays stopped. `cfg_start` is ignored while `cfg_busy` is high.

## Blocks

| module | role |
|---|---|
| `folded_fir` | top: slot counter, stall logic, output suppression, ring of `K` units |
| `fs_assign` | folding-set assignment controller: validity check, `min r`, table writes |
| `fold_unit` | one ring node: folding-set table, sample select, alignment shift, row, sum register |
| `bp_row` | one row of basic cells: `s_out = s_in + (c_bit ? x_al : 0)`, ripple carry |
| `bp_basic_cell` | AND gate plus full adder |
| `coef_mem` | coefficient store, one word per coefficient |
| `sample_history` | shift register of recent samples, newest at index 0 |
| `ffir_pkg` | default sizes, table entry type `fs_entry_t`, controller state type |

`fs_assign` needs no divider. It walks `p` with counters for `p mod K`, `p mod N`,
`floor(p/N)`, `p mod m_c` and `floor(p/m_c)`. `L mod K` and `L / K` are divisions by the
constant `K`. It detects a folding-set collision directly, with a bitmap of the (unit, slot)
pairs already written, so it does not compute a gcd.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `K` | 5 | units in the ring |
| `W_X` | 8 | sample width (signed) |
| `M_MAX` | 8 | largest coefficient length (at most 16) |
| `KC_MAX` | 16 | largest number of coefficients |

From these follow the sum width `W_X + M_MAX + clog2(KC_MAX)` (20), the table depth
`ceil(KC_MAX*M_MAX/K)` (26) and the history depth `K + KC_MAX - 1` (20). The method fixes
none of these numbers; the defaults are this design's. At the defaults, synthesis gives
about 1700 word-level cells and 2050 flip-flops.

## Design choices and departures

These follow the folding method: the assignment `s = p mod K`, slot `p mod N`; `L = K*N`;
the row of AND/full-adder cells as the unit of work; the folded-delay equations; and the
conditions the retiming has to meet.

These are this design's own:

* **Retiming formula.** The closed-form retiming published with the method,
  `floor((L-p)/m_c) - floor((L-p)/N)`, does not meet the method's own constraints. For
  example, with `k_c = 2, m_c = 3, N = 2` it leaves a negative folded delay at `p = 1 -> 2`.
  This design uses `floor(p/N) - floor(p/m_c)`, which meets every constraint with equality.
* **The gcd(K, N) = 1 condition.** The method does not state it. Without it the assignment
  is not one-to-one, and such configurations are rejected.
* **Operand alignment.** A unit executes bits of different weights, so the sample is shifted
  left by `j` before the row. A fixed bit-plane row would instead be wired at its own weight.
* **No LSB truncation.** Partial sums carry full precision. Bit-plane arrays can drop finished
  LSBs; that is not done here.
* **Number formats.** Coefficients are unsigned, because every bit has a positive weight.
  Samples are signed two's complement. The sample handshake, the stall, the clearing on
  reconfiguration, output suppression and all default sizes are also this design's choices.

## Simulation

Every testbench in `tb/` checks its results itself and ends with a line
`TB_RESULT checks=<n> failures=<m>`. They need `--timing` and read the package first:

    verilator --binary --timing --assert rtl/ffir_pkg.sv rtl/*.sv tb/tb_folded_fir.sv \
              --top-module tb_folded_fir -Mdir obj_tb && obj_tb/Vtb_folded_fir

* `tb_folded_fir` runs the whole filter at its default sizes. For eight accepted
  configurations, covering `N < m_c`, `N = m_c`, `N > m_c` and `N = 1`, it programs random
  coefficients and streams random samples, some with gaps that stall the array. Every output
  is compared with a direct convolution. It also checks the folding factor, one sample every
  `N` cycles, the number of suppressed start-up outputs, the unstalled latency, and the
  rejection of configurations where `L` is not a multiple of `K` or `gcd(K, N) > 1`. It fails
  if any of these mechanisms never occurred.
* `tb_fs_assign` compares every table entry with the assignment computed by plain division.
  It checks that each (unit, slot) pair is written exactly once, and it checks `N`, `skip`,
  the busy time and the rejection cases.
* `tb_fold_unit`, `tb_bp_row`, `tb_bp_basic_cell`, `tb_coef_mem` and `tb_sample_history`
  test the smaller blocks against arithmetic models, exhaustively for the basic cell.

To try another ring size, change `K` in `ffir_pkg` (or override it on `folded_fir`). The
testbench computes its expected results from the same formulas, but its list of
configurations is chosen for `K = 5`.
