# Comparison-free O(N) sorter

A hardware sorter for K-bit elements that never compares two elements.
Because an element can only take N = 2^K values, the value itself can serve
as an address. The sorter counts how often each value occurs, then walks
the N values in order and emits each present value as many times as it was
counted. There are no comparators, no swap network and no data moves between
storage and compute units. Sorting time, storage and logic all grow linearly
in N.

The default configuration is the 10-bit system: K = 10, so up to N = 1024
elements per sort. The same RTL at K = 3 is the 3-bit system.

## The two phases

A sort has two phases. The shared control unit sequences them and shows
them on `write_ena` and `read_ena`.

**Write-evaluate (exactly N cycles).** Each cycle with `in_valid` high, the
one-hot decoder turns `data_in` into a one-hot select. Element value `v`
selects two registers:

* **order register `OR[v]`** stores the element itself;
* **flag register `FR[v]`** is loaded with its old value plus one, so it
  counts the occurrences of `v`.

The parallel counter (`PC`) counts the N cycles. Its terminal count ends
the phase whether or not every cycle carried an element. Treating the input
set as full keeps the read phase simple. Cycles with `in_valid` low record
nothing, so any number of elements from 0 to N can be sorted.

**Read-sort.** The decoder now takes the counter value `i` instead of the
input. It selects `OR[i]` and `FR[i]` onto two read buses. Each cycle falls
into one of three cases:

| `FR[i]` | detected by | action | counter |
|---|---|---|---|
| 0 | decrement carry out = 0 | nothing stored | advances |
| 1 | one-detector | `OR[i]` shifted into the sorted array | advances |
| > 1 | not one, carry out = 1 | `OR[i]` shifted in, `FR[i]` decremented | held |

No magnitude comparator tells these cases apart. The flag register feeds
two circuits:

* the one-detector, which is bit 0 high and every other bit low;
* the shared incrementor/decrementor. In this phase it computes `FR - 1` as
  `FR + all-ones`. The carry out of that addition is 1 exactly when `FR` is
  non-zero.

"Non-zero and not one" is therefore "more than one". In that case the
counter stays put, and the same value is emitted again on the next cycle
with its decremented count. A value that occurs m times takes m cycles, and
an absent value takes one cycle.

**Cycle count.** Take a sort of `n` elements with `a` absent values
(values in 0..N-1 that never occurred):

    start cycle            1
    write-evaluate         N
    read-sort              n + a        (at most 2N - 1)

`done` rises when read-sort ends and stays high until the next `start`. For
example, the default-size test sorts 1024 random 10-bit elements with 367
absent values. It takes 1024 write cycles and 1391 read cycles.

## Order and where the result lands

The read-sort phase always delivers elements in increasing value order. The
sorted register array `SR` is a serial shifter, and its shift direction
selects the order. `ascending` is sampled with `start`:

* `ascending = 1`: entries move toward index 0 and new elements enter at
  `N-1`. A full set ends up with `sorted[0]` the smallest.
* `ascending = 0`: entries move toward `N-1` and new elements enter at
  index 0. `sorted[0]` ends up the largest.

If fewer than N elements were given, `cnt = sorted_count` of them are
valid. They sit at the end the shifter fills last: `sorted[N-cnt..N-1]` for
ascending, `sorted[0..cnt-1]` for descending. The array is cleared on
`start`, so every other entry reads 0.

## Interface (`cfs_sorter`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `start` | in | 1 | one-cycle pulse in idle or done. Clears flags, sorted array and counter, and begins write-evaluate on the next cycle. Ignored while a sort runs. |
| `ascending` | in | 1 | order for this sort, sampled with `start` |
| `in_valid`, `data_in` | in | 1, K | one element per write-evaluate cycle |
| `write_ena` | out | 1 | write-evaluate phase active |
| `read_ena` | out | 1 | read-sort phase active |
| `done` | out | 1 | result valid |
| `sorted` | out | N x K | the sorted register array |
| `sorted_count` | out | K+1 | elements shifted into the array |

Parameters: `K` (default 10) and `FLAG_W` (default K+1). N = 2^K is
derived from K.

## Block structure

    cfs_sorter                 top: data path wiring, ascending flag, element count
    ├── cfs_control_unit       IDLE / WRITE / READ / DONE sequencer, clear pulse
    ├── cfs_parallel_counter   K-bit PC: counts write cycles, indexes read-sort
    ├── cfs_onehot_decoder     K -> 2^K one-hot; input is data_in or PC
    ├── cfs_order_reg_array    N x K order registers, one-hot write, AND-OR read
    ├── cfs_flag_reg_array     N x FLAG_W occurrence counters, one-hot load, AND-OR read
    ├── cfs_incdec             shared +1 / -1 with carry out
    ├── cfs_one_detector       flag == 1
    └── cfs_sorted_shift_reg   N x K serial shifter, direction = order
    cfs_pkg                    phase enum

Every path is a single register stage. The decoder, the read buses, the
one-detector and the incrementor/decrementor form one combinational path
from the counter (or `data_in`) to the flag, order and sorted registers.
The order registers carry no reset: one is read only when its flag shows it
was written during the same sort.

The top holds three assertions:

* the two phases never overlap;
* the decoder selects at most one register;
* an emitted order register holds its own index.

The last one captures why the order registers are redundant in principle.
They are kept because they are part of the described data path.

At the defaults the storage is 1024 x 10 order bits, 1024 x 11 flag bits and
1024 x 10 sorted bits: about 31.7 k flip-flops plus two 1024-input AND-OR
buses.

## Where this RTL departs from the described design

* **Tri-state read buses** are written as AND-OR multiplexers. With a
  one-hot or empty select they compute the same function, and the result
  can be synthesized.
* **Flag width.** The source names a 10-bit incrementor for the 10-bit
  system. A set of 1024 equal elements needs a count of 1024, which takes
  11 bits, so `FLAG_W` defaults to `K+1`. Setting `FLAG_W = 10` reproduces
  the narrower counter. With it, 1024 equal elements overflow the count.
* **Handshake, clearing and the done state** (`start`, `in_valid`, `done`,
  the clear pulse on start, `sorted_count`) are this design's own. The
  source fixes only the two phases, the N-cycle write phase and the
  WRITE-ENA/READ-ENA switch.
* **Delay elements.** The source pads setup and hold with chains of an even
  number of inverters. Logically such a chain is a wire, and in synchronous
  RTL the clock meets setup and hold, so the chains are not modelled.
* **Not built.** Two things are not built because the source gives no
  architecture, sizes or coefficients for them:
  * merging several 1024-element passes into a larger sort, which is only
    mentioned;
  * the aerial-image enhancement chain (histogram adjustment, wavelet
    dynamic range compression, colour restoration, histogram equalization,
    Gaussian/median filtering, Laplacian sharpening), which is described as
    a software procedure.
* The comparison-based sorters (bitonic, bubble, odd-even, selection) are
  reference points only and are not included.

## Verification

Each module has a self-checking testbench in `tb/`. Each compares the module
against a model written in the testbench and prints
`TB_RESULT checks=<n> failures=<n>`. A watchdog ends any run that hangs.

| testbench | what it covers |
|---|---|
| `tb_cfs_onehot_decoder` | all 16 inputs at K = 4, enable on and off |
| `tb_cfs_one_detector` | all 2048 values at W = 11 |
| `tb_cfs_incdec` | all values, both directions, carry out |
| `tb_cfs_parallel_counter` | random enable and clear, wrap, terminal count |
| `tb_cfs_order_reg_array` | random one-hot writes, every read select, empty select |
| `tb_cfs_flag_reg_array` | random loads, full read-back, clear |
| `tb_cfs_sorted_shift_reg` | random shifts in both directions, clear |
| `tb_cfs_control_unit` | phase lengths, clear pulse, start ignored while busy, counter held at the last index |
| `tb_cfs_sorter` | 42 end-to-end sorts at K = 3: permutation, all equal, random full and partial sets, both orders |
| `tb_cfs_sorter_full` | default K = 10: a full 1024-element sort and a 700-element descending sort |

Both sorter testbenches check four things:

* every entry of the sorted array;
* `sorted_count`;
* the write-evaluate length, which must be exactly N;
* the read-sort length, which must be n + a.

`tb_cfs_sorter` also counts each read-sort case (absent, single, duplicate
with the counter held), each order, and full and partial input sets. It
fails if any of them never occurred.

To run a testbench with Verilator 5:

    verilator --binary --timing --assert --timescale 1ns/1ps \
        -y rtl -y tb rtl/cfs_pkg.sv tb/tb_cfs_sorter.sv --top-module tb_cfs_sorter
    ./obj_dir/Vtb_cfs_sorter

Substitute any testbench name. The full-size test builds and runs in
seconds. Lint with `verilator --lint-only -Wall -y rtl rtl/cfs_pkg.sv
rtl/cfs_sorter.sv`. The one remaining warning (SYNCASYNCNET) comes from
using the asynchronous reset in the assertions' `disable iff`.

## Trust and limits

The sorting behaviour, the three read-sort cases and the cycle counts are
checked at K = 3, 4 and 10. Timing has not been analysed. The read-sort
cycle is a long combinational path: counter, K-to-1024 decoder,
1024-input read buses, then an 11-bit add. Its length sets the clock rate,
and no clock rate is claimed. Coarse synthesis of the full 1024-entry top
is slow with open-source tools, because the one-hot selects and AND-OR
buses are elaborated bit by bit.
