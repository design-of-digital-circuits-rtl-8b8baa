# Algorithms to hardware: mean, sort, binary search

This library turns three small software algorithms into sequential
circuits, each split into a **controller** (a finite-state machine written
from an ASMD chart) and a **datapath** (registers, counters, one register
file, one arithmetic unit). The point of each design is to save hardware:
one adder instead of k, one register-file read port, one write port. The
controller then spreads the work over many clock cycles. A fourth, very small
circuit shows how to handle a `Start` input that stays high too long.

| Circuit | Algorithm | Hardware it is limited to |
|---|---|---|
| `mean_unit` | M = (R[0] + ... + R[k-1]) / k | one N-bit adder, one read port, one sequential N-bit divider |
| `sorter` | in-place exchange sort, ascending | one read port, one write port, registers A and B, one comparator |
| `binary_search` | search a sorted array for T | one read port, range registers L and R |
| `start_loop_counter` | count Start pulses | one W-bit register |

All four sit side by side in `algo_hw_top`. They share only `clk` and `rst`.

## Conventions common to all circuits

* One clock, rising edge. `rst` is synchronous and active high. It puts every
  controller in its idle state.
* Handshake: `ready` is 1 only in the idle state. `start` is sampled there.
  `done` is 1 for exactly one cycle when the result is valid. The result is
  then held until the next `start`.
* Each register file is K x N bits. It has a combinational read port: the
  word appears in the same cycle as its address, and a register captures it
  at the next edge. Its single write port writes on the clock edge.
  Consequence: when a counter changes the read address, the new word can only
  be captured one cycle later. Several controller states exist just for that
  reason.
* Defaults: K = 4 words, N = 8 bits. Both are parameters of every module.
  Address width is `$clog2(K)` (1 for K = 1).
* State types live in `algo_pkg`.

## Arithmetic mean (`mean_unit` = `mean_ctrl` + `mean_datapath`)

The sum is formed from the highest address down:
`S = 0; for A = k-1 downto 0: S = S + Reg[A]; M = S / k`.
Counting down means the loop ends on A = 0, which is a plain NOR of the
counter bits (`zero_detect`). No comparison against a constant is needed.

Datapath:

* `down_counter` A: loads k-1 on `Load_regs`, decrements on `Decr_A`.
* `reg_file`: read address A. A separate fill port `wr_*` loads the words.
* Register S: enabled by `Load_regs | Add`. It loads 0 on `Load_regs`,
  otherwise S + Reg[A].
* `seq_divider`: dividend S, divisor the constant k. It is reset by `rst` or
  `Load_regs`, so the previous mean is cleared when a new run starts. Its
  quotient is the output `m`.

Controller states:

| State | Outputs | Next |
|---|---|---|
| S_idle | Ready; Load_regs if Start | S_sum if Start |
| S_sum | Add; Decr_A if not A_zero | S_div_start if A_zero, else stay |
| S_div_start | Divide | S_div once Div_ready, else stay |
| S_div | – | S_done once Div_done, else stay |
| S_done | Done | S_idle |

Timing: if Start is seen in cycle 0, S_sum runs in cycles 1..K and S_div_start
in cycle K+1. The divider is busy for N cycles. Done is high in cycle
**K+N+3**.

S is only N bits wide, like the adder. If the k words add up to 2^N or more,
the sum wraps, and the result is `(sum mod 2^N) / k`. For an exact mean,
either keep the inputs below 2^N / k, or widen S, the adder and the divider
(this means turning the single N parameter into two widths).

`seq_divider` is a restoring shift-and-subtract divider that produces one
quotient bit per cycle. While it is idle or done, `ready` is 1. It captures
its operands when `start` arrives. After N cycles it raises `done` and holds
`q` and `r`. Division by zero gives q = all ones and r = dividend.

## Sorting (`sorter` = `sort_ctrl` + `sort_datapath`)

```
for i = 0 to k-2:  A = Reg[i]
  for j = i+1 to k-1:  B = Reg[j]
    if B < A:  Reg[i] = B;  Reg[j] = A;  A = Reg[i]
```

Datapath multiplexers:

* read address = `Load_B ? j : i`
* write address = `Store_B ? i : j`
* write data = `Store_B ? B : A`
* write enable = `Store_A | Store_B`

Counter i loads 0. Counter j loads i+1. `eq_detect` builds
`i_done = (i == k-2)` and `j_done = (j == k-1)` from XNORs and an AND.

The controller is the hardest part to follow. Two hardware limits set the
cycle count:

1. **A counter must settle before its word can be read.** OuterLoop sets
   j <- i+1 while loading A <- Reg[i] (i is already stable). InnerLoop then
   loads B <- Reg[j]. B is a register, so `B < A` is only valid in the next
   cycle. The extra state **Compare** makes the decision there.
2. **Only one write port.** A swap takes two cycles in **Swap**: Reg[j] <- A,
   then Reg[i] <- B.

**CheckLoops** always reloads A <- Reg[i], which picks up the swapped value.
Then it either advances j (back to InnerLoop), advances i (back to
OuterLoop), or finishes (Done).

Cycles from the Start cycle to the Done cycle:
`(K-1) + 3*K*(K-1)/2 + 2*swaps + 1`.
For the worked example 3 7 1 0 (K = 4, five swaps) this is 32 cycles. The
result is 0 1 3 7.

While `ready` is 1, the register file belongs to the outside world:

* `ext_addr` addresses both ports.
* `ext_we` writes `ext_wdata`.
* `ext_rdata` shows the word.

During a sort, `ext_we` is ignored. Values compare as unsigned.

## Binary search (`binary_search`)

```
L = 0; R = K-1
while L <= R:  m = floor((L+R)/2)
  if A[m] < T: L = m+1   elif A[m] > T: R = m-1   else: found at m
not found
```

Each probe takes two cycles: **Mid** computes m (or ends the search when
L > R), and **Compare** reads A[m] and updates L or R. L and R are signed and
two bits wider than an address, so R = -1 and L = K are represented exactly.

When `done` is high:

* `found` says whether T was found.
* If it was, `index` is its address. With duplicate values, this is
  whichever matching address the search reaches first.

The array must be in ascending unsigned order. Fill it through `wr_*` while
`ready` is 1.

Cost: 2 cycles per probe, plus 1 when the search fails, then the Done cycle.
At most `2*(floor(log2 K)+1)+1` cycles after Start.

## Start loops (`start_loop_counter`)

If a controller went straight from its work state back to idle, a Start held
high for several cycles would run the operation several times. This counter
avoids that with a waiting state:

* S_idle: Ready = 1. Start goes to S_incr.
* S_incr: R <- R + 1.
* S_done: stays there until Start drops, then returns to S_idle.

Each Start pulse, however long, adds exactly one. The mean and sorting
controllers do *not* have this wait. Their Done state returns straight to
idle, so a held Start begins another run. Pulse Start for one cycle there, or
add an S_done-style wait if the surrounding system cannot.

## Where the RTL adds to or departs from the algorithm descriptions

* **Sorter:** the Compare state is added; its reason is given above.
* **Fill and read-back ports:** every register file has one (`wr_*`,
  `ext_*`), so that a system can load data and read results. The sorter's
  ports are multiplexed in the same way as a register-file-access variant of
  its datapath.
* **`seq_divider`:** only its ports (start, dividend, divisor, reset, Q, R,
  ready, done) are fixed by the mean design. The algorithm, the N-cycle
  latency and the held `done` are this implementation's choices.
* **`binary_search`:** the algorithm is given without a datapath, so states,
  ports and widths are this implementation's own.
* **Chosen values:** the defaults K = 4 and N = 8, the synchronous reset, the
  order of the two swap writes and unsigned comparisons are all choices, not
  requirements.

## Files

`rtl/`:

* `algo_pkg.sv`: state types.
* `zero_detect.sv`, `eq_detect.sv`: counter-end detectors.
* `down_counter.sv`, `up_counter.sv`, `reg_file.sv`, `seq_divider.sv`.
* `mean_ctrl.sv`, `mean_datapath.sv`, `mean_unit.sv`.
* `sort_ctrl.sv`, `sort_datapath.sv`, `sorter.sv`.
* `binary_search.sv`, `start_loop_counter.sv`.
* `algo_hw_top.sv`: top level.

`tb/`: one self-checking testbench per module, `tb_<module>.sv`. Each prints
`TB_RESULT checks=<n> failures=<n>` and has a cycle watchdog. Results are
compared with values the testbench computes itself: reference division,
reference sort, a reference binary search, and cycle counts from the formulas
above.

`tb_algo_hw_top` runs the whole top at its default parameters. In each round
it:

1. sorts random words;
2. loads the sorted result into the binary search and searches for every word
   and for random values;
3. computes the mean of the same words;
4. counts one Start pulse.

It also checks that each mechanism happened at least once: swap, compare
without swap, found, not found, sum wrap-around, divider wait and held Start.

## Simulating

Any testbench, with Verilator 5:

```
verilator --binary --timing --assert -Wall -Wno-fatal \
  -y rtl -y tb +libext+.sv -Irtl --top-module tb_sorter \
  rtl/algo_pkg.sv tb/tb_sorter.sv
./obj_dir/Vtb_sorter
```

Replace `tb_sorter` with any other `tb_*` name. `algo_pkg.sv` must be listed
first, because the other files import it. To try other sizes, override `K`
and `N` on the unit. The testbenches for `mean_unit`, `sorter`, `binary_search`, `zero_detect`,
`eq_detect`, `up_counter` and `down_counter` already run non-default sizes.
