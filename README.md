# Fault-tolerant systolic arrays that reuse idle processor cycles

Many systolic arrays are not fully pipelined: with a pipeline period α > 1 every
processor element (PE) works on one clock out of α and idles on the others. Those
idle slots can run a second or third copy of the same computation. Comparing two
copies detects a fault. A majority vote over three copies masks one. Either way
the cost is far below duplicating or triplicating the whole array.

Where the copy of a computation runs decides which faults it catches:

| scheme | the copy runs on | catches |
|---|---|---|
| space shift | another PE, same clock | permanent faults |
| time shift | the same PE, a later clock | transient faults |
| space-time shift | another PE, a later clock | both |

A copy is described by two integers. `k1` shifts it by `k1` PE positions along a
chosen data-dependence direction `d`. `k2` delays it by `k2` clocks. With the time
schedule vector `W`, the copy runs `t = k2 + k1·(W·d)` clocks after the original.
A set of copies is legal when no PE gets two computations in one clock, that is
when the values `k2 mod α` of the copies all differ.

This repository has seven arrays built with this method. They are independent and
sit side by side in `ft_systolic_top`:

| array | computes | α | redundancy | result |
|---|---|---|---|---|
| `tmr_hex_array` | C = A·B (+C0) for band matrices | 3 | space shift, 3 copies, voting | single faults masked |
| `ced_mv_array` | c = A·b (+c0), band A | 1 | space-time shift (or space shift), 2 copies | faults detected |
| `tmr_mv_array` | c = A·b (+c0), band A | 1 | space or space-time shift, 3 copies, voting | single faults masked |
| `ced_alpha2_array` | c = A·b (+c0), band A | 2 | space, time or space-time shift, 2 copies | faults detected |
| `tmr_alpha2_array` | c = A·b (+c0), band A | 2 | space shift plus extra PEs, 3 copies, voting | single faults masked |
| `ced_ts_mv_array` | c = A·b (+c0) | 2 (scaled schedule) | time shift, 2 copies | transient faults detected |
| `tmr_ts_mv_array` | c = A·b (+c0) | 3 (scaled schedule) | time shift, 3 copies, voting | transient faults masked |

All arithmetic is unsigned. Operands are 16 bits (`DATA_W`). Sums are 32 bits
(`ACC_W`) and wrap. Both widths are in `rtl/ft_pkg.sv`.

## 1. TMR hexagonal band matrix multiplier (`tmr_hex_array`)

### The original array

This is the classic hexagonal array for band matrix multiplication. A has `ROWS`
diagonals and B has `COLS` diagonals, 3 and 3 by default. The PEs form a
`ROWS × COLS` grid, drawn here as a rectangle. Row 0 is at the top and column 0
at the left.

* The computation (i, j, k), `c_ij += a_ik·b_kj`, runs in PE(x, y) with
  `x = i−k+ROWS/2` and `y = j−k+COLS/2`, at clock `i+j+k+T0`.
* `a` moves right along a row. `b` moves down a column. The partial sum `c` moves
  up and to the left: the sum leaving PE(x, y) goes next to PE(x−1, y−1).
* Each link has one register, inside the PE (`mac_pe`: a' = a, b' = b,
  c' = c + a·b).
* PE(x, y) works only on clocks t with `t ≡ x + y (mod 3)`, so α = 3.

### Adding the copies

Each computation is copied twice, with `k1 = 1, 2` and `k2 = −1, −2` along the
direction a moves in. That makes the time shift zero. So the computation that
PE(x, y) does at clock t is also done at clock t by PE(x, y+1) and PE(x, y+2).
These PEs would otherwise idle in that clock. Two extra PE columns are enough:
2·ROWS PEs for full TMR, instead of two extra arrays. In every clock each PE has
exactly one *role*:

    r = (x + z − phase) mod 3      0: original, 1: first copy, 2: second copy

Here `phase` = `cycle − 1`. It counts clocks modulo 3 from reset.

The input streams must carry every value once per copy:

* each `a` value enters its row on three clocks in a row;
* each `b` value enters three adjacent columns on the same clock;
* each initial `c` value enters three adjacent bottom-row PEs on the same clock.

### Voters and multiplexers

A `tmr_voter` sits above each original position (x, y) with y < COLS. It takes
the c' registers of PE(x, y), PE(x, y+1) and PE(x, y+2). Most of the time the
three registers hold unrelated work, and the vote means nothing. The vote is
real in the clock right after the original PE(x, y) ran. That is the only clock
in which anything uses it.

A `cycle_mux` feeds the `c` input of every PE outside the bottom row. PE(x, z) in
role r needs the voted sum that the original schedule sends it. That sum comes
from voter (x+1, z+1−r). The multiplexer's input number `phase+1` is wired to that
voter. Every multiplexer then follows the same broadcast `cycle` signal (1, 2, 3,
…, from `cycle_gen`), and in each clock it picks a different voter. A voter
position at column ≥ COLS is off the right edge of the hexagon, and the
right-edge input `c_right_in[x]` takes its place. The bottom row reads
`c_bot_in` directly.

A wrong copy therefore never travels on: only voted sums go from one row to the
next. A single faulty PE, permanent or transient, is outvoted by its two
neighbours. If all three copies differ, the voter passes copy 1 and raises
`no_majority[x][y]`. This flag only counts in the clock where that voter's
triple is real.

### Timing and ports

Results leave through the voters of row 0 (`c_top_out[y]`) and of column 0
(`c_left_out[x]`). The sum c_ij finishes in PE(xl, yl), with
`kl = min(i+ROWS/2, j+COLS/2)`, at edge `i+j+kl+T0`. It is on the output during
the next clock. The redundancy adds no latency and does not change the
throughput. The testbench package `tb/hex_model_pkg.sv` holds the whole schedule
as functions: `a_val`, `b_val`, `cbot_val`, `cright_val` and `exit_of`. It is
the reference for driving the array.

## 2. Pipeline-period-1 matrix-vector array with error detection (`ced_mv_array`)

A linear array of `N` = 5 stages. Stage i keeps vector element `b_i` and adds
`A[j][i]·b_i` to the partial sum of row j as that sum passes through. With α = 1
there are no idle slots, so each stage has two PEs (`mv_pe`):

* the original PE computes `c_in + a·b` and its result waits one more clock in a
  delay register;
* the redundant PE gets `c_in` and `a` through one register each, so it does the
  same computation one clock later (k2 = 1);
* a `matcher` compares the two results. It passes the original on to the next
  stage and raises `err[i]` if they differ.

The extra delay register sits on the sum link between stages, so the check
finishes before the next stage uses the value, and no roll-back is needed. The
link has two registers per stage. This is the same as retiming the schedule from
W = [1, 1] to W = [2, 1]: the throughput stays one row per clock and only the
latency grows. A permanent fault in either PE makes the copies differ. A transient
fault hits only one of the two copies, because they run at different clocks.

Schedule: row j's initial sum goes on `c_in` at clock T0+j. Stage i must see
`a_in[i] = A[j][i]` at clock T0+2i+j. c_j is on `c_out` at clock T0+2N+j. The
vector is loaded into all PEs in parallel with `load_b`.

With `SCHEME = SPACE_SHIFT` the stage is plain duplication instead. Both PEs get
the same `c_in` and `a` on the same clock, and the matcher compares their
registers directly. The link keeps one register per stage. Stage i then sees
row j at T0+i+j, and c_j is on `c_out` at T0+N+j. This catches permanent
faults, and transient faults that hit one of the two PEs. It misses a
disturbance that spoils both PEs of a stage alike. `TIME_SHIFT` is rejected at
elaboration. Neither scheme corrects anything: the original's result moves on
whether or not it matched.

## 3. Pipeline-period-1 matrix-vector array with error masking (`tmr_mv_array`)

This is the array of section 2 with three PEs per stage and a `tmr_voter` in
place of the matcher. Only voted sums go on to the next stage. `SCHEME` sets
when the two copies run:

* `SPACE_SHIFT`: all three PEs run on the same clock. This is conventional TMR.
  The sum link keeps one register per stage, and the latency is unchanged.
* `SPACE_TIME_SHIFT` (the default): copy 1 gets `c` and `a` through one
  register and runs one clock late. Copy 2 gets them through two registers
  and runs two clocks late (k2 = 1 and 2). The original's result waits two
  clocks and copy 1's waits one, so all three reach the voter together. In
  effect two delays are moved onto the sum link, which then has three
  registers per stage. The vote is done before the next stage needs the sum,
  so no roll-back is needed.

`TIME_SHIFT` is rejected at elaboration, because an α = 1 PE has no idle clock.

Schedule: let L = 1 for space shift and 3 for space-time shift. Row j's sum
enters at edge T0+j. Stage i must see `a_in[i] = A[j][i]` at edge T0+L·i+j.
c_j is on `c_out` in the clock before edge T0+L·N+j. The array takes one row
per clock in both schemes.

Either scheme masks one faulty PE per stage, permanent or transient. The
space-time shift also masks a one-clock fault that hits all three PEs of a
stage at once, because those PEs are then working on three different rows.
`no_majority[i]` is raised in any clock where the three results all differ.

## 4. Pipeline-period-2 matrix-vector array (`ced_alpha2_array`)

This is the same product mapped with projection [1, 1]: W = [1, 1], S = [1, −1].
PE p = i − j (offset so that p starts at 0) handles matrix element a_ji at
clock i+j. `b` moves down the array and `c` moves up. For a band matrix with
4 diagonals there are `NO` = 4 PEs, and each works every other clock. The idle
clock runs the copy. `SCHEME` chooses where it runs:

| SCHEME | k1, k2 | copy of (PE p, clock t) runs on | PEs | matcher compares |
|---|---|---|---|---|
| `SPACE_SHIFT` | 1, −1 | PE p+1, clock t | NO+1 | PE p with PE p+1, same clock |
| `TIME_SHIFT` | 0, 1 | PE p, clock t+1 | NO | PE p with itself one clock earlier |
| `SPACE_TIME_SHIFT` | 1, 1 | PE p+1, clock t+2 | NO+1 | PE p two clocks earlier with PE p+1 |

The copies share the links and registers of the original computation. The host
therefore feeds every input twice, once in the original's slot and once in the
copy's. Physical PE q runs its original on clocks `τ ≡ q (mod 2)`. On the other
clocks it runs the copy of node (q−k1, τ−t), where t = k2+k1 is the time shift.
The `node_of` function in `tb/tb_ced_alpha2_array.sv` builds the streams from
this rule.

Matcher p raises `err[p]` in the clock after the copy ran. Matchers stay quiet
for the first t+1 clocks after reset. Faults are only detected here. In the
time-shift and space-time-shift schemes a faulty sum has already moved on by the
time it is caught, and correcting it would need a roll-back, which is not built.
As expected, the time-shift scheme cannot see a permanent fault, because both
copies run in the faulty PE and fail alike. The testbench checks this.

`ft_systolic_top` uses `SPACE_TIME_SHIFT` because it catches both kinds of fault.

## 5. Pipeline-period-2 array with error masking (`tmr_alpha2_array`)

The space-shift array of section 4 already runs two copies of everything on
the same clock, in PEs p and p+1. A third copy needs one more PE per
computation. An extra PE sits beside every odd-numbered PE and repeats
exactly what that PE does: same `a`, same `b`, same `c` input. Every
computation runs in a pair (p, p+1), and exactly one PE of the pair is odd,
so every computation runs three times on one clock. With `NO` = 4 that costs
the space-shift PE plus 2 extra PEs, about 50 percent more.

Voter p takes the sums of PE p, PE p+1 and the extra PE beside the odd one
of the two. Its vote is real in the clock after PE p ran its original. The
`c` input of each PE is a two-way multiplexer on the clock parity. In its
original slot, PE q takes vote q−1. In its copy slot, it runs the copy of
node q−1 and takes vote q−2. So only voted sums move between PEs, much as in
the hexagonal array.

One input needs care. The copy slot of PE 1 needs the same initial sum that
PE 0 used one clock earlier. The detection array lets that value pass through
PE 0's idle slot. Here it comes from a separate register on `c_in`
(`c_in_d`), because otherwise a fault in PE 0 would spoil two of the three
copies of its own work.

The host feeds the same streams as for the space-shift detection array.
`c_out` is the vote of the top original PE. It is real in the clock after
that PE ran, which is one clock earlier than the detection array, whose
results pass the extra top PE. `no_majority[p]` is raised in a live clock of
voter p where all three copies differ. The fault inputs are `fault_xor[q]` for
the main PEs and `x_fault_xor[k]` for the extra PE beside PE 2k+1.

## 6. Scaled-schedule matrix-vector array with time shift (`ced_ts_mv_array`)

This is the linear array of section 2 with one PE per vector element and no
extra PEs. Its schedule is scaled by two, W = [2, 2] instead of [1, 1]. Every PE
now idles every other clock and every sum link has two registers. The idle
clock repeats the computation in the same PE one clock later (k1 = 0, k2 = 1).

Stage i holds `b_i` in one `mv_pe`. The PE computes `c_in + a·b_i` on an even
clock and again, on the same inputs, on the next odd clock. A hold register `d`
keeps the first result. A `matcher` compares `d` with the second result and
raises `err[i]` if they differ. `d` is also the sum passed to stage i+1. The
time shift (1) is smaller than the link delay (2), so the check ends before the
next stage uses the value.

Schedule: row j's initial sum goes on `c_in` at clocks T0+2j and T0+2j+1, with
T0 even. Stage i must see `a_in[i] = A[j][i]` at clocks T0+2(i+j) and
T0+2(i+j)+1. c_j is on `c_out` in the clock before edge T0+2(N+j). The array
takes one row every two clocks. `err[i]` counts only in the clocks with an even
edge count, when `d` holds an original and the PE holds its copy.

This scheme catches transient faults only. A permanent fault spoils both runs in
the same way, so the results are wrong and no error is raised. Both testbenches
check this.

## 7. Schedule scaled by three: time-shift voting (`tmr_ts_mv_array`)

Scaling the same array by three, W = [3, 3], leaves each PE idle on two clocks
out of three and puts three registers on every sum link. Both idle clocks
repeat the computation in the same PE (k1 = 0, k2 = 1 and 2), so a voter can
mask a transient fault with no extra PE. The largest shift (2) is smaller than
the link delay (3), so the vote is done before the next stage needs the sum.

Stage i runs row j on edges e, e+1 and e+2 on the same inputs. Two hold
registers keep the first two results. In the clock after edge e+2 a
`tmr_voter` takes run 1, run 2 and run 3. The vote drives the next stage's sum
input directly in that clock and is caught in a register `v` for the next two
clocks. So stage i+1 runs all three copies of row j on the voted sum, and a
wrong run never leaves its stage.

Schedule: row j's initial sum is on `c_in` at edges T0+3j to T0+3j+2, with T0 a
multiple of 3. Stage i must see `a_in[i] = A[j][i]` on edges T0+3(i+j) to
T0+3(i+j)+2. c_j is on `c_out` in the clock before edge T0+3(N+j) and in the
two clocks after it. Originals run on edges whose count since reset is a
multiple of 3. `no_majority[i]` is raised in a vote clock where all three runs
differ; the vote then passes run 1.

One transient fault per triple is masked, and the results stay correct. A
permanent fault spoils all three runs alike: it goes through unmasked and
unflagged. Both testbenches check this.

## Cost of the redundancy at the default sizes

| array | original PEs | extra PEs | other extra logic | extra latency |
|---|---|---|---|---|
| TMR hex, 3×3 | 9 | 6 | 9 voters, 10 multiplexers | 0 |
| α = 1, N = 5, space-time shift | 5 | 5 | 5 matchers, 3 registers per stage | 1 clock per stage |
| α = 1, N = 5, space shift (duplication) | 5 | 5 | 5 matchers | 0 |
| α = 1 voting, N = 5, space-time shift | 5 | 10 | 5 voters, 7 registers per stage | 2 clocks per stage (0 for space shift) |
| α = 2 voting, NO = 4 | 4 | 3 | 4 voters, 4 two-way multiplexers, 1 register | none |
| α = 2, NO = 4, space-time shift | 4 | 1 | 4 matchers, 2-deep history per matcher | 1 clock (results pass the extra top PE) |
| scaled time shift, N = 5 | 5 | 0 | 5 matchers, 5 hold registers | none beyond the scaled schedule; half the throughput of section 2 |
| scaled time-shift voting, N = 5 | 5 | 0 | 5 voters, 15 registers | none beyond the scaled schedule; a third of the throughput of section 2 |

## Fault-emulation inputs

Every PE has a `fault_xor` input, brought out as `hex_fault_xor`, `mv_fault_xor`,
`m1_fault_xor`, `p2_fault_xor`, `a2_fault_xor`, `a2_x_fault_xor`, `ts_fault_xor` and `tm_fault_xor`. It is XORed into the PE's sum register:

* a constant nonzero mask models a permanent fault;
* a mask held for one clock models a transient fault.

Tie all of these inputs to zero in normal use.

## Where this design makes its own choices

* Word widths, unsigned wrap-around arithmetic, and the asynchronous active-low
  reset to zero.
* The voter works on whole words. Its tie rule (pass copy 1, raise
  `no_majority`) is this design's own.
* The multiplexer wiring follows from the schedule. The rectangular drawing of
  the original TMR array is not used as a wiring list.
* The right-edge sum input `c_right_in` of the hexagonal array.
* In the α = 1 array, the redundant PE's `a` goes through a one-clock register,
  and `b` is loaded in parallel.
* The α = 2 matchers, their placement, and their start-up blanking.
* In the scaled time-shift arrays, the hold registers, the vote register `v`,
  and where the matcher and the voter sit.
* In the α = 2 voting array, the extra PEs sit beside the odd PEs. The even
  PEs would do as well. The voter placement, the multiplexers and the
  `c_in_d` register are also this design's own. The overhead is counted as
  about 50 percent, which is the figure quoted for this scheme. A formula
  sometimes given for it adds a whole array's worth of PEs instead.
* In the α = 1 voting array, the registered copies of `c` and `a`, and the
  choice of k2 = 1 and 2 for the two copies.
* The choice of k2 = 1 and 2 for the scaled voting array, and applying time-shift
  voting to the matrix-vector array at all. The method says only that time
  shift masks transient faults with no extra hardware, given enough delays on
  the sum link.
* The fault-emulation inputs.
* Not built: the roll-back that would correct faults found after a result has
  moved on, and the host that formats the skewed, repeated input streams. The
  testbenches generate those streams.

## Parts of the method not built

* The pseudo space-time-shift masking for α = 2. It runs the space-time
  shift of section 4 plus a whole extra array. Its copies run up to two
  clocks apart, and the sum link of this array has no spare delay, so
  correcting a fault would need the roll-back.
* Space-time-shift copies without delay transfer, for α = 1. They would need
  a roll-back.
* The roll-back that corrects a fault found after its result has moved on.
  This affects section 4's time-shift and space-time-shift schemes.
* Time-shift and space-time-shift masking on the hexagonal array. They need
  extra delays on its sum links first.
* Detection-only variants of the hexagonal array, with one copy and a matcher.
  The voting array covers them.

## Simulating

Every testbench checks itself. It prints `TB_RESULT checks=<n> failures=<n>`,
and a watchdog ends a run that hangs. For example, the end-to-end test of all
seven arrays at their default sizes:

    verilator --binary --timing -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/ft_pkg.sv tb/hex_model_pkg.sv tb/tb_ft_systolic_top.sv \
        --top-module tb_ft_systolic_top
    ./obj_dir/Vtb_ft_systolic_top

It runs four jobs: fault-free, permanent faults, transient faults, and two faults
in one voting triple. Every result is compared with a plain-loop reference, at
the clock the schedule predicts. The test also counts each mechanism (every
value of `cycle`, masked permanent and transient faults, no-majority votes,
detected permanent and transient faults, vector loads, and the
wrong results that the time-shift schemes cannot see). A mechanism that never
happens counts as a failure.

Each block also has its own testbench, `tb/tb_<module>.sv`. Swap the file names
in the command above to run one. `tb_tmr_hex_array` and `tb_ced_alpha2_array`
also cover the transient-fault and no-majority cases, `tb_ced_alpha2_array`
runs all three of its schemes side by side, and `tb_ced_mv_array` and
`tb_tmr_mv_array` each run both of their schemes.

In the top, `MV_SCHEME`, `M1_SCHEME` and `P2_SCHEME` choose the scheme of the
arrays that offer more than one. The end-to-end test uses the defaults.

## Files

* `rtl/ft_pkg.sv`: widths, the `cycle_t` and `redundancy_t` types
* `rtl/mac_pe.sv`, `rtl/mv_pe.sv`: processor elements
* `rtl/tmr_voter.sv`, `rtl/cycle_mux.sv`, `rtl/cycle_gen.sv`, `rtl/matcher.sv`:
  voting, routing and checking
* `rtl/tmr_hex_array.sv`, `rtl/ced_mv_array.sv`, `rtl/ced_alpha2_array.sv`,
  `rtl/tmr_mv_array.sv`, `rtl/tmr_alpha2_array.sv`, `rtl/ced_ts_mv_array.sv`,
  `rtl/tmr_ts_mv_array.sv`: the seven arrays
* `rtl/ft_systolic_top.sv`: all seven side by side
* `tb/`: one testbench per module, plus `hex_model_pkg.sv` (the schedule and
  reference model of the hexagonal array)
