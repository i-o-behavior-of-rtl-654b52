# A linear systolic sorter that loads and unloads only at its ends

Systolic arrays are chains or grids of identical small processors, each
talking only to its neighbours. They are easy to lay out and fast. Getting
data in and results out is usually the awkward part, because results end up
spread over every processor. This design is a sorter for sets of N numbers.
It solves that problem with two control bits that travel alongside the data.

- Numbers enter only at the leftmost processor, one per clock tick.
- Results leave only at the rightmost processor, in ascending order, on N
  consecutive ticks.
- No processor needs to be cleared between sets.
- A new set may enter every N ticks, so while one set is still being unloaded
  the next is already being sorted.

The architecture comes from a space-time derivation of bubble sort. Processor
`j` works on point `[i, j]` of the algorithm's index space at tick
`t = i + j - 1`. The index space is extended with an extra triangle of
"forwarding" points, so that every result's path ends at the last processor.
The RTL is that derived array, with the gaps the derivation leaves filled in
as described under "Choices made here" below.

## How a set moves through the array

Each processor `sort_pe` has one accumulator, one registered data output and
a one-bit phase. For a given set, processor `j` (1-based) goes through four
steps, all driven by the control bits:

| tick(s) | what the processor does | marked by |
|---|---|---|
| `2j-1` | **diagonal**: loads the accumulator with its first input, compares nothing | `first` |
| `2j` .. `N+j-2` | **compare**: keeps `max(acc, in)` and sends `min(acc, in)` to the right | phase = `PH_COMPUTE` |
| `N+j-1` | **transition**: one last compare-exchange; the accumulator now holds this processor's result | `last` |
| `N+j` .. `N+2j-1` | **forward**: sends its own result, then the results of processors `j-1, …, 1`, each crossing the processor in two ticks | phase = `PH_FORWARD` |

At the end of a set, processor 1 holds the largest number, processor `N` the
smallest, and processor `j` the `j`-th largest. This is the usual
compare-exchange chain: the larger values stay behind and the smaller ones
move on.

The unloading is the part that needs explaining. Processor `N` finishes
first, in tick `2N-1`, and sends its own value (the minimum) in tick `2N`.
Processor `j` finishes in tick `N+j-1`, and its result then needs `N-j`
more hops. In forwarding mode each processor delays a value by two ticks,
through its accumulator and then its output register. So the result of
processor `j` is written into processor `N`'s output register in tick
`(N+j) + 2(N-j) = 3N-j`. Results are therefore written in consecutive ticks
`2N … 3N-1`, and are on `dout` one tick later. They come in order of `j`
from `N` down to 1, which is ascending order. The delay has to be exactly two: the
results are `N-j` hops from the output but finish only one tick apart.

The last forwarded value leaves processor `j` in tick `N+2j-1`. The next set's
first element can reach processor `j` in that same tick. So a processor that
sees `first` still sends its old accumulator, and the two sets' windows line
up with no gap.

### Example, N = 3, two sets back to back

Set A = (4, 9, 2) enters in ticks 1 to 3, and set B = (7, 3, 8) in ticks 4 to 6.
Each column below shows a processor's `acc/out` after the clock edge that ends
the tick:

| tick | din, first, last | P1 | P2 | P3 | `first_out` after the edge |
|---|---|---|---|---|---|
| 1 | 4, 1, 0 | 4/– | | | |
| 2 | 9, 0, 0 | 9/4 | | | |
| 3 | 2, 0, 1 | 9/2 | 4/– | | |
| 4 | 7, 1, 0 | 7/**9** | 4/2 | | |
| 5 | 3, 0, 0 | 7/3 | 9/4 | 2/– | |
| 6 | 8, 0, 1 | 8/7 | 3/9 | 4/**2** | 1 |
| 7 | | –/8 | 7/3 | 9/**4** | |
| 8 | | | 8/7 | 3/**9** | |
| 9 | | | | 7/**3** | 1 |
| 10 | | | | 8/**7** | |
| 11 | | | | –/**8** | |

Set A comes out as 2, 4, 9 in ticks 7 to 9 (`2N+1 … 3N`), and set B as 3, 7, 8
three ticks later. In tick 4, processor 1 starts set B while its output still
carries set A's maximum. That overlap is what allows the N-tick period.

## Control signals

Each control bit is a marker that travels diagonally through space-time. How
fast it travels is set by the line in the index space that it marks:

- **`first`** marks the diagonal `i = j`, which reaches processor `j` at tick
  `2j-1`. It moves one processor every two ticks, so each processor delays it
  by two registers. It enters with `x1`.
- **`last`** marks the boundary `i = N`, where compare-exchange gives way to
  forwarding. It reaches processor `j` at tick `N+j-1`. It moves one processor
  per tick, so each processor delays it by one register. It enters with `xN`.

Forwarding needs no end marker: a processor keeps forwarding until the next
`first` reaches it. When both bits arrive together (always the case at
processor `N`, and at every processor if `N = 1`), the set is loaded and the
phase goes straight to forwarding.

After `N` processors, `first` has been delayed by `2N` ticks. It leaves the
array together with the smallest result, so `first_out` marks the start of
each sorted output set.

## Interface and timing (`systolic_sorter`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | one tick per rising edge |
| `rst_n` | in | 1 | synchronous active-low reset |
| `din` | in | `W` | next number of the current set |
| `first_in` | in | 1 | `din` is the set's first number |
| `last_in` | in | 1 | `din` is the set's last (`N`-th) number; must be exactly `N-1` ticks after `first_in` |
| `dout` | out | `W` | registered output of processor `N` |
| `first_out` | out | 1 | `dout` is the smallest number of a set; the next `N-1` ticks carry the rest, ascending |
| `last_out` | out | 1 | `last_in` delayed by `N` ticks |

Parameters:

- `N` (default 8) is the number of processors, which is also the set size.
- `W` (default 16) is the data width.

Latency and throughput:

- If `x1` is on `din` in tick 1, the smallest result is on `dout` in tick
  `2N+1` and the largest in tick `3N`.
- A new set may start in tick `N+1` or in any later tick. Idle ticks between
  sets are allowed, and `din` is ignored during them.
- No reset is needed between sets. Reset matters only at power-up, where it
  clears the control and phase registers so that no spurious set starts.

An assertion in `systolic_sorter` checks the set length: `last_in` must come
exactly `N-1` ticks after `first_in`, and never alone.

`sort_pe` has the same ports for one processor: `d_in`, `first_in`,
`last_in`, `d_out`, `first_out` and `last_out`. Its data output is delayed
one tick, `first` two ticks, and `last` one tick.

## Files

- `rtl/sorter_pkg.sv` holds the phase type `phase_t` (`PH_COMPUTE`, `PH_FORWARD`).
- `rtl/sort_pe.sv` is one processor.
- `rtl/systolic_sorter.sv` is the top level: the chain of `N` processors and
  the set-length assertion.
- `tb/tb_sort_pe.sv` checks one processor against a specification written in
  terms of sets, not registers. It runs 400 sets of random length with random
  gaps.
- `tb/sorter_bench.sv` is the stimulus and checker shared by the end-to-end
  tests. It feeds random, tied, ascending, descending and extreme-valued
  sets, both back to back and after idle ticks, and it checks:
  - the sorted values;
  - the `2N`-tick latency of every set;
  - that results come out on consecutive ticks;
  - the delay of `last`.

  Each kind of set and each kind of gap is counted, and a count of zero fails
  the test.
- `tb/tb_systolic_sorter.sv` runs the sorter at its default size (`N = 8`,
  `W = 16`, no overrides) on 150 sets.
- `tb/tb_sorter_sizes.sv` runs sorters with `N = 1`, `2` and `5` side by side.

Each testbench ends with a line `TB_RESULT checks=<n> failures=<n>`.

## Simulating

```sh
verilator --binary --timing --assert -Wall -y rtl -y tb \
    rtl/sorter_pkg.sv tb/tb_systolic_sorter.sv --top-module tb_systolic_sorter
./obj_dir/Vtb_systolic_sorter
```

Use `tb_sort_pe.sv` / `tb_sort_pe` or `tb_sorter_sizes.sv` / `tb_sorter_sizes`
in the same way. The package has to come first on the command line. Every
test finishes in well under a second.

## Choices made here

The derivation fixes the schedule, the processor assignment, the three
phases, the two control signals and where results leave. It leaves the
following open, and this design fills it in:

- **The transition tick.** The derived recurrence gives only the kept
  (larger) value at the boundary `i = N`. The right neighbour still needs
  the smaller value for its own last comparison. So the transition sends
  `min` on and keeps `max`, and the processor's own result goes out one tick
  later. This one-tick shift is why the diagonal tick also forwards.
- **The two-tick forwarding delay** uses the accumulator as its first
  register, so no extra storage is needed.
- **Order of the output.** The smallest value comes first. This follows the
  derivation's output recurrence, where the last processor sends its own
  value first and processor 1's value last.
- **Which line is which.** The derived array has one data line and two
  control lines between neighbours. Their names and order here (`d`, `first`,
  `last`) are this design's own.
- **Width, comparison and reset.** Data is `W`-bit unsigned. On a tie the
  incoming value counts as the larger, which does not affect the sorted
  output. Reset is synchronous and active-low, and clears every register.
- **Default size.** `N = 8` matches the size of the index-space drawings the
  derivation uses. The derivation itself keeps `N` symbolic.
- **Idle ticks between sets** are accepted. The derivation only considers
  sets that arrive every `N` ticks or later.

Two simpler sorters often used to motivate this one are not included:

- a chain that must be padded with `N` copies of +infinity and globally
  cleared to -infinity between sets;
- a one-control variant.

## Changing it

- **Changing `N` or `W`.** Both are free parameters. Every processor is
  identical and the array has no global wires apart from clock and reset.
- **Signed data.** Declare the comparison in `sort_pe` as signed.
- **Descending order.** Swap `lo` and `hi` in `sort_pe`.
- **Sets shorter than `N`.** They are not supported: the schedule assumes
  exactly `N` numbers, and the assertion flags any other length. To sort
  fewer numbers, pad the set with the largest `W`-bit value. The pads then
  come out last.
