# Fixed-priority and round-robin bus arbiters

When several masters on a shared bus (a CPU, a DMA engine, a peripheral
controller) ask for the bus in the same cycle, an arbiter must pick exactly one.
This RTL gives three small arbiters for four requesters (Request 0 to 3), all
parameterised by the number of requesters `N`:

| arbiter | module | policy | grant form | latency |
|---|---|---|---|---|
| scanning fixed priority | `fixed_priority_arbiter` | Request 0 > 1 > 2 > 3, always | index, registered | 1 clock |
| arithmetic fixed priority | `fixed_priority_arbiter_improved` | Request 0 > 1 > 2 > 3, always | one-hot and index, combinational | same cycle |
| round robin | `round_robin_arbiter` | priority rotates to the requester after the last winner | index, registered | 1 clock |

Fixed priority is the cheapest and gives the top requester a bounded response
time, but a busy high-priority master can starve the others forever. Round robin
removes that starvation: a requester that keeps its request up is served within
`N` cycles.

`arbiter_top` puts the three side by side. They share one clock and one
active-low reset. Each arbiter has its own request input and grant output.

## Fixed priority by scanning

`fixed_priority_arbiter` walks the request vector from bit 0 upward. The first
set bit wins, and its index is loaded into the `grant` register on the rising
clock edge. The winner is therefore visible one cycle after the request.

- Reset is synchronous: with `rstn` low at a clock edge, `grant` becomes 0.
- With no request active, `grant` is also 0.

Example vectors (written `req[3:0]`):

| req | grant |
|---|---|
| 1001 | 0 |
| 1101 | 0 |
| 1110 | 1 |
| 1010 | 1 |
| 1000 | 3 |

## Fixed priority by arithmetic: `req & ~(req - 1)`

`fixed_priority_arbiter_improved` computes the same winner without a scan or
a register.

Subtracting 1 from a binary number turns its lowest 1 into a 0. It also turns
every 0 below that bit into a 1. Bits above it do not change. After inverting:

- the bits above the lowest 1 are the complement of `req`, so ANDing them with
  `req` gives 0;
- the bits below it become 0 again;
- the lowest 1 itself comes back as a 1.

The AND with `req` therefore leaves only the lowest set bit: a one-hot grant.

```
req            1110
req - 1        1101
~(req - 1)     0010
req & ~(...)   0010   -> Request 1
```

For `req = 0` the subtraction wraps to all ones, its inverse is all zeros, and
the grant is 0, so no special case is needed. The cost is one `N`-bit
decrement, an inverter row and an AND row. The carry chain of the decrement
does the priority search.

Ports and timing:

- `grant[N-1:0]` is the one-hot result.
- `grant_idx` is its binary index, 0 when nothing requests.
- Both follow `req` in the same cycle, because there is no clock.
- While `rstn` is low, `grant` is forced to zero combinationally.

Built-in assertions check two things: the grant is one-hot or zero, and it
never names a bit that did not request.

## Round robin

`round_robin_arbiter` keeps the last winner in a `grant` register. On each
clock edge it:

1. sets `NEXT = (grant + 1) mod N`, the requester that now has top priority;
2. searches `req[NEXT], req[NEXT+1], …` and wraps from `N-1` to 0;
3. loads the first active index into `grant`.

If nothing requests, `grant` keeps its value. Reset loads `N-1` (3 for four
requesters). This makes `NEXT = 0`, so Request 0 has the highest priority in
the first cycle after reset.

The wrapping search reuses the arithmetic fixed-priority arbiter:

```
req_rot[i] = req[(i + NEXT) mod N]          rotate so requester NEXT is bit 0
rot_idx    = index of lowest set bit of req_rot   (req & ~(req-1) arbiter)
winner     = (NEXT + rot_idx) mod N         undo the rotation
```

The registered value is `winner` when `req_rot` is nonzero. Otherwise the old
grant is kept. Because the highest-priority position moves one step past each
winner, a requester that keeps its request up is granted within `N` cycles.
With all four requesting, the grant runs 0, 1, 2, 3, 0, …

After reset, the following sequence gives the grants below, each one cycle
after its request:

| req | grant |
|---|---|
| 1101 | 0 |
| 1111 | 1 |
| 1110 | 2 |
| 1100 | 3 |

Under fixed priority, `1111` would give Request 0. Here it gives Request 1,
because Request 0 was served in the cycle before.

## Interface summary

All arbiters have `parameter int unsigned N = arb_pkg::NUM_REQ` (4). Their index
outputs are `$clog2(N)` bits wide, and at least 1 bit.

| module | ports |
|---|---|
| `fixed_priority_arbiter` | `clk`, `rstn`, `req[N-1:0]`, `grant[IDXW-1:0]` |
| `fixed_priority_arbiter_improved` | `rstn`, `req[N-1:0]`, `grant[N-1:0]`, `grant_idx[IDXW-1:0]` |
| `round_robin_arbiter` | `clk`, `rstn`, `req[N-1:0]`, `grant[IDXW-1:0]` |
| `arbiter_top` | `clk`, `rstn`, `req_fp`/`grant_fp`, `req_fpi`/`grant_fpi`/`grant_fpi_idx`, `req_rr`/`grant_rr` |

`arb_pkg` holds `NUM_REQ` and the helper `idx_width()`.

At the default size, `arbiter_top` synthesises to about 47 word-level cells
and 4 flip-flop bits: 2 for each registered arbiter.

## Where this RTL goes beyond or differs from its source description

The algorithms, the four-requester size, the priority order, the reset values
(0 for fixed priority, 3 for round robin) and the latencies all follow the
published description of these arbiters. The following points are this
design's own reading or choice:

- **Index grant with no request.** Both index-output arbiters have no "valid"
  flag, as described. Fixed priority reports 0 when idle. Round robin holds its
  last value. A bus that must tell "Request 0 granted" from "nobody granted"
  should also look at `|req`, or use the one-hot output of the arithmetic
  arbiter.
- **Output of the arithmetic arbiter.** It was described with both a 2-bit
  index and a one-hot result. Both are provided.
- **No clock on the arithmetic arbiter.** It was described both as clocked and
  as producing its result in the same cycle. The same-cycle behaviour is kept,
  so the module has no clock port and gates its output with `rstn`.
- **Round-robin structure.** Only a sequential search loop was given. The
  rotate / fixed-priority / un-rotate datapath is an equivalent implementation.
  It reflects the statement that the round-robin arbiter builds on the
  fixed-priority one.
- **Generic `N`.** Only `N = 4` is described. Other sizes are this design's
  generalisation. The testbenches also check `N = 5`, which exercises the
  non-power-of-two wrap.
- **Top level.** No system combining the three arbiters was described.
  `arbiter_top` only places them next to each other.
- **One published vector corrected.** One published expected result gives
  Request 3 for `1010`. The priority rule, and the text around that result,
  give Request 1. The tests expect 1.

## Verification

Every testbench checks itself and prints `TB_RESULT checks=N failures=M`. Each
also has a watchdog that ends the run with a failure if it hangs.

- `tb_fixed_priority_arbiter`: checks the `N=4` and `N=5` instances.
  - The example vectors plus 300 random ones.
  - The grant must not change before the clock edge.
  - The grant must be the lowest set bit after the edge.
  - Synchronous reset.
- `tb_fixed_priority_arbiter_improved`: checks every request value for `N=4`
  and `N=5`.
  - The worked example `1110 -> 0010`.
  - Reset gating.
- `tb_round_robin_arbiter`: compares against a search-loop model.
  - The sequence after reset.
  - Rotation and wrap-around with all requesting.
  - Holding the grant when idle.
  - Reset to `N-1`.
  - Random traffic.
  - A starvation check: requests held until served must be served within `N`
    cycles.
- `tb_arbiter_top`: runs the full design at its default size (`N=4`, no
  parameter overrides).
  - The example vectors on all three arbiters.
  - 2000 random cycles with a reset in the middle.
  - Counts how often each behaviour occurred: contention, the one-cycle versus
    same-cycle latency difference, round-robin rotation, wrap from 3 to 0, idle
    hold and reset. It fails if any count is zero.

To run one with plain Verilator:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/arb_pkg.sv tb/tb_arbiter_top.sv --top-module tb_arbiter_top
./obj_dir/Vtb_arbiter_top
```

To run another testbench, replace `tb_arbiter_top` with its name. To lint a
module:

```
verilator --lint-only -Wall -Irtl -y rtl +libext+.sv rtl/arb_pkg.sv rtl/round_robin_arbiter.sv
```

## Changing it

- **Number of requesters.** Set `N` on any arbiter, or change `arb_pkg::NUM_REQ`
  for all of them.
- **Registered output for the arithmetic arbiter.** Put a flop stage after
  `fixed_priority_arbiter_improved`.
- **Single-cycle round robin.** Replace the `always_ff` assignment with a
  combinational output and keep only the pointer in a register.

Neither variant is included here.
