# Fair chance round robin arbiter

When several requesters compete for one shared resource (a bus, or an
output port of a packet switch), an arbiter has to pick one of them every
cycle. It should answer in the same cycle, never leave a requester waiting
forever, and never leave the resource idle while someone is asking. This
arbiter does that with a rotating token and a set of fixed-priority encoders:
the token says which requester has the highest priority this cycle, and the
encoder that starts at that requester chooses the winner. The token moves on
every cycle, so every requester holds it once every N cycles. A request that
stays up is therefore granted after at most N-1 cycles of waiting.

The main configuration has eight request lines. They are served by two
four-request arbiters working side by side, and a select input chooses which
group of four is arbitrated in a given cycle.

## How one arbitration is made

For N requesters the bus arbiter (`fcrra_bus_arbiter`) contains:

* **A token ring** (`fcrra_ring_counter`). This is an N-bit one-hot register.
  After reset, bit 0 holds the token. On every clock edge with `en` high the
  token moves from bit i to bit i+1, and from bit N-1 back to bit 0.
* **N priority blocks** (`fcrra_priority_logic`). Block k gives request k the
  highest priority, then k+1, k+2, and so on, wrapping round to k-1, which
  has the lowest. For N = 4:

  | block | order, highest first |
  |-------|----------------------|
  | 0     | 0, 1, 2, 3           |
  | 1     | 1, 2, 3, 0           |
  | 2     | 2, 3, 0, 1           |
  | 3     | 3, 0, 1, 2           |

* **An enable per block from the token.** Block k is enabled only while
  token bit k is set. Exactly one block is enabled in a cycle, so the grant
  is the OR of all block outputs.

The result is as follows. If the token holder requests, it wins. If it does
not, the slot is not wasted: the next requester after it in circular order
wins. In both cases the token moves one position at the clock edge. It does
not jump to the winner. This is what bounds the wait. Take a requester three
positions after the token in a four-request arbiter. It may lose three
cycles to requesters ahead of it. By the fourth cycle it holds the token, so
it wins.

Example with N = 4, token at 2, and requests 0 and 1 active. Requests 2 and
3 are idle, so block 2 scans 2, 3, 0 and grants request 0. Next cycle the
token is at 3. If request 1 is still up, block 3 scans 3, 0, 1 and grants
it, unless request 0 has asked again.

## The eight-request arbiter

`fcrra_8x8` splits its request lines into `GROUPS` groups of `GROUP_REQS`
(defaults: 2 groups of 4). Group g owns `req[4g+3:4g]` and drives the
grants with the same indices. Each group has its own bus arbiter and its
own token.

| en | sel | grant                                          |
|----|-----|------------------------------------------------|
| 0  | x   | none                                           |
| 1  | 0   | `gnt[3:0]` = round robin over `req[3:0]`; `gnt[7:4]` = 0 |
| 1  | 1   | `gnt[7:4]` = round robin over `req[7:4]`; `gnt[3:0]` = 0 |

Only the selected group's token moves. A group that is not selected keeps
its place in the rotation, so inside each group the N-1 bound still holds,
counted in cycles where that group is selected.

Fairness *between* the groups is up to whoever drives `sel`. The arbiter
does not switch to the other group when the selected group has no request:
that cycle is idle. For fair sharing across all eight lines, drive `sel`
from a counter that alternates between the groups. If `sel` alternates every
cycle, a held request then waits at most one cycle for its group's turn plus
three of its group's turns, two cycles each: 7 cycles. This bound follows from
the structure and was not simulated.

The module is parameterized, so the same structure gives 16 lines
(`GROUPS=4`, 2-bit `sel`), 32 lines, and so on.

## Interfaces and timing

| module | ports | timing |
|--------|-------|--------|
| `fcrra_priority_logic #(N, HIGH)` | `en`, `req[N-1:0]` → `gnt[N-1:0]` | combinational |
| `fcrra_ring_counter #(N)` | `clk`, `rst_n`, `advance` → `token[N-1:0]` | token registered; moves one edge after `advance` |
| `fcrra_bus_arbiter #(N=4)` | `clk`, `rst_n`, `en`, `req` → `gnt`, `token` | `gnt` combinational from `req`, `en` and the token register |
| `fcrra_8x8 #(GROUP_REQS=4, GROUPS=2)` | `clk`, `rst_n`, `en`, `sel`, `req[7:0]` → `gnt[7:0]`, `token[7:0]` | same as the bus arbiter |

* Reset is asynchronous and active low.
* A grant appears in the same cycle as its request. There is no pipeline
  register.
* `gnt` is one-hot or all zero.
* `token` is an observation port. It shows each group's token side by side.
* `fcrra_pkg` holds the default sizes.
* Assertions in the RTL check three rules:
  * at most one grant;
  * no grant without a request;
  * no idle cycle while an enabled arbiter has a request.

## Design choices and limits

These points come from this implementation. They are not taken from the
arbiter's original description.

* **Token moves every enabled cycle.** It moves whether or not its holder
  was granted, and even when nobody requests. This reading is what gives the
  N-1 wait bound.
* **`en` and `sel`.** `en` is a global enable. `sel` is an external input
  and chooses one group per cycle. The token of a group that is not selected
  is frozen.
* **Reset.** After reset, every group's token is at its request 0.
* **Arbitration only.** The crossbar, the packet queues and the switch around
  the arbiter are not part of this RTL. They are the context an arbiter like
  this is used in.
* **Test coverage.** The arbiter's logic was checked in simulation, against
  reference models written independently of the RTL. Clock frequency, area
  and power were not measured.

## Simulation

Each testbench checks itself and ends with a line `TB_RESULT checks=N
failures=M`. To run one with Verilator, for example the eight-request test at
default size:

```
verilator --binary --timing --assert \
  rtl/fcrra_pkg.sv rtl/fcrra_priority_logic.sv rtl/fcrra_ring_counter.sv \
  rtl/fcrra_bus_arbiter.sv rtl/fcrra_8x8.sv tb/tb_fcrra_8x8.sv \
  --top-module tb_fcrra_8x8 -o sim && ./obj_dir/sim
```

| testbench | what it covers |
|-----------|----------------|
| `tb_fcrra_priority_logic` | all request patterns, enable on and off, N=4 with HIGH=0..3, and N=5 |
| `tb_fcrra_ring_counter` | reset value, rotation, wrap-around, hold; N=4 and N=5 |
| `tb_fcrra_bus_arbiter` | random held requests on N=4 and N=6; grant and token every cycle; wait bound N-1 reached and never exceeded |
| `tb_fcrra_8x8` | default 8-line arbiter end to end |
| `tb_fcrra_mxm` | 16 lines in four groups, 2-bit `sel` |

`tb_fcrra_8x8` uses random enable and select, all-request bursts, and a
reference model. It counts each case and fails if one never occurs:

* disabled cycles;
* grants in each group;
* the token holder winning;
* a later requester winning past an idle holder;
* the selected group idle while the other one requests;
* the token wrapping in each group;
* the worst-case wait.

To change the size, set `N` on `fcrra_bus_arbiter`, or `GROUP_REQS` and
`GROUPS` on `fcrra_8x8`. The `sel` width follows from `GROUPS`. Group sizes of
4, 5 and 6 requesters are tested. Powers of two keep `sel` fully used.
