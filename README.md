# A processor array generated from a loop nest

This RTL realises a systolic-style processor array of the kind obtained by
mapping a nested loop onto an FPGA. A loop nest is first rewritten so that
every dependence has a constant distance (a *piecewise regular algorithm*).
A linear *space-time mapping* then gives every iteration point `I` a
processor index `p` and a time step `t`. Each processor index becomes a
processing element (PE). Each dependence becomes a wire between two PEs plus
enough storage to cover its distance in time.

Two pieces of hardware are included, both taken from the same small
three-dimensional example:

* `pe_array_ex31` is the complete processor array for the example: 41 PEs
  that compute the whole index space in nine clock cycles.
* `pe_s1_pipelined` is a single PE for one equation of the example. It
  shares one multiplier between two products and overlaps iterations
  (*functional pipelining*). This is the resource-sharing side of the PE
  model, which the array itself does not need at its iteration interval of 1.

`paro_top` puts the two side by side. They share only the clock and the reset.

## The example algorithm

Three variables are defined on the integer points `(i, j, k)`. All arithmetic
is on 16-bit words modulo 2^16, and products keep their low 16 bits:

```
y[i,j,k] = y[i,j-1,k-1] * u[i,j,k-2] + a[i-1,j-1,k-1] * u[i,j-1,k]
a[i,j,k] = y[i,j-1,k]   - a[i-1,j,k]
u[i,j,k] = u[i,j-1,k-1] - y[i-1,j-1,k] * y[i-1,j,k-4]
```

The index space is the set of points satisfying

```
1 <= i <= 6,  j >= 2,  i + j <= 12,  i - j <= 2,  i + j >= 4,  0 <= k <= 8
```

Its `(i, j)` part does not depend on `k`. The set of processors is therefore
a fixed polygon `Q` in the `(p1, p2) = (i, j)` plane, and time runs over
`k = 0..8` for every processor. `Q` holds 41 points (9, 9, 8, 7, 5 and 3 for
`p1 = 1..6`). Its rectangular hull `H` is `p1 in 1..6`, `p2 in 2..11`.

*Operator splitting* breaks each equation into operations of one operator
each: three products `y1`, `y2`, `u1`, one sum and two differences. Each of
these is one unit of scheduling and binding.

## Space-time mapping and why data moves combinationally

This design uses the mapping `p = (i, j)`, `t = k`. The projection direction
is `u = (0, 0, 1)` and the schedule vector is `lambda = (0, 0, 1)`. The
iteration interval is therefore `P = |lambda . u| = 1`: a PE handles one
index point per clock cycle, and time step `k` is clock cycle `k` of a run.

Each dependence vector `d` maps to a processor displacement `d_p` (which
neighbour) and a time displacement `d_t` (how many steps back):

| value read by PE (i, j) at step k | from PE   | d_t | how it arrives                       |
|-----------------------------------|-----------|-----|--------------------------------------|
| y[i, j-1, k]                      | (i, j-1)  | 0   | neighbour's combinational result      |
| u[i, j-1, k]                      | (i, j-1)  | 0   | neighbour's combinational result      |
| y[i-1, j-1, k]                    | (i-1,j-1) | 0   | neighbour's combinational result      |
| a[i-1, j, k]                      | (i-1, j)  | 0   | neighbour's combinational result      |
| y[i, j-1, k-1], u[i, j-1, k-1]    | (i, j-1)  | 1   | neighbour's output buffer             |
| a[i-1, j-1, k-1]                  | (i-1,j-1) | 1   | neighbour's output buffer             |
| u[i, j, k-2]                      | itself    | 2   | own 1-word delay memory               |
| y[i-1, j, k-4]                    | (i-1, j)  | 4   | neighbour's 3-word delay memory       |

This table is the least obvious part of the design. Four dependences have
`d_t = 0`: within one time step, a PE needs a value that its neighbour
computes in that same step. The mapping is legal because `lambda . d >= 0`
for every dependence. With one cycle per step, the only way to meet these
dependences is to pass the values combinationally within the cycle.

As a result, the combinational paths of a step run through the array. For
example, `a` ripples along `i` through up to six subtractors, and `y` and
`u` alternate along the diagonal through multipliers. Every such path goes
from a lower `(i, j)` to a higher one, so there is no real loop. A tool
that treats the signal arrays as single variables may still report circular
logic (Verilator says UNOPTFLAT on `y`, `a` and `u` of `pe_ex31`). The
clock frequency the array reaches is set by the longest such chain.

Another schedule would give the array more time per step, but it would
break this structure. A schedule vector with nonzero `i` or `j` terms
avoids the chains, but then the time range would depend on the processor
and the array would no longer start and stop all PEs together. With a
larger `P` and the same `lambda`, the `a[i-1,j,k]` to `a[i,j,k]` chain
needs a result before the neighbour's identical schedule has produced it.

## Array structure (`pe_array_ex31`)

* Two nested generate loops span the hull `H`. A PE is placed only where
  the index check `paro_pkg::inside_q(p1, p2)` holds. The other 19 hull
  points stay empty, and their outputs read zero.
* Every PE drives one element of a signal array over `H` (`pe_out_t`: the
  same-step results, the output buffers and the delayed `y`). A PE reads
  its neighbour at `p - d_p` for the three displacements `(0,1)`, `(1,1)`
  and `(1,0)`.
* **Borders.** There are no border processors. If the neighbour at
  `p - d_p` lies outside `Q`, the PE takes that field from its own element
  of the `border` input (`pe_in_t`, one field per incoming dependence).
  The surrounding system must drive each such field during step `k` with
  the value the dependence names. For example, a PE with no `(i-1, j)`
  neighbour needs `y[i-1, j, k-4]` on `border[p].y10_t4` at step `k`, so
  the surrounding system does the delaying itself. Fields whose neighbour
  exists are ignored.
* **Run control.** A `start` pulse, accepted while idle, clears every
  buffer and delay memory of all PEs. It then runs 9 steps. `busy` is high
  during the steps, `t_step` gives `k`, and `done` pulses for one cycle
  afterwards. At the clock edge that ends step `k`, every PE's output
  buffers take `y`, `a`, `u` of step `k`, visible on `y_q`, `a_q`, `u_q`
  from then on. Values of a PE from before step 0 (for example
  `u[i, j, -1]`) read as zero.

## Processing element (`pe_ex31`)

A PE has three kinds of part:

* **Resource units.** There are six `resource_unit`s, one per split
  operation. Each has an operand multiplexer per input, a computational
  resource and an output buffer. The results of `y`, `a` and `u` are
  stored each step. The products are used in the same cycle, so their
  buffers stay disabled.
* **Local controller.** A `pe_controller` with `P = 1` enables the output
  buffers and the delay memories in every step while the array runs.
* **Delay memories.** A value needed `d_t` steps later is held for
  `d~ = d_t + gamma(consumer) - gamma(producer) - L'(producer)` extra
  cycles. Here all start times `gamma` are 0 and the latency `L'` is 1,
  because the output buffer already supplies one step. A shift register
  that moves every clock would need `d~` words. Since the value changes
  only once per iteration interval, a shift register with a write enable
  needs only `g = ceil(d~ / P)` words. This gives 3 words for
  `y[i-1, j, k-4]` and 1 word for the PE's own `u[i, j, k-2]`. Both sizes
  are computed in `paro_pkg` from these formulas. The delay memory sits in
  the producing PE.

## The shared-multiplier PE (`pe_s1_pipelined`)

This PE evaluates `y = y[i,j-1,k-1] * u[i,j,k-2] + a[i-1,j-1,k-1] * u[i,j-1,k]`
for a stream of operand sets. It uses one multiplier resource unit with
two operand sources and two output buffers, and one adder resource unit.
With one cycle per operation the schedule is:

| counter state | multiplier                     | adder                        |
|---------------|--------------------------------|------------------------------|
| 0             | `y1` of iteration n -> buffer 0 | `y` of iteration n-1 -> output |
| 1             | `y2` of iteration n -> buffer 1 | idle                          |

This gives `P = 2` cycles per iteration. The sum of one iteration overlaps
the first product of the next, which is functional pipelining. Without the
overlap it would take three cycles. The `pe_controller` is a modulo-2
counter. Its decoder gives, per state: the multiplier's operand select,
the two product-buffer enables and the sum-buffer enable.

Timing: while `run` is high the schedule advances every cycle. It holds
while `run` is low. `iter_start` marks state 0. The operands must be valid
in that cycle and the next. The result appears in `y` three clock edges
after its iteration started, together with a one-cycle `y_valid`, and then
one result follows every two cycles.

## Building blocks

| module            | role |
|-------------------|------|
| `paro_pkg`        | word type, hull and time bounds, `inside_q`, delay sizing functions, PE port structs |
| `resource_unit`   | operand multiplexers, add/sub/mul resource, output buffers with enables and clear |
| `pe_controller`   | modulo-P counter (`ceil(log2 P)` bits, 1 bit for P = 1) and table decoder (`SCHEDULE` bits `[s*NCTRL +: NCTRL]` for state `s`) |
| `delay_memory`    | `G`-word shift register that shifts on a write enable |
| `pe_ex31`         | PE of the example array |
| `pe_array_ex31`   | the 41-PE array with sequencer and border inputs |
| `pe_s1_pipelined` | the shared-multiplier PE |
| `paro_top`        | both designs side by side |

## Choices made in this RTL

The method fixes the structure: a generate loop over the hull with an index
check, signal arrays over the hull that connect neighbouring PEs, border
ports instead of border processors, RU/controller/delay-memory PEs, and
`g = ceil(d~/P)` delay memories. The following are choices of this
implementation:

* The signal arrays are bundled into one array of PE output structs. The
  method declares one signal array per displacement vector. Here each
  displacement is instead a different index offset into the same struct
  array.
* The space-time mapping `p = (i, j)`, `t = k`, and hence `P = 1` for the
  array.
* A one-to-one binding in the array PE, and a latency of one cycle for
  every operation (array PE and S1 PE alike).
* Wrap-around 16-bit arithmetic. The variable `u` is 16 bits as well.
* Combinational forwarding of same-step values.
* Zero as the value of anything before step 0.
* The start/busy/done/t_step protocol, and clearing the PEs on `start`.
* An asynchronous active-low reset.
* Two operand multiplexers per resource unit.
* The S1 PE's operand hold protocol.

The second equation of the example also appears in a variant that reads
`a[i-2, j, k]` and adds instead of subtracting. This RTL uses
`a[i,j,k] = y[i,j-1,k] - a[i-1,j,k]`. The operator-split products use
`y[i,j-1,k-1]` and `u[i,j-1,k]`, exactly as in the unsplit equations.

Not built:

* Sharing output buffers between resource units (a register-saving
  refinement).
* A resource-shared version of the whole example PE. With the mapping above
  its iteration interval is 1, so nothing can be shared.
* The tool flow that derives schedules and bindings. Here they are fixed by
  hand.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and contains a watchdog.

* `tb_paro_top` runs both designs end to end at full size. The array
  computes the whole example twice with different border data and checks
  all 41 PEs × 3 outputs after every step against `tb_ex31_ref_pkg`.
  `tb_ex31_ref_pkg` evaluates the three equations directly over the index
  space. Meanwhile the S1 PE processes a random stream, and the testbench
  checks the 2-cycle interval and 3-cycle latency. The testbench also
  counts each mechanism: border inputs used, same-step forwarding,
  delay-memory reads of nonzero data, the restart, overlapped additions
  and pauses. It fails if any count is zero.
* `tb_pe_array_ex31` checks the array alone, including the step count, the
  `done` pulse and the hull points without a PE.
* `tb_pe_ex31`, `tb_pe_s1_pipelined`, `tb_resource_unit`,
  `tb_pe_controller` and `tb_delay_memory` check the parts against models
  written in the testbenches.

The border driver fills every field that the array must ignore with random
noise. A PE that took a border value instead of its neighbour's result
would therefore be caught.

To simulate with Verilator 5 (for example the top):

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
  rtl/paro_pkg.sv tb/tb_ex31_ref_pkg.sv rtl/*.sv tb/tb_paro_top.sv \
  --top-module tb_paro_top -o sim
./obj_dir/sim
```

For another block, replace the testbench file and `--top-module` name. All
files can be listed because each file holds one module or package. Building
the array testbenches takes about half a minute, and they run in well under
a second.

To change the design:

* The word width is `paro_pkg::DW`.
* A different processor polygon means new hull bounds and a new
  `inside_q` in `paro_pkg`.
* A different dependence pattern means new `pe_in_t`/`pe_out_t` fields,
  new equations in `pe_ex31`, and new neighbour wiring in `pe_array_ex31`.
