# Sequential circuit building blocks: registers, counters, a traffic-light controller and two queues

This is a set of small synchronous designs of the kind found in a first course on
sequential logic. Each one shows a single idea: how a register keeps its value without a
gated clock, how counter carries can ripple or look ahead, how a state machine and a
counter together make timed control, and how registers, pointers and compare-swap cells
make queues. The designs do not depend on each other. They are written in synthesizable
SystemVerilog, each has a self-checking testbench, and a collection top (`seq_top`)
puts them all side by side.

The two largest designs come first below. The priority queue takes the most work to
understand.

| Design | Module(s) | State |
|---|---|---|
| Two-row priority queue | `pri_queue` | 8 cells of (valid, 4-bit key, 4-bit value) |
| T-intersection traffic light | `traffic_light` = `tl_controller` + `tl_timer` + 4 x `tl_comparator` | 3-bit state, 4-bit timer |
| FIFO data queue | `data_queue` | 16 x 8-bit words, two pointers, count |
| Program counter | `program_counter` | 4 bits |
| Parallel-load register | `load_register` | 4 bits |
| Serial shift register | `shift_register` | 4 bits |
| Bidirectional shift register | `bidir_shift_register` | 4 bits |
| Ripple-carry counter | `ripple_counter` | 4 bits |
| Look-ahead-carry counter | `cla_counter` | 4 bits |
| Up/down counter with load | `updown_counter` | 4 bits |
| Gray-code counter | `gray_counter` | 3 bits |
| Two-flop synchronizer | `synchronizer` | 2 bits |

Every design uses a single rising-edge clock. Every reset is synchronous and
active high. The designs that have no reset (the plain registers and counters) power up
with unknown contents and must be loaded or cleared first.

## Priority queue (`pri_queue`)

The queue holds up to eight (key, value) pairs. It always shows the value whose key is
smallest on `small_value`. It is built as a small systolic array: two rows of four
cells, and each cell holds a data-present bit `dp`, a key and a value (type
`seq_pkg::pq_elem_t`).

```
 key,value -> top[0] -> top[1] -> top[2] -> top[3]      (insert shifts right)
                |         |         |         |         (compare-swap per column)
 small_value <- bot[0] <- bot[1] <- bot[2] <- bot[3]    (delete shifts left)
```

Between operations the cells obey three rules:

1. Occupied cells are packed to the left in each row.
2. An occupied top cell always has an occupied cell below it.
3. In every occupied column, the bottom key is no larger than the top key.

Together these make the bottom row sorted, so `bot[0]` holds the minimum. Every
operation takes two clock cycles:

* **Insert** (cycle 1). The top row shifts one place right, and the new pair enters
  `top[0]`. The request is refused while `top[3]` is occupied, which is exactly when the
  queue holds eight pairs (`full`).
* **Delete** (cycle 1). The bottom row shifts one place left, which drops the minimum,
  and `bot[3]` becomes empty. The request is refused while `bot[0]` is empty (`empty`).
* **Compare-swap** (cycle 2, `busy` high). In every column at once, the two cells swap
  if the top cell is occupied and either its key is smaller or the bottom cell is empty.
  One local swap per column is enough to restore the three rules, because each shift
  moves every entry by only one place.

`insert`, `delete_min`, `key` and `value` are sampled only while `busy` is low. If both
requests are high, insert wins. A refused insert also drops a simultaneous delete.
Refused requests do nothing and do not raise `busy`. Equal keys are never swapped, so
of two equal keys, the one already in the bottom row leaves first. `small_value` reads
0 when the queue is empty. All outputs come straight from registers.

```
clk         _/~\_/~\_/~\_/~\_
insert      ~~~~\___________      request sampled at edge 1
busy        ____/~~~\_______      high after edge 1, low after edge 2
small_value ========X=======      settled after edge 2
```

While the queue is idle, assertions in the module check rules 2 and 3 in every column.

## Traffic-light controller (`traffic_light`)

A minor road meets a main road at a T. The main road has green by default (state
*thruG*). A sensor in the minor road asks for a green there. The controller first waits
in *pause* for delay `d1`. If the car turns right on red and the sensor clears during
this wait, the request is cancelled and the controller returns to *thruG*. Otherwise it
steps through *thruY* (main yellow, `d2`), *thruR* (main red, cross green, `d3`) and
*crossY* (cross yellow, `d4`), and then returns to *thruG*.

| State | Code s2s1s0 | Main (tG tY tR) | Cross (xG xY xR) | Leaves when |
|---|---|---|---|---|
| thruG  | 000 | G | R | sensor = 1, to pause |
| pause  | 001 | G | R | sensor = 0, to thruG; timer = d1, to thruY |
| thruY  | 010 | Y | R | timer = d2 |
| thruR  | 011 | R | G | timer = d3 |
| crossY | 100 | R | Y | timer = d4, to thruG |

The design has three parts:

* `tl_controller` is the 3-bit state register plus sum-of-products logic. It computes
  the lights, the timer enable `TEN` and the next state from the state bits, the sensor
  `S` and the four comparator results:

  ```
  tG = s2'·s1'     tY = s1·s0'    tR = (tG + tY)'
  xG = s1·s0       xY = s2        xR = (xG + xY)'
  TEN = s1'·s0·S·d1' + s1·s0'·d2' + s1·s0·d3' + s2·d4'
  ns2 = s1·s0·d3 + s2·d4'
  ns1 = s1'·s0·S·d1 + s1·s0' + s1·s0·d3'
  ns0 = s2'·s1'·s0'·S + s1'·s0·S·d1' + s1·s0'·d2 + s1·s0·d3'
  ```

  Codes 101 to 111 are unused. They follow the same equations, and a reset leaves them.
* `tl_timer` is a 4-bit counter. It counts up while `TEN` is high and is cleared at any
  edge where `TEN` is low.
* Four `tl_comparator`s each compare the timer with one dial value.

`TEN` is high while a state is still waiting and low in the cycle in which the state
changes. So every state starts with the timer at 0, counts 0, 1, ..., dN, and lasts
**dN + 1 clock cycles**. With d1 = 7, d2 = 5, d3 = 4 and d4 = 12, the sequence is:
pause for 8 cycles, thruY for 6, thruR for 5, crossY for 13. Delays are counted in
clock cycles, so the clock period sets the real times, and the 4-bit timer limits each
delay to 16 cycles.

`sensor` is used exactly as it is given. A real sensor is asynchronous, so pass it
through `synchronizer` first. This adds two cycles of latency to a request.

## Data queue (`data_queue`)

This is a FIFO built from an array of 16 registers, a read pointer, a write pointer
(both wrap modulo 16) and a 5-bit occupancy count. `data_out` is the word under the
read pointer, read combinationally, so the head of the queue is always visible. It has
no meaning while `empty` is high. At each edge:

| enq | deq | Effect |
|---|---|---|
| 1 | 1 | If empty: enqueue only. Otherwise, including when full: write and remove in the same cycle; the count stays. |
| 1 | 0 | Write, unless full (then ignored). |
| 0 | 1 | Remove the head, unless empty (then ignored). |

`empty` means count = 0, and `full` means count = 16. Reset clears the pointers and the
count, not the stored words. Assertions check that the count never passes 16 and that
an enqueue alone leaves a full queue full. `Q_SIZE` and `WORD_SIZE` are parameters. The
pointers wrap correctly for depths that are not powers of two.

## Registers and counters

* **`load_register`.** A 2:1 multiplexer in front of each flip-flop selects `d` when
  `ld` is high and the flip-flop's own output otherwise. The clock reaches every
  flip-flop ungated. (Gating the clock with `ld` uses fewer gates but adds clock skew.
  That variant is deliberately not provided.)
* **`shift_register`.** A serial-in, serial-out register. It shifts when `shift` is
  **low** and holds when `shift` is high. `d` enters bit 0, and `q` is bit 3, four
  shifts later. `par_q` shows all four bits, for serial-to-parallel conversion.
* **`bidir_shift_register`.** Nothing happens unless `ld` is high. With `ld` high:
  `sl` shifts left, with `d[0]` as the serial input; otherwise `sr` shifts right, with
  `d[3]` as the serial input; otherwise the register loads `d`.
* **`ripple_counter` and `cla_counter`.** Both are synchronous counters in which bit i
  toggles when its carry-in is high, and they behave identically. In the ripple counter,
  carry i is `q[i] & carry(i-1)`, a chain of AND gates that must settle within one
  clock period. In the look-ahead counter, carry i is `en & q[0] & ... & q[i]`, one wide
  AND per bit: there is no chain, but the low bits have a large fan-out. Both bring
  the carries out on `c`. `c[3]` is the carry out of the whole counter.
* **`updown_counter`.** `ld` loads `d`. Otherwise `cnt` counts up when `up` is high and
  down when it is low, wrapping modulo 16.
* **`gray_counter`.** Counts 000, 001, 011, 010, 110, 111, 101, 100, so exactly one
  bit changes per step. The next value is looked up from the present value (a
  `case`), so editing that table gives any other counting order. `clr` has priority
  over `cnt`.
* **`program_counter`.** A 4-bit program counter. Reset has priority over load, load
  over increment (`inc`), and increment over hold. In a processor its value drives the
  address bus through tri-state buffers enabled by `en_a`. This model has no `z` state,
  so it outputs the value `q` and the enable `q_oe` and leaves the buffer to whoever
  owns the bus.

## Synchronizer (`synchronizer`)

Two flip-flops in series. The first one samples the asynchronous input and may go
metastable. The second samples it one period later, by when it has almost certainly
settled. Mean time between failures is roughly (α·T/T0)·e^(T/τ), where T is the clock
period, α the mean time between input changes, and τ and T0 are properties of the
flip-flop. Because of the exponential, the clock period matters a great deal: with
τ = T0 = 1 ns and α = 1 ms, T = 50 ns gives trillions of years but T = 10 ns gives
minutes. The output follows the input two edges later. This is a timing property of real
flip-flops; a logic simulation shows only the latency.

## The collection top (`seq_top`)

`seq_top` instantiates every design once and gives each its own ports, prefixed `pq_`,
`tl_`, `dq_`, `pc_`, `lr_`, `sh_`, `bs_`, `rc_`, `la_`, `ud_`, `gc_` and `sy_`. One
`clk` is shared by all. The traffic light's delay dials are the plain inputs
`tl_d1`..`tl_d4`. Shared constants and types are in `seq_pkg` (`WORD_SIZE` = 4,
`pq_elem_t`, and `tl_state_t` for the state codes above).

## Parameters

| Module | Parameter | Default |
|---|---|---|
| `pri_queue` | `ROW_SIZE` (cells per row) | 4 |
| `pri_queue`, `traffic_light` | `seq_pkg::WORD_SIZE` (key, value and delay width) | 4 |
| `data_queue` | `Q_SIZE`, `WORD_SIZE` | 16, 8 |
| registers and counters | `WIDTH` | 4 |

## How far to trust it, and where it departs from the original designs

Every testbench checks its design against a reference model of its own. The testbenches
were also run against a deliberately broken copy of each module, and every one of them
failed. The priority queue is tested with distinct keys only, so its order among equal
keys is covered by the rule above but not by a test.

These choices are this design's own:

* **Data-queue width.** The data queue's word width is 8 bits; the original does not
  fix it for this queue.
* **Priority-queue reset.** The priority queue's reset clears whole cells, not only
  the valid bits.
* **Program-counter bus buffer.** The program counter's tri-state buffer is left out;
  `q_oe` is brought out instead.
* **Priority-queue port name.** `delete` is spelled `delete_min`, because `delete` is a
  reserved word in the simulator's generated C++.
* **Shift-register outputs.** The serial shift register also brings out its parallel
  outputs.
* **Traffic-light lights.** The six lights are separate outputs (not 3-bit buses), and
  the sensor is not synchronized inside `traffic_light`.

These parts of a processor are not included: the remaining registers of a small
processor (instruction register, indirect address register, accumulator), its ALU, its
controller and its memory. Neither is a scalable carry-lookahead incrementer for wide
counters.

## Simulating

Each testbench is `tb/tb_<module>.sv`. It prints `TB_RESULT checks=N failures=M` and
stops. To run one with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb rtl/seq_pkg.sv \
    tb/tb_pri_queue.sv --top-module tb_pri_queue -Mdir obj_pq -o sim
./obj_pq/sim
```

`tb_seq_top` runs every design through the top at its default sizes. It counts each
mechanism it drives (insert, delete and the full/empty refusals of the priority queue;
a cancelled pause and a full light cycle; simultaneous enqueue and dequeue, overflow
refusal and emptying of the FIFO; load, increment, wrap and reset of the counters; the
shift directions; carry-outs; the Gray wrap; the synchronizer delay). A mechanism that
never happened counts as a failure. Testbenches drive inputs away from the rising edge
and check shortly after it. Each has a watchdog that reports a failure if the run does
not finish.

To change a design, edit its module and rerun its testbench. The testbenches read no
files and need no other tools.
