# Stall-free floating-point set reduction with one pipelined adder

Summing a stream of floating-point values in hardware sounds trivial until the
adder is pipelined. A fast floating-point adder needs many pipeline stages
(18 in the default configuration here), so the running sum is not available
for a long time after each addition. A plain accumulator must then either
stall the producer or keep growing buffers. This gets worse when the values
come as many back-to-back sets, for example one dot product per row of a
matrix-vector multiply, with each set needing its own sum.

This RTL folds a binary reduction tree onto **one** pipelined adder. It takes
one value per clock cycle and never stalls. Each set of `n_k` values comes out
as one sum a bounded number of cycles after its last value, and all the
storage it needs is `4 * lg(n)` words, where `n` is the largest set size.

## The idea: one adder, many tree levels

Think of the full binary tree that adds `n` values: level 0 adds pairs of
inputs, level 1 adds pairs of level-0 results, and so on, `lg(n)` levels in all.
The values arrive one per cycle, so the level-0 adders only have work every
2nd cycle, the level-1 adders every 4th, level 2 every 8th. Added up
(1/2 + 1/4 + 1/8 + ...), all levels together need less than one addition per
cycle. So all of them can share a single pipelined adder, as long as
each level has a small buffer where its operands wait for their turn:

```
            +-------------------------------------------------+
 value ---> | level buffer 0 | level buffer 1 | ... | lg(n)-1 |   (one memory)
            +-------------------------------------------------+
                   |  pair of words from buffer i, in i's slot
                   v
            [ 2-cycle memory read ] -> [ ADD_STAGES-deep FP adder ] --+--> set sum
                                        [ set no. / size pipeline ]  |
                   ^                                                  |
                   +------ partial sum of level i -> buffer i+1 ------+
```

A word read from buffer `i` is an input (i = 0) or a partial sum of `2^i`
inputs. The adder adds two of them, and the result goes to buffer `i+1`,
unless `i+1 = lg(n_k)`: then the result is the finished sum of its set and
leaves the circuit.

## The schedule (the part worth understanding)

A free-running `lg(n)`-bit counter `C` assigns every pipeline slot to at most
one buffer. `C` is 0 in the cycle buffer 0 is read for the first time and
counts up every cycle after that.

* Buffer `i` may be read when `C = 2^i - 1 (mod 2^(i+1))`. Put another way,
  **the buffer to read is the number of trailing ones of `C`**.
* Buffer 0 owns the slots where `C` ends in `0`, buffer 1 those ending in `01`,
  buffer 2 those ending in `011`, and so on. No slot belongs to two buffers.
  The slot where `C` is all ones belongs to none.
* A read happens only if the buffer holds at least two words. It takes the
  **two oldest** words as one operand pair.
* The whole path from read to sum takes `ALPHA` cycles: 2 cycles of memory read
  plus the adder stages, 20 by default. So the sum leaving the adder now was
  read from the buffer given by the trailing ones of `C - ALPHA`. It goes to the
  next buffer up. No sum needs to carry its level with it.

For `n = 16`, one counter period looks like this:

| C    | 0 | 1 | 2 | 3 | 4 | 5 | 6 | 7 | 8 | 9 | 10 | 11 | 12 | 13 | 14 | 15 |
|------|---|---|---|---|---|---|---|---|---|---|----|----|----|----|----|----|
| read | 0 | 1 | 0 | 2 | 0 | 1 | 0 | 3 | 0 | 1 | 0  | 2  | 0  | 1  | 0  | –  |

Why this works:

* **No collisions.** Reads never collide because each slot has one owner.
  Writes never collide because each write is a read delayed by `ALPHA`.
* **Buffers stay tiny.** Buffer `i` receives at most one word every `2^i`
  cycles and gives up two every `2^(i+1)` cycles. A counting argument over one
  read period shows a buffer never holds more than 3 words when the input runs
  every cycle. With gaps in the input, buffer 0 can also reach 3. The memory
  gives every buffer 4 words, so the slot index is just the low 2 address
  bits.
* **Sets never mix.** A set of `2^k` values puts an even number of words into
  every buffer below level `k`. Pairs are always the two oldest words, so a
  pair can never span two sets. The exit test sends the final sum of a set
  away before it reaches a buffer. Every operand pair is checked against this
  rule by an assertion.
* **Latency is bounded.** The last value of a set of `n_k` values waits at
  most `2^(i+1) - 1` cycles at level `i` and passes the pipeline `lg(n_k)`
  times. Its set's sum leaves at most `3 n_k + (ALPHA - 1) lg(n_k) - 1` cycles
  after it, which is under three times the best possible `n_k + ALPHA lg(n_k)`.
  The bound holds for a set on its own. When sets follow each other
  closely, a set's words can queue behind the tail of the previous set, and
  sums can come out in a different order from the sets.

## Blocks

| module | what it is |
|---|---|
| `reduction_circuit` | top level; wires the blocks below |
| `sched_counter` | counter `C`, first-use start, read level and write-back level decode |
| `reduce_ctrl` | head pointer and fill count per buffer, memory addresses, the exit test, overflow and error flags |
| `buffer_ram` | all level buffers in one array: two read ports (the operand pair), two write ports (new input to buffer 0, sum to buffer i+1), 2-cycle read delay |
| `buffer_ram_2x` | the same storage as a dual-port RAM clocked at twice the system rate (selected with `DOUBLE_PUMP`) |
| `fp_add` | pipelined IEEE-754 adder, `STAGES` deep, one addition per cycle |
| `meta_pipe` | companion register chain carrying each pair's set number and set size beside the adder |

### Memory organisation

Separate buffers would need a wide multiplexer in front of each adder port.
Instead, all buffers share one array with address `{buffer number, slot}`.
The upper `clog2(lg n)` bits pick the buffer and the low 2 bits the word
inside it. With three buffers, for example, the second word of buffer 1 is
address `0101`. Each word holds the value plus its set number and
`lg(set size)`.

In one cycle the circuit may need two reads (the pair) and two writes (a new
input and a returning sum). Two interchangeable memories provide this:

* `buffer_ram` (default) is a single-clock array with two read and two write
  ports.
* `buffer_ram_2x` (`DOUBLE_PUMP = 1`) uses the usual FPGA solution: an
  ordinary dual-port block RAM clocked by `clk2x`, at twice the system rate.
  At the `clk2x` edge midway through a system cycle, both ports read the
  operand pair. At the edge that coincides with the rise of `clk`, both
  ports write. The half-cycle phase comes from a flop that toggles on `clk`
  and is compared with its copy sampled on `clk2x`. This needs no reset and
  settles after one `clk2x` edge. `clk2x` must rise with every rise of `clk`
  and once midway between them.

Both memories behave the same, cycle for cycle:

* Data arrive two system cycles after the read. This matches a registered
  block RAM, and these 2 cycles are part of `ALPHA`.
* A read and a write to the same word in the same cycle return the old word.
  The controller never depends on this, because it only reads words counted
  in an earlier cycle.

`reduction_2x_tb` runs both on the same input and compares them in every
cycle.

### The adder

`fp_add` is a standard IEEE-754 binary adder. Parameters `EXP_W`/`MAN_W` are
11/52 for double and 8/23 for single precision. It rounds to nearest, ties to
even, handles subnormals exactly, gives the canonical quiet NaN for any NaN
result and saturates to infinity. It has three register stages of real logic:

1. align;
2. add and count leading zeros;
3. normalise, round and pack.

A register chain then pads the latency to `STAGES` (18 by default). The
reduction scheme only relies on a fixed latency and one operation per cycle,
so any other pipelined adder, or any associative and commutative operator,
can replace it. `ALPHA` follows `ADD_STAGES` automatically.

## Interface and timing (`reduction_circuit`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset |
| `clk2x` | in | 1 | memory clock at twice the rate, used only with `DOUBLE_PUMP = 1`; tie low otherwise |
| `in_valid` | in | 1 | a value is presented this cycle |
| `in_data` | in | `1+EXP_W+MAN_W` | the value |
| `in_set` | in | `SET_W` | its set number |
| `in_lgsize` | in | `clog2(LG_N+1)` | `lg(n_k)` of its set, 1..`LG_N` |
| `out_valid` | out | 1 | a finished set sum is present (one cycle) |
| `out_data` | out | `1+EXP_W+MAN_W` | the sum |
| `out_set` | out | `SET_W` | its set number |
| `overflow` | out | 1 | sticky: a write hit a full buffer (cannot happen with legal input) |
| `error` | out | 1 | sticky: a sum needed a buffer above `LG_N` (set size too large) |

Rules for the input stream:

* The values of a set arrive contiguously.
* Every set has `2, 4, ..., 2^LG_N` values. A set of one value is not
  supported.
* `in_valid` may drop for any number of cycles.
* There is no ready signal.

`out_valid` is combinational from the adder's output register.

| parameter | default | meaning |
|---|---|---|
| `LG_N` | 4 | largest set size is `2^LG_N` (16); there are `LG_N` buffers |
| `EXP_W`, `MAN_W` | 11, 52 | floating-point format (64-bit) |
| `ADD_STAGES` | 18 | adder pipeline depth; the schedule uses `ALPHA = ADD_STAGES + 2` |
| `SET_W` | 16 | width of the set number |
| `DOUBLE_PUMP` | 0 | 1 selects the double-pumped dual-port memory |

Storage grows as `4 * LG_N` words of `1+EXP_W+MAN_W+SET_W+clog2(LG_N+1)` bits.
For 16-value sets in 64-bit, that is 16 words of 83 bits. The counter is
`LG_N` bits wide. No other state depends on `n`. Raising `LG_N` is all that
larger sets need. With `LG_N = 24`, a set of 2^24 values occupies 96 words of
buffer.

Measured in simulation, from the last value of an isolated set to its sum:

| set size | cycles | bound `3n + (ALPHA-1)lg n - 1` |
|---|---|---|
| 2^10 | 1 536 | 3 261 |
| 2^12 | 6 167 | 12 515 |
| 2^20 | 1 572 864 | 3 146 107 |
| 2^24 | 25 165 847 | 50 332 103 |

Most of this is the wait for the rare slots of the top levels. For reference,
the 64-bit, n = 16 configuration of this scheme has been reported at 175 MHz in
about 1300 slices of a Virtex-II Pro. Its area grows by about a third, and its
clock drops by up to 15 %, as n grows to 2^20 and beyond.

## How far it follows the reduction scheme, and where it departs

Taken from the scheme:

* the slot schedule;
* read only when two or more words are present, oldest pair first;
* buffers of 4 words in one memory, addressed `{buffer, slot}`;
* the 2-cycle read delay added to the adder latency;
* the companion metadata pipeline;
* the exit test `destination level = lg(set size)`;
* the 64-bit format, n = 16 and the 18-stage adder.

Choices made here:

* The adder's internal design. Any fixed-latency IEEE adder fits.
* The default memory is a four-port single-clock array, so no second clock
  is needed. The double-clocked block RAM scheme is available with
  `DOUBLE_PUMP = 1`. Which half-cycle reads and which writes is a choice
  made here.
* Every buffer has 4 words, level 0 included, although 2 suffice there when a
  value arrives every cycle.
* Gaps in the input are allowed. The scheme assumes a value every cycle.
* The set size is carried as `lg(n_k)`.
* Sets of size 1 are not supported.
* The set-number width.
* The `overflow` and `error` flags.
* The reset behaviour: reset empties the buffers and stops the counter until
  the next first read.

## Verification

Each module has a self-checking testbench in `tb/`. Each ends by printing
`TB_RESULT checks=N failures=M`, and each has a cycle watchdog.

* `fp_add_tb` checks 18 000 random double-precision additions bit for bit
  against the simulator's IEEE double arithmetic. The mix includes random
  patterns, cancellations, subnormals, specials and near-overflow cases. It
  also checks the 18-cycle latency. A single-precision instance is checked
  the same way. Its reference adds in double and rounds once to single,
  which gives the correctly rounded result.
* `buffer_ram_tb` runs random two-port reads and writes against a shadow
  array. It checks the 2-cycle read delay, read-first behaviour and the
  address layout.
* `meta_pipe_tb` checks the delay and order.
* `sched_counter_tb` checks `C` and both decodes against the slot equations
  in every cycle, at two sizes, including reset.
* `reduce_ctrl_tb` is a token-level model of the datapath. A token counts how
  many inputs it sums. The testbench checks that every pair comes from the
  right buffer and set, that every result has the size its level implies, the
  exit test, and that each set leaves exactly once.
* `reduction_circuit_tb` is the end-to-end test at the default size.
  It first runs isolated sets of every size and checks the latency bound. Then
  it runs 600 back-to-back sets and 600 sets with random gaps. Values are
  scaled integers, so every sum is exact whatever the order of additions, and
  each output is compared bit for bit. The test counts:
  * reads from every level;
  * exits at every set size;
  * cycles with both write ports busy;
  * unused slots;
  * buffers holding 3 words;
  * input gaps.

  It fails if any of these never happened.
* `reduction_2x_tb` runs the same test with a second copy that uses the
  double-pumped memory. The two copies must match in every cycle.
* `reduction_scale_tb` runs three instances:
  * 64-bit and 32-bit, each with `LG_N = 24`. Each gets one set of 2^24
    values and one of 2^20, with the latency bound checked.
  * 32-bit with `n = 16`.

  After that, 400 mixed small sets with gaps go to all three instances. It
  takes about 40 s.

To run one with Verilator:

```
verilator --binary --timing --assert -Irtl tb/reduction_circuit_tb.sv --top-module reduction_circuit_tb
./obj_dir/Vreduction_circuit_tb
```

The same works for every testbench: all modules are found in `rtl/` by file
name.
