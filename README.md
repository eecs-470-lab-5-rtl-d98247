# Parameterized circular-buffer FIFO

A first-in first-out queue in hardware: writes push to the back (tail),
reads return and pop the front (head). The entries live in a fixed array
used as a ring, so nothing ever moves; only two pointers advance and wrap.
Beside the usual full flag, the buffer raises an early warning,
`almost_full`, when a chosen number of free slots is left. A producer
that issues several writes per cycle, as in a superscalar pipeline, needs
that warning before the buffer is actually full.

The RTL is written for any depth (not only powers of two), any data width,
any alert depth including 0, and any packed element type. It also offers a
content search that tells whether a value is queued and how far from the
head it sits.

## Files

| file | contents |
|---|---|
| `rtl/fifo.sv` | the FIFO (top module) |
| `rtl/fifo_cam.sv` | content search over the live entries, instantiated by `fifo` |
| `tb/tb_fifo.sv` | end-to-end test at the default configuration |
| `tb/tb_fifo_configs.sv` | the same test over eight depth/width/alert/type configurations |
| `tb/tb_fifo_cam.sv` | stand-alone test of the search |
| `tb/fifo_harness.sv` | random stimulus, reference queue model and mechanism counters |
| `tb/fifo_bench.sv` | one configured `fifo` plus harness, for the sweep |
| `tb/fifo_sva.sv` | rule checker attached to every `fifo` instance with `bind` |

## Interface

```
fifo #(
    int  SIZE        = 16,               // entries
    int  WIDTH       = 32,               // bits per entry (when T is not overridden)
    int  ALERT_DEPTH = 3,                // free slots at which almost_full rises
    type T           = logic [WIDTH-1:0] // element type
)
```

| port | dir | meaning |
|---|---|---|
| `clock`, `reset` | in | rising-edge clock; synchronous active-high reset |
| `wr_en`, `wr_data` | in | push request and its data |
| `wr_valid` | out | the push requested this cycle is accepted |
| `rd_en` | in | pop request |
| `rd_valid`, `rd_data` | out | the pop is accepted and `rd_data` is the oldest entry; `rd_data` is 0 whenever `rd_valid` is 0 |
| `full` | out | no free slot |
| `almost_full` | out | exactly `ALERT_DEPTH` free slots |
| `search_key` | in | value to look for |
| `search_hit`, `search_age` | out | a queued entry equals the key; its distance from the head (0 = the next one to be read) |

The first ten ports form the standard FIFO interface. The search ports are
an extension.

## Handshake and timing

Requests are not refused in advance. The requester raises `wr_en` or
`rd_en` and learns from `wr_valid` or `rd_valid`, in the same cycle, whether
it went through. These outputs are combinational from the current state and
the request, and the state changes at the next rising edge.

- A read of an empty buffer is refused, even if a write arrives in the same
  cycle. Data written at edge *n* can be read in the cycle after it, not
  earlier: the minimum latency through the buffer is one cycle.
- A write to a full buffer is refused, unless a read is accepted in the
  same cycle. In that case both succeed: the write goes into the slot the
  read frees, and the buffer stays full.
- `full` and `almost_full` come straight from registered state. They are
  stable for the whole cycle.
- Reset empties the buffer at the rising edge where `reset` is high. A read
  in the next cycle is refused. The stored data is not cleared, because no
  slot is read before it is written again.

## How empty and full are told apart

With only a head and a tail pointer, `head == tail` means either empty or
full. Several fixes are common:

- an occupancy counter;
- one spare slot that is never filled;
- a valid bit per entry;
- a flag that remembers whether the last change grew or shrank the queue.

This design uses the counter, `count`, which runs from 0 to `SIZE` and is
`clog2(SIZE+1)` bits wide. Empty is `count == 0` and full is
`count == SIZE`. `almost_full` is `SIZE - count == ALERT_DEPTH`. That makes
the edge cases plain:

- `ALERT_DEPTH = 0`: `almost_full` equals `full`;
- `ALERT_DEPTH = SIZE`: `almost_full` is high while the buffer is empty;
- `ALERT_DEPTH > SIZE`: `almost_full` never rises.

The pointers are `clog2(SIZE)` bits wide (1 bit for a single-entry buffer).
They step with a compare against `SIZE-1` and wrap to 0. This is the modulo
step written without a divider, so depths such as 5 or 48 cost nothing
extra. On each edge the counter goes up for an accepted write alone, down
for an accepted read alone, and is unchanged for both or neither.

## Content search

`fifo_cam` compares `search_key` with each slot, scanning in age order:
head, head+1, ... wrapping at `SIZE`, over the first `count` slots. Slots
outside that window hold stale or never-written data, and they never match.
The first match found is the oldest one, and its position in the scan is
`search_age`. The scan is a `for` loop in `always_comb` in which the hit
flag keeps later matches from being taken. This is the hardware form of
"loop until found, then break". It unrolls into `SIZE` comparators and a
priority chain, so its delay grows linearly with `SIZE`.

Because every slot is read at once, the storage is built from flip-flops
rather than a one-read/one-write RAM. If you don't need the search, leave
the search outputs unconnected; synthesis can then drop the comparators.

## Storing structs

`T` is a type parameter, so a queue of packets needs no change to the
module:

```systemverilog
typedef struct packed { logic [5:0] tag; logic last; logic [15:0] payload; } packet_t;
fifo #(.SIZE(6), .T(packet_t), .ALERT_DEPTH(2)) q (...);
```

`WIDTH` is ignored when `T` is given. `T` must be a packed type: `rd_data`
is set to zero, and the search compares whole elements.

## Checks inside the design

`fifo.sv` carries immediate assertions on its own bookkeeping:

- the counter stays in 0..`SIZE`;
- both pointers stay below `SIZE`;
- the tail leads the head by `count` slots, modulo `SIZE`.

They are active outside reset, and synthesis ignores them.

## Verification

The testbenches are self-checking. Each ends by printing
`TB_RESULT checks=N failures=M`.

- **`fifo_harness`** drives random requests in alternating fill-biased and
  drain-biased phases. It also forces read+write together in a quarter of
  the cycles and issues one reset in mid-stream while data is queued. Every
  cycle it compares all outputs, including the search, with a SystemVerilog
  queue used as the reference. It counts these events and fails if one
  never happens:
  - a write refused when full, and a read refused when empty;
  - read+write together on an empty and on a full buffer;
  - `full` and `almost_full`;
  - pointer wrap;
  - reset while not empty;
  - a search hit, a hit behind the head, and a miss.

  A directed opening sequence checks the one-cycle latency.
- **`fifo_sva`**, attached with `bind fifo fifo_sva ...`, keeps its own
  occupancy count. From it, the checker checks each valid bit, `full` and
  `almost_full`, zero `rd_data` without `rd_en`, and a refused read right
  after reset.
- **`tb_fifo`**: default configuration, 3000 random cycles.
- **`tb_fifo_configs`**: eight configurations at once:

  | `SIZE` | width | `ALERT_DEPTH` |
  |---|---|---|
  | 1 | 8 | 0 |
  | 5 | 1 | 1 |
  | 16 | 32 | 0 |
  | 32 | 8 | 3 |
  | 48 | 64 | 3 |
  | 7 | 16 | 7 |
  | 4 | 8 | 9 |
  | 6 | 23-bit struct | 2 |

- **`tb_fifo_cam`**: a 12-entry search, tested on its own. It has directed
  cases (empty window, wrap, match just outside the window, two matches)
  and 3000 random ones.

Running with Verilator (the simulator must start variables at random values
or zero; the design makes no assumption about power-up state):

```sh
verilator --binary --timing --assert -Irtl -Itb --top-module tb_fifo \
    tb/tb_fifo.sv rtl/fifo.sv rtl/fifo_cam.sv tb/fifo_harness.sv tb/fifo_sva.sv
./obj_dir/Vtb_fifo

verilator --binary --timing --assert -Irtl -Itb --top-module tb_fifo_configs \
    tb/tb_fifo_configs.sv tb/fifo_bench.sv rtl/fifo.sv rtl/fifo_cam.sv \
    tb/fifo_harness.sv tb/fifo_sva.sv
./obj_dir/Vtb_fifo_configs

verilator --binary --timing --assert -Irtl --top-module tb_fifo_cam \
    tb/tb_fifo_cam.sv rtl/fifo_cam.sv
./obj_dir/Vtb_fifo_cam
```

Each runs in well under a second.

To try another configuration, add a `fifo_bench` line to `tb_fifo_configs`.

## Choices made here

The following behaviour is a decision of this design. Other FIFOs of the
same interface may differ:

- the occupancy counter, rather than a spare slot, per-entry valid bits or
  a direction flag;
- combinational, same-cycle `wr_valid`, `rd_valid` and `rd_data`;
- `rd_data` is zero on a refused read as well as when no read is requested;
- reset clears the pointers and the counter, not the data;
- `SIZE` must be at least 1; elaboration stops otherwise;
- the search ports, the oldest-match priority and the `search_age` output;
- register storage, which the parallel search needs, instead of a
  one-read/one-write RAM macro.
