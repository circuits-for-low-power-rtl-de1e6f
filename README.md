# Cache-based transcoder for long on-chip buses

Long on-chip bus wires have high capacitance, so each bit that flips costs
energy. This design cuts the number of flips on a 32-bit bus by putting a small
cache at each end. The transmitter and the receiver each hold the eight most
recently sent distinct words. A word that is already in the cache crosses the
bus as a small entry number, a word of at most three ones. A new word crosses
in full and is added to both caches. One extra wire, `match`, tells the
receiver which kind of word is on the bus.

The logic is small: a 32-bit by 8-entry content addressable memory (CAM) with
a round-robin write pointer at the sending end, a plain 8-word register file
at the receiving end, and a multiplexer. Whether it saves energy depends on
the circuit, not on the logic. The encoder must spend less than the bus saves,
and in the reference circuit that only happens on buses longer than about
15 mm. This RTL gives the logic function and cycle behaviour of that circuit.
It does not describe its transistor-level tricks.

## How a word crosses the bus

Each clock cycle carries one word, `data_in`:

| case | `bus_match` | `bus[31:0]`                        | caches                                      |
|------|-------------|------------------------------------|---------------------------------------------|
| hit  | 1           | entry number in bits 2:0, rest 0   | unchanged                                   |
| miss | 0           | the word itself                    | both write the word at their write pointer  |

On a hit the receiver reads its own entry `bus[2:0]`. On a miss it passes
the bus value through. In both cases `data_out` equals `data_in` in the same
cycle. Nothing is pipelined: the transmitter, the bus and the receiver form
one combinational path between clock edges, and both caches update at the
rising edge.

The transmitter's multiplexer has the raw word on input 0 and the entry index
on input 1, and `match` selects between them. Putting the index in the low
bits with the upper bits at zero is a choice of this implementation. So is
binary coding of the index. Any code that the receiver decodes the same way
would do.

## Keeping the two caches identical

This is the part that has to be exactly right. The receiver never sees what
the transmitter's cache holds. It only reproduces the same sequence of
writes. Three rules keep the two caches in step:

1. **Write only on a miss.** On a hit the control block (`tc_control`) holds
   `load` low. The receiver gets the same decision from the match wire. So
   both ends write in exactly the same cycles. It also means a value is never
   stored twice, so at most one entry can match. The cache's index encoder
   relies on that: each index bit is an OR of match lines. An assertion in
   `cam_cache` checks it.
2. **Same replacement order.** Each end has a one-hot ring of flip-flops
   (`write_pointer`) marking the entry written next. The ring moves one place
   per write and wraps from entry 7 to entry 0. The cache therefore replaces
   its oldest word, first in first out. It does not track recency of use, so
   a word that keeps hitting is still evicted after eight misses.
3. **Same starting state.** A synchronous active-low reset `rst_n` is applied
   to both ends together. It clears a valid bit in every transmitter entry
   and moves both pointers to entry 0. An entry that has never been written
   cannot hit. The valid bit is this design's addition. The receiver's
   storage has no reset, because it is read only after a hit, and a hit means
   the entry was written.

If the two ends are ever reset separately, or the match wire is corrupted,
the caches diverge and every later hit decodes to the wrong word. Nothing in
the protocol detects or repairs that.

## The CAM at the sending end

`cam_cache` holds eight `cam_entry` rows. Each row holds 32 `cam_cell` bits
and one `cam_match`.

- **`cam_cell`** stores one bit, written when its row's `load` strobe is
  high. It compares the bit with the data line (XNOR). The reference circuit
  is a cross-coupled inverter pair. It is written through an NMOS pass gate,
  and the same LOAD signal cuts its feedback through a single PMOS, so one
  control line replaces an earlier design with five. Here it is a flip-flop
  with an enable, with no reset.
- **`cam_match`** combines the 32 bit results the way the reference circuit's
  final match logic does. The bits form two series stacks of 16. A stack
  discharges its precharged node only when all 16 bits match, and a NOR of
  the two nodes gives the row's match. In the common no-match case the nodes
  stay charged, which is where the circuit saves its energy. The RTL keeps
  this structure: an AND per stack, then a NOR of the inverted results. It
  leaves out the precharge and bleeder devices. The stack width is the
  `STACK_W` parameter.
- **`write_pointer`** ANDs each pointer bit with `load` to make the row
  write strobes.
- The rows' match lines are ORed into `match`. They are also encoded into the
  3-bit `index`.

The receiver (`receiver`) needs no content search. It is a register array
written at its own `write_pointer` and read by the index on the bus.

## Timing

The reference circuit uses a two-phase clock of 2.7 ns, which became 3.0 ns
with the final match logic. It evaluates the match in one phase and writes
the cache in the other. This RTL has one rising-edge clock instead. The
match, the multiplexer and the receiver's read are combinational during the
cycle. The cache writes happen at the edge that ends it. The critical path
runs from `data_in` through the CAM compare, the match OR, the multiplexer,
the bus and the receiver's read multiplexer to `data_out`. To pipeline it,
register the bus and the match wire, and delay the receiver's view of the
writes to match.

## Files and parameters

| file | role |
|------|------|
| `rtl/tc_pkg.sv` | shared defaults: `DATA_W = 32`, `ENTRIES = 8`, `STACK_W = 16` |
| `rtl/bus_transcoder.sv` | top: transmitter, receiver and the bus between them |
| `rtl/transmitter.sv` | CAM cache, control and output multiplexer |
| `rtl/receiver.sv` | indexed register array, write pointer and control |
| `rtl/tc_control.sv` | `load = rst_n & ~match` |
| `rtl/cam_cache.sv` | eight CAM rows, pointer, match OR, index encoder |
| `rtl/write_pointer.sv` | one-hot round-robin pointer and write strobes |
| `rtl/cam_entry.sv` | one 32-bit row with its valid bit |
| `rtl/cam_cell.sv` | one CAM bit |
| `rtl/cam_match.sv` | series-stack word match |

Top-level ports of `bus_transcoder`: `clk`, `rst_n`, `data_in[DATA_W-1:0]`,
`data_out[DATA_W-1:0]`, and, for observing the wires, `bus[DATA_W-1:0]` and
`bus_match`.

`ENTRIES` may be any value from 2 up. The index is `$clog2(ENTRIES)` bits
wide and must fit in `DATA_W`. `DATA_W` need not be a multiple of `STACK_W`:
the last stack is padded with "match" inputs. The reference circuit was
evaluated with 2 to 32 entries, and 8 was chosen as the best trade of encoder
energy against saved bus transitions.

At the defaults the design has 256 CAM bits, 8 valid bits, two 8-bit
pointers and a 256-bit receiver array.

## Simulating

Every testbench in `tb/` checks itself and ends by printing
`TB_RESULT checks=N failures=M`. With Verilator 5:

    verilator --binary --timing --assert -j 4 --top-module tb_bus_transcoder \
        -y rtl -y tb +libext+.sv rtl/tc_pkg.sv tb/tc_ref_pkg.sv tb/tb_bus_transcoder.sv
    ./obj_dir/Vtb_bus_transcoder

Replace the top module and file name to run any other testbench.
`tb/tc_ref_pkg.sv` holds the reference model that they share: a cache of
plain arrays with an integer pointer.

| testbench | what it checks |
|-----------|----------------|
| `tb_bus_transcoder` | the whole pair at default size, end to end, in three phases: 50 words with strong reuse, 5000 words from a pool of 14 (larger than the cache), 500 words with no reuse. Reset between phases. Checks `data_out`, `bus` and `bus_match` every cycle. Requires hits, misses, replacement of valid entries, evicted words coming back, pointer wrap and reset each to occur. Requires fewer bus toggles than the raw words in the reuse phases, and exactly as many with no reuse |
| `tb_cache_sweep` | the same pair at 2, 4, 8, 16 and 32 entries on a drifting "register-bus-like" synthetic stream. Prints hits and toggle counts per size |
| `tb_transmitter`, `tb_receiver` | each end alone against the model, including a reset in mid-run |
| `tb_cam_cache`, `tb_cam_entry`, `tb_cam_cell`, `tb_cam_match`, `tb_write_pointer`, `tb_tc_control` | the building blocks |

Typical output of `tb_bus_transcoder`: the 50-word reuse phase needs 202
toggles against 611 for the raw words. The 14-word pool needs about 80 % of
the raw toggles. In `tb_cache_sweep` the 8-entry cache needs about 83 % of
the raw toggles. The 2- and 4-entry caches need slightly more than the raw
words on that stream, because every miss after a hit swaps a near-zero bus
value for a full random word. These streams are synthetic. Real register
traffic will give other numbers, and toggle counts are not energy: the
encoder's own switching, which decides whether the scheme pays off, is not
modelled.

## How far to trust it

- The logic function, the 32-bit width, the 8 entries, the round-robin
  replacement, the write-only-on-miss rule, the 0/1 multiplexer order and the
  two 16-bit match stacks follow the reference circuit.
- These are choices of this RTL: the single-edge clock in place of two phases,
  the synchronous reset, the valid bits, the binary index in bus bits 2:0,
  and zero-cycle latency.
- Not modelled: precharge and bleeder devices, the clock-phase generator, the
  data input buffers, and the electrical behaviour of the bus wires. These
  have no logic function beyond what is above.
- An earlier match scheme evaluated the low five bits first and precharged
  the other 27 only if those matched. The final circuit replaced it with the
  series stacks, which are what is built here. Both compute the same
  equality.
