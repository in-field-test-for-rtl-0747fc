# Online transparent test of a NoC router input FIFO

Routers in a network-on-chip spend most of their area on input FIFO buffers.
Over a chip's lifetime, some SRAM cells in those buffers develop faults. At
first they fail now and then, and in the end they fail permanently. This RTL
adds a small test circuit to one router input buffer. Every so often it takes
the buffer out of service for a short time and runs a march test on the words
that are stored in it. The test is *transparent*: each word is inverted,
checked, restored and checked again, so the flits in the buffer are still
there, unchanged, when traffic resumes. A faulty bit clears the `no_fault`
output.

The test runs whatever the buffer is doing. It is not delayed until the
buffer is full or empty, because waiting would let faults pile up. It covers
the words stored at that moment. Over many test periods the stored words
land at different addresses, so in time every location gets tested.

The design follows the architecture of an article on in-field test of NoC
FIFO buffers. That article adapts the single-order-address MATS++ test to
FIFOs and makes it transparent. Where the article leaves a detail open, this
RTL makes its own choice. Those choices are marked below and in each file's
header.

## The march element

Written as a march test, the test is

    { ⇑ ( r x , w ~x , r ~x , w x , r x ) }

Here `x` is whatever word the location already holds, and ⇑ means ascending
FIFO order. Each location is tested as follows:

1. **r x**: read the word into `temp` and copy it into `original`.
2. **w ~x**: write back `~temp`.
3. **r ~x**: read it back into `temp`. `temp XOR original` must be all ones.
   A 0 in that result marks the faulty bit.
4. **w x**: write back `~temp`. For a fault-free word this is `x` again.
5. **r x**: read it back. `temp XOR original` must now be all zeros.

Example with a 4-bit word: the location holds `1010` and its MSB is stuck at 1.
The invert write stores `1101` instead of `0101`. The invert read-back gives
`1101 XOR 1010 = 0111`. The 0 in the MSB flags the fault.

A stuck-at fault is always caught at step 3, whatever the stored value. Either
the inverted value cannot be written, or the original read already returned
the stuck value and the read-back repeats it. A transition fault (a cell that
cannot rise, or cannot fall) is caught at step 3 or step 5. The
`tb_test_circuit` testbench checks both fault classes on random words.

## Normal mode and test mode

`fifo_test_buffer` is the top. It has two modes, selected by `test_ctrl`:

| | normal mode (`test_ctrl`=0) | test mode (`test_ctrl`=1) |
|---|---|---|
| memory write data (mux mu1) | `data_in` | `test_data` = `~temp` |
| write address (mu4) | normal write generator | test write generator |
| read address (mu5) | normal read generator | test read generator |
| write enable (mu7) | `wen_int` (if not full) | test controller's strobe |
| write clock | `clk` | inverted `test_clk` |
| read capture (mu6) | output register, on `ren_int` | `temp`, every rising `test_clk` |
| `full` (FULL mux) | occupancy = DEPTH | forced high (`test_full`) |
| `empty` | occupancy = 0 | forced high |
| `data_out` (mu2) | output register | `INVALID_FLIT` after one cycle |

All four address generators are Gray-code counters (`gray_addr_gen`). Each one
keeps a binary pointer with one extra wrap bit and drives the memory with the
Gray code of the low bits. The writer and the reader use the same mapping, so
the FIFO order is kept.

In test mode the buffer is locked. `full` stays high, so the upstream router
sends nothing. `empty` stays high, so the downstream side reads nothing. Any
request that arrives anyway is ignored. Assertions check that the two sides
obey `full` and `empty`.

### Which locations are tested

When the test starts, the test address generators are loaded with the
location of the flit popped most recently. This is the flit that was on its
way to `data_out` at the switch. From there the test walks forward through
every stored flit: `num_loc = occupancy + 1`, capped at `DEPTH`. Tested
locations are restored, and the rest are never written.

### The flit in flight at the switching instant

`test_ctrl` rises on a router-clock edge. A flit popped on that same edge
lands in the output register. `tmp_test_ctrl` is `test_ctrl` delayed by one
router cycle in a flip-flop, and forced low while `test_ctrl` is low (mux
mu3). Because of it, `data_out` keeps that flit, with `out_valid`, for one
more cycle. After that cycle `data_out` switches to `INVALID_FLIT`. No flit is
lost at the switch.

## Clocks and timing

There are two clocks. `clk` is the router clock. `test_clk` is faster and runs
the test circuit and the test address generators. During test, reads happen
on rising edges of `test_clk` and writes on falling edges. So one `test_clk`
cycle can write a location and then read it back.

The memory's write clock is a multiplexer: `clk` in normal mode, `~test_clk`
in test mode. It switches cleanly only under two conditions:

* `test_clk` is high whenever `clk` rises. In practice, `test_clk` is an
  integer multiple of `clk` with aligned rising edges. The testbenches use
  2×.
* `test_ctrl` changes only on rising edges of `clk`, which the scheduler
  guarantees.

Lint flags `test_ctrl` as both a data signal and a clock select because of
this multiplexer. That is intended. On silicon, use a glitch-free clock-switch
cell here.

The handshakes between the domains use two-flop synchronisers:

* `test_ctrl` goes from the router domain to the test domain.
* `test_done` comes back from the test domain to the router domain.

The pointers that the test circuit reads (start location and count) cannot
change during test mode, so they are stable when the test circuit loads them.

Timeline of one test, with N = `num_loc`:

| event | when |
|---|---|
| `test_ctrl` rises | `TEST_PERIOD` router cycles after the previous test ended |
| address generators loaded | 3 `test_clk` cycles later (synchroniser, then LOAD) |
| each location | 3 `test_clk` cycles: READ_X, INVERT, RESTORE |
| `test_done` | `6 + 3·N` `test_clk` cycles after `test_ctrl` rose |
| `test_ctrl` falls | 3 router cycles after `test_done` |

`test_done` comes 6 + 3·N cycles after the rise because the last two
comparisons must leave the pipeline first. The end-to-end testbench checks
this count for every test. A full 8-word buffer is out of service for about
30 `test_clk` cycles plus about 5 router cycles.

## Test circuit datapath (`test_circuit`, `test_controller`)

* `temp` loads the memory's read data on every test read. `original` loads
  it on the first read of each location.
* `test_data` is `~temp`. This models the inverter plus a buffer that drives
  the line only while writing. Here the buffer is an AND gate, and the line
  reads 0 when the buffer is off.
* The comparator XORs `temp` with `original` one cycle after each read-back,
  into `result`.
* One cycle later, the check logic tests `result` for all ones (invert
  read-back) or all zeros (restore read-back). `inv_restore_read` selects
  which. A mismatch clears `no_fault`, which stays low until reset.
* The controller's states are IDLE, LOAD, READ_X, INVERT, RESTORE and DONE.
  DONE waits for the compare pipeline to empty, then raises `test_done`.

## The test scheduler (`test_scheduler`)

`test_scheduler` is a counter in the router domain. After `TEST_PERIOD`
router cycles of normal mode it raises `test_ctrl`, whatever the buffer holds.
It lowers `test_ctrl` again when `test_done` arrives. The period is long
enough that an intermittent fault has time to become permanent before it is
tested. It is also short enough that faults do not pile up.

### What a test period costs

`tb_throughput_self_similar` sends one self-similar stream to four copies of
the buffer, one per `TEST_PERIOD`. The stream is Pareto ON/OFF traffic
offering about 0.7 flit per router cycle. The same flits go to every copy.
Typical results:

| `TEST_PERIOD` | tests in 40,000 cycles | accepted / offered |
|---|---|---|
| 16 | ~1,700 | ~92 % |
| 64 | ~600 | ~100 % |
| 256 | ~165 | 100 % |
| 1024 | ~42 | 100 % |

Every flit comes out unchanged and in order. Tests cost throughput only when
they are very frequent. At a period of 16 cycles the buffer is locked for
about 9 of every 25 cycles.

## Parameters (top)

| parameter | default | source |
|---|---|---|
| `DATA_W` | 4 | word size of the article's worked example |
| `DEPTH` | 8 | own choice; must be a power of two |
| `TEST_PERIOD` | 256 router cycles | own choice (the article gives no period) |
| `INVALID_FLIT` | 0 | own choice (the article names it but gives no encoding) |

Ports: `clk`, `test_clk`, `rst_n` (asynchronous, active low); upstream
`data_in`, `wen_int`, `full`; downstream `ren_int`, `empty`, `data_out`,
`out_valid` (the flit arrives one cycle after `ren_int`); status `test_ctrl`
and `no_fault`.

## Where this RTL departs from the article, or fills gaps

* The delay flip-flop that keeps the in-flight flit runs on the router clock,
  so the flit lasts a full router cycle. The article's drawing clocks it with
  the test clock.
* The mux mu2 that drives `INVALID_FLIT` selects data on input 1 and the
  invalid flit on input 0, as drawn. Its select is driven with the inverse of
  `tmp_test_ctrl`. The polarity is this design's choice.
* The article has `temp` pick up the in-flight flit from the data line at the
  switching instant. Here the test's first read fetches the same flit again
  from its memory location, a few `test_clk` cycles after the switch. The
  value is the same, and the location is still intact.
* The memory has an asynchronous read port and an edge-triggered write port.
  The read enables act on the capture registers (the output register and
  `temp`). The address registers drawn after mu4/mu5 are merged with the
  generators' pointer registers.
* The schedule of three `test_clk` cycles per location, the two-stage
  compare/check pipeline, the synchronisers, the `test_done` handshake, the
  sticky `no_fault` flag, the `empty`/`out_valid` signals and the start
  location of the test are this design's own.
* Not included: the router itself (routing logic, crossbar, arbitration), the
  mesh network, and the article's online test of the routing logic. The
  article does not describe them in enough detail to build. The buffer's
  router-side signals are ports, ready to connect to a router.

## Files

`rtl/` (one module or package per file):

* `fifo_test_pkg.sv`: controller state type.
* `gray_addr_gen.sv`: Gray-code address generator.
* `fifo_mem.sv`: storage array.
* `test_controller.sv`: march sequencer.
* `test_circuit.sv`: temp/original/comparator/result/check datapath plus controller.
* `test_scheduler.sv`: periodic test counter.
* `fifo_test_buffer.sv`: top.

`tb/` (self-checking; each testbench prints `TB_RESULT checks=N failures=M`):

* `tb_fifo_test_buffer.sv`: end to end, at the default parameters. It runs
  random traffic at changing rates and compares every flit with a reference
  queue, so it proves the tests are transparent. It checks the invalid flit,
  the lock and the test length, and detects an injected stuck-at fault in a
  full buffer. It counts each mechanism: test start, in-flight flit, invalid
  flit, forced full, full/empty in normal mode, test of a full buffer, fault
  detected.
* `tb_throughput_self_similar.sv`: the throughput sweep above.
* `tb_test_circuit.sv`: the 4-bit example above (result `0111`),
  restoration of random contents, and detection of random stuck-at and
  transition faults, against a behavioural memory.
* `tb_test_controller.sv`, `tb_test_scheduler.sv`, `tb_gray_addr_gen.sv`,
  `tb_fifo_mem.sv`: unit tests.

To simulate with Verilator 5:

    verilator --binary --timing --assert -Irtl rtl/fifo_test_pkg.sv \
        tb/tb_fifo_test_buffer.sv --top-module tb_fifo_test_buffer
    ./obj_dir/Vtb_fifo_test_buffer

Replace the testbench name to run any other test. The simulator has two
states, so everything the design reads is reset. The memory array is not
reset, as in an SRAM.
