# Online transparent memory test for a NoC router input buffer

Every input channel of a network-on-chip router holds its incoming flits in a
small SRAM-based FIFO. Permanent faults that develop in that SRAM while the chip
is in the field corrupt flits silently. This design adds a test circuit to the
buffer that checks every memory cell while the router is running. It uses a
*transparent* March-style test, SOA-MATS++: each row is read, inverted, inverted
back and read again. When the test finishes, the memory holds exactly what it held
before, so flits waiting in the buffer survive the test. Traffic is only paused
for a few dozen cycles. Nothing has to be drained or saved.

The RTL is a single input-channel buffer (`noc_fifo_buffer`) with its parts.
Each part is described below:

| module | role |
|---|---|
| `sram_dp` | dual-port SRAM array (one write port, one registered read port) |
| `fifo_addr_ctrl` | write or read address counter with a lap bit (used twice) |
| `fifo_flags` | full/empty from the two addresses and lap bits |
| `soa_mats_test` | the transparent SOA-MATS++ test controller and comparator |
| `fifo_test_mux` | hands the SRAM ports to either the FIFO path or the test circuit |
| `test_scheduler` | starts a test every `TEST_PERIOD` cycles or on request |
| `fifo_test_pkg` | default sizes and the state/run enums |

## The transparent SOA-MATS++ test

A normal March test writes fixed patterns, which destroys the contents of the
memory. The transparent version uses the word already stored in a row as its own
pattern. For row *i* it does three runs, *j* = 0, 1, 2. Each run starts by reading
the row into `temp`:

| run | action after the read | expected `temp ^ original` |
|---|---|---|
| *j* = 0, invert | `original <= temp`; write `~temp` | (none) |
| *j* = 1, restore | compare; write `~temp` (the original word again) | all ones |
| *j* = 2, verify | compare | all zeros |

A bit that deviates from the expected all-ones or all-zeros pattern marks that
bit of that row as faulty. Every cell is written with both its own value and
the complement of that value, and is read after each write. So a cell stuck at
0 or at 1 is always found, whatever it holds. If the stored bit equals the
stuck value, the invert write fails, and the restore read returns the old value
where its complement was expected. If the stored bit differs from the stuck
value, the first read already returns the stuck value, so the saved word
already has the wrong bit. The invert write then fails, and the restore compare
shows the fault. The last read (run 2) catches faults that only show after the
restore write, such as a cell that does not return to its original value.

The rows are tested in order 0 .. DEPTH-1. The whole test needs 3·DEPTH reads
and 2·DEPTH writes.

### Cycle schedule

The SRAM read is synchronous, so each run takes two cycles:

```
T_READ  : t_re=1, t_raddr=i                  (word arrives at the clock edge)
T_EVAL  : temp = t_rdata; save/compare; t_we=1 (runs 0 and 1), t_wdata=~temp
```

The write-back goes through the SRAM's separate write port in the same cycle
that the word arrives. The next run's read follows one cycle later and sees the
written word. One row takes 6 cycles. A full test runs from `T_IDLE` through
6·DEPTH cycles of `T_READ`/`T_EVAL` and one `T_DONE` cycle. `busy`
(`test_ctrl`) is high for 6·DEPTH + 1 cycles, which is 49 cycles at depth 8.
`done` (`test_done`) pulses in the last of these cycles.

### Results

- `fault` is cleared when a test starts and set by the first failing compare.
- `fault_addr` holds the first faulty row.
- `fault_mask` holds the OR of all deviating bit positions.
- All three hold until the next test starts.
- `fault_event` pulses on every failing compare.

The design reports faults and does nothing else about them. What the router
does with a faulty buffer (mark the port unusable, reroute) is left to the
surrounding logic.

## The FIFO underneath

The buffer is a counter-addressed, dual-port RAM FIFO. The SRAM is used as a
circular buffer. A write counter and a read counter each step through rows
0 .. DEPTH-1 and wrap to 0. The two controllers are separate instances of
`fifo_addr_ctrl`.

To tell full from empty, each counter also keeps a **lap bit**, which toggles
every time the counter wraps. The two counters can be at most one traversal
apart, so this single bit is all that is needed:

- **empty**: addresses equal, lap bits equal (the reader has caught up);
- **full**: addresses equal, lap bits different (the writer is one lap ahead).

The wrap is explicit at DEPTH-1, so depths that are not powers of two also
work. `count` gives the occupancy.

## Sharing the SRAM between traffic and test

`fifo_test_mux` sits between the SRAM and its two users. When `test_ctrl` is
low, the SRAM sees the normal path:

- `wen_int = push & !full`
- `ren_int = pop & !empty`
- the two counter addresses
- `data_in` as the write data

When `test_ctrl` is high, the test circuit drives both enables, both addresses
and the write data. The read-enable and write-enable multiplexers are the two
that matter for correctness. Without them, a flit could be written or read in
the middle of an invert/restore pair.

While a test runs, the buffer **pauses**:

- `full` and `empty` are both forced high, so the upstream router cannot push
  and the downstream router cannot pop.
- The counters do not move.
- The stored flits are not touched, apart from the invert/restore pairs that
  cancel each other out.

When `test_ctrl` drops, traffic resumes where it stopped. An assertion in
`noc_fifo_buffer` checks that the normal enables are never active during a
test.

## Scheduling

`test_scheduler` counts the idle cycles since the last test started. It starts
a new test when the count reaches `TEST_PERIOD` or when `test_req` is raised. If
a request arrives during a test, it is held and served as soon as that test
ends. The interval count restarts at every start, whether periodic or
requested. `TEST_PERIOD = 0` turns off the periodic starts.

## Interface and timing (`noc_fifo_buffer`)

All signals are synchronous to one router clock `clk`. `rst_n` is an
asynchronous, active-low reset of all control state. The SRAM array itself is
not reset.

| port | dir | width | meaning |
|---|---|---|---|
| `push`, `data_in` | in | 1, DATA_W | flit written on a rising edge with `push && !full` |
| `full` | out | 1 | no push accepted: FIFO full or test running |
| `pop` | in | 1 | flit read on a rising edge with `pop && !empty` |
| `data_out`, `dout_valid` | out | DATA_W, 1 | the popped flit, valid in the cycle after the pop |
| `empty` | out | 1 | no pop accepted: FIFO empty or test running |
| `count` | out | AW+1 | occupancy |
| `test_req` | in | 1 | request a test |
| `test_ctrl` | out | 1 | test running (6·DEPTH+1 cycles) |
| `test_done` | out | 1 | last test cycle |
| `fault_event`, `fault`, `fault_addr`, `fault_mask` | out | 1, 1, AW, DATA_W | test results (see above) |
| `fi_en`, `fi_addr`, `fi_bit`, `fi_val` | in | 1, AW, log2 DATA_W, 1 | stuck-at cell injection for verification; tie `fi_en` low |

`data_out` is the SRAM read register. It is only meaningful when `dout_valid` is
high, because test reads overwrite it.

Parameters:

- `DATA_W` = 32: the flit width.
- `DEPTH` = 8: rows of the buffer.
- `TEST_PERIOD` = 4096 cycles between periodic tests.
- `AW` is derived from `DEPTH`.

## What is specified and what is chosen here

Taken from the specification of this design:

- the transparent SOA-MATS++ sequence (invert, restore, verify) and its compare
  rule;
- testing row by row from 0 to N-1;
- the dual-port, counter-addressed RAM FIFO with lap-bit full/empty detection;
- separate read and write controllers;
- enable multiplexers selected by `test_ctrl`, with internal `wen_int`/`ren_int`
  in normal mode;
- the 32-bit buffer word;
- tests that run online and periodically.

Chosen here:

- **Depth 8.** No depth is specified.
- **One clock for both controllers.** The FIFO organisation this design
  borrows from was built with independently clocked read and write
  controllers. A router input buffer runs on the router clock, so one clock is
  used. A dual-clock version would need synchronised pointers between the two
  domains, which is not built.
- **The two-cycle-per-run schedule, the 4096-cycle test period, and the held
  request.**
- **Pausing traffic during a test.** How the neighbours see the buffer during
  a test is not specified.
- **The result outputs** (`fault`, `fault_addr`, `fault_mask`, `fault_event`).
- **The address and write-data multiplexers.** Only the enable multiplexers
  are specified.
- **The stuck-at injection ports on the SRAM.** They are a verification aid.

Not included:

- **The router's routing logic.** The routing algorithm and header format are
  not defined.
- **The online test of the routing logic.** In that scheme, test patterns ride
  in unused fields of header flits, or pseudorandom traffic serves as patterns.
  The header layout and the response checking are not defined.
- **Link-level retransmission.** In that scheme, a sent flit stays in the
  upstream buffer until the downstream router has confirmed it. The error
  check and the acknowledgement signalling are not defined.
- **The remaining router and network.** That includes crossbar, arbitration
  and links. Network-level traffic studies (for example the VOPD application
  graph on a mesh) therefore cannot be run on this RTL.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

- `tb_sram_dp`: read latency, hold, read-before-write, parallel ports, stuck-at
  injection.
- `tb_fifo_addr_ctrl`: random increments against an integer model, depths 8
  and 6.
- `tb_fifo_flags`: every read position and occupancy, depths 8 and 6.
- `tb_fifo_test_mux`: random values on both paths.
- `tb_test_scheduler`: first start after P-1 cycles, start-to-start interval
  of busy+P, a request served in the same cycle, a held request, `PERIOD = 0`.
- `tb_soa_mats_test`: uses a memory model in the testbench. It checks:
  - the exact access order and the written words;
  - that `busy` lasts exactly 6·DEPTH+1 cycles;
  - that the contents are restored;
  - that random stuck-at-0/1 cells are found, with the right row and bit.
- `tb_fault_coverage`: stuck-at fault coverage of the complete buffer at the
  default parameters. It injects each of the 512 single stuck-at-0/1 cells
  (8 rows x 32 bits x 2 values) in turn, with the buffer full of random flits.
  Each fault must be reported at exactly its row and bit. Fault-free tests in
  between must report nothing and leave the buffered flits intact.
- `tb_noc_fifo_buffer`: end to end, at the default parameters. It runs:
  - 20 000 cycles of random traffic, checked against a queue model, including
    periodic and requested tests, some of them with flits in the buffer;
  - injected stuck-at cells, which must be found;
  - a test on the repaired memory, which must report no fault;
  - more traffic after that.

  It counts how often each mechanism happens, and fails if one never happens.
  The mechanisms are: push, pop, simultaneous push and pop, full, empty,
  wrap-around, periodic test, requested test, held request, test with data
  buffered, traffic paused, and fault detected.

To simulate, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/fifo_test_pkg.sv tb/tb_noc_fifo_buffer.sv --top-module tb_noc_fifo_buffer
./obj_dir/Vtb_noc_fifo_buffer
```

Replace the testbench name to run another one. The end-to-end run takes under a
second.

With Verilator's lint (`-Wall`), only two warnings remain. They say that the
package's default-size constants are unused in some modules. All modules
synthesise without latches. At the defaults the buffer has:

- 256 bits of SRAM;
- about 130 flip-flops, 75 of them in the test controller: the saved
  `original` word and the `fault_mask` register are 32 bits each.
