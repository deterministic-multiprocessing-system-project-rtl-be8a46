# Deterministic multiprocessing memory system

A multiprocessor normally gives different results from run to run when its
threads share memory: whichever processor happens to reach a location first
wins, and that depends on cache misses, bus contention and clock ratios. This
design makes a small shared-memory multiprocessor (three processors by
default) deterministic. The same program and input data always produce the
same memory contents.

The idea is to run the processors in **epochs** of a fixed number of
*instructions*, not cycles. Within an epoch each processor sees only its own
stores and the memory as it was when the epoch began. Every load and store goes
into a private buffer, and nothing reaches main memory during this time. The
buffers are then written to memory in a fixed order. A processor that tries to
observe another processor's work within the same epoch is stopped at that
access until the buffered writes have been committed.

This RTL implements the memory side of that scheme: the per-processor
buffers, the controllers that detect communication, the phase sequencer, the
instruction counters, the memory controller, a block-RAM main memory and a VGA
frame-buffer output. The processors themselves are not part of it (see
*Processor interface*).

```
             +-------------------- phase_fsm -------------------+
             | phase, commit_go, serial_turn, counter loads      |
   CPU0 --- instr_counter        CPU1 --- ...        CPU2 --- ...
    |                              |                   |
  arbitrator 0 <== snoop buses ==> arbitrator 1 <====> arbitrator 2
  (cam_buffer)                   (cam_buffer)        (cam_buffer)
    |                              |                   |
    +------------------------- mem_ctrl ---------------+
                                   |
                               main_mem  ---- port B ---- graphics (VGA)
```

## The epoch: parallel, commit, serial

`phase_fsm` cycles through three phases:

1. **Parallel.** Each processor runs until one of these happens:
   - its instruction counter reaches `par_slice`;
   - it touches memory in a way that would communicate with another processor;
   - its CAM buffer is full.

   A halted processor keeps its access pending. The phase ends when all
   processors are halted.
2. **Commit.** The arbitrators take turns in round-robin order. Each one writes
   its written slots to main memory and announces every committed address, so
   that the others drop their copies. It then clears its buffer.
3. **Serial.** The processors take turns in the same round-robin order. Each
   runs alone for `ser_slice` instructions, and its accesses go straight to
   main memory. A processor that was stopped because of communication
   completes its pending access here. This is why a short lock acquire does
   not waste a whole slice. Set `ser_slice = 0` to skip these turns.

Then every counter is reloaded with `par_slice` and the next epoch begins.
The round-robin order starts with CPU `e mod NCPU` in epoch `e` and continues
in increasing index order.

## The buffer tags and the snoop protocol

This is the heart of the design. Each CAM buffer slot holds an address, the
data byte after the processor's latest access, and three tag bits:

- **E/S**: held Exclusively by this processor, or Shared with others;
- **R**: read in this epoch;
- **W**: written in this epoch.

Tags are written like `E/R/0` (exclusive, read, not written).

An access first searches the processor's own (local) buffer:

| access | local tag allowed | becomes  |
|--------|-------------------|----------|
| read   | `E/?/?`           | `E/R/?`  |
| read   | `S/R/0`           | `S/R/0`  |
| write  | `E/?/?`           | `E/?/W`  |
| write  | `S/0/W`           | `S/0/W`  |

On a local miss, the arbitrator raises `start` on its own snoop bus. The bus
carries `start`, read/write and the address: N+2 wires for an N-bit address.
Every other arbitrator (a *friend*) answers in the same cycle with a two-bit
code:

- `01` **A**: not held;
- `10` **B**: held, and the access may go on;
- `11` **C**: held, and the access must wait for the commit;
- `00`: no snoop in progress.

| access | friend tag answering B | friend becomes | no holder: new slot | holders all B: new slot |
|--------|------------------------|----------------|---------------------|-------------------------|
| read   | `E/R/0` or `S/R/0`     | `S/R/0`        | `E/R/0`             | `S/R/0`                 |
| write  | `E/0/W` or `S/0/W`     | `S/0/W`        | `E/0/W`             | `S/0/W`                 |

Any other case is communication, and the processor halts:

- a local tag not in the first table;
- any friend answering C;
- a miss while the buffer is full (overflow).

Some examples:

- **Read-only sharing.** Two processors that only read an address share it as
  `S/R/0`.
- **Write-only sharing.** Several processors that only write an address in the
  same epoch share it as `S/0/W`. At commit time the first of them in the
  round-robin order writes memory, and its commit notice erases the other
  copies. The result is therefore fixed by the order, not by timing.
- **Write then read.** CPU A stores to X (`E/0/W`), and CPU B then loads X. A
  answers C, so B halts. B's load completes in its serial turn and returns A's
  value.
- **Read then write.** CPU B loads X first (`E/R/0`), and CPU A then stores to
  X. B answers C, so A halts. B keeps the old value, and A's store completes
  in its serial turn.

These invariants follow from the tables, and the random test checks them every
cycle:

- an `E` address is held by no other buffer;
- all copies of a shared address have the same R and W bits;
- no slot is ever `S/R/W`.

### Design decisions the tables leave open

- **One-cycle snoop.** Friends answer combinationally, and all tag changes
  take effect at the same clock edge. A friend answering B gives up its E bit
  at once.
- **Races between arbitrators.** If two arbitrators snoop the same address in
  the same cycle, the lower-numbered one goes first and the other waits one
  cycle. A local hit also waits for a cycle in which no friend snoops its
  address. A tag therefore never takes an owner change and a friend change
  in the same cycle.
- **Read miss.** The slot is taken when the snoop is decided, and the data is
  filled in when main memory answers. This keeps a later snoop from missing
  it. A shared read also fetches from main memory: a slot that was never
  written equals memory, because memory changes only in the commit and serial
  phases.
- **Write miss.** No fetch is needed, because a slot holds one whole byte.
- **Slot allocation.** Slots are filled in order and are not reused until the
  buffer is cleared. The commit walk goes in slot order, which is the order in
  which the addresses were first touched.

### What is and is not deterministic

Epoch boundaries depend only on instruction counts. Commit order and serial
order depend only on the epoch number. Given these, the outcome is fixed
whenever conflicting accesses of different processors fall into different
epochs, or are ordered within an epoch as in the examples above.

If a load and a store to the same address by two processors fall into the
same parallel phase, which one halts depends on which one reaches its
arbitrator first (see the last two examples). In that case the tables alone do
not decide the outcome, and this implementation follows the tables. The
end-to-end test runs two copies of the system side by side. One copy has
stalling processors, the other has processors that never stall. The test
checks that the copies agree for programs whose conflicting accesses are
separated by at least one epoch or by a clear margin.

## Processor interface

The processors are meant to be small 8-bit PicoBlaze-class cores, extended
with an external memory port, a halt input and an instruction-retire output.
No processor is included. `dmp_top` brings out, per processor `i`:

| signal | dir | meaning |
|--------|-----|---------|
| `cpu_req[i]`, `cpu_we[i]`, `cpu_addr[i]`, `cpu_wdata[i]` | in | access, held until `cpu_ack[i]` |
| `cpu_ack[i]`, `cpu_rdata[i]` | out | one-cycle acknowledge, with read data |
| `cpu_halt[i]` | out | do not start an instruction on this clock edge |
| `cpu_retire[i]` | in | one pulse per completed instruction |

Each instruction counter looks ahead over the current retire pulse. `halt`
therefore rises in the cycle of the retire that ends the slice, and a
processor that samples `halt` at the next edge never runs past its slice.
Exact slices are what make the epochs deterministic.

Access latency:

| access | acknowledged |
|--------|--------------|
| local hit or write miss | in the cycle after the request is taken |
| read miss or serial-phase access | after main memory answers: typically four cycles after the request with an idle memory controller |

`par_slice` and `ser_slice` (in instructions) are inputs. `tb/cpu_model.sv` is
a behavioural processor used by the testbenches and shows the expected
handshake.

## Memory controller, main memory, graphics

- **`mem_ctrl`** gives each arbitrator a request port. A round-robin picker
  admits one request per cycle into a 4-entry queue, so no arbitrator is passed
  over more than NCPU-1 times. The queue is served in arrival order, one access
  per cycle. Completion comes two cycles after admission at the earliest.
- **`main_mem`** is 64 KiB of dual-port block RAM. Both ports have one-cycle
  read latency, and port A returns the old data on a write (read-first). The
  contents start at zero. It replaces the board's external ZBT SRAM.
- **`graphics`** scans a 160x120 byte frame buffer at `0x8000` through the
  memory's second port. Each byte is one RGB 3-3-2 pixel, shown as a 4x4 block
  of a standard 640x480 VGA raster. The pixel clock is the `pix_ce` enable of
  `clk`. Outputs lag the raster position by two pixel clocks.

## Parameters

| parameter | default | origin |
|-----------|---------|--------|
| `NCPU` | 3 | the three processors of the original block diagram |
| `CAM_DEPTH` | 16 slots | own choice; the proposal budgets no more than 3 block RAMs for the buffers (16 slots of 28 bits x 3 = 1,344 bits) |
| address / data width | 16 / 8 bits | own choice; 8 bits is the PicoBlaze data width |
| `CNT_W` (counter width) | 16 | own choice |
| `QDEPTH` (memory queue) | 4 | own choice; the proposal only says "limited size" |
| VGA timing, frame buffer size and base | 640x480, 160x120 at `0x8000` | own choice |
| snoop answer encoding | A=01, B=10, C=11, none=00 | own choice; two bits per answer is from the proposal |

## Departures from the original proposal

- **Processor.** No processor is included, and neither are its halt,
  memory-port and retire modifications. They are interface requirements here.
- **Main memory.** The ZBT SRAM controller and its pipelined commit mode are
  not built. Main memory is block RAM, an option the proposal itself names.
- **Modified bytes.** "Write out modified bytes" reduces to the W bit, because
  each slot holds one byte.
- **Write misses.** A write miss does not fetch from memory.
- **Commit turns.** Turns run one after the other and are not pipelined.
- **Round-robin start.** The first CPU of the round-robin order advances by
  one each epoch.

## Files and simulation

`rtl/`:

- `dmp_pkg.sv`: shared types: tags, phases, snoop bus and answers, memory
  request and response structs, event struct, and the tag-rule functions.
- `instr_counter.sv`, `cam_buffer.sv`, `arbitrator.sv` (instantiates
  `cam_buffer`), `phase_fsm.sv`, `mem_ctrl.sv`, `main_mem.sv`, `graphics.sv`.
- `dmp_top.sv`: the whole system.

`tb/` holds one self-checking testbench per block (`tb_<block>.sv`), plus:

- `tb_dmp_top.sv`: end to end at the default size. Two copies of the system,
  one with stalling processors, run directed programs. The test checks every
  load value, the final memory, agreement between the copies, the VGA pixel,
  and that every mechanism occurred.
- `tb_dmp_random.sv`: random programs with heavy sharing. It checks the tag
  invariants every cycle and every load against the protocol's rules.
- `cpu_model.sv`: the behavioural processor.

Each testbench prints `TB_RESULT checks=N failures=M`. To run one with
Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb \
    rtl/dmp_pkg.sv tb/tb_dmp_top.sv --top-module tb_dmp_top
./obj_dir/Vtb_dmp_top
```

The RTL is synthesizable SystemVerilog-2017. The CAM buffers are registers
(every slot is compared with up to NCPU addresses per cycle), and main memory
infers a dual-port RAM. The assertions in `arbitrator` and `mem_ctrl` check
the request handshake, single grants and queue bounds.
