# A four-processor SoC with a hardware thread queue

This is a small shared-memory multiprocessor built for *cooperative*
multithreading. In a cooperative scheme a thread gives up the processor only
at known points (`yield()`, thread end). So a context switch needs no saved
register file: it saves the stack pointer of the current thread and loads the
stack pointer of the next one. In a pure-software thread library those stack
pointers live in a circular queue in off-chip main memory, so every context
switch pays for off-chip accesses over a shared bus. This design adds a
**thread-queue manager**: a small on-chip register file plus a controller that
keeps that circular queue of stack pointers on chip. A switch then costs two
single-cycle bus accesses instead of off-chip round trips.

The system around it is kept minimal:

```
   proc 0     proc 1     proc 2     proc 3        (outside the RTL: ARM cores with I/D caches)
     |          |          |          |
  ===+==========+====+=====+==========+====  central_bus (one transaction at a time)
                     |          |          |
          thread_queue_manager  ts_lock    memory_interface ---- off-chip main memory
          (tqm_controller +     (1 bit)
           tqm_regfile)
```

All synchronisation rests on a single hardware **test-and-set lock**.
Software builds further locks in memory on top of it: the boot lock, the
thread-queue lock and any application lock.

## Files

| file | what it is |
|---|---|
| `rtl/mp_pkg.sv` | bus request/response structs, address map, register offsets, address decoder |
| `rtl/mpsoc_top.sv` | top level: bus + lock + thread-queue manager + memory interface |
| `rtl/central_bus.sv`, `rtl/rr_arbiter.sv` | shared bus with round-robin arbitration |
| `rtl/ts_lock.sv` | hardware test-and-set lock |
| `rtl/thread_queue_manager.sv`, `rtl/tqm_controller.sv`, `rtl/tqm_regfile.sv` | the thread-queue manager |
| `rtl/memory_interface.sv` | bridge from the bus to off-chip memory |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_mpsoc_top.sv` | end-to-end test at default size (4 processors, 32-entry queue) |
| `tb/tb_dataflow_encoder.sv` | 26-actor data-flow program on 1, 2, 3 and 4 processors |
| `tb/tb_accumulate_1m.sv` | one million numbers summed by 4 threads on 1 and 4 processors |
| `tb/proc_model.sv`, `tb/proc_df_model.sv` | behavioural processors that run the thread library's bus traffic |
| `tb/main_memory_model.sv` | behavioural off-chip memory with a fixed latency |

## The bus and its handshake

All blocks share one pair of packed structs from `mp_pkg`.

* Master side (`bus_req_t` / `bus_rsp_t`): a processor raises `req` with `we`,
  `addr` and `wdata`, and holds them unchanged until it sees `ack` for one
  cycle. For a read, `rdata` is valid in the `ack` cycle.
* Slave side (`slv_req_t` / `slv_rsp_t`): the bus raises `sel` on exactly one
  slave. The slave ends the transaction by raising `ready`; its side effects
  take place at the clock edge that closes the `ready` cycle.

`central_bus` is idle or busy. When it is idle and any master requests, the
round-robin arbiter picks one (the first requester after the last winner).
That master owns the bus until the addressed slave answers. The bus then goes
idle for one cycle before the next grant. This gives the following timing:

| access | cycles from request to ack on an idle bus |
|---|---|
| lock or thread queue | 2 |
| main memory | 2 + memory latency (6 with the 4-cycle test memory) |

Assertions in `central_bus` check three rules: at most one `ack` per cycle,
the owner holds its request, and the request stays stable while it is
pending. `memory_interface` asserts that the bus keeps `sel` up until it
answers.

Address map (`mp_pkg`):

| address | slave |
|---|---|
| `0x0000_0000`–`0xFFFE_FFFF` | main memory, through `memory_interface` |
| `0xFFFF_0000` | `ts_lock` |
| `0xFFFF_1000` (+0 QUEUE, +4 STATUS) | `thread_queue_manager` |
| other `0xFFFF_xxxx` | answered by the bus with 0 |

## The test-and-set lock

`ts_lock` holds one bit and responds in one cycle.

* A read is `tread()`: it returns the old bit in `rdata[0]` and sets the bit.
* A write is `twrite(V)`: it stores `wdata[0]`.

The bus serialises all transactions, so two processors can never both read
FALSE. To acquire, a processor repeats `tread()` until it returns 0. To
release, it writes 0.

Locks in memory follow a two-step pattern, used by the test programs:

```
tsread(L):     spin on tread() ; old = mem[L] ; mem[L] = 1 ; twrite(0) ; return old
tswrite(L, v): spin on tread() ; mem[L] = v ; twrite(0)
```

## The thread-queue manager

This is the part of the design that matters most. It is a circular FIFO of
`DEPTH` stack pointers (default 32: `Reg0` … `Reg31`):

* `tqm_regfile` holds the entries.
* `tqm_controller` keeps `q_head` (next entry to hand out), `q_tail` (next
  free entry) and an entry count.

| access | effect |
|---|---|
| write QUEUE | `create()`/`yield()`: store the stack pointer at `q_tail` and advance `q_tail` (wrapping to `Reg0`). If the queue is full, the write is dropped and the sticky `overflow` flag is set. |
| read QUEUE | `start()`/switch: return the stack pointer at `q_head` and advance `q_head`. If the queue is empty, return 0 (no thread ready), leave the queue unchanged and set the sticky `empty_read` flag. |
| read STATUS | `{overflow, empty_read, full, empty}` in bits 31..28, count in bits 15..0 |
| write STATUS | clear both sticky flags |

The manager does not make a sequence of accesses atomic. Software takes the
thread-queue lock around each access, exactly as it would for a queue in
memory. So the hardware only has to serve one access at a time, which the bus
already guarantees. Only the stack pointers of user threads are queued. Each
processor's main-thread stack pointer stays with software.

## How software uses it (testbench processor models)

`tb/proc_model.sv` runs the library's bus traffic one transaction at a time:

1. **Boot.** Every processor competes for the boot lock. The winner runs
   `main()`; the others run `slave_main()`.
2. **`create()`.** `main()` writes a small stack frame for each thread (id,
   loop index, partial sum) and pushes the thread's stack pointer under the
   thread lock.
3. **`start()`.** Every processor loops: take the thread lock, pop a stack
   pointer, release the lock. A 0 means there is no work. Otherwise the
   processor loads the context, adds `CHUNK` numbers from main memory, and
   then either yields (saves the context and pushes the stack pointer back) or
   finishes (stores its sum, increments `thread_done` under a third lock, and
   drops the thread).
4. **Finish.** `main()` turns the four sums into prefix sums.

`tb/proc_df_model.sv` does the same for a data-flow program. Each actor is a
thread that fires when its input queues hold tokens and its output queues
have room. The queues are single-producer, single-consumer rings in main
memory.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself
through a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/mp_pkg.sv tb/tb_mpsoc_top.sv --top-module tb_mpsoc_top -Mdir obj
./obj/Vtb_mpsoc_top
```

Replace `tb_mpsoc_top` with any other testbench name. Lint with
`verilator --lint-only -Wall -Irtl -y rtl rtl/mp_pkg.sv rtl/mpsoc_top.sv`.

Results at the default size:

* **`tb_mpsoc_top`** (4 processors, 32 entries; 4 threads × 40 numbers,
  yielding every 4 numbers). It finishes in about 16.6k cycles. It checks the
  prefix sums and counts each mechanism, failing if one never happens: boot
  lock lost, create, context switch, yield, thread end, `start()` on an empty
  queue, spins on the hardware and software locks, threads running on the
  slave processors, `q_tail`/`q_head` wrap past `Reg31`, bus contention and
  memory wait states.
* **`tb_dataflow_encoder`** (26 actors, 35 queues, 8 firings each, 400
  compute cycles per firing). It checks the sink's results against values
  computed from the graph. Cycle counts:

  | processors | cycles |
  |---|---|
  | 1 | 123k |
  | 2 | 76k |
  | 3 | 67k |
  | 4 | 67k |

  The gain stops at four processors because lock traffic and bus contention
  grow.
* **`tb_accumulate_1m`** (4 threads × 250,000 numbers). It takes 7.0M cycles
  on one processor and 7.0M on four. The model has no caches, so every number
  is a 6-cycle bus read, and the single bus is the bottleneck.

## Choices made in this RTL, and limits

* The bus protocol, round-robin arbitration, address map, register offsets,
  the status word and the empty/full behaviour of the queue are this design's
  own choices.
* The queue depth of 32 is also a choice. It holds all 26 actor threads of the
  data-flow program at once. Change it with `TQM_DEPTH` on `mpsoc_top` or
  `DEPTH` on the manager.
* Peripheral slaves answer in one cycle. The memory interface registers the
  request, waits for the memory's `ext_ack` and answers one cycle later. It
  moves single words only: no bursts and no byte enables.
* The processor cores, their instruction and data caches and the off-chip
  memory are not part of the RTL. The top brings the processor bus ports and
  the memory port out as plain struct and signal ports.
* Performance results measured on an instruction-set simulator with caches
  are not reproduced: the testbench processors have no instruction timing and
  no caches. For example, the published figures for the original
  architecture give 8.0M cycles for the 1M-number sum on one processor and
  2.1M on four.
* A software-only thread queue, kept in main memory, would be the baseline to
  compare against. It is not built here.
* The lock and the manager reset to free and empty. Everything uses an
  asynchronous, active-low reset.
