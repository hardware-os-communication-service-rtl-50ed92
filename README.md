# Hardware communication service with dynamic memory tasks for a reconfigurable SoC

On an FPGA with partially reconfigurable regions (PRRs), hardware tasks are
loaded and replaced at run time. Two tasks that share a data channel are
often not resident together. The producer may run while the consumer has not
been configured yet, or the consumer may be waiting for a producer that has
not started. A software OS would handle this with a kernel buffer and a
scheduler on the processor. This design handles it in hardware instead.

A **communication service (CS)** takes the `OPEN` and `CLOSE` system calls
that the hardware tasks raise and decides how each channel is served:

* **Direct.** When the reader of a channel is already present, the writer
  gets the reader's network address and streams its words straight to it.
  There is no copy and no buffer.
* **Through a memory task.** When a writer opens a channel and no reader is
  there, the writer would block. The CS gives the channel to a *memory task*
  instead. This is a small RAM with a controller and a network interface that
  acts as the receiver. When the reader opens the channel later, the CS tells
  the memory task to send the stored data to the reader.
* **Escalation.** The static **local memory (LM)** is tried first. If it is
  busy, a **dynamic memory task (DM)** that is already configured in a free
  PRR is tried next. If there is none, the CS asks the scheduler. The
  scheduler either configures a DM in some PRR (the CS then decides again) or
  refuses, and the task falls back to global memory.

All data moves over an 8-port on-chip network that joins the eight PRRs.

```
             +-------------------- comm_service ----------------------+
 syscalls -->| lock (rr_arbiter) --> cs_fsm x7 ---+--> shared_table     |
 (per PRR)   |                      (each has a    |                     |
             |                       DM monitor)   +--> mc bus --> lm_fsm (LM)
             +------------------------------------------------|--------+
                                                              v
 PRR1  PRR2        PRR5  PRR6        PRR3  PRR4        PRR7  PRR8
      (traffic    (LM =
       gen)        memory_task)
   \    /            \    /            \    /            \    /
    R1 ------------- R3 ------------- R2 ------------- R4
     \_______________________________________________/  (R1-R4 link)
                      draft_noc (4 x draft_router)
```

## Platform (`hwos_top`)

* **Network addresses.** PRR1..PRR8 are network addresses 0..7.
* **Routers.** Four routers serve two PRRs each:
  * R1 serves PRR1 and PRR2;
  * R2 serves PRR3 and PRR4;
  * R3 serves PRR5 and PRR6;
  * R4 serves PRR7 and PRR8.
* **Links.** The links are R1-R3, R1-R4, R2-R3 and R2-R4.
* **Fixed tasks.**
  * The LM sits in PRR5 (address 4).
  * The random traffic generator sits in PRR2 (address 1).
* **Other PRRs.** Each remaining PRR is a *slot*:
  * Its task lives outside the top. Its system-call and network ports are
    module ports, and a testbench or other logic plugs a task in there.
  * Each slot also holds a `dyn_memory_task`.
  * `prr_is_dm[k]`, driven by the scheduler, stands for "the DM is the
    bitstream currently loaded in PRR k". It moves the slot's network port
    and the CS's memory control over to the DM and cuts off the outside task.
  * Partial reconfiguration cannot be written as RTL. This switch is how the
    design models it.
* **Scheduler interface.**
  * `dm_req`, `dm_req_prr` and `dm_req_ch` ask for a DM for a blocked writer
    on channel `dm_req_ch` of PRR `dm_req_prr`.
  * The scheduler answers with `dm_grant` (after setting a `prr_is_dm` bit)
    or with `dm_deny`.
  * `dm_release[k]` pulses when the DM in PRR k has been read out and
    closed, so the scheduler may reconfigure that PRR.
  * `mem_busy` shows which memories are occupied: bit 0 is the LM, bit 1+k
    is the DM of PRR k.
  * `lm_overflow` is sticky. It is set when a writer sent more words than
    the LM holds.

Default sizes:

| parameter | default | meaning |
|---|---|---|
| `LM_DEPTH` | 8192 | LM words (32 KiB of 32-bit words) |
| `DM_DEPTH` | 1024 | DM words (4 KiB) |
| `LM_PORT`, `TG_PORT` | 4, 1 | PRR5, PRR2 |
| `NOC_FIFO_DEPTH` | 4 | flits per router input buffer |

Fixed sizes in `hwos_pkg`: 8 ports, 32-bit data, 16 channels.

## System calls and answers

A task raises a call by holding `sc_valid` with a `syscall_t`
(`op` = OPEN/CLOSE, `mode` = R/W, `ch`) until `sc_ready`. Exactly one
`resp_valid` pulse answers it with a `sc_resp_t`, which holds a status and a
peer address.

| call | situation | status | `peer` |
|---|---|---|---|
| OPEN w | reader open | `RS_DIRECT` | reader's address: send there |
| OPEN w | no reader, LM or DM free | `RS_MEM` | memory's address: send there |
| OPEN w | no reader, no memory, scheduler refuses | `RS_GLOBAL` | - |
| OPEN r | data held in a memory | `RS_MEM` | memory; it starts sending now |
| OPEN r | writer open (direct) | `RS_DIRECT` | writer's address |
| OPEN r | nothing yet | `RS_OK` | - (the writer will be sent here) |
| CLOSE w/r | caller holds that side | `RS_OK` | - |
| any | second writer/reader, or close by another PRR | `RS_ERR` | - |

SEND and RECEIVE are not calls to the CS. The task writes flits to, or reads
flits from, its network port. Each flit carries one data word with its
destination, source, channel and a `last` flag. The writer marks its final
word `last`.

A task's sequence is therefore: `OPEN(ch,w)` → send N flits to `peer`, the
last one marked → `CLOSE(ch,w)`. The reader's sequence is `OPEN(ch,r)` →
receive until `last` → `CLOSE(ch,r)`. The reader's CLOSE releases the memory
that held the channel.

## Inside the communication service

### Lock and Shared Table

Every PRR except the LM's has its own `cs_fsm`. All of them read and write
one **Shared Table** (`shared_table`), which has one entry per channel. An
entry holds:

* whether the writer and the reader are open, and their PRRs;
* whether the data sits in a memory, and which one.

A call is a read-modify-write of one entry, sometimes with a memory task
opened in between. Two PRRs touching the same channel at once would corrupt
it. So a csFSM first takes a **single lock** for the whole CS, and only then
reads the entry:

* The lock is a round-robin arbiter (`rr_arbiter`) with a registered owner.
* When the lock is free, the grant is combinational in the cycle of the
  request.
* The owner holds the lock until it answers, including while it waits for a
  memory or for the scheduler.
* Calls from different PRRs are therefore served one after another, in
  round-robin order.
* An assertion checks that at most one csFSM owns the lock.

An entry with neither side open and no data held is cleared to zero, so a
channel number can be reused at once.

### Memory monitors (`lm_fsm`) and the memory bus

A csFSM never drives a memory task directly. It broadcasts a command on the
CS's memory bus (`mc_bus_t`: RECV / SEND / RELEASE, target memory id, channel,
peer). Each memory has a monitor, `lm_fsm`, that listens for its own id:

* id 0 is the LM's monitor. It lives in `comm_service`.
* id 1+k is the monitor of the DM in PRR k. It lives inside that PRR's
  `cs_fsm`, because a PRR's csFSM also manages a memory task configured in
  its PRR.

A monitor goes through these states:

1. It starts in `FREE`.
2. On RECV it moves to `OPENING` and then to `RECEIVING` once the memory
   task reports it is ready to take data (`opened`).
3. It moves to `HOLDING` when the last word is stored.
4. On SEND it moves to `SENDING`. If the reader opened before the writer
   finished, the SEND is remembered and started after the last word is
   stored.
5. It moves to `DRAINED` when the data has gone out.
6. It returns to `FREE` on RELEASE.

A memory serves **one channel at a time** from RECV until the reader closes,
even if it is mostly empty.

### Set-up time: 5 and 11 cycles

Counted from the cycle a call is accepted (`sc_valid && sc_ready`) to the
cycle of `resp_valid`, both included, with the lock free:

* **5 cycles** for calls that need no memory: IDLE → REQ (lock) → LOOKUP
  (read entry, decide) → UPDATE (write entry) → RESP.
* **11 cycles** when a memory must be opened first: IDLE → REQ → LOOKUP →
  UPDATE (command on the bus) → WAIT_MEM → ST_UPD → RESP. The extra six
  cycles come from:
  * the monitor's command register;
  * the memory task's IDLE → OPEN → RECV;
  * the monitor's status register and its `opened` register;
  * the table update.

  This figure was the target, and the registers were placed to meet it.

The testbenches measure both figures: `tb_cs_fsm`, `tb_comm_service`, and
`tb_hwos_top` through the top's ports. Waiting for the lock, or for the
scheduler's answer, adds to them.

### Memory task (`memory_task`)

A memory task is a controller (LM_FSM), a network interface and a
single-port block RAM (`sp_bram`, synchronous read). Its data can only be
reached through the network.

* **Receive.** IDLE → OPEN (the channel and the writer's address are
  latched) → RECV. In RECV it stores each flit of its channel and stops after
  the `last` flit.
  * The network side is always ready. Flits of another channel, and flits
    that arrive outside RECV, are dropped, so a stray sender can never stall
    the network.
  * Words beyond `DEPTH` are dropped and set the sticky `overflow` flag.
* **Send.** IDLE → OPEN → SEND. It reads words back through a 2-entry
  prefetch buffer that covers the RAM's read latency, and sends one word per
  cycle when the network does not stall. The final word is marked `last`.
  Then it goes to CLOSE → IDLE.

### Dynamic memory task (`dyn_memory_task`)

A DM is a `memory_task` (1024 words by default) inside a wrapper that makes
it safe to put into any PRR:

* While `configured` is low, the task is held in reset.
* Its network outputs are forced idle, and its receive handshake and status
  are hidden.
* `configured` is registered before use. This keeps the wrapper free of
  glitches, and the task starts one cycle after the slot is switched to it.

The wrapper plays the role of a reconfiguration decoupler.

## Network (`draft_noc`, `draft_router`)

* **Flits.** Single-flit packets with valid/ready flow control on every link.
* **Routers.**
  * Each router has four ports: two PRRs and two links.
  * Each input has a FIFO (`sync_fifo`, 4 flits by default).
  * Each output has its own round-robin arbiter over the inputs that want
    it.
* **Routing is deterministic:**
  * to the router's own PRRs: out the local port;
  * R1 ↔ R2: via R3;
  * R3 ↔ R4: via R1;
  * all other router pairs are linked directly.

  With this choice the link dependencies form no cycle, so the network
  cannot deadlock.
* **Latency.** With no contention a flit reaches the destination's output:
  * 1 cycle after injection on the same router;
  * 2 cycles over one link;
  * 3 cycles over two links.
* **Throughput.** A stream keeps one flit per cycle.

An assertion in each router checks that a flit for a local port really
belongs to that router.

## Traffic generator (`traffic_gen`)

A hardware task that, on `start`, does the following:

1. It opens `ch` for writing.
2. It sends `nwords` pseudo-random words to the address it gets back. The
   words come from a 32-bit Galois LFSR, `s' = s[0] ? (s>>1) ^ 32'h80200003
   : s>>1`, and the first word is the seed.
3. It closes the channel.

It stops early with the status if the OPEN returns `RS_GLOBAL` or `RS_ERR`.
The testbenches can therefore predict every word from the seed.

## Where this design departs from the original description, or fills gaps

The original description of this service states its behaviour, its
structure (one FSM per PRR, one monitor for the LM, a Shared Table, a memory
task made of controller, network interface and BRAM) and its set-up times.
It does not give the encodings, widths, sizes or the network's design. The
following are this design's own decisions:

* **One LM.** The service allows one or more static LMs. This design has
  exactly one: the LM, whose memory id is 0.
* **Which side takes 11 cycles.** The 11-cycle figure is the writer's OPEN
  that opens a memory for receiving. A reader whose data waits in a memory
  gets its answer in 5 cycles, and the words follow on the network.
* **Sizes.** 32-bit data, 16 channels, an 8192-word LM and 1024-word DMs. The
  LM size is chosen so that the largest transfer of the reference
  measurements (32 kB) fits.
* **Network.** The topology follows the reference platform. Routing,
  buffering and flit format are new.
* **Call encoding.** OPEN/CLOSE only. A reader's OPEN never blocks; the
  reader simply waits on its network port.
* **Scheduler protocol.** The request/grant/deny/release handshake, and the
  rule "reuse a configured free DM before asking the scheduler".
  * The scheduler is not told the size of the data, because an OPEN carries
    none.
  * A DM too small for the data overflows, and this is flagged.
* **Reconfiguration.** The DM is modelled by switching a slot between an
  outside task and a built-in DM instance. No bitstream is loaded.
* **Errors.** `RS_ERR` answers for illegal calls; the original describes no
  error handling.
* **Serialization.** The single lock serialises all calls. Calls on
  different channels could in principle run in parallel. This design does
  not do that, so a call that waits for the scheduler also holds up the
  other PRRs.
* **Global memory.** `RS_GLOBAL` only tells the task to use global memory.
  The processor, the bus and the global memory are not part of this RTL.
* **Not built.**
  * The application tasks of the reference platform (AES-128 encryption and
    decryption). The testbenches model them as senders and receivers.
  * The other OS services: scheduler, placer, reconfiguration manager,
    mutexes/semaphores, I/O manager.

## Measured behaviour

Measured with `tb_transfer_sizes` (default parameters, 100 MHz assumed):

| transfer | cycles | time |
|---|---|---|
| direct, 32 kB (8192 words) | 8200 | 82 µs |
| through the LM, 32 kB | 16411 | 164 µs |
| direct, 1024 kB (262144 words) | 262152 | 2.62 ms |

* A direct transfer runs at one word per cycle plus a few cycles of set-up.
* A blocked transfer costs about twice as much, because the data crosses
  the network twice (writer → LM, then LM → reader).
* Transfers above 32 kB cannot go through the LM. They must go direct, to a
  larger memory, or to global memory.

## Files

| file | content |
|---|---|
| `rtl/hwos_pkg.sv` | sizes, flit/call/table/command types, routing functions |
| `rtl/hwos_top.sv` | platform: NoC, CS, LM, traffic generator, DM slots |
| `rtl/comm_service.sv` | lock, Shared Table, csFSMs, LM monitor, scheduler port |
| `rtl/cs_fsm.sv` | per-PRR call FSM with DM monitor |
| `rtl/lm_fsm.sv` | monitor of one memory task |
| `rtl/shared_table.sv` | per-channel state |
| `rtl/memory_task.sv`, `rtl/sp_bram.sv` | memory task and its RAM |
| `rtl/dyn_memory_task.sv` | DM wrapper |
| `rtl/draft_noc.sv`, `rtl/draft_router.sv` | network |
| `rtl/sync_fifo.sv`, `rtl/rr_arbiter.sv` | helpers |
| `rtl/traffic_gen.sv` | random traffic task |
| `tb/tb_<module>.sv` | self-checking testbench per module |
| `tb/tb_hwos_top.sv` | end-to-end test at default sizes |
| `tb/tb_ddg_schedule.sv` | three tasks on two PRRs: direct, through the LM, direct again |
| `tb/tb_transfer_sizes.sv` | direct 1 kB–1 MB and LM 1–32 kB transfers with cycle counts |

### End-to-end test

`tb_hwos_top` plays the scheduler and the outside tasks. It runs:

* direct channels;
* a blocked writer served by the LM;
* a second blocked writer served by a DM the scheduler grants, with the DM
  released afterwards;
* a blocked writer served by a DM that the scheduler had already placed,
  without a new request (11 cycles);
* a refused request (`RS_GLOBAL`);
* lock contention between PRRs;
* back-pressure on the network;
* an LM overflow.

`tb_ddg_schedule` runs a small task graph on two PRRs:

* T1 feeds T2 and T3, and T2 feeds T3.
* T3 can only be loaded after T1 has finished, so T1's data for T3 waits in
  the LM.
* T3 opens both of its inputs before reading either.

The end-to-end test counts each of these and fails if any of them never happened. It also
checks every word delivered and the 5 and 11-cycle set-up times.

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<m>` and ends. A
watchdog stops it if it hangs. The simulator must support `--timing`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/hwos_pkg.sv tb/tb_hwos_top.sv --top-module tb_hwos_top
./obj_dir/Vtb_hwos_top
```

Replace `tb_hwos_top` with any other testbench name. The package must come
first on the command line; the other modules are found through `-y`.
`tb_transfer_sizes` simulates about 1.4 million cycles and takes the
longest.
