# Phase-aware AHB bus matrix with a self-selecting slave arbiter

Several slow AHB processors (32–64 MHz class) share one memory through a
much faster on-chip fabric (2 GHz target). Two ideas make the sharing cheap:

1. **Phase-interleaved memory.** The shared memory is four ordinary
   synchronous banks. Each bank runs at a quarter of the fabric rate, and the
   banks are clocked 90° apart. So in every fast cycle exactly one bank can
   take a new access. A *phase acquainted arbiter* grants the fabric only to a
   request whose target bank will be at its slot when that request's address
   reaches the memory. Consecutive grants therefore go to consecutive banks,
   and the memory accepts one word per fast cycle.
2. **Slave-side arbitration with nine schemes.** Each memory port (write and
   read) has its own *automatically actuated arbiter*. It combines one of
   three priority policies (fixed, round robin, dynamic) with one of three
   data multiplexing modes (per transfer, per transaction, per desired
   transfer length). Masters send their priority level, mode and desired
   length in the upper bits of every address. So they can change how they
   are treated at run time, without configuration registers.

Between each slow master and the fabric sits a pair of **bridges**, one for
writes and one for reads. Each bridge contains a slave FSM on the slow bus, two
synchronization registers, and two master FSMs on the fast bus. The two master
FSMs take transfers in turn, so the two AHB pipeline stages can be in flight
together.

The RTL is SystemVerilog-2017 and synthesizable. It has one package, eleven
modules with testbenches, and one helper module (`phase_bank`).

## Block diagram

```
 master m (slow AHB, clk_s[m])                         fast fabric (clk_f)
 ───────────────────────────────                       ─────────────────────────────────────────
            ┌──────────────────┐   ┌─────────────┐     ┌──────────── matrix_slave_port (write) ─┐
 HADDR ...  │ ahb_input_stage  │──►│ ahb_bridge  │────►│ phase_arbiter ─► aaa_arbiter ─► MUXes  │─► HADDRW / HDATAW ─┐
 ─────────► │ decoder + owner  │   │  (write)    │◄────│   (rr_block, p_block inside)           │                    │
 ◄───────── │ flip-flop, resp. │   └─────────────┘     └────────────────────────────────────────┘     shared_memory
 HREADY ... │ multiplexer      │   ┌─────────────┐     ┌──────────── matrix_slave_port (read) ──┐     4 x phase_bank
            │                  │──►│ ahb_bridge  │────►│ phase_arbiter ─► aaa_arbiter ─► MUX    │─► HADDRR ──────────┤
            └──────────────────┘   │  (read)     │◄────│ HDATAR broadcast ◄─────────────────────│◄── HDATAR ◄────────┘
                                   └─────────────┘     └────────────────────────────────────────┘
 ahb_bridge = slave_fsm ─► 2 x sync_register ─► 2 x master_fsm (A, B) + A/B turn pointer
```

`ml_ahb_matrix` is the top level. Its defaults are `NM = 4` masters and
`MEM_WORDS = 4096` 32-bit words.

## The life of one transfer

Take a read by master *m*, in fast-clock cycles unless noted.

| where | what happens |
|---|---|
| slow cycle 0 | The address phase is accepted. `ahb_input_stage` decodes `HWRITE=0` and selects the read bridge. At the end of the cycle `slave_fsm` loads synchronization register A or B (strictly alternating) and flips its request toggle. If the register is still busy, or the master has writes in flight, the load happens later, during the data phase. |
| slow cycle 1 | The data phase starts. `HREADYOUT` stays low. |
| +2..3 | The toggle passes two fast flip-flops. `master_fsm` leaves **IDLE** for **REQ**. |
| c | **REQ**: the bridge presents the request with its command (bank, priority, length, mode, last flag). The phase arbiter admits it only if its bank equals `phase + 2`. |
| c+1 | The arbiter's registered master number / no-port selects this bridge, and the grant reaches the FSM. |
| c+2 | **ADDR**: the address multiplexer (HADDRR) drives the address. The target bank has its slot in this cycle. |
| c+3..c+5 | **WAIT, WAIT, WAIT**: the bank works for one bank cycle (four fast cycles). |
| c+6 | **DATA**: the bank's word is on HDATAR. The FSM captures it and flips the acknowledge toggle. |
| +2..3 slow | The acknowledge passes two slow flip-flops. `HREADYOUT` goes high with the word. |

A write follows the same path through its write bridge. It differs in two ways:

- **Writes are posted.** The AHB data phase ends, with no wait state, in the
  cycle the word is loaded into a free synchronization register. The master
  continues while the fast side finishes.
- **The data comes later.** The write word goes out on HDATAW in the
  FSM's DATA cycle. The bank writes it at its next slot, using the address it
  stored four cycles earlier.

A write waits only when the register it needs is still busy with the write
before the previous one.

**Ordering.** A read bridge does not start a read while the same master's write
bridge still has posted writes in flight (`hold`/`pending`). So a master always
reads back its own latest data. There is no ordering between different masters.

## The phase scheme

`phase_arbiter` holds a free-running 2-bit counter. Bank *b* takes commands in
the fast cycles where `phase == b`. This is the single-clock equivalent of four
bank clocks 90° apart. Banks are word-interleaved: bank = byte address bits
`[3:2]`, and the row is the bits above.

A request seen in cycle *c* drives its address in *c+2*. That is one cycle for
the arbiter's output register and one for the FSM's REQ→ADDR step. So `ok[i]` is
`bank(i) == phase + 2`. A request for another bank simply waits, at most three
cycles. Both memory ports count the same slots. An assertion in the top checks
that the write-side and read-side counters agree.

Each `phase_bank` has a separate write port and read port:

- **Write port:** takes the row at a slot, then the data at its next slot.
- **Read port:** reads at a slot and holds the word through its next slot.

A read and a write of the same word in the same slot return the old word. The
read slave's output multiplexer picks the bank whose slot it is.

## The automatically actuated arbiter

`aaa_arbiter` is built from these parts:

- an **RR block** (`rr_block`), which serves the first requester after the last
  one served;
- a **P block** (`p_block`), where the highest priority level wins and ties go
  to the lowest index;
- a **scheme multiplexer**, which selects between the RR result and the P
  result;
- a **length multiplexer**, which selects the desired transfer length of the
  selected master;
- a **transfer counter** and a **controller**;
- **two output flip-flops**, one for the master number and one for no-port.

The two output flip-flops mean a grant comes one cycle after the request. A
requester must drop its request in the cycle it sees its grant. `no_port` means
nobody is selected, and the memory-side address bus is then driven inactive.

**Policy.** This is a run-time input of each memory port (`policy_w`,
`policy_r`):

| `policy_e` | how the next owner is chosen |
|---|---|
| `POL_FIXED` | P block with all levels equal: lowest index first |
| `POL_RR` | RR block |
| `POL_DYNAMIC` | P block with the levels the masters send |

**Mode.** The mode is sent by the winning master and fixes how long it keeps
the port:

| `mode_e` | the winner keeps the port… |
|---|---|
| `MODE_TRANSFER` | …for one transfer; a new arbitration follows every transfer |
| `MODE_TRANSACTION` | …until it is granted the transfer flagged `last` (end of its burst) |
| `MODE_DTL` | …for `len_m1+1` transfers, or until its `last` transfer if that comes first |

While a master keeps the port, no other master is served. This holds even in
cycles where the owner is not requesting. With slow masters, a transaction hold
can therefore block the port for several slow cycles. That is the price of the
transaction modes, and the end-to-end test shows read waits of up to about 90
slow cycles under such holds. Ending a DTL hold at `last` keeps a master that
has finished from holding the port forever.

**Address fields.** Every slow-side HADDR carries:

| bits | field |
|---|---|
| 31:28 | priority level (dynamic priority, larger wins) |
| 27:24 | desired transfer length − 1 |
| 23:22 | multiplexing mode (0 transfer, 1 transaction, 2 desired length; 3 is read as 0) |
| 21:0 | byte address in the shared memory (the default 4096-word memory uses bits 13:2) |

The `last` flag comes from HBURST:

- INCR4/8/16 and WRAP4/8/16 are one transaction each; the final beat is `last`.
- SINGLE and every INCR beat are transactions of their own.

## Crossing between the clocks

`sync_register` is a toggle handshake:

- **Command.** The command register is written in the slow domain and flips a
  request toggle. The fast domain synchronizes the toggle with two flip-flops,
  turns its change into a `start` pulse, and then reads the (stable) command
  register.
- **Completion.** This comes back the same way, as an acknowledge toggle. The
  read word is captured in the slow domain one slow cycle after the acknowledge
  is first sampled, so it is valid together with the `done` pulse.

The clocks may be unrelated.

This safe crossing sets the minimum read latency. Only an uncontended read
reaches it: two slow wait states. They come from the two cycles of the
acknowledge synchronizer; the register is loaded at the end of the address
phase. The fast side
itself takes about a dozen fast cycles, which is well under one slow cycle.

## Where this design departs from, or fills in, its source

The block structure follows the published design: Fig. 1 input stage, Fig. 2
bridge, Fig. 3 matrix, Fig. 4 master FSM, and the arbiter's parts list. These
points are this implementation's own choices:

- **One-cycle latency.** The source promises at most one cycle of
  communication latency to 32–64 MHz processors. Here, posted writes meet that:
  zero wait states when a synchronization register is free. Reads do not: at
  least two slow wait states, because of the two-flip-flop synchronizers.
  They take more when the port is held by another master's transaction.
- **Bank clock rate.** The source gives the bank clock as both 500 MHz and
  300 MHz. 4 × 500 MHz matches the 2 GHz fabric. Only the bank count matters
  in the RTL.
- **Bank clocks.** The four phase-shifted bank clocks and the 2 GHz clock
  itself are not modelled. One fabric clock plus a phase counter stands in
  for them. Whether the logic reaches 2 GHz is a matter for the
  (full-custom) implementation and is not claimed here.
- **Not given by the source, chosen here:**
  - the address-field bit positions;
  - the meaning of the three modes;
  - who selects the policy;
  - the memory size and interleaving;
  - the number of masters;
  - posted writes;
  - read-after-write ordering;
  - the synchronizer design;
  - word-only transfers (HSIZE and HPROT unused, HRESP always OKAY).
- **The "SMA and PAA" box of the bridge.** It is realised once per memory port
  (`matrix_slave_port`), since arbitration is slave-side. Inside a bridge,
  master FSMs A and B are served by a turn pointer in the order they were
  started.
- **The arbiter's internal diagram.** This was not available. The arbiter is
  built from its textual parts list only.
- **Throughput.** Each port sustains one transfer per fast cycle: the
  testbenches see back-to-back grants and the four-cycle address-to-data
  distance. At 2 GHz that is 2 G writes plus 2 G reads per second. Four
  masters at 64 MHz cannot fill that. `ml_ahb_matrix_rate_tb` runs 32
  masters at 64 MHz: the write port is busy in 68 % of the fast cycles and the
  read port in 34 %. A bridge sustains about one posted write per 1.5 slow
  cycles, because a synchronization register is only free again once its
  acknowledge has crossed back. A read takes about three slow cycles. Filling
  the write side would take about 48 masters at 64 MHz.

## Files

| file | contents |
|---|---|
| `rtl/aaa_pkg.sv` | widths, `policy_e`, `mode_e`, `cmd_t`, `bank_of`, `burst_beats` |
| `rtl/ml_ahb_matrix.sv` | top level |
| `rtl/ahb_input_stage.sv` | per-master decoder, owner flip-flop, response multiplexer |
| `rtl/ahb_bridge.sv` | write or read bridge |
| `rtl/slave_fsm.sv`, `rtl/sync_register.sv`, `rtl/master_fsm.sv` | bridge internals |
| `rtl/matrix_slave_port.sv` | one memory port: both arbiters and the bus multiplexers |
| `rtl/phase_arbiter.sv`, `rtl/aaa_arbiter.sv`, `rtl/rr_block.sv`, `rtl/p_block.sv` | arbitration |
| `rtl/shared_memory.sv`, `rtl/phase_bank.sv` | four-bank memory |
| `tb/<module>_tb.sv` | one self-checking testbench per module |
| `tb/ml_ahb_matrix_rate_tb.sv` | throughput of the top with 32 masters at 64 MHz |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M`, then calls `$finish`.
Each has a watchdog. With Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  -Irtl -Itb -y rtl -y tb +libext+.sv rtl/aaa_pkg.sv tb/ml_ahb_matrix_tb.sv \
  --top-module ml_ahb_matrix_tb
obj_dir/Vml_ahb_matrix_tb
```

Replace the testbench name to run another one. The `--timescale` is needed
because the testbenches use sub-nanosecond clock periods (the fabric runs at
0.5 ns).

`ml_ahb_matrix_tb` runs the top at its default parameters:

- **Masters:** four AHB master models at 32, 40, 48 and 64 MHz, each with its
  own memory quarter.
- **Traffic:** random SINGLE/INCR/INCR4/INCR8 write bursts and read-backs,
  with random priority, length and mode fields.
- **Policies:** switched every 2 µs on both ports.

It checks every read word. It also requires each mechanism to occur at least
once:

- phase waits;
- holds that block another master;
- holds ended by the desired length;
- all nine schemes on both ports;
- both master FSMs of a bridge in flight;
- posted writes with and without wait states;
- reads held for ordering;
- no-port cycles.

It runs in a few seconds and prints the measured read and write wait states.

`ml_ahb_matrix_rate_tb` runs the top with 32 masters at 64 MHz, all writing
INCR8 bursts and then reading them back. It checks every word, prints how busy
the two memory ports are, and requires the write port to be busy in at least
60 % of the fast cycles.

The unit testbenches compare against reference models written in the
testbench:

- `aaa_arbiter_tb` predicts the arbiter cycle by cycle under random
  stimulus.
- `matrix_slave_port_tb` checks the bus multiplexer timing and the bank/slot
  rule.
- `shared_memory_tb` checks the banks against a reference array.

Several of them override parameters (for example a 256-word memory), to keep
runs short.

## Changing it

- **Number of masters.** Set `NM`. The arbiters scale with `$clog2(NM)`.
- **Memory size.** Set `MEM_WORDS`, a power of two and a multiple of four.
  Address bits above the memory size are ignored (aliasing).
- **Priority and length widths.** `PRIO_W` and `LEN_W` are in `aaa_pkg`.
  Change the address-field positions in `slave_fsm` with them.
- **Bank count.** `PHASES`/`PHASE_W` are in `aaa_pkg`. The master FSM's three
  wait states and `matrix_slave_port`'s `DLAT = 4` assume four banks.
