# Semaphore authority management for a dual-port SDRAM

A dual-port SDRAM (DPSDRAM; OneDRAM is the commercial example) lets two
processors share one memory chip. In a phone these are the baseband
processor and the application processor. Each port has banks of its own.
One **shared bank** is visible from both ports and is how the two
processors pass data to each other.

Only one port may touch the shared bank at a time. The chip enforces this
with a 1-bit **semaphore**: 0 gives the bank to port A, 1 gives it to
port B. Only the port that holds the bank can change the semaphore. A port
that wants the bank has to ask for it. It writes a message into a 32-bit
**mailbox** (one for A→B, one for B→A). This pulls the other port's
interrupt line low until that port reads the message.

A plain controller pays a lot for this protocol:

- it reads the semaphore before every shared-bank access;
- it asks for the bank only when the shared command is next in line;
- it then polls the semaphore until the other side gives the bank up;
- it holds the bank until asked, so every change of direction costs a
  request and an interrupt.

Each of these steps is a full SDRAM access.

This RTL is a **SAM (semaphore authority management) controller** that
hides most of that cost from the processor. It uses three techniques:

1. **Duplicated semaphore.** Each controller keeps a local copy of the
   semaphore (`sem_reg`). A shared-bank command goes straight to the memory
   when the copy says this port owns the bank, with no semaphore read.
2. **Adaptive command prefetch.** The command FIFO reports, every cycle,
   whether any queued command targets the shared bank. A controller without
   the bank sends its request as soon as such a command is queued, not when
   it reaches the head. The dedicated-bank commands ahead of it keep running
   while the other side releases.
3. **Auto-release.** A controller that holds the bank and has no shared
   command left gives the bank back on its own. The other side then usually
   finds the bank free and does not need to send a request.

Techniques 2 and 3 suit a processor that uses the shared bank rarely but in
long stretches. They hurt a processor that uses it often. So each
controller has one of two **roles**, which can be switched at run time:

| | master | slave |
|---|---|---|
| holds the bank after boot | yes | no |
| duplicated semaphore | yes | yes |
| adaptive prefetch | no | yes |
| auto-release | no | yes |

The top level, `sam_dual_port_system`, holds two controllers:

- **Port A:** SDR x32, burst length 1, baseband processor, slave by default.
- **Port B:** DDR x32, burst length 2, application processor, master by
  default.

This is the pairing the original work found best for data flowing from
baseband to application. Everything runs on one clock (66 MHz in that
work's measurements).

The same RTL can also be built as the plain controller described above,
by setting `SAM_EN = 0`. This gives a baseline to measure the techniques
against.

The DPSDRAM chip and the processors are not part of the RTL. The top level
brings out both memory ports, including the mailbox interrupts, and both
processor interfaces. A behavioural model of the chip, `tb/onedram_model.sv`,
is used by the testbenches.

## How the semaphore and mailboxes are reached

The chip's registers live in the shared bank. This design places them in
the **top row of the shared bank** (row `'1`, bank `SHARED_BANK` = 3). Each
one is an ordinary single-word SDRAM access: ACTIVE, then READ or WRITE.

| column | register | who writes | who reads |
|---|---|---|---|
| 0 | semaphore (bit 0) | the owner (writes the other port's number to release) | both |
| 1 | mailbox A→B | port A | port B |
| 2 | mailbox B→A | port B | port A |

An authority request is the message `MBOX_REQ = 32'h5EA0_0001`. Any other
mailbox message is read, which clears the interrupt, and is otherwise
ignored. Processors must not use the top row of the shared bank.

The exact register addresses and the message value belong to a given chip.
Both are constants in `rtl/sam_pkg.sv`.

## Inside one controller

`sam_controller` is one port's controller. It is built from these units,
numbered as in the original block diagram:

| unit | module | job |
|---|---|---|
| 1 | `sam_cmd_fsm` | runs one access at a time: ACTIVE, READ/WRITE with auto-precharge, then waits; grants refresh between accesses |
| 2 | `sam_init_fsm` | JEDEC power-up: 200 µs wait, PRECHARGE ALL, two AUTO REFRESH, LOAD MODE REGISTER (burst length, CAS latency 2) |
| 3 | `sam_refresh_fsm` | AUTO REFRESH every 515 clocks (7.8 µs at 66 MHz), with a request/acknowledge handshake to unit 1 |
| 4 | `sam_signal_path` | picks the command source (init, refresh or unit 1) and drives the pins from flip-flops |
| 5 | `sam_data_path` | puts write data out with WRITE; captures read data CL cycles later; routes it to the processor or to unit 8 |
| 6 | `sam_cmd_fifo` | 4-entry in-order FIFO; flags `head_shared` and `shared_pending` every cycle |
| 7 | `sam_shared_bank_ctrl` | chooses the next access: a semaphore operation first, else the FIFO head if it is a dedicated bank or `own` is set |
| 8 | `sam_semaphore_ctrl` | the policy: decides which semaphore or mailbox operation to run next |
| 9 | `sam_interrupt_ctrl` | synchronises `int_n` and asks for one mailbox read per message |
| 10 | `sam_sem_reg` | the duplicated semaphore and the `own` flag |
| - | `sam_config_ctrl` | the master/slave role; a change waits until the controller is idle |

Data flows from the processor, through the FIFO (6), then unit 7, unit 1
and unit 4 to the pins. Read data comes back through unit 5 to the
processor. Semaphore operations don't go through the FIFO. Unit 8 hands
them to unit 7, which turns them into accesses to the register row and
puts them ahead of the FIFO head. All accesses are closed-page, with
auto-precharge. So no bank is left open when the bank changes hands, and
refresh can follow any access.

An access occupies unit 1 for a fixed time, with the default timing
(tRCD 2, CL 2, tWR 2, tRP 2):

- a read takes 8 cycles from acceptance until the next access can be
  accepted;
- a write takes 7 cycles.

Every semaphore operation costs the same as a data access. This is why
avoiding them pays off.

## The semaphore policy (`sam_semaphore_ctrl`)

This is the part that needs care. The block runs **one operation at a
time**. An operation is started (`sem_valid`/`sem_op`, taken with
`sem_accept`) and counts as finished at the command FSM's `done`. Four
bits of state hold the rest:

- `op_busy`: an operation is in flight.
- `req_out`: a request was written and the bank has not been seen yet.
- `checked`: a master read the semaphore and still lacks the bank.
- `rel_pending`: the other port asked for the bank.

Whenever no operation is in flight, the first matching line of this list
decides what happens next:

1. **Mailbox read**, if the interrupt control reports an unread message.
   If the message is `MBOX_REQ`, `rel_pending` is set.
2. **Release on request**, if `rel_pending` is set.
   - If the copy says this port owns the bank, it writes the other port's
     number into the semaphore (`SEM_REL`).
   - If not, the copy may be stale, so it reads the semaphore first. When
     the read confirms the bank is not ours, the request is dropped.
     (This happens when a slave auto-released just as the request was
     written.)
3. **Auto-release**, slave only: it owns the bank and no queued command
   targets the shared bank.
4. **Get the bank**, if it lacks the bank and needs it:
   - A master needs it when the FIFO head is a shared command.
   - A slave needs it as soon as any queued command is one. This is the
     prefetch.

   If no request is out yet:
   - a master first reads the semaphore;
   - if the read says the bank is still not ours (`checked`), it writes the
     request;
   - a slave writes the request at once.

   Once a request is out, the controller polls the semaphore, but only
   while the shared command is at the FIFO head. Until then,
   dedicated-bank commands keep running.

The master reads the semaphore before requesting for a reason. Its copy
cannot see the slave's auto-release: the copy changes only when this port
reads the semaphore or its own release write completes. The slave never
needs the check, because after boot it holds the bank only after seeing it
in a semaphore read.

The copy in `sam_sem_reg` changes in only three ways:

- at reset it takes the chip's boot value (`SEM_DEFAULT` = 1, port B);
- it flips to the other port when this port's release write completes;
- it loads bit 0 of every semaphore read.

A shared-bank command leaves the FIFO only while the copy says `own`. An
assertion in `sam_shared_bank_ctrl` checks that. The chip model also
counts any data access to the shared bank by a port that does not own it.
Such an access never happened in any test.

Sequences, as seen from the slave (port A) when port B holds the bank:

- **Prefetch.** A pushes dedicated, dedicated, shared. A writes the
  request right after the access in progress. The dedicated commands run
  while B reads the mailbox and releases. When the shared command reaches
  the head, A polls once and usually finds the bank already free.
- **Auto-release.** When A's last queued shared command has gone and A
  still owns the bank, A writes the semaphore back to 1. B's next shared
  command starts without a request, after one semaphore read.
- **Release on request.** B's request interrupts A. A reads the mailbox
  and writes the semaphore. Both have priority over A's own queued work.

**Traditional mode (`SAM_EN = 0`).** The same block then acts as the
plain controller, whatever the role:

- Line 3 (auto-release) is never taken.
- "Needs the bank" always means "the FIFO head is a shared command", so
  there is no prefetch.
- The authority test is a one-shot permission (`have`), not the copy. The
  permission is set by a semaphore read that shows the bank is ours. It is
  cleared by the next shared-bank command leaving the FIFO, by a release,
  or by any other semaphore read.

So every shared-bank command costs at least one semaphore read.
`sam_shared_bank_ctrl` receives `have` in place of `own`. With
`SAM_EN = 1`, `have` is simply `own`.

The controller takes a role change only when it is completely idle:
initialisation done, FIFO empty, command FSM idle, no request out, no
release pending and no unread mail. So a role change never cuts a
procedure in half. The `DEFAULT_MASTER` parameter should agree with
`SEM_DEFAULT`: the master is the port the chip gives the bank to at boot.

## Interfaces and timing

**Processor side (per port; prefixed `a_`/`b_` at the top level):**

- `cmd_valid`/`cmd_ready` push a `proc_cmd_t` (`write`, `bank`, `row`,
  `col`) and `cmd_wdata`.
  - `cmd_wdata` is one burst: 32 bits on port A, 64 on port B. On port B,
    bits 31:0 go to the even column.
  - `cmd_ready` means "not full". A pop does not free a slot in the same
    cycle.
- Reads return in command order on `rd_valid`/`rd_data`. Three cycles
  after the READ reaches the pins, the data comes out on `rd_valid`.
- Status outputs:
  - `own`: the copy says this port owns the shared bank;
  - `auth_pending`: a request is out;
  - `role_master`, `cfg_pending`;
  - `init_done`: about 13,200 cycles after reset at the default
    parameters.
- `cfg_valid`/`cfg_master` request a role.
- `events` is a struct of one-cycle strobes for monitors:
  - a command issued;
  - a shared command run on the copy alone;
  - a semaphore read, and whether it was a wait poll;
  - a request, and whether it was a prefetch;
  - a release on request, and an auto-release;
  - a mailbox interrupt, a refresh, a role change.

**Memory side:**

- JEDEC command pins: `sd_cke`, `sd_cs_n`, `sd_ras_n`, `sd_cas_n`,
  `sd_we_n`, `sd_ba`, `sd_addr`. All come from flip-flops.
- Split data: `sd_dq_out`, `sd_dq_oe`, `sd_dq_in`.
- `sd_int_n`: the mailbox interrupt. It is asynchronous and synchronised
  inside.

The memory is expected to drive read data during the cycle that begins CL
edges after the READ left the controller. A WRITE carries its data in the
same cycle as the command.

**DDR port.** Port B's two-beat DDR burst is carried as one 64-bit word
per clock between the controller and its pins. The double-edge I/O
registers and DQS handling of a real DDR interface would sit outside this
RTL.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `FIFO_DEPTH` | 4 | command FIFO entries |
| `SEM_DEFAULT` | 1 | semaphore value at boot (port B owns) |
| `BL_A`, `BL_B` | 1, 2 | burst lengths (port data width = 32 x BL) |
| `A_MASTER`, `B_MASTER` | 0, 1 | roles after reset |
| `SHARED_BANK` | 3 | bank address of the shared bank on both ports |
| `INIT_WAIT` | 13200 | power-up wait in clocks (200 µs at 66 MHz) |
| `REF_INTERVAL` | 515 | clocks between refreshes (7.8 µs at 66 MHz) |
| `SAM_EN` | 1 | 1: SAM controllers; 0: traditional controllers, for comparison |
| `T_RCD`, `T_RP`, `CL`, `T_WR`, `T_RFC`, `T_MRD` | 2, 2, 2, 2, 5, 2 | SDRAM timing in clocks (controller level) |

The following are set in `sam_pkg` and apply to both ports:

- address widths: 2-bit bank, 13-bit row, 9-bit column;
- the register-row layout;
- the request message.

## Simulating

Each unit has a self-checking testbench, `tb/tb_<module>.sv`. Each one
prints `TB_RESULT checks=N failures=M`. With Verilator 5, for example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/sam_pkg.sv tb/tb_sam_dual_port_system.sv \
    --top-module tb_sam_dual_port_system -Mdir obj -o sim && obj/sim
```

Two testbenches run the full system at its default parameters, both
against the chip model:

- **`tb_sam_dual_port_system`** is the end-to-end test. It takes less than
  a second. It runs:
  - a block transfer from A to B with slave A / master B;
  - a run-time role swap and the same transfer again;
  - 100 random transactions on both ports at once (one write and one read
    of the same address each).

  It checks every read against a reference. It fails if the model saw a
  protocol error or an unauthorised shared access. It also fails if any
  mechanism never occurred: a shared access on the copy, a semaphore read,
  a wait, a request, a prefetch, a release on request, an auto-release, a
  mailbox interrupt, a refresh, or a role change.
- **`tb_sam_workload`** runs the original evaluation's workloads. It takes
  about 20 s (`tb_sbm_workload` about 30 s). It runs:
  - 10, 100, 1,000 and 10,000 random transactions on both ports;
  - 2, 160, 320 and 1,280 kB transfers from A to B in both role pairings.
- **`tb_sbm_workload`** runs the same workloads with `SAM_EN = 0`.
  `tb_sam_semaphore_ctrl_sbm` checks the traditional mode of the policy
  block on its own.

## Measured behaviour

These figures come from `tb_sam_workload` (SAM) and `tb_sbm_workload`
(traditional), at 66 MHz, with the chip model.

Random transactions, 10,000 per port, both ports at once:

| controller | port A (SDR, 32 bit) | port B (DDR, 64 bit per clock) |
|---|---|---|
| SAM | 273,256 cycles, 154 Mbit/s | 298,291 cycles, 283 Mbit/s |
| traditional | 358,941 cycles, 117 Mbit/s | 342,749 cycles, 246 Mbit/s |

SAM gives 31 % more bandwidth on port A and 15 % more on port B.

Transfers from A to B:

| transfer | SAM, slave A / master B | SAM, master A / slave B | traditional (either pairing) |
|---|---|---|---|
| 2 kB | 11,670 cycles (0.18 ms) | 9,359 cycles (0.14 ms) | 16,453 cycles (0.25 ms) |
| 160 kB | 1,437,774 cycles (21.8 ms) | 1,115,995 cycles (16.9 ms) | 1,658,036 cycles (25.1 ms) |
| 320 kB | 2,873,067 cycles (43.5 ms) | 1,733,188 cycles (26.3 ms) | 3,321,200 cycles (50.3 ms) |
| 1,280 kB | 11,517,803 cycles (174.5 ms) | 8,197,414 cycles (124.2 ms) | 13,299,668 cycles (201.5 ms) |

For transfers, SAM is 1.15 to 1.41 times faster than the traditional
controller with slave A / master B. With the roles swapped it is 1.49 to
1.92 times faster. The traditional mode's times change by less than 0.3 % when the roles
are swapped; the table shows the slave A / master B pairing.

Two things are worth knowing before trusting these numbers.

**Many handovers in the transfer test.** In this test, port B reads block
n while port A writes block n+1, so both ports use the shared bank at the
same time. Release on request has priority over everything, so the bank
changes hands about once per access. Most of the cycles go to semaphore
traffic (over 200,000 requests across both ports in the whole run).

**The role pairing ranks the other way round.** In this test, with the
master on port A, the transfer runs faster. The original work found the
opposite (slave A / master B fastest, about 9.1 ms for 160 kB). Its
processors' access patterns are not known in enough detail to reproduce
that, and its chip timing is not known either. The absolute times depend
on the closed-page, one-access-at-a-time command FSM of this design.

## Where this design departs from the original description, and what it leaves out

- **Auto-release timing.** The original text describes two queued shared
  commands with dedicated commands in between. Read literally, the slave
  releases after the first one and must ask again for the second. The
  original's timing diagram also shows the better sequence, with one
  release after the last shared command. This design does the latter: it
  keeps the bank while the FIFO still holds a shared command. The FIFO's
  look-ahead flag makes that possible.
- **The master checks before it asks.** The master reads the semaphore
  once before sending a request. This is not in the feature table; it is
  needed because the master's copy cannot see the slave's auto-release.
- **Stale requests.** A request that arrives after the bank has already
  gone is dropped after one semaphore read. The original text does not
  cover this case.
- **Table of units.** The original table of units swaps the descriptions
  of the command FSM and the initialisation FSM. Here the command FSM runs
  reads and writes, and the initialisation FSM runs power-up.
- **This design's own choices.** The following are not given in the
  original description:
  - the SDRAM timing, the refresh interval and the power-up wait;
  - the address widths and the shared bank's number;
  - where the semaphore and mailboxes are, and the request message code;
  - the page policy;
  - all handshakes.

  They are reasonable values for a 133 MHz-class x32 SDRAM run at 66 MHz.
  Check them against the datasheet of a real part.
- **SDRAM-level units.** The original controller was built by modifying a
  vendor's SDRAM controller IP. Here the SDRAM-level units (units 1-5) are
  a simple JEDEC controller of this design's own. It is closed-page and
  runs one access at a time, so its absolute speed is modest.
- **DDR abstraction.** Port B's DDR pins are abstracted to one 64-bit word
  per clock (see above).
- **Not built:**
  - the DPSDRAM itself (only a behavioural model, in `tb/`);
  - the processors and their real access patterns (the testbenches
    generate traffic instead).
- **Traditional controller.** It is built as a mode of the same RTL
  (`SAM_EN = 0`), not as a separate design. It shares the command
  sequencing, so the comparison isolates the semaphore policy.
