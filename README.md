# MAGIA tile with an attached Spatz vector core: control plane and L1 in SystemVerilog

MAGIA is a mesh of identical compute tiles for generative-AI workloads. Each tile has a small
RISC-V control core (CV32E40P), a 1 MiB multi-banked L1 scratchpad, a GEMM accelerator
(RedMulE), a two-channel DMA (iDMA), a barrier unit towards the other tiles (FractalSync), and,
in the version described here, a second accelerator: the Spatz vector processor with its Snitch
scalar core ("Spatz CC"). The two accelerators are complementary: RedMulE is fast on dense
matrix products, Spatz handles vector kernels (dot products, vector sums, matrix-vector) and
irregular access patterns.

The key idea of the updated tile is that **everything is controlled through memory-mapped
registers on one OBI crossbar**, and that **all completion signals go through an Event Unit**
instead of wiring each accelerator straight to the core. The control core sleeps with its
clock gated while it waits, and wakes up on the exact event it asked for.

This repository contains the RTL of the tile's own logic: the L1 memory system, the crossbar
and address decoder, every memory-mapped control slave, the Event Unit with its direct link and
clock gating, and the Spatz boot ROM. The large third-party engines that plug into the tile (the
cores, the RedMulE datapath, the iDMA back end, the FractalSync tree, the NoC) are **not**
included; their connections are ports of the top module `magia_tile`, and the end-to-end
testbench drives them with behavioural models.

## Block diagram

```
                   core_clk_o (gated)                        spatz_clk_o (gated)
  control core ──data──► core_data_demux_eu_direct          Spatz CC (Snitch + vector unit)
                            │              │ direct link      │ OBI       │ 5 x 32b     │ boot fetch
                            │              ▼                  │           │             ▼
                            │         event_unit ◄──events──┐ │           │        spatz_bootrom
                            ▼              ▲ periph         │ │           │
  ext (AXI side) ──►  ┌──────────── obi_xbar ────────────┐  │ │           │
  Snitch (OBI) ──────►│ L1 │RedMulE│ iDMA │FSync│ EU │Spatz│ L2 ──► l2_req_o
                      └─┬───────┬──────┬──────┬──────────┬─┘
                        │       │      │      │          └► spatz_ctrl_regs ─► clk_en, START irq
                        │       │      │      └► obi_slave_fsync ─► fsync_req_o
                        │       │      └► idma_obi_ctrl_decoder ─► 2 x idma_ctrl_mm ─► idma_job_o
                        │       └► redmule_ctrl_regs ─► redmule_cfg_o / start
                        ▼
             tcdm = hci_interconnect (24 masters) + 32 x tcdm_bank
             masters: 0 crossbar, 1-5 Spatz, 6-21 RedMulE lanes, 22-23 iDMA
```

Everything runs on one clock `clk_i`; the core and Spatz clocks are gated copies of it
(`clk_gate`, a latch plus AND gate).

## Address map (as seen from the control core of tile `t`)

| Range | Target | Notes |
|---|---|---|
| `0x0000_0000–0x0000_00FF` | error slave | null-pointer guard; answers `err=1` |
| `0x0000_0100–0x0000_01FF` | RedMulE control | `redmule_ctrl_regs` |
| `0x0000_0200–0x0000_03FF` | iDMA channel L2→L1 (AXI-to-OBI) | `idma_ctrl_mm` #0 |
| `0x0000_0400–0x0000_05FF` | iDMA channel L1→L2 (OBI-to-AXI) | `idma_ctrl_mm` #1 |
| `0x0000_0600–0x0000_06FF` | FractalSync | `obi_slave_fsync` |
| `0x0000_0700–0x0000_16FF` | Event Unit | core: direct link; others: crossbar |
| `0x0000_1700–0x0000_17FF` | Spatz CC control | `spatz_ctrl_regs` |
| `0x0000_1800–0x0000_FFFF` | error slave | reserved |
| `0x0001_0000–0x0001_FFFF` | L1 (stack area) | |
| `0x0002_0000–0x000F_FFFF` | L1 scratchpad | shifted by `t × 1 MB` in a mesh |
| everything else | L2 / AXI port | includes other tiles' L1 and `0xC000_0000` L2 |

The L1 window of tile `t` is `{4'h0, t[7:0], 20'h?????}` with bits [19:16] non-zero. An address
that belongs to another tile leaves on the L2 port. Spatz fetches from its boot ROM at
`0x1000_0000` on a separate port (`spatz_rom_*`).

## L1 scratchpad and the HCI

The L1 is 32 single-port banks of 8192 × 32 bit (32 KiB each), **word-interleaved**: address
bits [6:2] select the bank and bits [19:7] the row. So consecutive words go to consecutive
banks, and 32 masters walking through a buffer in step never collide.

`hci_interconnect` gives each bank its own round-robin arbiter (`rr_arbiter`). The grant is
combinational in the request cycle. The bank is read at the clock edge and the data comes back
with `rvalid` in the following cycle, so an access without conflict takes one cycle. When several
masters hit the same bank in the same cycle, one is granted and the others keep their request up
(a stall) until their turn. A bank serves every requester within N grants. The pointer moves past
the winner, so a master that keeps hammering one bank cannot starve the others.

There are 24 master ports of 32 bits:

* port 0: the OBI crossbar (the control core, the external AXI side and Snitch, via the crossbar);
* ports 1–5: Spatz CC, i.e. 4 vector-FPU ports plus the Snitch scalar port (configuration
  `N_FPU = 4`, `N_IPU = 1`, 32-bit elements);
* ports 6–21: RedMulE's 512-bit streamer port, split into 16 lanes of 32 bits;
* ports 22–23: the two iDMA back-end channels.

Departure: the production HCI treats the wide accelerator port as one "shallow" branch with
a configurable priority against the "logarithmic" branch of the narrow ports. Here every lane is
an ordinary round-robin requester. Lanes are granted independently, so a 512-bit access may
complete lane by lane.

## The OBI crossbar

`obi_xbar` has three masters (control core, external AXI side, Snitch) and seven slaves plus an
internal error slave. Each slave has a round-robin arbiter. Each master has at most one access in
flight: after a grant, its next request is accepted only once the response has come back. The
master index travels in `aid` and comes back in `rid`, which routes the response.
Accesses to the guard region or the reserved region are answered by the error slave with
`err = 1` and `rdata = 0`.

## Event Unit, direct link and sleeping core

`event_unit` has 32 event inputs. A **rising edge** on an input sets the matching bit of the
event buffer. The bit stays set until software clears it (write 1 to `BUFFER_CLEAR`) or a
wait-and-clear consumes it. `CORE_MASK` selects which buffered events are visible and can wake
the core. Events outside the mask still accumulate, hidden, and appear as soon as the mask is
widened. `CORE_IRQ_MASK` selects which visible events also raise `core_irq_o` (a level).

| Offset | Register | |
|---|---|---|
| 0x00 | CORE_MASK | R/W |
| 0x0C | CORE_IRQ_MASK | R/W |
| 0x1C | CORE_BUFFER | R, raw buffer |
| 0x20 | CORE_BUFFER_MASKED | R, buffer & mask |
| 0x24 | CORE_BUFFER_IRQ_MASKED | R, buffer & mask & irq mask |
| 0x28 | CORE_BUFFER_CLEAR | W1C |
| 0x38 | CORE_EVENT_WAIT | R, sleeps until a visible event |
| 0x3C | CORE_EVENT_WAIT_CLEAR | R, same, and clears what it returns |

Event bits: 2 = iDMA L2→L1 done, 3 = iDMA L1→L2 done, 8 = Spatz done, 9/10/11 = RedMulE
busy/done/secondary, 23 = Spatz start, 24/25 = FractalSync done/error, 26/27 = iDMA error,
28/29 = iDMA start, 30/31 = iDMA busy (each pair is channel L2→L1 then L1→L2).

**The wait mechanism.** The control core reaches the Event Unit over a private *direct link*.
`core_data_demux_eu_direct` sits on the core's data port and sends every access to
`0x700–0x16FF` down that link. All other accesses go to the crossbar. The link is a simple
req/gnt plus r_valid handshake, and `wen` is low for a write. When the core reads a wait register
and no visible event is pending, the Event Unit grants the read but holds back the answer. It
also drops `core_clock_en_o`, which stops the core's clock through a `clk_gate`. When an enabled
event arrives, the clock is re-enabled at the first clock edge that sees the event's rising
edge. The pending read then completes with the masked event
bitmask as its data. For a wait-and-clear, the returned bits are removed from the buffer. The
demux keeps the two paths in order: a request to the other path waits until all outstanding
responses have returned.

The other masters (external side, Snitch) reach the same registers through the crossbar
(`periph` port).

## Memory-mapped accelerator control

**RedMulE** (`redmule_ctrl_regs`, base `0x100`):
TRIGGER 0x00, ACQUIRE 0x04, EVT_ENABLE 0x08, STATUS 0x0C, RUNNING_JOB 0x10, SOFT_CLEAR 0x14,
X_PTR 0x40, W_PTR 0x44, Z_PTR 0x48, MCFG0 0x4C, MCFG1 0x50, ARITH 0x54.
Reading ACQUIRE is an atomic test-and-set. It returns 0 (the job id) and takes the lock when the
engine is free, or −1 when the lock is already held. A write to TRIGGER with the lock held
starts the job: a `redmule_start_o` pulse with the configuration on `redmule_cfg_o`. STATUS
reads non-zero while the job runs. `redmule_done_i` ends the job and releases the lock.
SOFT_CLEAR drops the lock, the job and the configuration, and pulses `redmule_soft_clear_o`.
The three events (busy, done, secondary) reach the Event Unit only while EVT_ENABLE is set. The
OBI-to-HWPE bridge of the original design is folded into this register file. The tile keeps
one job context.

**iDMA** (`idma_obi_ctrl_decoder` plus two `idma_ctrl_mm`): channel 0 at `0x200` copies
L2→L1, channel 1 at `0x400` copies L1→L2. The decoder selects the channel with address bit 10.
Registers: CONF 0x00, STATUS 0x04, NEXT_ID 0x44, DONE_ID 0x84, DST 0xD0, SRC 0xD8,
LENGTH 0xE0 (bytes), DST/SRC_STRIDE_2 0xE8/0xF0, REPS_2 0xF8, DST/SRC_STRIDE_3 0x100/0x108,
REPS_3 0x110. Software fills in the descriptor and **reads NEXT_ID to submit** it. The read
returns the id of the job (1, 2, 3, …). The descriptor waits in a one-entry buffer
(`idma_job_valid_o`) until the back end takes it (`idma_job_ready_i`). If a second NEXT_ID read
comes while the buffer is still full, the read is not granted until the buffer empties. That is
back-pressure on the bus, not a lost job. DONE_ID counts completed jobs. Each channel drives four
event lines: busy (jobs outstanding), start (back end accepted a job), done and error.

**FractalSync** (`obi_slave_fsync`, base `0x600`): AGGR 0x00 (level of the barrier group),
ID 0x04, CONTROL 0x08 (any write starts the barrier), STATUS 0x0C (bit 2 = barrier in
progress). A start sends a one-cycle `fsync_req_o` together with level and id. The network
answers on `fsync_done_i` or `fsync_error_i`. Either answer clears busy and becomes event 24
or 25.

**Spatz CC** (`spatz_ctrl_regs`, base `0x1700`): CLK_EN 0x00, READY 0x04, START 0x08,
TASKBIN 0x0C, DATA 0x10, RETURN 0x14, DONE 0x18. CLK_EN bit 0 gates the Spatz clock. START
bit 0 is Snitch's external interrupt (and event 23). A write of 1 to DONE gives a one-cycle
pulse (event 8) and DONE reads back 0.

## Spatz boot and task protocol

1. The host writes the runtime's entry point to TASKBIN and sets CLK_EN = 1.
2. Snitch starts at `0x1000_0000`. The boot ROM (`spatz_bootrom`) holds three instructions:
   `lui t0, 0x1` ; `lw t1, 0x70C(t0)` ; `jalr x0, 0(t1)`. These load TASKBIN (`0x170C`) and
   jump to the address it holds.
3. The runtime initialises, writes READY = 1 and sleeps in WFI. The host polls READY.
4. For each task, the host writes the task address to TASKBIN and the parameter pointer to
   DATA, then writes START = 1. Snitch takes the interrupt, reads TASKBIN, writes START = 0 as
   acknowledgment, and runs the task. The task reads its parameters from L1 through the HCI.
5. The task writes its exit code to RETURN (0 = success) and 1 to DONE. The host either waits
   on event 8 or polls, then reads RETURN.
6. The host may write CLK_EN = 0 to stop Spatz's clock.

## What is not in the RTL

Ports of `magia_tile` stand in for the following, all taken from elsewhere and used unchanged by
the tile:

* the CV32E40P control core and its instruction cache;
* the Snitch core, the Spatz vector unit and its instruction cache;
* the RedMulE datapath (24 × 8 FP16 compute elements, streamer, buffers);
* the iDMA back end;
* the FractalSync H-tree;
* the AXI crossbar, the FlooNoC network interface and routers, and the L2 memory.

The L1 banks are written as plain arrays. A chip would use compiled 8192 × 32 SRAM macros
instead.

## Departures and choices

Where the published description stops, the RTL makes these choices:

* Bus: one OBI-style struct (`obi_req_t` / `obi_rsp_t` in `magia_pkg`) on every port. It has
  byte enables and a 4-bit id. Writes are acknowledged with `rvalid` like reads. Each master has
  at most one access in flight through the crossbar.
* Event Unit range: one place in the published text gives `0x1040_4000–0x1040_40FF` for the
  direct-link range. The memory map and the Event Unit description both give
  `0x700–0x16FF`, and that range is used.
* The offsets of CORE_IRQ_MASK (0x0C) and BUFFER_IRQ_MASKED (0x24) are not published. They follow
  the usual PULP event-unit layout. The order of the six extended iDMA events in bits 26–31 is
  likewise a choice.
* iDMA ids start at 1. A single-entry submission buffer stalls further submissions (see above).
  STATUS bit 0 is "busy".
* RedMulE: a single job context, so the job id is always 0. TRIGGER is ignored without the lock
  or while a job runs. Completion releases the lock.
* FractalSync: any CONTROL write starts a barrier, and it is ignored while one is in progress.
  The network handshake is a request pulse answered by a done or error pulse.
* Spatz boot ROM: on its own port rather than behind the tile's AXI crossbar (not built). It
  answers in one cycle, and writes get `err`.
* HCI: plain round-robin per bank for all 24 ports (see above). The master numbering is a
  choice.
* Reset: every control register resets to 0. Memory contents are not reset.

## Parameters

`magia_tile` parameters, with defaults equal to the published configuration:

| Parameter | Default | Meaning |
|---|---|---|
| `NBANKS` | 32 | L1 banks |
| `NWORDS` | 8192 | 32-bit words per bank (32 KiB) |
| `SPATZ_PORTS` | 5 | Spatz HCI ports (4 FPU + Snitch) |
| `REDMULE_PORTS` | 16 | 32-bit lanes of the 512-bit RedMulE port |

Shared constants (address map, event bit numbers, Spatz configuration) are in `magia_pkg.sv`.

## Testbenches and how to run them

Every module has a self-checking testbench `tb/tb_<module>.sv` that prints
`TB_RESULT checks=N failures=M`. The unit testbenches compare against reference models written
in the testbench: a reference memory for the banks and the HCI, an independent address decoder
for the crossbar, and field-by-field instruction decoding for the boot ROM.

`tb/tb_magia_tile.sv` runs the whole tile at its default size (1 MiB L1). Behavioural models
attached to the tile's ports play:

* the control core, as a host program;
* Snitch/Spatz, which really boots by decoding the ROM words, then runs a 64-element vector sum
  over its five ports;
* the RedMulE engine, computing a 4×8×4 integer matrix product over its 16 lanes, with the X and
  W streams deliberately colliding bank by bank;
* the two iDMA back ends, copying between a model L2 and L1;
* the FractalSync network, an L2 memory and a remote master.

The testbench checks all results. It counts each mechanism (bank-conflict stalls, core clock
gating during a wait, Spatz clock gating, crossbar contention, direct-link traffic, the
interrupt, iDMA submission back-pressure, error responses, masked events held in the buffer,
L2 and remote accesses, RedMulE soft clear) and fails if any of them never happened.

`tb/tb_magia_workloads.sv` runs the benchmark suite used to evaluate the tile, at every problem
size: 8 matrix-matrix, 4 matrix-vector and 8 dot-product runs on the RedMulE model, and the same
plus 6 vector sums on the Spatz model, 46 kernels in all. Each kernel follows the real flow:
iDMA copies the operands from L2 into L1; the engine is started through its registers; the core
waits on the Event Unit; iDMA copies the result back to L2, where it is checked against a
reference. The engine models compute on 32-bit integers rather than FP16, so the cycle counts
they print describe the models, not the real engines. The run takes about 1.9 M cycles, or about
a minute in Verilator.

With Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/magia_pkg.sv tb/tb_magia_tile.sv --top-module tb_magia_tile -o sim
./obj_dir/sim +verilator+rand+reset+2
```

Replace `tb_magia_tile` with any other testbench name to run a unit test. The full tile test
takes a few seconds.

## Workloads

The tile was evaluated with FP16 matrix-matrix multiply (N = 96, M = K = 1…96), matrix-vector
(N×N, N ≤ 256), dot product (N ≤ 2048) and vector sum (N ≤ 512). The largest data set, the
256 × 256 matrix-vector product, is about 129 KiB and fits easily in the 896 KiB L1 data window.
The arithmetic itself happens in the external engines, which are not part of this RTL.
