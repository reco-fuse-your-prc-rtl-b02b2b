# ReCoFuse container: run-time guards for a partial reconfiguration controller

Some FPGA designs defend against power analysis by reconfiguring themselves
all the time. A "moving target" system swaps different implementations of
the same cipher in and out of a reconfigurable partition (RP). The attacker
then never faces the same logic for long. The whole defence hangs on one
vendor block, the partial reconfiguration controller (PRC). If an attacker
can stop it, or make it load the same module over and over, the target
stops moving and the system is as weak as an unprotected one.

This RTL wraps the PRC in a *container*. The container does not change the
PRC. It watches every data path into and out of it and hands what it sees
to small, independent checkers called *ReCoFuses* (RCFs). Each fuse is a
finite-state machine with a "bad" state that stands for one broken security
property. Once a fuse enters its bad state, it raises an error on the next
clock and stays there. The errors of all enabled fuses are ORed into one
alarm, like a fuse box. A configuration register switches each fuse on or
off.

Two fuses are built, one per attack:

| slot | fuse | attack it catches | fires when |
|------|------|-------------------|------------|
| 0 | `rcf_timeout` (RCF0) | **time-out attack**: the PRC is kept from reconfiguring, so one module stays in place | the RP has been active for `TIMEOUT` ticks (default 640 ms) with no new reconfiguration |
| 1 | `rcf_replay` (RCF1) | **replay attack**: the PRC is made to pick the same module too often | the load counts of the most and the least used module differ by more than `MAX_DIST` (default 6) |

The concept, both fuses, their state names and their numbers follow the
published ReCoFuse scheme and its moving-target AES case study. That case
study used four modules: three AES cores and a blank module. How the fuses
get their input events from raw bus traffic is only sketched there. That
part, the configuration register and the system controller's selection rule
are this design's own. Each is marked below.

## Structure

```
                      recofuse_top
 ┌───────────────────────────────────────────────────────────────────┐
 │  sysctrl ──prc_hw_trigger[N_RM]──────────────────────────────────────► PRC (external)
 │                                                                   │
 │  recofuse_container                                               │
 │  ┌─────────────────────────────────────────────────────────────┐  │
 │  │ memory AXI4 read ◄════════ pass-through ════════► PRC AXI   │  │
 │  │                   │ tap                                     │  │
 │  │            axi_rm_monitor ──rm_valid/rm_id──► rcf_replay ─┐ │  │
 │  │ ICAP primitive ◄══════════ pass-through ═════════ PRC ICAP  │  │
 │  │                   │ tap            prc_decouple            │ │  │
 │  │            icap_monitor ───rp_active────────► rcf_timeout ─┤ │  │
 │  │                                                            ▼ │  │
 │  │            rcf_config_reg (ENABLE / STATUS) ──► OR ──► error  │  │
 │  └─────────────────────────────────────────────────────────────┘  │
 └───────────────────────────────────────────────────────────────────┘
```

The PRC, the bitfile memory (DDR3 behind an AXI slave port on the original
board), the ICAP primitive and the swapped AES modules are vendor or board
parts and are not part of this RTL. The top module brings their connections
out as ports. The pass-through adds no logic and no delay: the container is
a pure observer and never blocks traffic. What to do on `error` (shut down,
reset, stop the cipher) is left to the system.

`cfg_packet_parser` is a helper used by both monitors. `recofuse_pkg` holds
the shared constants and the `axi_ar_t`, `axi_r_t` and `icap_wr_t` structs.

## From bus traffic to fuse events

This is the part that needs the most care, because the fuses are only as
good as the events they are fed.

**Following a bitfile (`cfg_packet_parser`).** A partial bitfile is a stream
of 32-bit words in the 7-series configuration packet format. The parser
ignores everything until the sync word `AA995566`. After it, it reads packet
headers:

- a type-1 header (`[31:29]=001`) gives an opcode, a register address
  (`[26:13]`) and a payload length (`[10:0]`);
- a type-2 header (`010`) gives a longer payload for the register named by
  the type-1 header before it.

Payload words are skipped by count. Frame data that happens to look like a
sync word or a command is therefore never taken for one. The testbenches
plant exactly such words in the frame data. A write of `DESYNC` (`0000000D`)
to the CMD register ends the bitfile. Writes to the frame address register
(FAR) are reported, with a flag on the first one of each bitfile. All
outputs are registered one clock after the word that causes them.

**RP_active (`icap_monitor`).** The time-out fuse needs to know when the
partition is "active": it holds a module and no reconfiguration is running.
The monitor taps the PRC's write port to the ICAP. A word is written when
`CSIB` and `RDWRB` are both low. A reconfiguration runs from the sync word
to the DESYNC command. `rp_active` is low during that window and also
whenever the PRC's own `decouple` output is high. This combines both
sources that were proposed, the vendor status signals and the bitfile
itself. Set `ICAP_BITSWAP=1` if the tapped port carries the bit-swapped byte
order of the 7-series ICAP.

**Which module is loaded (`axi_rm_monitor`).** All modules go into the same
partition, so they all write the same FAR value. The FAR alone cannot tell
them apart. A module is identified by the FAR value *together with* the
memory address its bitfile is read from. The monitor works like this:

1. It queues the address of every accepted AXI read burst, up to `AR_DEPTH`
   outstanding.
2. It attributes each data beat to the burst at the head of the queue. AXI
   returns read data in order for a single ID.
3. It parses the data beats as a bitfile.
4. At the first FAR write of each bitfile, it looks up the pair (burst
   address, FAR value) in a parameter table: `RM_BASE[i]`, `RM_SIZE` and
   `RM_FAR[i]`.

A hit gives one `rm_valid` pulse with `rm_id = i`, two clocks after the data
beat. A miss gives `rm_unknown`, which is brought out but feeds no fuse. The
default table places the four bitfiles 1 MiB apart from `0x1000_0000`, all
with FAR `0x0040_0000`. Change it to match where your bitfiles are stored.

## Time-out fuse (RCF0)

A counter advances once per tick while `rp_active` is high and is cleared
whenever it is low. The tick is `TICK_CYCLES` clocks: 1 ms at an assumed
100 MHz. The prescaler restarts with the counter, so time is measured from
the end of the last reconfiguration. When the counter stands at `TIMEOUT`
with the RP still active, `error` rises on the next clock. From the first
clock edge that sees `rp_active` high, that is `TIMEOUT*TICK_CYCLES + 1`
edges, with no jitter. The defaults reproduce the original demonstration:
time steps of 64 ms and a limit of 10 steps, so the counter trips at 640.

The original properties advance the count once per "time step" and show it
counting in milliseconds. Reading those values as ticks of a millisecond
prescaler is this design's interpretation.

## Replay fuse (RCF1) and the shift window

One counter per module counts its loads. The fuse looks only at the
*distance* between the largest (most frequently used, MFU) and the smallest
(least frequently used, LFU) counter. Uniform use keeps that distance small.
A favoured module drives it up.

To keep the counters narrow, they are "cut at the bottom". Every counter is
decremented together, which leaves the distance unchanged. Each load event
runs through three states:

1. `SYNQ` waits for an event. It increments that module's counter and sets
   its bit in the `rm_seen` mask.
2. `CHECK_ERR` compares the distance with `MAX_DIST`. If the distance is
   larger, the FSM goes to the final bad state and `error` rises on the next
   clock.
3. `SHIFT_WINDOW` decrements every counter by one if a cut is due, and
   clears `rm_seen`. The FSM then returns to `SYNQ`.

A cut is due when every module has been seen since the last cut, which is
the published rule. It is also due when no counter is zero, which this
design adds. The mask alone lets all counters creep upward over time: a
module loaded twice in one round gains one count that is never cut. The
extra condition keeps the LFU counter at zero whenever the FSM waits. The
counters therefore never exceed `MAX_DIST+1`, and `CNT_W = clog2(MAX_DIST+2)`
bits (3 for the default) are always enough. An assertion checks this.

Worked example with four modules:

| step | loads | counters | note |
|------|-------|----------|------|
| 1-6 | RM1 RM2 RM3 RM2 RM3 RM4 | (1,2,2,1) | every module seen, so the window is cut |
| 6 | | (0,1,1,0) | after the cut |
| 7-12 | six loads of RM1 | (6,1,1,0) | distance 6 is allowed |
| 13 | RM1 again | (7,1,1,0) | distance 7 > 6, error |

The threshold is "distance greater than 6". The published properties write
the comparison as `dist == MAX`. This design follows the worked example,
where 7 − 0 = 7 is the first violation. The FSM needs three clocks per event.
A second event arriving meanwhile waits in a one-entry buffer. In a real
system, loads are thousands of clocks apart.

## System controller (`sysctrl`)

Every `STEP_CYCLES` clocks (64 ms by default), the controller sends a
one-clock pulse on the PRC hardware-trigger bit of the next module. The
original system describes the choice only as "random, uniform". This design
draws from a *bag*:

- Each round loads every module exactly once, in an order taken from a
  16-bit LFSR.
- The current module is skipped whenever another candidate is left.

This matters: with independent uniform draws, the load counts drift apart
like a random walk. A distance of 8 after 40 steps is typical, and the
replay fuse would rightly report that as non-uniform use. A controller that
runs under this fuse has to keep its usage balanced over short windows, and
the bag guarantees a distance of at most 1.

`fi_hold` and `fi_fixed`/`fi_id` are the fault-injection hooks of the
original evaluation. They suppress all replacements (time-out attack) or
force the choice (replay attack).

## Configuration register

`rcf_config_reg` uses a minimal synchronous register port of this design's
own:

| `cfg_addr` | name | access | content |
|---|---|---|---|
| 0 | ENABLE | read/write | bit *i* enables slot *i*; reset value: all enabled |
| 1 | STATUS | read only | bit *i* is slot *i*'s error |

Writes take effect at the next clock edge. Read data is registered and
valid one clock after `cfg_rd`. A disabled fuse is held in reset, so
disabling a tripped fuse clears it, and enabling it again starts it from
zero. The `error` output is the OR of the enabled slots' errors, registered,
so it follows a slot error by one clock.

## Parameters

| parameter | default | origin |
|---|---|---|
| `N_RM` | 4 | case study: three AES cores and a blank module |
| `MAX_DIST` | 6 | case study |
| `TIMEOUT` | 640 ticks | case study: 10 time steps of 64 ms |
| `TICK_CYCLES` | 100 000 | assumed 100 MHz clock, 1 ms tick |
| `STEP_CYCLES` | 6 400 000 | case study's 64 ms step at an assumed 100 MHz |
| `RM_BASE`, `RM_SIZE`, `RM_FAR` | see above | example values; set them to your bitfile layout |
| `ICAP_BITSWAP` | 0 | words as stored in the bitfile |
| `AR_DEPTH` | 4 | outstanding AXI reads tracked |

All logic runs on one clock with a synchronous, active-high reset. The AXI
tap assumes 32-bit data and a single read ID.

## How far to trust it, and where it departs

- Both fuses match the published behaviour: the advance, detect and
  shift-window rules, and the bad state that is final. There are three
  departures: the extra cut condition, the "greater than" threshold and the
  millisecond prescaler, all explained above.
- The event extraction (packet parsing, the `rp_active` formula, the RM
  table) is this design's own reading of "derived from several signals" and
  "FAR value together with its address". It is tested against synthetic
  bitfiles in the public 7-series format, not against bitfiles from a real
  tool flow. Check `RM_FAR` and the bitfile layout on your device.
- The PRC in the testbenches is a behavioural model. It fetches a bitfile
  with 16-beat bursts, writes it to the ICAP one word per clock and holds
  `decouple` high meanwhile. A real PRC may differ in burst size, in
  outstanding reads (up to `AR_DEPTH` are handled) and in how long it
  decouples.
- Redundant instances of the fuses, recommended against attackers who can
  fault several places at once, are not instantiated. Instantiate the
  container several times, on separate clocks, if you need them.
- The original fuses were proved with formal property checking. Here the
  key properties are written as SystemVerilog assertions and checked in
  simulation only:
  - the bad state raises error;
  - the timer stays bounded;
  - the LFU counter is zero-aligned;
  - a cut never underflows;
  - no event is lost;
  - the AXI address queue never overflows.

## Simulating

Every testbench checks itself and ends with a line
`TB_RESULT checks=N failures=M`. Build and run any of them with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/recofuse_pkg.sv tb/bitfile_pkg.sv tb/tb_recofuse_top.sv \
    --top-module tb_recofuse_top -Mdir obj_top
./obj_top/Vtb_recofuse_top
```

Replace the testbench file and top-module name for the others.
`tb/bitfile_pkg.sv` is only needed by testbenches that build bitfiles.

| testbench | what it shows |
|---|---|
| `tb_rcf_timeout` | expiry to the exact clock; reconfigurations in time never trip the fuse; the bad state is sticky; disable clears the fuse |
| `tb_rcf_replay` | the worked example above; 800 loads in random permutations never trip; biased random runs trip at exactly the load predicted from uncut counts; back-to-back events |
| `tb_icap_monitor` | `rp_active` clock by clock against the word positions, with idle and read cycles, decoy words in frame data, and `decouple`; plain and bit-swapped instances |
| `tb_axi_rm_monitor` | 60 bitfiles fetched with random stalls and up to 4 outstanding bursts; one correct event each, and `rm_unknown` for foreign addresses or FAR values |
| `tb_rcf_config_reg` | reset value, writes, read-back, read-only STATUS |
| `tb_sysctrl` | one trigger per step, complete rounds, random order, both fault-injection inputs |
| `tb_recofuse_container` | container with the PRC and memory models; word-exact pass-through to the ICAP; both attacks; a disabled slot stays quiet |
| `tb_recofuse_top` | whole system, 10 clocks per ms; normal operation, replay attack, mode switch, time-out attack; counts that every mechanism occurred (under a second) |
| `tb_recofuse_demo` | whole system, 10 clocks per ms; replays the two attack demonstrations: RM1–RM3 one step each, then RM4 kept until the fuse fires 640 ms later, inside 960 ms; then the load sequence of the worked example, with the error at the 13th load and counters (7,1,1,0) |
| `tb_recofuse_top_full` | the same sequence with the top at its default parameters: 100 MHz, 64 ms steps, about 170 million clocks (about 3 minutes) |

`top_harness` holds the shared system test. `prc_model` and `axi_mem_model`
are the behavioural stand-ins for the PRC and the bitfile memory.
