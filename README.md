# Multi-performance processor: switching cores instead of scaling voltage

Dynamic voltage scaling saves energy, but an on-chip DC-DC converter needs
hundreds of microseconds and a few microjoules to move the supply. That is too
slow for real-time loops whose iterations last a few milliseconds. This design
takes another route. Each processor (MPU) holds several PE-cores. The cores run
the same instruction set, but each is built for one fixed voltage and
frequency:

| core grade  | supply | clock   |
|-------------|--------|---------|
| high-end    | 1.0 V  | 200 MHz |
| middle-end  | 0.68 V | 133 MHz |
| low-end     | 0.52 V | 67 MHz  |

Only one core of an MPU runs at a time. To change speed, software stores a
core number to a register. The hardware then moves the program state to that
core and stops the old one. No supply ever changes, so a switch costs about
as much time as saving and restoring a register file: 0.4–0.9 µs in this RTL.
A second knob is the instruction cache. Each of its four ways can be switched
off, which trades hit rate for read energy.

This RTL follows the multi-performance processor published as "Real-Time
Power Management for a Multi-Performance Processor" (ISOCC 2009). It gives
synthesizable SystemVerilog for everything around the cores. The cores
themselves are an existing embedded CPU and are not included. Each point
below says whether it follows the published design or is a choice of this
implementation.

## Chip organisation

`mpp_top` has three MPUs on one AMBA AHB bus running at 67 MHz. Their core
sets are the published ones:

| MPU  | cores                     | module instance     |
|------|---------------------------|---------------------|
| MPU0 | high, middle, low         | `g_mpu[0].u_mpu`    |
| MPU1 | high, middle              | `g_mpu[1].u_mpu`    |
| MPU2 | high, low                 | `g_mpu[2].u_mpu`    |

Each MPU (`mpu`) has the following, all shared by its cores:

- an 8 KB, 4-way selective-way instruction cache (`sel_way_icache`);
- an 8 KB instruction scratchpad and a 16 KB data scratchpad (`spm`, built on
  the single-port `sp_sram`);
- the power-management registers and timer (`pm_regs`);
- the core-switch sequencer (`pe_switch_ctrl`);
- a global bus interface, which is an AHB master (`gbi`).

`ahb_arbiter` arbitrates between the three bus interfaces.

The memories are single-port because only one core uses them at a time. That
is the published design. The published chip also has a DMA controller per
MPU and level converters between the low-voltage cores and the 1.0 V
memories. Neither is here. The DMA controller is only named in the
publication. A level converter does voltage translation and is a wire in
logic.

## One reference clock, many speeds

In the published chip, every core clock is a multiple of the 67 MHz bus
clock. In this RTL everything runs on one 400 MHz reference clock `clk`.
`clk_enable_gen` turns one modulo-6 counter into strobes:

| strobe       | fires every | frequency |
|--------------|-------------|-----------|
| high-end     | 2nd cycle   | 200 MHz   |
| middle-end   | 3rd cycle   | 133 MHz   |
| low-end, bus | 6th cycle   | 67 MHz    |

Every bus strobe coincides with a strobe of each core grade.

Inside an MPU, the strobe of the active core's grade is the clock enable of
everything: cache, scratchpads, registers and switch sequencer. So the whole
MPU runs at the active core's speed, as in the published design. The timer
and the bus interface step on the bus strobe instead. Crossings between the
MPU rate and the bus rate use level handshakes, so a strobe pulse can never
be missed.

The reference frequency and the strobe scheme are this implementation's
choice. The published chip gives only the frequencies.

Inactive cores are stopped in two ways, as the published design requires:

- **Clock gating.** `clock_gate` is a latch-and-AND gating cell. Each core
  gets a gated clock `pe_gclk` that pulses only while that core is active, at
  its grade's rate. A core may use either `pe_gclk` or the reference clock
  qualified by `pe_i.clk_en`; the two are equivalent.
- **Signal gating.** Every input of an inactive core is held at zero, except
  `halt`, which is held at one.

## Switching cores (`pe_switch_ctrl`)

This is the mechanism that replaces voltage scaling. It is also the part that
most needs care when a real core is attached.

Software writes the wanted core number to `PE_SEL`. A write naming the
running core, or a core that does not exist, is ignored. Otherwise the
sequencer runs these steps:

1. **HALT.** It raises `halt` to the running core and waits for `halted`.
   `halted` means that no fetch or data access is outstanding.
2. **SAVE.** Over the dedicated context bus (`ctx_addr`/`ctx_rdata`) it reads
   the 16 general purpose registers. It pushes them to a stack area in the
   data scratchpad, the top 64 bytes. It then reads the 8 special purpose
   registers into a holding register file.
3. **SWAP.** The active-core number changes. In the same cycle, the clock
   gating, the signal gating and the MPU clock enable move to the new core.
4. **LOAD.** It writes the special purpose registers into the new core
   (`ctx_we`/`ctx_wdata`). It then pops the general purpose registers from
   the stack into the new core.
5. `halt` falls. The new core continues from the copied state, including its
   program counter, which is one of the special purpose registers.

The published design sends general purpose registers through a stack in the
data scratchpad and special purpose registers over a dedicated bus; steps 2
and 4 do exactly that. The rest is this implementation's:

- The hardware sequencing. The publication does not say whether instructions
  or hardware move the registers.
- The holding register file. With it, each core is clocked only while it is
  the active one.
- The register counts: 16 general purpose and 8 special purpose registers.

**Timing.** A scratchpad access takes two MPU cycles; a special purpose
register takes one. A switch therefore takes:

- 1 + 2·16 + 8 + 1 = **42 cycles of the old core**, then
- 2·16 + 8 = **40 cycles of the new core**.

Measured at a 400 MHz reference, this is 507 ns for high→middle, 810 ns for
high→low and 930 ns for low→middle. The published gate-level figures are
968–1,443 ns, and those include software. The testbench checks the exact
cycle counts and that each direction stays below its published figure.

## Selective-way instruction cache (`sel_way_icache`)

The cache is 8 KB and 4-way set-associative, as published. Each way has an
active flag in the `WAY_EN` register.

A way whose flag is 0 behaves as the published design requires:

- its tag and data arrays are never read (their read enables stand for the
  sense amplifiers);
- it cannot hit;
- it is never chosen for replacement.

An access that would have hit such a way misses. Lines already in a
switched-off way stay valid. They hit again once the way is switched back
on. Nothing has to be written back, because an instruction cache holds no
dirty data.

The following are this implementation's choices:

- **Geometry.** 16-byte lines, so 128 sets.
- **Arrays.** One tag SRAM and one line-wide data SRAM per way. Valid bits
  are flip-flops cleared by reset.
- **Replacement.** Round-robin per set over the active ways only.
- **All flags 0.** The line is fetched and returned, but not stored.
- **Timing, in MPU cycles.** A hit is answered one cycle after it is
  accepted. A miss asks the bus interface for the line with a four-phase
  handshake (`refill_req` … `refill_done`), writes the line, and answers in
  the next cycle.

## Memories, registers and the core port

Address map seen by a core. The upper 12 bits select the region; the map is
this implementation's choice:

| region         | contents                                            |
|----------------|-----------------------------------------------------|
| `0x001xxxxx`   | I-SPM (fetch, and data-port writes to load code)    |
| `0x002xxxxx`   | D-SPM                                               |
| `0x003xxxxx`   | power-management registers                          |
| anything else  | fetch: cached external memory; data: reads as zero  |

Power-management registers (word offsets in `0x003xxxxx`):

| offset | name      | meaning                                                  |
|--------|-----------|----------------------------------------------------------|
| 0x0    | `PE_SEL`  | write: switch to core *n*; read: running core            |
| 0x4    | `WAY_EN`  | active-way flags, one bit per way, reset to all ones     |
| 0x8    | `TIMER`   | free-running count of bus-clock ticks (67 MHz)           |

The timer counts bus ticks, so a program measures real time whatever core it
runs on. It is meant for the checkpoint at the top of a real-time loop:

1. read the timer;
2. add the slack left before the iteration's virtual deadline;
3. write `PE_SEL` (and `WAY_EN`) to choose the cheapest core and way count
   that still meets the next iteration's worst case.

Each scratchpad has two requesters on its single SRAM port, and port A has
priority:

- I-SPM: A is instruction fetch, B is data-port writes and reads.
- D-SPM: A is the data port, B is the switch sequencer's stack.

**Core port** (`mpp_pkg::pe_out_t` from the core, `pe_in_t` to it). Fetch and
data requests are held until `ready`, and data is valid with `ready`. A core
must answer `halt` with `halted` once it has nothing outstanding. It must
read its registers onto `ctx_rdata` combinationally from `ctx_addr`. It must
write `ctx_wdata` on an enabled edge with `ctx_we`. Register numbers 0–15 are
general purpose; 16–23 are special purpose.

## Bus interface and arbitration

`gbi` fetches a cache line as one AHB INCR4 read burst:

- one NONSEQ beat, then three SEQ beats;
- each address phase overlaps the previous data phase;
- wait states are honoured.

It holds `hbusreq` until the last data phase has finished. `ahb_arbiter`
moves ownership only on a bus cycle with `hready` high in which the owner no
longer requests. It then picks the next requester in round-robin order. The
last owner stays the default master.

Writes, error responses (`hresp`) and data accesses to external memory are
not implemented. The publication describes only instruction refills. The
burst type and the arbitration policy are this implementation's choice.

## Parameters

The defaults are the published sizes: 8 KB I-cache with 4 ways, 8 KB I-SPM,
16 KB D-SPM, and three MPUs. `LINE_BYTES` (16) and the register counts in
`mpp_pkg` (16 general purpose, 8 special purpose) are assumptions. Changing
the dividers in `mpp_pkg` changes the core frequencies. `DIV_BUS` must stay a
multiple of each core divider; an elaboration-time assertion enforces this.

## Simulating

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`. The testbench models are:

- `pe_model`: a core stand-in with a register file and fetch/access tasks;
- `ahb_mem_model`: a read-only AHB memory. Each word is a function of its
  address. It inserts random wait states.

Example, the end-to-end run at full size:

    verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl -y tb \
        rtl/mpp_pkg.sv tb/tb_mpp_top.sv --top-module tb_mpp_top
    ./obj_dir/Vtb_mpp_top

`tb_mpp_top` runs all three MPUs at once at the default parameters. Its
coverage:

- MPU0 makes all six switch directions; MPU1 switches high↔middle; MPU2
  switches high↔low.
- The MPUs compete for the bus.
- Parts of the loop run direct-mapped (one active way).
- All fetched and loaded data and all carried registers are checked.
- It counts every mechanism (hits, misses, bus hand-overs, wait states,
  switches per direction, direct-mapped runs, timer reads) and fails if one
  never happened.
- It checks that idle cores never receive a clock edge and see only `halt`.

`tb_its_schedule` runs intra-task voltage scheduling on MPU0. This is the
checkpoint algorithm described above, with per-iteration work in the ratio
of the published ADPCM, JPEG and MPEG2 execution times. Each program runs
under two time constraints. The test checks:

- no iteration misses its virtual deadline;
- the 133 MHz core is used at least once;
- an energy estimate is below always running at 200 MHz.

The estimate is the published power of each speed times the measured time
at that speed. It comes out between 0.68 and 0.96 of the 200 MHz-only
figure. It is an illustration of the scheduling, not a power result of this
RTL.

## Limits

- There is no core in this RTL. The result is only as good as the core port
  contract above. In particular, a real core must be able to stop cleanly on
  `halt` and expose its registers to the context bus.
- Energy is not modelled. The RTL reproduces the switching mechanism and its
  latency, not the published energy figures. Those are about 10 nJ per
  switch, and the published energy savings were measured on the real cores.
- Level converters, the DMA controller, data writes over AHB and AHB error
  handling are absent.
- The published chip's per-way sense-amplifier gating is represented only by
  read enables.
