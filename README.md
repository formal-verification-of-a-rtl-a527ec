# A family of memory management units

An MMU sits between a CPU and memory. It decides whether each memory request
is allowed, and in the larger designs it turns the virtual address into a
real one. This repository holds five MMUs, from a single compare register up
to a unit that reads segment descriptors from a table in main memory. Each
one adds a small number of features to the one before:

| Module         | Adds                                                           |
|----------------|----------------------------------------------------------------|
| `pgck_tlm`     | one stored page number; compare or overwrite                   |
| `pgck_sup_tlm` | only supervisor mode can overwrite the stored page             |
| `bb_mmu`       | memory-mapped protection register; segment + bounds check      |
| `vbb_mmu`      | second register holding a real base; address translation      |
| `seg_mmu`      | descriptors fetched from a segment table in memory; rights, availability, bounds; translation by addition |

The ladder was designed so that each step could be proved correct with only
a small change to the proof of the step before. The RTL keeps that
structure. The first four units are built from the same three parts:
gate-level comparators, word registers and a few gates. The fifth has a
six-phase control unit driving a small data path.

`mmu_top` instantiates all five side by side. They share only the clock
and the reset; every unit has its own prefixed ports (`pc_`, `pcs_`, `bb_`,
`vbb_`, `seg_`).

## Conventions common to all units

- **Words.** Every address and data word is `WIDTH` bits wide, 32 by
  default. Comparisons are unsigned.
- **One-cycle response.** Each unit is a clocked state machine. The inputs
  of cycle *t* determine the registers and outputs of cycle *t+1*. So `ack`
  (and `out_addr` in `vbb_mmu`) are registers, valid the cycle after the
  request. A register written in cycle *t* is used by comparisons from
  cycle *t+1*.
- **Reset.** The reset is asynchronous and active low (`rst_n`). Every
  register starts at zero and the segment-table control unit starts in
  phase 0.
- **Supervisor line.** `sup` high means the request comes from the
  operating system kernel. Only kernel requests can change protection state.

## Comparison units (`comp_unit`, `compeq_unit`)

`comp_unit` returns greater, less and equal for two words. It is a ripple
structure, bit 0 first:

- Each bit pair goes through a one-bit comparator. It has two inverters and
  three NOR gates: `g = ~(~a | b)`, `l = ~(~b | a)`, `e = ~(g | l)`.
- A combining stage then merges the result for bits below *i* with bit *i*:
  `G = g_i | (e_i & G_lo)`, `L = l_i | (e_i & L_lo)`, `E = e_i & E_lo`.

`compeq_unit` only tests equality. Each bit cell is "both zero OR both one",
and the cells are ANDed in a chain. Both units are combinational.

## Page check TLMs (`pgck_tlm`, `pgck_sup_tlm`)

Each TLM holds one page number in a register. Each cycle the `wc` line
selects one of two operations:

- `wc = 1`: store `addr` and acknowledge.
- `wc = 0`: acknowledge only if `addr` equals the stored value.

The hardware is a register, a `comp_unit` (only its equal output is used)
and `ack <= eq | wc`.

In the supervisor version the write command is `wc & sup`:

- A user-mode write leaves the register unchanged and is answered as a
  compare.
- A supervisor compare is acknowledged only on a match. This follows the
  unit's formal definition, where the ack gate takes `wc & sup`. A drawing
  of the same unit shows `sup` itself on that gate, which would acknowledge
  every supervisor request. That is not what is built.

## Base and bounds (`bb_mmu`)

The protection register is memory-mapped at `REG_ADDR`. Both the address
and the register are split at bit `OFS_MSB` (called *s* below):

```
  addr / register:   [WIDTH-1 ........ s] segment      [s ..... 0] offset
```

The two fields share bit *s*. The segment comparison includes it, and so
does the bounds comparison. Because the segments must match, the shared
bit cannot change the result.

| mode       | behaviour                                                            |
|------------|----------------------------------------------------------------------|
| supervisor | `ack` always; if `rw` and `addr == REG_ADDR`, register <= `data`     |
| user       | `ack` = segment equal AND NOT (addr offset > register offset)        |

The hardware uses three full comparators: one for the register address, one
for the segment and one for the offset. The offset comparator's "greater"
output is inverted.

## Address translation (`vbb_mmu`)

`vbb_mmu` has two registers at an even/odd address pair. Bits
`[WIDTH-1:1]` of the address must equal those of `REG_ADDR`. Bit 0 then
selects the register:

| address        | register                                       |
|----------------|------------------------------------------------|
| `REG_ADDR`     | translate register `va_q` (real base)          |
| `REG_ADDR + 1` | protection register `bb_q` (segment + bounds)  |

In user mode a request is valid under the same rule as in `bb_mmu`. A valid
request is acknowledged, and its address leaves as
`{va_q[WIDTH-1:s+1], addr[s:0]}`: the segment bits are replaced by the real
base. An invalid request gets no `ack`, and its address leaves unchanged.
Supervisor requests are always acknowledged and are never translated.
Internally, a selector chooses between `addr` and `va_q`, and its output
supplies the upper bits. The register-address match uses `compeq_unit`.

## Segment-table MMU (`seg_mmu`)

This is the largest unit and the one where timing matters most.

### Segment table

A virtual address is a segment id and a segment offset:

```
  vaddr:  [WIDTH-1 ... SEG_OFS_W] segment id   [SEG_OFS_W-1 ... 0] offset
```

The table starts at the address held in the table pointer register. Entry
*k* is two words at `tblPtr + 2k`:

```
  word 0:  bit31 avail | bit30 read | bit29 write | bit28 execute | ... | [15:0] segment size
  word 1:  real base address of the segment
```

A user request is granted when all three conditions hold:

- `avail` is set.
- Every right the request asks for (`rwe.r`, `rwe.w`, `rwe.e`) is set in
  the descriptor.
- `offset <= size`, so the size field is the largest legal offset.

The real address is `offset + base`, computed modulo 2^WIDTH. When `avail`
is clear, the operating system may use word 1 for anything, such as a disk
location.

In supervisor mode nothing is checked or translated. A supervisor write
whose address equals the `tbl_ptr_addr` input loads the table pointer from
`vdata`.

### Handshake and latency

1. In a cycle where `phase == 0`, raise `req_in` for one cycle.
2. Hold `vaddr`, `vdata`, `rwe`, `sup` and `tbl_ptr_addr` steady until
   `done`.
3. `done` is high for exactly one cycle. `ack` and `raddr` are valid in
   that cycle. When `xlat` is low, `raddr` is the untranslated address.

With a memory that answers one cycle after a fetch request, the number of
clock edges from the edge that takes `req_in` to the edge that raises `done`
is:

| request                              | edges | phases       |
|--------------------------------------|-------|--------------|
| supervisor, pass-through             | 2     | 0-1-0        |
| supervisor, write table pointer      | 3     | 0-1-5-0      |
| user, refused                        | 6     | 0-1-2-2-3-3-0|
| user, granted                        | 7     | 0-1-2-2-3-3-4-0 |

A slower memory lengthens phases 2 and 3: the control unit waits there
until `fdone`.

### Data path (`seg_datapath`)

```
 vaddr ─ split ─┬─ id<<1 ─┐          ┌─ tblPtr (reg, tbl_c, from vdata)
                └─ offset ─┤ mux1     │  data  (fetched word)     mux2
               constant 1 ─┘  │       │  latch output ─┘           │
                              └──── adder (registered) ───────────┘
                                          │
                                      latch L (hold while l_c)
                                          │
                         rAddr = xlat ? L : vaddr(previous cycle)
                                          │
                        memory fetch unit (r_req) ──► data ──► tmp (tmp_c)
                                                                │
                      security unit (tmp, vaddr, rwe) ──► sec_ok (registered)
       address match (vaddr == tbl_ptr_addr) ──► match (registered)
```

The multiplexer select `mux_c` picks one of three sums:

| `mux_c` | sum                        | used for                     |
|---------|----------------------------|------------------------------|
| 0       | `(id << 1) + tblPtr`       | address of descriptor word 0 |
| 1       | `offset + fetched word`    | real address                 |
| 2       | `1 + latch`                | address of descriptor word 1 |

The latch is transparent when `l_c` is low and holds its value when `l_c`
is high. It is built as a register holding its own last output plus a
multiplexer, so the whole design is edge-triggered. The memory fetch unit
(`seg_mem_unit`) forwards the request to an external synchronous RAM
(`mem_rd`, `mem_addr`, `mem_rdata`). It returns the word with `fdone` one
cycle later, and returns zero when there was no request.

### Control unit (`seg_ctrl`)

Every output is registered. Each row below gives the values that appear in
the cycle after the phase and condition named in that row:

| from phase | condition             | muxC | tmp | tbl | lat | req | xlat | done | ack | next |
|------------|-----------------------|------|-----|-----|-----|-----|------|------|-----|------|
| 0          | `req_in`              | 0    |     |     |     |     |      |      |     | 1    |
| 0          | idle                  | 0    |     |     |     |     |      |      |     | 0    |
| 1          | sup, write & match    | 0    |     | 1   |     |     |      |      |     | 5    |
| 1          | sup, otherwise        | 0    |     |     |     |     |      | 1    | 1   | 0    |
| 1          | user                  | 2    | 1   |     | 1   | 1   | 1    |      |     | 2    |
| 2          | `fdone`               | 1    |     |     |     | 1   | 1    |      |     | 3    |
| 3          | `fdone`, `sec_ok`     | 0    |     |     |     |     | 1    |      |     | 4    |
| 3          | `fdone`, not `sec_ok` | 0    |     |     |     |     |      | 1    |     | 0    |
| 4          | -                     | 0    |     |     | 1   |     | 1    | 1    | 1   | 0    |
| 5          | -                     | 0    |     |     |     |     |      | 1    | 1   | 0    |
| 2, 3       | waiting               | hold | hold| hold| hold| 0   | hold | hold | hold| hold |

The sequence for a user request runs as follows:

1. While the unit is still in phase 0, the adder already forms the address
   of descriptor word 0.
2. Phase 1 holds that address in the latch, drives it out and fetches word
   0 into `tmp`.
3. In phase 2 the adder adds 1 to form the address of word 1. When word 0
   arrives, the latch is released so that this address goes out, and word 1
   is fetched.
4. In phase 3 the security unit checks word 0. When word 1 arrives, the
   adder forms `offset + base`.
5. Phase 4 holds the result and signals `done` with `ack`.

Assertions in `seg_ctrl` check four rules: the phase is always one of the
six defined values, phase 2 is never followed directly by phase 0, phase 0
never loads the table pointer and always selects `mux_c = 0`, and `ack` is
never high without `done`. An assertion in `seg_mmu` checks one more rule:
an idle MMU without a request stays idle, gives no `ack` and keeps its
table pointer.

### Request to memory (`seg_bus_if`)

After `done & ack`, `seg_bus_if` puts the CPU's request on the memory side
(`bus_req`, `bus_addr`, `bus_data`, `bus_rwe`) for one cycle, in the next
cycle. The address is `raddr` when `xlat` is set and the CPU address
otherwise. A refused request is not passed on. A supervisor write to the
table pointer address is acknowledged, so it is passed on too.

## Parameters

| parameter   | default        | where                        | meaning                           |
|-------------|----------------|------------------------------|-----------------------------------|
| `WIDTH`     | 32             | all                          | word and address width            |
| `OFS_MSB`   | 15             | `bb_mmu`, `vbb_mmu`          | top bit of the offset field (*s*) |
| `REG_ADDR`  | `32'hFFFF_FFF0`| `bb_mmu`, `vbb_mmu`          | register address (even for `vbb_mmu`) |
| `BB_ADDR`, `VBB_ADDR` | `FFFF_FFF0`, `FFFF_FFE0` | `mmu_top`  | the two `REG_ADDR`s               |
| `SEG_OFS_W` | 16             | `seg_*`                      | segment offset / size field width |

The original design keeps all widths and addresses free, so every default
above is a choice made here. With `SEG_OFS_W = 16`, at most 4 bits
(bits 27..16) of word 0 are left between the rights bits and the size
field. A smaller `WIDTH` must still leave room for the four flag bits above
the size field.

## Choices and departures

The original design left several points open or inconsistent. Each choice
made here is listed below.

- **Abstract operations of the segment-table MMU.** The original leaves
  these abstract. Here they are concrete:
  - split = bit fields
  - descriptor offset = segment id shifted left by one
  - add = modular addition
  - address match = equality
  - bounds = `offset <= size`
  - access check = avail and the requested rights
  - flag bits = the four bits at the top of word 0
- **Supervisor TLM acknowledge.** `ack` follows the formal definition
  (`eq | (wc & sup)`), not the drawing (`eq | sup`).
- **Supervisor write condition of the segment-table MMU.** It uses the
  write bit of `rwe`, which matches the prose and the complete phase table.
- **Comparators** are unsigned.
- **Registers.** The original builds them from flip-flop cells it does not
  define. Here they are plain behavioural registers with the same
  next-state rule: clear first, then load, otherwise hold.
- **Main memory and CPU** are not part of the RTL. The testbenches use a
  behavioural synchronous RAM, `tb/seg_ram_model.sv`.
- **Not built.** The original mentions a FIFO register stack, planned as
  the basis of an MMU cache, and several enhancements: a segment count
  register, a fault status register and a paging unit. It describes none of
  them in enough detail to build.

## Verification status

Every module has a self-checking testbench in `tb/<module>_tb.sv`:

- **Comparators and register.** Exhaustive at small widths, random at 32
  bits.
- **TLMs, base and bounds, translation.** A cycle-by-cycle reference model
  of the unit's rule, with random and directed traffic. Every case (write,
  hit, miss, refused write, in bounds, out of bounds, wrong segment) is
  counted and must occur.
- **`seg_ctrl`.** Compared row by row against the phase table under random
  inputs. All six phases and all exits of phases 1 and 3 must be reached.
- **`seg_datapath`.** Compared every cycle against a reference model of its
  units.
- **`seg_mmu`.** Runs a random 16-entry segment table. It checks `ack`,
  `raddr`, the table pointer and the exact latency of each kind of request.
- **`seg_table_full_tb`.** Runs `seg_mmu` at its default sizes against a
  table with a descriptor for every one of the 65536 segment ids, placed
  in a 16 M-word real memory. The memory is not stored: each word is
  computed from its address by a formula given in the file. Each id is
  requested once, and the test checks every result, every fetch address and
  every latency.
- **`mmu_top_tb`.** Runs all five units at their default sizes and counts
  26 mechanisms; any mechanism that never happens is a failure. The
  mechanisms include:
  - register writes
  - refused user writes
  - in-bounds, out-of-bounds and wrong-segment requests
  - translations
  - descriptor fetch waits
  - each of the three refusal reasons
  - requests passed on to memory, and refused requests that are not

This is simulation, not proof. The testbenches show that the RTL matches
the reference rules written for them, which were derived from the original
specification. They do not cover every input.

## Simulating

All files are plain SystemVerilog 2017. The package `rtl/mmu_pkg.sv` must be
read first. To run the end-to-end test:

```
verilator --binary --timing --assert -Irtl -Itb rtl/mmu_pkg.sv tb/mmu_top_tb.sv \
          --top-module mmu_top_tb -Mdir obj_top
./obj_top/Vmmu_top_tb
```

Replace `mmu_top_tb` with any `<module>_tb` to test a single unit. Every
testbench ends with a line `TB_RESULT checks=N failures=M`. The testbenches
initialise everything they read, so they also run with randomised initial
values (`+verilator+rand+reset+2`).
