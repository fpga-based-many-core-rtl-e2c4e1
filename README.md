# SIMD many-core system-on-chip

A single-instruction, multiple-data machine for pixel-parallel video work.
One small controller processor, the **ACU** (Array Controller Unit), runs
one program. Parallel instructions in that program are decoded once, in the
ACU, and the decoded form goes out on a shared bus to an array of **reduced
PEs** (processing elements). Each PE is only the execute stage of the same
core: a register file, an ALU and a private data memory, with no fetch or
decode logic and no instruction memory. Because the PEs are this small, a
mid-sized FPGA holds many of them.

Two networks move data between the PEs:

* a **neighbourhood network**, one router per PE, for regular shifts on a
  linear array, ring, mesh, torus or X-net;
* a **global NoC** (network-on-chip), a mode manager in front of an
  interconnection network (a crossbar by default, or a shared bus or an
  Omega multistage network). It
  links any PE to any PE, the ACU to the PEs, and the PEs to an input and an
  output I/O device, for example a camera frame buffer and a display frame
  buffer.

Each PE also has an **activity bit**. A disabled PE ignores parallel
instructions. The ACU reads the OR of all activity bits through an **OR
tree**, which is how data-dependent conditionals work in SIMD.

Everything is parametric: the number of PEs, their grid, the memory sizes,
the neighbourhood topology and the NoC's internal network. The defaults are 32 PEs on a 4 x 8 torus,
2 KiB of memory per PE, 4 KiB of ACU data memory and 1024 instruction words.

## Program model

There is a single instruction stream, a MIPS-I subset. Every arithmetic and
memory instruction has two forms:

| form | executed by | encoding |
|---|---|---|
| sequential (`addi`, `lw`, `mul`, ...) | the ACU | standard MIPS-I opcodes |
| parallel (`p_addi`, `p_lw`, `p_mul`, ...) | every active PE, each on its own registers and memory | I-type: MIPS opcode with bits [5:4] set (0x08..0x0F becomes 0x38..0x3F); R-type: opcode 0x30 with the MIPS funct; `p_lw` 0x31, `p_sw` 0x32 |

Jumps, branches (`beq`, `bne`, `j`, `jal`, `jr`, `jalr`) and `break` exist
only in sequential form. `break` halts the ACU. `mul` (funct 0x18) writes
the low 32 bits of the product to `rd`. `div` (funct 0x1A, signed) and
`divu` (0x1B) write the quotient to `rd`; there are no HI/LO registers.
The quotient rounds toward zero, and division by zero gives all ones.

Communication and system control have no opcodes of their own. They are
loads and stores to reserved addresses. A library of C macros would expand
each operation into a short sequence: put an address into `r1` with
`p_addi`/`p_lui`, then `p_sw` or `p_lw`.

| operation | who | address | store does | load returns |
|---|---|---|---|---|
| SET_MODE_NOC | ACU | `0x9003` | selects the global NoC mode | - |
| GET_OR_TREE | ACU | `0x9005` | - | 1 if any PE is active |
| NoC port of PE k | ACU | `0x4000 + k` | mode 1: word to PE k | mode 4: word posted by PE k |
| P_GET_IDENT | PE | `0x0002_0000` | - | the PE's number |
| P_SET_STATUS / P_GET_STATUS | PE | `0x0009_0000 + id` | PE `id` copies bit 0 of the word into its activity bit | activity bit of PE `id` |
| P_NOC_SEND / P_NOC_REC | PE | `0x4000 + dest` | send into the NoC (mode 0: to PE `dest`; modes 2 and 4: `dest` unused) | the PE's NoC receive register (mode 3: first fetches a device word) |
| P_REG_SEND / P_REG_REC | PE | `0x6000 + 16*dir + dis` | move the word `dis` hops in direction `dir` | the word that arrived at this PE |

The ACU decodes only the low 16 address bits. Because of this,
`addi r1,r0,0x9005`, which sign-extends to `0xFFFF9005`, still reaches the
OR tree. Directions are N=0, E=1, S=2, W=3, NE=4, NW=5, SE=6, SW=7. North
is the row above. Every other address is ordinary data memory, accessed
as whole 32-bit words (ACU: 4 KiB; PE: 2 KiB, wrapping).

`tb/simd_asm.sv` has an encoder function for each instruction. The
end-to-end testbench uses it to build its program.

## Pipeline and timing

```
 IF: ACUIns (sync read) -> ID: decoder -> EX: ACU execute  | all PE execute
                                  \____ ACU/PE bus (ID/EX register) ____/
```

* The ACU has three stages. Register read, ALU, memory access and
  write-back all happen in EX. For a parallel instruction, that EX cycle is
  also the cycle in which every PE executes. So there are no data hazards
  and no forwarding logic.
* A taken branch or jump resolves in EX and squashes the two younger
  instructions: a 2-cycle penalty and no delay slot. A program of `n`
  instructions with `t` taken branches therefore takes `n + 2t + 2` cycles
  with no stalls, plus 33 per divide (`tb_acu` checks this count).
* `hold` freezes every stage, and no PE commits while it is high. Either
  network raises it while a transfer takes more than one cycle:
  * a neighbour send of distance `dis` holds for `dis + 1` cycles: one to
    load the routers, then one per hop;
  * a NoC device transfer (mode 2 or 3) with `k` participating PEs holds for
    `k + 1` cycles if the device never stalls, then one cycle per word the
    device accepts or supplies.

  The ACU itself raises it for a `div`/`divu` or `p_div`/`p_divu`: one
  cycle to start the dividers (`div_go`), then `DIV_CYCLES` (32) cycles
  while they run.
  During a hold the instruction stays in EX and keeps driving its request.
  It commits in the first cycle after the hold drops, and a load then reads
  the data that has arrived.
* Every other instruction, NoC modes 0, 1 and 4 included, completes in one
  cycle.

## Activity and conditional execution

Reset enables all PEs. A parallel instruction changes nothing in a disabled
PE: no register or memory write, and no network request. The one exception
is the P_SET_STATUS store, which every PE performs. Each PE compares the
address's low 16 bits with its own number, so the same instruction can do
two things:

* write one chosen PE's bit, when every PE uses the same `id`;
* let each PE write its own bit from its own data, when each PE uses the
  address `0x90000 + own id` obtained with P_GET_IDENT.

The second case is the SIMD `if`. Each PE computes a condition into a
register (`p_slti`, for example) and stores it to its own status address.
The ACU reads GET_OR_TREE and branches past the body if no PE is left. A
final store of 1 to the own status address, which disabled PEs also
perform, re-enables all PEs.

## Global NoC

The mode register is set by SET_MODE_NOC and is `0` after reset.

| mode | transfer | cycles |
|---|---|---|
| 0 PE -> PE | each sending PE's word goes through the network into the receive register of PE `dest` | 1 on the crossbar |
| 1 ACU -> PE | ACU store to `0x4000+k` writes PE k's receive register | 1 |
| 2 PE -> device | the words of all sending PEs go out on `out_*`, lowest PE first, each tagged with its PE number | hold, k words |
| 3 device -> PE | every receiving PE gets the next word from `in_*`, lowest PE first | hold, k words |
| 4 PE -> ACU | each sending PE posts a word; ACU load from `0x4000+k` returns PE k's | 1 |

Both device ports are valid/ready streams that carry the PE number, so a
frame-buffer controller can compute its own addresses. Each PE has one
receive register, shared by modes 0, 1 and 3. If two PEs send to the same
PE, the lower-numbered one wins and `noc_conflict` rises for that cycle.

### Internal network (`NOC_NET`)

* `NET_CROSSBAR` (default): non-blocking. Any permutation passes in one
  cycle.
* `NET_BUS`: one shared bus. Each cycle the lowest-numbered PE still
  waiting gets it, so a mode 0 transfer of `k` words takes `k` passes.
* `NET_DELTA`: an Omega network (`rtl/delta_net.sv`). It has log2(N)
  stages of 2x2 switches, with a perfect shuffle before each stage. Each
  switch routes on one destination bit, most significant first. It is
  blocking: when two words want the same switch output, the word from
  the lower-numbered source passes. The identity pattern and any single
  word always pass. Many permutations need two or three passes.
  A PE count that is not a power of two is padded up to the next one.

On the bus or the Omega network, a mode 0 transfer that cannot pass in
one cycle holds the machine. Refused words are offered again every cycle
until all have arrived, and the instruction commits one cycle later. So
`p` passes cost `p + 1` cycles when `p > 1`. Mode 1 has a single sender
and always takes one cycle. Devices (modes 2 and 3) and mode 4 do not use
the internal network.

## Neighbourhood network

PE `p` sits at row `p / COLS`, column `p % COLS`. The topology parameter
decides which links exist:

| `TOPO` | links | wrap-around |
|---|---|---|
| `TOPO_LINEAR` | E/W along the PE numbers | no |
| `TOPO_RING` | E/W along the PE numbers | yes |
| `TOPO_MESH` | N/E/S/W | no |
| `TOPO_TORUS` | N/E/S/W | yes |
| `TOPO_XNET` | N/E/S/W and the four diagonals | no |

A send loads every router with its PE's word (marked invalid for PEs that
did not send). All routers then move their word one hop at a time, each
router enabling only the one link it needs. After `dis` hops, PE `p` holds
the word of the PE `dis` hops behind it. Where a non-wrapping array has no
such PE, it holds zero. The routers hold no FIFOs: all PEs shift in the
same direction at the same time, so no two words ever compete for a link.
The direction and distance come from the lowest-numbered sending PE. An
assertion checks that the other sending PEs agree.

## Files

| file | content |
|---|---|
| `rtl/simd_pkg.sv` | opcodes, micro-instruction struct, NoC modes, directions, address map |
| `rtl/simd_top.sv` | the system |
| `rtl/acu.sv`, `rtl/acu_decoder.sv`, `rtl/instr_mem.sv` | controller, decode stage, program memory |
| `rtl/pe.sv` | reduced PE |
| `rtl/alu.sv`, `rtl/divider.sv`, `rtl/regfile.sv`, `rtl/data_mem.sv` | shared by ACU and PEs |
| `rtl/or_tree.sv` | activity OR tree |
| `rtl/neigh_net.sv`, `rtl/neigh_router.sv` | neighbourhood network |
| `rtl/global_noc.sv`, `rtl/crossbar.sv`, `rtl/delta_net.sv` | global NoC and its internal networks |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_simd_top_bus.sv` | the end-to-end program on a system with the bus NoC |
| `tb/tb_noc_net.sv` | the global NoC built with the bus and with the Omega network |
| `tb/simd_asm.sv` | instruction encoders for testbench programs |

## Verification

Each testbench compares against values it computes itself. Each ends with
`TB_RESULT checks=N failures=M` and has a watchdog.

`tb_simd_top_bus` runs the same program on a system whose NoC uses the
shared bus. There the mode 0 step needs several passes, and the
testbench checks that they happen.

`tb_noc_net` sends random partial permutations through the bus and Omega
variants of the NoC, with 8 PEs and with 6 PEs. It checks every delivered
word. It also checks the hold length against the number of passes. For the
Omega network, that number comes from a routing model in the testbench.

`tb_simd_top` runs the system at its default parameters, with 32 PEs and
the torus. Its program processes four frames of 32 RGB pixels each:

* pixels come in over NoC mode 3 and are converted to Y, I and Q
  (coefficients scaled by 1024);
* a sharpen filter (5 at the centre, -1 at N/E/S/W) is applied to Y, using
  four one-hop neighbour transfers and one two-hop transfer;
* each PE divides its sharpened value by its number plus one (`p_div`);
* the program disables dark pixels, checks the OR tree, and lets the still
  active PEs send to PE id+1 (mode 0). One frame is entirely dark, so the
  branch on an empty OR tree is taken;
* it also uses ACU -> PE (mode 1) and PE -> ACU (mode 4);
* results go out over mode 2 while the output device applies random
  back-pressure and the input device random gaps.

All 928 output words are checked. The testbench also counts every
mechanism (device in and out, back-pressure, neighbour and multi-hop
transfers, modes 0, 1 and 4, all-disabled and partly-disabled cycles, taken
branches, divides) and fails if any of them never happens. The run takes
about 2000 cycles, about 15 cycles per pixel for this program, and a few seconds of
simulation.

To run a testbench with Verilator:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/simd_pkg.sv tb/simd_asm.sv tb/tb_simd_top.sv --top-module tb_simd_top -o sim
./obj_dir/sim
```

Replace `tb_simd_top` with any other `tb_*` module. Only `tb_acu_decoder`,
`tb_acu`, `tb_pe`, `tb_simd_top` and `tb_simd_top_bus` need `tb/simd_asm.sv`; the others
compile without it.

## Where this design departs from, or fills in, its source

The source describes the architecture, its instruction macros and its
evaluation. It builds the processors from existing cores (a miniMIPS or an
OpenRISC, reduced to form the PE). These parts are this implementation's
own choices:

* **The core.** The core is a fresh, minimal MIPS-I subset with a 3-stage
  pipeline, not a reduced copy of an existing 5-stage core. The micro-instruction
  bus is the ID/EX register, so the PE is exactly the EX stage, in the
  spirit of the source.
* **Divide.** The source lists divide among the arithmetic instructions but
  says nothing of its hardware. Here the ACU and every PE each have a
  radix-2 restoring divider, one quotient bit per cycle, and a divide holds
  the whole machine for 33 cycles.
* **Instruction encoding.** The parallel opcodes, the NoC and neighbour
  address windows (`0x4000`, `0x6000`) and the dir/dis packing are this
  design's own. The ACU addresses `0x9003` and `0x9005`, the ident address
  `0x20000` and the status segment `0x9xxxx` follow the source's macros.
* **NoC modes.** The meaning of modes 0 to 4 is inferred: the source gives
  only which modes take a destination. Device transfers are serialised
  over a single stream per direction, and the receive register is shared
  among modes.
* **Activity details.** The reset value (all enabled), the rule that every
  PE performs a status store, and P_GET_STATUS reading any PE's bit
  through a shared vector are this design's choices.
* **Grid.** The 4 x 8 arrangement of the 32 PEs is assumed.
* **Torus in the default.** The default includes the torus. The source
  reports that its 32-PE configuration with a torus did not fit its FPGA,
  so set `TOPO` to suit the target.
* **Memories.** The data memories read asynchronously, which suits LUT RAM
  rather than block RAM. The instruction memory reads synchronously.
* **Blocking networks.** The source names the bus and the Delta network
  as options but does not say how refused words are handled. The
  hold-and-retry scheme, the Omega wiring and the priority rules are this
  design's own.
* **Not built:**
  * the "replication" variant, where each PE is a full processor;
  * the video peripherals (camera, video decoder, SDRAM, SRAM, LCD
    drivers). They attach to the two device streams.
