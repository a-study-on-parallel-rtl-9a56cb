# A SIMD image processor with a conflict-free multi-access memory

Segmenting moving objects out of a video sequence (a step in preparing MPEG-4
video object planes) is dominated by neighbourhood operations: median filters,
frame differences, block-wise statistics, flooding of watershed regions. Each
of them applies the same few operations to every pixel. This design runs them on
a small SIMD array. A single instruction stream drives `N_PE` = 4 processing
elements (PEs) in lock step. A **multi-access memory system (MAMS)** hands the
PEs four image points in one memory cycle. Those four points can be a
horizontal run, a vertical run or a 2x2 block, with any constant spacing between
the points.

The hard part is the memory system. The rest is a deliberately plain controller
and ALU around it.

## Block overview

```
   processor-unit side (ports)                      image port (ports)
   pu_* registers    lm_* program load              h_* (while idle)
        |                 |                                |
   +----v-----+     +-----v-----+                          |
   | dma_ctrl |<--->| local_mem |                          |
   | issue    |     +-----------+                          |
   +----+-----+                                            |
        | instruction words, IN data      +----------------v--------------+
        +------------+------+------+      |  mams                         |
                     |      |      |      |  module_select  addr_calc     |
                   pe0    pe1 ... pe3 <-->|  data_route     5 x mem_module|
                     memory-reference     +-------------------------------+
                     requests (from dma_ctrl)
```

| file | block |
|---|---|
| `rtl/pps_top.sv` | system top: wires everything, arbitrates the memory system |
| `rtl/mams.sv` | multi-access memory system: the three stages and the modules |
| `rtl/module_select.sv` | memory module selection stage |
| `rtl/addr_calc.sv` | address calculation and routing stage |
| `rtl/data_route.sv` | data routing stage (write and read) |
| `rtl/mem_module.sv` | one memory module (synchronous RAM) |
| `rtl/pe.sv` | processing element (register file and ALU) |
| `rtl/dma_ctrl.sv` | instruction fetch, pairing, issue, scan loop, load scoreboard |
| `rtl/local_mem.sv` | instruction memory |
| `rtl/pps_pkg.sv` | access types, instruction set, element offset functions |

The embedded processor that controls the system, the host computer and the PCI
bus between them are not part of this RTL. Their side shows up as three groups
of top-level ports. The first is the issue unit's register port (`pu_*`). The
second is the local-memory port used to load programs (`lm_*`). The third is an
image port into the memory system (`h_*`), used to move frames in and out while
no program runs.

## The multi-access memory system

### Where each pixel lives

There are `M_MOD` = 5 memory modules for 4 PEs. Pixel (y, x) of the stored
image (rows of `IMG_W` = 176 pixels, `ROWS` = 512 rows) is placed by two
functions:

```
module   mu(y, x)    = (2*y + x) mod 5
address  alpha(y, x) = y*S + floor(x/4)        S = ceil(IMG_W/4) = 44
```

An access has an origin (y, x), a type and an interval r. Element k (k = 0..3)
is the pixel:

| type | element k |
|---|---|
| horizontal `ACC_H` | (y, x + k*r) |
| vertical `ACC_V` | (y + k*r, x) |
| 2x2 block `ACC_B` | (y + (k/2)*r, x + (k%2)*r) |

For all three types, element k lies in module `(mu0 + k*d) mod 5`. Here
`mu0 = mu(y, x)`. The step d is `r mod 5` for horizontal and block accesses,
and `2r mod 5` for vertical ones. Since 5 is prime, the four modules are
distinct whenever r is not a multiple of 5. Every such access is therefore
conflict-free and takes a single memory cycle. An access whose interval is a
multiple of 5 would hit one module several times. It is refused: `conflict`
pulses and nothing is read or written. The address function is one-to-one
inside each module, because any four horizontally adjacent pixels fall in four
different modules. Each module holds `ROWS*S` = 22,528 words, so the storage
overhead is 5/4.

### Routing is a permutation followed by a rotation

The module that element k must reach splits into two parts. The fixed
permutation `k -> k*d mod 5` depends only on the interval and type. It is
followed by a rotation by `mu0`, which depends only on the origin. The hardware
follows this split:

* **module_select** works out `mu0` and d. A small table indexed by d (the
  "ROM", with the interval acting as the multiplexer select) gives the slot
  `k*d mod 5` of each element. The stage also marks the live slots: an element
  is live when it lies inside the stored image and the access is not refused.
  These values are registered. A decoder then rotates the slot enables by
  `mu0`, giving one enable per module. The module that no element uses stays
  idle.
* **addr_calc** computes `alpha` for each element. An offset table supplies the
  element's row offset, already multiplied by S, and its column offset; an
  adder forms the address. The addresses go into the same slots, are
  registered, and are barrel-shifted by `mu0` onto the modules.
* **data_route**, on writes, puts PE k's word in slot `k*d mod 5` and keeps it
  in two registers. A barrel shifter then rotates the slots onto the modules.
  On reads, a barrel shifter rotates the module outputs back by `mu0`, a
  register holds them, and the router gives slot `k*d mod 5` to PE k.

Elements outside the image are neither written nor read. They read back as 0,
and `relem[k]` tells which elements existed. Programs use this for zero padding
at the frame border.

### Pipeline timing

A new access can enter on every clock cycle.

| cycle | what happens |
|---|---|
| t | request sampled: origin, type, interval, write data, tag |
| t+1 | module enables and addresses reach the modules, which latch them |
| t+2 | write data reaches the modules; the write happens at the end of t+2 |
| t+3 | the module outputs are rotated back and registered |
| t+4 | `rvalid`, `rdata[k]`, `relem`, `rtag` for a read |

The write path has one register more than the address path, so each module is
a late-write RAM: the address comes one cycle before the data. A read issued
in the cycle after a write to the same pixel returns the new value.

## Processing elements and the issue unit

### Instructions

Instructions are 32-bit words with the opcode in bits [31:27]. There are 16
*general* instructions and 2 *memory-reference* instructions:

| opcode | name | effect |
|---|---|---|
| 0 | NOP | |
| 1 | LDI rd, imm | rd = imm |
| 2 | MOV rd, rs | rd = rs |
| 3..5 | ADD / SUB / ABSD rd, rs, rt | rs + rt, rs - rt, abs(rs - rt) |
| 6..7 | MIN / MAX rd, rs, rt | unsigned |
| 8..10 | AND / OR / XOR rd, rs, rt | |
| 11..12 | SHL / SHR rd, rs, imm | shift by imm[3:0] |
| 13 | SLT rd, rs, rt | rd = (rs < rt), unsigned |
| 14 | IN rd | rd = word the processor unit wrote to DATA |
| 15 | OUT rs | PE output register = rs |
| 16 | LOAD reg, type, r, dy, dx | reg = element k of the access at (YB+dy, XB+dx) |
| 17 | STORE reg, type, r, dy, dx | element k of the access = reg |

Field layout:

- General instructions: rd [26:24], rs [23:21], rt [20:18], imm [15:0].
- Memory-reference instructions: reg [26:24], type [23:22], interval [21:18],
  dy [17:9], dx [8:0]. dy and dx are signed (-256..255).

Each PE has eight 16-bit registers.

### Pairing and stalls

Each cycle the issue unit (`dma_ctrl`) looks at two consecutive instruction
words. If one is a memory reference, the other is a general instruction, and
the two share no register, both issue in the same cycle. The general
instruction runs in the ALU while the memory system carries the access.
Otherwise only the first word issues.

A LOAD's data returns four cycles after issue. A scoreboard marks its
destination register until then. Any instruction that names a marked register
waits, and that cycle counts as a stall. Code can therefore hide load latency by
placing independent work after the loads. The median example below moves the
loads of the next window row in between the previous row's reductions.

### Scanning a program over the image

A program is a straight block of `PROG_LEN` words. The issue unit repeats it for
every scan position (YB, XB). YB runs over Y0, Y0+YSTEP, ... up to Y1, and XB
runs the same way inside each row. LOAD and STORE address the pixel
(YB + dy, XB + dx). This is the system's two-dimensional addressing: every PE
uses the same (row, column) base, and the access type decides which neighbour
each PE receives.

### Register map (`pu_addr`)

| addr | register |
|---|---|
| 0 | CTRL: write bit 0 = 1 to start (ignored while busy) |
| 1, 2 | PROG_BASE, PROG_LEN |
| 3, 4, 5 | Y0, Y1, YSTEP |
| 6, 7, 8 | X0, X1, XSTEP |
| 9 | DATA, broadcast to the PEs by IN |
| 10 | STATUS: bit 0 busy, bit 1 done |
| 11, 12, 13 | CYCLES, STALLS, PAIRS of the last run |
| 16..19 | last OUT value of PE 0..3 |

After the last scan position the unit waits for the memory pipeline to drain
and for all loads to return. It then raises `irq` for one cycle and frees the
image port (`h_ready`). While a program runs, the issue unit and the PEs own
the memory system, and the image port is ignored.

## Example programs

Frame difference: frame n is stored at rows 144..287 and frame n+1 at rows
288..431. The scan runs over rows 144..287 and columns 0..175 with step 2.

```
LOAD  r1, B, 1, 0, 0        ; 2x2 block of frame n
LOAD  r2, B, 1, 144, 0      ; same block of frame n+1   } one cycle
ADD   r4, r4, r5            ; block counter             }
ABSD  r3, r1, r2            ; waits 4 cycles for r2
STORE r3, B, 1, -144, 0     ; |difference| into rows 0..143
ADD   r6, r6, r3            ; running sum per PE
```

This takes 9 cycles per 2x2 block: 6 instructions, one pair, and 4 stall
cycles. A whole QCIF frame (176 x 144, 6,336 blocks) takes 57,024 cycles.

The 3x3 median (`tb/tb_pps_median.sv`) loads the nine neighbours with
horizontal accesses at offsets -1..1. Each window row is reduced to its
minimum, median and maximum. The result is
`med3(max of minima, median of medians, min of maxima)`. The program is 44 words
and takes 53 cycles per group of four output pixels: 2 pairs and 12 stall
cycles per group.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `N_PE` | 4 | PEs = elements per access. A block access is (N_PE/2) rows x 2 columns. |
| `M_MOD` | 5 | memory modules; must be prime and larger than `N_PE` |
| `IMG_W` | 176 | stored row width (QCIF) |
| `ROWS` | 512 | stored rows (room for three QCIF frames) |
| `DATA_W` | 16 | word width of memory and PE registers |
| `NREG` | 8 | PE registers (the instruction fields are 3 bits) |
| `LM_DEPTH` | 1024 | local memory words |

## Limits worth knowing

* Programs are straight-line. There are no branches and no per-PE masking, so
  data-dependent control (for example the new-minima search of a watershed)
  belongs on the controlling processor.
* The scan window is a rectangle with fixed steps. A program that needs
  another traversal order must be started once per piece.
* Arithmetic is 16-bit and wraps. MIN, MAX, SLT and ABSD are unsigned.
* An interval that is a multiple of `M_MOD` is refused, not serialised.
* The image port is ignored while a program runs. Its requests are not queued.
* The local memory reads are combinational. This suits a register-file or
  FPGA distributed RAM, but not a synchronous SRAM macro.
* The block-level parameters were also exercised at `N_PE` = 8, `M_MOD` = 11
  with the memory-system testbench. The system top's instruction fields assume
  8 registers.

## How this relates to the original design

These parts follow the published description:

* the system structure: processor unit, local memory, issue unit ("DMA
  controller"), n = 4 PEs, memory system, m memory modules;
* SIMD execution of one instruction stream;
* the 16 + 2 instruction split, with one memory-reference and one general
  instruction executing together;
* the issue unit holding the bus until the application ends;
* (row, column) addressing;
* the three access types with a constant interval;
* the division of the memory system into module selection, address calculation
  and routing, and data routing;
* the register and barrel-shifter stages of each path;
* the QCIF frame size.

These are this design's own choices, since the description does not give them:

* the number of modules (5);
* the module and address functions;
* the 2x2 block shape;
* the widths;
* the late-write module timing;
* the opcode encoding and the 16 general instructions;
* the register file;
* the pairing rule's register check;
* the load scoreboard;
* the scan loop;
* the register map;
* the image port used for frame transfer.

The original PEs appear to be multi-cycle state machines. Here each PE
completes a general instruction in one cycle. The host-side steps of the
segmentation flow (new-minima detection, post-processing) are software and are
not represented.

## Simulation

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself.
Build any of them with Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/pps_pkg.sv tb/tb_pps_top.sv \
          --top-module tb_pps_top -o sim
./obj_dir/sim
```

| testbench | what it shows |
|---|---|
| `tb_pps_top` | full default size: two QCIF frames loaded, frame difference run on the PEs, every pixel, per-PE sums and counts, one pair and 4 stalls per block, 9 cycles per block, refused and edge accesses |
| `tb_pps_median` | 3x3 median on a 176 x 16 band at default size, every pixel against a sorting model |
| `tb_mams` | 3,000 random mixed accesses of all types, intervals 1..15, origins partly off-image, against a golden image; checks 4-cycle latency and one access per cycle |
| `tb_module_select`, `tb_addr_calc`, `tb_data_route` | each stage against the module and address functions computed directly |
| `tb_mem_module`, `tb_local_mem` | memories against a model array |
| `tb_pe` | random ALU instructions against a model register file |
| `tb_dma_ctrl` | request order and coordinates, pairing, stall count, no issue ahead of a pending load |

Each runs in well under a second. The testbenches set smaller image sizes for
the block-level tests. The two system tests use the defaults.
