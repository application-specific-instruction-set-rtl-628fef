# A small instruction-set processor for block-matching motion estimation

Motion estimation is the most expensive step of a video encoder. For each
16x16 macroblock of the current frame it looks for the 16x16 block of the
previous (reference) frame that differs least from it, measured as the sum of
absolute differences (SAD) of the 256 pixels. Full search tries every position
of the search area. Fast searches (three-step, four-step, diamond) try only a
few dozen. Adaptive searches such as MVFAST pick their pattern from the motion
of neighbouring macroblocks. The fast and adaptive ones have data-dependent
control flow, which suits software better than a fixed hardware pipeline.

This design is a tiny programmable processor (an ASIP) built for that job. It
has eight 16-bit instructions, 32 registers and a serial SAD unit. A search
algorithm is a firmware program of a few hundred words, so one low-power
netlist can run any of them. The architecture follows the ASIP of Momcilovic,
Dias, Roma and Sousa ("Application Specific Instruction Set Processor for
Adaptive Video Motion Estimation"). The RTL here is an independent
implementation. Where that description leaves details open, this design makes
its own choices; the last sections list them.

## Block structure

```
            +--------+   fetch addr   +---------+  16  +------------------------------+
  jump ---->| pc_unit|--------------->| fw_rom  |----->| control_unit                 |
  target -->|  (10b) |                | 1024x16 |      |  IR, decoder, N/Z flags,     |
            +--------+                +---------+      |  SAD16 sequencer, interlock  |
                                                       +--------------+---------------+
                                                                      | ctrl_t
          +--------------------+  port A (R0..R15)   +-------+        v
          | regfile            |-------------------->|  alu  |---+  +--------------+
          | R0..R23  GPRs      |  port B (R0..R31)   +-------+   |  | write-back   |
          | R24..R31 SPRs      |--------------------------------+-->| mux: ALU,    |
          | byte write enables |<-----------------------------------| SAD, MOVR,   |
          +--------------------+                                |  | MOVC const   |
             |  SPRs (host, LD coordinates)                      |  +--------------+
             v                                                   |
          +--------------------------------+  mb_px, cand_px  +------+
 frame <--| agu: LD loader + local memory  |----------------->| sadu |
 memory   | (16x16 MB, 31x31 search area)  |                  +------+
          +--------------------------------+
```

| Module | Role |
|---|---|
| `me_asip` | top level; wires the blocks and holds the write-back multiplexer |
| `pc_unit` | 10-bit PC; a multiplexer picks PC or jump target as fetch address, an incrementer adds 1 (0 when stalled) |
| `fw_rom` | 1024 x 16 firmware memory, asynchronous read, with a load port |
| `control_unit` | instruction register, decoder, Negative/Zero flags, SAD16 step counter, AGU interlock |
| `regfile` | 32 x 16-bit registers; read port A (4-bit address), read port B (5-bit address), one write port with byte enables, host port to the SPRs |
| `alu` | ADD, SUB (adder with XOR-inverted operand), DIV2 (arithmetic shift right), operand isolation |
| `sadu` | serial SAD: one \|a-b\| per cycle into a 16-bit accumulator that can be loaded with an initial value |
| `agu` | executes LD in the background and feeds pixel pairs to the SADU; contains `local_mem` |
| `local_mem` | 256-byte macroblock array and 31x32-byte search-area array |
| `asip_pkg` | opcodes, condition codes, the `ctrl_t` control word, and encoder functions that serve as an assembler |

## Instruction set

All instructions are 16 bits. The opcode sits in bits [15:13].

| Instr. | 15:13 | 12 | 11:8 | 7:4 | 3:0 | Operation |
|---|---|---|---|---|---|---|
| `LD t` | 000 | t | - | - | - | start loading the macroblock (t=0) or the search area (t=1) into local memory |
| `J.cc addr` | 001 | cc[12:11] | | addr[9:0] | | jump if the condition holds: 00 always (U), 01 negative (N), 10 positive (P), 11 zero (Z) |
| `MOVR Rd, Rs` | 010 | Rd[12:8] | | - [7:5] | Rs[4:0] | Rd = Rs; any of R0..R31 |
| `MOVC.t Rd, #c` | 011 | t | Rd | c[7:0] | | load c into the high byte (t=1) or the low byte (t=0) of Rd; the other byte is kept |
| `SAD16 Rd, Rs1, Rs2` | 100 | - | Rd | Rs1 | Rs2 | Rd += SAD of one 16-pixel line; advance the line pointers |
| `DIV2 Rd, Rs` | 101 | - | Rd | Rs | - | Rd = Rs >>> 1 (arithmetic) |
| `ADD Rd, Rs1, Rs2` | 110 | - | Rd | Rs1 | Rs2 | Rd = Rs1 + Rs2 |
| `SUB Rd, Rs1, Rs2` | 111 | - | Rd | Rs1 | Rs2 | Rd = Rs1 - Rs2 |

ADD, SUB, DIV2 and SAD16 set the flags: Negative is bit 15 of the result, and
Zero is set when the result is 0. "Positive" means neither flag is set. MOVR,
MOVC, LD and J leave the flags alone. The 4-bit register fields reach R0..R15.
Only MOVR reaches R16..R31.

`asip_pkg` has one encoder function per instruction (`enc_add`, `enc_j`, ...).
The testbenches use them to assemble their firmware.

## Registers and the host interface

- **R0..R23** are general-purpose.
- **R24..R31** are special-purpose. The host writes them through `host_spr_*`
  and reads all eight on `spr`. If the host and the processor write the same
  byte in the same cycle, the processor wins. LD reads four of them:
  - R24/R25: x/y of the macroblock's top-left pixel in the current frame.
  - R26/R27: x/y of the search area's top-left pixel in the reference frame.
- The other four SPRs are free for parameters and results.
- The test firmware uses this handshake: wait until R31 is non-zero, process
  the macroblock, write the results to R28..R30, then clear R31.

There is no halt instruction. A program idles by polling an SPR or by jumping
to itself.

## How SAD16 works

SAD16 is the heart of the design and the only multi-cycle instruction. One
SAD16 compares one line of 16 pixels. Sixteen SAD16 in a row compare a whole
candidate block, accumulating into the same Rd.

The operands are two linear **line pointers** into the local memory:

- `Rs1` points into the macroblock array: row * 16 + column.
- `Rs2` points into the search-area array: row * 32 + column.

Candidate (x, y) of the search area therefore starts at pointer y*32 + x.
Moving one candidate to the right is +1, and one row down is +32. SAD16
advances both pointers by one line, so the next SAD16 needs no extra
instruction.

The register file has one write port, so the instruction runs as a short
schedule. The IR holds SAD16 for 19 cycles:

| Step | Read ports | ALU / write port | SADU / AGU |
|---|---|---|---|
| 0 | A = Rs1, B = Rs2 | Rs1 <= Rs1 + 16 | AGU captures both pointers |
| 1 | A = Rs2, B = Rd | Rs2 <= Rs2 + 32 | SADU accumulator <= Rd |
| 2..17 | - | - | SADU adds \|mb[Rs1+k] - sa[Rs2+k]\|, k = 0..15 |
| 18 | - | Rd <= SADU result, flags set | - |

The SADU itself is fully serial: an absolute-difference circuit, a 16-bit adder
and a register with load and enable. This is the low-area, low-power variant;
parallel or pipelined SADUs are possible but not built. The accumulator is 16
bits, and the largest possible block SAD (256 x 255 = 65,280) fits. Flags treat
results as signed, so comparisons of SADs above 32,767 do not work.

## LD, the AGU and the interlock

`LD t` hands a transfer to the AGU and completes in one cycle. The AGU then
copies the area into local memory, one pixel per cycle in raster order:

- t=0: the 16x16 macroblock of the current frame.
- t=1: the 31x31 search area of the reference frame, which gives 16x16
  candidate positions.

The frame memory is external. Its read port is `ext_re`, `ext_frame` (0 =
current, 1 = reference) and `ext_addr` = y * FRAME_W + x. The byte comes back on
`ext_rdata` in the next cycle. A load keeps `agu_busy` high for N*N + 1
cycles: 257 for the macroblock, 962 for the search area. No pixel is reused
between loads.

The processor keeps running during a load, so firmware can issue LD early and
do set-up work in the meantime. The only dependency rule is a stall: an LD or
a SAD16 that reaches the IR while the AGU is busy waits there (`stall_agu`)
until the load has finished. The AGU does not clip at frame borders, so the
firmware or host must give it a search-area origin inside the frame.

## Fetch and timing

- The fetch address is the PC, or the jump target when a jump is taken. The
  word read there goes into the IR, and the PC becomes address + 1.
- A taken jump therefore fetches its target in the same cycle, with no delay
  slot and no bubble.
- While the processor stalls, the incrementer adds 0 and the IR holds.
- Every instruction except SAD16 takes one cycle unless stalled.
- Reset (`rst_n`, active low, synchronous) clears the PC, the IR-valid bit,
  the flags and all registers.
- Load the firmware through `prog_*` while reset is held.

## Parameters (me_asip)

| Parameter | Default | Meaning |
|---|---|---|
| `PC_W` | 10 | firmware address width (1024 words) |
| `FRAME_W`, `FRAME_H` | 176, 144 | frame size (QCIF); CIF needs 352, 288 |
| `SA_DIM` | 31 | search-area side in pixels (16 + 16 - 1) |
| `EXT_AW` | clog2(FRAME_W*FRAME_H) = 15 | frame-memory address width |
| `SA_STRIDE` | 32 | row stride of the search-area array |

## Simulating

Each testbench is self-checking. It prints `TB_RESULT checks=N failures=M`
and stops. With plain Verilator 5:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/asip_pkg.sv tb/tb_pkg.sv tb/tb_me_asip.sv --top-module tb_me_asip
./obj_dir/Vtb_me_asip
```

To run another bench, replace `tb_me_asip` with its name. The end-to-end
benches run in well under a minute.

| Testbench | What it shows |
|---|---|
| `tb_me_asip` | Full search over 16x16 candidates for two macroblocks at default parameters. Motion vector and SAD are compared with an exhaustive search in the bench. Also checks the 19-cycle SAD16 and the N*N+1-cycle LD, and that every mechanism occurs: SAD16 stall, LD and SAD16 waiting for the AGU, instructions overlapping a load, each jump condition, MOVC high/low, DIV2, host SPR writes. |
| `tb_me_asip_3ss` | Three-step search firmware (667 words) against a reference model. |
| `tb_me_asip_ds4ss` | Diamond search (462 words) and four-step search (610 words) on a smooth test image, against reference models. Includes a macroblock whose search runs into the edge of the candidate range. |
| `tb_me_asip_3ss_cif` | The same 3SS firmware on a top configured for CIF (`FRAME_W`=352, `FRAME_H`=288, 17-bit frame address), with macroblocks outside the QCIF area. |
| `tb_me_asip_mvfast` | MVFAST firmware (678 words) against a reference model. The host passes three neighbour predictors; each of the low, medium and high motion modes is used. |
| `tb_control_unit`, `tb_regfile`, `tb_alu`, `tb_sadu`, `tb_agu`, `tb_local_mem`, `tb_pc_unit`, `tb_fw_rom` | Unit tests of each block against models. |

The test frames come from `tb/tb_pkg.sv`, which computes them. The reference
frame is the current frame moved by (3, -2), plus noise. `tb/frame_mem_model.sv`
serves them with the one-cycle read latency.

Measured cost per macroblock (16x16 candidates, QCIF frame):

| Search | Cycles | Relative |
|---|---|---|
| Full search | 81,475 | 100% |
| 4SS | 9,193-11,771 | 11-14% |
| DS | 10,464-15,657 | 13-19% |
| 3SS | about 9,015 | 11% |
| MVFAST | 3,864-10,555 | 5-13% |

The original work reports about 4.27 M cycles per QCIF frame for full search,
about 43 k per macroblock. This design needs about 81 k per macroblock,
because its SAD16 takes 19 cycles. The original also reports fast searches at
5-8% of full search on real video sequences, with duplicate points
eliminated. The firmware here revisits points and runs on synthetic images.

## Where this design makes its own choices

The architecture follows the original: eight instructions with a fixed 16-bit
format, 24 + 8 registers of 16 bits, a hardwired decoder with Negative and Zero
flags, a 10-bit PC and firmware ROM, an ALU with an adder/XOR/shifter, a serial
SADU with a loadable accumulator, and an AGU that loads a macroblock or a
search area in parallel with execution. The following are this design's own:

- **Encoding details.** The opcodes follow the original instruction table. The
  original's example assembler listing uses different opcodes for MOVR (001)
  and J (011), and a different MOVR field layout; the table is followed. The
  condition-code values (U, N, P, Z = 00..11) and the MOVC byte selected by t
  are chosen here.
- **Register map.** The text gives 24 GPRs plus 8 SPRs, while the block
  diagram draws only R0..R23. Here both hold: 32 registers, R24..R31 being
  the SPRs. The meaning of R24..R27 for LD, and the host port, are this
  design's.
- **SAD16 semantics.** The accumulator is Rd. The "coordinates" are linear
  line pointers that the ALU advances by 16 and by 32. The instruction's
  19-cycle schedule is chosen here; the SADU's 16 processing cycles match the
  original.
- **AGU.** The raster loader, the one-cycle frame-memory interface, the
  frame-address formula, the absence of border clipping and the stall-on-busy
  interlock are chosen here.
- **Firmware memory.** It is written as a RAM with a load port, so that one
  netlist runs every algorithm. A mask ROM would simply drop the port.
- **Power saving.** The original gates functional-unit inputs, which it
  calls clock gating. Here this is modelled as operand isolation in the ALU
  and the enable on the SADU register; the RTL gates no clock.
- **Not built:**
  - parallel and pipelined SADU variants;
  - AGU data-reuse structures;
  - the external frame memory (behavioural model in `tb/` only);
  - the original's assembler and simulator (replaced by the encoder functions);
  - the original's MVFAST thresholds, which it does not state. The MVFAST
    bench uses L1 = 1 and L2 = 2 on the city-block length |x| + |y| of the
    largest predictor. The host passes the left, top and top-right
    predictors in R28..R30 as search-area pointers, because the processor
    has no data memory to keep a row of motion vectors.
