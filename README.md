# DVSP: a 16-bit streaming DSP soft-processor

DVSP is a small pipelined signal processor for FPGAs. It is meant for filters
and transforms on continuous audio or video sample streams. Its main ideas:

- **Queues as I/O.** Samples enter and leave through hardware FIFO queues
  that an instruction names as an operand. A processor that reads an empty
  queue, or writes a full one, simply stalls. Several processors chained by
  FIFOs therefore synchronise themselves, with no software protocol.
- **DSP extensions on a simple RISC.** A 32-bit accumulator, zero-overhead
  loops, and pointers with auto-increment and modulo (cyclic buffer)
  addressing are added. A multiply-accumulate over a cyclic delay line then
  takes one instruction per tap, with no loop-control instructions.

The instruction set loosely follows the TI MSP430. The machine is a Harvard
design with 32-bit instructions, 16 general registers and 16 special
registers, all 16 bits wide. The data memory is 16 bits wide and byte
addressed.

This repository holds synthesizable SystemVerilog for the processor
(`dvsp_core`) and for a three-processor platform (`dvsp_platform`, the top
level). Each has a self-checking testbench. Workload testbenches run
programs on one processor:
- a 256-sample FFT spectral power, 27,975 cycles per window with 16-bit
  arithmetic;
- CRC-16 at 8 cycles per byte and CRC-32 at 11 cycles per byte;
- a 4-sample convolution.

## The platform

```
in --> FIFO --> core 0 --queue 0--> FIFO --> core 1 --> FIFO --> out[0]
                       \-queue 1--> FIFO --> core 2 --> FIFO --> out[1]
```

`dvsp_platform` holds three `dvsp_core` instances and five `dvsp_fifo`
queues (16 words deep by default, parameter `FIFO_DEPTH`).

- Programs are written through `pm_l_we[c]`, `pm_l_addr` and `pm_l_data`.
  Do this while `rst` is high.
- Releasing `rst` starts all three cores at address 0.
- `in_push`/`in_ready` feed the input FIFO.
- `out_pop`/`out_valid`/`out_data` drain the two output FIFOs. The head word
  is always shown (show-ahead).
- Queues that the arrangement leaves unconnected behave as follows:
  - core 0's input queue 1 reads as empty;
  - output queue 1 of cores 1 and 2 accepts writes and drops them.

## Pipeline: what a programmer must know

There are four stages. All of them advance together or all stall together.

| stage | work |
|---|---|
| FE | The program counter addresses the synchronous program memory. The zero-overhead loop logic chooses the next address. |
| ID | Decodes the instruction. Reads general registers (ports A, B) and special registers. Forms constant operands and computes the load/store address. Starts the data-memory read (register address or read pointer S), the constant read (code pointer C) and the input-queue read. Auto-increments S and C. |
| EX | Selects each source and runs the ALU and the condition. Writes general and special registers and the program counter. Uses and auto-increments write pointer D. |
| ST | Adds into the accumulator. Writes data memory. Pushes to an output queue. |

These rules come from that structure. The hardware does not check them:
scheduling is the programmer's job.

1. **Register results have two cycles of latency; there is no forwarding.**
   A result written in EX can be read by the instruction two places after
   its producer, not by the next one. The next one still reads the old
   value. This also holds for special registers, including pointers.
2. **Jumps have two delay slots.** The PC is written in EX, so the two
   instructions after a jump are always executed. This applies to `JMP`,
   conditional jumps, `CALL` and `RET`.
3. **Accumulator reads lag three instructions.** The accumulator is updated
   in ST. `SR_ACCL`/`SR_ACCH` show the new sum to the third instruction after
   the accumulating one.
4. **Data memory stores lag three instructions.** Memory is written in ST
   and read in ID. A load sees a store made by an instruction at least three
   places earlier.
5. **Loop registers must be ready before the loop end is fetched.** The
   loop registers are written in EX, but FE compares them with the fetch
   address. So `loop_end` must be at least three instructions after the
   instruction that writes the last loop register.
6. **A stall freezes everything, including ST.** A core waiting on an empty
   input queue also holds back the output its previous instructions have not
   yet pushed. In a stream, the last result of a block comes out only when
   the next input arrives, or when the producer sends a trailing flush
   sample.

With no stalls, every instruction takes exactly one cycle. The core
testbench checks this cycle by cycle over a program of 85 fetched
instructions.

## Instruction format

Every instruction is 32 bits. The layout is fixed:

```
 31      26   25   24   23      16 15       8 7        0
+----------+-----+----+----------+----------+----------+
|    op    | acc |  0 |   dst    |   src1   |   src2   |
+----------+-----+----+----------+----------+----------+
each operand = {mode[3:0], idx[3:0]}
```

`acc` set means the instruction's ALU result is also added into the 32-bit
accumulator in ST. For a multiplication the full 32-bit product is added.
Otherwise the 16-bit result is sign-extended and added.

Addressing modes (the 4-bit field leaves room for 16; 7 are defined):

| mode | as a source | as a destination |
|---|---|---|
| 0 GPR | `R[idx]` | `R[idx]` |
| 1 SPR | special register `idx` | special register `idx` |
| 2 +K | constant `idx` (0..15) | discarded |
| 3 -K | constant `-(idx+1)` (-1..-16) | discarded |
| 4 QUE | pops input queue `idx[0]` | pushes output queue `idx[0]` |
| 5 MEMR | `DM[R[idx]]` | `DM[R[idx]]` |
| 6 PTR | `idx[1]=0`: `DM[S]`; `idx[1]=1`: program halfword at C. `idx[0]` = increment | `DM[D]`, `idx[0]` = increment |

Operations (`dvsp_pkg::op_e`):

| group | operations | effect |
|---|---|---|
| arithmetic/logic | `ADD ADDC SUB SUBC MUL MULU MULH MULHU AND OR XOR SHL SHR SRA` | `dst = src1 op src2`. `MUL`/`MULU` give the low half of the 32-bit product; `MULH`/`MULHU` give the high half. Carry is updated by the add/subtract group. Subtraction carry means "no borrow". |
| moves | `MOV`, `MOVEQ MOVNE MOVLT MOVGE MOVGT MOVLE` | `dst = src1`, if `src2` compared (signed) with zero holds |
| jumps | `JMP`, `JEQ JNE JLT JGE JGT JLE`, `RET` | `pc = src1`, if the condition on `src2` holds |
| special | `LD` | `dst = DM[src1 + src2]` |
| | `ST` | `DM[src1 + sext(dst field)] = src2` (the dst field is an 8-bit offset) |
| | `MOVI` | `dst = {src1 field, src2 field}`, a 16-bit constant |
| | `CALL` | `dst = pc_of_call + 3` (past its delay slots), `pc = src1` |

A handful of operand combinations are not allowed, because there is only
one read port of each kind:

- At most one data-memory source, one code-pointer source and one queue
  source per instruction.
- A destination in MEMR mode takes register port A for its address.
  Source 1 then must not be a general register.
- `CALL`'s destination must be a general register.

Special registers (`dvsp_pkg::SR_*`):

| # | name | # | name |
|---|---|---|---|
| 0 | ACCL (accumulator 15:0) | 8 | PD (write pointer D) |
| 1 | ACCH (accumulator 31:16) | 9, 10 | PD_LO, PD_HI |
| 2 | CNT (loop count) | 11 | PC (code pointer, halfword address) |
| 3 | BEG (first loop address) | 12, 13 | PC_LO, PC_HI |
| 4 | END (last loop address) | 14 | FLAGS (bit 0 = carry) |
| 5 | PS (read pointer S) | 15 | reserved, reads 0 |
| 6, 7 | PS_LO, PS_HI | | |

`dvsp_pkg` also provides encoding functions, `enc`, `enc_movi`, `enc_st` and
`opnd`. The testbenches write their programs with them, for example
`enc(OP_MUL, 1, opnd(M_CPOS,0), opnd(M_PTR,1), opnd(M_PTR,3))`. This is one
filter tap: the product of `DM[S++]` and the coefficient at `C++` is added
into the accumulator.

## Zero-overhead loops (`dvsp_pc_zol`)

Three special registers control a hardware loop: CNT, BEG and END. Every
cycle the fetch address is compared with END.

- If they are equal and CNT is not zero, CNT is decremented.
- If CNT was above one, the next fetch address is BEG; otherwise fetching
  falls through.

Loading CNT = N runs the body BEG..END N times. A one-instruction body is
allowed. CNT = 0 switches the loop off.

Priorities: a stall holds both the PC and the count, and a taken jump
overrides the loop. There is one set of loop registers, so a nested outer
loop must be written with a jump.

## Accumulator (`dvsp_acc`)

The accumulator is 32 bits, built from two 16-bit halves and two adders.

- The low half adds the 16-bit ALU result.
- The high half adds its carry, plus either the high product half (for a
  multiplication) or `0xFFFF`/`0x0000`, the sign extension of the low result.
- Writing `SR_ACCL` or `SR_ACCH` loads that half. In the same cycle, the
  write takes priority over accumulation for that half.

## Pointers and memories

- **Pointers.** S (data read), D (data write) and C (code) are each a
  `dvsp_pointer`: a pointer plus first/last addresses of a cyclic buffer.
  When incremented at the last address, the pointer returns to the first.
  Data pointers step by 2, one 16-bit word in byte addresses. C steps by 1
  over 16-bit halfwords of the 32-bit program memory; bit 0 selects the low
  (0) or high (1) half. After reset a buffer spans the whole address space.
- **Program memory** (`dvsp_pmem`, default 1024 words) is synchronous block
  RAM with three ports: fetch, constant and load.
- **Data memory** (`dvsp_dmem`, default 1024 words = 2 KiB) is synchronous
  block RAM, 16 bits wide. It has a read port used by ID and a write port
  used by ST. Only whole words are accessed; address bit 0 is ignored.

## Origin of each part, and where this RTL departs

**Taken from the original processor description:**

- the four stages and the work done in each;
- the stall rules;
- the two-cycle register latency without forwarding;
- the 32-bit instructions with an 8-bit opcode (6 operation bits, an
  accumulator bit, a reserved bit);
- the three-operand form and the list of seven addressing modes;
- the 16 + 16 registers;
- the byte-addressed 16-bit data memory;
- synchronous block-RAM memories;
- the three pointers with auto-increment and modulo addressing;
- the accumulator's adder structure;
- the zero-overhead loop structure;
- the three-core FIFO arrangement.

**Chosen here, because the description does not give it:**

- the bit positions and numbering of operations, modes and special
  registers;
- the exact operation list;
- how a cyclic buffer's range is set (lo/hi registers);
- the MOVI/LD/ST/CALL field use;
- two queues per direction per core;
- the memory and FIFO depths;
- reset values;
- loop-count semantics;
- the show-ahead FIFO interface.

The two jump delay slots follow from jumps being resolved in EX.

**Not built:**

- **SPI program loader.** It is mentioned only as one way to load the
  program memory. A parallel load port is brought out instead.
- **The original application programs.** The original FFT spectral-power
  program (an order-8, 256-sample window, about 135,000 cycles with 32-bit
  internal arithmetic) and the original CRC programs are not available.
  Own programs stand in for them (see `tb_dvsp_fft_power` and `tb_dvsp_crc`
  below). The CRC ones reach the reported 8 and 11 cycles per byte. The FFT
  one uses 16-bit arithmetic, so its cycle count is not comparable. A
  32-bit FFT at the default sizes would need all 1024 data words for the
  complex values alone.
- **FPGA area and frequency figures.** They belong to the original
  generated implementation, not to this RTL.

## Verification

Every module has a testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

- `tb_dvsp_alu`, `tb_dvsp_acc`, `tb_dvsp_regfile`, `tb_dvsp_fifo`: random
  stimulus against integer and array models.
- `tb_dvsp_pointer`, `tb_dvsp_pc_zol`: directed sequences, including the
  exact fetch sequence of a 3-iteration loop, stall hold and jump priority.
- `tb_dvsp_pmem`, `tb_dvsp_dmem`: load/fetch/constant ports, read latency
  and hold.
- `tb_dvsp_core`: one program that uses every instruction group and
  addressing mode, checked against a hand-worked result stream.
  - With free-flowing queues, the final output must appear in cycle 87,
    which means no cycles are lost to loop control.
  - With random starvation and back-pressure, the same stream must come out
    and both stall kinds must occur.
- `tb_dvsp_conv4`: the 4-sample convolution benchmark on one core. Samples
  are stored through D in a one-instruction loop. The multiply-accumulate
  reads them through S and the coefficients through C, in a second
  one-instruction loop. It checks the 32-bit result, that the
  multiply-accumulate takes exactly 4 cycles, and that the result leaves in
  cycle 25 after reset.
- `tb_dvsp_fft_power`: spectral power of one 256-sample window on one core
  at the default sizes, computed with a radix-2 decimation-in-time FFT.
  - The samples are stored in bit-reversed order. The addresses come from a
    halfword table read through C.
  - Each of the 8 stages walks its twiddle factors (also read through C) in
    a jump loop. Inside it, a zero-overhead loop runs the 22-instruction
    butterfly.
  - The arithmetic is 16-bit: twiddles are Q15, the products take the high
    half (MULH), and the other input is halved, so every stage scales by 1/2.
  - re² + im² is summed in the accumulator and both halves are sent out.
  - It checks that all 256 powers are bit-exact against a fixed-point model
    of the same arithmetic, and that a cosine at bin 10 peaks at bins 10 and
    246.
  - The cycle count must equal the number of instructions executed plus 3
    cycles of pipeline fill. That gives 27,975 cycles per window: load 1030,
    FFT 24,887, power 2055.
- `tb_dvsp_crc`: table-driven CRC on one core, reflected form
  `crc = (crc >> 8) ^ T[(crc ^ byte) & 0xFF]`.
  - The table is copied from the input queue into data memory through D.
  - CRC-16 (polynomial 0xA001) runs in an 8-instruction loop body. Its
    loop-carried chain is xor, and, load, xor: four steps of two cycles,
    since there is no forwarding. The load adds the index to itself, so no
    shift is needed.
  - CRC-32 (0xEDB88320) keeps the CRC in two registers and runs 11
    instructions per byte with no empty slot.
  - It checks the standard check values of "123456789" (0xBB3D and
    0xCBF43926) and random messages against a bit-by-bit model. The
    cycles between successive bytes taken from the queue must be exactly
    8 and 11.
- `tb_dvsp_platform`: the top at its default sizes, running three programs:
  - core 0 fans the input out;
  - core 1 runs a 4-tap FIR, using a cyclic delay line through D/S,
    coefficients through C, and a one-instruction zero-overhead
    multiply-accumulate loop;
  - core 2 accumulates the signal energy.

  The outputs are compared with reference sums. The FIR rate is checked:
  one result every 16 cycles when nothing stalls. Every mechanism is counted
  and must occur: both stall kinds, loop jump-backs, the wrap of each
  pointer, accumulation, jumps and full FIFOs.

To run a testbench with Verilator, from the repository root:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/dvsp_pkg.sv \
          tb/tb_dvsp_platform.sv --top-module tb_dvsp_platform
./obj_dir/Vtb_dvsp_platform
```

Replace the testbench name to run another one. Lint warnings about unused
address bits (memories shallower than the 16-bit address) are expected.
