# tinyriscv: a three-stage RV32I pipeline

A small 32-bit RISC-V processor with a three-stage pipeline: fetch, decode and
execute. It is modelled on the open-source *tinyriscv* core. The goal is a
core that is easy to follow and cheap in logic. Memory access and write-back
happen inside the execute stage, so no stage 4 or 5 is needed. The one data
hazard the pipeline can have is solved by a bypass inside the register file.
Control hazards are solved by throwing away the two instructions fetched
behind a taken branch or jump. Instruction memory and data memory are
separate (a Harvard arrangement), so fetch and loads/stores never compete.

The RTL is SystemVerilog (IEEE 1800-2017) and synthesizable. It is checked
with Verilator and with the slang front end of Yosys.

## The pipeline

```
          stage 1: fetch          stage 2: decode           stage 3: execute
        +--------+   +-------+   +----+     +-------+   +--------------------+
  ctrl->| pc_reg |-->| if_id |-->| id |---->| id_ex |-->|  ex  (uses alu)    |
        +--------+   +-------+   +----+     +-------+   +--------------------+
            |  pc        ^         |  ^                   |     |      |   |
            v            |         v  |  rs1/rs2          |     |      |   | jump_flag,
        +----------------+--+   +---------+  rd, data     |     |      |   | hold_flag
        | rib: fetch path   |   |  regs   |<--------------+     |      |   v
        |      data path  <-+---+---------+---------------------+      | +------+
        +--+-------------+--+    (bypass)      load/store              | | ctrl |--> pc_reg,
           |             |                                             | +------+    if_id, id_ex
        +--v--+       +--v--+
        | rom |       | ram |
        +-----+       +-----+
```

| module     | what it is |
|------------|------------|
| `pc_reg`   | program counter: +4 each cycle, load a jump target, or hold |
| `if_id`    | register between fetch and decode (instruction, its address, valid) |
| `fetch`    | `pc_reg` + `if_id` as one unit: the fetch ("finger fetch") module |
| `id`       | combinational decoder: source registers, destination, write enable, immediate |
| `regs`     | 32 x 32-bit register file: 2 asynchronous reads, 1 write, bypass, debug read port |
| `id_ex`    | register between decode and execute |
| `ex`       | combinational execute stage: operand selection, branch decision, load/store, write-back request |
| `alu`      | the shared arithmetic unit used by `ex` |
| `ctrl`     | pipeline control: redirect, flush, pause |
| `rib`      | internal bus: fetch path to the ROM, decoded data path to ROM or RAM |
| `rom`      | instruction memory (4096 words), combinational read |
| `ram`      | data memory (4096 words), combinational read, byte-enabled write |
| `tinyriscv`| the top: everything above, wired together |
| `rv_pkg`   | opcodes, ALU operations, the control bundle and the bus request struct |

### Timing

When the instruction at address `p` is in execute, decode holds `p+4` and
fetch is reading `p+8`. The instruction memory is read combinationally. So
the word at the PC is ready before the clock edge at which `if_id`
captures it. Decode and execute are combinational. The execute stage's
register write and its memory write both happen at the next rising edge.

After reset is released:

| rising edge | fetch (PC) | decode | execute | written at this edge |
|---|---|---|---|---|
| 1 | 4 | inst @0 | bubble | - |
| 2 | 8 | inst @4 | inst @0 | - |
| 3 | 12 | inst @8 | inst @4 | result of inst @0 |
| 4 | 16 | inst @12 | inst @8 | result of inst @4 |

Once the pipeline is full, one instruction completes per cycle. A taken
branch or jump costs two extra cycles. For example, the program
`addi x27,x0,38; addi x28,x0,54; add x29,x28,x27` has `x29 = 92` in the
register file after the fifth rising edge. The add reads 0x36 and 0x26 as
its operands.

## Hazards, and how each is handled

**Structural.** Fetch uses the ROM's instruction port. Loads and stores use
the data path of the bus. Neither ever waits for the other, so the bus has no
arbiter and never stalls.

**Data (read after write).** Decode reads registers in the same cycle that
execute computes the result of the instruction just ahead. That result is
written only at the next edge. An instruction two or more places ahead has
already written its result. So the only conflict is between neighbours, and
it is solved inside `regs`. When a read port addresses the register that is
being written in this cycle, it returns the write data instead of the array
contents. Loads also complete inside execute, because the memory read is
combinational. As a result there is no load-use stall either. The pipeline
never stalls for data.

**Control.** Branches and jumps are resolved in execute. When one is taken,
`ex` raises `jump_flag_o` with the target and `hold_flag_o` to request a
pause. `ctrl` then loads the target into the PC and flushes both `if_id` and
`id_ex`. The two instructions fetched behind the branch become bubbles (NOPs
with `valid` low and no register write). There is no branch prediction and
no delay slot. The cost is two cycles per taken transfer. A branch that is
not taken costs nothing. In this design `hold_flag_o` always equals
`jump_flag_o`. `ctrl` uses the flag for the flush and the jump for the
redirect.

**External pause.** `hold_req_i` freezes the PC and `if_id` and sends
bubbles into execute. The instruction already in execute still completes. A
taken branch in the same cycle has priority, and the pause applies from the
next cycle. This input is this design's own addition, for a debugger or a
slow external device.

## The execute stage and the shared ALU

`ex` decodes the instruction again, from the word carried through `id_ex`. It
feeds `alu` with:

| instruction | ALU a, b (result) | address adder base + offset |
|---|---|---|
| OP / OP-IMM | rs1, rs2 or imm | - |
| LUI | 0, imm | - |
| AUIPC | pc, imm | - |
| JAL | pc, 4 (link) | pc + imm (target) |
| JALR | pc, 4 (link) | rs1 + imm, bit 0 cleared |
| Bxx | rs1, rs2 (compare flags) | pc + imm (target) |
| loads/stores | - | rs1 + imm (address) |

`alu` computes every result with continuous assignments: sum, difference,
and, or, xor, the three shifts and both less-thans. An operation code only
picks one of them. A separate adder forms addresses, and three flags (`eq`,
`lt`, `ltu`) drive the branch decision. Keeping these operators in one shared
unit is a resource optimisation. The design this follows reports about 1.6 %
fewer logic elements on a Cyclone IV FPGA from it (3091 before, 3041 after).
That figure has not been reproduced for this RTL.

Loads select and sign- or zero-extend a byte or halfword lane from the
32-bit read word. Stores replicate the data into every lane and set byte
enables. Accesses are assumed to be naturally aligned: the low address bits
only choose the lane.

## Instructions

All of RV32I except the system group is implemented:

* register-register: `add sub sll slt sltu xor srl sra or and`
* register-immediate: `addi slti sltiu xori ori andi slli srli srai`
* `lui auipc jal jalr`
* branches: `beq bne blt bge bltu bgeu`
* loads and stores: `lb lh lw lbu lhu sb sh sw`

`fence`, `ecall`, `ebreak` and the CSR instructions decode as no-ops. There
are no interrupts, no exceptions and no CSRs such as `mepc`. An illegal
instruction also does nothing.

## Bus and memory map

`rib` has two master sides:

* the fetch path, which always goes to the ROM's instruction port;
* the data path from `ex`, which is decoded on address bits `[31:28]`:

| region | slave |
|---|---|
| `0x0000_0000` - `0x0FFF_FFFF` | `rom` data port: read constants, or write the program image |
| `0x1000_0000` - `0x1FFF_FFFF` | `ram` |
| anything else | reads 0, writes ignored |

Both memories are word arrays of `WORDS` entries, and addresses wrap at that
size. A request (`rv_pkg::bus_req_t`) is `req`, byte enables `be` (zero for a
read), `addr` and `wdata`. Read data comes back combinationally. A write
takes effect at the next rising edge. An immediate assertion in `rib` checks
that one address never selects two slaves. To add a slave, raise `NSLV`,
extend `SLV_REGION`, and connect one more element of `s_req_o`/`s_rdata_i`.

The ROM starts all zero. Load a program by writing `u_rom.mem[]` (as the
testbenches do), by `$readmemh` into it, or with stores to region 0.

## Top-level interface (`tinyriscv`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock, all flops on the rising edge |
| `rst` | in | 1 | synchronous, active high: PC = `RESET_PC`, registers = 0, pipeline empty |
| `hold_req_i` | in | 1 | pause the pipeline (see above) |
| `dbg_reg_addr_i` | in | 5 | register to read on the debug port |
| `dbg_reg_data_o` | out | 32 | its value (with the same bypass as the decode ports) |
| `ex_pc_o` | out | 32 | address of the instruction in execute |
| `ex_valid_o` | out | 1 | execute holds a real instruction, not a bubble |

| parameter | default | |
|---|---|---|
| `ROM_WORDS` | 4096 | instruction memory, 32-bit words (16 KiB) |
| `RAM_WORDS` | 4096 | data memory, 32-bit words (16 KiB) |
| `RESET_PC` | 0 | first instruction address |

Reading `ex_valid_o` together with `ex_pc_o` gives the exact stream of
executed instructions, which is handy for lock-step comparison.

## What follows the reference design and what is chosen here

Taken from the reference:

* the three stages and the module split (`pc_reg`, `if_id`, `id`, `id_ex`,
  `ex`, `regs`, `ctrl`, bus, ROM);
* the combinational instruction read, the asynchronous register read, and
  memory access and write-back inside execute;
* the register-file bypass for neighbouring instructions;
* the pipeline pause (flush) for control transfers;
* the separate instruction and data memories;
* the shared ALU;
* the port names of the fetch unit, decoder and execute stage;
* reset PC 0.

Chosen here, because the reference does not say:

* memory sizes and the memory map;
* reset style;
* the NOP encoding of bubbles and the `valid` bits;
* the `imm` output of the decoder;
* the exact control bundle, and the external pause;
* the debug port;
* what drives `hold_flag_o`;
* the writable data port of the ROM;
* the choice to implement all loads/stores and the whole integer set.

Not built:

* interrupts and the `mepc` register, which are mentioned but not described;
* misaligned access handling.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`, and each has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_alu` | all ten operations, address adder and flags, corner and random operands |
| `tb_pc_reg`, `tb_if_id`, `tb_id_ex` | reset, step, hold, flush and jump priority against cycle models |
| `tb_fetch` | one-cycle fetch latency, redirect, hold and flush, with a modelled memory |
| `tb_id` | register fields, write enables and all five immediate formats |
| `tb_regs` | random traffic, x0, and bypass on every port |
| `tb_ex` | 6000 random instructions against the reference simulator (results, branch decisions, targets, store lanes) |
| `tb_ctrl` | all input combinations |
| `tb_rib` | decode, isolation of the unselected slave, unmapped addresses |
| `tb_rom`, `tb_ram` | byte-enabled writes, combinational reads, wrap-around |
| `tb_tinyriscv` | the whole processor at default sizes (see below) |
| `tb_riscv_tests` | one self-checking program per instruction (38 programs) |

`tb_tinyriscv` checks the 38 + 54 example cycle by cycle. It then runs 24
random programs, about 7000 executed instructions, in lock step with a small
instruction-set simulator (`tb/rv_tb_pkg.sv`) that has nothing in common with
the RTL. The checks cover:

* the order of executed PCs;
* a gap of 1 cycle between instructions, or 3 cycles after a taken transfer;
* the final register file.

Half of the programs toggle `hold_req_i` at random. The bench counts bypasses,
taken and not-taken branches, loads, stores and pauses, and fails if any of
them never happened.

`tb_riscv_tests` follows the convention of the RISC-V unit tests. A program
ends by setting `s10 = 1`, with `s11 = 1` for pass or `s11 = 0` for fail. One
program is generated for each of the instructions add, addi, and, andi,
auipc, beq, bge, bgeu, blt, bltu, bne, jal, jalr, lui, or, ori, simple, sll,
slli, slt, slti, sltiu, sltu, sra, srai, srl, srli, sub, xor and xori, plus
the eight loads and stores. The official test binaries are not used. The
programs are built inside the testbench, and the expected values come from
the reference simulator.

### Running with Verilator

From the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/rv_pkg.sv tb/tb_tinyriscv.sv --top-module tb_tinyriscv -o sim
./obj_dir/sim
```

Replace `tb_tinyriscv` by any other testbench name. The memories are
initialised to zero, and every flop is reset. Each testbench finishes in a
few seconds at the default sizes.
