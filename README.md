# TX — a very small 8-bit accumulator processor

TX is a soft processor meant to be as small as possible: something between a
hand-written state machine and a microcontroller, for FPGA designs that need a
little sequencing logic in software. The original TX was reported at about 87
Virtex-II Pro slices, running at up to 100 MHz, and was positioned as a smaller
alternative to Xilinx's PicoBlaze. This repository is a SystemVerilog
description of that processor.

The whole design follows from one decision: **the ALU always writes the
accumulator**. Every arithmetic or logic instruction has the form
`AC = AC op R`, where `R` is a register or an 8-bit constant from the
instruction. That leaves one write port on the register file, one ALU input
that is always the accumulator, and a control unit with only two cycles per
instruction.

## Programmer's model

| Resource         | Size            | Notes |
|------------------|-----------------|-------|
| Registers R0–R10 | 11 × 8 bit      | general purpose |
| R11 = BP         | 8 bit           | base pointer of `ldx`/`stx` |
| R12 = SP, R14 = CS | 8 bit         | special registers with no hardware role in this version; usable as storage |
| R13 = DS         | 8 bit           | data segment of `ldx`/`stx` (address bits 11:4) |
| R15 = AC         | 8 bit           | the accumulator |
| F                | 1 bit           | written only by compares, tested by `jt`/`jf` |
| PC               | 12 bit          | |
| return address   | 12 bit          | one level: calls do not nest |
| program memory   | 2048 × 16 bit   | separate from data (Harvard) |
| data memory      | 2048 × 8 bit    | |

Addresses are 12 bits wide (a 4096-word space), but each memory holds 2048
words, so address bit 11 is ignored and the upper half aliases the lower.
Compares are **unsigned**.

## Instruction set

Three 16-bit formats share a 4-bit major opcode in bits 15:12:

```
L   op[15:12] ads[11:0]
R   op[15:12] xop[11:8] r1[7:4] r2[3:0]     (r1 is unused by every instruction)
I   op[15:12] xop[11:8] d[7:0]
```

| op  | fmt | xop → instruction | effect |
|-----|-----|-------------------|--------|
| 0   | L | `lda ads`  | AC = M[ads] |
| 1   | L | `sta ads`  | M[ads] = AC |
| 2   | L | `jmp ads`  | PC = ads |
| 3   | L | `jt ads`   | if F: PC = ads |
| 4   | L | `jf ads`   | if !F: PC = ads |
| 5   | L | `call ads` | return address = PC+1, PC = ads |
| 6   | R | 0 `add` 1 `sub` 2 `and` 3 `or` 4 `xor` | AC = AC op R[r2] |
| 7   | I | 0 `addi` 1 `subi` 2 `andi` 3 `ori` 4 `xori` | AC = AC op d |
| 8   | R | 0 `eq` 1 `lt` 2 `le` 3 `gt` 4 `ge` | F = AC cmp R[r2] |
| 9   | I | 0 `eqi` 1 `lti` 2 `lei` 3 `gti` 4 `gei` | F = AC cmp d |
| A   | R | 0 `ret` | PC = return address |
|     |   | 1 `ldx r2` | AC = M[addr] (indexed, below) |
|     |   | 2 `stx r2` | M[addr] = AC |
|     |   | 3 `mov r2` | R[r2] = AC |
|     |   | 4 `mva r2` | AC = R[r2] |
|     |   | 5 `not`    | AC = ~AC |
|     |   | 6 `clr r2` | R[r2] = 0 |
| B   | I | `lca #d`   | AC = d |

These are the 34 instructions of TX. The format fields and the instruction
set are TX's; **the numeric opcode values are this implementation's own**, as
is the register numbering of the special registers. An assembler targeting
this RTL must use the table above (`tx_pkg.sv` has it as enums, and
`tb/tx_tb_pkg.sv` has one encoding function per mnemonic). Unassigned opcodes
execute as two-cycle no-operations.

### Indexed addressing

With an 8-bit data path, `ldx`/`stx` reach a 12-bit address through two
adders:

```
addr = ( DS * 16 + (BP + R[r2]) ) mod 4096        BP + R[r2] keeps its 9th bit
```

With DS = 0 this is simply `M[BP + R[r2]]`, covering the first 512 bytes; DS
moves that window in 16-byte steps. Where DS enters the 12-bit adder is this
implementation's choice.

### Example

Summing a 10-byte array at address 0x40 into R2:

```
        clr r1          ; index
        clr r2          ; sum
        lca #0x40
        mov r11         ; BP = array base
loop:   lca #10
        gt  r1          ; F = 10 > index
        jf  exit
        ldx r1          ; AC = ax[index]
        add r2
        mov r2          ; sum += AC
        mva r1
        addi #1
        mov r1          ; index++
        jmp loop
exit:   jmp exit
```

This takes 234 cycles: 8 for the set-up, 22 per iteration, 6 for the last
test.

## Timing: the control unit

TX is not pipelined. Each instruction is a fetch cycle followed by an
execute cycle; only `ldx`/`stx` take four.

| cycle  | what happens |
|--------|--------------|
| FETCH  | IR ← PGM[PC]; PC ← PC + 1; D-AR ← instruction bits 11:0 |
| IDX1   | (`ldx`/`stx` only) latch BP + R[r2], 9 bits |
| IDX2   | (`ldx`/`stx` only) D-AR ← DS·16 + latched sum |
| EXEC   | ALU, register write-back, memory write, F, PC load; `retire` = 1 |

The one subtle point is how `lda`/`sta` fit in two cycles. Both memories
read combinationally from a **register** — the program memory from the PC, the
data memory from the D-AR — which is timing-equivalent to a block RAM that
uses the PC or D-AR as its own address register. The D-AR is loaded with the
address field *at the end of the fetch cycle*, straight from the instruction
word on its way into the IR. So the data word is valid throughout EXEC and
the write-back to AC happens at the end of it. `ldx`/`stx` cannot do this,
because their address depends on registers named in the instruction; they
spend IDX1 and IDX2 on the two address adders and then execute. TX calls for
four cycles for these two instructions but does not say what the extra
cycles do: the split shown here is this implementation's choice.

Decisions are all taken in EXEC from the IR. The one exception: the
FETCH→IDX1 branch looks at the instruction word on the program bus, because
the IR is only loaded at the end of FETCH.

## Datapath

```
            +-------------------- R/M mux <---- data memory read
            v                          ^
   register bank (16 x 8) --R[r2]--> REG/INT mux <-- d (IR[7:0])
       |  AC (R15)                      |
       |  BP, DS                        v right
       +--------------------------> ALU left ---> result ---> R/M mux, data memory write data
                                        |
                                        +---> compare result ---> F
```

* **ALU** (`tx_alu`): three units in parallel and an output mux, as in TX:
  a carry look-ahead adder/subtractor (`tx_cla_adder`), a logic block
  (`tx_logic`: and, or, xor, not, pass-right, zero) and a rotation/bypass unit
  (`tx_rotate`: pass-left, rotate left/right by one). Compares run a
  subtraction AC − operand and decode carry and zero into eq/lt/le/gt/ge.
  Stores, `mov` and `clr` also go through the ALU (pass-left and zero), so the
  register bank and data memory have a single data source each. No TX
  instruction rotates; the rotate unit is there because TX's ALU has one, and
  is reachable only through the ALU's `op` input.
* **Register bank** (`tx_regbank`): one write port, a general read port for
  R[r2], and fixed taps for AC, BP and DS.
* **Data address cluster** (`tx_dar`): the 8-bit adder, the 12-bit adder and
  the D-AR input mux described above.
* **Program address cluster** (`tx_par`): the PC, its +1 incrementer, and a
  mux chain that loads PC+1, the address field, or the return-address register.
  `call` saves the already-incremented PC. TX's program-counter diagram also
  feeds CS and a register value into the first mux; nothing in the instruction
  set jumps through registers, so that input carries the return-address
  register here instead.

## Files and hierarchy

```
tx_top            processor + memories (top level)
├── tx_cpu        the core
│   ├── tx_cu     IR, cycle sequencer, decoder -> ctrl_t control word
│   ├── tx_alu
│   │   ├── tx_cla_adder
│   │   ├── tx_logic
│   │   └── tx_rotate
│   ├── tx_regbank
│   ├── tx_dar
│   └── tx_par
├── tx_pmem       2048 x 16, with a load port
└── tx_dmem       2048 x 8, with a host port
tx_pkg            opcodes, ALU codes, control word struct, register numbers
```

`tx_top` ports: `clk`; `rst` (synchronous, active high; clears PC, IR,
registers, F, D-AR, state); `prog_we/prog_addr/prog_data` write the program
memory; `host_we/host_addr/host_wdata/host_rdata` access data memory; `pc`,
`acc`, `flag` show state; `retire` pulses in the last cycle of each
instruction. Load the program and data while `rst` is high. The memories are
not reset. Parameters `PMEM_DEPTH` and `DMEM_DEPTH` (default 2048, powers of
two) set the memory sizes.

## Simulating

Each block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/tx_pkg.sv tb/tx_tb_pkg.sv tb/tb_tx_top.sv --top-module tb_tx_top -Mdir obj -o sim
./obj/sim
```

Replace `tb_tx_top` with any other testbench name. What they check:

* `tb_tx_top` — full design at default sizes: the array sum above with random
  data (result and the exact 234 cycles), then a program that uses the rest:
  `stx`/`ldx` with DS ≠ 0 and a carry out of BP + R, `lda`/`sta` at 0x7FF,
  `call`/`ret`, `jt`/`jf` taken and not taken, every compare, subtract
  wrap-around. Each retired instruction is compared with a reference model,
  and each mechanism must occur at least once.
* `tb_tx_cpu` — 18,000 random instructions over 12 random programs, with
  PC, all 16 registers, F, every memory write and every cycle count compared
  against the instruction-level model `tx_iss` in `tb/tx_tb_pkg.sv`.
* `tb_tx_cu` — every instruction with F = 0 and 1: cycle count and control
  word.
* Leaf tests: exhaustive add/sub (`tb_tx_cla_adder`) and rotate
  (`tb_tx_rotate`); random tests of the ALU, logic block, register bank,
  address clusters and memories.

`tx_tb_pkg` also serves as a small assembler: `lda(12'h123)`, `add(3)`,
`lca(8'h40)` and so on return the 16-bit instruction words.

## What is not here

* **Interrupt.** TX has one level of interrupt, but nothing defines its
  request input, vector, enable, or how it returns (there is no return-from-
  interrupt instruction), so it is not implemented.
* **Board I/O.** The original ran on a XUP Virtex-II Pro board with
  seven-segment displays and switches attached. How they connect to the
  processor is not defined, so they are left out; the host ports of `tx_top`
  are the only way in and out.
* **SP and CS** exist as ordinary registers R12 and R14 only. No SP-based
  addressing or register-indirect jump is built, because no instruction uses
  them.
* **Two-register instructions** such as `add r1 r2` (R[r1] = R[r1] + R[r2]),
  which the R format leaves room for, are not implemented.
* Resource use was not compared with the original 87-slice / 156-LUT
  figures. The memories here are written as arrays with combinational read
  from a registered address. They map onto distributed or block RAM, depending
  on the synthesis tool.
